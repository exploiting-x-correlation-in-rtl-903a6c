// tb_xc_workload: the evaluated configuration of a 128-bit MISR with several
// signatures per scan response, run with X statistics like those of the
// industrial circuits the method was evaluated on.
//
// Scan responses of 64 vectors x 128 slices x 32 chains are generated with a
// skewed X distribution: 4.8 % of the cells are X-prone and together capture
// 90 % of the X's, the rest are spread evenly. Two X densities are run,
// 2.47 % and 0.50 %, each with a coarse (2 partitions) and a fine
// (8 partitions) scan-slice partitioning. For each case the testbench
// merges the partial responses per partition, loads all control sets into
// the indexed RAM, streams all vectors with random X values and checks
// every X-canceled output against the value predicted with the X's at zero,
// and its latency. It then prints the tester data needed:
//  * conventional X-canceling: the MISR compacts until it holds W-Q X's,
//    then one custom control set of Q*W bits is used;
//  * superset X-canceling: one control set per merged group plus, per
//    signature, a group index of ceil(log2(groups in that partition)) bits;
// and the ratio of the two. The ratio must exceed 1 in every case.
module tb_xc_workload;
  import xc_pkg::*;
  localparam int unsigned W      = MISR_W;
  localparam int unsigned Q      = NUM_XC;
  localparam int unsigned N      = N_CHAINS;
  localparam int unsigned CH     = N_TCH;
  localparam int unsigned AW     = $clog2(GROUP_DEPTH);
  localparam int unsigned PW     = $clog2(MAX_PARTS);
  localparam int unsigned WORD_W = Q * W;
  localparam int unsigned L      = 128;         // slices per vector
  localparam int unsigned CELLS  = L * N;
  localparam int unsigned V      = 64;          // scan vectors
  localparam int unsigned MAXG   = 64;          // clusters per partition

  typedef logic [CELLS-1:0] cellv_t;
  typedef logic [Q-1:0][W-1:0] cset_t;

  // ---------------- DUT ----------------
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  cfg_sel_e cfg_sel = CFG_MODE;
  logic [PW-1:0] cfg_idx = '0;
  logic [15:0] cfg_data = '0;
  logic ld_start = 0, tch_valid = 0, gidx_we = 0, vec_ready = 0, slice_valid = 0;
  logic [AW-1:0] ld_addr = '0, gidx = '0;
  logic [CH-1:0] tch_data = '0;
  logic [N-1:0] slice = '0;
  logic ld_busy, waiting, xc_valid, xc_vec_end;
  logic [Q-1:0] xc_bits;
  logic [PW-1:0] xc_part;
  ctrl_src_e mode;
  logic [15:0] reg_loads, part_updates, ignored_slices;

  xc_top dut (.*);

  always #5 clk = ~clk;

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_reg_reuse = 0, n_ram_fetch = 0, n_bypass = 0, n_incr_upd = 0, n_incr_reuse = 0;
  int n_wait = 0, n_switch = 0, n_detect = 0, n_multi = 0, n_single = 0;
  int n_hid_sup = 0, n_hid_other = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  typedef struct {
    logic [Q-1:0]  bits;
    logic [PW-1:0] part;
    logic          vend;
    longint        due;
  } exp_t;
  exp_t expq[$];

  // output monitor: value, partition, end of vector and latency
  always @(negedge clk) begin
    if (rst_n && xc_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cyc);
      end else begin
        e = expq.pop_front();
        if (xc_bits !== e.bits || xc_part !== e.part || xc_vec_end !== e.vend || cyc != e.due) begin
          failures++;
          if (failures < 10)
            $display("output mismatch: got %b p%0d ve%b @%0d, want %b p%0d ve%b @%0d",
                     xc_bits, xc_part, xc_vec_end, cyc, e.bits, e.part, e.vend, e.due);
        end
      end
    end
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test data ----------------
  cellv_t xm [V];       // X locations
  cellv_t val [V];      // known values (X cells hold 0)
  cellv_t err [V];      // injected error (flipped cell)
  int np;
  int pstart [MAX_PARTS], plen [MAX_PARTS];
  int grp_of [MAX_PARTS][V];
  int ngrp [MAX_PARTS];
  cset_t gset [MAX_PARTS][MAXG];

  function automatic logic [W-1:0] step(logic [W-1:0] s, logic [N-1:0] d);
    logic [W-1:0] n;
    for (int i = 0; i < W; i++) begin
      n[i] = (i == 0) ? 1'b0 : s[i-1];
      if (MISR_POLY[i]) n[i] ^= s[W-1];
    end
    for (int j = 0; j < N; j++) begin
      int b;
      b = j * (W / N);
      n[b] ^= d[j];
      n[(b + 5 + 2 * j) % W] ^= d[j];
      n[(b + 61 + 3 * j) % W] ^= d[j];
    end
    return n;
  endfunction

  function automatic cellv_t pmask(int p);
    cellv_t m = '0;
    for (int c = pstart[p] * N; c < (pstart[p] + plen[p]) * N; c++) m[c] = 1'b1;
    return m;
  endfunction

  function automatic logic [W-1:0] sig_of(cellv_t cells, int p);
    logic [W-1:0] s = '0;
    for (int t = pstart[p]; t < pstart[p] + plen[p]; t++) s = step(s, cells[t*N +: N]);
    return s;
  endfunction

  function automatic logic [Q-1:0] cancel(logic [W-1:0] s, cset_t cs);
    logic [Q-1:0] r;
    for (int k = 0; k < Q; k++) r[k] = ^(s & cs[k]);
    return r;
  endfunction

  // Gauss-Jordan elimination of the symbolic MISR equations of all X's in um
  function automatic bit gauss_solve(cellv_t um, int p, output cset_t cs);
    logic [W-1:0] rows [W];
    logic [W-1:0] tags [W];
    bit used [W];
    int nx = 0, k = 0;
    cs = '0;
    for (int i = 0; i < W; i++) begin rows[i] = '0; tags[i] = '0; tags[i][i] = 1'b1; used[i] = 0; end
    for (int c = 0; c < CELLS; c++) begin
      if (um[c]) begin
        cellv_t imp = '0;
        logic [W-1:0] col;
        if (nx >= W - Q) return 0;
        imp[c] = 1'b1;
        col = sig_of(imp, p);
        for (int i = 0; i < W; i++) rows[i][nx] = col[i];
        nx++;
      end
    end
    for (int j = 0; j < nx; j++) begin
      int r = -1;
      for (int i = 0; i < W; i++) if (r < 0 && !used[i] && rows[i][j]) r = i;
      if (r >= 0) begin
        used[r] = 1;
        for (int i = 0; i < W; i++)
          if (i != r && rows[i][j]) begin rows[i] ^= rows[r]; tags[i] ^= tags[r]; end
      end
    end
    // each output checks a random combination of the X-free rows, so that
    // every known cell outside the span of the X's is seen with
    // probability 1 - 2^-Q
    for (int i = 0; i < W; i++) if (!used[i] && rows[i] == '0) k++;
    if (k < Q) return 0;
    for (int q = 0; q < Q; q++)
      while (cs[q] == '0)
        for (int i = 0; i < W; i++)
          if (!used[i] && rows[i] == '0 && $urandom_range(0, 1) == 1) cs[q] ^= tags[i];
    return 1;
  endfunction

  // greedy clustering of the partial responses of partition p
  task automatic cluster(int p);
    cellv_t pm = pmask(p);
    cellv_t xp [V];
    int nxp [V];
    ngrp[p] = 0;
    for (int v = 0; v < V; v++) begin
      grp_of[p][v] = -1;
      xp[v] = xm[v] & pm;
      nxp[v] = $countones(xp[v]);
    end
    forever begin
      int seed = -1, best;
      cellv_t u;
      for (int v = 0; v < V; v++)
        if (grp_of[p][v] < 0 && (seed < 0 || nxp[v] > nxp[seed])) seed = v;
      if (seed < 0) break;
      grp_of[p][seed] = ngrp[p];
      u = xp[seed];
      do begin
        int bc = W - Q + 1;
        best = -1;
        for (int v = 0; v < V; v++)
          if (grp_of[p][v] < 0) begin
            int n = $countones(u | xp[v]);
            if (n < bc) begin bc = n; best = v; end
          end
        if (best >= 0) begin grp_of[p][best] = ngrp[p]; u |= xp[best]; end
      end while (best >= 0);
      if (!gauss_solve(u, p, gset[p][ngrp[p]])) begin
        failures++;
        $display("no X-canceling solution for partition %0d group %0d", p, ngrp[p]);
      end
      ngrp[p]++;
    end
  endtask

  // ---------------- tester actions ----------------
  task automatic cfg(cfg_sel_e sel, int idx, int data);
    cfg_we = 1; cfg_sel = sel; cfg_idx = PW'(idx); cfg_data = 16'(data);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic load(int addr, cset_t cs);
    logic [WORD_W-1:0] w = cs;
    ld_start = 1; ld_addr = AW'(addr);
    @(negedge clk);
    ld_start = 0;
    for (int b = 0; b < WORD_W / CH; b++) begin
      tch_valid = 1; tch_data = w[b*CH +: CH];
      @(negedge clk);
    end
    tch_valid = 0;
    @(negedge clk);
  endtask

  task automatic set_mode(ctrl_src_e m);
    cfg(CFG_MODE, 0, int'(m));
    n_switch++;
  endtask

  task automatic set_geometry(int n);
    np = n;
    cfg(CFG_NUM_PARTS, 0, n);
    for (int p = 0; p < n; p++) begin
      pstart[p] = p * (L / n); plen[p] = L / n;
      cfg(CFG_PART_LEN, p, L / n);
    end
  endtask

  // stream one vector; cs_of returns the control set in force per partition
  task automatic run_vector(int v, ctrl_src_e m, int base [MAX_PARTS]);
    cellv_t hw = val[v] ^ err[v];
    for (int c = 0; c < CELLS; c++) if (xm[v][c]) hw[c] = 1'($urandom);
    for (int p = 0; p < np; p++) begin
      cset_t cs = gset[p][grp_of[p][v]];
      bit byp = (m == SRC_RAM) && (($urandom_range(0, 2)) == 0);
      for (int t = pstart[p]; t < pstart[p] + plen[p]; t++) begin
        bit last = (t == pstart[p] + plen[p] - 1);
        slice_valid = 1;
        slice = hw[t*N +: N];
        gidx_we = 0;
        if (m == SRC_RAM && ((t == pstart[p] && !byp) || (last && byp))) begin
          gidx_we = 1; gidx = AW'(grp_of[p][v]);
          if (byp) n_bypass++;
        end
        if (last) begin
          exp_t e;
          logic [Q-1:0] good;
          e.bits = cancel(sig_of(val[v] ^ err[v], p), cs);
          good   = cancel(sig_of(val[v], p), cs);
          if (good != e.bits) n_detect++;
          else if ((err[v] & pmask(p)) != '0) begin
            cellv_t u = '0;
            for (int w = 0; w < V; w++) if (grp_of[p][w] == grp_of[p][v]) u |= xm[w];
            if ((err[v] & u) != '0) n_hid_sup++; else n_hid_other++;
          end
          e.part = PW'(p);
          e.vend = (p == np - 1);
          e.due  = cyc + 2;
          expq.push_back(e);
          if (m == SRC_RAM) n_ram_fetch++;
        end
        @(negedge clk);
        gidx_we = 0;
      end
      slice_valid = 0;
      if ($urandom_range(0, 1) == 0) @(negedge clk);   // sometimes back to back
    end
    slice_valid = 0;
  endtask

  // ---------------- the test ----------------
  task automatic make_vectors(int dens_x10000);
    cellv_t hot;
    int ph, pr;
    // hot cells: 4.8 % of all cells, holding 90 % of the X's
    ph = (dens_x10000 * 90000) / 480;           // chance x 100000 of a hot cell being X
    pr = (dens_x10000 * 10000) / 9520;          // same for any other cell
    for (int c = 0; c < CELLS; c++) hot[c] = ($urandom_range(0, 9999) < 480);
    for (int v = 0; v < V; v++) begin
      for (int c = 0; c < CELLS; c++) begin
        xm[v][c]  = hot[c] ? ($urandom_range(0, 99999) < ph) : ($urandom_range(0, 99999) < pr);
        val[v][c] = xm[v][c] ? 1'b0 : 1'($urandom);
      end
      err[v] = '0;
    end
  endtask

  initial begin
    int base [MAX_PARTS];
    int dens [2];
    int parts [2];
    real ratio;
    dens = '{247, 50};
    parts = '{2, 8};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    set_mode(SRC_RAM);
    for (int d = 0; d < 2; d++) begin
      make_vectors(dens[d]);
      for (int g = 0; g < 2; g++) begin
        longint xs, conv, sup;
        int a;
        xs = 0;
        for (int v = 0; v < V; v++) xs += $countones(xm[v]);
        conv = ((xs + (W - Q) - 1) / (W - Q)) * (Q * W);
        set_geometry(parts[g]);
        a = 0;
        sup = 0;
        for (int p = 0; p < np; p++) begin
          int ib;
          cluster(p);
          base[p] = a;
          cfg(CFG_PART_BASE, p, a);
          for (int k = 0; k < ngrp[p]; k++) load(a + k, gset[p][k]);
          a += ngrp[p];
          ib = (ngrp[p] > 1) ? $clog2(ngrp[p]) : 0;
          sup += ngrp[p] * Q * W + V * ib;
        end
        for (int v = 0; v < V; v++) run_vector(v, SRC_RAM, base);
        repeat (4) @(negedge clk);
        ratio = real'(conv) / real'(sup);
        $display("X density %0d.%02d %%, %0d partitions: %0d X's, %0d control sets, tester bits conventional %0d, superset %0d, improvement %0.2f",
                 dens[d] / 100, dens[d] % 100, np, xs, a, conv, sup, ratio);
        checks++;
        if (!(ratio > 1.0)) failures++;
        checks++;
        if (expq.size() != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
