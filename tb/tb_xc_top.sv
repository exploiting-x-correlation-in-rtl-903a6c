// tb_xc_top: end-to-end test of the superset X-canceling compactor at its
// default sizes (128-bit MISR, 7 X-canceled bits, 32 scan chains).
//
// The testbench plays both the off-line tools and the tester:
//  * it makes 16 scan vectors of 64 slices whose X's are correlated: a fixed
//    set of X-prone cells captures an X with probability 3/4 in every
//    vector, any other cell with probability 1/50;
//  * per partition it clusters the vectors greedily (seed = response with
//    most X's, then add the response that grows the merged X set least while
//    it stays within W-Q X's), symbolically simulates the MISR for every X
//    of a cluster and runs Gauss-Jordan elimination to find the combinations
//    of MISR bits that cancel all of them; Q random mixtures of those form
//    the superset control set;
//  * it then drives the design in the three control-bit schemes in turn:
//      1. control register, one signature per vector, vectors ordered by
//         cluster so the register is reloaded once per cluster;
//      2. indexed RAM, four unequal partitions, all control sets loaded at
//         the start, one group index per signature;
//      3. incremental update, partitions rewritten only when the cluster of
//         the next vector differs, then the ready bit.
// The X cells get fresh random values in the stream given to the design;
// every X-canceled output must equal the value computed here with all X's
// set to zero, and must arrive exactly two clocks after the last slice of
// its partition. Some vectors carry an injected error in a known cell, and
// the test counts how many signatures expose it. Each mechanism (register
// reuse, RAM fetch, index bypass, incremental update and reuse, ready wait,
// mode switch, detection) must be seen at least once.
module tb_xc_top;
  import xc_pkg::*;
  localparam int unsigned W      = MISR_W;
  localparam int unsigned Q      = NUM_XC;
  localparam int unsigned N      = N_CHAINS;
  localparam int unsigned CH     = N_TCH;
  localparam int unsigned AW     = $clog2(GROUP_DEPTH);
  localparam int unsigned PW     = $clog2(MAX_PARTS);
  localparam int unsigned WORD_W = Q * W;
  localparam int unsigned L      = 64;          // slices per vector
  localparam int unsigned CELLS  = L * N;
  localparam int unsigned V      = 16;          // scan vectors
  localparam int unsigned MAXG   = 16;          // clusters per partition

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

  task automatic set_geometry(int n, int l0, int l1, int l2, int l3);
    int lens [4];
    int s = 0;
    lens = '{l0, l1, l2, l3};
    np = n;
    cfg(CFG_NUM_PARTS, 0, n);
    for (int p = 0; p < n; p++) begin
      pstart[p] = s; plen[p] = lens[p]; s += lens[p];
      cfg(CFG_PART_LEN, p, lens[p]);
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
  initial begin
    cellv_t hot;
    int order [$];
    int cur [MAX_PARTS];
    int base [MAX_PARTS];
    int a;

    for (int c = 0; c < CELLS; c++) hot[c] = ($urandom_range(0, 99) < 8);
    for (int v = 0; v < V; v++) begin
      for (int c = 0; c < CELLS; c++) begin
        xm[v][c]  = hot[c] ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 99) < 2);
        val[v][c] = xm[v][c] ? 1'b0 : 1'($urandom);
      end
      err[v] = '0;
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- phase 1: control register, one signature per 16-slice vector ----
    set_mode(SRC_REG);
    set_geometry(1, 16, 0, 0, 0);
    cluster(0);
    for (int g = 0; g < ngrp[0]; g++)
      for (int v = 0; v < V; v++) if (grp_of[0][v] == g) order.push_back(v);
    a = -1;
    foreach (order[i]) begin
      int v;
      v = order[i];
      if (grp_of[0][v] != a) begin
        load(0, gset[0][grp_of[0][v]]);
        a = grp_of[0][v];
      end else n_reg_reuse++;
      run_vector(v, SRC_REG, base);
      n_single++;
    end
    repeat (4) @(negedge clk);
    checks++;
    if (reg_loads !== 16'(ngrp[0])) failures++;
    $display("phase 1: %0d vectors, %0d control sets", V, ngrp[0]);

    // ---- phase 2: indexed RAM, four unequal partitions ----
    for (int v = 1; v < V; v += 3) begin
      int c;
      do c = $urandom_range(0, CELLS - 1); while (xm[v][c]);
      err[v][c] = 1'b1;
    end
    set_mode(SRC_RAM);
    set_geometry(4, 20, 12, 16, 16);
    a = 0;
    for (int p = 0; p < np; p++) begin
      cluster(p);
      base[p] = a;
      cfg(CFG_PART_BASE, p, a);
      for (int g = 0; g < ngrp[p]; g++) load(a + g, gset[p][g]);
      a += ngrp[p];
      $display("phase 2: partition %0d, %0d control sets", p, ngrp[p]);
    end
    for (int v = 0; v < V; v++) begin
      run_vector(v, SRC_RAM, base);
      n_multi++;
    end

    // ---- phase 3: incremental update of the per-partition RAM ----
    set_mode(SRC_INCR);
    for (int p = 0; p < np; p++) cur[p] = -1;
    for (int v = 0; v < V; v++) begin
      for (int p = 0; p < np; p++) begin
        if (cur[p] != grp_of[p][v]) begin
          load(p, gset[p][grp_of[p][v]]);
          cur[p] = grp_of[p][v];
          n_incr_upd++;
        end else n_incr_reuse++;
      end
      // slices offered before the ready bit are ignored
      if (v % 4 == 1) begin
        slice_valid = 1; slice = '1;
        @(negedge clk);
        checks++;
        if (!waiting) failures++;
        slice_valid = 0;
        n_wait++;
      end
      vec_ready = 1;
      @(negedge clk);
      vec_ready = 0;
      run_vector(v, SRC_INCR, base);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (part_updates !== 16'(n_incr_upd)) failures++;
    checks++;
    if (ignored_slices !== 16'(n_wait)) failures++;
    checks++;
    if (expq.size() != 0) failures++;

    $display("mechanisms: reg_reuse=%0d ram_fetch=%0d idx_bypass=%0d incr_update=%0d incr_reuse=%0d",
             n_reg_reuse, n_ram_fetch, n_bypass, n_incr_upd, n_incr_reuse);
    $display("            ready_wait=%0d mode_switch=%0d single_sig=%0d multi_sig=%0d detect=%0d",
             n_wait, n_switch, n_single, n_multi, n_detect);
    $display("            errors hidden: by a merged X %0d, otherwise %0d", n_hid_sup, n_hid_other);
    if (n_reg_reuse == 0) failures++;
    if (n_ram_fetch == 0) failures++;
    if (n_bypass == 0) failures++;
    if (n_incr_upd == 0) failures++;
    if (n_incr_reuse == 0) failures++;
    if (n_wait == 0) failures++;
    if (n_switch < 3) failures++;
    if (n_single == 0) failures++;
    if (n_multi == 0) failures++;
    if (n_detect == 0) failures++;
    // an error in a cell that no merged response has as X is missed only
    // with probability 2^-Q per signature
    if (n_hid_other > 1) failures++;
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
