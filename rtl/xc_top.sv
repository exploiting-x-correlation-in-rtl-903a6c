// xc_top: superset X-canceling output compactor.
//
// Scan slices from the circuit under test are compacted into MISR
// signatures, one signature per partition of the scan vector. When a
// signature is complete, a control set of Q rows of W bits selects, for
// each of the Q outputs, the MISR bits to XOR so that every X captured in
// the signature cancels. The Q X-canceled bits go to the tester. Because
// the control sets are computed off-line as superset solutions that cancel
// the X's of many merged responses, the same set is reused for many
// signatures, and the tester stores and sends far fewer control bits.
//
// Three control-bit sources are built in and chosen with the CFG_MODE
// register:
//   SRC_REG   one control register, reloaded by the tester only when the
//             next run of vectors needs a new superset solution;
//   SRC_RAM   a RAM of all merged control sets, loaded at session start;
//             per signature the tester sends a group index (gidx) that is
//             turned into a RAM pointer base[partition] + gidx;
//   SRC_INCR  a small RAM with one set per partition; before each vector the
//             tester rewrites only the partitions whose set changes and
//             then pulses vec_ready, without which no slice is compacted.
// Control sets of all three arrive on the same serial tester channels
// (ld_start/ld_addr, then tch_valid/tch_data beats).
//
// Timing: a slice is compacted on the clock it is presented with
// slice_valid (unless waiting is high). Two clocks after the clock that
// presents the last slice of a partition, xc_valid is high for one clock
// with xc_bits, the partition number xc_part and xc_vec_end for the last
// partition of the vector. The next partition may start on the very next
// clock: signatures are compacted back to back without idle cycles. In
// SRC_RAM mode the gidx for a partition must be written (gidx_we) no later
// than the clock of its last slice; a write on that very clock is used
// directly. The mode in force at a partition's last slice decides its
// control source.
//
// The MISR, the X-canceling by XOR of MISR bit combinations, the reuse of
// control sets, the on-chip register, the indexed RAM and the incremental
// per-partition RAM with its ready bit follow the document. Running all
// three schemes in one block behind a mode register, the configuration port,
// the serial load framing and the two-clock output pipeline are this
// design's choices.
module xc_top
  import xc_pkg::*;
#(
  parameter int unsigned W     = MISR_W,
  parameter int unsigned Q     = NUM_XC,
  parameter int unsigned N     = N_CHAINS,
  parameter int unsigned CH    = N_TCH,
  parameter int unsigned PARTS = MAX_PARTS,
  parameter int unsigned DEPTH = GROUP_DEPTH,
  parameter int unsigned LW    = LEN_W,
  parameter logic [W-1:0] POLY = MISR_POLY,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned PW    = $clog2(PARTS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration port
  input  logic           cfg_we,
  input  cfg_sel_e       cfg_sel,
  input  logic [PW-1:0]  cfg_idx,
  input  logic [15:0]    cfg_data,
  // control-set loading from the tester channels
  input  logic           ld_start,
  input  logic [AW-1:0]  ld_addr,   // RAM address (SRC_RAM) or partition (SRC_INCR)
  input  logic           tch_valid,
  input  logic [CH-1:0]  tch_data,
  output logic           ld_busy,
  // per-signature group index (SRC_RAM)
  input  logic           gidx_we,
  input  logic [AW-1:0]  gidx,
  // vector ready bit (SRC_INCR)
  input  logic           vec_ready,
  // scan slices from the circuit under test
  input  logic           slice_valid,
  input  logic [N-1:0]   slice,
  output logic           waiting,
  // X-canceled output to the tester
  output logic           xc_valid,
  output logic [Q-1:0]   xc_bits,
  output logic [PW-1:0]  xc_part,
  output logic           xc_vec_end,
  // status
  output ctrl_src_e      mode,
  output logic [15:0]    reg_loads,
  output logic [15:0]    part_updates,
  output logic [15:0]    ignored_slices
);

  localparam int unsigned WORD_W = Q * W;

  // ---------------- configuration ----------------
  ctrl_src_e mode_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            mode_q <= SRC_REG;
    else if (cfg_we && cfg_sel == CFG_MODE) mode_q <= ctrl_src_e'(cfg_data[1:0]);
  end
  assign mode = mode_q;

  // ---------------- control-set loader ----------------
  logic              word_valid;
  logic [WORD_W-1:0] word;
  logic [AW-1:0]     word_addr;

  xc_ctrl_deser #(.WORD_W(WORD_W), .CH(CH), .AW(AW)) u_deser (
    .clk, .rst_n, .ld_start, .ld_addr, .tch_valid, .tch_data,
    .busy(ld_busy), .word_valid, .word, .word_addr
  );

  // ---------------- control sources ----------------
  logic [WORD_W-1:0] reg_ctrl, ram_ctrl, incr_ctrl;
  logic              sig_end, vec_end, accept, restart;
  logic [PW-1:0]     part;
  logic [AW-1:0]     gidx_q, rd_gidx;

  xc_ctrl_reg #(.WORD_W(WORD_W)) u_creg (
    .clk, .rst_n,
    .we(word_valid && mode_q == SRC_REG), .wdata(word),
    .ctrl(reg_ctrl), .loads(reg_loads)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       gidx_q <= '0;
    else if (gidx_we) gidx_q <= gidx;
  end
  assign rd_gidx = gidx_we ? gidx : gidx_q;

  xc_group_ram #(.WORD_W(WORD_W), .DEPTH(DEPTH), .PARTS(PARTS), .AW(AW), .PW(PW)) u_gram (
    .clk, .rst_n,
    .we(word_valid && mode_q == SRC_RAM), .waddr(word_addr), .wdata(word),
    .base_we(cfg_we && cfg_sel == CFG_PART_BASE), .base_idx(cfg_idx),
    .base_data(cfg_data[AW-1:0]),
    .rd_en(sig_end && mode_q == SRC_RAM), .rd_part(part), .rd_gidx,
    .rd_ptr(), .rdata(ram_ctrl)
  );

  xc_part_ram #(.WORD_W(WORD_W), .PARTS(PARTS), .PW(PW)) u_pram (
    .clk, .rst_n,
    .we(word_valid && mode_q == SRC_INCR), .wpart(word_addr[PW-1:0]), .wdata(word),
    .rd_en(sig_end && mode_q == SRC_INCR), .rd_part(part),
    .rdata(incr_ctrl), .updates(part_updates)
  );

  // ---------------- partitioning and compaction ----------------
  xc_part_ctrl #(.PARTS(PARTS), .LW(LW), .PW(PW)) u_pctrl (
    .clk, .rst_n,
    .np_we(cfg_we && cfg_sel == CFG_NUM_PARTS), .np_data(cfg_data[PW:0]),
    .len_we(cfg_we && cfg_sel == CFG_PART_LEN), .len_idx(cfg_idx),
    .len_data(cfg_data[LW-1:0]),
    .need_ready(mode_q == SRC_INCR), .vec_ready, .slice_valid,
    .accept, .restart, .sig_end, .vec_end, .part, .waiting,
    .ignored(ignored_slices)
  );

  logic [W-1:0] sig;
  xc_misr #(.W(W), .N(N), .POLY(POLY)) u_misr (
    .clk, .rst_n, .en(accept), .restart, .slice, .sig
  );

  // stage 1: signature complete in the MISR, control set being fetched
  logic          s1_valid, s1_vend;
  logic [PW-1:0] s1_part;
  ctrl_src_e     s1_src;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_vend  <= 1'b0;
      s1_part  <= '0;
      s1_src   <= SRC_REG;
    end else begin
      s1_valid <= sig_end;
      s1_vend  <= vec_end;
      if (sig_end) begin
        s1_part <= part;
        s1_src  <= mode_q;
      end
    end
  end

  logic [WORD_W-1:0] ctrl_sel;
  always_comb begin
    unique case (s1_src)
      SRC_RAM:  ctrl_sel = ram_ctrl;
      SRC_INCR: ctrl_sel = incr_ctrl;
      default:  ctrl_sel = reg_ctrl;
    endcase
  end

  logic [Q-1:0] xc_d;
  xc_cancel_net #(.W(W), .Q(Q)) u_xnet (
    .sig, .ctrl(ctrl_sel), .xc(xc_d)
  );

  // stage 2: X-canceled bits registered toward the tester
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xc_valid   <= 1'b0;
      xc_bits    <= '0;
      xc_part    <= '0;
      xc_vec_end <= 1'b0;
    end else begin
      xc_valid   <= s1_valid;
      xc_vec_end <= s1_valid && s1_vend;
      if (s1_valid) begin
        xc_bits <= xc_d;
        xc_part <= s1_part;
      end
    end
  end

  // tester protocol: data beats only inside a load, at most one control set
  // destination per load
  a_beat_in_load : assert property (@(posedge clk) disable iff (!rst_n)
    tch_valid |-> (ld_busy || ld_start));
  a_no_start_beat : assert property (@(posedge clk) disable iff (!rst_n)
    !(ld_start && tch_valid));

endmodule
