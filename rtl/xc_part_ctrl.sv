// xc_part_ctrl: divides the scan slices of each scan vector into partitions,
// one MISR signature per partition.
//
// The same partitioning is used for every scan vector, so partition p of
// one vector lines up with partition p of the next and their X locations
// can be merged. The tester programs the number of partitions per vector
// and the number of scan slices in each (a partition may have any length;
// a single partition of the whole scan length gives one signature per
// vector). The controller counts accepted slices, marks the first slice of
// each partition (restart, so the MISR starts a new signature) and the last
// one (sig_end, with part telling which partition ended), and flags the last
// slice of the vector (vec_end).
//
// With need_ready high (incremental-update scheme) slices are accepted only
// after the tester's one-bit vec_ready signal, which says that all control
// set updates for the coming vector are done; the permission lasts until
// the end of that vector. While waiting is high, presented slices are not
// compacted and are counted in ignored.
//
// Timing: all outputs except the configuration state are combinational from
// the current slice_valid and counters; the counters advance on the clock.
// A length or partition count of 0 is treated as 1. Reset returns to
// partition 0, slice 0, one partition of one slice.
//
// The partitioning and the ready bit follow the document; the programmable
// per-partition lengths and the handling of slices that come too early are
// this design's choice.
module xc_part_ctrl
  import xc_pkg::*;
#(
  parameter int unsigned PARTS = MAX_PARTS,
  parameter int unsigned LW    = LEN_W,
  parameter int unsigned PW    = $clog2(PARTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  logic          np_we,
  input  logic [PW:0]   np_data,    // partitions per vector
  input  logic          len_we,
  input  logic [PW-1:0] len_idx,
  input  logic [LW-1:0] len_data,   // slices in partition len_idx
  // compaction control
  input  logic          need_ready,
  input  logic          vec_ready,
  input  logic          slice_valid,
  output logic          accept,     // slice is compacted this clock
  output logic          restart,    // accepted slice starts a signature
  output logic          sig_end,    // accepted slice ends a signature
  output logic          vec_end,    // accepted slice ends the vector
  output logic [PW-1:0] part,       // partition of the current slice
  output logic          waiting,    // waiting for vec_ready
  output logic [15:0]   ignored
);

  logic [PW:0]   np_q;
  logic [LW-1:0] len_q [PARTS];
  logic [LW-1:0] cnt_q;
  logic [PW-1:0] part_q;
  logic          armed_q;
  logic [LW-1:0] cur_len;
  logic [PW:0]   num_parts;

  assign cur_len   = (len_q[part_q] == '0) ? LW'(1) : len_q[part_q];
  assign num_parts = (np_q == '0) ? (PW+1)'(1) : np_q;

  assign waiting = need_ready && !armed_q;
  assign accept  = slice_valid && !waiting;
  assign restart = accept && (cnt_q == '0);
  assign sig_end = accept && (cnt_q == cur_len - 1'b1);
  assign vec_end = sig_end && ((PW+1)'(part_q) == num_parts - 1'b1);
  assign part    = part_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      np_q    <= (PW+1)'(1);
      for (int unsigned i = 0; i < PARTS; i++) len_q[i] <= LW'(1);
      cnt_q   <= '0;
      part_q  <= '0;
      armed_q <= 1'b0;
      ignored <= '0;
    end else begin
      if (np_we)  np_q <= np_data;
      if (len_we) len_q[len_idx] <= len_data;
      if (vec_ready) armed_q <= 1'b1;
      if (slice_valid && waiting) ignored <= ignored + 1'b1;
      if (accept) begin
        if (sig_end) begin
          cnt_q <= '0;
          if (vec_end) begin
            part_q  <= '0;
            armed_q <= 1'b0;
          end else begin
            part_q <= part_q + 1'b1;
          end
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
