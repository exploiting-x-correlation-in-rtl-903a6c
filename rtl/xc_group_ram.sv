// xc_group_ram: control-set RAM of the indexed scheme, with the
// index-to-pointer conversion.
//
// The partial responses of partition p of all scan vectors are merged into
// groups off-line, and one control set per group is loaded into this RAM at
// the start of the test session. During the test the tester sends, for each
// MISR signature, only the small index of the group its partial response
// belongs to. The RAM pointer is formed as base[p] + index, where base[p],
// also loaded at session start, is the address of group 0 of partition p;
// the groups of one partition therefore occupy consecutive words.
//
// Interface: write port (we, waddr, wdata) for the control sets, base
// table port (base_we, base_idx, base_data), read port (rd_en, rd_part,
// rd_gidx). Timing: rdata holds the selected control set from the clock
// after rd_en and keeps it until the next read. Reset clears the base
// table and rdata; the RAM array itself is not reset.
//
// The RAM of merged control sets and the index-to-pointer conversion
// follow the document; the base-plus-offset pointer form, the depth and the
// single write / single read ports are this design's choice.
module xc_group_ram
  import xc_pkg::*;
#(
  parameter int unsigned WORD_W = NUM_XC * MISR_W,
  parameter int unsigned DEPTH  = GROUP_DEPTH,
  parameter int unsigned PARTS  = MAX_PARTS,
  parameter int unsigned AW     = $clog2(DEPTH),
  parameter int unsigned PW     = $clog2(PARTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // control-set loading
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  // partition base table
  input  logic              base_we,
  input  logic [PW-1:0]     base_idx,
  input  logic [AW-1:0]     base_data,
  // fetch for one signature
  input  logic              rd_en,
  input  logic [PW-1:0]     rd_part,
  input  logic [AW-1:0]     rd_gidx,
  output logic [AW-1:0]     rd_ptr,   // pointer formed this clock
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [DEPTH];
  logic [AW-1:0]     base_q [PARTS];

  assign rd_ptr = base_q[rd_part] + rd_gidx;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < PARTS; i++) base_q[i] <= '0;
      rdata <= '0;
    end else begin
      if (base_we) base_q[base_idx] <= base_data;
      if (rd_en)   rdata <= mem[rd_ptr];
    end
  end

endmodule
