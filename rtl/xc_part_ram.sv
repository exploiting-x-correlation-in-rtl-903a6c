// xc_part_ram: scratch-pad RAM of the incremental-update scheme.
//
// It holds just one control set per partition. Test vectors are ordered so
// that consecutive vectors share the control sets of most partitions;
// before a vector the tester sends only the number of each partition whose
// set changes, followed by the new bits, and this RAM decodes the number and
// overwrites that entry. During compaction entry p drives the X-canceling
// of the signature of partition p.
//
// Interface: write port (we, wpart, wdata), read port (rd_en, rd_part).
// Timing: rdata holds entry rd_part from the clock after rd_en. updates
// counts the entries written since reset. Reset clears rdata and the
// counter; the array itself is not reset.
//
// One entry per partition and the decoded update follow the document; the
// port arrangement and the update counter are this design's choice.
module xc_part_ram
  import xc_pkg::*;
#(
  parameter int unsigned WORD_W = NUM_XC * MISR_W,
  parameter int unsigned PARTS  = MAX_PARTS,
  parameter int unsigned PW     = $clog2(PARTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [PW-1:0]     wpart,
  input  logic [WORD_W-1:0] wdata,
  input  logic              rd_en,
  input  logic [PW-1:0]     rd_part,
  output logic [WORD_W-1:0] rdata,
  output logic [15:0]       updates
);

  logic [WORD_W-1:0] mem [PARTS];

  always_ff @(posedge clk) begin
    if (we) mem[wpart] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata   <= '0;
      updates <= '0;
    end else begin
      if (rd_en) rdata <= mem[rd_part];
      if (we)    updates <= updates + 1'b1;
    end
  end

endmodule
