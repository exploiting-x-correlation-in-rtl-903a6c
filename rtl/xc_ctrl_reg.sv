// xc_ctrl_reg: on-chip control register of the single-register scheme.
//
// Scan vectors that share one superset X-canceling solution are applied
// back to back, so the tester loads the register only when the next group
// of vectors needs a new control set; in between the register keeps
// driving the X-canceling network with the same bits. A completed word
// from the control loader (we high) replaces the contents on the next
// clock. loads counts how many sets were loaded, which a tester can read
// to confirm the reuse ratio.
//
// The register and its reuse follow the document; reset to all-zero (no
// MISR bit selected) and the load counter are this design's choice.
module xc_ctrl_reg
  import xc_pkg::*;
#(
  parameter int unsigned WORD_W = NUM_XC * MISR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] ctrl,
  output logic [15:0]       loads
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl  <= '0;
      loads <= '0;
    end else if (we) begin
      ctrl  <= wdata;
      loads <= loads + 1'b1;
    end
  end

endmodule
