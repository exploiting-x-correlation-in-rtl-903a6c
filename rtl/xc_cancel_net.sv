// xc_cancel_net: the X-canceling network.
//
// Output bit k is the XOR of the MISR signature bits selected by row k of
// the control set: xc[k] = ^(sig & ctrl[k]). When row k is a combination
// of MISR bits whose dependences on the captured X's add up to zero (found
// off-line by Gauss-Jordan elimination of the symbolic MISR equations),
// xc[k] depends only on known scan cell values and can be compared with
// its fault-free value by the tester.
//
// Purely combinational: Q AND-XOR trees of W inputs each. The document
// gives the function (XOR of linearly dependent MISR bit combinations);
// the AND-XOR tree form is this design's choice.
module xc_cancel_net
  import xc_pkg::*;
#(
  parameter int unsigned W = MISR_W,
  parameter int unsigned Q = NUM_XC
) (
  input  logic [W-1:0]        sig,   // final MISR signature
  input  logic [Q-1:0][W-1:0] ctrl,  // one selection row per output bit
  output logic [Q-1:0]        xc     // X-canceled signature bits
);

  always_comb begin
    for (int unsigned k = 0; k < Q; k++) xc[k] = ^(sig & ctrl[k]);
  end

endmodule
