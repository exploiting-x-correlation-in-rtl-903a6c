// xc_misr: multiple-input signature register that compacts one scan slice
// per clock.
//
// The register is an internal-XOR (Galois) LFSR over GF(2): each clock with
// en high it shifts one place toward the top bit, feeds the top bit back
// through the polynomial POLY, and XORs scan chain i into three bits:
// b = i*W/N, (b + 5 + 2i) mod W and (b + 61 + 3i) mod W. Being
// linear, every signature bit is an XOR of captured scan cells, which is
// what lets the X-canceling network downstream remove the X's afterwards.
// With restart high the old contents are dropped, so that slice is the
// first of a new signature and no idle cycle is needed between two
// signatures.
//
// Why three taps per chain with offsets that differ from chain to chain:
// with a single tap, cell (slice s, chain c) and cell (s + W/N, c + 1) add
// exactly the same term to the signature, so an X in one also cancels the
// other, and a partition full of X's hides many known cells. Giving every
// chain its own tap pattern makes such exact aliases disappear, so the
// X-canceled bits keep close to the 1 - 2^-Q error coverage. For sizes other
// than the defaults, check that the three taps of a chain stay distinct.
//
// Timing: the signature that includes a slice is on sig one clock after the
// slice was presented. Reset clears the register.
//
// The document uses a MISR of size 128 to 6000 and leaves its polynomial
// and input taps open; the polynomial, the tap pattern and the restart
// control are this design's choice.
module xc_misr
  import xc_pkg::*;
#(
  parameter int unsigned      W    = MISR_W,
  parameter int unsigned      N    = N_CHAINS,
  parameter logic [W-1:0]     POLY = MISR_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,       // compact slice this clock
  input  logic         restart,  // slice starts a new signature
  input  logic [N-1:0] slice,    // one bit from each scan chain
  output logic [W-1:0] sig
);

  logic [W-1:0] state_q, base, spread;

  always_comb begin
    spread = '0;
    for (int unsigned i = 0; i < N; i++) begin
      spread[(i * W) / N]                   ^= slice[i];
      spread[((i * W) / N + 5 + 2 * i) % W]  ^= slice[i];
      spread[((i * W) / N + 61 + 3 * i) % W] ^= slice[i];
    end
    base = restart ? '0 : state_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state_q <= '0;
    else if (en) state_q <= {base[W-2:0], 1'b0} ^ (base[W-1] ? POLY : '0) ^ spread;
  end

  assign sig = state_q;

endmodule
