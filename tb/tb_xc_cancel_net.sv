// tb_xc_cancel_net: self-checking test of the X-canceling network.
//
// Applies random signatures and control rows and checks each output bit
// against a parity count done here bit by bit. It also checks the
// example of a six-bit MISR with X's X1..X4 whose combination M1^M3^M5 is
// free of X's: with the X's set to arbitrary values, the selected bits XOR
// to the same value.
module tb_xc_cancel_net;
  import xc_pkg::*;
  localparam int unsigned W = MISR_W;
  localparam int unsigned Q = NUM_XC;

  logic [W-1:0]        sig;
  logic [Q-1:0][W-1:0] ctrl;
  logic [Q-1:0]        xc;
  int checks = 0, failures = 0;

  xc_cancel_net dut (.sig, .ctrl, .xc);

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      sig = rnd();
      for (int k = 0; k < Q; k++) ctrl[k] = (t % 3 == 0) ? (rnd() & rnd()) : rnd();
      #1;
      for (int k = 0; k < Q; k++) begin
        int ones;
        ones = 0;
        for (int i = 0; i < W; i++) if (sig[i] && ctrl[k][i]) ones++;
        checks++;
        if (xc[k] !== ones[0]) failures++;
      end
    end
    // M1=X1, M2=X1^X2^X3, M3=X3, M4=X1, M5=X1^X3, M6=X3^X4 plus known parts
    for (int t = 0; t < 16; t++) begin
      logic x1, x2, x3, x4;
      logic [5:0] o;
      logic ref_bit;
      {x1, x2, x3, x4} = 4'(t);
      o = 6'b101101;
      sig = '0;
      sig[0] = x1 ^ o[0];
      sig[1] = x1 ^ x2 ^ x3 ^ o[1];
      sig[2] = x3 ^ o[2];
      sig[3] = x1 ^ o[3];
      sig[4] = x1 ^ x3 ^ o[4];
      sig[5] = x3 ^ x4 ^ o[5];
      ctrl = '0;
      ctrl[0][0] = 1; ctrl[0][2] = 1; ctrl[0][4] = 1;   // M1^M3^M5
      ctrl[1][0] = 1; ctrl[1][3] = 1;                   // M1^M4
      #1;
      ref_bit = o[0] ^ o[2] ^ o[4];
      checks++;
      if (xc[0] !== ref_bit) failures++;
      checks++;
      if (xc[1] !== (o[0] ^ o[3])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
