// tb_xc_misr: self-checking test of the MISR.
//
// Drives random scan slices with random restart and enable patterns and
// compares the signature after every clock with a bit-by-bit model of the
// LFSR recurrence written here. A second part checks linearity, the
// property X-canceling rests on: the signature of the XOR of two slice
// streams equals the XOR of their signatures.
module tb_xc_misr;
  import xc_pkg::*;
  localparam int unsigned W = MISR_W;
  localparam int unsigned N = N_CHAINS;

  logic clk = 0, rst_n = 0, en = 0, restart = 0;
  logic [N-1:0] slice = '0;
  logic [W-1:0] sig, model;
  int checks = 0, failures = 0;

  xc_misr dut (.clk, .rst_n, .en, .restart, .slice, .sig);

  always #5 clk = ~clk;

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

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] sa, sb, sc;
    logic [N-1:0] da [64], db [64];
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    if (sig !== '0) failures++;
    checks++;
    for (int t = 0; t < 2000; t++) begin
      en      = ($urandom_range(0, 9) != 0);
      restart = ($urandom_range(0, 49) == 0);
      slice   = N'({$urandom, $urandom});
      @(posedge clk);
      if (en) model = step(restart ? '0 : model, slice);
      @(negedge clk);
      checks++;
      if (sig !== model) begin
        failures++;
        if (failures < 5) $display("mismatch t=%0d sig=%h model=%h", t, sig, model);
      end
    end
    // linearity: sig(a ^ b) == sig(a) ^ sig(b)
    for (int t = 0; t < 64; t++) begin da[t] = N'($urandom); db[t] = N'($urandom); end
    for (int pass = 0; pass < 3; pass++) begin
      for (int t = 0; t < 64; t++) begin
        @(negedge clk);
        en = 1; restart = (t == 0);
        slice = (pass == 0) ? da[t] : (pass == 1) ? db[t] : (da[t] ^ db[t]);
      end
      @(negedge clk);
      en = 0;
      if (pass == 0) sa = sig; else if (pass == 1) sb = sig; else sc = sig;
    end
    checks++;
    if (sc !== (sa ^ sb)) failures++;
    checks++;
    if (sa == '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
