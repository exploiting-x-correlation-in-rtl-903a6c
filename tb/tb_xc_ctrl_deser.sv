// tb_xc_ctrl_deser: self-checking test of the control-set loader.
//
// Sends random control words as beats with random idle clocks, sometimes
// abandons a load with a fresh ld_start, and checks that each completed word,
// its address and the one-clock word_valid pulse appear exactly one clock
// after the last beat, and that a load takes exactly BEATS data beats.
module tb_xc_ctrl_deser;
  import xc_pkg::*;
  localparam int unsigned WORD_W = NUM_XC * MISR_W;
  localparam int unsigned CH     = N_TCH;
  localparam int unsigned AW     = $clog2(GROUP_DEPTH);
  localparam int unsigned BEATS  = WORD_W / CH;

  logic clk = 0, rst_n = 0, ld_start = 0, tch_valid = 0;
  logic [AW-1:0] ld_addr = '0;
  logic [CH-1:0] tch_data = '0;
  logic busy, word_valid;
  logic [WORD_W-1:0] word;
  logic [AW-1:0] word_addr;
  int checks = 0, failures = 0, pulses = 0;

  xc_ctrl_deser dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && word_valid) pulses++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [WORD_W-1:0] w, input logic [AW-1:0] a, input bit abort);
    @(negedge clk);
    ld_start = 1; ld_addr = a;
    @(negedge clk);
    ld_start = 0;
    for (int b = 0; b < BEATS; b++) begin
      while ($urandom_range(0, 3) == 0) begin
        tch_valid = 0;
        @(negedge clk);
      end
      if (abort && b == BEATS / 2) begin
        tch_valid = 0;
        return;
      end
      tch_valid = 1;
      tch_data  = w[b*CH +: CH];
      @(negedge clk);
      checks++;
      if (word_valid != (b == BEATS - 1)) failures++;   // no early completion
    end
    tch_valid = 0;
    checks++;
    if (!word_valid || word !== w || word_addr !== a || busy) failures++;
    @(negedge clk);
    checks++;
    if (word_valid) failures++;     // single-clock pulse
  endtask

  initial begin
    logic [WORD_W-1:0] w;
    int expect_pulses;
    expect_pulses = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < WORD_W; i += 32) w[i +: 32] = $urandom;
      if (n % 7 == 3) send(~w, AW'($urandom), 1'b1);
      send(w, AW'($urandom), 1'b0);
      expect_pulses++;
    end
    checks++;
    if (pulses != expect_pulses) begin failures++; $display("pulses %0d expected %0d", pulses, expect_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
