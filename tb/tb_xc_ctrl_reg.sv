// tb_xc_ctrl_reg: self-checking test of the control register.
//
// Loads random control sets at random times and checks that the register
// holds each set unchanged until the next load and counts the loads.
module tb_xc_ctrl_reg;
  import xc_pkg::*;
  localparam int unsigned WORD_W = NUM_XC * MISR_W;

  logic clk = 0, rst_n = 0, we = 0;
  logic [WORD_W-1:0] wdata = '0, ctrl, model;
  logic [15:0] loads;
  int checks = 0, failures = 0, nloads = 0;

  xc_ctrl_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (ctrl !== '0 || loads !== 16'd0) failures++;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = ($urandom_range(0, 9) == 0);
      for (int i = 0; i < WORD_W; i += 32) wdata[i +: 32] = $urandom;
      @(posedge clk);
      if (we) begin model = wdata; nloads++; end
      @(negedge clk);
      we = 0;
      checks++;
      if (ctrl !== model || loads !== 16'(nloads)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
