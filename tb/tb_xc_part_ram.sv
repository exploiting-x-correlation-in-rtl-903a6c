// tb_xc_part_ram: self-checking test of the per-partition scratch-pad RAM.
//
// Loads one control set into every partition entry, then runs rounds of
// incremental updates (a few random partitions rewritten) followed by a
// read-out of all partitions, checking every entry against a copy kept
// here and the update counter.
module tb_xc_part_ram;
  import xc_pkg::*;
  localparam int unsigned WORD_W = NUM_XC * MISR_W;
  localparam int unsigned PARTS  = MAX_PARTS;
  localparam int unsigned PW     = $clog2(PARTS);

  logic clk = 0, rst_n = 0, we = 0, rd_en = 0;
  logic [PW-1:0] wpart = '0, rd_part = '0;
  logic [WORD_W-1:0] wdata = '0, rdata;
  logic [15:0] updates;
  logic [WORD_W-1:0] shadow [PARTS];
  int checks = 0, failures = 0, nupd = 0;

  xc_part_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int p);
    we = 1; wpart = PW'(p);
    for (int i = 0; i < WORD_W; i += 32) wdata[i +: 32] = $urandom;
    shadow[p] = wdata;
    nupd++;
    @(negedge clk);
    we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < PARTS; p++) write(p);
    for (int r = 0; r < 20; r++) begin
      int n;
      n = $urandom_range(0, 4);
      for (int u = 0; u < n; u++) write($urandom_range(0, PARTS - 1));
      for (int p = 0; p < PARTS; p++) begin
        rd_en = 1; rd_part = PW'(p);
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (rdata !== shadow[p]) failures++;
      end
      checks++;
      if (updates !== 16'(nupd)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
