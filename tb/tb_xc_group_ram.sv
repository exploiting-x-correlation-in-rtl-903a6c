// tb_xc_group_ram: self-checking test of the indexed control-set RAM.
//
// Fills the whole RAM with distinct words derived from their address,
// programs a random base address per partition, then fetches with random
// (partition, group index) pairs and checks the pointer base + index and
// that the word appears on rdata one clock later and stays there until the
// next fetch. Overwrites of single words are checked too.
module tb_xc_group_ram;
  import xc_pkg::*;
  localparam int unsigned WORD_W = NUM_XC * MISR_W;
  localparam int unsigned DEPTH  = GROUP_DEPTH;
  localparam int unsigned PARTS  = MAX_PARTS;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned PW     = $clog2(PARTS);

  logic clk = 0, rst_n = 0, we = 0, base_we = 0, rd_en = 0;
  logic [AW-1:0] waddr = '0, base_data = '0, rd_gidx = '0, rd_ptr;
  logic [PW-1:0] base_idx = '0, rd_part = '0;
  logic [WORD_W-1:0] wdata = '0, rdata;
  logic [AW-1:0] bases [PARTS];
  logic [WORD_W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  xc_group_ram dut (.*);

  always #5 clk = ~clk;

  function automatic logic [WORD_W-1:0] pattern(int a, int salt);
    logic [WORD_W-1:0] w;
    for (int i = 0; i < WORD_W; i += 32) w[i +: 32] = (a * 32'h9e3779b1) ^ (i * 32'h85ebca6b) ^ salt;
    return w;
  endfunction

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WORD_W-1:0] last;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = AW'(a); wdata = pattern(a, 0); shadow[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int p = 0; p < PARTS; p++) begin
      base_we = 1; base_idx = PW'(p); base_data = AW'($urandom); bases[p] = base_data;
      @(negedge clk);
    end
    base_we = 0;
    for (int t = 0; t < 2000; t++) begin
      rd_en   = ($urandom_range(0, 2) != 0);
      rd_part = PW'($urandom);
      rd_gidx = AW'($urandom_range(0, 15));
      #1;
      checks++;
      if (rd_ptr !== AW'(bases[rd_part] + rd_gidx)) failures++;
      // a write in the same clock as a read of that word returns the old word
      if (rd_en) last = shadow[AW'(bases[rd_part] + rd_gidx)];
      if ($urandom_range(0, 9) == 0) begin
        int a;
        a = $urandom_range(0, 1) ? int'(rd_ptr) : $urandom_range(0, DEPTH - 1);
        we = 1; waddr = AW'(a); wdata = pattern(a, t); shadow[a] = wdata;
      end
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata !== last) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
