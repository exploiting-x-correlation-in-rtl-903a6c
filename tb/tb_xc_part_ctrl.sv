// tb_xc_part_ctrl: self-checking test of the scan-slice partitioning
// controller.
//
// Programs several partitionings (one signature per vector, equal
// partitions, unequal partitions, the maximum partition count), streams
// the slices of several vectors with random idle clocks, and checks every
// clock the first-slice, last-slice, end-of-vector and partition outputs
// against a count kept here. In ready-gated mode it checks that no slice is
// taken before vec_ready, that slices sent too early are counted as
// ignored, and that the permission lasts exactly one vector.
module tb_xc_part_ctrl;
  import xc_pkg::*;
  localparam int unsigned PARTS = MAX_PARTS;
  localparam int unsigned LW    = LEN_W;
  localparam int unsigned PW    = $clog2(PARTS);

  logic clk = 0, rst_n = 0;
  logic np_we = 0, len_we = 0, need_ready = 0, vec_ready = 0, slice_valid = 0;
  logic [PW:0] np_data = '0;
  logic [PW-1:0] len_idx = '0, part;
  logic [LW-1:0] len_data = '0;
  logic accept, restart, sig_end, vec_end, waiting;
  logic [15:0] ignored;
  int checks = 0, failures = 0, nign = 0;
  int lens [PARTS];
  int nparts;

  xc_part_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic setup_parts(input int np, input int mode);
    nparts = np;
    @(negedge clk);
    np_we = 1; np_data = (PW+1)'(np);
    @(negedge clk);
    np_we = 0;
    for (int p = 0; p < np; p++) begin
      lens[p] = (mode == 0) ? 40 : (mode == 1) ? 5 : $urandom_range(1, 9);
      len_we = 1; len_idx = PW'(p); len_data = LW'(lens[p]);
      @(negedge clk);
    end
    len_we = 0;
  endtask

  task automatic run_vector(input bit gated);
    if (gated) begin
      // slices presented before the ready bit must be ignored
      for (int e = 0; e < 3; e++) begin
        slice_valid = 1;
        #1;
        checks++;
        if (accept || !waiting) failures++;
        nign++;
        @(negedge clk);
      end
      slice_valid = 0;
      vec_ready = 1;
      @(negedge clk);
      vec_ready = 0;
    end
    for (int p = 0; p < nparts; p++) begin
      for (int s = 0; s < lens[p]; s++) begin
        while ($urandom_range(0, 3) == 0) begin
          slice_valid = 0;
          #1;
          checks++;
          if (accept || sig_end || restart) failures++;
          @(negedge clk);
        end
        slice_valid = 1;
        #1;
        checks++;
        if (!accept || part !== PW'(p) || restart !== (s == 0) ||
            sig_end !== (s == lens[p] - 1) ||
            vec_end !== (s == lens[p] - 1 && p == nparts - 1)) begin
          failures++;
          if (failures < 5) $display("p=%0d s=%0d part=%0d rs=%b se=%b ve=%b", p, s, part, restart, sig_end, vec_end);
        end
        @(negedge clk);
      end
    end
    slice_valid = 0;
    if (gated) begin
      #1;
      checks++;
      if (!waiting) failures++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    setup_parts(1, 0);
    repeat (3) run_vector(0);
    setup_parts(4, 1);
    repeat (3) run_vector(0);
    setup_parts(6, 2);
    repeat (3) run_vector(0);
    setup_parts(PARTS, 2);
    run_vector(0);
    need_ready = 1;
    @(negedge clk);
    setup_parts(5, 2);
    repeat (3) run_vector(1);
    checks++;
    if (ignored !== 16'(nign)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
