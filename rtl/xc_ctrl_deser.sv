// xc_ctrl_deser: loads one control set from the tester channels.
//
// A load starts with a one-clock ld_start pulse that also latches the
// destination address ld_addr (a RAM address or a partition number,
// depending on the control source that takes the word). It is followed by
// BEATS clocks with tch_valid high, each carrying CH bits on tch_data; the
// first beat ends up in the lowest bits of the word. Idle clocks between
// beats are allowed. On the clock after the last beat, word_valid is high
// for one clock with the complete word and its address. A new ld_start
// during a load abandons it.
//
// The document says only that the tester loads control bits into an
// on-chip register or RAM; the serial channel width, the framing with
// ld_start and the beat order are this design's choice.
module xc_ctrl_deser
  import xc_pkg::*;
#(
  parameter int unsigned WORD_W = NUM_XC * MISR_W,
  parameter int unsigned CH     = N_TCH,
  parameter int unsigned AW     = $clog2(GROUP_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld_start,
  input  logic [AW-1:0]     ld_addr,
  input  logic              tch_valid,
  input  logic [CH-1:0]     tch_data,
  output logic              busy,
  output logic              word_valid,
  output logic [WORD_W-1:0] word,
  output logic [AW-1:0]     word_addr
);

  localparam int unsigned BEATS = (WORD_W + CH - 1) / CH;
  localparam int unsigned CW    = $clog2(BEATS + 1);

  logic [BEATS*CH-1:0] sh_q;
  logic [CW-1:0]       cnt_q;
  logic                busy_q, done_q;
  logic [AW-1:0]       addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q   <= '0;
      cnt_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
      addr_q <= '0;
    end else begin
      done_q <= 1'b0;
      if (ld_start) begin
        busy_q <= 1'b1;
        cnt_q  <= '0;
        addr_q <= ld_addr;
      end else if (busy_q && tch_valid) begin
        if (BEATS*CH > CH) sh_q <= {tch_data, sh_q[BEATS*CH-1:CH]};
        else               sh_q <= (BEATS*CH)'(tch_data);
        if (cnt_q == CW'(BEATS - 1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  assign busy       = busy_q;
  assign word_valid = done_q;
  assign word       = sh_q[WORD_W-1:0];
  assign word_addr  = addr_q;

endmodule
