// digit_buffer: buffer unit holding the two operands as they are keyed in.
//
// Two words of eight 5-bit digit codes (Number1 and Number2). The state
// machine writes one digit per `wr_en`; the buffer keeps the words stable for
// the display path and the floating-point unit, so the display shows only
// what has been entered, never the live switch positions. Digits not yet
// entered hold the blank code, whose low four bits are 0, so the operand
// handed to the arithmetic unit reads them as hex 0. The source design gives
// this unit's purpose; the storage layout is this design's own.
//
// Interface: `num1`/`num2` are 40-bit digit words (digit 0 in bits 4:0) and
// `op1`/`op2` the 32-bit operands formed from the low nibble of every digit.
// A write is visible on the clock edge after `wr_en`. Synchronous active-high
// reset blanks both words.
module digit_buffer
  import fpu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_en,
  input  logic              wr_num,
  input  logic [2:0]        wr_idx,
  input  digit_t            wr_data,
  output logic [WORD_W-1:0] num1,
  output logic [WORD_W-1:0] num2,
  output logic [31:0]       op1,
  output logic [31:0]       op2
);
  digit_t d1 [NDIGITS];
  digit_t d2 [NDIGITS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NDIGITS; i++) begin
        d1[i] <= D_BLANK;
        d2[i] <= D_BLANK;
      end
    end else if (wr_en) begin
      if (wr_num) d2[wr_idx] <= wr_data;
      else        d1[wr_idx] <= wr_data;
    end
  end

  always_comb begin
    for (int i = 0; i < NDIGITS; i++) begin
      num1[i*DIGIT_W +: DIGIT_W] = d1[i];
      num2[i*DIGIT_W +: DIGIT_W] = d2[i];
      op1[i*4 +: 4]              = d1[i][3:0];
      op2[i*4 +: 4]              = d2[i][3:0];
    end
  end
endmodule
