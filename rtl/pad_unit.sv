// pad_unit: padding bit unit between the arithmetic unit and the display bus.
//
// The arithmetic unit delivers a 32-bit word, eight 4-bit nibbles, while the
// display path carries eight 5-bit digit codes. For an ordinary result
// (normalised, denormal or zero) every nibble gets a 0 pad bit on top and is
// shown as a hex digit, as in the source design. The fifth bit exists so
// that special values can be shown as words; here, for an infinity or a NaN
// result, the four low digits carry "-InF" / " InF" or "nAn " glyphs (codes
// with the pad bit set) while the four high digits still show the raw hex of
// the upper half-word, so the exponent field stays readable. Which glyphs
// mark which case is this design's own choice.
//
// Purely combinational. Digit 0 is the least significant (bits 4:0).
module pad_unit
  import fpu_pkg::*;
(
  input  logic [31:0]       result,
  output logic [WORD_W-1:0] word
);
  logic is_inf, is_nan;

  assign is_inf = (result[30:23] == 8'hFF) && (result[22:0] == '0);
  assign is_nan = (result[30:23] == 8'hFF) && (result[22:0] != '0);

  always_comb begin
    for (int i = 0; i < NDIGITS; i++)
      word[i*DIGIT_W +: DIGIT_W] = {1'b0, result[i*4 +: 4]};
    if (is_inf)
      word[0 +: 4*DIGIT_W] = {(result[31] ? D_MINUS : D_BLANK), D_I, D_N, D_F};
    else if (is_nan)
      word[0 +: 4*DIGIT_W] = {D_N, D_A, D_N, D_BLANK};
  end
endmodule
