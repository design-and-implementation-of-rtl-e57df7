// fpu_pkg: types and constants shared by the floating-point calculator.
//
// Every displayed digit is a 5-bit code. Codes 0x00-0x0F are the hexadecimal
// digits 0-F, that is a 4-bit nibble with a 0 pad bit on top. Codes with the
// pad bit set are extra glyphs used for the blank position of a digit that
// has not been entered yet and for the special-value words ("InF", "nAn")
// shown for infinities and NaNs. The 5-bit digit width and the eight digits
// per single-precision word follow the source design; the exact glyph set is
// this design's own choice.
package fpu_pkg;

  localparam int unsigned DIGIT_W    = 5;              // bits per display digit
  localparam int unsigned NDIGITS    = 8;              // hex digits of a 32-bit word
  localparam int unsigned WORD_W     = DIGIT_W * NDIGITS;  // 40-bit digit word
  localparam int unsigned SCAN_W     = DIGIT_W * 4;    // 20 bits: four digits shown at once

  typedef logic [DIGIT_W-1:0] digit_t;

  // Glyph codes with the pad bit set.
  localparam digit_t D_BLANK = 5'h10;
  localparam digit_t D_MINUS = 5'h11;
  localparam digit_t D_I     = 5'h12;
  localparam digit_t D_N     = 5'h13;   // lower-case n
  localparam digit_t D_A     = 5'h0A;   // same glyph as hex A
  localparam digit_t D_F     = 5'h0F;   // same glyph as hex F

  // Operand chosen for entry and display (MUX1 select, Sw6..Sw4, one-hot).
  typedef enum logic [2:0] {
    SEL_NUM1   = 3'b001,
    SEL_NUM2   = 3'b010,
    SEL_RESULT = 3'b100
  } sel_e;

  // Seven-segment pattern (active high, bit 0 = segment a ... bit 6 = segment g)
  // of a digit code.
  function automatic logic [6:0] glyph(input digit_t d);
    unique case (d)
      5'h00: glyph = 7'b0111111;
      5'h01: glyph = 7'b0000110;
      5'h02: glyph = 7'b1011011;
      5'h03: glyph = 7'b1001111;
      5'h04: glyph = 7'b1100110;
      5'h05: glyph = 7'b1101101;
      5'h06: glyph = 7'b1111101;
      5'h07: glyph = 7'b0000111;
      5'h08: glyph = 7'b1111111;
      5'h09: glyph = 7'b1101111;
      5'h0A: glyph = 7'b1110111;
      5'h0B: glyph = 7'b1111100;
      5'h0C: glyph = 7'b0111001;
      5'h0D: glyph = 7'b1011110;
      5'h0E: glyph = 7'b1111001;
      5'h0F: glyph = 7'b1110001;
      D_MINUS: glyph = 7'b1000000;
      D_I:     glyph = 7'b0000110;
      D_N:     glyph = 7'b1010100;
      default: glyph = 7'b0000000;   // blank and unused codes
    endcase
  endfunction

endpackage
