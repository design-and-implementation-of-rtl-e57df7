// mux2: 2-to-1 multiplexer that picks which half of the eight-digit word
// reaches the four-digit display.
//
// With Sw7 = 0 the four least significant digits (bits 19:0 of the 40-bit
// word) are passed, with Sw7 = 1 the four most significant ones (bits 39:20),
// as in the source design. Purely combinational.
module mux2
  import fpu_pkg::*;
(
  input  logic              hi,     // Sw7
  input  logic [WORD_W-1:0] word,
  output logic [SCAN_W-1:0] out
);
  assign out = hi ? word[WORD_W-1 -: SCAN_W] : word[SCAN_W-1:0];
endmodule
