// mux1: 3-to-1 multiplexer choosing which 40-bit digit word is displayed.
//
// Switches Sw6..Sw4 select, one-hot, as in the source design's truth table:
// 001 = Number1, 010 = Number2, 100 = Result. For the other five switch
// settings, which the source leaves open, the output is all blank digits
// (this design's choice), so an ambiguous setting shows nothing rather than
// a wrong number. Purely combinational.
module mux1
  import fpu_pkg::*;
(
  input  logic [2:0]        sel,     // {Sw6, Sw5, Sw4}
  input  logic [WORD_W-1:0] num1,
  input  logic [WORD_W-1:0] num2,
  input  logic [WORD_W-1:0] res,
  output logic [WORD_W-1:0] out
);
  always_comb begin
    case (sel)
      SEL_NUM1:   out = num1;
      SEL_NUM2:   out = num2;
      SEL_RESULT: out = res;
      default:    out = {NDIGITS{D_BLANK}};
    endcase
  end
endmodule
