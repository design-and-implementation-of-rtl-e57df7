// sevenseg: four-digit multiplexed seven-segment display driver.
//
// Takes four 5-bit digit codes (20 bits, digit 0 = rightmost in bits 4:0),
// lights one digit at a time and moves to the next digit on every tick of a
// 1 kHz enable, so each digit is refreshed every 4 ms, as in the source
// design. The code of the lit digit is turned into a segment pattern by the
// glyph table of fpu_pkg (hex 0-F plus blank, minus, I and n).
//
// Outputs follow the active-low wiring of the Nexys3 board (this design's
// reading of the board): seg[6:0] = segments g..a, seg[7] = decimal point
// (kept dark), an[3:0] = digit enables, an[k] low while digit k is lit.
// Outputs are registered and change one clock after a tick.
// Synchronous active-high reset starts the scan at digit 0.
module sevenseg
  import fpu_pkg::*;
#(
  parameter int unsigned DIV = 100_000   // clocks per digit: 100 MHz / 1 kHz
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [SCAN_W-1:0] digits,
  output logic [7:0]        seg,
  output logic [3:0]        an
);
  logic       tick;
  logic [1:0] pos;

  tick_gen #(.DIV(DIV)) u_tick (.clk(clk), .rst(rst), .tick(tick));

  always_ff @(posedge clk) begin
    if (rst) begin
      pos <= '0;
      seg <= '1;
      an  <= '1;
    end else begin
      if (tick) pos <= pos + 1'b1;
      seg <= {1'b1, ~glyph(digits[pos*DIGIT_W +: DIGIT_W])};
      an  <= ~(4'b0001 << pos);
    end
  end
endmodule
