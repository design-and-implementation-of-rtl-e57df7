// tick_gen: divides the system clock down to a one-cycle enable pulse.
//
// A counter runs from 0 to DIV-1 and raises `tick` for one clock cycle each
// time it wraps, so `tick` repeats every DIV cycles. With the default
// DIV = 100 MHz / 1 kHz = 100000 this is the 1 kHz sampling clock of the
// debouncer and the digit-scan rate of the display. The logic stays on the
// single system clock and uses the tick as an enable rather than as a derived
// clock, which is this design's own choice. Synchronous active-high reset.
module tick_gen #(
  parameter int unsigned DIV = 100_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
