// bru: bouncing removing unit for the board's push buttons.
//
// A mechanical button chatters between 0 and 1 for a few milliseconds when it
// is pressed or released. Following the source design, each button is sampled
// with a 1 kHz clock, whose period is longer than the bouncing time, so at
// most one sample can fall inside a bounce and the sampled level changes at
// most once per press. The raw inputs first pass a two-flop synchroniser
// (this design's addition, the buttons are asynchronous to the clock). The
// unit outputs the clean level of every button and a one-cycle `press` pulse
// on the rising edge of the clean level, which the state machine uses as its
// event.
//
// Timing: `level` changes on the clock after a sampling tick, that is up to
// DIV + 3 clocks after the raw input settles; `press` is high for the single
// cycle in which `level` rises. Synchronous active-high reset.
module bru #(
  parameter int unsigned N   = 4,        // number of buttons
  parameter int unsigned DIV = 100_000   // clocks per sample: 100 MHz / 1 kHz
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] btn_raw,
  output logic [N-1:0] level,
  output logic [N-1:0] press
);
  logic         tick;
  logic [N-1:0] sync1, sync2, level_q;

  tick_gen #(.DIV(DIV)) u_tick (.clk(clk), .rst(rst), .tick(tick));

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1   <= '0;
      sync2   <= '0;
      level   <= '0;
      level_q <= '0;
    end else begin
      sync1   <= btn_raw;
      sync2   <= sync1;
      if (tick) level <= sync2;
      level_q <= level;
    end
  end

  assign press = level & ~level_q;
endmodule
