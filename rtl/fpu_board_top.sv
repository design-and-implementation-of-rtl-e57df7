// fpu_board_top: single-precision floating-point calculator for a Nexys3
// style board (Spartan-6, 100 MHz clock, eight switches, five push buttons,
// four-digit seven-segment display, one LED).
//
// Operation: the user picks an operand with Sw6..Sw4 (001 = Number1,
// 010 = Number2, 100 = Result), sets a hex digit on Sw3..Sw0 and presses
// UP-POINTER to store it, least significant digit first; DW-POINTER removes
// the last digit entered. ADD/SUB toggles between addition and subtraction
// (shown on LD1) and CALCULATE starts Number1 +/- Number2. The display shows
// the four low digits of the selected word when Sw7 = 0 and the four high
// digits when Sw7 = 1.
//
// Data path, following the module-level block diagram of the source design:
// buttons -> bru (debounce, 1 kHz sampling) -> io_fsm (entry state machine)
// -> digit_buffer (entered digits) -> fp_addsub (IEEE 754 add/sub) ->
// pad_unit (4-bit to 5-bit digits) -> mux1 (operand select) -> mux2 (half
// select) -> sevenseg (glyphs and 1 kHz digit scan). RESET is synchronised
// with two flip-flops and used as a synchronous reset everywhere; the switch
// inputs are synchronised the same way; both are this design's additions.
//
// Timing: a result is on the display path 4 clocks after the CALCULATE press
// is recognised, which itself happens at the first 1 kHz sample after the
// button closes. CLK_HZ and SAMPLE_HZ set the divider of the debounce and
// scan enables (defaults: 100 MHz, 1 kHz).
module fpu_board_top
  import fpu_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned SAMPLE_HZ = 1_000
) (
  input  logic       clk,         // SYSTEM_CLK
  input  logic       btn_reset,
  input  logic       btn_up,      // UP-POINTER
  input  logic       btn_dw,      // DW-POINTER
  input  logic       btn_addsub,  // ADD/SUB
  input  logic       btn_calc,    // CALCULATE
  input  logic [7:0] sw,          // Sw7..Sw0
  output logic [7:0] seg,         // seg[6:0] = g..a, seg[7] = dp, active low
  output logic [3:0] an,          // digit enables, active low
  output logic       ld1          // 1 = subtract mode
);
  localparam int unsigned DIV = CLK_HZ / SAMPLE_HZ;

  logic [1:0] rst_sync;
  logic       rst;
  logic [7:0] sw_s1, sw_s2;

  always_ff @(posedge clk) begin
    rst_sync <= {rst_sync[0], btn_reset};
    sw_s1    <= sw;
    sw_s2    <= sw_s1;
  end
  assign rst = rst_sync[1];

  // debounced button events
  logic [3:0] level, press;
  bru #(.N(4), .DIV(DIV)) u_bru (
    .clk, .rst,
    .btn_raw({btn_calc, btn_addsub, btn_dw, btn_up}),
    .level, .press
  );

  // entry state machine and operand buffer
  logic       wr_en, wr_num, sub, start;
  logic [2:0] wr_idx;
  digit_t     wr_data;
  logic [3:0] state1, state2;
  io_fsm u_io (
    .clk, .rst,
    .up(press[0]), .dw(press[1]), .addsub(press[2]), .calc(press[3]),
    .sel(sw_s2[6:4]), .sw_digit(sw_s2[3:0]),
    .wr_en, .wr_num, .wr_idx, .wr_data, .sub, .start, .state1, .state2
  );

  logic [WORD_W-1:0] num1, num2;
  logic [31:0]       op1, op2;
  digit_buffer u_buf (
    .clk, .rst, .wr_en, .wr_num, .wr_idx, .wr_data, .num1, .num2, .op1, .op2
  );

  // arithmetic
  logic        res_valid;
  logic [31:0] result;
  fp_addsub #(.EXP_W(8), .FRAC_W(23)) u_fpu (
    .clk, .rst, .in_valid(start), .sub, .a(op1), .b(op2),
    .out_valid(res_valid), .result
  );

  // display path
  logic [WORD_W-1:0] res_word, sel_word;
  logic [SCAN_W-1:0] half;
  pad_unit u_pad  (.result, .word(res_word));
  mux1     u_mux1 (.sel(sw_s2[6:4]), .num1, .num2, .res(res_word), .out(sel_word));
  mux2     u_mux2 (.hi(sw_s2[7]), .word(sel_word), .out(half));
  sevenseg #(.DIV(DIV)) u_seg (.clk, .rst, .digits(half), .seg, .an);

  assign ld1 = sub;
endmodule
