// io_fsm: state machine I/O management unit.
//
// Numbers are keyed in one hexadecimal digit at a time on switches Sw3..Sw0,
// least significant digit first. Each operand has its own entry state
// S0..S8, the number of digits entered so far. In state Sk an UP-POINTER
// press writes the switch value into digit k and moves to S(k+1); a
// DW-POINTER press in Sk (k > 0) removes digit k-1, writing the blank code
// into it, and moves back to S(k-1). UP in S8 and DW in S0 do nothing. This
// follows the source design's S0 -> S1 -> S2 ... description; which operand
// is edited is this design's choice: the one shown by the MUX1 select
// switches (Sw4 = Number1, Sw5 = Number2), and nothing is edited while the
// result is shown or the select is not one-hot. If UP and DW arrive in the
// same cycle, UP wins.
//
// The unit also owns the operation mode: each ADD/SUB press toggles `sub`
// (0 = add, 1 = subtract; drives LED LD1), and a CALCULATE press gives a
// one-cycle `start` to the floating-point unit.
//
// Timing: all outputs are registered; a write or start appears on the clock
// edge after the press pulse. Synchronous active-high reset to S0 / add mode.
module io_fsm
  import fpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       up,        // one-cycle press pulses from the debouncer
  input  logic       dw,
  input  logic       addsub,
  input  logic       calc,
  input  logic [2:0] sel,       // Sw6..Sw4
  input  logic [3:0] sw_digit,  // Sw3..Sw0
  output logic       wr_en,     // write one digit into the buffer
  output logic       wr_num,    // 0 = Number1, 1 = Number2
  output logic [2:0] wr_idx,    // digit position, 0 = least significant
  output digit_t     wr_data,
  output logic       sub,
  output logic       start,
  output logic [3:0] state1,    // entry state of Number1 (k of Sk)
  output logic [3:0] state2     // entry state of Number2
);
  logic       edit_ok, num;
  logic [3:0] cur;

  assign edit_ok = (sel == SEL_NUM1) || (sel == SEL_NUM2);
  assign num     = (sel == SEL_NUM2);
  assign cur     = num ? state2 : state1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state1  <= '0;
      state2  <= '0;
      wr_en   <= 1'b0;
      wr_num  <= 1'b0;
      wr_idx  <= '0;
      wr_data <= D_BLANK;
      sub     <= 1'b0;
      start   <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      start <= calc;
      if (addsub) sub <= ~sub;
      if (edit_ok && up && cur != 4'(NDIGITS)) begin
        wr_en   <= 1'b1;
        wr_num  <= num;
        wr_idx  <= cur[2:0];
        wr_data <= {1'b0, sw_digit};
        if (num) state2 <= cur + 1'b1;
        else     state1 <= cur + 1'b1;
      end else if (edit_ok && dw && !up && cur != 4'd0) begin
        wr_en   <= 1'b1;
        wr_num  <= num;
        wr_idx  <= 3'(cur - 1'b1);
        wr_data <= D_BLANK;
        if (num) state2 <= cur - 1'b1;
        else     state1 <= cur - 1'b1;
      end
    end
  end
endmodule
