// tb_io_fsm: self-checking test of the digit-entry state machine.
//
// A directed part walks Number1 through S0 -> S8 with UP-POINTER, tries UP in
// S8, steps back with DW-POINTER, edits Number2 and checks that nothing is
// edited while the result is selected. A random part then drives random
// button pulses, select settings and switch digits for several thousand
// cycles and compares every output with a reference model of the entry
// rules kept in the testbench: UP writes the switch digit at position k and
// advances, DW blanks position k-1 and steps back, ADD/SUB toggles the mode,
// CALCULATE gives a one-cycle start; all outputs one clock after the pulse.
module tb_io_fsm;
  import fpu_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic       up, dw, addsub, calc;
  logic [2:0] sel;
  logic [3:0] sw_digit;
  logic       wr_en, wr_num, sub, start;
  logic [2:0] wr_idx;
  digit_t     wr_data;
  logic [3:0] state1, state2;
  int checks = 0, failures = 0;
  int nwr = 0, ndel = 0, ncalc = 0;

  io_fsm dut (.clk, .rst, .up, .dw, .addsub, .calc, .sel, .sw_digit,
              .wr_en, .wr_num, .wr_idx, .wr_data, .sub, .start, .state1, .state2);

  always #5 clk = ~clk;

  // reference model
  int         m_st [2];
  logic       m_wr, m_num, m_sub, m_start;
  int         m_idx;
  logic [4:0] m_data;

  task automatic model_step();
    int n;
    logic ok;
    m_wr = 1'b0;
    m_start = calc;
    if (addsub) m_sub = !m_sub;
    ok = (sel == 3'b001) || (sel == 3'b010);
    n  = (sel == 3'b010) ? 1 : 0;
    if (ok && up) begin
      if (m_st[n] < 8) begin
        m_wr = 1'b1; m_num = 1'(n); m_idx = m_st[n]; m_data = {1'b0, sw_digit};
        m_st[n]++;
      end
    end else if (ok && dw && m_st[n] > 0) begin
      m_st[n]--;
      m_wr = 1'b1; m_num = 1'(n); m_idx = m_st[n]; m_data = 5'h10;
    end
  endtask

  task automatic compare();
    checks++;
    if (wr_en != m_wr || (m_wr && (wr_num != m_num || int'(wr_idx) != m_idx ||
        wr_data != m_data)) || sub != m_sub || start != m_start ||
        int'(state1) != m_st[0] || int'(state2) != m_st[1]) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t wr %b/%b num %b/%b idx %0d/%0d data %h/%h sub %b/%b start %b/%b st %0d,%0d/%0d,%0d",
                 $time, wr_en, m_wr, wr_num, m_num, wr_idx, m_idx, wr_data, m_data,
                 sub, m_sub, start, m_start, state1, state2, m_st[0], m_st[1]);
    end
    if (m_wr && m_data == 5'h10) ndel++;
    else if (m_wr) nwr++;
    if (m_start) ncalc++;
  endtask

  // apply one cycle of inputs, advance the model, check after the edge
  task automatic step(input logic u, input logic d, input logic a, input logic c,
                      input logic [2:0] s, input logic [3:0] v);
    up = u; dw = d; addsub = a; calc = c; sel = s; sw_digit = v;
    @(posedge clk);
    model_step();
    @(negedge clk);
    compare();
  endtask

  initial begin
    {up, dw, addsub, calc} = '0;
    sel = 3'b001; sw_digit = '0;
    m_st[0] = 0; m_st[1] = 0; m_sub = 1'b0; m_start = 1'b0; m_wr = 1'b0;
    m_num = 1'b0; m_idx = 0; m_data = 5'h10;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // directed: fill Number1 with 1..8, one extra UP, two DW
    for (int i = 0; i < 9; i++) begin
      step(1, 0, 0, 0, 3'b001, 4'(i + 1));
      step(0, 0, 0, 0, 3'b001, 4'(i + 1));
    end
    checks++;
    if (state1 != 4'd8) begin failures++; $display("FAIL S8 not reached"); end
    step(0, 1, 0, 0, 3'b001, 0);
    step(0, 1, 0, 0, 3'b001, 0);
    checks++;
    if (state1 != 4'd6) begin failures++; $display("FAIL DW did not step back"); end
    step(1, 0, 0, 0, 3'b010, 4'hA);      // Number2
    step(1, 0, 0, 0, 3'b100, 4'hB);      // result shown: ignored
    step(0, 0, 1, 0, 3'b100, 0);         // toggle to subtract
    step(0, 0, 0, 1, 3'b100, 0);         // calculate
    // random
    for (int i = 0; i < 5000; i++) begin
      logic [2:0] s;
      s = ($urandom % 8 == 0) ? 3'($urandom) : ($urandom % 2 ? 3'b001 : 3'b010);
      step(($urandom % 4) == 0, ($urandom % 6) == 0, ($urandom % 20) == 0,
           ($urandom % 20) == 0, s, 4'($urandom));
    end
    checks++;
    if (nwr == 0 || ndel == 0 || ncalc == 0) begin
      failures++;
      $display("FAIL coverage writes %0d deletes %0d calcs %0d", nwr, ndel, ncalc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
