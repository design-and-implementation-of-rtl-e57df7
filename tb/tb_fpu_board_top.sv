// tb_fpu_board_top: end-to-end test of the calculator at its default
// parameters (100 MHz clock, 1 kHz sampling and scan).
//
// The testbench acts as the user: it sets the switches, presses buttons
// whose contacts chatter for a few hundred clocks (far less than one 1 ms
// sampling period) on both press and release, and reads the four-digit
// display by watching the anode scan and recording the segment pattern of
// each lit digit. Expected display contents are written as digit codes and
// turned into segment patterns with a glyph table of its own.
//
// Scenario: blank display after reset; Number1 = 3FC00000 (1.5) keyed in with
// one wrong digit removed by DW-POINTER; Number2 = 40100000 (2.25); add gives
// 40700000 (3.75); ADD/SUB switches LD1 on and subtract gives BF400000
// (-0.75); both numbers cleared with DW-POINTER and re-entered as 7F7FFFFF
// (largest finite) whose sum overflows to +infinity (" InF"); infinity minus
// infinity gives NaN ("nAn "); RESET clears everything. Each mechanism (digit
// entry, deletion, bounce filtering, mode switch, calculation, the three
// MUX1 selections, both MUX2 halves, the infinity and NaN words, reset) is
// counted and a failure is counted for one that never happened.
module tb_fpu_board_top;
  localparam int DIV = 100_000;   // clocks per 1 kHz sample at 100 MHz

  logic       clk = 1'b0;
  logic       btn_reset, btn_up, btn_dw, btn_addsub, btn_calc;
  logic [7:0] sw;
  logic [7:0] seg;
  logic [3:0] an;
  logic       ld1;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_entry = 0, n_delete = 0, n_bounce = 0, n_toggle = 0, n_calc = 0;
  int n_sel1 = 0, n_sel2 = 0, n_selr = 0, n_lo = 0, n_hi = 0;
  int n_inf = 0, n_nan = 0, n_reset = 0;

  fpu_board_top dut (.clk, .btn_reset, .btn_up, .btn_dw, .btn_addsub, .btn_calc,
                     .sw, .seg, .an, .ld1);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- glyphs ----------------
  function automatic string letters(input logic [4:0] c);
    case (c)
      5'h00: return "abcdef";   5'h01: return "bc";      5'h02: return "abdeg";
      5'h03: return "abcdg";    5'h04: return "bcfg";    5'h05: return "acdfg";
      5'h06: return "acdefg";   5'h07: return "abc";     5'h08: return "abcdefg";
      5'h09: return "abcdfg";   5'h0A: return "abcefg";  5'h0B: return "cdefg";
      5'h0C: return "adef";     5'h0D: return "bcdeg";   5'h0E: return "adefg";
      5'h0F: return "aefg";     5'h11: return "g";       5'h12: return "bc";
      5'h13: return "ceg";
      default: return "";
    endcase
  endfunction

  function automatic logic [7:0] pattern(input logic [4:0] c);
    string s;
    logic [7:0] p;
    s = letters(c);
    p = 8'hFF;
    for (int i = 0; i < s.len(); i++) p[s[i] - "a"] = 1'b0;
    return p;
  endfunction

  localparam logic [4:0] BL = 5'h10, MI = 5'h11, LI = 5'h12, LN = 5'h13;

  // eight hex digits of a word, digit 0 first
  function automatic logic [39:0] hexword(input logic [31:0] v);
    logic [39:0] w;
    for (int i = 0; i < 8; i++) w[i*5 +: 5] = {1'b0, v[i*4 +: 4]};
    return w;
  endfunction

  // ---------------- user actions ----------------
  task automatic wait_clk(input int n);
    repeat (n) @(negedge clk);
  endtask

  // press and release a button with contact bounce on both edges
  task automatic press(ref logic b);
    for (int i = 0; i < 20; i++) begin
      b = 1'($urandom);
      wait_clk(1 + $urandom % 40);
    end
    b = 1'b1;
    wait_clk(2 * DIV);
    for (int i = 0; i < 20; i++) begin
      b = 1'($urandom);
      wait_clk(1 + $urandom % 40);
    end
    b = 1'b0;
    wait_clk(2 * DIV);
    n_bounce++;
  endtask

  task automatic select(input logic [2:0] s);
    sw[6:4] = s;
    wait_clk(4);
  endtask

  // key in a whole word on the selected operand, least significant digit first
  task automatic enter(input logic [2:0] s, input logic [31:0] v);
    select(s);
    for (int i = 0; i < 8; i++) begin
      sw[3:0] = v[i*4 +: 4];
      press(btn_up);
      n_entry++;
    end
  endtask

  // remove all eight digits of the selected operand
  task automatic clear(input logic [2:0] s);
    select(s);
    for (int i = 0; i < 8; i++) begin
      press(btn_dw);
      n_delete++;
    end
  endtask

  // read the four lit digits: one full scan after the switches settle
  task automatic read4(output logic [7:0] p [4]);
    logic [3:0] seen;
    seen = '0;
    wait_clk(4 * DIV + 10);
    while (seen != 4'hF) begin
      @(an);
      wait_clk(3);
      for (int d = 0; d < 4; d++)
        if (an == ~(4'b1 << d)) begin
          p[d] = seg;
          seen[d] = 1'b1;
        end
    end
  endtask

  // check both halves of the selected word against eight digit codes
  task automatic expect_word(input logic [2:0] s, input logic [39:0] w, input string what);
    logic [7:0] p [4];
    select(s);
    for (int h = 0; h < 2; h++) begin
      sw[7] = 1'(h);
      read4(p);
      for (int d = 0; d < 4; d++)
        check(p[d] == pattern(w[(h*4 + d)*5 +: 5]),
              $sformatf("%s: half %0d digit %0d", what, h, d));
      if (h == 0) n_lo++; else n_hi++;
    end
    if (s == 3'b001) n_sel1++;
    if (s == 3'b010) n_sel2++;
    if (s == 3'b100) n_selr++;
  endtask

  task automatic calculate();
    press(btn_calc);
    n_calc++;
  endtask

  task automatic toggle_mode();
    logic old_mode;
    old_mode = ld1;
    press(btn_addsub);
    check(ld1 == !old_mode, "ADD/SUB toggles LD1");
    n_toggle++;
  endtask

  task automatic do_reset();
    btn_reset = 1'b1;
    wait_clk(10);
    btn_reset = 1'b0;
    wait_clk(10);
    n_reset++;
  endtask

  // ---------------- scenario ----------------
  initial begin
    btn_reset = 1'b0; btn_up = 1'b0; btn_dw = 1'b0; btn_addsub = 1'b0; btn_calc = 1'b0;
    sw = 8'b0001_0000;
    do_reset();
    check(ld1 == 1'b0, "add mode after reset");
    expect_word(3'b001, {8{BL}}, "Number1 blank after reset");

    // Number1 = 3FC00000 with a slip: 7 digits, a wrong one, DW, the right one
    select(3'b001);
    for (int i = 0; i < 7; i++) begin
      sw[3:0] = (i == 5) ? 4'hC : (i == 6) ? 4'hF : 4'h0;
      press(btn_up);
      n_entry++;
    end
    sw[3:0] = 4'h9;
    press(btn_up);
    n_entry++;
    press(btn_dw);
    n_delete++;
    expect_word(3'b001, {BL, 5'h0F, 5'h0C, {5{5'h00}}}, "Number1 after DW");
    sw[3:0] = 4'h3;
    press(btn_up);
    n_entry++;
    expect_word(3'b001, hexword(32'h3FC00000), "Number1");

    enter(3'b010, 32'h40100000);
    expect_word(3'b010, hexword(32'h40100000), "Number2");

    calculate();
    expect_word(3'b100, hexword(32'h40700000), "1.5 + 2.25");

    toggle_mode();
    calculate();
    expect_word(3'b100, hexword(32'hBF400000), "1.5 - 2.25");

    // overflow to infinity
    clear(3'b001);
    expect_word(3'b001, {8{BL}}, "Number1 cleared");
    enter(3'b001, 32'h7F7FFFFF);
    clear(3'b010);
    enter(3'b010, 32'h7F7FFFFF);
    toggle_mode();
    calculate();
    expect_word(3'b100, {hexword(32'h7F800000)[39:20], BL, LI, LN, 5'h0F}, "overflow to +InF");
    n_inf++;

    // infinity minus infinity
    clear(3'b001);
    enter(3'b001, 32'h7F800000);
    clear(3'b010);
    enter(3'b010, 32'h7F800000);
    toggle_mode();
    calculate();
    expect_word(3'b100, {hexword(32'h7FC00000)[39:20], LN, 5'h0A, LN, BL}, "inf - inf = NaN");
    n_nan++;

    // reset returns to the initial state
    do_reset();
    check(ld1 == 1'b0, "add mode after second reset");
    expect_word(3'b010, {8{BL}}, "Number2 blank after reset");

    check(n_entry > 0 && n_delete > 0 && n_bounce > 0 && n_toggle > 0 && n_calc > 0,
          "entry, delete, bounce, toggle and calculate all exercised");
    check(n_sel1 > 0 && n_sel2 > 0 && n_selr > 0 && n_lo > 0 && n_hi > 0,
          "all MUX1 selections and both MUX2 halves exercised");
    check(n_inf > 0 && n_nan > 0 && n_reset > 1, "special words and reset exercised");
    $display("mechanisms: entry %0d delete %0d debounced presses %0d toggle %0d calc %0d",
             n_entry, n_delete, n_bounce, n_toggle, n_calc);
    $display("            sel num1 %0d num2 %0d result %0d, low half %0d high half %0d, inf %0d nan %0d reset %0d",
             n_sel1, n_sel2, n_selr, n_lo, n_hi, n_inf, n_nan, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150_000_000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
