// tb_bru: self-checking test of the debouncer.
//
// Button 0 gets presses and releases that chatter for fewer cycles than one
// sampling period (DIV is cut to 16 clocks to keep the run short); buttons 1
// to 3 stay still, except button 2 which gets one clean press. Every press
// must yield exactly one `press` pulse, arriving within DIV + 4 clocks of the
// contact settling, and `level` must follow the settled contact. Bounce
// shorter than a sample period must never create a second pulse.
module tb_bru;
  localparam int DIV = 16;
  localparam int N = 4;

  logic         clk = 1'b0;
  logic         rst;
  logic [N-1:0] btn_raw;
  logic [N-1:0] level, press;
  int checks = 0, failures = 0;
  int npress [N];
  int cycle = 0;

  bru #(.N(N), .DIV(DIV)) dut (.clk, .rst, .btn_raw, .level, .press);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) for (int i = 0; i < N; i++) if (press[i]) npress[i] <= npress[i] + 1;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // chatter on button b for `len` cycles, then settle at `v`
  task automatic bounce(input int b, input logic v, input int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      btn_raw[b] = 1'($urandom);
    end
    @(negedge clk);
    btn_raw[b] = v;
  endtask

  initial begin
    int n0, t0;
    btn_raw = '0;
    foreach (npress[i]) npress[i] = 0;
    rst = 1'b1;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < 12; p++) begin
      n0 = npress[0];
      bounce(0, 1'b1, 1 + ($urandom % (DIV - 4)));
      t0 = cycle;
      while (npress[0] == n0 && cycle - t0 < 3 * DIV) @(negedge clk);
      check(npress[0] == n0 + 1, "one pulse per press");
      check(cycle - t0 <= DIV + 4, "pulse within one sample period");
      repeat (2 * DIV) @(negedge clk);
      check(level[0] == 1'b1, "level high while held");
      check(npress[0] == n0 + 1, "no extra pulse while held");
      bounce(0, 1'b0, 1 + ($urandom % (DIV - 4)));
      repeat (3 * DIV) @(negedge clk);
      check(level[0] == 1'b0, "level low after release");
      check(npress[0] == n0 + 1, "no pulse on release");
    end
    // a clean press on button 2
    btn_raw[2] = 1'b1;
    repeat (3 * DIV) @(negedge clk);
    btn_raw[2] = 1'b0;
    repeat (3 * DIV) @(negedge clk);
    check(npress[2] == 1, "button 2 one pulse");
    check(npress[1] == 0 && npress[3] == 0, "idle buttons silent");
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
