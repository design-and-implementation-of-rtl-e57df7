// tb_digit_buffer: self-checking test of the operand buffer.
//
// Checks that both words read blank after reset (and the operands 0), then
// performs random single-digit writes to either word and compares the 40-bit
// digit words and the 32-bit operands (low nibble of every digit) with a
// model kept in the testbench, one clock after each write.
module tb_digit_buffer;
  import fpu_pkg::*;

  logic              clk = 1'b0;
  logic              rst;
  logic              wr_en, wr_num;
  logic [2:0]        wr_idx;
  digit_t            wr_data;
  logic [WORD_W-1:0] num1, num2;
  logic [31:0]       op1, op2;
  int checks = 0, failures = 0;
  logic [4:0] m [2][8];

  digit_buffer dut (.clk, .rst, .wr_en, .wr_num, .wr_idx, .wr_data, .num1, .num2, .op1, .op2);

  always #5 clk = ~clk;

  task automatic compare();
    logic [39:0] w1, w2;
    logic [31:0] o1, o2;
    for (int i = 0; i < 8; i++) begin
      w1[i*5 +: 5] = m[0][i];  w2[i*5 +: 5] = m[1][i];
      o1[i*4 +: 4] = m[0][i][3:0];  o2[i*4 +: 4] = m[1][i][3:0];
    end
    checks++;
    if (num1 != w1 || num2 != w2 || op1 != o1 || op2 != o2) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t num1 %h/%h num2 %h/%h op1 %h/%h op2 %h/%h",
                                  $time, num1, w1, num2, w2, op1, o1, op2, o2);
    end
  endtask

  initial begin
    wr_en = 1'b0; wr_num = 1'b0; wr_idx = '0; wr_data = '0;
    for (int n = 0; n < 2; n++) for (int i = 0; i < 8; i++) m[n][i] = 5'h10;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    compare();
    checks++;
    if (op1 != 0 || op2 != 0) begin failures++; $display("FAIL blanks not read as 0"); end
    for (int k = 0; k < 3000; k++) begin
      wr_en   = ($urandom % 3) != 0;
      wr_num  = 1'($urandom);
      wr_idx  = 3'($urandom);
      wr_data = ($urandom % 4 == 0) ? 5'h10 : {1'b0, 4'($urandom)};
      @(posedge clk);
      if (wr_en) m[wr_num][wr_idx] = wr_data;
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
