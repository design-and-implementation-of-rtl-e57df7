// tb_mux1: self-checking test of the operand-select multiplexer.
//
// All eight settings of Sw6..Sw4 are applied with random words: 001 must pass
// Number1, 010 Number2, 100 the result, and every other setting all blanks.
module tb_mux1;
  import fpu_pkg::*;

  logic [2:0]        sel;
  logic [WORD_W-1:0] num1, num2, res, out;
  int checks = 0, failures = 0;

  mux1 dut (.sel, .num1, .num2, .res, .out);

  initial begin
    for (int k = 0; k < 200; k++) begin
      for (int s = 0; s < 8; s++) begin
        logic [39:0] e;
        num1 = {8'($urandom), 32'($urandom)};
        num2 = {8'($urandom), 32'($urandom)};
        res  = {8'($urandom), 32'($urandom)};
        sel  = 3'(s);
        #1;
        e = (s == 1) ? num1 : (s == 2) ? num2 : (s == 4) ? res : {8{5'h10}};
        checks++;
        if (out != e) begin
          failures++;
          if (failures < 10) $display("FAIL sel %b: %h expected %h", sel, out, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
