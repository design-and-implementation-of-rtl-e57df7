// tb_mux2: self-checking test of the display-half multiplexer.
//
// With Sw7 = 0 the four least significant digits must come out, with Sw7 = 1
// the four most significant ones; checked digit by digit on random words.
module tb_mux2;
  import fpu_pkg::*;

  logic              hi;
  logic [WORD_W-1:0] word;
  logic [SCAN_W-1:0] out;
  int checks = 0, failures = 0;

  mux2 dut (.hi, .word, .out);

  initial begin
    for (int k = 0; k < 500; k++) begin
      word = {8'($urandom), 32'($urandom)};
      hi   = 1'($urandom);
      #1;
      for (int d = 0; d < 4; d++) begin
        checks++;
        if (out[d*5 +: 5] != word[(hi ? d + 4 : d)*5 +: 5]) begin
          failures++;
          if (failures < 10) $display("FAIL hi=%b digit %0d of %h: %h", hi, d, word, out);
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
