// tb_pad_unit: self-checking test of the padding bit unit.
//
// Ordinary results (random words, zeros, denormals) must come out as eight
// hex digit codes, each nibble with a 0 pad bit. Infinities must show the raw
// upper half-word on the high four digits and "-InF" or " InF" on the low
// four; NaNs "nAn " on the low four. Expected words are assembled digit by
// digit from the glyph codes.
module tb_pad_unit;
  import fpu_pkg::*;

  logic [31:0]       result;
  logic [WORD_W-1:0] word;
  int checks = 0, failures = 0;

  pad_unit dut (.result, .word);

  function automatic logic [39:0] expect_word(input logic [31:0] r);
    logic [39:0] w;
    for (int i = 0; i < 8; i++) w[i*5 +: 5] = {1'b0, r[i*4 +: 4]};
    if (r[30:23] == 8'hFF && r[22:0] == 0) begin
      w[19:15] = r[31] ? 5'h11 : 5'h10;
      w[14:10] = 5'h12; w[9:5] = 5'h13; w[4:0] = 5'h0F;
    end else if (r[30:23] == 8'hFF) begin
      w[19:15] = 5'h13; w[14:10] = 5'h0A; w[9:5] = 5'h13; w[4:0] = 5'h10;
    end
    return w;
  endfunction

  task automatic try(input logic [31:0] r);
    result = r;
    #1;
    checks++;
    if (word != expect_word(r)) begin
      failures++;
      if (failures < 10) $display("FAIL %h -> %h, expected %h", r, word, expect_word(r));
    end
  endtask

  initial begin
    try(32'h00000000); try(32'h80000000); try(32'h7F800000); try(32'hFF800000);
    try(32'h7FC00000); try(32'hFFC00001); try(32'h00000001); try(32'h3F800000);
    try(32'h7F7FFFFF); try(32'h12345678);
    for (int k = 0; k < 2000; k++) begin
      logic [31:0] r;
      r = $urandom;
      if ($urandom % 4 == 0) r[30:23] = 8'hFF;
      if ($urandom % 8 == 0) r[22:0] = '0;
      try(r);
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
