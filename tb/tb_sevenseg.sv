// tb_sevenseg: self-checking test of the display driver.
//
// The expected glyphs are written here as lists of lit segment letters
// ("abcdef" for 0 and so on) and turned into active-low patterns, so the
// check does not reuse the design's table. With the scan divider cut to
// DIV = 4 the test checks that exactly one anode is low at a time, that the
// digits are scanned 0, 1, 2, 3 in turn, that each stays lit for DIV clocks
// (the scan rate), that the decimal point stays dark and that the lit digit
// shows the glyph of its code, for all 32 codes.
module tb_sevenseg;
  import fpu_pkg::*;
  localparam int DIV = 4;

  logic              clk = 1'b0;
  logic              rst;
  logic [SCAN_W-1:0] digits;
  logic [7:0]        seg;
  logic [3:0]        an;
  int checks = 0, failures = 0;

  sevenseg #(.DIV(DIV)) dut (.clk, .rst, .digits, .seg, .an);

  always #5 clk = ~clk;

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

  initial begin
    int prev, run, lit;
    digits = '0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    prev = -1; run = 0;
    for (int k = 0; k < 800; k++) begin
      if (k % 40 == 0) begin
        for (int d = 0; d < 4; d++) digits[d*5 +: 5] = 5'((k / 40 * 4 + d) % 32);
      end
      @(negedge clk);
      lit = -1;
      for (int d = 0; d < 4; d++) if (an == ~(4'b1 << d)) lit = d;
      checks++;
      if (lit < 0) begin
        failures++;
        $display("FAIL anodes %b not one-hot", an);
        continue;
      end
      // the segments are registered: skip the cycle right after a change
      if (k % 40 != 0) checks++;
      if (k % 40 != 0 && seg != pattern(digits[lit*5 +: 5])) begin
        failures++;
        if (failures < 10) $display("FAIL digit %0d code %h: seg %b expected %b", lit,
                                    digits[lit*5 +: 5], seg, pattern(digits[lit*5 +: 5]));
      end
      if (lit == prev) run++;
      else begin
        if (prev >= 0) begin
          checks += 2;
          if (lit != (prev + 1) % 4) begin failures++; $display("FAIL scan order %0d->%0d", prev, lit); end
          if (run != DIV && k > 50) begin failures++; $display("FAIL digit lit %0d clocks", run); end
        end
        prev = lit; run = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
