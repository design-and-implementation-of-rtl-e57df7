// tb_fp_addsub: self-checking test of the single-precision adder/subtractor.
//
// The reference is the simulator's double-precision arithmetic: both
// operands are widened exactly to double precision, added or subtracted there,
// and the double is rounded back to single precision by an integer routine
// on its bit pattern. Double precision has more than twice
// the significand bits of single precision, so this double rounding gives the
// correctly rounded (round-to-nearest-even) single-precision result. NaN
// results are compared by class only. The stimulus mixes directed special
// cases (zeros, denormals, infinities, NaNs, overflow, exact cancellation)
// with random operands biased towards close exponents, issuing one operation
// per cycle; the 4-cycle latency is checked on every result.
module tb_fp_addsub;
  localparam int LAT = 4;
  localparam int NRAND = 20000;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        in_valid = 1'b0;
  logic        sub = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic        out_valid;
  logic [31:0] result;

  int checks = 0, failures = 0;
  int cycle = 0;

  fp_addsub dut (.clk, .rst, .in_valid, .sub, .a, .b, .out_valid, .result);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;


  function automatic logic is_nan(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 0);
  endfunction

  // exact single -> double widening
  function automatic real to_real(input logic [31:0] x);
    real m;
    int  ex;
    m  = real'(x[22:0]) + ((x[30:23] != 0) ? 8388608.0 : 0.0);
    ex = (x[30:23] == 0) ? 1 : int'(x[30:23]);
    m  = m * (2.0 ** (ex - 150));
    return x[31] ? -m : m;
  endfunction

  // double -> single with round-to-nearest-even, written on the raw bits
  function automatic logic [31:0] to_single(input real r);
    logic [63:0] d;
    logic [52:0] sig;
    logic [63:0] q, rem, half;
    int e, sh;
    logic [31:0] bits;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC00000 : {d[63], 31'h7F800000};
    if (d[62:0] == 0) return {d[63], 31'h0};
    sig = {1'b1, d[51:0]};
    e   = int'(d[62:52]) - 1023;
    if (e > 128) return {d[63], 31'h7F800000};
    sh  = (e >= -126) ? 29 : 29 + (-126 - e);
    if (sh > 60) return {d[63], 31'h0};
    q    = 64'(sig) >> sh;
    rem  = 64'(sig) & ((64'd1 << sh) - 1);
    half = 64'd1 << (sh - 1);
    if (rem > half || (rem == half && q[0])) q = q + 1;
    if (e >= -126) begin
      if (64'(e + 126) + (q >> 23) >= 64'd255) return {d[63], 31'h7F800000};
      bits = 32'((64'(e + 126) << 23) + q);
    end else begin
      bits = 32'(q);
    end
    return {d[63], bits[30:0]};
  endfunction

  function automatic logic [31:0] ref_op(input logic [31:0] x, input logic [31:0] y,
                                         input logic s);
    real rx, ry, rr;
    if (is_nan(x) || is_nan(y)) return 32'h7FC00000;
    if (x[30:23] == 8'hFF && y[30:23] == 8'hFF)
      return ((x[31] ^ y[31] ^ s) != 0) ? 32'h7FC00000 : x;
    if (x[30:23] == 8'hFF) return x;
    if (y[30:23] == 8'hFF) return {y[31] ^ s, y[30:0]};
    rx = to_real(x);
    ry = to_real(y);
    rr = s ? rx - ry : rx + ry;
    // IEEE: an exact zero sum is +0 unless both addends are -0
    if (rr == 0.0) return ((x[31] & (y[31] ^ s)) != 0) ? 32'h80000000 : 32'h0;
    return to_single(rr);
  endfunction

  // stimulus table, filled before reset is released
  localparam int NDIR = 24 * 24 * 2;
  localparam int NOPS = NDIR + NRAND;
  logic [31:0] ta [NOPS];
  logic [31:0] tb_ [NOPS];
  logic        ts [NOPS];
  logic        tgap [NOPS];
  logic [31:0] texp [NOPS];
  int          tcyc [NOPS];
  int          nin = 0, nout = 0;
  int          tail_fail = 0;
  logic        gap = 1'b0;

  // driver: one operation per cycle, with an idle cycle where tgap is set
  always_ff @(posedge clk) begin
    if (rst || nin >= NOPS) begin
      in_valid <= 1'b0;
    end else if (tgap[nin] && !gap) begin
      in_valid <= 1'b0;
      gap      <= 1'b1;
    end else begin
      gap        <= 1'b0;
      in_valid   <= 1'b1;
      a          <= ta[nin];
      b          <= tb_[nin];
      sub        <= ts[nin];
      tcyc[nin]  <= cycle;
      nin        <= nin + 1;
    end
  end

  // checker
  always_ff @(posedge clk) begin
    if (!rst && out_valid) begin
      checks   <= checks + 2;
      nout     <= nout + 1;
      if ((is_nan(texp[nout]) ? !is_nan(result) : (result != texp[nout])) ||
          (cycle - tcyc[nout] != LAT + 1)) begin
        failures <= failures + 1;
        if (failures < 20)
          $display("FAIL %h %s %h: got %h expected %h, latency %0d", ta[nout],
                   ts[nout] ? "-" : "+", tb_[nout], result, texp[nout],
                   cycle - tcyc[nout] - 1);
      end
    end
  end

  function automatic logic [31:0] rnd_fp(input logic [7:0] base_exp, input int spread);
    logic [31:0] r;
    int ex;
    r  = $urandom;
    ex = int'(base_exp) + ($urandom % (2 * spread + 1)) - spread;
    if (ex < 0) ex = 0;
    if (ex > 255) ex = 255;
    if (($urandom % 50) == 0) ex = 255;
    r[30:23] = 8'(ex);
    if (($urandom % 8) == 0) r[22:0] = r[22:0] & 23'h7FF000;  // more exact cases
    return r;
  endfunction

  localparam logic [31:0] DIRECTED [24] = '{
    32'h00000000, 32'h80000000, 32'h3F800000, 32'hBF800000,
    32'h7F800000, 32'hFF800000, 32'h7FC00000, 32'h7F800001,
    32'h00000001, 32'h80000001, 32'h007FFFFF, 32'h00800000,
    32'h80800000, 32'h7F7FFFFF, 32'hFF7FFFFF, 32'h33800000,
    32'h3F800001, 32'h4B7FFFFF, 32'h34000000, 32'h00400000,
    32'h40490FDB, 32'hC02DF854, 32'h7F000000, 32'h00FFFFFF
  };

  initial begin
    int k;
    k = 0;
    foreach (DIRECTED[i]) foreach (DIRECTED[j]) for (int s = 0; s < 2; s++) begin
      ta[k] = DIRECTED[i]; tb_[k] = DIRECTED[j]; ts[k] = 1'(s); tgap[k] = 1'b0;
      k++;
    end
    for (int r = 0; r < NRAND; r++) begin
      logic [7:0] be;
      int sp;
      be = 8'($urandom);
      sp = ($urandom % 2 == 0) ? 2 : 30;
      if (($urandom % 10) == 0) be = 8'($urandom % 3);       // denormal region
      if (($urandom % 10) == 0) be = 8'd253;                 // overflow region
      ta[k] = rnd_fp(be, sp); tb_[k] = rnd_fp(be, sp); ts[k] = 1'($urandom);
      tgap[k] = (($urandom % 16) == 0);                       // idle gaps
      k++;
    end
    for (int i = 0; i < NOPS; i++) texp[i] = ref_op(ta[i], tb_[i], ts[i]);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (nin == NOPS);
    repeat (LAT + 3) @(posedge clk);
    if (nout != NOPS) begin
      tail_fail = 1;
      $display("FAIL %0d results never came out", NOPS - nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + tail_fail);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
