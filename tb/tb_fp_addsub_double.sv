// tb_fp_addsub_double: the adder/subtractor built for double precision
// (EXP_W = 11, FRAC_W = 52).
//
// The reference is the simulator's own double-precision arithmetic, which
// rounds to nearest-even and keeps denormals, so every result must match bit
// for bit (NaNs by class). Random operands are biased towards close
// exponents, the denormal range and the overflow range; a directed set adds
// zeros, infinities, NaNs and the smallest and largest numbers. One operation
// is issued per cycle and the 4-cycle latency is checked.
module tb_fp_addsub_double;
  localparam int LAT = 4;
  localparam int NRAND = 20000;
  localparam int NDIR = 12 * 12 * 2;
  localparam int NOPS = NDIR + NRAND;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        in_valid = 1'b0;
  logic        sub = 1'b0;
  logic [63:0] a = '0, b = '0;
  logic        out_valid;
  logic [63:0] result;
  int checks = 0, failures = 0, tail_fail = 0;
  int cycle = 0;
  int nin = 0, nout = 0;

  fp_addsub #(.EXP_W(11), .FRAC_W(52)) dut (.clk, .rst, .in_valid, .sub, .a, .b,
                                            .out_valid, .result);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  logic [63:0] ta [NOPS];
  logic [63:0] tb_ [NOPS];
  logic        ts [NOPS];
  logic [63:0] texp [NOPS];
  int          tcyc [NOPS];

  function automatic logic is_nan(input logic [63:0] x);
    return (x[62:52] == 11'h7FF) && (x[51:0] != 0);
  endfunction

  function automatic logic [63:0] ref_op(input logic [63:0] x, input logic [63:0] y,
                                         input logic s);
    real rr;
    if (is_nan(x) || is_nan(y)) return 64'h7FF8000000000000;
    rr = s ? $bitstoreal(x) - $bitstoreal(y) : $bitstoreal(x) + $bitstoreal(y);
    if (rr != rr) return 64'h7FF8000000000000;
    return $realtobits(rr);
  endfunction

  function automatic logic [63:0] rnd_fp(input int base_exp, input int spread);
    logic [63:0] r;
    int ex;
    r  = {$urandom, $urandom};
    ex = base_exp + int'($urandom % (2 * spread + 1)) - spread;
    if (ex < 0) ex = 0;
    if (ex > 2047) ex = 2047;
    r[62:52] = 11'(ex);
    if (($urandom % 8) == 0) r[51:0] = r[51:0] & 52'hFFFFFF0000000;
    return r;
  endfunction

  localparam logic [63:0] DIRECTED [12] = '{
    64'h0000000000000000, 64'h8000000000000000, 64'h3FF0000000000000,
    64'hBFF0000000000000, 64'h7FF0000000000000, 64'hFFF0000000000000,
    64'h7FF8000000000000, 64'h0000000000000001, 64'h000FFFFFFFFFFFFF,
    64'h0010000000000000, 64'h7FEFFFFFFFFFFFFF, 64'h3CA0000000000000
  };

  always_ff @(posedge clk) begin
    if (rst || nin >= NOPS) begin
      in_valid <= 1'b0;
    end else begin
      in_valid  <= 1'b1;
      a         <= ta[nin];
      b         <= tb_[nin];
      sub       <= ts[nin];
      tcyc[nin] <= cycle;
      nin       <= nin + 1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst && out_valid) begin
      checks <= checks + 2;
      nout   <= nout + 1;
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

  initial begin
    int k;
    k = 0;
    foreach (DIRECTED[i]) foreach (DIRECTED[j]) for (int s = 0; s < 2; s++) begin
      ta[k] = DIRECTED[i]; tb_[k] = DIRECTED[j]; ts[k] = 1'(s);
      k++;
    end
    for (int r = 0; r < NRAND; r++) begin
      int be, sp;
      be = int'($urandom % 2048);
      sp = ($urandom % 2 == 0) ? 2 : 60;
      if (($urandom % 10) == 0) be = int'($urandom % 3);
      if (($urandom % 10) == 0) be = 2045;
      ta[k] = rnd_fp(be, sp); tb_[k] = rnd_fp(be, sp); ts[k] = 1'($urandom);
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
