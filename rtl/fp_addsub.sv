// fp_addsub: IEEE 754 floating-point adder/subtractor, single precision by
// default.
//
// The operation follows the classic flow of the source design: compare the
// exponents, shift the significand of the smaller operand right by their
// difference so both share one exponent, check the signs (equal effective
// signs add the significands, different ones subtract them), then normalise
// and round. Subtraction is addition with the sign of `b` inverted. Rounding
// is round-to-nearest-even with guard, round and sticky bits; denormal inputs
// and outputs are handled in full (gradual underflow), an overflow gives
// infinity, and infinities and NaNs follow Table-1 semantics of the standard
// (inf - inf is NaN). The rounding mode, the canonical quiet NaN returned for
// every NaN result and the split into four register stages are this
// design's own choices; the source gives the flow, not its timing. EXP_W and
// FRAC_W select the format (8/23 single, 11/52 double).
//
// Stages: 1 unpack, classify, order the operands by magnitude;
//         2 align the smaller significand (sticky collects shifted-out bits);
//         3 add or subtract;
//         4 normalise (leading-zero count, limited by the denormal floor),
//           round, pack.
// Timing: fully pipelined, one operation per cycle; `out_valid` and `result`
// follow `in_valid` by exactly 4 cycles. `result` holds its value until the
// next valid result. Synchronous active-high reset clears the valid bits and
// the result.
module fp_addsub #(
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned FRAC_W = 23
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic                    sub,        // 1: a - b, 0: a + b
  input  logic [EXP_W+FRAC_W:0]   a,
  input  logic [EXP_W+FRAC_W:0]   b,
  output logic                    out_valid,
  output logic [EXP_W+FRAC_W:0]   result
);
  localparam int unsigned P   = FRAC_W + 1;          // significand bits
  localparam int unsigned XW  = P + 3;               // with guard, round, sticky
  localparam int unsigned SW  = $clog2(XW + 1);      // shift-amount width
  localparam logic [EXP_W-1:0] EMAX = '1;
  localparam logic [EXP_W+FRAC_W:0] QNAN = {1'b0, EMAX, 1'b1, {(FRAC_W-1){1'b0}}};

  // ---------------- stage 1: unpack and order ----------------
  logic              sa, sb;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic              a_nan, b_nan, a_inf, b_inf, swap;

  assign sa = a[EXP_W+FRAC_W];
  assign sb = b[EXP_W+FRAC_W] ^ sub;
  assign ea = a[FRAC_W +: EXP_W];
  assign eb = b[FRAC_W +: EXP_W];
  assign fa = a[FRAC_W-1:0];
  assign fb = b[FRAC_W-1:0];
  assign a_nan = (ea == EMAX) && (fa != '0);
  assign b_nan = (eb == EMAX) && (fb != '0);
  assign a_inf = (ea == EMAX) && (fa == '0);
  assign b_inf = (eb == EMAX) && (fb == '0);
  assign swap  = {eb, fb} > {ea, fa};

  logic             s1_v, s1_nan, s1_inf, s1_inf_s, s1_sl, s1_ss;
  logic [EXP_W-1:0] s1_el, s1_diff;
  logic [P-1:0]     s1_ml, s1_ms;

  always_ff @(posedge clk) begin
    logic [EXP_W-1:0] exa, exb;
    exa = (ea == '0) ? EXP_W'(1) : ea;     // denormals share exponent 1
    exb = (eb == '0) ? EXP_W'(1) : eb;
    if (rst) begin
      s1_v <= 1'b0;
    end else begin
      s1_v <= in_valid;
    end
    s1_nan   <= a_nan | b_nan | (a_inf & b_inf & (sa != sb));
    s1_inf   <= a_inf | b_inf;
    s1_inf_s <= a_inf ? sa : sb;
    if (swap) begin
      s1_sl   <= sb;            s1_ss <= sa;
      s1_el   <= exb;
      s1_diff <= exb - exa;
      s1_ml   <= {eb != '0, fb};
      s1_ms   <= {ea != '0, fa};
    end else begin
      s1_sl   <= sa;            s1_ss <= sb;
      s1_el   <= exa;
      s1_diff <= exa - exb;
      s1_ml   <= {ea != '0, fa};
      s1_ms   <= {eb != '0, fb};
    end
  end

  // ---------------- stage 2: align ----------------
  logic             s2_v, s2_nan, s2_inf, s2_inf_s, s2_sl, s2_ss;
  logic [EXP_W-1:0] s2_el;
  logic [XW-1:0]    s2_xl, s2_xs;

  always_ff @(posedge clk) begin
    logic [SW-1:0]   sh;
    logic [P+XW-1:0] ext;
    sh  = (s1_diff > EXP_W'(XW)) ? SW'(XW) : SW'(s1_diff);
    ext = {s1_ms, {XW{1'b0}}} >> sh;
    if (rst) s2_v <= 1'b0;
    else     s2_v <= s1_v;
    s2_nan   <= s1_nan;
    s2_inf   <= s1_inf;
    s2_inf_s <= s1_inf_s;
    s2_sl    <= s1_sl;
    s2_ss    <= s1_ss;
    s2_el    <= s1_el;
    s2_xl    <= {s1_ml, 3'b000};
    s2_xs    <= {ext[P+XW-1:P+1], ext[P] | (|ext[P-1:0])};
  end

  // ---------------- stage 3: add / subtract ----------------
  logic             s3_v, s3_nan, s3_inf, s3_inf_s, s3_sign, s3_zsign;
  logic [EXP_W-1:0] s3_el;
  logic [XW:0]      s3_sum;

  always_ff @(posedge clk) begin
    if (rst) s3_v <= 1'b0;
    else     s3_v <= s2_v;
    s3_nan   <= s2_nan;
    s3_inf   <= s2_inf;
    s3_inf_s <= s2_inf_s;
    s3_sign  <= s2_sl;
    s3_zsign <= s2_sl & s2_ss;      // exact zero is -0 only for (-x) + (-y)
    s3_el    <= s2_el;
    if (s2_sl != s2_ss) s3_sum <= {1'b0, s2_xl} - {1'b0, s2_xs};
    else                s3_sum <= {1'b0, s2_xl} + {1'b0, s2_xs};
  end

  // ---------------- stage 4: normalise, round, pack ----------------
  function automatic logic [SW-1:0] lzc(input logic [XW-1:0] v);
    lzc = SW'(XW);
    for (int i = 0; i < XW; i++)
      if (v[i]) lzc = SW'(XW - 1 - i);
  endfunction

  logic [XW-1:0]           n;
  logic [EXP_W:0]          e;
  logic [SW-1:0]           lz, shl;
  logic [EXP_W+FRAC_W-1:0] packed_w;
  logic                    rnd;
  logic [EXP_W+FRAC_W:0]   res_c;

  always_comb begin
    lz  = lzc(s3_sum[XW-1:0]);
    shl = '0;
    if (s3_sum[XW]) begin
      n = {s3_sum[XW:2], s3_sum[1] | s3_sum[0]};
      e = {1'b0, s3_el} + 1'b1;
    end else begin
      // never shift below the denormal exponent 1
      shl = ((EXP_W+1)'(lz) > {1'b0, s3_el} - 1'b1) ? SW'(s3_el - 1'b1) : lz;
      n   = s3_sum[XW-1:0] << shl;
      e   = {1'b0, s3_el} - (EXP_W+1)'(shl);
    end
    rnd      = n[2] & (n[1] | n[0] | n[3]);
    packed_w = {(n[XW-1] ? e[EXP_W-1:0] : EXP_W'(0)), n[XW-2:3]} + (EXP_W+FRAC_W)'(rnd);
    if (s3_nan)
      res_c = QNAN;
    else if (s3_inf)
      res_c = {s3_inf_s, EMAX, {FRAC_W{1'b0}}};
    else if (s3_sum == '0)
      res_c = {s3_zsign, {(EXP_W+FRAC_W){1'b0}}};
    else if (e >= {1'b0, EMAX})
      res_c = {s3_sign, EMAX, {FRAC_W{1'b0}}};
    else
      res_c = {s3_sign, packed_w};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= s3_v;
      if (s3_v) result <= res_c;
    end
  end
endmodule
