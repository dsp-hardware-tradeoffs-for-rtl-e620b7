// fp32_add: single-cycle IEEE-754 binary32 adder.
//
// Like the multiplier, each addition of the predistorter completes in one
// clock cycle, so the unit is combinational. The operand of larger magnitude
// is kept as is; the other significand is shifted right to the common
// exponent, keeping guard, round and sticky bits. Like signs add (one place
// of renormalisation to the right), unlike signs subtract (leading-zero count
// and a shift to the left). The result is rounded to nearest, ties to even.
// An exact zero from unlike signs is +0; -0 + -0 is -0. NaN in, or the sum of
// opposite infinities, gives the quiet NaN 0x7FC00000. Subnormal inputs are
// read as zero and results below the smallest normal number become a signed
// zero (flush-to-zero, this design's simplification).
//
// Interface: a, b (binary32) -> s = a + b, combinational.
module fp32_add
  import dpd_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t s
);

  function automatic logic [4:0] lzc28(logic [27:0] v);
    logic [4:0] n;
    n = 5'd28;
    for (int i = 0; i < 28; i++)
      if (v[i]) n = 5'(27 - i);
    return n;
  endfunction

  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic        swap;
  fp32_t       big, sml;
  logic [7:0]  eb, es;
  logic [7:0]  d;
  logic [26:0] mb, ms, ms_sh;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic        sgn;
  logic signed [9:0] e;
  logic [23:0] mant;
  logic        g, st, rup;
  logic [24:0] mant_r;

  always_comb begin
    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != '0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != '0);
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == '0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == '0);
    a_zero = (a[30:23] == 8'h00);
    b_zero = (b[30:23] == 8'h00);

    swap = (b[30:0] > a[30:0]);
    big  = swap ? b : a;
    sml  = swap ? a : b;
    eb   = big[30:23];
    es   = sml[30:23];
    d    = eb - es;
    mb   = {1'b1, big[22:0], 3'b000};
    ms   = {1'b1, sml[22:0], 3'b000};
    if (d >= 8'd27)
      ms_sh = 27'd1;                       // whole operand collapses into sticky
    else begin
      ms_sh = ms >> d;
      ms_sh[0] = ms_sh[0] | ((ms & ((27'd1 << d) - 27'd1)) != '0);
    end

    sgn = big[31];
    lz  = '0;
    e   = 10'(signed'({2'b00, eb}));
    if (big[31] == sml[31]) begin
      sum = {1'b0, mb} + {1'b0, ms_sh};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e   = e + 10'sd1;
      end
    end else begin
      sum = {1'b0, mb} - {1'b0, ms_sh};
      lz  = lzc28(sum);                    // >= 1 because sum[27] is 0
      if (sum != '0) begin
        sum = sum << (lz - 5'd1);
        e   = e - 10'(signed'({5'd0, lz})) + 10'sd1;
      end
    end

    mant = sum[26:3];
    g    = sum[2];
    st   = sum[1] | sum[0];
    rup  = g && (st || mant[0]);
    mant_r = {1'b0, mant} + {24'd0, rup};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e      = e + 10'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31])))
      s = FP32_QNAN;
    else if (a_inf)
      s = a;
    else if (b_inf)
      s = b;
    else if (a_zero && b_zero)
      s = {a[31] & b[31], 31'd0};
    else if (a_zero)
      s = b;
    else if (b_zero)
      s = a;
    else if (sum == '0)
      s = FP32_ZERO;
    else if (e >= 10'sd255)
      s = {sgn, 8'hFF, 23'd0};
    else if (e <= 10'sd0)
      s = {sgn, 31'd0};
    else
      s = {sgn, e[7:0], mant_r[22:0]};
  end

endmodule
