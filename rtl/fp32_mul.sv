// fp32_mul: single-cycle IEEE-754 binary32 multiplier.
//
// The predistorter performs each floating-point multiplication in one clock
// cycle, so this unit is purely combinational; the register that follows it
// belongs to the user. It multiplies the two 24-bit significands, normalises
// the 48-bit product by at most one place and rounds to nearest, ties to
// even. Special values: NaN in gives the quiet NaN 0x7FC00000, infinity times
// zero gives NaN, infinity otherwise propagates, and an exponent overflow
// gives a signed infinity. Subnormal inputs are read as zero and results below
// the smallest normal number are flushed to a signed zero (flush-to-zero);
// the full subnormal range is this design's simplification.
//
// Interface: a, b (binary32) -> p = a * b, combinational.
module fp32_mul
  import dpd_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);

  logic        sa, sb, sp;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_r;

  always_comb begin
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    sp = sa ^ sb;
    a_nan  = (ea == 8'hFF) && (fa != '0);
    b_nan  = (eb == 8'hFF) && (fb != '0);
    a_inf  = (ea == 8'hFF) && (fa == '0);
    b_inf  = (eb == 8'hFF) && (fb == '0);
    a_zero = (ea == 8'h00);
    b_zero = (eb == 8'h00);

    prod  = {1'b1, fa} * {1'b1, fb};
    exp_r = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_r  = exp_r + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_r + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      p = FP32_QNAN;
    else if (a_inf || b_inf)
      p = {sp, 8'hFF, 23'd0};
    else if (a_zero || b_zero)
      p = {sp, 31'd0};
    else if (exp_r >= 11'sd255)
      p = {sp, 8'hFF, 23'd0};
    else if (exp_r <= 11'sd0)
      p = {sp, 31'd0};
    else
      p = {sp, exp_r[7:0], mant_r[22:0]};
  end

endmodule
