// tb_fp_pkg: reference binary32 arithmetic for the testbenches.
//
// Works in double precision (real) and rounds to binary32 by hand: round to
// nearest, ties to even, results below the smallest normal number flushed to
// a signed zero, overflow to a signed infinity. This matches the rounding
// the floating-point units are specified to perform. A product of two
// binary32 numbers is exact in double precision, and so is a sum whose
// operand exponents differ by less than 30, so ref_mul and (in that range)
// ref_add give the correctly rounded binary32 result.
package tb_fp_pkg;
  import dpd_pkg::*;

  function automatic real fp32_to_real(fp32_t f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) begin
      d = {f[31], 63'd0};
    end else if (f[30:23] == 8'hFF) begin
      d = {f[31], 11'h7FF, (f[22:0] != 0) ? 52'h8_0000_0000_0000 : 52'd0};
    end else begin
      d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    end
    return $bitstoreal(d);
  endfunction

  function automatic fp32_t real_to_fp32(real r);
    logic [63:0] d;
    logic        s;
    int          ue;
    logic [24:0] m;
    logic        g, st;
    d  = $realtobits(r);
    s  = d[63];
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? FP32_QNAN : {s, 8'hFF, 23'd0};
    if (d[62:52] == 11'h000) return {s, 31'd0};
    ue = int'(d[62:52]) - 1023;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m  = m >> 1;
      ue = ue + 1;
    end
    if (ue > 127)  return {s, 8'hFF, 23'd0};
    if (ue < -126) return {s, 31'd0};
    return {s, 8'(ue + 127), m[22:0]};
  endfunction

  function automatic fp32_t ref_mul(fp32_t a, fp32_t b);
    return real_to_fp32(fp32_to_real(a) * fp32_to_real(b));
  endfunction

  function automatic fp32_t ref_add(fp32_t a, fp32_t b);
    fp32_t s;
    s = real_to_fp32(fp32_to_real(a) + fp32_to_real(b));
    // IEEE: an exact zero sum of operands of opposite sign is +0
    if (s[30:0] == 0 && a[31] != b[31]) s = FP32_ZERO;
    return s;
  endfunction

  function automatic fp32_t neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // Complex product in the order the hardware uses (4 products, 2 sums).
  function automatic cfp_t ref_cmul(cfp_t a, cfp_t b, bit conj_b);
    cfp_t  p;
    fp32_t bi;
    bi   = conj_b ? neg(b.im) : b.im;
    p.re = ref_add(ref_mul(a.re, b.re), neg(ref_mul(a.im, bi)));
    p.im = ref_add(ref_mul(a.re, bi), ref_mul(a.im, b.re));
    return p;
  endfunction

  function automatic cfp_t ref_cadd(cfp_t a, cfp_t b);
    cfp_t s;
    s.re = ref_add(a.re, b.re);
    s.im = ref_add(a.im, b.im);
    return s;
  endfunction

  // Random binary32 value with magnitude in [2^emin, 2^(emax+1)) and random sign.
  function automatic fp32_t rand_fp(int emin, int emax);
    int e;
    e = emin + int'($urandom_range(32'(emax - emin)));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

  function automatic cfp_t rand_cfp(int emin, int emax);
    cfp_t c;
    c.re = rand_fp(emin, emax);
    c.im = rand_fp(emin, emax);
    return c;
  endfunction

  // Distance in units of the last place between two finite binary32 values
  // of the same sign (large if the signs differ and the values are nonzero).
  function automatic int unsigned ulp_dist(fp32_t a, fp32_t b);
    longint ia, ib;
    ia = a[31] ? -longint'(a[30:0]) : longint'(a[30:0]);
    ib = b[31] ? -longint'(b[30:0]) : longint'(b[30:0]);
    return (ia > ib) ? 32'(ia - ib) : 32'(ib - ia);
  endfunction

endpackage
