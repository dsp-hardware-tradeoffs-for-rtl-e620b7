// cplx_mul: complex binary32 multiplier, single cycle.
//
// p = a * b, or a * conj(b) when conj_b is set, built from four fp32_mul and
// two fp32_add units working in parallel, so the whole complex product is
// combinational and fits the one-cycle-per-operation timing of the
// predistorter:
//   re = a.re*b.re - a.im*b.im'      im = a.re*b.im' + a.im*b.re
// where b.im' is b.im with its sign flipped when conj_b is set.
// The four-multiplier form is this design's choice.
module cplx_mul
  import dpd_pkg::*;
(
  input  cfp_t a,
  input  cfp_t b,
  input  logic conj_b,
  output cfp_t p
);

  fp32_t b_im;
  fp32_t rr, ii, ri, ir;
  fp32_t ii_neg;

  assign b_im   = {b.im[31] ^ conj_b, b.im[30:0]};
  assign ii_neg = {~ii[31], ii[30:0]};

  fp32_mul u_rr (.a(a.re), .b(b.re), .p(rr));
  fp32_mul u_ii (.a(a.im), .b(b_im), .p(ii));
  fp32_mul u_ri (.a(a.re), .b(b_im), .p(ri));
  fp32_mul u_ir (.a(a.im), .b(b.re), .p(ir));

  fp32_add u_re (.a(rr), .b(ii_neg), .s(p.re));
  fp32_add u_im (.a(ri), .b(ir),     .s(p.im));

endmodule
