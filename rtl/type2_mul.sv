// type2_mul: the type II operation of the basis function generator.
//
// Computes phi_i * phi_j * conj(phi_k), the three-input multiplier with one
// conjugated input of the basis function generator. Two complex multipliers
// are chained: first a*b, then that product times conj(c). The result is
// available in the same cycle as the operands (one compute cycle per type II
// operation); the operands come from registers loaded by three sequential
// memory reads. Rounding happens after each complex multiplication, so the
// result equals round(round(a*b) * conj(c)) in binary32.
module type2_mul
  import dpd_pkg::*;
(
  input  cfp_t a,   // phi_i
  input  cfp_t b,   // phi_j
  input  cfp_t c,   // phi_k, conjugated
  output cfp_t p
);

  cfp_t ab;

  cplx_mul u_ab  (.a(a),  .b(b), .conj_b(1'b0), .p(ab));
  cplx_mul u_abc (.a(ab), .b(c), .conj_b(1'b1), .p(p));

endmodule
