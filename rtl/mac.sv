// mac: complex multiply-accumulate computing y(n) = sum_r theta_r * phi_r(n).
//
// A two-stage pipeline, so every MAC operation takes two cycles: in the first
// cycle the coefficient and basis function presented with `valid` are
// multiplied (one complex multiplier, registered into prod_q); in the second
// the registered product is added to the accumulator (two fp32 adders). A new
// pair can enter every cycle. `clear` empties the accumulator and the
// pipeline at the start of an input sample; it has priority over valid.
// The accumulator is read directly on `acc`; after the last valid pair it is
// final two cycles later. Reset clears everything.
module mac
  import dpd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic valid,
  input  cfp_t coeff,
  input  cfp_t basis,
  output cfp_t acc
);

  cfp_t prod, prod_q, sum;
  logic prod_vld_q;

  cplx_mul u_mul (.a(coeff), .b(basis), .conj_b(1'b0), .p(prod));

  fp32_add u_add_re (.a(acc.re), .b(prod_q.re), .s(sum.re));
  fp32_add u_add_im (.a(acc.im), .b(prod_q.im), .s(sum.im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q     <= '0;
      prod_vld_q <= 1'b0;
      acc        <= '0;
    end else if (clear) begin
      prod_vld_q <= 1'b0;
      acc        <= '0;
    end else begin
      prod_vld_q <= valid;
      if (valid) prod_q <= prod;
      if (prod_vld_q) acc <= sum;
    end
  end

endmodule
