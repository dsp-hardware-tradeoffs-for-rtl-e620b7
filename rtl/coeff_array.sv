// coeff_array: the complex coefficients theta_r of the pruned Volterra model.
//
// One complex binary32 coefficient per basis function, written through a
// write port (we, waddr, wdata) while the processor is idle and read
// combinationally at the entry index the controller steps through (Next
// Entry), so the coefficient reaches the MAC together with its basis
// function. Reset clears all coefficients to zero.
module coeff_array
  import dpd_pkg::*;
#(
  parameter int unsigned N_BASIS = 13
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   we,
  input  field_t waddr,
  input  cfp_t   wdata,
  input  field_t raddr,
  output cfp_t   rdata
);

  cfp_t coef [N_BASIS];
  localparam int unsigned RW = (N_BASIS > 1) ? $clog2(N_BASIS) : 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(N_BASIS); r++) coef[r] <= '0;
    end else if (we && int'(waddr) < int'(N_BASIS)) begin
      coef[RW'(waddr)] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (int'(raddr) < int'(N_BASIS)) rdata = coef[RW'(raddr)];
  end

endmodule
