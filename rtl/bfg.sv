// bfg: Basis Function Generator.
//
// Builds one basis function per operation and hands it to the MAC:
//   type 0  basis = the registered input sample (basis function 1),
//   type I  basis = one word of the basis memory, row i, column m (phi_i
//           delayed by m samples), read and written back in the same cycle,
//   type II basis = phi_i * phi_j * conj(phi_k); the three operands are read
//           from column M0 in three sequential cycles into registers A, B, C
//           (ctrl.ld_sel), and the fourth cycle computes the product.
// Every produced basis function is also written into column M0 of its row
// (ctrl.wr_en, ctrl.wr_row) so later entries can use it. ctrl.out_sel is the
// output select mux. The input sample is registered only when ctrl.capture is
// high (the gate in front of the generator), and ctrl.shift moves the memory
// columns one step at the same edge, so the memory terms of the previous
// sample move into M1 before the new sample's basis functions are built.
// mem_clear empties the basis memory (used when the indices table changes).
// Outputs: basis (combinational, valid in the cycle ctrl.wr_en is high).
module bfg
  import dpd_pkg::*;
#(
  parameter int unsigned N_BASIS   = 13,
  parameter int unsigned MEM_DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      mem_clear,
  input  cfp_t      in_sample,
  input  bfg_ctrl_t ctrl,
  input  field_t    row_depth [N_BASIS],
  output cfp_t      basis
);

  cfp_t x_q, opa_q, opb_q, opc_q;
  cfp_t rd_data, prod;

  basis_mem #(.N_BASIS(N_BASIS), .MEM_DEPTH(MEM_DEPTH)) u_mem (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (mem_clear),
    .shift     (ctrl.shift),
    .row_depth (row_depth),
    .rd_en     (ctrl.rd_en),
    .rd_row    (ctrl.rd_row),
    .rd_col    (ctrl.rd_col),
    .rd_data   (rd_data),
    .wr_en     (ctrl.wr_en),
    .wr_row    (ctrl.wr_row),
    .wr_data   (basis)
  );

  type2_mul u_t2 (.a(opa_q), .b(opb_q), .c(opc_q), .p(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      opa_q <= '0;
      opb_q <= '0;
      opc_q <= '0;
    end else begin
      if (ctrl.capture) x_q <= in_sample;
      if (ctrl.rd_en) begin
        case (ctrl.ld_sel)
          LD_A:    opa_q <= rd_data;
          LD_B:    opb_q <= rd_data;
          LD_C:    opc_q <= rd_data;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (ctrl.out_sel)
      OP_TYPE0: basis = x_q;
      OP_TYPE1: basis = rd_data;
      OP_TYPE2: basis = prod;
      default:  basis = '0;
    endcase
  end

endmodule
