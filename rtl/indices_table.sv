// indices_table: the basis function construction dictionary.
//
// Entry r (0-based here, basis function r+1 in the dictionary's numbering)
// tells how basis function r+1 is built: type 0 (the input sample), type I
// (fields i, m, 0: basis i delayed by m samples) or type II (fields i, j, k:
// phi_i * phi_j * conj(phi_k)). The table is written one entry per cycle
// through a simple write port (we, waddr, wdata) while the processor is idle
// and read combinationally by the controller (Next Entry).
// It also derives, for every row of the basis memory, the largest delay any
// type I entry asks of it (row_depth); the basis memory shifts only that
// many columns of the row, which is the table-driven gating of unused memory
// registers. Delays beyond MEM_DEPTH are clipped to MEM_DEPTH.
// Reset clears the table to all type 0 entries.
module indices_table
  import dpd_pkg::*;
#(
  parameter int unsigned N_BASIS   = 13,
  parameter int unsigned MEM_DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   we,
  input  field_t waddr,
  input  entry_t wdata,
  input  field_t raddr,
  output entry_t rdata,
  output field_t row_depth [N_BASIS]
);

  entry_t tbl [N_BASIS];
  localparam int unsigned RW = (N_BASIS > 1) ? $clog2(N_BASIS) : 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(N_BASIS); r++) tbl[r] <= '0;
    end else if (we && int'(waddr) < int'(N_BASIS)) begin
      tbl[RW'(waddr)] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (int'(raddr) < int'(N_BASIS)) rdata = tbl[RW'(raddr)];
  end

  always_comb begin
    for (int r = 0; r < int'(N_BASIS); r++) begin
      row_depth[r] = '0;
      for (int e = 0; e < int'(N_BASIS); e++)
        if (tbl[e].op == OP_TYPE1 && int'(tbl[e].f1) == r + 1 && tbl[e].f2 > row_depth[r])
          row_depth[r] = (int'(tbl[e].f2) > int'(MEM_DEPTH)) ? field_t'(MEM_DEPTH) : tbl[e].f2;
    end
  end

endmodule
