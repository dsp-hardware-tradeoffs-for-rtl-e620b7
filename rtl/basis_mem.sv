// basis_mem: shift register file holding the basis functions and their
// delayed copies (memory terms).
//
// Rows are basis functions 1..N_BASIS (addressed 0-based here), columns are
// memory delays: column M0 holds the basis functions being built for the
// current input sample, column Mc holds the same rows c samples earlier. When
// `shift` is high every column moves one step (M0 -> M1 -> ... -> M_DEPTH)
// before the new sample is processed. A register of row r, column c >= 1 only
// takes part in the shift when some type I entry delays row r by c or more
// (row_depth[r] >= c); the others keep their value, standing in for the
// dynamic clock gating of unused memory registers (an enable is used instead
// of a gated clock). Column M0 is written through one write port; all
// columns are read through one combinational read port (Addr/RdEn of the
// memory), so a read and a write of column M0 may happen in the same cycle.
// Reset clears every register, so delayed terms of the first samples are 0;
// `clear` does the same at a clock edge. It is pulsed when the indices table
// changes, because registers that were gated under the old table hold stale
// values that the new table may read as memory terms.
// A read outside the array returns zero.
module basis_mem
  import dpd_pkg::*;
#(
  parameter int unsigned N_BASIS   = 13,
  parameter int unsigned MEM_DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   shift,
  input  field_t row_depth [N_BASIS],
  input  logic   rd_en,
  input  field_t rd_row,
  input  field_t rd_col,
  output cfp_t   rd_data,
  input  logic   wr_en,
  input  field_t wr_row,
  input  cfp_t   wr_data
);

  localparam int unsigned RW = (N_BASIS > 1) ? $clog2(N_BASIS) : 1;
  localparam int unsigned CW = (MEM_DEPTH > 0) ? $clog2(MEM_DEPTH + 1) : 1;

  cfp_t mem [N_BASIS][MEM_DEPTH+1];
  logic gate_en [N_BASIS][MEM_DEPTH+1];

  always_comb begin
    for (int r = 0; r < int'(N_BASIS); r++) begin
      gate_en[r][0] = wr_en && (int'(wr_row) == r);
      for (int c = 1; c <= int'(MEM_DEPTH); c++)
        gate_en[r][c] = shift && (int'(row_depth[r]) >= c);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(N_BASIS); r++)
        for (int c = 0; c <= int'(MEM_DEPTH); c++)
          mem[r][c] <= '0;
    end else if (clear) begin
      for (int r = 0; r < int'(N_BASIS); r++)
        for (int c = 0; c <= int'(MEM_DEPTH); c++)
          mem[r][c] <= '0;
    end else begin
      for (int r = 0; r < int'(N_BASIS); r++) begin
        if (gate_en[r][0]) mem[r][0] <= wr_data;
        for (int c = 1; c <= int'(MEM_DEPTH); c++)
          if (gate_en[r][c]) mem[r][c] <= mem[r][c-1];
      end
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_en && int'(rd_row) < int'(N_BASIS) && int'(rd_col) <= int'(MEM_DEPTH))
      rd_data = mem[RW'(rd_row)][CW'(rd_col)];
  end

endmodule
