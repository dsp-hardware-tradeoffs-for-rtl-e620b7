// dpd_top: serial binary32 digital predistorter for a pruned Volterra model.
//
// Computes, for every input sample x(n), y(n) = sum_{r=1..N_BASIS}
// theta_r * phi_r(n), where the basis functions phi_r are built at run time
// from a dictionary (the indices table): phi_1 = x(n) (type 0), type I entries
// delay an earlier basis function by m samples, type II entries multiply
// three earlier basis functions, the third conjugated. Any pruned Volterra
// model that can be written this way (BAPS, memory polynomial, GMP, causal
// terms only) runs on the same hardware by loading another table.
//
// Blocks: dpd_ctrl (handshake and sequencing), indices_table, coeff_array,
// bfg (basis function generator with the shift-register basis memory and the
// type II multiplier) and mac. The indices table and the coefficients are
// loaded through their write ports while request_sample is high and no
// sample is being processed. Writing the table also clears the basis memory,
// so the memory terms of the new table start from zero as after reset.
//
// Handshake: put x(n) on in_sample and raise sample_ready; it is taken at a
// rising edge where request_sample is high, after which request_sample falls.
// When request_sample and result_ready rise again, out_sample holds y(n)
// (out_sample is forced to zero while result_ready is low). Processing takes
// 3 + n0 + n1 + 4*n2 cycles per sample with n0, n1, n2 the number of type 0,
// I and II entries. Defaults: 13 basis functions as in the main
// configurations; a memory depth of 4 is this design's choice.
module dpd_top
  import dpd_pkg::*;
#(
  parameter int unsigned N_BASIS   = 13,
  parameter int unsigned MEM_DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // sample interface
  input  logic   sample_ready,
  input  cfp_t   in_sample,
  output logic   request_sample,
  output logic   result_ready,
  output cfp_t   out_sample,
  // indices table load
  input  logic   tbl_we,
  input  field_t tbl_waddr,
  input  entry_t tbl_wdata,
  // coefficient load
  input  logic   coef_we,
  input  field_t coef_waddr,
  input  cfp_t   coef_wdata
);

  field_t    entry_idx;
  entry_t    entry;
  field_t    row_depth [N_BASIS];
  cfp_t      coeff, basis, acc;
  bfg_ctrl_t bctl;
  logic      mac_clear, mac_valid;

  initial begin
    assert (N_BASIS >= 1 && N_BASIS < 256) else $fatal(1, "N_BASIS must fit an 8-bit field");
    assert (MEM_DEPTH < 256) else $fatal(1, "MEM_DEPTH must fit an 8-bit field");
  end

  dpd_ctrl #(.N_BASIS(N_BASIS), .MEM_DEPTH(MEM_DEPTH)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .sample_ready   (sample_ready),
    .request_sample (request_sample),
    .result_ready   (result_ready),
    .entry_idx      (entry_idx),
    .entry          (entry),
    .bctl           (bctl),
    .mac_clear      (mac_clear),
    .mac_valid      (mac_valid)
  );

  indices_table #(.N_BASIS(N_BASIS), .MEM_DEPTH(MEM_DEPTH)) u_tbl (
    .clk       (clk),
    .rst_n     (rst_n),
    .we        (tbl_we),
    .waddr     (tbl_waddr),
    .wdata     (tbl_wdata),
    .raddr     (entry_idx),
    .rdata     (entry),
    .row_depth (row_depth)
  );

  coeff_array #(.N_BASIS(N_BASIS)) u_coef (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (coef_we),
    .waddr (coef_waddr),
    .wdata (coef_wdata),
    .raddr (entry_idx),
    .rdata (coeff)
  );

  bfg #(.N_BASIS(N_BASIS), .MEM_DEPTH(MEM_DEPTH)) u_bfg (
    .clk       (clk),
    .rst_n     (rst_n),
    .mem_clear (tbl_we),
    .in_sample (in_sample),
    .ctrl      (bctl),
    .row_depth (row_depth),
    .basis     (basis)
  );

  mac u_mac (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (mac_clear),
    .valid (mac_valid),
    .coeff (coeff),
    .basis (basis),
    .acc   (acc)
  );

  // Result Ready gates the output sample.
  assign out_sample = result_ready ? acc : '0;

  // Table and coefficients may only change between samples.
  a_load_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (tbl_we || coef_we) |-> request_sample)
    else $error("table or coefficient write while a sample is processed");

endmodule
