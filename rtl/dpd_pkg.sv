// dpd_pkg: types and constants shared by the pruned-Volterra predistorter.
//
// Samples, basis functions and coefficients are complex numbers made of two
// IEEE-754 binary32 words (real and imaginary part), as in a 32-bit
// floating-point predistorter. A basis function is built by one of three
// operations: type 0 (the input sample itself), type I (a delayed copy of an
// earlier basis function) and type II (product of three earlier basis
// functions, the third conjugated). An entry of the indices table holds three
// fields and the type: for type II the fields are i, j, k; for type I they are
// i, the delay m and 0. Field numbers count basis functions from 1, as the
// dictionary does. The 8-bit field width and the 2-bit type code are choices
// of this design; they allow up to 255 basis functions and delays.
package dpd_pkg;

  localparam int unsigned FIELD_W = 8;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cfp_t;

  typedef enum logic [1:0] {
    OP_TYPE0 = 2'd0,   // basis = input sample
    OP_TYPE1 = 2'd1,   // basis = phi_i delayed by m samples
    OP_TYPE2 = 2'd2    // basis = phi_i * phi_j * conj(phi_k)
  } op_type_e;

  typedef logic [FIELD_W-1:0] field_t;

  // One dictionary entry: field order as printed in the table (i, j|m, k|0, type).
  typedef struct packed {
    field_t   f1;
    field_t   f2;
    field_t   f3;
    op_type_e op;
  } entry_t;

  // Type II operand register selected for loading by a memory read.
  typedef enum logic [1:0] {
    LD_NONE = 2'd0,
    LD_A    = 2'd1,
    LD_B    = 2'd2,
    LD_C    = 2'd3
  } ld_sel_e;

  // Control bundle from the controller to the basis function generator.
  typedef struct packed {
    logic     capture;   // Get Input Sample: register the input sample
    logic     shift;     // shift memory columns M0 -> M1 -> ... by one step
    logic     rd_en;     // read one basis memory word
    field_t   rd_row;    // row (0-based basis index)
    field_t   rd_col;    // column (memory delay)
    ld_sel_e  ld_sel;    // type II operand register to load from the read
    logic     wr_en;     // write the produced basis function into column M0
    field_t   wr_row;    // row written (0-based basis index)
    op_type_e out_sel;   // output select of the BFG
  } bfg_ctrl_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;
  localparam fp32_t FP32_QNAN = 32'h7FC0_0000;

  function automatic cfp_t cconj(cfp_t a);
    cfp_t r;
    r.re = a.re;
    r.im = {~a.im[31], a.im[30:0]};
    return r;
  endfunction

endpackage
