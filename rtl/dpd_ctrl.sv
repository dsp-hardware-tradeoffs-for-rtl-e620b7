// dpd_ctrl: controller of the predistorter.
//
// Handshake: request_sample is high while the processor waits for an input
// sample. A sample is registered (Get Input Sample) on a rising clock edge at
// which sample_ready and request_sample are both high; request_sample then
// falls and the sample is processed. When the output is available
// result_ready rises (it gates the output sample) and request_sample rises
// again. If sample_ready stays high the next sample is taken at once; if it
// is left low the processor waits.
//
// Processing of one sample (states): S_IDLE (capture: shift the memory
// columns, clear the MAC) -> S_EXEC, stepping through entries 0..N_BASIS-1
// of the indices table (Next Entry; the same index selects the coefficient)
// and setting the operation type of each -> S_DRAIN (second MAC cycle of the
// last basis function) -> S_DONE (result ready) -> S_IDLE.
// Cycles per entry: type 0 and type I one cycle (one memory access or none);
// type II four cycles (three memory reads of phi_i, phi_j, phi_k, then one
// compute cycle), i.e. two more memory accesses and three more cycles than a
// type I operation. A sample therefore takes
//   3 + n0 + n1 + 4*n2 cycles from capture to the next possible capture,
// with n0, n1, n2 the number of type 0, I and II entries; result_ready rises
// 2 + n0 + n1 + 4*n2 cycles after the capture edge.
// The exact state encoding and the one-cycle S_DONE are this design's
// choices. An entry whose fields point outside the table is an error
// (assertion); such a read returns zero.
module dpd_ctrl
  import dpd_pkg::*;
#(
  parameter int unsigned N_BASIS   = 13,
  parameter int unsigned MEM_DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sample_ready,
  output logic      request_sample,
  output logic      result_ready,
  output field_t    entry_idx,
  input  entry_t    entry,
  output bfg_ctrl_t bctl,
  output logic      mac_clear,
  output logic      mac_valid
);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_DRAIN, S_DONE} state_e;

  state_e     state_q;
  field_t     idx_q;
  logic [1:0] phase_q;
  logic       last_entry, op_done, accept;

  assign request_sample = (state_q == S_IDLE);
  assign accept         = request_sample && sample_ready;
  assign entry_idx      = idx_q;
  assign last_entry     = (int'(idx_q) == int'(N_BASIS) - 1);

  // Decode of the current entry (Set Operation Type).
  always_comb begin
    bctl      = '0;
    bctl.out_sel = entry.op;
    mac_clear = accept;
    mac_valid = 1'b0;
    op_done   = 1'b0;
    bctl.capture = accept;
    bctl.shift   = accept;
    if (state_q == S_EXEC) begin
      unique case (entry.op)
        OP_TYPE0: begin
          op_done = 1'b1;
        end
        OP_TYPE1: begin
          bctl.rd_en  = 1'b1;
          bctl.rd_row = entry.f1 - field_t'(1);
          bctl.rd_col = entry.f2;
          op_done     = 1'b1;
        end
        OP_TYPE2: begin
          if (phase_q == 2'd3) begin
            op_done = 1'b1;
          end else begin
            bctl.rd_en  = 1'b1;
            bctl.rd_col = '0;
            unique case (phase_q)
              2'd0: begin bctl.rd_row = entry.f1 - field_t'(1); bctl.ld_sel = LD_A; end
              2'd1: begin bctl.rd_row = entry.f2 - field_t'(1); bctl.ld_sel = LD_B; end
              default: begin bctl.rd_row = entry.f3 - field_t'(1); bctl.ld_sel = LD_C; end
            endcase
          end
        end
        default: op_done = 1'b1;   // unused code: skipped, writes zero
      endcase
      bctl.wr_en  = op_done;
      bctl.wr_row = idx_q;
      mac_valid   = op_done;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      idx_q        <= '0;
      phase_q      <= '0;
      result_ready <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (accept) begin
          state_q      <= S_EXEC;
          idx_q        <= '0;
          phase_q      <= '0;
          result_ready <= 1'b0;
        end
        S_EXEC: begin
          if (op_done) begin
            phase_q <= '0;
            if (last_entry) state_q <= S_DRAIN;
            else            idx_q   <= idx_q + field_t'(1);
          end else begin
            phase_q <= phase_q + 2'd1;
          end
        end
        S_DRAIN: state_q <= S_DONE;
        S_DONE: begin
          state_q      <= S_IDLE;
          result_ready <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Dictionary rules: type I reads a defined row within the memory depth,
  // type II reads three defined rows of column M0.
  a_type1_fields: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_EXEC && entry.op == OP_TYPE1) |->
      (entry.f1 >= 1 && int'(entry.f1) <= int'(N_BASIS) && int'(entry.f2) <= int'(MEM_DEPTH)))
    else $error("type I entry %0d out of range", idx_q + 1);

  a_type2_fields: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_EXEC && entry.op == OP_TYPE2) |->
      (entry.f1 >= 1 && entry.f2 >= 1 && entry.f3 >= 1 &&
       int'(entry.f1) <= int'(N_BASIS) && int'(entry.f2) <= int'(N_BASIS) &&
       int'(entry.f3) <= int'(N_BASIS)))
    else $error("type II entry %0d out of range", idx_q + 1);

  a_handshake: assert property (@(posedge clk) disable iff (!rst_n)
    accept |=> !request_sample);

endmodule
