// bfg_tb: drives the basis function generator with the control words of a
// dictionary, entry by entry, for a stream of random input samples, and
// compares every produced basis function with the reference model, bit for
// bit. The first dictionary is the six-entry example (phi_1 = x,
// phi_2 = x x x*, phi_3 = x phi_2 phi_2*, phi_4 = phi_2 delayed by 1,
// phi_5 = phi_3 delayed by 2, phi_6 = x phi_2 phi_4*) followed by random
// entries; later dictionaries are random. Delayed terms, the input register
// and the per-row delay depth that gates the memory shift are all exercised;
// the memory is cleared whenever the dictionary changes.
module bfg_tb;
  import dpd_pkg::*;
  import tb_fp_pkg::*;
  import tb_dpd_pkg::*;

  localparam int unsigned N = 13;
  localparam int unsigned D = 4;

  logic      clk = 1'b0, rst_n = 1'b0;
  cfp_t      in_sample, basis;
  bfg_ctrl_t ctrl;
  logic      mem_clear = 1'b0;
  field_t    row_depth [N];
  int checks = 0, failures = 0;
  int n_t0 = 0, n_t1 = 0, n_t2 = 0;

  bfg dut (
    .clk(clk), .rst_n(rst_n), .mem_clear(mem_clear), .in_sample(in_sample), .ctrl(ctrl),
    .row_depth(row_depth), .basis(basis));

  always #5 clk = ~clk;

  dpd_model m;

  function automatic void set_depths();
    for (int r = 0; r < int'(N); r++) begin
      int dd;
      dd = 0;
      for (int e = 0; e < int'(N); e++)
        if (m.tbl[e].op == OP_TYPE1 && int'(m.tbl[e].f1) == r + 1 && int'(m.tbl[e].f2) > dd)
          dd = int'(m.tbl[e].f2);
      row_depth[r] = field_t'(dd);
    end
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(N, D);
    ctrl = '0; in_sample = '0;
    m.tbl[0] = '{f1: 0, f2: 0, f3: 0, op: OP_TYPE0};
    m.tbl[1] = '{f1: 1, f2: 1, f3: 1, op: OP_TYPE2};
    m.tbl[2] = '{f1: 1, f2: 2, f3: 2, op: OP_TYPE2};
    m.tbl[3] = '{f1: 2, f2: 1, f3: 0, op: OP_TYPE1};
    m.tbl[4] = '{f1: 3, f2: 2, f3: 0, op: OP_TYPE1};
    m.tbl[5] = '{f1: 1, f2: 2, f3: 4, op: OP_TYPE2};
    for (int r = 6; r < int'(N); r++)
      m.tbl[r] = rand_entry(op_type_e'(1 + $urandom_range(1)), r, D);
    set_depths();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 120; s++) begin
      cfp_t x, y;
      real yr, yi, mag;
      bfg_ctrl_t q[$];
      if (s > 0 && s % 20 == 0) begin
        for (int r = 1; r < int'(N); r++)
          m.tbl[r] = rand_entry(op_type_e'(1 + $urandom_range(1)), r, D);
        set_depths();
        m.reset();
        @(negedge clk);
        mem_clear = 1'b1;
        @(negedge clk);
        mem_clear = 1'b0;
      end
      x = rand_cfp(-3, -1);
      m.step(x, y, yr, yi, mag);
      // capture and shift
      @(negedge clk);
      ctrl = '0; ctrl.capture = 1'b1; ctrl.shift = 1'b1; in_sample = x;
      @(negedge clk);
      ctrl = '0; in_sample = rand_cfp(-3, -1);   // must not be taken
      for (int r = 0; r < int'(N); r++) begin
        op_schedule(m.tbl[r], r, q);
        case (m.tbl[r].op)
          OP_TYPE0: n_t0++;
          OP_TYPE1: n_t1++;
          default:  n_t2++;
        endcase
        foreach (q[c]) begin
          ctrl = q[c];
          #1;
          if (ctrl.wr_en) begin
            checks++;
            if (basis !== m.mem[r][0]) begin
              failures++;
              if (failures < 10) $display("FAIL sample %0d basis %0d (type %0d) = (%h,%h), expected (%h,%h)",
                                          s, r + 1, m.tbl[r].op, basis.re, basis.im,
                                          m.mem[r][0].re, m.mem[r][0].im);
            end
          end
          @(negedge clk);
        end
      end
      ctrl = '0;
    end
    checks++;
    if (n_t0 == 0 || n_t1 == 0 || n_t2 == 0) failures++;
    $display("type0=%0d typeI=%0d typeII=%0d", n_t0, n_t1, n_t2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
