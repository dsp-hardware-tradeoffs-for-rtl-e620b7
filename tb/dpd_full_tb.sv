// dpd_full_tb: the predistorter at its default size (13 basis functions,
// memory depth 4) running the indices-table configurations that were
// evaluated for power and accuracy: thirteen basis functions each, type 0
// first, then twelve type I / type II operations in the order and numbers
// below ('1' = type I, '2' = type II):
//   CFG_1 222111111111  type II then type I              (9 I, 3 II)
//   CFG_2 221111111122  type I between type II entries   (8 I, 4 II)
//   CFG_3 121212121212  type I and type II alternating   (6 I, 6 II)
//   CFG_4 221111111112  arranged like CFG_2              (9 I, 3 II)
//   CFG_5 211111111112  arranged like CFG_2              (10 I, 2 II)
//   CFG_6 111111111111  type I only                      (12 I)
//   CFG_7 222222222222  type II only                     (12 II)
//   baseline: five runs of 6/6, 6/6, 6/6, 5/7 and 6/6 type I/II entries in
//   a random order.
// The operands of each entry (which earlier basis functions, which delay)
// and the coefficients are random, since only the counts and the order of
// the operations are known. Each configuration processes 32 input samples
// back to back (sample_ready held high), as in the power runs. Every output
// is compared with the reference model, and the sample period, from one
// capture to the next, must be 3 + 1 + n1 + 4*n2 cycles.
module dpd_full_tb;
  import dpd_pkg::*;
  import tb_fp_pkg::*;
  import tb_dpd_pkg::*;

  localparam int unsigned N = 13;
  localparam int unsigned D = 4;
  localparam int          SAMPLES = 32;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   sample_ready = 1'b0, request_sample, result_ready;
  cfp_t   in_sample = '0, out_sample;
  logic   tbl_we = 1'b0, coef_we = 1'b0;
  field_t tbl_waddr = '0, coef_waddr = '0;
  entry_t tbl_wdata = '0;
  cfp_t   coef_wdata = '0;
  int checks = 0, failures = 0;
  int n_t1 = 0, n_t2 = 0, n_configs = 0;

  dpd_top dut (
    .clk(clk), .rst_n(rst_n), .sample_ready(sample_ready), .in_sample(in_sample),
    .request_sample(request_sample), .result_ready(result_ready), .out_sample(out_sample),
    .tbl_we(tbl_we), .tbl_waddr(tbl_waddr), .tbl_wdata(tbl_wdata),
    .coef_we(coef_we), .coef_waddr(coef_waddr), .coef_wdata(coef_wdata));

  always #5 clk = ~clk;

  dpd_model m;

  always @(posedge clk) if (rst_n && dut.mac_valid) begin
    if (dut.entry.op == OP_TYPE1) n_t1++;
    if (dut.entry.op == OP_TYPE2) n_t2++;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  task automatic run_config(string name, string ops);
    cfp_t xs [SAMPLES];
    cfp_t ys [SAMPLES];
    real  yr [SAMPLES], yi [SAMPLES], mg [SAMPLES];
    int   n1, n2, period, last_cap, cap, got;
    n1 = 0; n2 = 0;
    m.tbl[0] = '{f1: 0, f2: 0, f3: 0, op: OP_TYPE0};
    for (int r = 1; r < int'(N); r++) begin
      op_type_e op;
      op = (ops[r-1] == "2") ? OP_TYPE2 : OP_TYPE1;
      if (op == OP_TYPE2) n2++; else n1++;
      m.tbl[r] = rand_entry(op, r, D);
    end
    for (int r = 0; r < int'(N); r++) m.coef[r] = rand_cfp(-2, 0);
    // load between samples
    while (!request_sample) @(negedge clk);
    sample_ready = 1'b0;
    for (int r = 0; r < int'(N); r++) begin
      @(negedge clk);
      tbl_we = 1'b1; tbl_waddr = field_t'(r); tbl_wdata = m.tbl[r];
      coef_we = 1'b1; coef_waddr = field_t'(r); coef_wdata = m.coef[r];
    end
    @(negedge clk);
    tbl_we = 1'b0; coef_we = 1'b0;
    m.reset();
    for (int s = 0; s < SAMPLES; s++) begin
      xs[s] = rand_cfp(-3, -1);
      m.step(xs[s], ys[s], yr[s], yi[s], mg[s]);
    end
    period = m.cycles_per_sample();
    // stream back to back
    got = 0; last_cap = -1; cap = 0;
    in_sample = xs[0];
    sample_ready = 1'b1;
    for (int cyc = 0; got < SAMPLES && cyc < SAMPLES * 80; cyc++) begin
      @(posedge clk);
      if (request_sample && sample_ready) begin
        // the sample in_sample is taken at this edge
        if (last_cap >= 0) begin
          checks++;
          if (cyc - last_cap != period)
            fail($sformatf("%s: sample period %0d, expected %0d", name, cyc - last_cap, period));
        end
        last_cap = cyc;
        cap++;
      end
      @(negedge clk);
      if (result_ready && request_sample && got < cap) begin
        real er, ei, tol;
        checks++;
        if (ulp_dist(out_sample.re, ys[got].re) > 1 || ulp_dist(out_sample.im, ys[got].im) > 1)
          fail($sformatf("%s sample %0d: out (%h,%h), expected (%h,%h)", name, got,
                         out_sample.re, out_sample.im, ys[got].re, ys[got].im));
        er  = fp32_to_real(out_sample.re) - yr[got];
        ei  = fp32_to_real(out_sample.im) - yi[got];
        tol = 1.0e-5 * mg[got] + 1.0e-30;
        checks++;
        if (er > tol || er < -tol || ei > tol || ei < -tol)
          fail($sformatf("%s sample %0d: off the double model by (%g,%g)", name, got, er, ei));
        got++;
      end
      if (request_sample) begin
        if (cap < SAMPLES) in_sample = xs[cap];
        else sample_ready = 1'b0;
      end
    end
    sample_ready = 1'b0;
    checks++;
    if (got != SAMPLES) fail($sformatf("%s: only %0d of %0d outputs", name, got, SAMPLES));
    $display("%-12s typeI=%2d typeII=%2d cycles/sample=%0d  (%0.2f Msample/s at 220 MHz)",
             name, n1, n2, period, 220.0 / period);
    n_configs++;
  endtask

  function automatic string baseline_ops(int n1);
    string s;
    int    a1;
    s = "222222222222";
    a1 = 0;
    while (a1 < n1) begin
      int p;
      p = int'($urandom_range(11));
      if (s[p] == "2") begin
        s[p] = "1";
        a1++;
      end
    end
    return s;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(N, D);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_config("CFG_1", "222111111111");
    run_config("CFG_2", "221111111122");
    run_config("CFG_3", "121212121212");
    run_config("baseline_1", baseline_ops(6));
    run_config("baseline_2", baseline_ops(6));
    run_config("baseline_3", baseline_ops(6));
    run_config("baseline_4", baseline_ops(5));
    run_config("baseline_5", baseline_ops(6));
    run_config("CFG_4", "221111111112");
    run_config("CFG_5", "211111111112");
    run_config("CFG_6", "111111111111");
    run_config("CFG_7", "222222222222");
    checks++;
    if (n_configs != 12 || n_t1 == 0 || n_t2 == 0) fail("configurations not all run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
