// dpd_top_tb: end-to-end test of the predistorter through its ports, at the
// size of the six-basis example (N_BASIS = 6, memory depth 2) and with
// random dictionaries of that size.
//
// The dictionary and coefficients are loaded through the write ports, then
// input samples are streamed with the sample_ready / request_sample
// handshake, sometimes back to back, sometimes with idle gaps. Every output
// is compared with the reference model: bit for bit (within one unit in the
// last place) against binary32 arithmetic in the datapath's order, and
// against double precision within a relative tolerance. The time from
// capture to result_ready must be 2 + n0 + n1 + 4*n2 cycles and out_sample
// must be zero while result_ready is low. Counted mechanisms, each of which
// must occur: type 0, type I and type II operations, memory-register gating
// during a shift, idle waits, back-to-back samples, reading a non-zero
// delayed term, and a table reload that clears the memory.
module dpd_top_tb;
  import dpd_pkg::*;
  import tb_fp_pkg::*;
  import tb_dpd_pkg::*;

  localparam int unsigned N = 6;
  localparam int unsigned D = 2;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   sample_ready = 1'b0, request_sample, result_ready;
  cfp_t   in_sample = '0, out_sample;
  logic   tbl_we = 1'b0, coef_we = 1'b0;
  field_t tbl_waddr = '0, coef_waddr = '0;
  entry_t tbl_wdata = '0;
  cfp_t   coef_wdata = '0;
  int checks = 0, failures = 0;
  int n_t0 = 0, n_t1 = 0, n_t2 = 0, n_gated = 0, n_idle = 0, n_b2b = 0, n_delayed = 0, n_reload = 0;

  dpd_top #(.N_BASIS(N), .MEM_DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .sample_ready(sample_ready), .in_sample(in_sample),
    .request_sample(request_sample), .result_ready(result_ready), .out_sample(out_sample),
    .tbl_we(tbl_we), .tbl_waddr(tbl_waddr), .tbl_wdata(tbl_wdata),
    .coef_we(coef_we), .coef_waddr(coef_waddr), .coef_wdata(coef_wdata));

  always #5 clk = ~clk;

  dpd_model m;

  // mechanism counters, observed inside the design
  always @(posedge clk) if (rst_n) begin
    if (dut.mac_valid) begin
      case (dut.entry.op)
        OP_TYPE0: n_t0++;
        OP_TYPE1: begin
          n_t1++;
          if (dut.entry.f2 != 0 && dut.basis != '0) n_delayed++;
        end
        default:  n_t2++;
      endcase
    end
    if (dut.bctl.shift)
      for (int r = 0; r < int'(N); r++) if (int'(dut.row_depth[r]) < int'(D)) n_gated++;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  task automatic load(bit reload);
    for (int r = 0; r < int'(N); r++) begin
      @(negedge clk);
      tbl_we = 1'b1; tbl_waddr = field_t'(r); tbl_wdata = m.tbl[r];
      coef_we = 1'b1; coef_waddr = field_t'(r); coef_wdata = m.coef[r];
    end
    @(negedge clk);
    tbl_we = 1'b0; coef_we = 1'b0;
    m.reset();
    if (reload) n_reload++;
  endtask

  // Sends one sample; if b2b is set the previous sample_ready stays high.
  task automatic send(cfp_t x, int gap);
    cfp_t y;
    real yr, yi, mag, er, ei, tol;
    int lat;
    m.step(x, y, yr, yi, mag);
    while (!request_sample) @(negedge clk);
    if (gap > 0) begin
      sample_ready = 1'b0;
      repeat (gap) begin
        @(negedge clk);
        checks++;
        if (!request_sample) fail("request_sample fell without a sample");
      end
      n_idle++;
    end else if (sample_ready) begin
      n_b2b++;
    end
    in_sample = x;
    sample_ready = 1'b1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    if ($urandom_range(1) == 0) sample_ready = 1'b0;
    checks++;
    if (request_sample) fail("request_sample still high after capture");
    while (!result_ready) begin
      checks++;
      if (out_sample !== '0) fail("out_sample not gated while busy");
      lat++;
      @(negedge clk);
      if (lat > 500) break;
    end
    checks++;
    if (lat != m.cycles_per_sample() - 1)
      fail($sformatf("latency %0d cycles, expected %0d", lat, m.cycles_per_sample() - 1));
    checks++;
    if (ulp_dist(out_sample.re, y.re) > 1 || ulp_dist(out_sample.im, y.im) > 1)
      fail($sformatf("out (%h,%h), expected (%h,%h)", out_sample.re, out_sample.im, y.re, y.im));
    er  = fp32_to_real(out_sample.re) - yr;
    ei  = fp32_to_real(out_sample.im) - yi;
    tol = 1.0e-5 * mag + 1.0e-30;
    checks++;
    if (er > tol || er < -tol || ei > tol || ei < -tol)
      fail($sformatf("out differs from double model by (%g,%g), tol %g", er, ei, tol));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(N, D);
    // six-entry example dictionary: (i, j|m, k|0), type
    m.tbl[0] = '{f1: 0, f2: 0, f3: 0, op: OP_TYPE0};
    m.tbl[1] = '{f1: 1, f2: 1, f3: 1, op: OP_TYPE2};
    m.tbl[2] = '{f1: 1, f2: 2, f3: 2, op: OP_TYPE2};
    m.tbl[3] = '{f1: 2, f2: 1, f3: 0, op: OP_TYPE1};
    m.tbl[4] = '{f1: 3, f2: 2, f3: 0, op: OP_TYPE1};
    m.tbl[5] = '{f1: 1, f2: 2, f3: 4, op: OP_TYPE2};
    for (int r = 0; r < int'(N); r++) m.coef[r] = rand_cfp(-2, 0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (!request_sample || result_ready) fail("after reset: expected request_sample=1, result_ready=0");
    load(1'b0);
    for (int s = 0; s < 40; s++)
      send(rand_cfp(-3, -1), ($urandom_range(2) == 0) ? 1 + int'($urandom_range(3)) : 0);
    // random dictionaries of the same size
    for (int t = 0; t < 5; t++) begin
      for (int r = 1; r < int'(N); r++)
        m.tbl[r] = rand_entry(op_type_e'(1 + $urandom_range(1)), r, D);
      for (int r = 0; r < int'(N); r++) m.coef[r] = rand_cfp(-2, 0);
      while (!request_sample) @(negedge clk);
      sample_ready = 1'b0;
      load(1'b1);
      for (int s = 0; s < 20; s++)
        send(rand_cfp(-3, -1), ($urandom_range(2) == 0) ? 1 + int'($urandom_range(3)) : 0);
    end
    $display("type0=%0d typeI=%0d typeII=%0d gated=%0d idle=%0d back_to_back=%0d delayed=%0d reloads=%0d",
             n_t0, n_t1, n_t2, n_gated, n_idle, n_b2b, n_delayed, n_reload);
    checks++;
    if (n_t0 == 0 || n_t1 == 0 || n_t2 == 0 || n_gated == 0 || n_idle == 0 || n_b2b == 0 ||
        n_delayed == 0 || n_reload == 0) fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
