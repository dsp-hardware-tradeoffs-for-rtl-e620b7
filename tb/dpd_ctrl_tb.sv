// dpd_ctrl_tb: runs the controller against a dictionary held in the
// testbench (random mixes of type 0, I and II entries, 13 entries, memory
// depth 4) and checks, cycle by cycle:
//  - a sample is taken only when sample_ready and request_sample are high,
//    and capture, column shift and MAC clear happen exactly then;
//  - the control words for each entry: type I one read of (row i, column m)
//    and a write, type II reads of phi_i, phi_j, phi_k of column M0 into
//    operand registers A, B, C and then a write, in table order;
//  - one MAC operation per entry, issued with the write;
//  - result_ready rises 2 + n0 + n1 + 4*n2 cycles after the capture edge
//    and request_sample rises with it; gaps in sample_ready are waited out.
module dpd_ctrl_tb;
  import dpd_pkg::*;
  import tb_dpd_pkg::*;

  localparam int unsigned N = 13;
  localparam int unsigned D = 4;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      sample_ready, request_sample, result_ready, mac_clear, mac_valid;
  field_t    entry_idx;
  entry_t    entry;
  bfg_ctrl_t bctl;
  entry_t    tbl [N];
  int checks = 0, failures = 0;
  int n_waits = 0, n_t1 = 0, n_t2 = 0;

  dpd_ctrl dut (
    .clk(clk), .rst_n(rst_n), .sample_ready(sample_ready), .request_sample(request_sample),
    .result_ready(result_ready), .entry_idx(entry_idx), .entry(entry), .bctl(bctl),
    .mac_clear(mac_clear), .mac_valid(mac_valid));

  assign entry = (int'(entry_idx) < int'(N)) ? tbl[entry_idx] : '0;

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_ready = 1'b0;
    for (int r = 0; r < int'(N); r++) tbl[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 60; s++) begin
      bfg_ctrl_t q[$];
      int expect_cyc, steps;
      // new dictionary every few samples
      if (s % 4 == 0)
        for (int r = 0; r < int'(N); r++)
          tbl[r] = rand_entry(r == 0 ? OP_TYPE0 : op_type_e'(1 + $urandom_range(1)), r, D);
      expect_cyc = 2;
      for (int r = 0; r < int'(N); r++) expect_cyc += (tbl[r].op == OP_TYPE2) ? 4 : 1;
      @(negedge clk);
      // optional idle gap with sample_ready low
      if ($urandom_range(2) == 0) begin
        sample_ready = 1'b0;
        repeat (1 + $urandom_range(3)) begin
          @(negedge clk);
          checks++;
          if (!request_sample || mac_clear || bctl.capture) fail("idle: no capture expected");
        end
        n_waits++;
      end
      sample_ready = 1'b1;
      #1;
      checks++;
      if (!request_sample) fail("request_sample low while idle");
      if (!(bctl.capture && bctl.shift && mac_clear)) fail("capture/shift/clear missing at accept");
      @(negedge clk);
      sample_ready = ($urandom_range(1) == 0);
      steps = 0;
      // entries
      for (int r = 0; r < int'(N); r++) begin
        op_schedule(tbl[r], r, q);
        if (tbl[r].op == OP_TYPE1) n_t1++;
        if (tbl[r].op == OP_TYPE2) n_t2++;
        foreach (q[c]) begin
          checks++;
          if (request_sample || result_ready) fail("request/result high while busy");
          if (bctl.capture || bctl.shift || mac_clear) fail("capture while busy");
          if (bctl !== q[c])
            fail($sformatf("sample %0d entry %0d step %0d: ctrl %h expected %h", s, r, c, bctl, q[c]));
          if (mac_valid !== q[c].wr_en) fail($sformatf("entry %0d: mac_valid %0d", r, mac_valid));
          @(negedge clk);
          steps++;
        end
      end
      // drain and done
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (mac_valid || bctl.wr_en || bctl.rd_en || request_sample || result_ready)
          fail("activity during drain");
        @(negedge clk);
        steps++;
      end
      checks++;
      if (!(result_ready && request_sample)) fail("result not ready after expected latency");
      // latency in cycles from capture edge to result_ready
      checks++;
      if (steps != expect_cyc) fail($sformatf("latency %0d, expected %0d", steps, expect_cyc));
      sample_ready = 1'b0;
    end
    checks++;
    if (n_waits == 0 || n_t1 == 0 || n_t2 == 0) fail("a case never happened");
    $display("waits=%0d typeI=%0d typeII=%0d", n_waits, n_t1, n_t2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
