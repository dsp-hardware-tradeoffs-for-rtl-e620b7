// mac_tb: feeds runs of (coefficient, basis) pairs, back to back and with
// gaps, and checks the accumulator against a reference sum of correctly
// rounded complex products accumulated in the same order. It also checks the
// two-cycle latency: a pair's product is not yet in the accumulator one
// cycle after it enters and is two cycles after; and that clear empties it.
module mac_tb;
  import dpd_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, valid;
  cfp_t coeff, basis, acc;
  int checks = 0, failures = 0;

  mac dut (.clk(clk), .rst_n(rst_n), .clear(clear), .valid(valid),
           .coeff(coeff), .basis(basis), .acc(acc));

  always #5 clk = ~clk;

  task automatic expect_acc(cfp_t e, string what);
    checks++;
    if (acc !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s: acc (%h,%h), expected (%h,%h)", what, acc.re, acc.im, e.re, e.im);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfp_t ref_acc, prev_acc;
    clear = 1'b0; valid = 1'b0; coeff = '0; basis = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_acc('0, "after reset");
    for (int run = 0; run < 100; run++) begin
      int len;
      len = 1 + int'($urandom_range(13));
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      expect_acc('0, "after clear");
      ref_acc = '0;
      for (int r = 0; r < len; r++) begin
        cfp_t c, x;
        c = rand_cfp(-4, 1);
        x = rand_cfp(-4, 1);
        coeff = c; basis = x; valid = 1'b1;
        prev_acc = ref_acc;
        ref_acc = ref_cadd(ref_acc, ref_cmul(c, x, 1'b0));
        @(negedge clk);
        valid = 1'b0;
        if (r == 0) expect_acc(prev_acc, "one cycle after first pair");
        if ($urandom_range(3) == 0) begin
          @(negedge clk);        // gap: product of the pair lands now
        end
      end
      @(negedge clk);
      expect_acc(ref_acc, "two cycles after last pair");
      @(negedge clk);
      expect_acc(ref_acc, "held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
