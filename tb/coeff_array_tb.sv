// coeff_array_tb: checks that reset clears all coefficients, that writes
// land at their address (and out-of-range writes are ignored), and that the
// combinational read returns the coefficient of the entry being addressed.
module coeff_array_tb;
  import dpd_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned N = 13;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   we;
  field_t waddr, raddr;
  cfp_t   wdata, rdata;
  cfp_t   model [N];
  int checks = 0, failures = 0;

  coeff_array dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr),
                                  .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic check_all();
    for (int r = 0; r <= int'(N); r++) begin
      raddr = field_t'(r);
      #1;
      checks++;
      if (rdata !== ((r < int'(N)) ? model[r] : cfp_t'('0))) begin
        failures++;
        if (failures < 10) $display("FAIL coef[%0d] = (%h,%h)", r, rdata.re, rdata.im);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int r = 0; r < int'(N); r++) model[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check_all();
    for (int n = 0; n < 200; n++) begin
      int a;
      a = int'($urandom_range(N));
      @(negedge clk);
      we = 1'b1; waddr = field_t'(a); wdata = rand_cfp(-8, 8);
      if (a < int'(N)) model[a] = wdata;
      @(negedge clk);
      we = 1'b0;
      if (n % 10 == 0) check_all();
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
