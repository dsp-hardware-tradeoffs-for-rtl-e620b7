// fp32_mul_tb: checks the binary32 multiplier against correctly rounded
// double-precision products (random operands over most of the exponent
// range, including overflow and flush-to-zero underflow) and against the
// special cases: zeros, infinities, NaN, infinity times zero, and a tie
// that must round to even.
module fp32_mul_tb;
  import dpd_pkg::*;
  import tb_fp_pkg::*;

  fp32_t a, b, p;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .p(p));

  task automatic check(fp32_t x, fp32_t y, fp32_t exp_p);
    a = x; b = y;
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // special values
    check(32'h3F80_0000, 32'h4000_0000, 32'h4000_0000);   // 1 * 2
    check(32'h0000_0000, 32'hC040_0000, 32'h8000_0000);   // 0 * -3 = -0
    check(32'h7F80_0000, 32'h4000_0000, 32'h7F80_0000);   // inf * 2
    check(32'h7F80_0000, 32'h0000_0000, FP32_QNAN);       // inf * 0
    check(32'h7FC0_1234, 32'h3F80_0000, FP32_QNAN);       // NaN
    check(32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000);   // overflow
    check(32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);   // underflow -> 0
    check(32'h0000_0001, 32'h3F80_0000, 32'h0000_0000);   // subnormal in -> 0
    // (1 + 2^-23) * (1 + 2^-1): exact 1.5 + 1.5*2^-23 -> tie resolved to even
    check(32'h3F80_0001, 32'h3FC0_0000, ref_mul(32'h3F80_0001, 32'h3FC0_0000));
    check(32'h3F80_0001, 32'h3F80_0001, 32'h3F80_0002);
    for (int n = 0; n < 3000; n++) begin
      fp32_t x, y;
      x = rand_fp(-70, 70);
      y = rand_fp(-70, 70);
      check(x, y, ref_mul(x, y));
    end
    for (int n = 0; n < 2000; n++) begin
      fp32_t x, y;
      x = rand_fp(-4, 4);
      y = rand_fp(-4, 4);
      check(x, y, ref_mul(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
