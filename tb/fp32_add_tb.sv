// fp32_add_tb: checks the binary32 adder against correctly rounded
// double-precision sums (operand exponents differing by less than 30, so the
// double sum is exact), with both signs so that carries, cancellation and
// long normalisation shifts all occur, plus operands too far apart to
// overlap, exact cancellation to +0, signed zeros, infinities, NaN and
// overflow.
module fp32_add_tb;
  import dpd_pkg::*;
  import tb_fp_pkg::*;

  fp32_t a, b, s;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .s(s));

  task automatic check(fp32_t x, fp32_t y, fp32_t exp_s);
    a = x; b = y;
    #1;
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", x, y, s, exp_s);
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
    check(32'h3F80_0000, 32'h4000_0000, 32'h4040_0000);   // 1 + 2 = 3
    check(32'h4040_0000, 32'hC040_0000, 32'h0000_0000);   // 3 - 3 = +0
    check(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);   // -0 + -0
    check(32'h8000_0000, 32'h0000_0000, 32'h0000_0000);   // -0 + +0
    check(32'h7F80_0000, 32'hFF80_0000, FP32_QNAN);       // inf - inf
    check(32'h7F80_0000, 32'h3F80_0000, 32'h7F80_0000);   // inf + 1
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);   // overflow
    check(32'h3F80_0000, 32'h2F80_0000, 32'h3F80_0000);   // 1 + 2^-32 -> 1
    check(32'h3F80_0000, 32'h3380_0000, 32'h3F80_0000);   // 1 + 2^-24: tie to even
    check(32'h3F80_0001, 32'h3380_0000, 32'h3F80_0002);   // tie, odd -> up
    check(32'h3F80_0000, 32'hB380_0000, 32'h3F7F_FFFF);   // 1 - 2^-24 exact
    check(32'h3F80_0001, 32'hBF80_0000, 32'h3400_0000);   // cancellation to 2^-23
    check(32'h0000_0005, 32'h3F80_0000, 32'h3F80_0000);   // subnormal read as 0
    for (int n = 0; n < 4000; n++) begin
      fp32_t x, y;
      int    ex, ey;
      x  = rand_fp(-20, 20);
      ey = int'(x[30:23]) - 127 - int'($urandom_range(29)) + int'($urandom_range(29));
      if (ey < -120) ey = -120;
      if (ey > 120) ey = 120;
      ex = int'(x[30:23]) - 127;
      y  = rand_fp(ey, ey);
      if (ex - ey > 29 || ey - ex > 29) y = rand_fp(ex, ex);
      check(x, y, ref_add(x, y));
    end
    // near-cancellation: operands with equal exponents and opposite signs
    for (int n = 0; n < 1000; n++) begin
      fp32_t x, y;
      x = rand_fp(-3, 3);
      y = {~x[31], x[30:23], 23'($urandom)};
      check(x, y, ref_add(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
