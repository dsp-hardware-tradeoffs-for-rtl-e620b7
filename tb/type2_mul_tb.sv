// type2_mul_tb: checks phi_i * phi_j * conj(phi_k) for random complex
// operands against the reference round(round(a*b) * conj(c)), bit for bit,
// and for a case worked by hand: (1+j)(1+j)conj(1+j) = 2j(1-j) = 2 + 2j.
module type2_mul_tb;
  import dpd_pkg::*;
  import tb_fp_pkg::*;

  cfp_t a, b, c, p;
  int checks = 0, failures = 0;

  type2_mul dut (.a(a), .b(b), .c(c), .p(p));

  task automatic check(cfp_t x, cfp_t y, cfp_t z, cfp_t exp_p);
    a = x; b = y; c = z;
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL got (%h,%h), expected (%h,%h)", p.re, p.im, exp_p.re, exp_p.im);
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
    cfp_t one_j;
    one_j = '{re: 32'h3F80_0000, im: 32'h3F80_0000};
    check(one_j, one_j, one_j, '{re: 32'h4000_0000, im: 32'h4000_0000});
    // |x|^2 x with x = 3 + 4j: 25 * (3 + 4j) = 75 + 100j
    check('{re: 32'h4040_0000, im: 32'h4080_0000}, '{re: 32'h4040_0000, im: 32'h4080_0000},
          '{re: 32'h4040_0000, im: 32'h4080_0000}, '{re: 32'h4296_0000, im: 32'h42C8_0000});
    for (int n = 0; n < 3000; n++) begin
      cfp_t x, y, z;
      x = rand_cfp(-4, 1);
      y = rand_cfp(-4, 1);
      z = rand_cfp(-4, 1);
      check(x, y, z, ref_cmul(ref_cmul(x, y, 1'b0), z, 1'b1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
