// cplx_mul_tb: random complex operands, with and without conjugation of the
// second one, compared bit for bit with a reference complex product built
// from correctly rounded binary32 products and sums in the same order
// (re = ar*br - ai*bi', im = ar*bi' + ai*br), plus a few exact cases.
module cplx_mul_tb;
  import dpd_pkg::*;
  import tb_fp_pkg::*;

  cfp_t a, b, p;
  logic conj_b;
  int checks = 0, failures = 0;

  cplx_mul dut (.a(a), .b(b), .conj_b(conj_b), .p(p));

  task automatic check(cfp_t x, cfp_t y, bit cj, cfp_t exp_p);
    a = x; b = y; conj_b = cj;
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL (%h,%h)*(%h,%h) conj=%0d = (%h,%h), expected (%h,%h)",
                                  x.re, x.im, y.re, y.im, cj, p.re, p.im, exp_p.re, exp_p.im);
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
    // (1 + 2j)(3 + 4j) = -5 + 10j ; (1 + 2j)(3 - 4j) = 11 + 2j
    check('{re: 32'h3F80_0000, im: 32'h4000_0000}, '{re: 32'h4040_0000, im: 32'h4080_0000}, 1'b0,
          '{re: 32'hC0A0_0000, im: 32'h4120_0000});
    check('{re: 32'h3F80_0000, im: 32'h4000_0000}, '{re: 32'h4040_0000, im: 32'h4080_0000}, 1'b1,
          '{re: 32'h4130_0000, im: 32'h4000_0000});
    for (int n = 0; n < 3000; n++) begin
      cfp_t x, y;
      bit   cj;
      x  = rand_cfp(-6, 3);
      y  = rand_cfp(-6, 3);
      cj = 1'($urandom);
      check(x, y, cj, ref_cmul(x, y, cj));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
