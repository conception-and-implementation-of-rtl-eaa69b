// tb_bch_pkg: checks the GF(16) arithmetic of the shared package against
// log/antilog tables built independently: all 256 products, all 15
// inverses, multiplication by alpha, powers of alpha, and that the
// generator polynomial constant is the product of the minimal polynomials
// of alpha and alpha^3.
module tb_bch_pkg;
  import bch_pkg::*;
  import bch_ref_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] prod;
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++)
        check(int'(gf_mul(gf_t'(a), gf_t'(b))) == mul(a, b), $sformatf("%0d*%0d", a, b));
      if (a != 0) check(mul(int'(gf_inv(gf_t'(a))), a) == 1, $sformatf("inverse of %0d", a));
      check(int'(gf_mulx(gf_t'(a))) == mul(a, 2), "multiply by alpha");
      check(int'(gf_sq(gf_t'(a))) == mul(a, a), "square");
    end
    for (int e = 0; e < 30; e++) check(int'(gf_alpha(e)) == exp_tab(e % 15), "alpha power");
    // (x^4 + x + 1)(x^4 + x^3 + x^2 + x + 1) over GF(2)
    prod = '0;
    for (int i = 0; i <= 4; i++)
      if (5'b10011 & (5'b1 << i)) prod ^= 17'(5'b11111) << i;
    check(prod[8:0] == G_POLY, "generator polynomial");
    check(N == 15 && K == 7 && T == 2 && NK == 8, "code parameters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
