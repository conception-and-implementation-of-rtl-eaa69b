// tb_bch_chien: checks the serial Chien search. For every error pattern of
// weight 0..2 the locator prod (1 + alpha^j x) is loaded; the search must
// run exactly 15 cycles, flag exactly the error positions in the order
// 14..0 and mark position 0 with last. Locators that must be rejected
// (degree above 2, a zero leading coefficient, a double root) must raise
// fail_early and flag nothing.
module tb_bch_chien;
  import bch_ref_pkg::*;
  import bch_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load = 0;
  sigma_t sigma;
  logic [2:0] len;
  logic ready, valid, err, last, fail_early;
  logic [2:0] len_o;
  int checks = 0, failures = 0;

  bch_chien dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int lam [5], int l, logic [14:0] expect_e, bit expect_fail);
    logic [14:0] got = '0;
    int n = 0;
    for (int i = 0; i <= 4; i++) sigma[i] = gf_t'(lam[i]);
    len  = 3'(l);
    load <= 1;
    @(posedge clk);
    load <= 0;
    #1;
    while (valid) begin
      got[14 - n] = err;
      check(last == (n == 14), "last on position 0");
      n++;
      @(posedge clk);
      #1;
    end
    check(n == 15, $sformatf("search length %0d", n));
    check(got == expect_e, $sformatf("flags %h expected %h", got, expect_e));
    check(fail_early == expect_fail, "fail_early");
    check(len_o == 3'(l), "len_o");
  endtask

  initial begin
    int lam [5];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    locator('0, lam); run(lam, 0, '0, 0);
    for (int a = 0; a < 15; a++) begin
      locator(15'(1) << a, lam);
      run(lam, 1, 15'(1) << a, 0);
    end
    for (int a = 0; a < 15; a++)
      for (int b = a + 1; b < 15; b++) begin
        logic [14:0] e;
        e = (15'(1) << a) | (15'(1) << b);
        locator(e, lam);
        run(lam, 2, e, 0);
      end
    // double root: (1 + a x)^2 = 1 + a^2 x^2
    lam = '{1, 0, 5, 0, 0}; run(lam, 2, '0, 1);
    // degree 3
    locator(15'b000_0000_0100_1001, lam); run(lam, 3, '0, 1);
    // leading coefficient zero
    lam = '{1, 7, 0, 0, 0}; run(lam, 2, '0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
