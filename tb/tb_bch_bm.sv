// tb_bch_bm: checks the Berlekamp-Massey key solver. For every error
// pattern of weight 0, 1 and 2 the syndromes S1..S4 are computed by direct
// evaluation; the solver must finish 4 cycles after start with L equal to
// the weight and Lambda(x) equal to prod (1 + alpha^j x) over the error
// positions j. Random patterns of weight 3 must either give the locator of
// a nearer pattern (if a codeword lies within distance 2) or one that the
// Chien search can reject (L > 2, or fewer than L roots).
module tb_bch_bm;
  import bch_ref_pkg::*;
  import bch_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  gf_t  syn [T2];
  sigma_t sigma;
  logic [2:0] len;
  int checks = 0, failures = 0;

  bch_bm dut (.*);
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

  task automatic run(logic [14:0] e);
    int lam [5];
    int cyc;
    for (int i = 0; i < 4; i++) syn[i] = gf_t'(eval(e, i + 1));
    start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 20);
    check(cyc == T2, $sformatf("solver latency %0d", cyc));
    locator(e, lam);
    if (weight(e) <= 2) begin
      check(len == 3'(weight(e)), $sformatf("L=%0d for %h", len, e));
      for (int i = 0; i <= 4; i++)
        check(sigma[i] == gf_t'(lam[i]), $sformatf("Lambda_%0d of %h: %h vs %h", i, e, sigma[i], lam[i]));
    end else begin
      // weight 3: if a codeword c lies within distance 2 the solver must
      // find the locator of the nearer pattern c ^ e; otherwise either
      // L > 2 or Lambda does not have L distinct roots (detected later)
      logic [14:0] c; bit fail;
      int nroots;
      decode(e, c, fail);
      if (!fail) begin
        locator(c ^ e, lam);
        check(len == 3'(weight(c ^ e)), "weight-3 within reach: L");
        for (int i = 0; i <= 4; i++) check(sigma[i] == gf_t'(lam[i]), "weight-3 within reach: Lambda");
      end else begin
        nroots = 0;
        for (int j = 0; j < 15; j++) begin
          int v = 0;
          for (int i = 0; i <= 4; i++) v ^= mul(int'(sigma[i]), exp_tab((15 - j) * i % 15));
          if (v == 0) nroots++;
        end
        check(len > 2 || nroots != int'(len), $sformatf("weight-3 beyond reach: L=%0d roots=%0d", len, nroots));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run('0);
    for (int a = 0; a < 15; a++) run(15'(1) << a);
    for (int a = 0; a < 15; a++)
      for (int b = a + 1; b < 15; b++) run((15'(1) << a) | (15'(1) << b));
    for (int k = 0; k < 100; k++) run(rand_pattern(3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
