// tb_bch_correct: checks the correction stage. Random words of 15 received
// bits with random error flags are fed in; every output bit must be the XOR
// of the two, one cycle later, and with the last bit nerr must be the number
// of flags, detected must be (L != 0) and fail must be
// fail_early || (flags != L).
module tb_bch_correct;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, r_bit = 0, e_bit = 0, in_last = 0, fail_early = 0;
  logic [2:0] len = '0;
  logic out_valid, out_bit, out_last, fail, detected;
  logic [2:0] nerr;
  int checks = 0, failures = 0;

  bch_correct dut (.*);
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

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 300; w++) begin
      logic [14:0] r, e;
      int nflags, l;
      bit fe;
      r = 15'($urandom);
      e = '0;
      for (int k = 0; k < int'($urandom_range(3, 0)); k++) e[$urandom_range(14, 0)] = 1'b1;
      nflags = $countones(e);
      l  = (w % 3 == 0) ? int'($urandom_range(4, 0)) : nflags;
      fe = (w % 7 == 0);
      for (int i = 14; i >= 0; i--) begin
        @(negedge clk);
        in_valid = 1; r_bit = r[i]; e_bit = e[i]; in_last = (i == 0);
        len = 3'(l); fail_early = fe;
        @(posedge clk); #1;
        check(out_valid && out_bit == (r[i] ^ e[i]), "corrected bit");
        check(out_last == (i == 0), "out_last");
      end
      check(nerr == 3'(nflags), "nerr");
      check(detected == (l != 0), "detected");
      check(fail == (fe || nflags != l), "fail");
      @(negedge clk);
      in_valid = 0; in_last = 0;
      @(posedge clk); #1;
      check(!out_valid, "no output without input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
