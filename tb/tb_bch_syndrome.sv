// tb_bch_syndrome: checks the serial syndrome calculator. Random 15-bit
// words (and codewords, whose syndromes must be zero) are streamed with and
// without gaps; S1 and S3 are compared with a direct evaluation r(alpha^j)
// and syn_valid must come exactly one cycle after the last bit.
module tb_bch_syndrome;
  import bch_ref_pkg::*;
  import bch_pkg::gf_t;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_bit = 0, in_first = 0, in_last = 0;
  logic syn_valid;
  gf_t  s1, s3;
  int checks = 0, failures = 0;

  bch_syndrome dut (.*);
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
    for (int w = 0; w < 400; w++) begin
      logic [14:0] r;
      r = (w % 4 == 0) ? encode(7'($urandom)) : 15'($urandom);
      for (int i = 14; i >= 0; i--) begin
        if (w % 2 == 1) while ($urandom_range(2, 0) == 0) begin
          in_valid <= 0; in_first <= 0; in_last <= 0;
          @(posedge clk);
          check(!syn_valid || i == 14, "no stray syn_valid");
        end
        in_valid <= 1; in_bit <= r[i]; in_first <= (i == 14); in_last <= (i == 0);
        @(posedge clk);
      end
      in_valid <= 0; in_first <= 0; in_last <= 0;
      #1;
      check(syn_valid, "syn_valid after last bit");
      check(s1 == gf_t'(eval(r, 1)), $sformatf("S1 of %h: %h vs %h", r, s1, eval(r, 1)));
      check(s3 == gf_t'(eval(r, 3)), $sformatf("S3 of %h: %h vs %h", r, s3, eval(r, 3)));
      if (w % 4 == 0) check(s1 == 0 && s3 == 0, "codeword has zero syndromes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
