// tb_bch_decoder: end-to-end check of the serial BCH(15,7,5) decoder.
// Random codewords are disturbed by every error pattern of weight 0..3
// (576 patterns) and by random patterns of weight 4 and 5, and streamed in
// back to back and, in a second pass, with random gaps. Each output word is
// compared with exhaustive bounded-distance decoding: the nearest codeword
// within distance 2, or the received word unchanged with fail set. Also
// checked: detected, nerr, 15 output bits on consecutive cycles, and a
// latency of 8 cycles from the cycle of the last input bit to the cycle of
// the first output bit.
module tb_bch_decoder;
  import bch_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_bit = 0;
  logic out_valid, out_bit, out_last, fail, detected;
  logic [2:0] nerr;
  int checks = 0, failures = 0;

  bch_decoder dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { logic [14:0] r; logic [14:0] c; bit fail; int nerr; int last_cyc; } exp_t;
  exp_t expq [$];
  int cyc = 0;
  int nwords = 0, nfail = 0, ncorr1 = 0, ncorr2 = 0, nclean = 0;

  always @(posedge clk) cyc++;

  // consumer
  initial begin
    forever begin
      logic [14:0] got;
      int first_cyc;
      exp_t e;
      @(posedge clk); #1;
      if (out_valid) begin
        first_cyc = cyc;
        for (int i = 14; i >= 0; i--) begin
          check(out_valid, "output bits back to back");
          got[i] = out_bit;
          check(out_last == (i == 0), "out_last");
          if (i > 0) begin @(posedge clk); #1; end
        end
        e = expq.pop_front();
        check(first_cyc - e.last_cyc == 8, $sformatf("latency %0d", first_cyc - e.last_cyc));
        check(got == e.c, $sformatf("word r=%h got %h expected %h", e.r, got, e.c));
        check(fail == e.fail, $sformatf("fail for r=%h", e.r));
        check(detected == (e.r != e.c || e.fail || e.nerr != 0 || (eval(e.r, 1) != 0 || eval(e.r, 3) != 0)),
              "detected");
        if (!e.fail) check(int'(nerr) == e.nerr, "nerr");
        nwords++;
        if (e.fail) nfail++;
        else if (e.nerr == 1) ncorr1++;
        else if (e.nerr == 2) ncorr2++;
        else nclean++;
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [14:0] err, bit gaps);
    exp_t x;
    logic [14:0] cw;
    cw   = encode(7'($urandom));
    x.r  = cw ^ err;
    decode(x.r, x.c, x.fail);
    x.nerr = x.fail ? 0 : weight(x.c ^ x.r);
    if (x.fail) x.c = x.r;
    for (int i = 14; i >= 0; i--) begin
      if (gaps) while ($urandom_range(3, 0) == 0) begin
        @(negedge clk); in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1;
      in_bit = x.r[i];
      if (i == 0) x.last_cyc = cyc;
    end
    expq.push_back(x);
  endtask

  initial begin
    int total;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = -1; a < 15; a++)
        for (int b = a; b < 15; b++)
          for (int c = b; c < 15; c++) begin
            logic [14:0] e;
            e = '0;
            if (a >= 0) e[a] = 1;
            if (b > a) e[b] = 1;
            if (c > b) e[c] = 1;
            if ((a < 0 && (b >= 0 || c >= 0)) || (b == a && c > b && a >= 0)) continue;
            send(e, pass == 1);
          end
      for (int k = 0; k < 100; k++) send(rand_pattern(4 + k % 2), pass == 1);
    end
    @(negedge clk); in_valid = 0;
    repeat (40) @(posedge clk);
    check(expq.size() == 0, "all words decoded");
    check(nclean > 0 && ncorr1 > 0 && ncorr2 > 0 && nfail > 0, "all outcomes seen");
    $display("words=%0d clean=%0d one=%0d two=%0d uncorrectable=%0d", nwords, nclean, ncorr1, ncorr2, nfail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
