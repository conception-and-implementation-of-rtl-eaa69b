// tb_bch_encoder: self-checking test of the serial BCH(15,7,5) encoder.
// All 128 messages are encoded, message bits offered with random gaps; the
// 15 output bits of each codeword are collected and compared with a long
// division reference. Also checked: out_last on the 15th bit only, the
// parity bits following on 8 consecutive cycles, in_ready low during them.
module tb_bch_encoder;
  import bch_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_bit = 0, in_ready;
  logic out_valid, out_bit, out_last;
  int checks = 0, failures = 0;

  bch_encoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // collect output words
  logic [14:0] got;
  int          nbits = 0, nwords = 0, last_seen = 0;
  int          cyc = 0, prev_out_cyc = 0;
  logic [14:0] expect_q [$];

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      got[14 - nbits] = out_bit;
      if (nbits >= 8) check(cyc == prev_out_cyc + 1, "parity bits back to back");
      prev_out_cyc = cyc;
      check(out_last == (nbits == 14), "out_last position");
      nbits++;
      if (nbits == 15) begin
        logic [14:0] e;
        e = expect_q.pop_front();
        check(got == e, $sformatf("codeword %h expected %h", got, e));
        nbits = 0;
        nwords++;
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // paper example message 1000100 and then all messages
    for (int m = -1; m < 128; m++) begin
      logic [6:0] msg;
      msg = (m < 0) ? 7'b1000100 : 7'(m);
      expect_q.push_back(encode(msg));
      for (int b = 6; b >= 0; b--) begin
        while ($urandom_range(3, 0) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_bit   <= msg[b];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      in_valid <= 0;
      // parity phase: in_ready must be low for 8 cycles
      for (int p = 0; p < 8; p++) begin
        @(posedge clk);
        if (p < 7) check(!in_ready, "in_ready low in parity phase");
      end
    end
    repeat (5) @(posedge clk);
    check(nwords == 129, "all codewords produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
