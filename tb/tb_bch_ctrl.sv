// tb_bch_ctrl: checks the decoder control unit. A random valid pattern must
// give in_first on every 1st and in_last on every 15th valid bit; bm_start
// must follow syn_valid; a solver result must be handed to the Chien search
// at once when it is idle and held (pending) until it becomes idle
// otherwise, exactly once per result.
module tb_bch_ctrl;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, syn_valid = 0, bm_busy = 0, bm_done = 0, chien_ready = 1;
  logic in_first, in_last, bm_start, chien_load;
  int checks = 0, failures = 0;

  bch_ctrl dut (.*);
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
    int nvalid = 0, loads = 0, dones = 0, held = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // framing
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(3, 0) != 0);
      syn_valid = $urandom_range(1, 0);
      #1;
      check(in_first == (in_valid && nvalid % 15 == 0), "in_first");
      check(in_last == (in_valid && nvalid % 15 == 14), "in_last");
      check(bm_start == syn_valid, "bm_start follows syn_valid");
      @(posedge clk);
      if (in_valid) nvalid++;
    end
    in_valid = 0; syn_valid = 0;
    // hand-over: done while the search is idle, and while it is busy
    for (int k = 0; k < 40; k++) begin
      int busy_for;
      busy_for = (k % 2) ? int'($urandom_range(6, 1)) : 0;
      @(negedge clk);
      chien_ready = (busy_for == 0);
      bm_done = 1;
      #1;
      check(chien_load == (busy_for == 0), "immediate load when idle");
      if (chien_load) loads++;
      dones++;
      @(negedge clk);
      bm_done = 0;
      for (int b = 1; b < busy_for; b++) begin
        #1;
        check(!chien_load, "held while search busy");
        @(negedge clk);
      end
      if (busy_for > 0) begin
        chien_ready = 1;
        #1;
        check(chien_load, "pending result loaded once the search is idle");
        if (chien_load) begin loads++; held++; end
        @(negedge clk);
      end
      #1;
      check(!chien_load, "loaded only once");
      // the loaded search runs for a while
      chien_ready = 0;
      repeat (3) @(negedge clk);
      chien_ready = 1;
    end
    check(loads == dones, "one load per result");
    check(held > 0, "a result had to wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
