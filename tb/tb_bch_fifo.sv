// tb_bch_fifo: checks the bit buffer against a queue model under random
// push/pop traffic, including push and pop together while full, and the
// full/empty/count outputs. Runs with 4-bit entries to catch lane errors.
module tb_bch_fifo;
  localparam int W = 4, D = 32;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int saw_full = 0;

  bch_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
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
    for (int c = 0; c < 4000; c++) begin
      int bias;
      bit do_push, do_pop;
      bias = (c / 500) % 2;   // alternate filling and draining phases
      @(negedge clk);
      check(count == ($bits(count))'(model.size()), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      if (model.size() > 0) check(rdata == model[0], "rdata is the oldest entry");
      if (full) saw_full++;
      do_push = ($urandom_range(9, 0) < (bias ? 7 : 3)) && (model.size() < D || model.size() > 0);
      do_pop  = ($urandom_range(9, 0) < (bias ? 3 : 7)) && model.size() > 0;
      if (do_push && model.size() == D) do_pop = 1;
      push  = do_push;
      pop   = do_pop;
      wdata = W'($urandom);
      @(posedge clk);
      if (do_pop)  void'(model.pop_front());
      if (do_push) model.push_back(wdata);
      #1;
      push = 0;
      pop  = 0;
    end
    check(saw_full > 0, "buffer was filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
