// tb_bch_top: end-to-end test of the whole chain at its default parameters
// (including the full LCD timing at 50 MHz).
// It sends the two demonstration sequences (a single frame 1000100 with
// error pattern 011000010000000, then frames 0100010 / 0011101 alternating
// with patterns 011000010000000 / 100001000100000), then random frames with
// 0 to 3 inverted bits, back to back and with idle gaps. Every vdout frame
// is compared with exhaustive bounded-distance decoding of the disturbed
// codeword: dout, wrongnow, err, ncorr, the sticky wrong flag, and a fixed
// latency of 39 cycles from the cycle a frame is taken to its vdout. A
// display model decodes the LCD bus and checks that the screen ends up
// showing the last input and output frames. Each mechanism (clean frame,
// one and two corrected bits, uncorrectable frame, back-to-back and gapped
// input, display refresh) is counted and must occur.
module tb_bch_top;
  import bch_ref_pkg::*;

  localparam int LAT = 39;

  logic clk = 0, rst_n = 0;
  logic [0:6]  din = '0;
  logic [0:14] error = '0;
  logic vdin = 0;
  logic rdy, vdout, wrongnow, wrong, err;
  logic [0:6] dout;
  logic [2:0] ncorr;
  logic lcd_e, lcd_rs, lcd_rw;
  logic [3:0] lcd_d;
  int checks = 0, failures = 0;

  bch_top dut (.*);
  always #10 clk = ~clk;   // 50 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [0:6] din; logic [0:6] dout; bit fail; bit det; int nerr; int t; } exp_t;
  exp_t expq [$];
  int cyc = 0, last_take = -100;
  int n_clean = 0, n_one = 0, n_two = 0, n_unc = 0, n_b2b = 0, n_gap = 0, n_frames = 0;
  bit any_fail = 0;
  logic [0:6] last_in, last_out;
  bit last_bad;

  always @(posedge clk) cyc++;

  // reference for one frame; din[0] is the coefficient of x^14
  function automatic exp_t model(logic [0:6] d, logic [0:14] e);
    exp_t x;
    logic [14:0] cw, ev, r, c;
    bit f;
    for (int i = 0; i < 15; i++) ev[14 - i] = e[i];
    cw = encode({d[0], d[1], d[2], d[3], d[4], d[5], d[6]});
    r  = cw ^ ev;
    decode(r, c, f);
    x.din  = d;
    x.fail = f;
    if (f) c = r;
    for (int i = 0; i < 7; i++) x.dout[i] = c[14 - i];
    x.nerr = f ? 0 : weight(c ^ r);
    x.det  = (eval(r, 1) != 0) || (eval(r, 3) != 0);
    return x;
  endfunction

  // checker
  always @(posedge clk) begin
    if (rst_n && vdout) begin
      exp_t x;
      x = expq.pop_front();
      check(cyc - x.t == LAT, $sformatf("latency %0d", cyc - x.t));
      check(dout == x.dout, $sformatf("dout %b expected %b (din %b)", dout, x.dout, x.din));
      check(wrongnow == x.fail, "wrongnow");
      check(err == x.det, "err");
      if (!x.fail) check(int'(ncorr) == x.nerr, "ncorr");
      any_fail |= x.fail;
      check(wrong == any_fail, "sticky wrong");
      if (x.fail) n_unc++;
      else if (x.nerr == 0) n_clean++;
      else if (x.nerr == 1) n_one++;
      else n_two++;
      if (n_frames < 7)
        $display("demonstration frame %0d: din %b -> dout %b wrongnow %0d", n_frames, x.din, dout, wrongnow);
      n_frames++;
      last_out = dout;
      last_bad = wrongnow;
    end
  end

  task automatic send(logic [0:6] d, logic [0:14] e, bit gap);
    exp_t x;
    int waited = 0;
    if (gap) repeat ($urandom_range(20, 1)) @(negedge clk);
    @(negedge clk);
    din = d; error = e; vdin = 1;
    while (!rdy) begin @(negedge clk); waited++; end
    // taken at the coming edge; cyc then counts this cycle
    x = model(d, e);
    x.t = cyc + 1;
    if (cyc + 1 - last_take == 15) n_b2b++; else n_gap++;
    last_take = cyc + 1;
    expq.push_back(x);
    last_in = d;
    @(negedge clk);
    vdin = 0;
  endtask

  function automatic logic [0:14] rand_err(int w);
    logic [14:0] p;
    logic [0:14] e;
    p = rand_pattern(w);
    for (int i = 0; i < 15; i++) e[i] = p[i];
    return e;
  endfunction

  // LCD model (display side)
  logic [3:0] hi;
  int nnib = 0, addr = 0, passes = 0, phase_lo = 0;
  logic [7:0] ddram [32];
  always @(negedge lcd_e) if (rst_n) begin
    if (nnib >= 4) begin
      if (!phase_lo) hi = lcd_d;
      else begin
        if (!lcd_rs) begin
          if (lcd_d[3] == 1'b0 && hi[3]) addr = (hi[2] ? 16 : 0) + int'(lcd_d);
        end else begin
          ddram[addr % 32] = {hi, lcd_d};
          addr++;
          if (addr == 32) passes++;
        end
      end
      phase_lo = !phase_lo;
    end
    nnib++;
  end

  function automatic bit shows(logic [0:6] fi, logic [0:6] fo, bit b);
    for (int i = 0; i < 7; i++) begin
      if (ddram[4 + i] != (fi[i] ? 8'h31 : 8'h30)) return 0;
      if (ddram[20 + i] != (fo[i] ? 8'h31 : 8'h30)) return 0;
    end
    return ddram[28] == (b ? 8'h45 : 8'h20);
  endfunction

  initial begin
    int p0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!wrong && !vdout, "outputs idle after reset");
    // demonstration: one frame
    send(7'b1000100, 15'b011000010000000, 0);
    repeat (60) @(posedge clk);
    // demonstration: two frames alternating, back to back
    for (int k = 0; k < 6; k++)
      if (k % 2 == 0) send(7'b0100010, 15'b011000010000000, 0);
      else            send(7'b0011101, 15'b100001000100000, 0);
    // random traffic
    for (int k = 0; k < 2000; k++)
      send(7'($urandom), rand_err(k % 4), (k % 5) == 4);
    repeat (LAT + 20) @(posedge clk);
    check(expq.size() == 0, "every frame came out");
    // display: wait for two complete passes after the last frame
    p0 = passes;
    wait (passes >= p0 + 2);
    check(shows(last_in, last_out, last_bad), "LCD shows last input and output frame");
    $display("frames=%0d clean=%0d one=%0d two=%0d uncorrectable=%0d back_to_back=%0d gapped=%0d lcd_passes=%0d",
             n_frames, n_clean, n_one, n_two, n_unc, n_b2b, n_gap, passes);
    check(n_clean > 0, "clean frame seen");
    check(n_one > 0, "single correction seen");
    check(n_two > 0, "double correction seen");
    check(n_unc > 0, "uncorrectable frame seen");
    check(n_b2b > 0, "back-to-back frames seen");
    check(n_gap > 0, "gapped frames seen");
    check(passes > 0, "display refreshed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
