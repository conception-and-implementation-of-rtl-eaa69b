// tb_lcd_ctrl: checks the LCD controller with shortened delays. A model of
// the display side samples lcd_d/lcd_rs at every falling edge of lcd_e,
// pairs nibbles into bytes after the 4-bit initialisation and keeps a
// 2x16 character memory. Checked: the power-on wait, the initialisation
// nibbles 3,3,3,2, the commands 0x28 0x06 0x0C 0x01, the enable pulse width,
// the pauses after a nibble and after clear, lcd_rw low, data stable while
// lcd_e is high, and the text of both lines before and after the shown
// frames change.
module tb_lcd_ctrl;
  localparam int TPO = 100, TI1 = 50, TI2 = 20, TC = 10, TCL = 30, TN = 4, TE = 3, TAS = 2;
  logic clk = 0, rst_n = 0;
  logic [0:6] frame_in = 7'b1000100, frame_out = 7'b1000100;
  logic bad = 0;
  logic lcd_e, lcd_rs, lcd_rw;
  logic [3:0] lcd_d;
  int checks = 0, failures = 0;

  lcd_ctrl #(.T_POWERON(TPO), .T_INIT1(TI1), .T_INIT2(TI2), .T_CMD(TC), .T_CLEAR(TCL),
             .T_NIB(TN), .T_E(TE), .T_AS(TAS)) dut (.*);
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

  // display model
  int cyc = 0, e_rise = 0, last_fall = -1000, nnib = 0, nbytes = 0, line_writes = 0;
  logic [3:0] hi;
  logic [7:0] cmds [$];
  logic [7:0] ddram [2][16];
  int addr = 0, last_gap = 0, hi_gap = 0, clear_waits = 0;
  logic [7:0] last_byte = 0;
  logic [3:0] d_at_rise;
  logic rs_at_rise;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) check(!lcd_rw, "write only");
  end

  always @(posedge lcd_e) if (rst_n) begin
    e_rise = cyc;
    d_at_rise = lcd_d;
    rs_at_rise = lcd_rs;
    if (nnib == 0) check(cyc > TPO, "power-on wait");
    // pause since the previous strobe
    if (nnib > 0) last_gap = e_rise - last_fall;
  end

  always @(negedge lcd_e) if (rst_n) begin
    check(cyc - e_rise == TE, $sformatf("enable width %0d", cyc - e_rise));
    check(lcd_d == d_at_rise && lcd_rs == rs_at_rise, "bus stable while enable high");
    if (nnib > 0) check(last_gap >= TN, "pause between strobes");
    last_fall = cyc;
    if (nnib < 4) begin
      check(lcd_d == ((nnib == 3) ? 4'h2 : 4'h3) && !lcd_rs, "initialisation nibble");
    end else if ((nnib - 4) % 2 == 0) begin
      hi = lcd_d;
      hi_gap = last_gap;
    end else begin
      logic [7:0] b;
      b = {hi, lcd_d};
      if (last_byte == 8'h01 && nbytes == 4) begin
        check(hi_gap >= TCL, "wait after clear");
        clear_waits++;
      end
      if (!lcd_rs) begin
        cmds.push_back(b);
        if (b[7]) addr = (b[6] ? 16 : 0) + int'(b[3:0]);
      end else begin
        if (addr < 32) ddram[addr / 16][addr % 16] = b;
        addr++;
        if (addr == 16 || addr == 32) line_writes++;
      end
      last_byte = b;
      nbytes++;
    end
    nnib++;
  end

  function automatic string line(int l);
    string s = "";
    for (int i = 0; i < 16; i++) s = {s, string'(ddram[l][i])};
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (line_writes == 2);
    check(cmds.size() >= 6, "commands sent");
    check(clear_waits == 1, "clear command followed by a command");
    if (cmds.size() >= 6) begin
      check(cmds[0] == 8'h28 && cmds[1] == 8'h06 && cmds[2] == 8'h0C && cmds[3] == 8'h01,
            "function set, entry mode, display on, clear");
      check(cmds[4] == 8'h80 && cmds[5] == 8'hC0, "line addresses");
    end
    check(line(0) == "IN  1000100     ", {"line 1: ", line(0)});
    check(line(1) == "OUT 1000100     ", {"line 2: ", line(1)});
    // new frames: the display follows within one refresh pass
    frame_in  = 7'b0100010;
    frame_out = 7'b0011101;
    bad       = 1;
    wait (line_writes == 6);
    check(line(0) == "IN  0100010     ", {"line 1: ", line(0)});
    check(line(1) == "OUT 0011101 ERR ", {"line 2: ", line(1)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
