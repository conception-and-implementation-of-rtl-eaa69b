// lcd_ctrl: drives a 2x16 character LCD (HD44780-compatible controller,
// 4-bit bus, write only) to show the frame entering the BCH chain and the
// frame leaving it:
//     line 1: "IN  1000100     "
//     line 2: "OUT 1000100 ERR "   (ERR only when the decoder reported an
//                                   uncorrectable word)
//
// A small sequencer walks through a fixed list of steps. After the power-on
// wait it sends the 4-bit initialisation (nibble 3 three times, then 2),
// the commands function set (0x28: 4-bit, 2 lines), entry mode (0x06),
// display on (0x0C) and clear (0x01). It then rewrites both lines forever:
// set address 0x80, 16 characters, set address 0xC0, 16 characters, so the
// display follows the inputs with a delay of one refresh pass.
// Every nibble is put on lcd_d with lcd_rs, held T_AS cycles, strobed with
// lcd_e high for T_E cycles, and followed by a pause: T_NIB cycles between
// the two nibbles of a byte, then the step's own wait (T_CMD for most,
// T_CLEAR after clear, T_INIT1/T_INIT2 during initialisation).
//
// Interface: frame_in/frame_out are the 7 message bits shown (index 0 first
// on the line), bad lights "ERR". lcd_rw is tied low (write only).
//
// The design only says that the input and output frames are shown on the
// board's LCD. The controller protocol, the text layout and the timing
// defaults (in clock cycles at 50 MHz) are this design's choices.
module lcd_ctrl #(
  parameter int unsigned T_POWERON = 750_000,  // 15 ms
  parameter int unsigned T_INIT1   = 205_000,  // 4.1 ms
  parameter int unsigned T_INIT2   = 5_000,    // 100 us
  parameter int unsigned T_CMD     = 2_000,    // 40 us
  parameter int unsigned T_CLEAR   = 82_000,   // 1.64 ms
  parameter int unsigned T_NIB     = 50,       // 1 us
  parameter int unsigned T_E       = 12,       // 240 ns
  parameter int unsigned T_AS      = 2         // 40 ns
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [0:6] frame_in,
  input  logic [0:6] frame_out,
  input  logic       bad,
  output logic       lcd_e,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic [3:0] lcd_d
);

  typedef enum logic [1:0] {K_WAIT, K_NIBBLE, K_BYTE} kind_e;

  typedef struct packed {
    kind_e       kind;
    logic        rs;
    logic [7:0]  data;
    logic [23:0] delay;   // pause after the step
  } step_t;

  typedef enum logic [2:0] {P_LOAD, P_SETUP, P_EHIGH, P_GAP, P_DONE} phase_e;

  localparam int FIRST_LOOP = 9;    // index of "set address line 1"
  localparam int LAST_STEP  = 42;

  logic [5:0]  idx;
  phase_e      phase;
  logic        lo_half;             // second nibble of a byte
  logic [23:0] timer;
  step_t       st;

  function automatic logic [7:0] bitchar(logic b);
    return b ? 8'h31 : 8'h30;       // '1' / '0'
  endfunction

  // character at column c of a line
  function automatic logic [7:0] line_char(logic second, int c, logic [0:6] f, logic e);
    logic [7:0] head [4];
    logic [7:0] tail [4];
    head = second ? '{8'h4F, 8'h55, 8'h54, 8'h20}    // "OUT "
                  : '{8'h49, 8'h4E, 8'h20, 8'h20};   // "IN  "
    tail = (second && e) ? '{8'h45, 8'h52, 8'h52, 8'h20}  // "ERR "
                         : '{8'h20, 8'h20, 8'h20, 8'h20};
    if (c < 4)       return head[c];
    else if (c < 11) return bitchar(f[c-4]);
    else if (c == 11) return 8'h20;
    else             return tail[c-12];
  endfunction

  function automatic step_t step_of(int i, logic [0:6] fi, logic [0:6] fo, logic e);
    step_t s;
    s.kind  = K_BYTE;
    s.rs    = 1'b0;
    s.data  = '0;
    s.delay = 24'(T_CMD);
    case (i)
      0:  begin s.kind = K_WAIT;   s.delay = 24'(T_POWERON); end
      1:  begin s.kind = K_NIBBLE; s.data = 8'h03; s.delay = 24'(T_INIT1); end
      2:  begin s.kind = K_NIBBLE; s.data = 8'h03; s.delay = 24'(T_INIT2); end
      3:  begin s.kind = K_NIBBLE; s.data = 8'h03; end
      4:  begin s.kind = K_NIBBLE; s.data = 8'h02; end
      5:  s.data = 8'h28;
      6:  s.data = 8'h06;
      7:  s.data = 8'h0C;
      8:  begin s.data = 8'h01; s.delay = 24'(T_CLEAR); end
      9:  s.data = 8'h80;
      26: s.data = 8'hC0;
      default: begin
        s.rs = 1'b1;
        if (i < 26) s.data = line_char(1'b0, i - 10, fi, e);
        else        s.data = line_char(1'b1, i - 27, fo, e);
      end
    endcase
    return s;
  endfunction

  assign st     = step_of(int'(idx), frame_in, frame_out, bad);
  assign lcd_rw = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      phase   <= P_LOAD;
      lo_half <= 1'b0;
      timer   <= '0;
      lcd_e   <= 1'b0;
      lcd_rs  <= 1'b0;
      lcd_d   <= '0;
    end else begin
      case (phase)
        P_LOAD: begin
          lo_half <= 1'b0;
          if (st.kind == K_WAIT) begin
            timer <= st.delay;
            phase <= P_GAP;
          end else begin
            lcd_rs <= st.rs;
            lcd_d  <= (st.kind == K_NIBBLE) ? st.data[3:0] : st.data[7:4];
            timer  <= 24'(T_AS);
            phase  <= P_SETUP;
          end
        end
        P_SETUP: begin
          if (timer <= 24'd1) begin
            lcd_e <= 1'b1;
            timer <= 24'(T_E);
            phase <= P_EHIGH;
          end else timer <= timer - 24'd1;
        end
        P_EHIGH: begin
          if (timer <= 24'd1) begin
            lcd_e <= 1'b0;
            timer <= (st.kind == K_BYTE && !lo_half) ? 24'(T_NIB) : st.delay;
            phase <= P_GAP;
          end else timer <= timer - 24'd1;
        end
        P_GAP: begin
          if (timer <= 24'd1) begin
            if (st.kind == K_BYTE && !lo_half) begin
              lo_half <= 1'b1;
              lcd_d   <= st.data[3:0];
              timer   <= 24'(T_AS);
              phase   <= P_SETUP;
            end else begin
              phase <= P_DONE;
            end
          end else timer <= timer - 24'd1;
        end
        default: begin  // P_DONE: next step
          idx   <= (idx == 6'(LAST_STEP)) ? 6'(FIRST_LOOP) : idx + 6'd1;
          phase <= P_LOAD;
        end
      endcase
    end
  end

endmodule
