// bch_top: BCH(15,7,5) encode / channel / decode chain with display.
//
// A 7-bit message frame is taken in parallel, sent bit-serially through the
// systematic encoder, disturbed by a 15-bit error pattern (each set bit of
// the pattern inverts the codeword bit at that position, like a binary
// symmetric channel would), decoded, and handed back in parallel. Up to two
// inverted bits per codeword are corrected. The LCD shows the last input
// frame and the last output frame.
//
//   din/error --> serialiser --> encoder --> XOR mixer --> decoder
//                                                             |
//   dout/vdout/wrongnow/wrong <------- deserialiser <---------+
//
// Frame interface: din[0:6] and error[0:14] are taken when vdin && rdy.
// Index 0 is the first bit on the serial line: din[0] is the coefficient of
// x^14 of the codeword, error[i] inverts codeword bit 14-i. A new frame can
// be taken every 15 cycles (rdy is high when the serialiser is idle or in
// the last slot of the current codeword), so frames stream back to back.
// Each decoded frame leaves with a one-cycle vdout pulse, dout holding its 7
// message bits until the next one; wrongnow tells whether that frame was
// uncorrectable (then dout is the received, uncorrected message), err
// whether any error was seen in it, ncorr how many bits were corrected, and wrong is a sticky flag of any
// uncorrectable frame since reset. The latency from taking a frame to its
// vdout is 39 cycles.
//
// The chain (parallel input, serial encoder, error mixer, decoder, parallel
// output, LCD) and the signal names din, error, vdin, dout, vdout, wrongnow
// and wrong follow the original design; the exact meaning of wrongnow/wrong, the
// handshake and the timing are this design's choices. The ascending [0:n]
// ranges keep the original design's bit order.
module bch_top
  import bch_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned T_POWERON  = 750_000,
  parameter int unsigned T_INIT1    = 205_000,
  parameter int unsigned T_INIT2    = 5_000,
  parameter int unsigned T_CMD      = 2_000,
  parameter int unsigned T_CLEAR    = 82_000,
  parameter int unsigned T_NIB      = 50,
  parameter int unsigned T_E        = 12,
  parameter int unsigned T_AS       = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [0:6]  din,
  input  logic [0:14] error,
  input  logic        vdin,
  output logic        rdy,
  output logic [0:6]  dout,
  output logic        vdout,
  output logic        wrongnow,
  output logic        wrong,
  output logic        err,
  output logic [2:0]  ncorr,
  output logic        lcd_e,
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic [3:0]  lcd_d
);

  // ---------------- serialiser --------------------------------------------
  logic [0:6]  encbuf;     // message being sent
  logic [0:14] errbuf;     // its error pattern
  logic [0:6]  shown_in;   // last accepted frame, for the display
  logic [3:0]  slot;       // codeword position being produced, 0..14
  logic        busy;
  logic        take;

  assign rdy  = !busy || (slot == 4'(N - 1));
  assign take = vdin && rdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      encbuf   <= '0;
      errbuf   <= '0;
      shown_in <= '0;
      slot     <= '0;
      busy     <= 1'b0;
    end else begin
      if (take) begin
        encbuf   <= din;
        errbuf   <= error;
        shown_in <= din;
        slot     <= '0;
        busy     <= 1'b1;
      end else if (busy) begin
        if (slot == 4'(N - 1)) busy <= 1'b0;
        else                   slot <= slot + 4'd1;
      end
    end
  end

  // ---------------- encoder -----------------------------------------------
  logic enc_in_valid, enc_in_bit, enc_ready;
  logic enc_valid, enc_bit, enc_last;

  assign enc_in_valid = busy && (slot < 4'(K));
  assign enc_in_bit   = encbuf[slot[2:0]];

  bch_encoder u_enc (
    .clk, .rst_n, .in_valid(enc_in_valid), .in_bit(enc_in_bit),
    .in_ready(enc_ready), .out_valid(enc_valid), .out_bit(enc_bit),
    .out_last(enc_last)
  );

  // ---------------- error mixer (aligned with the encoder's register) ------
  logic err_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_bit <= 1'b0;
    else        err_bit <= busy && errbuf[slot];
  end

  // ---------------- decoder -----------------------------------------------
  logic       dec_valid, dec_bit, dec_last, dec_fail, dec_detected;
  logic [2:0] dec_nerr;

  bch_decoder #(.FIFO_DEPTH(FIFO_DEPTH)) u_dec (
    .clk, .rst_n, .in_valid(enc_valid), .in_bit(enc_bit ^ err_bit),
    .out_valid(dec_valid), .out_bit(dec_bit), .out_last(dec_last),
    .fail(dec_fail), .detected(dec_detected), .nerr(dec_nerr)
  );

  // ---------------- deserialiser ------------------------------------------
  logic [0:6] decbuf;
  logic [3:0] opos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decbuf   <= '0;
      opos     <= '0;
      dout     <= '0;
      vdout    <= 1'b0;
      wrongnow <= 1'b0;
      wrong    <= 1'b0;
      err      <= 1'b0;
      ncorr    <= '0;
    end else begin
      vdout <= 1'b0;
      if (dec_valid) begin
        if (opos < 4'(K)) decbuf[opos[2:0]] <= dec_bit;
        opos <= dec_last ? '0 : opos + 4'd1;
        if (dec_last) begin
          dout     <= decbuf;
          vdout    <= 1'b1;
          wrongnow <= dec_fail;
          wrong    <= wrong | dec_fail;
          err      <= dec_detected;
          ncorr    <= dec_nerr;
        end
      end
    end
  end

  // ---------------- display -----------------------------------------------
  lcd_ctrl #(
    .T_POWERON(T_POWERON), .T_INIT1(T_INIT1), .T_INIT2(T_INIT2), .T_CMD(T_CMD),
    .T_CLEAR(T_CLEAR), .T_NIB(T_NIB), .T_E(T_E), .T_AS(T_AS)
  ) u_lcd (
    .clk, .rst_n, .frame_in(shown_in), .frame_out(dout), .bad(wrongnow),
    .lcd_e, .lcd_rs, .lcd_rw, .lcd_d
  );

  // the encoder must be ready whenever a message bit is offered, and the
  // decoder's last output bit must coincide with a full deserialiser
  a_enc_ready: assert property (@(posedge clk) disable iff (!rst_n) enc_in_valid |-> enc_ready);
  a_frame_len: assert property (@(posedge clk) disable iff (!rst_n) dec_last |-> opos == 4'(N - 1));
  a_enc_frame: assert property (@(posedge clk) disable iff (!rst_n) enc_last |-> $past(busy && slot == 4'(N - 1)));

endmodule
