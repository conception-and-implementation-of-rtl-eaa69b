// bch_encoder: bit-serial systematic encoder for the BCH(15,7,5) code.
//
// A codeword is x^8 m(x) + r(x), where r(x) is the remainder of x^8 m(x)
// divided by g(x) = x^8 + x^7 + x^6 + x^4 + 1. The remainder is formed in an
// 8-stage linear feedback shift register whose taps are the coefficients of
// g(x) (the divider circuit of the classic cyclic-code encoder):
//   - message phase (7 bits): every message bit goes straight to the output
//     and, added to the last register stage, is fed back into the taps;
//   - parity phase (8 bits): feedback is cut and the register is shifted out,
//     highest-degree stage first.
// Bits travel highest degree first: the first message bit is the coefficient
// of x^14, the last parity bit the coefficient of x^0.
//
// Interface: in_ready is high during the 7 message slots of a codeword; a bit
// is taken when in_valid && in_ready. The message bits may come with gaps.
// After the 7th bit the 8 parity bits follow on the next 8 cycles without a
// pause, while in_ready is low. The output is registered: out_valid/out_bit
// follow an accepted message bit or a parity slot by one cycle, and out_last
// marks the 15th bit of a codeword.
//
// The LFSR structure and the two-phase switching follow the encoder circuit
// of the original design; the valid/ready handshake and the output register (one
// flip-flop, as in the original synthesised encoder) are this design's choices.
module bch_encoder
  import bch_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  output logic out_valid,
  output logic out_bit,
  output logic out_last
);

  logic [NK-1:0] lfsr;      // remainder register, bit i = coefficient of x^i
  logic [3:0]    cnt;       // position in the codeword, 0..14
  logic          msg_phase;
  logic          fb;

  assign msg_phase = (cnt < 4'(K));
  assign in_ready  = msg_phase;
  assign fb        = in_bit ^ lfsr[NK-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (msg_phase) begin
        if (in_valid) begin
          // switch 1 closed: divide; switch 2 on the message
          lfsr      <= {lfsr[NK-2:0], 1'b0} ^ (fb ? G_POLY[NK-1:0] : '0);
          out_bit   <= in_bit;
          out_valid <= 1'b1;
          cnt       <= cnt + 4'd1;
        end
      end else begin
        // switch 1 open: shift the remainder out
        lfsr      <= {lfsr[NK-2:0], 1'b0};
        out_bit   <= lfsr[NK-1];
        out_valid <= 1'b1;
        if (cnt == 4'(N - 1)) begin
          cnt      <= '0;
          out_last <= 1'b1;
        end else begin
          cnt <= cnt + 4'd1;
        end
      end
    end
  end

endmodule
