// bch_correct: error correction stage of the BCH(15,7,5) decoder.
//
// It adds (XORs) the error pattern found by the Chien search to the received
// bits read back from the buffer, c_j = r_j + e_j, and registers the result.
// It also counts the flipped bits of the word. A word is declared
// uncorrectable when the search masked it (fail_early) or when the number
// of roots found differs from the degree L of the error locator; in both
// cases no bit has been flipped (a locator of degree 2 without roots flips
// nothing), so an uncorrectable word leaves unchanged.
//
// Interface: in_valid/r_bit/e_bit/in_last come from the Chien search and the
// buffer in the same cycle; len and fail_early are those of the word being
// searched. One cycle later out_valid/out_bit/out_last follow; together with
// out_last come fail (uncorrectable), detected (the syndromes were not all
// zero, i.e. L > 0) and nerr (bits corrected).
//
// The XOR of the pattern onto the delayed word follows the decoder
// structure of the original design; the reporting flags are this design's choice.
module bch_correct
  import bch_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       r_bit,
  input  logic       e_bit,
  input  logic       in_last,
  input  logic [2:0] len,
  input  logic       fail_early,
  output logic       out_valid,
  output logic       out_bit,
  output logic       out_last,
  output logic       fail,
  output logic       detected,
  output logic [2:0] nerr
);

  logic [2:0] flips_q, flips_d;

  assign flips_d = flips_q + 3'(e_bit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flips_q   <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
      fail      <= 1'b0;
      detected  <= 1'b0;
      nerr      <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        out_bit <= r_bit ^ e_bit;
        if (in_last) begin
          flips_q  <= '0;
          nerr     <= flips_d;
          detected <= (len != 3'd0);
          fail     <= fail_early || (flips_d != len);
        end else begin
          flips_q <= flips_d;
        end
      end
    end
  end

endmodule
