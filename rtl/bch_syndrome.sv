// bch_syndrome: serial syndrome calculator for the BCH(15,7,5) decoder.
//
// For a received word r(x) it evaluates S1 = r(alpha) and S3 = r(alpha^3) in
// GF(16) by Horner's rule while the bits arrive, highest degree first:
//   S <- S * alpha^j + r_i      (j = 1 for S1, j = 3 for S3).
// For a binary code the even syndromes follow from the odd ones
// (S2 = S1^2, S4 = S2^2), so only the two odd ones are accumulated, as in the
// two syndrome cells of the original synthesised decoder.
//
// Interface: in_valid/in_bit carry one received bit per valid cycle; in_first
// marks the first bit of a word (the accumulators restart) and in_last its
// 15th bit. One cycle after the last bit, syn_valid pulses and s1/s3 hold
// the syndromes of that word until the next word's last bit.
//
// The framing signals (supplied by the control unit) and the output timing
// are this design's choices.
module bch_syndrome
  import bch_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  input  logic in_first,
  input  logic in_last,
  output logic syn_valid,
  output gf_t  s1,
  output gf_t  s3
);

  localparam gf_t A3 = gf_alpha(3);

  gf_t acc1, acc3, nxt1, nxt3;

  always_comb begin
    nxt1 = (in_first ? gf_t'(0) : gf_mulx(acc1)) ^ gf_t'(in_bit);
    nxt3 = (in_first ? gf_t'(0) : gf_mul(acc3, A3)) ^ gf_t'(in_bit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1      <= '0;
      acc3      <= '0;
      s1        <= '0;
      s3        <= '0;
      syn_valid <= 1'b0;
    end else begin
      syn_valid <= 1'b0;
      if (in_valid) begin
        acc1 <= nxt1;
        acc3 <= nxt3;
        if (in_last) begin
          s1        <= nxt1;
          s3        <= nxt3;
          syn_valid <= 1'b1;
        end
      end
    end
  end

endmodule
