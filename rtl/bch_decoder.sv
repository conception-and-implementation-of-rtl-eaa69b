// bch_decoder: bit-serial decoder for the BCH(15,7,5) code (corrects up to
// two bit errors per 15-bit word).
//
// Received words arrive one bit per valid cycle, highest degree first, and
// pass through three stages that work on consecutive words at once:
//   1. syndrome: S1 = r(alpha), S3 = r(alpha^3) are accumulated while the
//      bits arrive; S2 = S1^2 and S4 = S2^2 are derived;
//   2. key solver: Berlekamp-Massey finds the error locator Lambda(x) and its
//      degree L (4 cycles);
//   3. Chien search and correction: the 15 positions are tested in
//      transmission order and each flagged bit is flipped as the received
//      word is read back from a FIFO.
// A control unit frames the input and starts each stage. Input bits are
// written into the FIFO as they arrive, so a word leaves the FIFO exactly
// when its error flags are produced.
//
// Interface: in_valid/in_bit, one bit per cycle at most, words back to back
// or with gaps. The corrected word leaves on out_valid/out_bit, 15 bits on
// consecutive cycles, out_last with its last bit; fail, detected and nerr
// are valid with out_last. Latency from the last input bit of a word to its
// first output bit is 8 cycles (syndrome 1, solver start 1, solver 4,
// search load 1, correction register 1).
//
// The stage structure (syndrome, Berlekamp-Massey, Chien search, correction,
// FIFO, control unit) is the decoder of the original design; the timing, framing and
// reporting are this design's choices.
module bch_decoder
  import bch_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic       out_bit,
  output logic       out_last,
  output logic       fail,
  output logic       detected,
  output logic [2:0] nerr
);

  logic       in_first, in_last;
  logic       syn_valid;
  gf_t        s1, s3;
  gf_t        syn [T2];
  logic       bm_start, bm_busy, bm_done;
  sigma_t     sigma;
  logic [2:0] len;
  logic       chien_load, chien_ready, chien_valid, chien_err, chien_last;
  logic [2:0] chien_len;
  logic       chien_fail;
  logic       fifo_bit, fifo_full, fifo_empty;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  bch_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_first, .in_last,
    .syn_valid, .bm_start, .bm_busy, .bm_done,
    .chien_ready, .chien_load
  );

  bch_syndrome u_syn (
    .clk, .rst_n, .in_valid, .in_bit, .in_first, .in_last,
    .syn_valid, .s1, .s3
  );

  // even syndromes of a binary code
  always_comb begin
    syn[0] = s1;
    syn[1] = gf_sq(s1);
    syn[2] = s3;
    syn[3] = gf_sq(gf_sq(s1));
  end

  bch_bm u_bm (
    .clk, .rst_n, .start(bm_start), .syn, .busy(bm_busy), .done(bm_done),
    .sigma, .len
  );

  bch_chien u_chien (
    .clk, .rst_n, .load(chien_load), .sigma, .len,
        .ready(chien_ready), .valid(chien_valid), .err(chien_err), .last(chien_last),
    .len_o(chien_len), .fail_early(chien_fail)
  );

  bch_fifo #(.WIDTH(1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(in_valid), .wdata(in_bit), .pop(chien_valid),
    .rdata(fifo_bit), .full(fifo_full), .empty(fifo_empty), .count(fifo_count)
  );

  bch_correct u_corr (
    .clk, .rst_n, .in_valid(chien_valid), .r_bit(fifo_bit), .e_bit(chien_err),
    .in_last(chien_last), .len(chien_len), .fail_early(chien_fail),
    .out_valid, .out_bit, .out_last, .fail, .detected, .nerr
  );

  // the word being searched is always complete in the buffer
  a_fifo_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 chien_valid |-> (!fifo_empty && fifo_count <= ($bits(fifo_count))'(FIFO_DEPTH)));
  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> (!fifo_full || chien_valid));

endmodule
