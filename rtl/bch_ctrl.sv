// bch_ctrl: control unit of the BCH(15,7,5) decoder.
//
// It frames the incoming bit stream and hands each word from one decoder
// stage to the next, so that three words can be in flight: one entering the
// syndrome calculator, one in the Berlekamp-Massey solver and one in the
// Chien search and correction.
//   - A counter over the valid input bits marks the first and the 15th bit
//     of every word (in_first, in_last) for the syndrome calculator.
//   - When the syndromes of a word are ready (syn_valid) the solver is
//     started (bm_start).
//   - When the solver is done, its result waits in a pending flag until the
//     Chien search is ready (idle or in its last cycle), which then loads it (chien_load).
// With at most one input bit per cycle the solver (4 cycles) and the search
// (15 cycles) always keep up, so the pending flag is a safeguard rather than
// a regular stall; assertions check that no stage is restarted while busy.
//
// The presence of a control unit driving the syndrome, solver and search
// stages follows the original design; its sequencing is this design's own.
module bch_ctrl
  import bch_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_first,
  output logic in_last,
  input  logic syn_valid,
  output logic bm_start,
  input  logic bm_busy,
  input  logic bm_done,
  input  logic chien_ready,
  output logic chien_load
);

  logic [3:0] bitcnt;
  logic       pending;

  assign in_first   = in_valid && (bitcnt == '0);
  assign in_last    = in_valid && (bitcnt == 4'(N - 1));
  assign bm_start   = syn_valid && !bm_busy;
  assign chien_load = (pending || bm_done) && chien_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt  <= '0;
      pending <= 1'b0;
    end else begin
      if (in_valid) bitcnt <= in_last ? '0 : bitcnt + 4'd1;
      if (chien_load)   pending <= 1'b0;
      else if (bm_done) pending <= 1'b1;
    end
  end

  a_bm_free: assert property (@(posedge clk) disable iff (!rst_n) bm_start |-> !bm_busy);
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) !(bm_done && pending));

endmodule
