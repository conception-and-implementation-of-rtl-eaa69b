// bch_chien: serial Chien search for the BCH(15,7,5) decoder.
//
// Bit r_j (coefficient of x^j) is in error when alpha^-j is a root of the
// error locator Lambda(x) = 1 + L1 x + L2 x^2. The search steps through
// the positions in transmission order, j = 14 down to 0, one per cycle. Two
// registers hold the terms L_i * alpha^(-j*i); at load they are set for
// j = 14 (alpha^-14i = alpha^i) and every step multiplies term i by the
// constant alpha^i. A position is flagged when 1 + term1 + term2 = 0.
//
// Patterns the locator cannot describe are masked at load, so that no bit is
// flipped for them: L > T, a leading coefficient L_L = 0, or L = 2 with
// L1 = 0 (a double root). Such words are reported by fail_early.
//
// Interface: load (one cycle, while ready is high) takes sigma/len. ready
// is also high in the last cycle of a search, so searches can follow each
// other without a gap. During the
// next 15 cycles valid is high, err gives the flag for position 14, 13, ..
// 0, and last marks position 0. len_o and fail_early hold the values of the
// loaded locator for the whole search.
//
// The serial search follows the decoder structure of the original design; the
// transmission order, the masking rule and the timing are this design's
// choices.
module bch_chien
  import bch_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  sigma_t     sigma,
  input  logic [2:0] len,
  output logic       ready,
  output logic       valid,
  output logic       err,
  output logic       last,
  output logic [2:0] len_o,
  output logic       fail_early
);

  localparam gf_t A1 = gf_alpha(1);
  localparam gf_t A2 = gf_alpha(2);

  gf_t        t1, t2;
  logic       busy;
  logic [3:0] pos;
  logic       mask_d;

  always_comb begin
    mask_d = 1'b0;
    if (len > 3'(T)) mask_d = 1'b1;
    else if (len != 3'd0 && sigma[len] == '0) mask_d = 1'b1;
    else if (len == 3'd2 && sigma[1] == '0) mask_d = 1'b1;
    // a locator of degree above L cannot come out of the solver; guard anyway
    for (int i = T + 1; i <= T2; i++)
      if (sigma[i] != '0) mask_d = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      t1         <= '0;
      t2         <= '0;
      pos        <= '0;
      len_o      <= '0;
      fail_early <= 1'b0;
    end else begin
      if (load && ready) begin
        busy       <= 1'b1;
        pos        <= 4'(N - 1);
        t1         <= gf_mul(sigma[1], A1);
        t2         <= gf_mul(sigma[2], A2);
        len_o      <= len;
        fail_early <= mask_d;
      end else if (busy) begin
        t1 <= gf_mul(t1, A1);
        t2 <= gf_mul(t2, A2);
        if (pos == '0) busy <= 1'b0;
        else           pos  <= pos - 4'd1;
      end
    end
  end

  assign ready = !busy || (pos == '0);
  assign valid = busy;
  assign last  = busy && (pos == '0);
  assign err   = busy && !fail_early && ((gf_t'(1) ^ t1 ^ t2) == '0);

  a_no_reload: assert property (@(posedge clk) disable iff (!rst_n) !(load && !ready));

endmodule
