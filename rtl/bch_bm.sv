// bch_bm: Berlekamp-Massey key-equation solver for the BCH(15,7,5) decoder.
//
// From the syndromes S1..S4 it finds the shortest linear feedback shift
// register, i.e. the error locator polynomial Lambda(x) of least degree L,
// that generates the syndrome sequence. One iteration per clock cycle,
// n = 0 .. 2T-1:
//   d = sum_{j=0..L} Lambda_j * S_{n+1-j}              (discrepancy)
//   if d != 0:
//     Lambda' = Lambda - d * D(x)
//     if 2L < n+1:  L' = n+1-L,  D(x) = Lambda(x) / d   (old Lambda)
//   D(x) = x * D(x)
// starting from Lambda(x) = 1, D(x) = x, L = 0. D(x) is the correction
// polynomial. For an error pattern of weight e <= T, Lambda has degree L = e
// and its roots are the inverses of the error locations.
//
// Interface: start (one cycle, while busy is low) latches syn[0..3] =
// S1..S4. done pulses 2T = 4 cycles later; sigma and len then hold the
// result until the next start. Lambda is kept up to degree 2T so that an
// uncorrectable pattern (L > T) is reported as such.
//
// The iteration follows the flow chart of the algorithm given for the original
// design (initialisation, discrepancy, update, length change, shift of
// D(x)). Where that chart's length-change and stop tests disagree with each
// other, the standard Massey rules above are used and the loop runs once per
// syndrome (2T iterations). Doing one full iteration per
// cycle with a combinational GF(16) inverse is this design's choice.
module bch_bm
  import bch_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  gf_t    syn [T2],     // syn[i] = S_{i+1}
  output logic   busy,
  output logic   done,
  output sigma_t sigma,
  output logic [2:0] len
);

  gf_t        s_q [T2];
  sigma_t     lam_q, dpol_q, lam_d, dpol_d;
  logic [2:0] len_q, len_d;
  logic [1:0] n_q;
  gf_t        disc, dinv;

  // discrepancy for iteration n_q
  always_comb begin
    disc = '0;
    for (int j = 0; j <= T2 - 1; j++) begin
      if (j <= int'(n_q))
        disc ^= gf_mul(lam_q[j], s_q[int'(n_q) - j]);
    end
    dinv = gf_inv(disc);
  end

  // one iteration of the update
  always_comb begin
    lam_d  = lam_q;
    dpol_d = dpol_q;
    len_d  = len_q;
    if (disc != '0) begin
      for (int i = 0; i <= T2; i++) lam_d[i] = lam_q[i] ^ gf_mul(disc, dpol_q[i]);
      if ({len_q, 1'b0} < ({1'b0, n_q} + 3'd1)) begin
        len_d = {1'b0, n_q} + 3'd1 - len_q;
        for (int i = 0; i <= T2; i++) dpol_d[i] = gf_mul(lam_q[i], dinv);
      end
    end
    // D(x) <- x * D(x)
    for (int i = T2; i >= 1; i--) dpol_d[i] = dpol_d[i-1];
    dpol_d[0] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      n_q   <= '0;
      len_q <= '0;
      for (int i = 0; i <= T2; i++) begin
        lam_q[i]  <= '0;
        dpol_q[i] <= '0;
      end
      for (int i = 0; i < T2; i++) s_q[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        n_q   <= '0;
        len_q <= '0;
        for (int i = 0; i <= T2; i++) begin
          lam_q[i]  <= (i == 0) ? gf_t'(1) : gf_t'(0);
          dpol_q[i] <= (i == 1) ? gf_t'(1) : gf_t'(0);
        end
        for (int i = 0; i < T2; i++) s_q[i] <= syn[i];
      end else if (busy) begin
        lam_q  <= lam_d;
        dpol_q <= dpol_d;
        len_q  <= len_d;
        n_q    <= n_q + 2'd1;
        if (n_q == 2'(T2 - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign sigma = lam_q;
  assign len   = len_q;

  // a new word must not arrive while the previous one is being solved
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy));

endmodule
