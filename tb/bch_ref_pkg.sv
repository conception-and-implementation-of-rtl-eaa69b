// bch_ref_pkg: reference model of the BCH(15,7,5) code for the testbenches.
//
// Words are 15-bit vectors with bit i the coefficient of x^i. The model is
// written independently of the RTL: field elements come from an
// exponent table of GF(16) (p(x) = x^4 + x + 1) built by integer arithmetic,
// encoding is long division by g(x) = x^8 + x^7 + x^6 + x^4 + 1, and
// decoding is exhaustive: the received word is compared with all 128
// codewords and corrected only if one lies within Hamming distance 2
// (bounded-distance decoding); otherwise it is reported as uncorrectable
// and left as received.
package bch_ref_pkg;

  function automatic int exp_tab(int e);
    int v = 1;
    for (int i = 0; i < (e % 15); i++) begin
      v = v << 1;
      if (v & 16) v = v ^ 'h13;
    end
    return v;
  endfunction

  function automatic int log_tab(int v);
    for (int e = 0; e < 15; e++) if (exp_tab(e) == v) return e;
    return -1;
  endfunction

  function automatic int mul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return exp_tab((log_tab(a) + log_tab(b)) % 15);
  endfunction

  // systematic codeword for message m (bit i of m = coefficient of x^(8+i))
  function automatic logic [14:0] encode(logic [6:0] m);
    logic [14:0] r = {m, 8'b0};
    for (int i = 14; i >= 8; i--)
      if (r[i]) r = r ^ (15'h1D1 << (i - 8));
    return {m, r[7:0]};
  endfunction

  // r(alpha^j)
  function automatic int eval(logic [14:0] r, int j);
    int s = 0;
    for (int i = 0; i < 15; i++) if (r[i]) s ^= exp_tab((i * j) % 15);
    return s;
  endfunction

  function automatic int weight(logic [14:0] v);
    int w = 0;
    for (int i = 0; i < 15; i++) w += int'(v[i]);
    return w;
  endfunction

  // bounded-distance decoding, t = 2
  function automatic void decode(input logic [14:0] r, output logic [14:0] c, output bit fail);
    c    = r;
    fail = 1;
    for (int m = 0; m < 128; m++) begin
      logic [14:0] cw = encode(7'(m));
      if (weight(cw ^ r) <= 2) begin
        c    = cw;
        fail = 0;
      end
    end
  endfunction

  // coefficients of prod (1 + alpha^j x) over the set bits j of e
  function automatic void locator(input logic [14:0] e, output int lam [5]);
    foreach (lam[i]) lam[i] = 0;
    lam[0] = 1;
    for (int j = 0; j < 15; j++) begin
      if (e[j]) begin
        int a = exp_tab(j);
        for (int i = 4; i >= 1; i--) lam[i] = lam[i] ^ mul(lam[i-1], a);
      end
    end
  endfunction

  // random word of the given weight
  function automatic logic [14:0] rand_pattern(int w);
    logic [14:0] e = '0;
    while (weight(e) < w) e[$urandom_range(14, 0)] = 1'b1;
    return e;
  endfunction

endpackage
