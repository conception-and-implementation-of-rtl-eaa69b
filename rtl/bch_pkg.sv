// bch_pkg: shared constants, types and GF(2^4) arithmetic for the binary
// BCH(15,7,5) code.
//
// The code has length N = 2^M - 1 = 15, K = 7 message bits and corrects
// T = 2 errors. Its generator polynomial is the least common multiple of the
// minimal polynomials of alpha and alpha^3:
//   g(x) = (x^4 + x + 1)(x^4 + x^3 + x^2 + x + 1) = x^8 + x^7 + x^6 + x^4 + 1.
// The field GF(16) is built on the primitive polynomial p(x) = x^4 + x + 1
// with alpha a root of p; an element is a 4-bit vector of polynomial-basis
// coefficients (bit i = coefficient of alpha^i).
//
// The code parameters (15, 7, 5) are the ones the original design specifies; the choice
// of p(x) is this design's own (the usual primitive polynomial for GF(16)).
// All functions are purely combinational and synthesise to XOR/AND networks.
package bch_pkg;

  localparam int M      = 4;          // bits per field element
  localparam int N      = 15;         // code length
  localparam int K      = 7;          // message bits
  localparam int NK     = N - K;      // parity bits (degree of g)
  localparam int T      = 2;          // correctable errors
  localparam int T2     = 2 * T;      // syndromes needed / BM iterations

  // g(x), bit i = coefficient of x^i
  localparam logic [NK:0] G_POLY = 9'b1_1101_0001;
  // p(x) without the x^4 term
  localparam logic [M-1:0] P_LOW = 4'b0011;

  typedef logic [M-1:0] gf_t;

  // Error locator polynomial, coefficient i of x^i. Degree up to 2T is kept
  // so that a failing (uncorrectable) solution can still be represented.
  typedef gf_t sigma_t [T2+1];

  // multiply by alpha (shift and reduce by p(x))
  function automatic gf_t gf_mulx(gf_t a);
    return {a[M-2:0], 1'b0} ^ (a[M-1] ? P_LOW : '0);
  endfunction

  // general multiplication: shift-and-add over the bits of b
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t acc = '0;
    gf_t sh  = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) acc ^= sh;
      sh = gf_mulx(sh);
    end
    return acc;
  endfunction

  function automatic gf_t gf_sq(gf_t a);
    return gf_mul(a, a);
  endfunction

  // inverse: a^-1 = a^14 = a^2 * a^4 * a^8 (0 maps to 0)
  function automatic gf_t gf_inv(gf_t a);
    gf_t a2 = gf_sq(a);
    gf_t a4 = gf_sq(a2);
    gf_t a8 = gf_sq(a4);
    return gf_mul(gf_mul(a2, a4), a8);
  endfunction

  // alpha^e for 0 <= e (reduced mod 15)
  function automatic gf_t gf_alpha(int e);
    gf_t r = 4'b0001;
    for (int i = 0; i < (e % N); i++) r = gf_mulx(r);
    return r;
  endfunction

endpackage
