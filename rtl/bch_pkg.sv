// bch_pkg -- code constants and generator-polynomial arithmetic for the
// binary BCH(31,16) code (t = 3) used by the unfolded-LFSR encoder.
//
// The generator polynomial is not typed in as a number: it is derived at
// elaboration time the way the code is constructed on paper.
//   1. The primitive polynomial p(x) = x^5 + x^2 + 1 defines GF(2^5), with
//      alpha a root of p(x).
//   2. The minimal polynomial of a field element beta is the product of
//      (x + beta^(2^i)) over its distinct conjugates beta, beta^2, beta^4, ...
//      Its coefficients always fall in GF(2).
//   3. g(x) is the least common multiple of the minimal polynomials of
//      alpha^1 .. alpha^(2t); as each minimal polynomial is irreducible, this
//      is the product of the distinct ones (those of alpha, alpha^3, alpha^5).
// The result, BCH_G = 16'h8FAF, is
//   g(x) = x^15 + x^11 + x^10 + x^9 + x^8 + x^7 + x^5 + x^3 + x^2 + x + 1.
// Polynomials are held as bit vectors with bit i the coefficient of x^i.
// The code sizes (n = 31, k = 16, t = 3, p(x)) are those of the design; the
// way the arithmetic is written is this implementation's own.
package bch_pkg;

  localparam int unsigned BCH_M = 5;                  // field GF(2^m)
  localparam int unsigned BCH_N = (1 << BCH_M) - 1;   // code length, 31
  localparam int unsigned BCH_K = 16;                 // message bits
  localparam int unsigned BCH_T = 3;                  // correctable errors
  localparam int unsigned BCH_R = BCH_N - BCH_K;      // parity bits, 15

  // Primitive polynomial x^5 + x^2 + 1.
  localparam logic [BCH_M:0] BCH_P = 6'b100101;

  typedef logic [BCH_M-1:0] gf_t;   // element of GF(2^5), polynomial basis

  // Product of two field elements, reduced modulo p(x).
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t r;
    gf_t s;
    r = '0;
    s = a;
    for (int i = 0; i < BCH_M; i++) begin
      if (b[i]) r ^= s;
      s = s[BCH_M-1] ? ((s << 1) ^ BCH_P[BCH_M-1:0]) : (s << 1);
    end
    return r;
  endfunction

  // alpha^e
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r;
    r = gf_t'(1);
    for (int unsigned i = 0; i < e; i++) r = gf_mul(r, gf_t'(2));
    return r;
  endfunction

  // Minimal polynomial of alpha^s over GF(2): product of (x + c) over the
  // cyclotomic conjugates c of alpha^s.  Degree is at most m.
  function automatic logic [BCH_M:0] min_poly(int unsigned s);
    gf_t [BCH_M:0] c;       // coefficients in GF(2^5), c[i] multiplies x^i
    gf_t           beta;
    gf_t           conj;
    logic [BCH_M:0] res;
    c    = '0;
    c[0] = gf_t'(1);
    beta = gf_alpha_pow(s);
    conj = beta;
    for (int unsigned d = 0; d < BCH_M; d++) begin
      // multiply the running product by (x + conj)
      for (int k = BCH_M; k >= 1; k--) c[k] = c[k-1] ^ gf_mul(conj, c[k]);
      c[0] = gf_mul(conj, c[0]);
      conj = gf_mul(conj, conj);
      if (conj == beta) break;
    end
    for (int k = 0; k <= BCH_M; k++) res[k] = c[k][0];
    return res;
  endfunction

  // Carry-less (GF(2)) product of two polynomials.
  function automatic logic [31:0] poly_mul(logic [31:0] a, logic [31:0] b);
    logic [31:0] r;
    r = '0;
    for (int i = 0; i < 32; i++) if (b[i]) r ^= (a << i);
    return r;
  endfunction

  // g(x) = LCM of the minimal polynomials of alpha^1 .. alpha^(2t).
  function automatic logic [31:0] gen_poly(int unsigned t);
    logic [31:0]        g;
    logic [BCH_M:0]     mp;
    logic [BCH_M:0]     used [2*BCH_T+1];
    int unsigned        n_used;
    bit                 seen;
    g      = 32'd1;
    n_used = 0;
    for (int unsigned s = 1; s <= 2 * t; s++) begin
      mp   = min_poly(s);
      seen = 1'b0;
      for (int unsigned u = 0; u < n_used; u++) if (used[u] == mp) seen = 1'b1;
      if (!seen) begin
        used[n_used] = mp;
        n_used++;
        g = poly_mul(g, 32'(mp));
      end
    end
    return g;
  endfunction

  // Generator polynomial of BCH(31,16): 16'h8FAF.
  localparam logic [31:0]    BCH_G_FULL = gen_poly(BCH_T);
  localparam logic [BCH_R:0] BCH_G      = BCH_G_FULL[BCH_R:0];

endpackage
