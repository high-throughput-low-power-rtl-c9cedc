// bch_pkg: shared constants and elaboration-time functions for the binary
// BCH encoder/decoder over GF(2^m).
//
// Field elements are in the polynomial (standard) basis: bit j of an element
// is the coefficient of alpha^j. A field polynomial is given with all m+1
// coefficients, bit m being the x^m term, e.g. 'h43 = x^6 + x + 1.
//
// The functions here are only evaluated while the design elaborates: they
// turn (m, t, p(x)) into the constant masks of the XOR trees in the syndrome
// unit, the Chien search and the encoder, so the netlist itself contains no
// table. The defaults are the configuration the design was built for:
// m = 6 (n = 63) and t = 3, the BCH(63,45) code. The field polynomial
// x^6 + x + 1 is this design's choice: it is the standard primitive trinomial
// for m = 6 (x^6 + x^3 + 1, the other trinomial of that degree, is
// irreducible but not primitive, so alpha would have order 9, not 63).
package bch_pkg;

  // Largest field order supported by the helper functions.
  localparam int unsigned MAXM = 12;
  // Largest generator-polynomial degree supported (m*t).
  localparam int unsigned GMAX = 127;

  localparam int unsigned DEF_M    = 6;
  localparam int unsigned DEF_T    = 3;
  localparam logic [MAXM:0] DEF_POLY = 13'h43;  // x^6 + x + 1

  // Signed width for the riBM k counter (ranges over about -2t .. 2t).
  localparam int unsigned KW = 8;
  typedef logic signed [KW-1:0] kval_t;

  typedef logic [MAXM-1:0] gfe_t;     // field element, low m bits used
  typedef logic [GMAX:0]   gpoly_t;   // binary polynomial, bit i = x^i

  // Field multiply by shift-and-add with reduction by poly.
  function automatic gfe_t gf_mul(gfe_t a, gfe_t b, int unsigned m,
                                  logic [MAXM:0] poly);
    gfe_t acc = '0;
    gfe_t sh  = a;
    for (int unsigned i = 0; i < m; i++) begin
      if (b[i]) acc ^= sh;
      // sh = sh * alpha
      if (sh[m-1]) sh = ((sh << 1) ^ gfe_t'(poly)) & gfe_t'((1 << m) - 1);
      else         sh = (sh << 1) & gfe_t'((1 << m) - 1);
    end
    return acc;
  endfunction

  // alpha^e, e taken modulo 2^m - 1.
  function automatic gfe_t alpha_pow(int unsigned e, int unsigned m,
                                     logic [MAXM:0] poly);
    gfe_t r = gfe_t'(1);
    int unsigned n = (1 << m) - 1;
    for (int unsigned i = 0; i < e % n; i++)
      r = gf_mul(r, gfe_t'(2), m, poly);
    return r;
  endfunction

  // Marks the exponents j (0 <= j < n) whose alpha^j is a root of g(x):
  // the union of the cyclotomic cosets of 1, 3, ..., 2t-1 (eq. 2.6).
  function automatic logic [4095:0] root_set(int unsigned m, int unsigned t);
    logic [4095:0] s = '0;
    int unsigned n = (1 << m) - 1;
    for (int unsigned i = 1; i <= 2 * t - 1; i += 2) begin
      int unsigned e = i % n;
      for (int unsigned c = 0; c < m; c++) begin
        s[e] = 1'b1;
        e = (2 * e) % n;
      end
    end
    return s;
  endfunction

  // Degree of g(x), i.e. the number of parity bits n - k.
  function automatic int unsigned gen_degree(int unsigned m, int unsigned t);
    logic [4095:0] s = root_set(m, t);
    int unsigned d = 0;
    for (int unsigned j = 0; j < (1 << m) - 1; j++) if (s[j]) d++;
    return d;
  endfunction

  // Generator polynomial g(x) = prod (x + alpha^j) over the root set.
  // Its coefficients lie in GF(2); bit i of the result is the x^i term.
  function automatic gpoly_t gen_poly(int unsigned m, int unsigned t,
                                      logic [MAXM:0] poly);
    gfe_t c [GMAX+1];
    logic [4095:0] s = root_set(m, t);
    int unsigned deg = 0;
    gpoly_t g = '0;
    for (int i = 0; i <= int'(GMAX); i++) c[i] = '0;
    c[0] = gfe_t'(1);
    for (int unsigned j = 0; j < (1 << m) - 1; j++) begin
      if (s[j]) begin
        gfe_t aj = alpha_pow(j, m, poly);
        // c(x) <- c(x) * (x + aj)
        for (int i = int'(deg) + 1; i >= 1; i--)
          c[i] = c[i-1] ^ gf_mul(c[i], aj, m, poly);
        c[0] = gf_mul(c[0], aj, m, poly);
        deg++;
      end
    end
    for (int unsigned i = 0; i <= deg; i++) g[i] = c[i][0];
    return g;
  endfunction

  // x^e mod g(x) for a binary g of degree deg.
  function automatic gpoly_t xpow_mod(int unsigned e, gpoly_t g,
                                      int unsigned deg);
    gpoly_t r = gpoly_t'(1);
    for (int unsigned i = 0; i < e; i++) begin
      r = r << 1;
      if (r[deg]) r ^= g;
    end
    return r;
  endfunction

endpackage
