// tb_gf_pkg: reference GF(2^m) arithmetic and BCH helpers for the
// testbenches, written independently of the RTL: multiplication uses
// log/antilog tables built from an integer LFSR, the generator polynomial
// is formed from minimal-polynomial products over the cosets, and the
// riBM reference is a single loop over the whole algorithm.
package tb_gf_pkg;

  int unsigned gm, gn, gpoly;
  int unsigned exp_t [4096];
  int unsigned log_t [4096];

  function automatic void gf_init(int unsigned m, int unsigned poly);
    int unsigned x = 1;
    gm = m; gn = (1 << m) - 1; gpoly = poly;
    for (int unsigned i = 0; i < gn; i++) begin
      exp_t[i] = x;
      log_t[x] = i;
      x = x << 1;
      if (x & (1 << m)) x = x ^ poly;
    end
    for (int unsigned i = gn; i < 2 * gn; i++) exp_t[i] = exp_t[i - gn];
  endfunction

  function automatic int unsigned mul(int unsigned a, int unsigned b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int unsigned apow(int unsigned e);
    return exp_t[e % gn];
  endfunction

  function automatic int unsigned rnd_elem();
    return $urandom_range(gn, 0);
  endfunction

  // r(alpha^i) by Horner's rule; r is given as a bit queue, r[j] = x^j.
  function automatic int unsigned eval_bits(bit r [], int unsigned i);
    int unsigned acc = 0;
    int unsigned a = apow(i);
    for (int j = int'(gn) - 1; j >= 0; j--) acc = mul(acc, a) ^ int'(r[j]);
    return acc;
  endfunction

  // Generator polynomial as binary coefficients, degree returned in deg.
  function automatic void gen_poly(int unsigned t, output bit g [],
                                   output int unsigned deg);
    int unsigned c [];
    bit used [];
    c = new[gn + 1];
    used = new[gn];
    foreach (c[i]) c[i] = 0;
    c[0] = 1; deg = 0;
    for (int unsigned i = 1; i < 2 * t; i += 2) begin
      int unsigned e = i % gn;
      while (!used[e]) begin
        used[e] = 1;
        for (int d = int'(deg) + 1; d >= 1; d--) c[d] = c[d-1] ^ mul(c[d], apow(e));
        c[0] = mul(c[0], apow(e));
        deg++;
        e = (e * 2) % gn;
      end
    end
    g = new[deg + 1];
    for (int unsigned i = 0; i <= deg; i++) g[i] = bit'(c[i]);
  endfunction

  // Systematic encoding by long division: codeword = m x^(n-k) + remainder.
  function automatic void encode(bit msg [], bit g [], int unsigned deg,
                                 output bit cw []);
    bit rem [];
    cw = new[gn];
    rem = new[gn];
    foreach (cw[i]) cw[i] = 0;
    foreach (msg[i]) cw[i + deg] = msg[i];
    foreach (cw[i]) rem[i] = cw[i];
    for (int j = int'(gn) - 1; j >= int'(deg); j--)
      if (rem[j]) for (int unsigned d = 0; d <= deg; d++) rem[j - deg + d] ^= g[d];
    for (int unsigned i = 0; i < deg; i++) cw[i] = rem[i];
  endfunction

  // riBM state, coefficients in int arrays (out-of-range reads give 0).
  typedef struct {
    int unsigned lam [16];
    int unsigned xb  [16];
    int unsigned dl  [32];
    int unsigned th  [32];
    int unsigned gamma;
    int          k;
  } ribm_st_t;

  function automatic ribm_st_t ribm_init(int unsigned s [], int unsigned t);
    ribm_st_t st;
    foreach (st.lam[i]) begin st.lam[i] = 0; st.xb[i] = 0; end
    foreach (st.dl[i])  begin st.dl[i] = 0;  st.th[i] = 0; end
    st.lam[0] = 1; st.xb[1] = 1;            // B = x^-1, so x^2 B = x
    for (int unsigned i = 1; i <= 2 * t; i++) begin
      st.dl[i] = s[i - 1];                  // Delta = sum S_i x^i
      st.th[i - 1] = s[i - 1];              // Theta = sum S_i x^(i-1)
    end
    st.gamma = 1; st.k = -1;
    return st;
  endfunction

  function automatic ribm_st_t ribm_step(ribm_st_t st, int unsigned t);
    ribm_st_t nx;
    int unsigned d1 = st.dl[1];
    int unsigned b [16];
    bit up = (d1 != 0) && (st.k >= -1);
    nx = st;
    for (int unsigned i = 0; i <= t; i++)
      nx.lam[i] = mul(st.gamma, st.lam[i]) ^ mul(d1, st.xb[i]);
    for (int unsigned i = 0; i < 2 * t; i++)
      nx.dl[i] = mul(st.gamma, st.dl[i + 2]) ^ mul(d1, st.th[i]);
    for (int unsigned i = 2 * t; i < 32; i++) nx.dl[i] = 0;
    for (int unsigned i = 0; i <= t; i++) b[i] = up ? st.lam[i] : st.xb[i];
    foreach (nx.xb[i]) nx.xb[i] = (i >= 2 && i <= int'(t)) ? b[i - 2] : 0;
    for (int unsigned i = 0; i < 2 * t; i++) nx.th[i] = up ? st.dl[i + 2] : st.th[i];
    for (int unsigned i = 2 * t; i < 32; i++) nx.th[i] = 0;
    nx.gamma = up ? d1 : st.gamma;
    nx.k = up ? (-st.k - 2) : (st.k + 2);
    return nx;
  endfunction

endpackage
