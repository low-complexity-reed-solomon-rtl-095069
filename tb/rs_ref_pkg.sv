// rs_ref_pkg: reference model for the Reed-Solomon testbenches.
//
// Written independently of the RTL: field multiplication through a full
// carry-less product reduced modulo 0x11D, inverses by search, the
// generator polynomial g(x) = prod_{i<2t} (x + alpha^i) in expanded form and
// systematic encoding by long division (the classic LFSR form, not the
// factored form of the RTL), syndromes by direct power sums, and the
// Berlekamp-Massey algorithm with division (normalised Lambda_0 = 1).
//
// Codewords are arrays indexed by transmission order: w[0] is the first
// symbol sent (coefficient of x^(n-1)), w[n-1] the last (x^0).
package rs_ref_pkg;

  typedef logic [7:0] sym_t;
  typedef sym_t       word_t [255];

  function automatic sym_t rmul(sym_t a, sym_t b);
    logic [14:0] p;
    p = '0;
    for (int k = 0; k < 8; k++) if (b[k]) p ^= (15'(a) << k);
    for (int k = 14; k >= 8; k--) if (p[k]) p ^= (15'h11D << (k - 8));
    return p[7:0];
  endfunction

  function automatic sym_t rpow(sym_t a, int e);
    sym_t r;
    r = 8'd1;
    e = e % 255;
    if (e < 0) e += 255;
    for (int k = 0; k < e; k++) r = rmul(r, a);
    return r;
  endfunction

  function automatic sym_t ralpha(int e);
    return rpow(8'd2, e);
  endfunction

  function automatic sym_t rinv(sym_t a);
    for (int b = 1; b < 256; b++) if (rmul(a, 8'(b)) == 8'd1) return 8'(b);
    return 8'd0;
  endfunction

  // g[0..2t], g[2t] = 1
  function automatic void genpoly(int t, output sym_t g [17]);
    for (int i = 0; i < 17; i++) g[i] = '0;
    g[0] = 8'd1;
    for (int i = 0; i < 2 * t; i++) begin
      // multiply by (x + alpha^i)
      for (int d = i + 1; d >= 0; d--)
        g[d] = ((d > 0) ? g[d-1] : 8'd0) ^ rmul(g[d], ralpha(i));
    end
  endfunction

  // systematic encoding: w[0..k-1] = message, w[k..n-1] = parity
  function automatic void encode(int n, int t, ref word_t w);
    sym_t g [17];
    sym_t r [16];
    sym_t fb;
    int   k;
    k = n - 2 * t;
    genpoly(t, g);
    for (int i = 0; i < 16; i++) r[i] = '0;
    for (int s = 0; s < k; s++) begin
      fb = w[s] ^ r[2*t-1];
      for (int i = 2 * t - 1; i > 0; i--) r[i] = r[i-1] ^ rmul(fb, g[i]);
      r[0] = rmul(fb, g[0]);
    end
    for (int i = 0; i < 2 * t; i++) w[k + i] = r[2*t-1-i];
  endfunction

  // S_i = R(alpha^i), i = 0..15 (only 0..2t-1 meaningful), Horner's rule
  function automatic void syndromes(int n, const ref word_t w, output sym_t s [16]);
    for (int i = 0; i < 16; i++) begin
      sym_t a;
      a    = ralpha(i);
      s[i] = '0;
      for (int p = 0; p < n; p++) s[i] = rmul(s[i], a) ^ w[p];
    end
  endfunction

  // Berlekamp-Massey with division. lam[0..16], deg, and delta_i for
  // i = 1..2t in dseq[i] (degree after iteration i, iBMA numbering).
  function automatic void bm(int t, const ref sym_t s [16],
                             output sym_t lam [17], output int deg,
                             output int dseq [17]);
    sym_t c [17];
    sym_t tmp [17];
    sym_t disc, dcv, f;
    int   l;
    for (int i = 0; i < 17; i++) begin lam[i] = '0; c[i] = '0; dseq[i] = 0; end
    lam[0] = 8'd1;
    c[0]   = 8'd1;
    dcv    = 8'd1;
    l      = 0;
    // iteration i uses discrepancy of S_{i-1}
    for (int i = 1; i <= 2 * t; i++) begin
      disc = '0;
      for (int j = 0; j <= l; j++) disc ^= rmul(lam[j], s[i-1-j] );
      // c <- x*c is applied below; lam <- lam - disc/dcv * x*c
      for (int j = 16; j > 0; j--) tmp[j] = c[j-1];
      tmp[0] = '0;
      if (disc == '0) begin
        c = tmp;
      end else begin
        f = rmul(disc, rinv(dcv));
        if (2 * l <= i - 1) begin
          sym_t old [17];
          old = lam;
          for (int j = 0; j < 17; j++) lam[j] ^= rmul(f, tmp[j]);
          l   = i - l;
          c   = old;
          dcv = disc;
        end else begin
          for (int j = 0; j < 17; j++) lam[j] ^= rmul(f, tmp[j]);
          c = tmp;
        end
      end
      dseq[i] = l;
    end
    deg = l;
  endfunction

  // Omega = Lambda * S mod x^2t
  function automatic void omega(int t, const ref sym_t lam [17], const ref sym_t s [16],
                                output sym_t om [16]);
    for (int i = 0; i < 16; i++) begin
      om[i] = '0;
      if (i < 2 * t)
        for (int k = 0; k <= i; k++) om[i] ^= rmul(lam[k], s[i-k]);
    end
  endfunction

  // Solver cycle count of the serial design for a degree sequence:
  // start cycle + sum over iterations of (max(delta_i,1) clamped to 8) + 1
  // + Omega phase.
  function automatic int kes_cycles(int t, const ref int dseq [17], input int deg, input bit noerr);
    int c, j;
    if (noerr) return 2;
    c = 1;
    for (int i = 1; i <= 2 * t; i++) begin
      j = (dseq[i] == 0) ? 1 : ((dseq[i] > 8) ? 8 : dseq[i]);
      c += j + 1;
    end
    if (deg > 8) deg = 8;
    c += (deg == 0) ? 1 : (deg * (deg + 1) / 2 + 2);
    return c;
  endfunction

endpackage
