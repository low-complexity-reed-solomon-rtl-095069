// rs_pkg: shared constants and GF(2^8) arithmetic for the multi-mode
// Reed-Solomon codec.
//
// The field is GF(2^8) built on the primitive polynomial
// p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D) with primitive element alpha = 2,
// and the code's first consecutive root is alpha^0 (b = 0), as the codec
// design prescribes. Up to TMAX = 8 symbol errors can be corrected, so the
// syndrome calculator has 2*TMAX = 16 cells; codewords are at most
// 2^M - 1 = 255 symbols long.
//
// All functions are combinational and synthesizable:
//   gf_mul       general multiplier (shift-and-add, reduced by p(x))
//   gf_sq        squaring
//   gf_inv       inverse as a^254 (seven squarings, six multiplications);
//                gf_inv(0) returns 0
//   gf_alpha     alpha^e for an elaboration-time or run-time exponent,
//                by square-and-multiply over the bits of e (e < 256)
//   mode_ok      (n, t) is a codable mode: 1 <= t <= TMAX, 2t < n <= 255
package rs_pkg;

  localparam int unsigned M        = 8;          // bits per symbol
  localparam int unsigned TMAX     = 8;          // largest correction capability
  localparam logic [M:0]  PRIM_POLY = 9'h11D;    // x^8+x^4+x^3+x^2+1

  typedef logic [M-1:0] gf_t;

  // Multiply by alpha (x) and reduce.
  function automatic gf_t gf_xtime(gf_t a);
    return {a[M-2:0], 1'b0} ^ (a[M-1] ? PRIM_POLY[M-1:0] : '0);
  endfunction

  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t p;
    gf_t x;
    p = '0;
    x = a;
    for (int unsigned k = 0; k < M; k++) begin
      if (b[k]) p ^= x;
      x = gf_xtime(x);
    end
    return p;
  endfunction

  function automatic gf_t gf_sq(gf_t a);
    return gf_mul(a, a);
  endfunction

  // a^-1 = a^254 = a^2 * a^4 * ... * a^128
  function automatic gf_t gf_inv(gf_t a);
    gf_t r;
    gf_t s;
    s = gf_sq(a);
    r = s;
    for (int unsigned k = 2; k < M; k++) begin
      s = gf_sq(s);
      r = gf_mul(r, s);
    end
    return r;
  endfunction

  // alpha^(2^k), k = 0..7
  function automatic gf_t gf_alpha_2k(int unsigned k);
    gf_t r;
    r = 8'd2;
    for (int unsigned q = 0; q < k; q++) r = gf_sq(r);
    return r;
  endfunction

  // alpha^e, 0 <= e <= 255 (alpha^255 = 1)
  function automatic gf_t gf_alpha(logic [M-1:0] e);
    gf_t r;
    r = 8'd1;
    for (int unsigned k = 0; k < M; k++)
      if (e[k]) r = gf_mul(r, gf_alpha_2k(k));
    return r;
  endfunction

  // Codable mode check used by the controllers' assertions.
  function automatic logic mode_ok(logic [7:0] n, logic [3:0] t);
    return (t >= 4'd1) && (32'(t) <= TMAX) && ({3'b0, t, 1'b0} < n);
  endfunction

endpackage
