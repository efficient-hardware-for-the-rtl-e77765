// tb_gf3_ref: reference arithmetic for the testbenches, written independently
// of the RTL. Field elements are arrays of integer coefficients 0..2, products
// are schoolbook with a plain "reduce the top coefficient" loop, and GF(3^6M)
// products multiply all 36 basis-element pairs and rewrite sigma^2 = -1,
// rho^3 = rho + B, rho^4 = rho^2 + B*rho directly (no Karatsuba, no tower
// recursion), so the reference shares no structure with the hardware.
package tb_gf3_ref;
  import gf3_pkg::*;

  typedef byte unsigned poly_t [M];
  typedef poly_t        e6_t [6];

  function automatic poly_t to_poly(gf3m_t a);
    poly_t p;
    for (int i = 0; i < M; i++) p[i] = a.lo[i] ? 8'd1 : (a.hi[i] ? 8'd2 : 8'd0);
    return p;
  endfunction

  function automatic gf3m_t from_poly(poly_t p);
    gf3m_t a;
    for (int i = 0; i < M; i++) begin
      a.lo[i] = (p[i] == 1);
      a.hi[i] = (p[i] == 2);
    end
    return a;
  endfunction

  function automatic gf36m_t from_e6(e6_t e);
    gf36m_t a;
    for (int k = 0; k < 6; k++) a[k] = from_poly(e[k]);
    return a;
  endfunction

  function automatic e6_t to_e6(gf36m_t a);
    e6_t e;
    for (int k = 0; k < 6; k++) e[k] = to_poly(a[k]);
    return e;
  endfunction

  function automatic poly_t p_zero();
    poly_t p;
    for (int i = 0; i < M; i++) p[i] = 0;
    return p;
  endfunction

  function automatic poly_t p_const(int c);
    poly_t p;
    p = p_zero();
    p[0] = byte'(((c % 3) + 3) % 3);
    return p;
  endfunction

  function automatic poly_t p_rand();
    poly_t p;
    for (int i = 0; i < M; i++) p[i] = byte'($urandom % 3);
    return p;
  endfunction

  function automatic poly_t p_add(poly_t a, poly_t b);
    poly_t c;
    for (int i = 0; i < M; i++) c[i] = byte'((int'(a[i]) + int'(b[i])) % 3);
    return c;
  endfunction

  function automatic poly_t p_neg(poly_t a);
    poly_t c;
    for (int i = 0; i < M; i++) c[i] = byte'((3 - int'(a[i])) % 3);
    return c;
  endfunction

  function automatic poly_t p_sub(poly_t a, poly_t b);
    return p_add(a, p_neg(b));
  endfunction

  function automatic poly_t p_scale(poly_t a, int s);
    poly_t c;
    for (int i = 0; i < M; i++) c[i] = byte'((a[i] * (((s % 3) + 3) % 3)) % 3);
    return c;
  endfunction

  function automatic poly_t p_mul(poly_t a, poly_t b);
    int    w [2*M-1];
    poly_t c;
    for (int i = 0; i < 2*M-1; i++) w[i] = 0;
    for (int i = 0; i < M; i++)
      if (a[i] != 0)
        for (int j = 0; j < M; j++) w[i+j] += a[i] * b[j];
    for (int i = 2*M-2; i >= M; i--) begin
      int v;
      v = w[i] % 3;
      w[i] = 0;
      // x^M = -x^K + 1  (modulus x^M + x^K + 2)
      w[i-M+K] += 2 * v;
      w[i-M]   += v;
    end
    for (int i = 0; i < M; i++) c[i] = byte'(w[i] % 3);
    return c;
  endfunction

  function automatic bit p_eq(poly_t a, poly_t b);
    for (int i = 0; i < M; i++) if (a[i] != b[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic e6_t e6_zero();
    e6_t e;
    for (int k = 0; k < 6; k++) e[k] = p_zero();
    return e;
  endfunction

  function automatic e6_t e6_one();
    e6_t e;
    e = e6_zero();
    e[0] = p_const(1);
    return e;
  endfunction

  function automatic e6_t e6_rand();
    e6_t e;
    for (int k = 0; k < 6; k++) e[k] = p_rand();
    return e;
  endfunction

  // basis element k = sigma^(k%2) * rho^(k/2)
  function automatic e6_t e6_mul(e6_t a, e6_t b);
    poly_t acc [5][2];   // coefficient of sigma^s rho^r, r = 0..4
    e6_t   c;
    for (int r = 0; r < 5; r++)
      for (int s = 0; s < 2; s++) acc[r][s] = p_zero();
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++) begin
        poly_t pr;
        int s, r;
        pr = p_mul(a[i], b[j]);
        s  = (i % 2) + (j % 2);
        r  = (i / 2) + (j / 2);
        if (s == 2) begin
          pr = p_neg(pr);
          s  = 0;
        end
        acc[r][s] = p_add(acc[r][s], pr);
      end
    for (int s = 0; s < 2; s++) begin
      // rho^4 = rho^2 + B rho
      acc[2][s] = p_add(acc[2][s], acc[4][s]);
      acc[1][s] = p_add(acc[1][s], p_scale(acc[4][s], B));
      // rho^3 = rho + B
      acc[1][s] = p_add(acc[1][s], acc[3][s]);
      acc[0][s] = p_add(acc[0][s], p_scale(acc[3][s], B));
    end
    for (int r = 0; r < 3; r++)
      for (int s = 0; s < 2; s++) c[2*r+s] = acc[r][s];
    return c;
  endfunction

  function automatic e6_t e6_cube(e6_t a);
    return e6_mul(e6_mul(a, a), a);
  endfunction

  function automatic bit e6_eq(e6_t a, e6_t b);
    for (int k = 0; k < 6; k++) if (!p_eq(a[k], b[k])) return 1'b0;
    return 1'b1;
  endfunction

  // complex conjugate over GF(3^3M): negate the sigma coefficients
  function automatic e6_t e6_conj(e6_t a);
    e6_t c;
    for (int k = 0; k < 6; k++) c[k] = (k % 2 != 0) ? p_neg(a[k]) : a[k];
    return c;
  endfunction

  // the modified Duursma-Lee (Kwon) loop, written directly from its listing
  function automatic e6_t kwon(poly_t xp, poly_t yp, poly_t xr, poly_t yr);
    poly_t alpha, beta, x, y, mu;
    int    d;
    e6_t   t, g;
    alpha = xp;
    beta  = yp;
    x     = p_mul(p_mul(xr, xr), xr);
    y     = p_mul(p_mul(yr, yr), yr);
    d     = ((B * M) % 3 + 3) % 3;
    t     = e6_one();
    for (int i = 0; i < M; i++) begin
      alpha = p_mul(p_mul(alpha, alpha), alpha);
      alpha = p_mul(p_mul(alpha, alpha), alpha);
      beta  = p_mul(p_mul(beta, beta), beta);
      beta  = p_mul(p_mul(beta, beta), beta);
      mu    = p_add(p_add(alpha, x), p_const(d));
      g     = e6_zero();
      g[0]  = p_neg(p_mul(mu, mu));
      g[1]  = p_neg(p_mul(beta, y));
      g[2]  = p_neg(mu);
      g[4]  = p_const(-1);
      t     = e6_mul(e6_cube(t), g);
      y     = p_neg(y);
      d     = ((d - B) % 3 + 3) % 3;
    end
    return t;
  endfunction

endpackage
