// gf3_pkg: field constants, element types and the additive arithmetic shared by
// every block of the characteristic-three Tate pairing datapath.
//
// Field: GF(3^M) in polynomial basis, modulo the irreducible trinomial
// x^M + x^K + 2 = x^M + x^K - 1 (M = 97, K = 16), so x^M = 1 - x^K. Every GF(3) digit (trit)
// is held in two bits, {hi, lo}: 0 = {0,0}, 1 = {0,1}, 2 = {1,0}. An element of
// GF(3^M) is a pair of M-bit vectors, so addition, subtraction and negation are
// plain bitwise gate networks with no carries.
//
// Tower: GF(3^2M) = GF(3^M)[sigma]/(sigma^2 + 1),
//        GF(3^6M) = GF(3^2M)[rho]/(rho^3 - rho - B).
// A GF(3^6M) element is six GF(3^M) coefficients on the basis
// {1, sigma, rho, sigma*rho, rho^2, sigma*rho^2}, index 0..5 in that order.
// B = +1 selects the curve y^2 = x^3 - x + 1; B = -1 (encoded 2) the other
// curve of the pair. The choice of B = +1 as default is this design's own.
//
// The GF(3^3M) helpers (Karatsuba pre-addition and recombination for
// GF(3^M)[rho]/(rho^3 - rho - B)) are used by the final exponentiation,
// which runs its GF(3^3M) products on the shared multiplier array.
package gf3_pkg;

  localparam int M = 97;         // extension degree of the base field
  localparam int K = 16;         // middle exponent of the trinomial x^M + x^K + 2
  localparam int B = 1;          // curve sign: rho^3 = rho + B, B in {+1, -1}

  typedef logic [1:0] trit_t;    // {hi, lo}

  typedef struct packed {
    logic [M-1:0] hi;
    logic [M-1:0] lo;
  } gf3m_t;

  typedef gf3m_t [1:0] gf32m_t;  // [0] + [1]*sigma
  typedef gf3m_t [2:0] gf33m_t;  // [0] + [1]*rho + [2]*rho^2
  typedef gf3m_t [5:0] gf36m_t;  // basis 1, sigma, rho, sigma rho, rho^2, sigma rho^2
  typedef gf3m_t [5:0] gf3m_x6_t;  // six independent GF(3^M) operands

  localparam gf3m_t GF_ZERO = '{hi: '0, lo: '0};
  localparam gf3m_t GF_ONE  = '{hi: '0, lo: M'(1)};

  // ---------------- GF(3) digit arithmetic ----------------
  function automatic trit_t t_add(trit_t a, trit_t b);
    logic t;
    t = (a[1] | b[0]) ^ (a[0] | b[1]);
    return {(a[0] | b[0]) ^ t, (a[1] | b[1]) ^ t};
  endfunction

  function automatic trit_t t_neg(trit_t a);
    return {a[0], a[1]};
  endfunction

  function automatic trit_t t_mul(trit_t a, trit_t b);
    return {(a[0] & b[1]) | (a[1] & b[0]), (a[0] & b[0]) | (a[1] & b[1])};
  endfunction

  // ---------------- GF(3^M) additive arithmetic ----------------
  function automatic gf3m_t f_add(gf3m_t a, gf3m_t b);
    logic [M-1:0] t;
    gf3m_t c;
    t    = (a.hi | b.lo) ^ (a.lo | b.hi);
    c.hi = (a.lo | b.lo) ^ t;
    c.lo = (a.hi | b.hi) ^ t;
    return c;
  endfunction

  function automatic gf3m_t f_neg(gf3m_t a);
    return '{hi: a.lo, lo: a.hi};
  endfunction

  function automatic gf3m_t f_sub(gf3m_t a, gf3m_t b);
    return f_add(a, f_neg(b));
  endfunction

  // multiply by the curve sign B (+1 or -1)
  function automatic gf3m_t f_mulb(gf3m_t a);
    return (B == 1) ? a : f_neg(a);
  endfunction

  // multiply by a GF(3) constant
  function automatic gf3m_t f_scale(gf3m_t a, trit_t s);
    gf3m_t c;
    c.hi = ({M{s[0]}} & a.hi) | ({M{s[1]}} & a.lo);
    c.lo = ({M{s[0]}} & a.lo) | ({M{s[1]}} & a.hi);
    return c;
  endfunction

  // a + d for a GF(3) constant d (added to the constant coefficient)
  function automatic gf3m_t f_add_const(gf3m_t a, trit_t d);
    gf3m_t dd;
    dd = GF_ZERO;
    dd.hi[0] = d[1];
    dd.lo[0] = d[0];
    return f_add(a, dd);
  endfunction

  // ---------------- GF(3^3M) = GF(3^M)[rho]/(rho^3 - rho - B) ----------------
  // Karatsuba pre-addition: lanes {a0, a1, a2, a0+a1, a0+a2, a1+a2}
  function automatic gf3m_x6_t k3_pre(gf33m_t a);
    gf3m_x6_t o;
    o[0] = a[0];
    o[1] = a[1];
    o[2] = a[2];
    o[3] = f_add(a[0], a[1]);
    o[4] = f_add(a[0], a[2]);
    o[5] = f_add(a[1], a[2]);
    return o;
  endfunction

  // Karatsuba recombination of the six lane products, then reduction with
  // rho^3 = rho + B and rho^4 = rho^2 + B*rho.
  function automatic gf33m_t k3_post(gf3m_x6_t p);
    gf3m_t d0, d1, d2, d3, d4;
    gf33m_t c;
    d0 = p[0];
    d4 = p[2];
    d1 = f_sub(f_sub(p[3], p[0]), p[1]);
    d3 = f_sub(f_sub(p[5], p[1]), p[2]);
    d2 = f_sub(f_add(f_sub(p[4], p[2]), p[1]), p[0]);
    c[0] = f_add(d0, f_mulb(d3));
    c[1] = f_add(f_add(d1, d3), f_mulb(d4));
    c[2] = f_add(d2, d4);
    return c;
  endfunction

  function automatic gf33m_t f3_add(gf33m_t a, gf33m_t b);
    gf33m_t c;
    for (int i = 0; i < 3; i++) c[i] = f_add(a[i], b[i]);
    return c;
  endfunction

  // ---------------- GF(3^2M) additive arithmetic ----------------
  function automatic gf32m_t f2_add(gf32m_t a, gf32m_t b);
    return {f_add(a[1], b[1]), f_add(a[0], b[0])};
  endfunction

  function automatic gf32m_t f2_sub(gf32m_t a, gf32m_t b);
    return {f_sub(a[1], b[1]), f_sub(a[0], b[0])};
  endfunction

  function automatic gf32m_t f2_mulb(gf32m_t a);
    return {f_mulb(a[1]), f_mulb(a[0])};
  endfunction

endpackage
