// gf36m_sub: the bank of six GF(3^M) subtractors on the 12M-bit data lines.
// Subtraction is addition of the negation, and negation in the two-bit
// encoding of gf3_pkg just swaps the hi and lo bit vectors.
// Interface: a, b in, d = a - b out, no clock.
module gf36m_sub
  import gf3_pkg::*;
(
  input  gf36m_t a,
  input  gf36m_t b,
  output gf36m_t d
);

  always_comb
    for (int i = 0; i < 6; i++) d[i] = f_sub(a[i], b[i]);

endmodule
