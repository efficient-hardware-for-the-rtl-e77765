// gf36m_add: the bank of six GF(3^M) adders that sits on the 12M-bit data
// lines. Each coefficient pair is added trit by trit with the two-bit
// encoding of gf3_pkg (a small gate network, no carries), so a whole
// GF(3^6M) (or any six GF(3^M) values) is added in one combinational step.
// Interface: a, b in, s = a + b out, no clock.
module gf36m_add
  import gf3_pkg::*;
(
  input  gf36m_t a,
  input  gf36m_t b,
  output gf36m_t s
);

  always_comb
    for (int i = 0; i < 6; i++) s[i] = f_add(a[i], b[i]);

endmodule
