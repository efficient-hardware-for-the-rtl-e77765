// gf3m_cube: combinational GF(3^M) cubing circuit.
//
// In characteristic three cubing is linear: (sum a_i x^i)^3 = sum a_i x^(3i).
// The circuit spreads the coefficients to every third position (degree up to
// 3M-3) and folds the high part down with x^i = -x^(i-M+K) + x^(i-M), from the
// top coefficient downwards, so the result is reduced modulo x^M + x^K + 2.
// The whole operation is a fixed network of GF(3) adders and wires, which is
// what lets the document count cubing as a single clock cycle; the register
// that makes it one cycle sits in the instantiating block (gf36m_cube).
//
// Interface: a in, c = a^3 out, no clock.
module gf3m_cube
  import gf3_pkg::*;
(
  input  gf3m_t a,
  output gf3m_t c
);

  function automatic gf3m_t cube(gf3m_t x);
    trit_t u [3*M-2];
    gf3m_t r;
    for (int i = 0; i < 3*M-2; i++) u[i] = 2'b00;
    for (int i = 0; i < M; i++) u[3*i] = {x.hi[i], x.lo[i]};
    for (int i = 3*M-3; i >= M; i--) begin
      u[i-M+K] = t_add(u[i-M+K], t_neg(u[i]));
      u[i-M]   = t_add(u[i-M],   u[i]);
    end
    for (int i = 0; i < M; i++) begin
      r.hi[i] = u[i][1];
      r.lo[i] = u[i][0];
    end
    return r;
  endfunction

  always_comb c = cube(a);

endmodule
