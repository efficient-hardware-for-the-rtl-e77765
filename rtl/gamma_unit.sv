// gamma_unit: forms and holds the sparse GF(3^6M) factor of step 05 of the
// modified Duursma-Lee (Kwon) loop,
//   gamma = -mu^2 - beta*y*sigma - mu*rho - rho^2,
// which on the basis {1, sigma, rho, sigma rho, rho^2, sigma rho^2} is
//   [-mu^2, -beta*y, -mu, 0, -1, 0].
// Only two GF(3^M) products are needed, mu*mu and beta*y; they run in
// parallel. As in the document's dataflow, the unit presents the two operand
// pairs to multipliers and negates the products, the third coefficient and
// the constant one. With the two-bit trit encoding every negation is a swap
// of the hi and lo wires, so the forming of gamma is pure wiring; the unit's
// logic is the gamma register of the register bank, loaded when the products
// arrive and held while t*gamma is computed.
//
// This unit holds no multipliers of its own: mul_a/mul_b go to two lanes of
// the shared multiplier array and prod comes back from it (this design's
// choice, so that the array of eighteen multipliers is the only one).
//
// Timing: gamma is loaded on the clock edge where load is high (prod, mu must
// be valid then) and holds until the next load. Synchronous active-low reset
// clears it.
module gamma_unit
  import gf3_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  gf3m_t  mu,
  input  gf3m_t  beta,
  input  gf3m_t  y,
  output gf3m_t  mul_a [2],
  output gf3m_t  mul_b [2],
  input  gf3m_t  prod  [2],   // prod[0] = mu*mu, prod[1] = beta*y
  output gf36m_t gamma
);

  gf36m_t g_next;

  always_comb begin
    mul_a[0] = mu;    mul_b[0] = mu;
    mul_a[1] = beta;  mul_b[1] = y;
    g_next[0] = f_neg(prod[0]);
    g_next[1] = f_neg(prod[1]);
    g_next[2] = f_neg(mu);
    g_next[3] = GF_ZERO;
    g_next[4] = f_neg(GF_ONE);
    g_next[5] = GF_ZERO;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    gamma <= '0;
    else if (load) gamma <= g_next;
  end

endmodule
