// gf36m_cube: single-cycle GF(3^6M) cubing unit built from six GF(3^M)
// cubing circuits.
//
// In GF(3^2M), (a0 + a1*sigma)^3 = a0^3 - a1^3*sigma (sigma^3 = -sigma), so
// each GF(3^2M) cube costs two GF(3^M) cubes. For a = A0 + A1*rho + A2*rho^2,
// a^3 = A0^3 + A1^3*rho^3 + A2^3*rho^6; with rho^3 = rho + B and
// rho^6 = rho^2 - B*rho + 1 this is
//   C0 = A0^3 + B*A1^3 + A2^3,  C1 = A1^3 - B*A2^3,  C2 = A2^3.
// The six GF(3^M) cubes and the additions are one combinational network, as
// the document requires; the rho-reduction formulas are derived here.
//
// With full low the six cubers work independently on the six coefficients
// (c[i] = a[i]^3); the controller uses this for x_r^3, y_r^3 and for
// alpha^9, beta^9. That reuse is this design's own arrangement.
//
// Timing: the result is registered; c is loaded on the edge where start is
// high and done pulses in the following cycle (one clock per cube).
module gf36m_cube
  import gf3_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   full,   // 1: GF(3^6M) cube, 0: six independent GF(3^M) cubes
  input  gf36m_t a,
  output logic   done,
  output gf36m_t c
);

  gf3m_t  q [6];
  gf36m_t r;

  for (genvar i = 0; i < 6; i++) begin : g_cube
    gf3m_cube u_cube (.a(a[i]), .c(q[i]));
  end

  gf32m_t A0c, A1c, A2c, C0, C1, C2;
  always_comb begin
    A0c = {f_neg(q[1]), q[0]};
    A1c = {f_neg(q[3]), q[2]};
    A2c = {f_neg(q[5]), q[4]};
    C0  = f2_add(f2_add(A0c, f2_mulb(A1c)), A2c);
    C1  = f2_sub(A1c, f2_mulb(A2c));
    C2  = A2c;
    if (full) r = {C2[1], C2[0], C1[1], C1[0], C0[1], C0[0]};
    else      r = {q[5], q[4], q[3], q[2], q[1], q[0]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c    <= '0;
      done <= 1'b0;
    end else begin
      done <= start;
      if (start) c <= r;
    end
  end

endmodule
