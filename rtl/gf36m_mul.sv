// gf36m_mul: GF(3^6M) multiplier made of six GF(3^2M) Karatsuba multipliers,
// i.e. eighteen GF(3^M) digit-serial multipliers, all running in parallel.
//
// With a = A0 + A1*rho + A2*rho^2 (Ai in GF(3^2M), Ai = a[2i] + a[2i+1]*sigma)
// the six GF(3^2M) products are
//   P0 = A0*B0, P1 = A1*B1, P2 = A2*B2,
//   P01 = (A1+A0)(B1+B0), P02 = (A2+A0)(B2+B0), P12 = (A2+A1)(B2+B1)
// and the composition stage of the document gives the unreduced product
//   D0 = P0, D1 = P01 - P0 - P1, D2 = P02 - P2 + P1 - P0,
//   D3 = P12 - P2 - P1, D4 = P2.
// Reduction with rho^3 = rho + B (so rho^4 = rho^2 + B*rho), which the
// document leaves to the reader, gives
//   C0 = D0 + B*D3,  C1 = D1 + D3 + B*D4,  C2 = D2 + D4.
//
// With full low at start the eighteen GF(3^M) multipliers take independent
// operand pairs ra[l], rb[l] (lane l = 3*g + k goes to GF(3^2M) unit g,
// multiplier k) and return rp[l]. The controller uses this for the two
// products of gamma and for the GF(3^3M) work of the final exponentiation;
// this reuse follows the document's remark that the control can reuse the
// hardware for other operations, the lane mapping is this design's own.
//
// Timing: operands and mode are sampled at the start edge; done pulses
// ceil(M/D) cycles later; c (combinational from the held products) and rp
// stay valid until the next start.
module gf36m_mul
  import gf3_pkg::*;
#(
  parameter int D = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   full,    // 1: GF(3^6M) product a*b, 0: 18 raw products
  input  gf36m_t a,
  input  gf36m_t b,
  input  gf3m_t  ra [18],
  input  gf3m_t  rb [18],
  output logic   busy,
  output logic   done,
  output gf36m_t c,
  output gf3m_t  rp [18]
);

  gf32m_t A [3], Bv [3];
  gf32m_t ua [6], ub [6], up [6];
  logic   bsy [6], dn [6];

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      A[i]  = {a[2*i+1], a[2*i]};
      Bv[i] = {b[2*i+1], b[2*i]};
    end
    // unit order follows the document's figure, left to right
    ua[0] = A[2];                  ub[0] = Bv[2];                  // P2
    ua[1] = f2_add(A[2], A[1]);    ub[1] = f2_add(Bv[2], Bv[1]);   // P12
    ua[2] = A[1];                  ub[2] = Bv[1];                  // P1
    ua[3] = f2_add(A[2], A[0]);    ub[3] = f2_add(Bv[2], Bv[0]);   // P02
    ua[4] = f2_add(A[1], A[0]);    ub[4] = f2_add(Bv[1], Bv[0]);   // P01
    ua[5] = A[0];                  ub[5] = Bv[0];                  // P0
  end

  for (genvar g = 0; g < 6; g++) begin : g_unit
    gf3m_t lra [3], lrb [3], lrp [3];
    for (genvar k = 0; k < 3; k++) begin : g_lane
      assign lra[k]      = ra[3*g+k];
      assign lrb[k]      = rb[3*g+k];
      assign rp[3*g+k]   = lrp[k];
    end
    gf32m_mul #(.D(D)) u_m2 (
      .clk(clk), .rst_n(rst_n), .start(start), .kara(full),
      .a(ua[g]), .b(ub[g]), .ra(lra), .rb(lrb),
      .busy(bsy[g]), .done(dn[g]), .c(up[g]), .rp(lrp)
    );
  end

  assign busy = bsy[0];
  assign done = dn[0];

  gf32m_t d0, d1, d2, d3, d4;
  gf32m_t c0, c1, c2;
  always_comb begin
    d4 = up[0];
    d3 = f2_sub(f2_sub(up[1], up[0]), up[2]);
    d2 = f2_sub(f2_add(f2_sub(up[3], up[0]), up[2]), up[5]);
    d1 = f2_sub(f2_sub(up[4], up[5]), up[2]);
    d0 = up[5];
    c0 = f2_add(d0, f2_mulb(d3));
    c1 = f2_add(f2_add(d1, d3), f2_mulb(d4));
    c2 = f2_add(d2, d4);
    c  = {c2[1], c2[0], c1[1], c1[0], c0[1], c0[0]};
  end

endmodule
