// gf32m_mul: Karatsuba multiplier for GF(3^2M) = GF(3^M)[sigma]/(sigma^2 + 1),
// built from three digit-serial GF(3^M) multipliers working in parallel.
//
// For a = a0 + a1*sigma and b = b0 + b1*sigma the three products
//   p0 = a0*b0,  p1 = a1*b1,  p01 = (a1 + a0)*(b1 + b0)
// give c0 = p0 - p1 and c1 = p01 - p1 - p0 (sigma^2 = -1), following the
// document's dataflow: two adders before the multipliers and three
// subtractors after them.
//
// When kara is low at start, the three multipliers instead take the
// independent operand pairs (ra[i], rb[i]); their products appear on rp. This
// bypass is how the larger multiplier array is reused for other products,
// and is this design's own arrangement.
//
// Timing: operands and kara are sampled at the start edge; done pulses
// ceil(M/D) cycles later and c / rp hold until the next start.
module gf32m_mul
  import gf3_pkg::*;
#(
  parameter int D = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       kara,   // 1: Karatsuba product a*b, 0: three raw products
  input  gf32m_t     a,
  input  gf32m_t     b,
  input  gf3m_t      ra [3],
  input  gf3m_t      rb [3],
  output logic       busy,
  output logic       done,
  output gf32m_t     c,
  output gf3m_t      rp [3]
);

  gf3m_t opa [3], opb [3];
  logic  bsy [3], dn [3];

  always_comb begin
    if (kara) begin
      opa[0] = a[0];                 opb[0] = b[0];                 // p0
      opa[1] = a[1];                 opb[1] = b[1];                 // p1
      opa[2] = f_add(a[1], a[0]);    opb[2] = f_add(b[1], b[0]);    // p01
    end else begin
      for (int i = 0; i < 3; i++) begin
        opa[i] = ra[i];
        opb[i] = rb[i];
      end
    end
  end

  for (genvar i = 0; i < 3; i++) begin : g_mul
    gf3m_mul #(.D(D)) u_mul (
      .clk(clk), .rst_n(rst_n), .start(start),
      .a(opa[i]), .b(opb[i]),
      .busy(bsy[i]), .done(dn[i]), .p(rp[i])
    );
  end

  // all three multipliers run in lock step; lane 0 stands for the group
  assign busy = bsy[0];
  assign done = dn[0];

  always_comb begin
    c[0] = f_sub(rp[0], rp[1]);
    c[1] = f_sub(f_sub(rp[2], rp[1]), rp[0]);
  end

endmodule
