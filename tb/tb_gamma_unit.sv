// tb_gamma_unit: drives mu, beta, y and the two products a multiplier
// array would return, and checks that the unit asks for mu*mu and beta*y,
// loads gamma = -mu^2 - beta y s - mu r - r^2 = [-mu^2, -beta y, -mu, 0, -1, 0]
// on load, and holds it while load is low.
module tb_gamma_unit;
  import gf3_pkg::*;
  import tb_gf3_ref::*;

  logic   clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  gf3m_t  mu, beta, y, ma [2], mb [2], prod [2];
  gf36m_t gamma;
  int     checks = 0, failures = 0;

  gamma_unit dut (.clk, .rst_n, .load, .mu, .beta, .y, .mul_a(ma), .mul_b(mb), .prod, .gamma);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_t pm, pb, py;
    e6_t   eg;
    mu = GF_ZERO; beta = GF_ZERO; y = GF_ZERO;
    prod[0] = GF_ZERO; prod[1] = GF_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      pm = p_rand(); pb = p_rand(); py = p_rand();
      mu = from_poly(pm); beta = from_poly(pb); y = from_poly(py);
      #1;
      // model the two multiplier lanes
      prod[0] = from_poly(p_mul(to_poly(ma[0]), to_poly(mb[0])));
      prod[1] = from_poly(p_mul(to_poly(ma[1]), to_poly(mb[1])));
      load = 1'b1;
      @(negedge clk) load = 1'b0;
      eg = e6_zero();
      eg[0] = p_neg(p_mul(pm, pm));
      eg[1] = p_neg(p_mul(pb, py));
      eg[2] = p_neg(pm);
      eg[4] = p_const(-1);
      checks++;
      if (!e6_eq(to_e6(gamma), eg)) begin
        failures++; $display("FAIL gamma %0d", i);
      end
      // inputs change without load: gamma must hold
      mu = from_poly(p_rand());
      prod[0] = from_poly(p_rand());
      @(negedge clk);
      checks++;
      if (!e6_eq(to_e6(gamma), eg)) begin
        failures++; $display("FAIL gamma not held %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
