// tb_gf3m_cube: checks the combinational GF(3^M) cubing circuit against
// a*a*a computed with the reference schoolbook multiplier.
module tb_gf3m_cube;
  import gf3_pkg::*;
  import tb_gf3_ref::*;

  gf3m_t a, c;
  int    checks = 0, failures = 0;

  gf3m_cube dut (.a, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(poly_t pa);
    a = from_poly(pa);
    #1;
    checks++;
    if (!p_eq(to_poly(c), p_mul(p_mul(pa, pa), pa))) begin
      failures++;
      $display("FAIL cube mismatch");
    end
  endtask

  initial begin
    poly_t hi;
    chk(p_zero());
    chk(p_const(1));
    chk(p_const(2));
    hi = p_zero();
    hi[M-1] = 1;            // x^(M-1): exercises the deepest fold
    chk(hi);
    for (int i = 0; i < 40; i++) chk(p_rand());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
