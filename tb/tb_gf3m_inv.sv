// tb_gf3m_inv: checks the GF(3^M) inverter: a * inv(a) = 1 with the
// reference multiplier for random and corner inputs, inv(0) = 0, and that
// no inversion takes more than 2M + 1 = 195 cycles.
module tb_gf3m_inv;
  import gf3_pkg::*;
  import tb_gf3_ref::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  gf3m_t a, inv;
  logic  busy, done;
  int    checks = 0, failures = 0, maxcyc = 0;

  gf3m_inv dut (.clk, .rst_n, .start, .a, .busy, .done, .inv);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(poly_t pa);
    int cyc;
    a = from_poly(pa);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    if (cyc > maxcyc) maxcyc = cyc;
    checks++;
    if (cyc > 2*M + 1) begin
      failures++; $display("FAIL inversion took %0d cycles", cyc);
    end
    checks++;
    if (p_eq(pa, p_zero())) begin
      if (!p_eq(to_poly(inv), p_zero())) begin
        failures++; $display("FAIL inv(0) != 0");
      end
    end else if (!p_eq(p_mul(pa, to_poly(inv)), p_const(1))) begin
      failures++; $display("FAIL a*inv(a) != 1");
    end
  endtask

  initial begin
    poly_t t;
    a = GF_ZERO;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(p_const(1));
    run(p_const(2));
    run(p_zero());
    t = p_zero(); t[1] = 1; run(t);                 // x
    t = p_zero(); t[M-1] = 2; run(t);               // 2 x^(M-1)
    t = p_zero(); t[K] = 1; t[0] = 1; run(t);       // x^K + 1
    for (int i = 0; i < 40; i++) run(p_rand());
    $display("longest inversion: %0d cycles", maxcyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
