// tb_gf3m_mul: checks the digit-serial GF(3^M) multiplier against a
// schoolbook reference product for random and corner operands, and checks
// that every product takes ceil(97/4) = 25 clock cycles from start to done.
module tb_gf3m_mul;
  import gf3_pkg::*;
  import tb_gf3_ref::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  gf3m_t a, b, p;
  logic  busy, done;
  int    checks = 0, failures = 0;

  gf3m_mul #(.D(4)) dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(poly_t pa, poly_t pb);
    int cyc;
    a = from_poly(pa);
    b = from_poly(pb);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (!p_eq(to_poly(p), p_mul(pa, pb))) begin
      failures++;
      $display("FAIL product mismatch");
    end
    checks++;
    if (cyc != 25) begin
      failures++;
      $display("FAIL latency %0d, expected 25", cyc);
    end
  endtask

  initial begin
    a = GF_ZERO;
    b = GF_ZERO;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(p_zero(), p_rand());
    run(p_const(1), p_rand());
    run(p_rand(), p_const(2));
    for (int i = 0; i < 30; i++) run(p_rand(), p_rand());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
