// tb_gf32m_mul: checks the Karatsuba GF(3^2M) multiplier against the
// schoolbook product (a0 + a1 s)(b0 + b1 s) with s^2 = -1, checks the raw
// mode (three independent GF(3^M) products) and the 25-cycle latency.
module tb_gf32m_mul;
  import gf3_pkg::*;
  import tb_gf3_ref::*;

  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0, kara = 1'b1;
  gf32m_t a, b, c;
  gf3m_t  ra [3], rb [3], rp [3];
  logic   busy, done;
  int     checks = 0, failures = 0;

  gf32m_mul #(.D(4)) dut (.clk, .rst_n, .start, .kara, .a, .b, .ra, .rb, .busy, .done, .c, .rp);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic go(output int cyc);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    poly_t a0, a1, b0, b1, pr [3], qr [3];
    int cyc;
    for (int k = 0; k < 3; k++) begin
      ra[k] = GF_ZERO;
      rb[k] = GF_ZERO;
    end
    a = '0;
    b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 12; i++) begin
      a0 = p_rand(); a1 = p_rand(); b0 = p_rand(); b1 = p_rand();
      a = {from_poly(a1), from_poly(a0)};
      b = {from_poly(b1), from_poly(b0)};
      kara = 1'b1;
      go(cyc);
      checks += 3;
      if (!p_eq(to_poly(c[0]), p_sub(p_mul(a0, b0), p_mul(a1, b1)))) begin
        failures++; $display("FAIL c0");
      end
      if (!p_eq(to_poly(c[1]), p_add(p_mul(a0, b1), p_mul(a1, b0)))) begin
        failures++; $display("FAIL c1");
      end
      if (cyc != 25) begin
        failures++; $display("FAIL latency %0d", cyc);
      end
    end
    for (int i = 0; i < 6; i++) begin
      for (int k = 0; k < 3; k++) begin
        pr[k] = p_rand(); qr[k] = p_rand();
        ra[k] = from_poly(pr[k]); rb[k] = from_poly(qr[k]);
      end
      kara = 1'b0;
      go(cyc);
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (!p_eq(to_poly(rp[k]), p_mul(pr[k], qr[k]))) begin
          failures++; $display("FAIL raw lane %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
