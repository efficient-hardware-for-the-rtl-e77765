// tb_gf36m_mul: checks the GF(3^6M) multiplier (eighteen digit-serial
// GF(3^M) multipliers plus composition and rho-reduction) against a direct
// 36-term schoolbook product in the basis {1, s, r, s r, r^2, s r^2}, checks
// the raw mode on all eighteen lanes and the 25-cycle latency.
module tb_gf36m_mul;
  import gf3_pkg::*;
  import tb_gf3_ref::*;

  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0, full = 1'b1;
  gf36m_t a, b, c;
  gf3m_t  ra [18], rb [18], rp [18];
  logic   busy, done;
  int     checks = 0, failures = 0;

  gf36m_mul #(.D(4)) dut (.clk, .rst_n, .start, .full, .a, .b, .ra, .rb, .busy, .done, .c, .rp);

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
    e6_t ea, eb;
    poly_t pr [18], qr [18];
    int cyc;
    for (int k = 0; k < 18; k++) begin
      ra[k] = GF_ZERO;
      rb[k] = GF_ZERO;
    end
    a = '0;
    b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      ea = e6_rand();
      eb = e6_rand();
      if (i == 0) ea = e6_one();
      a = from_e6(ea);
      b = from_e6(eb);
      full = 1'b1;
      go(cyc);
      checks += 2;
      if (!e6_eq(to_e6(c), e6_mul(ea, eb))) begin
        failures++; $display("FAIL GF(3^6m) product %0d", i);
      end
      if (cyc != 25) begin
        failures++; $display("FAIL latency %0d", cyc);
      end
    end
    for (int i = 0; i < 3; i++) begin
      for (int k = 0; k < 18; k++) begin
        pr[k] = p_rand(); qr[k] = p_rand();
        ra[k] = from_poly(pr[k]); rb[k] = from_poly(qr[k]);
      end
      full = 1'b0;
      go(cyc);
      for (int k = 0; k < 18; k++) begin
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
