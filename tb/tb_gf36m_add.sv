// tb_gf36m_add: checks the bank of six GF(3^M) add units against the
// coefficient-wise reference (integer arithmetic mod 3), including every
// pair of trit values.
module tb_gf36m_add;
  import gf3_pkg::*;
  import tb_gf3_ref::*;

  gf36m_t a, b, r;
  int     checks = 0, failures = 0;

  gf36m_add dut (.a, .b, .s(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e6_t ea, eb;
    for (int i = 0; i < 30; i++) begin
      ea = e6_rand();
      eb = e6_rand();
      if (i == 0)
        for (int k = 0; k < 9; k++) begin   // all nine trit pairs
          ea[0][k] = byte'(k / 3);
          eb[0][k] = byte'(k % 3);
        end
      a = from_e6(ea);
      b = from_e6(eb);
      #1;
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (!p_eq(to_poly(r[k]), p_add(ea[k], eb[k]))) begin
          failures++; $display("FAIL lane %0d vector %0d", k, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
