// tb_gf36m_cube: checks the single-cycle GF(3^6M) cube against the
// reference a*a*a (two schoolbook GF(3^6M) products), checks the raw mode
// (six independent GF(3^M) cubes) and that the result arrives one clock
// after start.
module tb_gf36m_cube;
  import gf3_pkg::*;
  import tb_gf3_ref::*;

  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0, full = 1'b1;
  gf36m_t a, c;
  logic   done;
  int     checks = 0, failures = 0;

  gf36m_cube dut (.clk, .rst_n, .start, .full, .a, .done, .c);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e6_t ea, er;
    a = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin
      ea = e6_rand();
      full = (i % 4 != 3);
      a = from_e6(ea);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      checks++;
      if (!done) begin
        failures++; $display("FAIL done not one cycle after start");
      end
      if (full) er = e6_cube(ea);
      else for (int k = 0; k < 6; k++) er[k] = p_mul(p_mul(ea[k], ea[k]), ea[k]);
      checks++;
      if (!e6_eq(to_e6(c), er)) begin
        failures++; $display("FAIL cube %0d (full=%0b)", i, full);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
