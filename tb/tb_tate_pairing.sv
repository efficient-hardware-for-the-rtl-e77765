// tb_tate_pairing: end-to-end test of the pairing accelerator at its
// default size (M = 97, D = 4, x^97 + x^16 + 2).
//
// For random inputs (xp, yp, xr, yr) it checks
//  * the loop result t_out against the Kwon loop computed by the reference
//    model (schoolbook GF(3^6M) arithmetic),
//  * the Tate power tau = t^(3^(3M) - 1) through the identity
//    tau * t = conj(t) (t^(3^(3M)) is the sigma-conjugate of t for odd M),
//    which needs no inversion in the reference,
//  * the number of loop iterations and of each unit operation, and that each
//    mechanism (raw and full multiplier modes, raw and full cube modes, the
//    inverter, the add and subtract banks on the output bus) was used,
//  * the total cycle count against the schedule of the controller.
module tb_tate_pairing;
  import gf3_pkg::*;
  import tb_gf3_ref::*;

  localparam int NDIG = 25;   // ceil(97/4)

  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  gf3m_t  xp, yp, xr, yr;
  logic   ready, done;
  gf36m_t tau, t_out, out_data;
  logic [15:0] n_iter, n_mul_full, n_mul_raw, n_cube_full, n_cube_raw, n_inv;
  int     checks = 0, failures = 0;
  int     seen_add = 0, seen_sub = 0;

  tate_pairing dut (
    .clk, .rst_n, .start, .xp, .yp, .xr, .yr, .ready, .done, .tau, .t_out, .out_data,
    .n_iter, .n_mul_full, .n_mul_raw, .n_cube_full, .n_cube_raw, .n_inv
  );

  always #5 clk = ~clk;

  // the output multiplexor selects the adder bank in the mu step and the
  // subtractor bank when tau is formed
  always @(posedge clk) begin
    if (dut.state == dut.S_MU) seen_add++;
    if (dut.state == dut.S_FE_FIN_W && dut.mul_done) seen_sub++;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic pairing(poly_t pxp, poly_t pyp, poly_t pxr, poly_t pyr);
    int  cyc, lo, hi;
    e6_t tref, et, etau;
    xp = from_poly(pxp); yp = from_poly(pyp);
    xr = from_poly(pxr); yr = from_poly(pyr);
    seen_add = 0;
    seen_sub = 0;
    check("ready before start", ready);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    tref = kwon(pxp, pyp, pxr, pyr);
    et   = to_e6(t_out);
    etau = to_e6(tau);
    check("Kwon loop result", e6_eq(et, tref));
    check("tau * t == conj(t)", e6_eq(e6_mul(etau, et), e6_conj(et)));
    check("tau nonzero", !e6_eq(etau, e6_zero()));
    check("M loop iterations", n_iter == 16'(M));
    check("M full GF(3^6m) products", n_mul_full == 16'(M));
    check("M+5 raw multiplier passes", n_mul_raw == 16'(M + 5));
    check("M full cubes", n_cube_full == 16'(M));
    check("2M+1 raw cube passes", n_cube_raw == 16'(2*M + 1));
    check("one inversion", n_inv == 16'd1);
    check("adder bank used", seen_add == M);
    check("subtractor bank used", seen_sub == 1);
    // schedule: 3 set-up cycles, M*(2*NDIG + 9) loop cycles, five multiplier
    // passes of NDIG + 2, inverter start, its run (at most 2M + 2), done
    lo = 3 + M * (2*NDIG + 9) + 5 * (NDIG + 2) + 1 + 1 + 1;
    hi = lo + 2*M + 1;
    $display("pairing took %0d cycles (schedule allows %0d..%0d)", cyc, lo, hi);
    check("cycle count", cyc >= lo && cyc <= hi);
  endtask

  initial begin
    xp = GF_ZERO; yp = GF_ZERO; xr = GF_ZERO; yr = GF_ZERO;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    pairing(p_rand(), p_rand(), p_rand(), p_rand());
    pairing(p_rand(), p_rand(), p_rand(), p_rand());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
