// gf3m_inv: GF(3^M) inverter by a binary (divide-by-x) extended Euclidean
// algorithm, one reduction step per clock, at most 2M steps.
//
// Registers R, S (degree <= M) and U, V (degree < M) keep the invariants
//   U*a = R and V*a = S (mod f),  f = x^M + x^K + 2,
// starting from R = a, U = 1, S = f, V = 0. dR and dS are upper bounds on the
// degrees of R and S. Each step removes a factor x from one of them:
//   R(0) = 0           : R <- R/x,  U <- U/x mod f,  dR--
//   S(0) = 0           : the same for S, V, dS
//   both nonzero,
//   dR >= dS           : q = R(0)/S(0) = R(0)*S(0);  R <- (R - q*S)/x,
//                        U <- (U - q*V)/x mod f,  dR--
//   otherwise          : the symmetric step on S, V.
// Division by x modulo f is exact because f(0) = 2 = -1: W/x = (W + W(0)*f)/x.
// Since gcd(R, S) stays 1 and dR + dS starts at 2M-1 and falls by one per
// step, one of R, S becomes a nonzero constant r within 2M-1 steps, and then
// a^-1 = r*U (or r*V), since r^-1 = r in GF(3).
// The document names this unit and its 2m cycle cost and cites an inverter of
// earlier work; this particular algorithm is this design's own choice.
//
// Interface and timing: a is sampled on the start edge (ignored while busy);
// done pulses when inv is valid, at most 2M+1 cycles later; inv holds until
// the next start. a = 0 returns 0.
module gf3m_inv
  import gf3_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  gf3m_t a,
  output logic  busy,
  output logic  done,
  output gf3m_t inv
);

  localparam int DW = $clog2(M + 1);

  logic [M:0]    rh, rl, sh, sl;     // R and S, one trit more than an element
  gf3m_t         u, v;
  logic [DW-1:0] dr, ds;

  // (W + w0*f)/x for W of degree < M (f(0) = -1 cancels w0)
  function automatic gf3m_t div_x(gf3m_t w);
    gf3m_t r;
    trit_t w0;
    w0   = {w.hi[0], w.lo[0]};
    r.hi = {1'b0, w.hi[M-1:1]};
    r.lo = {1'b0, w.lo[M-1:1]};
    // + w0 * x^M / x  and  + w0 * x^K / x
    r.hi[M-1] = w0[1];
    r.lo[M-1] = w0[0];
    {r.hi[K-1], r.lo[K-1]} = t_add({r.hi[K-1], r.lo[K-1]}, w0);
    return r;
  endfunction

  // q*W for a GF(3) constant q, on M+1 trits
  function automatic logic [2*M+1:0] scale_long(logic [M:0] wh, logic [M:0] wl, trit_t q);
    logic [M:0] oh, ol;
    oh = ({(M+1){q[0]}} & wh) | ({(M+1){q[1]}} & wl);
    ol = ({(M+1){q[0]}} & wl) | ({(M+1){q[1]}} & wh);
    return {oh, ol};
  endfunction

  // X - Y on M+1 trits
  function automatic logic [2*M+1:0] sub_long(logic [M:0] xh, logic [M:0] xl,
                                              logic [M:0] yh, logic [M:0] yl);
    logic [M:0] t, oh, ol;
    // add X and -Y (negation swaps hi and lo)
    t  = (xh | yh) ^ (xl | yl);
    oh = (xl | yh) ^ t;
    ol = (xh | yl) ^ t;
    return {oh, ol};
  endfunction

  trit_t r0, s0, q;
  logic  r_const, s_const, r_zero;
  always_comb begin
    r0      = {rh[0], rl[0]};
    s0      = {sh[0], sl[0]};
    q       = t_mul(r0, s0);
    r_zero  = (rh == '0) && (rl == '0);
    r_const = (rh[M:1] == '0) && (rl[M:1] == '0) && (r0 != 2'b00);
    s_const = (sh[M:1] == '0) && (sl[M:1] == '0) && (s0 != 2'b00);
  end

  logic [2*M+1:0] qs, qr, rs_diff, sr_diff;
  always_comb begin
    qs      = scale_long(sh, sl, q);
    qr      = scale_long(rh, rl, q);
    rs_diff = sub_long(rh, rl, qs[2*M+1:M+1], qs[M:0]);
    sr_diff = sub_long(sh, sl, qr[2*M+1:M+1], qr[M:0]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      inv  <= GF_ZERO;
      rh <= '0; rl <= '0; sh <= '0; sl <= '0;
      u  <= GF_ZERO; v <= GF_ZERO;
      dr <= '0; ds <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (r_const) begin
          inv  <= f_scale(u, r0);
          busy <= 1'b0;
          done <= 1'b1;
        end else if (s_const) begin
          inv  <= f_scale(v, s0);
          busy <= 1'b0;
          done <= 1'b1;
        end else if (r_zero) begin      // only for a = 0
          inv  <= GF_ZERO;
          busy <= 1'b0;
          done <= 1'b1;
        end else if (r0 == 2'b00) begin
          rh <= rh >> 1;
          rl <= rl >> 1;
          u  <= div_x(u);
          dr <= dr - 1'b1;
        end else if (s0 == 2'b00) begin
          sh <= sh >> 1;
          sl <= sl >> 1;
          v  <= div_x(v);
          ds <= ds - 1'b1;
        end else if (dr >= ds) begin
          rh <= rs_diff[2*M+1:M+1] >> 1;
          rl <= rs_diff[M:0] >> 1;
          u  <= div_x(f_sub(u, f_scale(v, q)));
          dr <= dr - 1'b1;
        end else begin
          sh <= sr_diff[2*M+1:M+1] >> 1;
          sl <= sr_diff[M:0] >> 1;
          v  <= div_x(f_sub(v, f_scale(u, q)));
          ds <= ds - 1'b1;
        end
      end else if (start) begin
        rh <= {1'b0, a.hi};
        rl <= {1'b0, a.lo};
        u  <= GF_ONE;
        dr <= DW'(M - 1);
        // f = x^M + x^K + 2
        sh <= (M+1)'(1);
        sl <= ((M+1)'(1) << K) | ((M+1)'(1) << M);
        v  <= GF_ZERO;
        ds <= DW'(M);
        busy <= 1'b1;
      end
    end
  end

endmodule
