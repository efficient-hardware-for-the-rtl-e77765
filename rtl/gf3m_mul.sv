// gf3m_mul: digit-serial GF(3^M) multiplier, most significant digit first.
//
// The multiplier b is consumed D trits per clock. Each step computes
//   acc <- acc * x^D + a * b_j  (mod x^M + x^K + 2)
// for the digits b_j from the most significant down, so after
// NDIG = ceil(M/D) steps acc = a*b. The D overflow coefficients produced by the
// shift fold back with x^(M+j) = -x^(K+j) + x^j; this needs K + D <= M.
// The document fixes the digit-serial principle and the cycle count
// (ceil(M/D) = 25 cycles for M = 97, D = 4); the Horner-form step and the
// handshake below are this design's own.
//
// Interface and timing: a and b are sampled on the clock edge where start is
// high (start is ignored while busy). busy is high for the NDIG step cycles;
// done pulses for one cycle NDIG cycles after the start edge, and p then holds
// the product until the next start. Synchronous active-low reset clears the
// control state and the accumulator.
module gf3m_mul
  import gf3_pkg::*;
#(
  parameter int D = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  gf3m_t a,
  input  gf3m_t b,
  output logic  busy,
  output logic  done,
  output gf3m_t p
);

  localparam int NDIG = (M + D - 1) / D;
  localparam int NB   = NDIG * D;
  localparam int CW   = $clog2(NDIG + 1);

  initial assert (K + D <= M) else $error("gf3m_mul: K + D must not exceed M");

  gf3m_t            areg;
  logic [NB-1:0]    bhi, blo;     // multiplier, zero-padded to whole digits
  logic [CW-1:0]    cnt;
  gf3m_t            acc, acc_next;

  // one Horner step: acc * x^D + a * digit, reduced
  function automatic gf3m_t step(gf3m_t cacc, gf3m_t x, logic [D-1:0] dh, logic [D-1:0] dl);
    trit_t u [M+D];
    gf3m_t r;
    for (int n = 0; n < M + D; n++) u[n] = 2'b00;
    for (int n = 0; n < M; n++) u[n+D] = {cacc.hi[n], cacc.lo[n]};
    for (int t = 0; t < D; t++)
      for (int n = 0; n < M; n++)
        u[n+t] = t_add(u[n+t], t_mul({dh[t], dl[t]}, {x.hi[n], x.lo[n]}));
    for (int j = D - 1; j >= 0; j--) begin
      u[K+j] = t_add(u[K+j], t_neg(u[M+j]));
      u[j]   = t_add(u[j],   u[M+j]);
    end
    for (int n = 0; n < M; n++) begin
      r.hi[n] = u[n][1];
      r.lo[n] = u[n][0];
    end
    return r;
  endfunction

  always_comb acc_next = step(acc, areg, bhi[NB-1 -: D], blo[NB-1 -: D]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      acc  <= GF_ZERO;
      areg <= GF_ZERO;
      bhi  <= '0;
      blo  <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        acc <= acc_next;
        bhi <= bhi << D;
        blo <= blo << D;
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        areg <= a;
        bhi  <= NB'(b.hi);
        blo  <= NB'(b.lo);
        acc  <= GF_ZERO;
        cnt  <= CW'(NDIG);
        busy <= 1'b1;
      end
    end
  end

  assign p = acc;

endmodule
