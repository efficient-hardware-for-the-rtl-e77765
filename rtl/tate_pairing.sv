// tate_pairing: modified Tate pairing accelerator for supersingular curves
// over GF(3^M) (M = 97, x^97 + x^16 + 2), computing
//   t   = Kwon / modified Duursma-Lee loop on P = (xp, yp), R = (xr, yr)
//   tau = t^(3^(3M) - 1)                              (the Tate power step)
// with all GF(3^6M) values in the tower basis {1, sigma, rho, sigma rho,
// rho^2, sigma rho^2}.
//
// Datapath (as in the document's architecture figure): a register bank of
// GF(3^M)/GF(3^6M) registers, one GF(3^6M) multiplier of eighteen
// digit-serial GF(3^M) multipliers, six GF(3^M) cubing circuits, banks of
// GF(3^M) adders and subtractors on the 12M-bit lines, a GF(3^M) inverter,
// input and output multiplexors, and a controller FSM.
//
// Kwon loop (M iterations), as sequenced by the controller here:
//   init : alpha = xp, beta = yp, (x, y) = (xr^3, yr^3) [cubers, raw mode],
//          d = B*M mod 3, t = 1
//   03   : alpha = alpha^9, beta = beta^9                [2 cube cycles]
//   04   : mu = alpha + x + d                            [adders]
//   05   : gamma from mu*mu and beta*y                   [2 multiplier lanes]
//   06   : t = t^3                                       [GF(3^6M) cube]
//   07   : t = t*gamma                                   [GF(3^6M) multiply]
//   08   : y = -y, d = d - B mod 3
// Tate power: with t = a0 + sigma*a1 (a0, a1 in GF(3^3M), basis rewired to
// {1, rho, rho^2 | sigma, sigma rho, sigma rho^2}):
//   s0 = a0^2, s1 = a1^2, s2 = (a0+a1)^2   [3 GF(3^3M) products = 18 lanes]
//   nu = s0 + s1,  nu^-1 by cofactors:     [6 lanes, 3 lanes, GF(3^M) inverse,
//                                           3 lanes]
//   tau = (1 + s1*nu^-1) + sigma*(1 - s2*nu^-1)   [2 GF(3^3M) products]
// The step order, the register set, the use of the multiplier in raw mode for
// gamma and for GF(3^3M) arithmetic, and the cofactor inversion of nu are this
// design's choices; the document gives the algorithm, the tower, the unit
// counts and the architecture block diagram. Steps run one after another (no
// overlap), so with N = ceil(M/D) a loop iteration takes 2N + 9 cycles and
// the whole pairing, from the start edge to done,
//   3 + M*(2N + 9) + 5*(N + 2) + 3 + (inverter run, at most 2M + 1)
// cycles: 5864..6059 for M = 97, D = 4.
//
// Interface: drive xp, yp, xr, yr and pulse start while ready; done pulses
// when tau is valid, and tau (and the loop result t_out) hold until the next
// start. The output data bus out_data shows the output multiplexor (multiplier
// / cube result, subtractor bank or adder bank). Synchronous active-low reset.
module tate_pairing
  import gf3_pkg::*;
#(
  parameter int D = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  gf3m_t  xp,
  input  gf3m_t  yp,
  input  gf3m_t  xr,
  input  gf3m_t  yr,
  output logic   ready,
  output logic   done,
  output gf36m_t tau,
  output gf36m_t t_out,
  output gf36m_t out_data,
  // activity counters, observable for verification
  output logic [15:0] n_iter,      // Kwon loop iterations finished
  output logic [15:0] n_mul_full,  // GF(3^6M) multiplications started
  output logic [15:0] n_mul_raw,   // raw-lane multiplier passes started
  output logic [15:0] n_cube_full, // GF(3^6M) cubes
  output logic [15:0] n_cube_raw,  // raw GF(3^M) cube passes
  output logic [15:0] n_inv        // GF(3^M) inversions
);

  typedef enum logic [4:0] {
    S_IDLE, S_LOAD, S_INIT_CUBE, S_INIT_LATCH,
    S_AB_CUBE1, S_AB_CUBE2, S_MU, S_GAMMA, S_GAMMA_W,
    S_TCUBE, S_TMUL, S_TMUL_W, S_UPD,
    S_FE_SQ, S_FE_SQ_W, S_FE_COF, S_FE_COF_W, S_FE_DET, S_FE_DET_W,
    S_FE_INV, S_FE_INV_W, S_FE_U, S_FE_U_W, S_FE_FIN, S_FE_FIN_W, S_DONE
  } state_t;

  localparam int IW = $clog2(M + 1);

  state_t state;

  // ---------------- register bank ----------------
  gf3m_t   alpha, beta, xr3, yr3, mu, det, dinv;
  trit_t   dd;
  gf36m_t  t;
  gf33m_t  s1, s2, nu, cof, u;
  logic [IW-1:0] iter;
  gf3m_t   xp_in, yp_in, xr_in, yr_in;

  // ---------------- shared units ----------------
  logic    mul_start, mul_full, mul_done;
  logic    mul_busy;
  gf36m_t  mul_a, mul_b, mul_c;
  gf3m_t   ra [18], rb [18], rp [18];

  logic    cube_start, cube_full, cube_done;
  gf36m_t  cube_a, cube_c;

  logic    inv_start, inv_done, inv_busy;
  gf3m_t   inv_out;

  gf36m_t  add_a, add_b, add_s, sub_a, sub_b, sub_d;

  gf3m_t   g_ma [2], g_mb [2], g_prod [2];
  gf36m_t  gam;          // gamma register, inside gamma_unit

  gf36m_mul #(.D(D)) u_mul (
    .clk(clk), .rst_n(rst_n), .start(mul_start), .full(mul_full),
    .a(mul_a), .b(mul_b), .ra(ra), .rb(rb),
    .busy(mul_busy), .done(mul_done), .c(mul_c), .rp(rp)
  );

  gf36m_cube u_cube (
    .clk(clk), .rst_n(rst_n), .start(cube_start), .full(cube_full),
    .a(cube_a), .done(cube_done), .c(cube_c)
  );

  gf3m_inv u_inv (
    .clk(clk), .rst_n(rst_n), .start(inv_start), .a(det),
    .busy(inv_busy), .done(inv_done), .inv(inv_out)
  );

  gf36m_add u_add (.a(add_a), .b(add_b), .s(add_s));
  gf36m_sub u_sub (.a(sub_a), .b(sub_b), .d(sub_d));

  gamma_unit u_gamma (
    .clk(clk), .rst_n(rst_n), .load((state == S_GAMMA_W) && mul_done),
    .mu(mu), .beta(beta), .y(yr3),
    .mul_a(g_ma), .mul_b(g_mb), .prod(g_prod), .gamma(gam)
  );
  assign g_prod[0] = rp[0];
  assign g_prod[1] = rp[1];

  // ---------------- basis rewiring for the Tate power ----------------
  gf33m_t a0c, a1c, a01c;
  always_comb begin
    a0c  = {t[4], t[2], t[0]};   // 1, rho, rho^2 part
    a1c  = {t[5], t[3], t[1]};   // sigma part
    a01c = f3_add(a0c, a1c);
  end

  // lane product vectors grouped in sixes for GF(3^3M) Karatsuba
  gf3m_x6_t grp [3];
  always_comb
    for (int g = 0; g < 3; g++)
      for (int k = 0; k < 6; k++)
        grp[g][k] = rp[6*g+k];

  // ---------------- operand routing (multiplier lanes) ----------------
  gf3m_t ce, cg;   // cofactor helpers: c0 + c2, c1 + B*c2
  always_comb begin
    ce = f_add(nu[0], nu[2]);
    cg = f_add(nu[1], f_mulb(nu[2]));
  end

  always_comb begin
    gf3m_x6_t pa, pb, pc;
    pa = '0;
    pb = '0;
    pc = '0;
    for (int l = 0; l < 18; l++) begin
      ra[l] = GF_ZERO;
      rb[l] = GF_ZERO;
    end
    mul_full = 1'b0;
    mul_a    = t;
    mul_b    = gam;
    unique case (state)
      S_GAMMA: begin
        ra[0] = g_ma[0]; rb[0] = g_mb[0];
        ra[1] = g_ma[1]; rb[1] = g_mb[1];
      end
      S_TMUL: begin
        mul_full = 1'b1;
        mul_a    = cube_c;            // t^3 straight from the cube unit
      end
      S_FE_SQ: begin
        pa = k3_pre(a0c);
        pb = k3_pre(a1c);
        pc = k3_pre(a01c);
        for (int k = 0; k < 6; k++) begin
          ra[k]    = pa[k]; rb[k]    = pa[k];
          ra[6+k]  = pb[k]; rb[6+k]  = pb[k];
          ra[12+k] = pc[k]; rb[12+k] = pc[k];
        end
      end
      S_FE_COF: begin
        ra[0] = ce;    rb[0] = ce;      // (c0+c2)^2
        ra[1] = nu[1]; rb[1] = cg;      // c1*(c1+B c2)
        ra[2] = nu[1]; rb[2] = ce;      // c1*(c0+c2)
        ra[3] = nu[2]; rb[3] = cg;      // c2*(c1+B c2)
        ra[4] = nu[1]; rb[4] = nu[1];   // c1^2
        ra[5] = nu[2]; rb[5] = ce;      // c2*(c0+c2)
      end
      S_FE_DET: begin
        ra[0] = nu[0]; rb[0] = cof[0];
        ra[1] = nu[2]; rb[1] = cof[1];
        ra[2] = nu[1]; rb[2] = cof[2];
      end
      S_FE_U: begin
        for (int k = 0; k < 3; k++) begin
          ra[k] = cof[k]; rb[k] = dinv;
        end
      end
      S_FE_FIN: begin
        pa = k3_pre(s1);
        pb = k3_pre(s2);
        pc = k3_pre(u);
        for (int k = 0; k < 6; k++) begin
          ra[k]   = pa[k]; rb[k]   = pc[k];
          ra[6+k] = pb[k]; rb[6+k] = pc[k];
        end
      end
      default: ;
    endcase
  end

  // ---------------- cube unit operands ----------------
  always_comb begin
    cube_a    = t;
    cube_full = 1'b0;
    unique case (state)
      S_INIT_CUBE: cube_a = {GF_ZERO, GF_ZERO, GF_ZERO, GF_ZERO, yr_in, xr_in};
      S_AB_CUBE1: cube_a = {GF_ZERO, GF_ZERO, GF_ZERO, GF_ZERO, beta, alpha};
      S_AB_CUBE2: cube_a = {GF_ZERO, GF_ZERO, GF_ZERO, GF_ZERO, cube_c[1], cube_c[0]};
      S_TCUBE: cube_full = 1'b1;
      default: ;
    endcase
  end

  // ---------------- adder / subtractor bank operands ----------------
  // adders: mu = alpha + x (+ d below), nu = s0 + s1, tau real part 1 + s1/nu
  // subtractors: tau sigma part 1 - s2/nu
  gf33m_t one3, w1, w2;
  always_comb begin
    one3 = {GF_ZERO, GF_ZERO, GF_ONE};
    w1   = k3_post(grp[0]);
    w2   = k3_post(grp[1]);
    add_a = '0;
    add_b = '0;
    sub_a = '0;
    sub_b = '0;
    unique case (state)
      S_MU: begin
        add_a[0] = cube_c[0];         // alpha^9
        add_b[0] = xr3;
      end
      S_FE_SQ_W: begin
        add_a[2:0] = w1;              // a0^2
        add_b[2:0] = w2;              // a1^2
      end
      S_FE_FIN_W: begin
        add_a[2:0] = one3;
        add_b[2:0] = w1;
        sub_a[2:0] = one3;
        sub_b[2:0] = w2;
      end
      default: ;
    endcase
  end

  // ---------------- output multiplexor ----------------
  always_comb begin
    unique case (state)
      S_FE_FIN_W:               out_data = sub_d;
      S_MU, S_FE_SQ_W:          out_data = add_s;
      S_TMUL, S_AB_CUBE2, S_INIT_LATCH: out_data = cube_c;
      default:                  out_data = mul_c;
    endcase
  end

  assign ready     = (state == S_IDLE);
  assign t_out     = t;
  assign mul_start = (state == S_GAMMA) || (state == S_TMUL) || (state == S_FE_SQ) ||
                     (state == S_FE_COF) || (state == S_FE_DET) || (state == S_FE_U) ||
                     (state == S_FE_FIN);
  assign cube_start = (state == S_INIT_CUBE) || (state == S_AB_CUBE1) ||
                      (state == S_AB_CUBE2) || (state == S_TCUBE);
  assign inv_start  = (state == S_FE_INV);

  // handshake rules between the controller and the shared units
  a_mul_idle:  assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> !mul_busy);
  a_inv_idle:  assert property (@(posedge clk) disable iff (!rst_n) inv_start |-> !inv_busy);
  a_cube_rdy:  assert property (@(posedge clk) disable iff (!rst_n)
                                (state == S_TMUL) |-> cube_done);

  // ---------------- controller and register bank updates ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      alpha <= GF_ZERO; beta <= GF_ZERO; xr3 <= GF_ZERO; yr3 <= GF_ZERO;
      mu    <= GF_ZERO; det <= GF_ZERO; dinv <= GF_ZERO; dd <= 2'b00;
      t     <= '0;  tau <= '0;
      s1    <= '0;  s2  <= '0;  nu  <= '0; cof <= '0; u <= '0;
      iter  <= '0;
      xp_in <= GF_ZERO; yp_in <= GF_ZERO; xr_in <= GF_ZERO; yr_in <= GF_ZERO;
      n_iter <= '0; n_mul_full <= '0; n_mul_raw <= '0;
      n_cube_full <= '0; n_cube_raw <= '0; n_inv <= '0;
    end else begin
      done <= 1'b0;
      if (mul_start)  begin
        if (mul_full) n_mul_full <= n_mul_full + 1'b1;
        else          n_mul_raw  <= n_mul_raw + 1'b1;
      end
      if (cube_start) begin
        if (cube_full) n_cube_full <= n_cube_full + 1'b1;
        else           n_cube_raw  <= n_cube_raw + 1'b1;
      end
      if (inv_start) n_inv <= n_inv + 1'b1;

      unique case (state)
        S_IDLE: if (start) begin
          // input multiplexor: external input data into the register bank
          xp_in <= xp; yp_in <= yp; xr_in <= xr; yr_in <= yr;
          n_iter <= '0; n_mul_full <= '0; n_mul_raw <= '0;
          n_cube_full <= '0; n_cube_raw <= '0; n_inv <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          alpha <= xp_in;
          beta  <= yp_in;
          dd    <= (B == 1) ? trit_t'((M % 3 == 1) ? 2'b01 : (M % 3 == 2) ? 2'b10 : 2'b00)
                            : trit_t'((M % 3 == 1) ? 2'b10 : (M % 3 == 2) ? 2'b01 : 2'b00);
          t     <= {GF_ZERO, GF_ZERO, GF_ZERO, GF_ZERO, GF_ZERO, GF_ONE};
          iter  <= IW'(M);
          state <= S_INIT_CUBE;
        end
        S_INIT_CUBE: state <= S_INIT_LATCH;
        S_INIT_LATCH: begin
          // fed-back output data: x = xr^3, y = yr^3
          xr3   <= cube_c[0];
          yr3   <= cube_c[1];
          state <= S_AB_CUBE1;
        end
        S_AB_CUBE1: state <= S_AB_CUBE2;
        S_AB_CUBE2: state <= S_MU;
        S_MU: begin
          alpha <= cube_c[0];
          beta  <= cube_c[1];
          mu    <= f_add_const(add_s[0], dd);
          state <= S_GAMMA;
        end
        S_GAMMA:   state <= S_GAMMA_W;
        S_GAMMA_W: if (mul_done) state <= S_TCUBE;   // gamma_unit loads gamma
        S_TCUBE:   state <= S_TMUL;
        S_TMUL: begin
          state <= S_TMUL_W;
        end
        S_TMUL_W: if (mul_done) begin
          t     <= mul_c;
          state <= S_UPD;
        end
        S_UPD: begin
          yr3    <= f_neg(yr3);
          dd     <= (B == 1) ? t_add(dd, 2'b10) : t_add(dd, 2'b01);
          iter   <= iter - 1'b1;
          n_iter <= n_iter + 1'b1;
          state  <= (iter == IW'(1)) ? S_FE_SQ : S_AB_CUBE1;
        end
        // ---------- Tate power ----------
        S_FE_SQ:   state <= S_FE_SQ_W;
        S_FE_SQ_W: if (mul_done) begin
          s1    <= k3_post(grp[1]);
          s2    <= k3_post(grp[2]);
          nu    <= add_s[2:0];        // s0 + s1
          state <= S_FE_COF;
        end
        S_FE_COF:   state <= S_FE_COF_W;
        S_FE_COF_W: if (mul_done) begin
          cof[0] <= f_sub(rp[0], rp[1]);
          cof[1] <= f_sub(rp[3], rp[2]);
          cof[2] <= f_sub(rp[4], rp[5]);
          state  <= S_FE_DET;
        end
        S_FE_DET:   state <= S_FE_DET_W;
        S_FE_DET_W: if (mul_done) begin
          // det = c0*C00 + B*(c2*C01 + c1*C02)
          det   <= f_add(rp[0], f_mulb(f_add(rp[1], rp[2])));
          state <= S_FE_INV;
        end
        S_FE_INV:   state <= S_FE_INV_W;
        S_FE_INV_W: if (inv_done) begin
          dinv  <= inv_out;
          state <= S_FE_U;
        end
        S_FE_U:   state <= S_FE_U_W;
        S_FE_U_W: if (mul_done) begin
          u     <= {rp[2], rp[1], rp[0]};
          state <= S_FE_FIN;
        end
        S_FE_FIN:   state <= S_FE_FIN_W;
        S_FE_FIN_W: if (mul_done) begin
          // rewire {1, rho, rho^2 | sigma ...} back to the tower basis
          tau   <= {sub_d[2], add_s[2], sub_d[1], add_s[1], sub_d[0], add_s[0]};
          state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
