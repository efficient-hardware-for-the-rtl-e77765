# A GF(3^97) Tate pairing accelerator

This RTL computes the modified Tate pairing on a supersingular elliptic curve
over GF(3^97). It is built for throughput through parallel field units. Each
pairing is split into two parts:

1. **The Kwon loop.** This is the modified Duursma–Lee algorithm. It runs 97
   iterations, and each one cubes and multiplies an element `t` of the degree-6
   extension field GF(3^(6·97)).
2. **The Tate power.** It raises `t` to `3^(3m) − 1` using one inversion in
   the base field.

Almost all of the work is GF(3^m) multiplication. The design's main idea is to
do it all at once. One GF(3^6m) product needs 18 GF(3^m) products, so the
datapath has 18 digit-serial GF(3^m) multipliers that run side by side. A full
GF(3^6m) multiplication therefore costs the same as one GF(3^m)
multiplication: 25 clock cycles with 4 trits per digit. Cubing is linear in
characteristic three, so six combinational cubing circuits cube a whole
GF(3^6m) element in one cycle.

One pairing takes **6057 clock cycles** at the default size (m = 97, D = 4).

## Number representation

* **Trits.** Each GF(3) digit uses two bits `{hi, lo}`: 0 = `00`, 1 = `01`,
  2 = `10`. An element of GF(3^m) is a struct of two m-bit vectors
  (`gf3_pkg::gf3m_t`, 194 bits). Adding two elements takes seven two-input gates per trit
  and no carries. Negating one just swaps `hi` and `lo`.
* **Base field.** Polynomial basis, modulo the irreducible trinomial
  `f = x^97 + x^16 + 2`. A reduction uses `x^97 = 1 − x^16`.
* **Tower.** GF(3^2m) = GF(3^m)[σ]/(σ² + 1) and
  GF(3^6m) = GF(3^2m)[ρ]/(ρ³ − ρ − B).
* **GF(3^6m) elements.** Each one is six GF(3^m) coefficients (`gf36m_t`,
  12m = 1164 bits). Index k holds the coefficient of
  `σ^(k mod 2) · ρ^(k div 2)`, so the basis order is 1, σ, ρ, σρ, ρ², σρ².
* **B.** This is the curve sign: B = +1 for y² = x³ − x + 1, B = −1 for the
  other curve. It defaults to +1.
* **Other basis.** The Tate power regroups the same six coefficients as
  `t = ǎ0 + σ·ǎ1` with ǎ0, ǎ1 in GF(3^3m). The ǎ0 coefficients are at indices
  0, 2, 4 and the ǎ1 coefficients at 1, 3, 5. The change of basis is just
  wiring.

`M`, `K` and `B` are constants in `rtl/gf3_pkg.sv`. The digit size `D` is a
module parameter (default 4).

## The multiplier array

This is the largest and least obvious part of the design. It has three
levels.

**GF(3^m): `gf3m_mul`.** A digit-serial multiplier that consumes `b` most
significant digit first, D trits per clock. Each clock it computes:

    acc ← acc·x^D + a·b_j   (mod f)

The D coefficients that overflow past x^96 fold back with
`x^(97+j) = −x^(16+j) + x^j`. This works because 16 + D ≤ 97. After
⌈97/4⌉ = 25 clocks, `acc` holds `a·b`.

**GF(3^2m): `gf32m_mul`.** Karatsuba with three GF(3^m) multipliers in
parallel:

    c0 = a0·b0 − a1·b1
    c1 = (a0+a1)(b0+b1) − a0·b0 − a1·b1

**GF(3^6m): `gf36m_mul`.** Karatsuba over the ρ-tower with six `gf32m_mul`
units, 18 multipliers in all. Write `a = A0 + A1ρ + A2ρ²`, where each Ai is in
GF(3^2m). The six GF(3^2m) products are:

    P0 = A0·B0,  P1 = A1·B1,  P2 = A2·B2
    P01 = (A0+A1)(B0+B1),  P02 = (A0+A2)(B0+B2),  P12 = (A1+A2)(B1+B2)

They combine into a degree-4 polynomial in ρ:

    D0 = P0,  D1 = P01 − P0 − P1,  D2 = P02 − P0 − P2 + P1,
    D3 = P12 − P1 − P2,  D4 = P2

That polynomial reduces with ρ³ = ρ + B:

    C0 = D0 + B·D3,  C1 = D1 + D3 + B·D4,  C2 = D2 + D4

The combining and reduction logic is combinational and sits behind the
multiplier registers. The result is ready when `done` pulses, 25 cycles after
`start`.

**Raw mode.** With `full = 0` (or `kara = 0` on `gf32m_mul`), the operand
networks are bypassed. The 18 multipliers then compute 18 independent products
of the operand pairs on `ra[l]` and `rb[l]`. Lane l maps to GF(3^2m) unit
l div 3, multiplier l mod 3. The controller uses raw mode for everything that
is not a full GF(3^6m) product:

* the two products of γ
* all of the GF(3^3m) arithmetic in the Tate power

As a result, the design contains exactly 18 multipliers.

## Cubing: `gf3m_cube` and `gf36m_cube`

In characteristic three, `(Σ a_i x^i)³ = Σ a_i x^(3i)`. So `gf3m_cube` spreads
the coefficients to every third position and folds everything above x^96 back
down, from the top coefficient downwards. The whole thing is a fixed network
of trit adders.

`gf36m_cube` cubes each GF(3^2m) part with `(a0 + a1σ)³ = a0³ − a1³σ`. It then
recombines the parts using ρ³ = ρ + B and ρ⁶ = ρ² − Bρ + 1:

    C0 = A0³ + B·A1³ + A2³,  C1 = A1³ − B·A2³,  C2 = A2³

The result is registered, so a cube takes one clock.

With `full = 0`, the six cubers instead cube six independent GF(3^m) values.
The controller uses this for x_r³ and y_r³, and for α⁹ and β⁹ (two passes).

## Inversion: `gf3m_inv`

The inverter is a binary extended Euclidean algorithm. It keeps R, S, U and V
with `U·a ≡ R` and `V·a ≡ S (mod f)`, starting from `R = a, U = 1, S = f, V = 0`.
It also keeps degree bounds dR and dS.

Each clock removes one factor of x from R or S:

* **Constant term of R or S is zero.** Divide that polynomial by x.
* **Both constant terms are nonzero.** Take the one with the larger degree
  bound, cancel its constant term with `q = R(0)·S(0)`, then divide by x.

Dividing U or V by x modulo f is exact because f(0) = −1, which gives
`W/x = (W + W(0)·f)/x`.

Each step lowers dR + dS by one, starting from 2m − 1. So within 2m steps R
or S becomes a nonzero constant r, and `a⁻¹ = r·U` (or `r·V`). The longest
inversion seen was 193 cycles. An input of a = 0 returns 0.

## The controller and the pairing schedule (`tate_pairing`)

The top holds the register bank, the controller FSM, the input and output
multiplexors, and one instance of each unit:

* the multiplier array
* the cube unit
* the inverter
* the six-lane adder bank `gf36m_add`
* the six-lane subtractor bank `gf36m_sub`
* `gamma_unit`, which also holds the γ register of the bank

**Kwon loop, run 97 times.** `N = ⌈m/D⌉ = 25`.

| step | operation | unit | cycles |
|---|---|---|---|
| init | α = x_p, β = y_p, x = x_r³, y = y_r³, d = B·m mod 3, t = 1 | cubers (raw) | 3 (once) |
| 03 | α = α⁹, β = β⁹ | cubers (raw), 2 passes | 2 |
| 04 | μ = α + x + d | adder bank | 1 |
| 05 | γ = −μ² − βyσ − μρ − ρ² = [−μ², −βy, −μ, 0, −1, 0] | 2 multiplier lanes + `gamma_unit` | N + 2 |
| 06 | t = t³ | GF(3^6m) cube | 1 |
| 07 | t = t·γ | GF(3^6m) multiply, fed straight from the cube unit | N + 2 |
| 08 | y = −y, d = d − B | register bank | 1 |

That is 2N + 9 = 59 cycles per iteration.

**Tate power.** `tau = t^(3^(3m)−1)`, using `t = ǎ0 + σǎ1` and
`t^(3^(3m)) = ǎ0 − σǎ1` (m is odd):

    tau = (ǎ0 − σǎ1)/(ǎ0 + σǎ1) = [1 + ǎ1²/ν] + σ[1 − (ǎ0 + ǎ1)²/ν],   ν = ǎ0² + ǎ1²

| pass | lanes | computes |
|---|---|---|
| 1 | 18 | ǎ0², ǎ1², (ǎ0+ǎ1)² (three 6-lane GF(3^3m) Karatsuba products); ν = ǎ0² + ǎ1² in the adder bank |
| 2 | 6 | cofactor products of ν |
| 3 | 3 | det(ν) = c0·C00 + B(c2·C01 + c1·C02) |
| — | — | det⁻¹ in `gf3m_inv` |
| 4 | 3 | ν⁻¹ = (C00, C01, C02)·det⁻¹ |
| 5 | 12 | ǎ1²·ν⁻¹ and (ǎ0+ǎ1)²·ν⁻¹; the adder and subtractor banks form the two halves of tau |

The cofactor passes invert ν through the adjugate of its multiplication
matrix. For `c = c0 + c1ρ + c2ρ²`, with `e = c0 + c2` and `g = c1 + B·c2`:

    C00 = e² − c1·g,  C01 = c2·g − c1·e,  C02 = c1² − c2·e

A whole pairing, counted from the start edge to `done`, takes:

    3 + m(2N + 9) + 5(N + 2) + 3 + (inverter cycles)

That is 5864 to 6059 cycles, and 6057 in practice. At 15 MHz this is 0.40 ms.

The steps run strictly one after another. Overlapping, say, the α/β cubing
with the previous multiplication would save about 4 cycles per iteration, but
this design does not do it.

## Interface and timing

`tate_pairing` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | sampled while `ready`; captures `xp, yp, xr, yr` |
| `xp, yp, xr, yr` | in | `gf3m_t` | coordinates of P and R |
| `ready` | out | 1 | controller idle |
| `done` | out | 1 | one-cycle pulse: `tau` and `t_out` valid, held until next start |
| `tau` | out | `gf36m_t` | t^(3^(3m)−1), basis 1, σ, ρ, σρ, ρ², σρ² |
| `t_out` | out | `gf36m_t` | result of the Kwon loop |
| `out_data` | out | `gf36m_t` | output data bus: multiplier/cube, subtractor or adder result |
| `n_iter`, `n_mul_full`, `n_mul_raw`, `n_cube_full`, `n_cube_raw`, `n_inv` | out | 16 | operation counters for the last pairing |

The units all share one handshake:

* operands are sampled on the edge where `start` is high
* `busy` is high while the unit works
* `done` pulses for one cycle when the result is ready
* the result then holds until the next `start`

Latency is 25 cycles for the multipliers, 1 cycle for `gf36m_cube`, and at
most 2m + 1 cycles for `gf3m_inv`.

The top checks three handshake rules with concurrent assertions:

* no multiplier start while the multiplier is busy
* no inverter start while the inverter is busy
* no multiply-by-γ before the cube result is ready

## Departures and limits

* **Modulus.** The field uses `x^97 + x^16 + 2`. A trinomial with constant
  term 1 would vanish at x = 1 and so would not define a field. To change the
  field, edit `M` and `K` in `gf3_pkg`. This needs `K + D ≤ M`, and the
  modulus must stay of the form `x^M + x^K + 2` and irreducible. The reference
  model in `tb/tb_gf3_ref.sv` follows `M` and `K` automatically.
* **Tate power.** Only the `3^(3m) − 1` part of the final exponent is
  computed. A complete reduced Tate pairing needs more exponent factors, and
  this design does not build them. `tau` is therefore the pairing value only
  up to that further powering.
* **Curve sign.** B = +1 is the default. B = −1 is supported by the RTL
  (every ρ reduction goes through B) but has not been simulated.
* **Sparse γ product.** γ has two zero coefficients and one constant
  coefficient, so t·γ could be done with 13 multipliers. This design always
  uses the general 18-multiplier product, which works for any operands.
* **Inputs.** The datapath does not check that P and R lie on the curve. It
  computes the algorithm on whatever coordinates it is given.
* **Size.** After generic synthesis the design is about 101k word-level cells
  and 21k flip-flops. Most of that is the 18 multipliers, about 5k cells
  each.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=F`.

The reference model `tb/tb_gf3_ref.sv` is independent of the RTL:

* integer coefficient arrays
* schoolbook products
* a 36-term GF(3^6m) product with direct rewriting of σ² and ρ³, ρ⁴
* the Kwon loop written straight from its listing

Testbench coverage:

| testbench | checks |
|---|---|
| `tb_gf3m_mul` | products for random and corner operands, against the reference; 25-cycle latency |
| `tb_gf3m_cube` | cubes against a·a·a, including x^96 (the deepest fold) |
| `tb_gf32m_mul`, `tb_gf36m_mul` | Karatsuba products against schoolbook; every raw lane; latency |
| `tb_gf36m_cube` | full and raw cubes; one-cycle latency |
| `tb_gf3m_inv` | a·a⁻¹ = 1, inv(0) = 0, at most 2m + 1 cycles |
| `tb_gamma_unit`, `tb_gf36m_add`, `tb_gf36m_sub` | every coefficient of the result |
| `tb_tate_pairing` | two full pairings at the default size (see below) |

For each of the two pairings, `tb_tate_pairing` checks:

* `t_out` against the reference Kwon loop
* `tau` through the identity `tau · t = conj(t)`, which needs no reference
  inversion
* the operation counts: 97 iterations, 97 full products, 102 raw passes,
  97 full cubes, 195 raw cube passes, one inversion
* that the adder and subtractor banks each reached the output bus
* the cycle count against the schedule above

It runs in about a second of simulation time on a workstation.

Simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/gf3_pkg.sv tb/tb_gf3_ref.sv tb/tb_tate_pairing.sv \
        --top-module tb_tate_pairing -o sim
    ./obj_dir/sim

Swap in any other `tb_*` module to test a single block. Verilator finds the
RTL files from the module names.
