# Relay-node signal processing unit for two-way MIMO-SDM-PNC

In a two-way relay network two nodes, N1 and N2, exchange data through a
relay R with no direct link. With physical-layer network coding (PNC), both
nodes transmit in the same slot. The relay does not separate the two users.
It estimates the network-coded symbol x(1) ⊕ x(2) directly and broadcasts
it, so the exchange takes two slots instead of four.

This RTL is the relay's baseband detector for the MIMO version of that
scheme:

* Each source node sends two BPSK streams from two antennas.
* The relay receives on four antennas.
* The four transmitted streams are re-expressed as sums and differences.
  With `x = [x1(1) x2(1) x1(2) x2(2)]^T` and `V = [1 0 1 0; 0 1 0 1; 1 0 -1 0; 0 1 0 -1]`,
  the channel becomes `H_hat = [H1 H2] V^-1` and the unknowns become
  `V x = [x1(1)+x1(2), x2(1)+x2(2), x1(1)-x1(2), x2(1)-x2(2)]`.
* A linear detector recovers these four sum and difference streams:
  * zero forcing: `G = (H_hat^H H_hat)^-1 H_hat^H`
  * MMSE: `G = (H_hat^H H_hat + sigma^2 I)^-1 H_hat^H`
* For each antenna, a selective rule picks whichever of the two streams
  (sum or difference) is less noisy and decides the PNC symbol from it.

The unit is fully pipelined. It takes a new set of inputs every clock: two
channel matrices, one received vector and, for MMSE, the noise variance. It
computes the whole detector for every set, including a 4 × 4 complex matrix
inversion.

## Dataflow and timing

```
 H1,H2 ─► channel_prep ─► matrix_mult ─►(noise_add)─► matrix_inverse ─► matrix_mult ─► selective_decision ─► pnc, y
          [H1 H2]V, ^H    H_hat^H H_hat   + σ²I       cofactors / det    G = K^-1 H_hat^H   y = G r, eq. (17)
             1 clk           4 clk        1 clk (MMSE)   W+C+16 clk           4 clk              5 clk
                 └──────── H_hat^H delayed W+C+20 (MMSE: +1) ─────────────────┘
 r ───────────────────────────── delayed W+C+25 (MMSE: +1) ──────────────────────────────┘
 sigma2 ─── delayed 5 ──► noise_add
```

From `in_valid` to `out_valid` the latency is **W + C + 30** clocks for zero
forcing and **W + C + 31** for MMSE. With the default W = 12 and C = 6, that is
48 and 49 clocks. W is the input (ADC) word width; C is the divider's scale
factor. The alignment delays are sized so that H_hat^H meets K^-1, and r meets
G, on the same clock.

Every register in every block has the same clock enable `ce`. Setting
`ce = 0` freezes the whole pipeline without losing data. `rst_n` is an
asynchronous active-low reset that clears everything.

The building blocks and their latencies are:

| block | what it does | latency |
|---|---|---|
| `complex_mult` | full-precision complex product (operand, product and sum registers) | 3 |
| `complex_adder` | N-term complex sum, optional per-term subtraction | 1 |
| `mm_element` | one element of a matrix product: K multipliers and an adder | 4 |
| `matrix_mult` | R×C parallel `mm_element`s (16 for 4×4) | 4 |
| `det_calc` | N×N determinant; instantiates itself for the (N-1)×(N-1) minors | 4(N-1) |
| `int_divider` | restoring divider, one stage per quotient bit, computes ⌊2^C·a/b⌋ | W+C |
| `complex_divider` | num/den = num·conj(den) / \|den\|², normalisation, two `int_divider`s, sign | W+C+4 |
| `matrix_inverse` | shared det(A), 16 minors, 16 `complex_divider`s | W+C+16 |
| `channel_prep` | [H1 H2]·V and its Hermitian transpose | 1 |
| `noise_add` | K + σ²I (MMSE) | 1 |
| `selective_decision` | y = G r, row energies of G, decision | 5 |
| `delay_line` | clock-enabled alignment delay | DEPTH |
| `relay_spu` | the top | W+C+30 / +31 |

`relay_pkg` holds the detector enum, the latency constants and the width
functions that all the blocks share.

## The matrix inversion

Inversion is the heavy part of the design. `K^-1` is computed directly by
the adjugate formula:

    (K^-1)_nm = (-1)^(n+m) det(K without row m and column n) / det(K)

* **Determinants.** `det_calc` expands a determinant along its first row.
  At each level the first-row element is delayed to meet its minor, then
  multiplied (3 clocks) and summed (1 clock) with alternating signs. A 3×3
  minor is therefore ready after 8 clocks and the 4×4 determinant after 12.
  Each of the 16 minors gets 4 more clocks of delay so that it lines up with
  det(K).
* **Widths.** Everything up to the division is exact integer arithmetic,
  which makes the words wide. With W = 12:
  * the Gram matrix has 31-bit parts;
  * det(K) is 135 bits;
  * the divider's numerator `cof · conj(det)` and denominator `|det|²` are
    238 and 272 bits.
  `relay_pkg::det_width` gives the exact sizes.
* **Division.** `complex_divider` reduces the wide operands to W bits:
  1. It finds the leading one of `|det|²` and picks a right shift s that
     leaves W bits. The same s is used for every element of the matrix,
     because they all share det(K).
  2. Each numerator magnitude is multiplied by 2^F and shifted right by s.
     It saturates at 2^W - 1.
  3. The restoring divider then computes `q = ⌊2^C · a / b⌋`. Its W + C
     stages each produce one quotient bit. Scaling the dividend by 2^C is
     what keeps a quotient below 1 from truncating to zero.
  4. The sign is restored in the output register.
* **Output format.** Each element of K^-1 is a (W+C+1)-bit integer whose LSB
  weighs 2^-(C+F).
* **Range and precision.** Because the divisor is normalised to
  [2^(W-1), 2^W), a quotient can only reach about 2^(C+1). That puts two
  limits on K^-1:
  * Its elements must stay below about 2^(1-F). Larger elements saturate.
    This happens with badly conditioned channels.
  * They are resolved to 2^-(C+F). So C sets the accuracy, and raising C
    improves it.

  The top's default `F = 2W - C - 1` suits channels whose entries span about
  a quarter of the W-bit input range. Choose F for your channel scaling.

## Number formats at the ports of `relay_spu`

* `h1[i][j]`, `h2[i][j]`: W-bit two's-complement complex gains, from
  transmit antenna j of node 1 or 2 to relay antenna i. `[0]` is the real
  part and `[1]` the imaginary part (the same convention holds for every
  complex packed pair in the design).
* `r[i]`: the received sample on relay antenna i, in the same units as the
  channel. The model is r = (1/√2) [H1 H2] x + n.
* `sigma2` (MMSE only, 2W bits, unsigned): the diagonal loading in the units
  of the internal Gram matrix. `channel_prep` builds `H V = 2 H_hat`, so the
  Gram matrix is 4 H_hat^H H_hat in input units squared. With the 1/√2 of
  the signal model, a noise variance σ² per receive antenna becomes
  `sigma2 ≈ 8σ²`.
* `gamma` (W bits, unsigned, LSB 2^-C): the decision threshold. In these
  units a noiseless sum or difference stream is 0 or ±1/√2 (the ±2 of the
  ideal x̂, scaled by 1/(2√2)). The testbenches use γ = 1/(2√2).
* `y[k]`: the four stream estimates `G r` (LSB 2^-C). Streams 0 and 1 are
  the sums for antennas 1 and 2; streams 2 and 3 are the differences.
* `pnc[i]`: the decision for antenna i, with 1 meaning symbol +1. For each
  antenna i, take k = i + 2 and let e_k denote row k's energy, the
  diagonal element (G G^H)_kk, which measures that stream's noise gain.
  * If e_i < e_k, the sum stream decides: `+1 if |Re y_i| ≥ γ`.
  * Otherwise the difference stream decides: `+1 if |Re y_k| ≤ γ`.
  +1 therefore means the two users sent equal bits. A tie counts as +1.
  `use_diff[i]` reports which stream decided.

## What follows the source description, and what was chosen here

Taken from the published architecture:

* the block diagram;
* the pipeline budget: 1 + 4 (+1) + (W+C+16) + 4 + 5 clocks;
* the alignment delays (W+C+20 / W+C+25, W+C+21 / W+C+26, 5);
* the 3-clock complex multiplier and the 4-clock matrix multiplier;
* the determinant recursion and the cofactor inversion;
* the divider with W + C stages, the 2^C dividend scaling and the
  W + C + 4 divider latency;
* the selective decision rule;
* the default W = 12, C = 6, the first of the published configurations.
  The published resource tables also cover (W, C) = (12, 12), (14, 7),
  (14, 14), (16, 8), (16, 16), (18, 9) and (18, 18). All of them are
  parameter settings of this RTL.

Chosen for this implementation, because the source leaves it open:

* **Internal widths.** All arithmetic is exact up to the divider.
* **Divider normalisation.** The common shift, the F scaling and the
  saturation.
* **Factor 1/2.** The 1/2 of `V^-1 = V/2` is dropped, which halves G.
* **Tie rule and sign convention.** A tie in the decision counts as +1,
  which matches the LLR rule (eq. (16)) at equality. The sign convention
  follows eq. (17).
* **Shared det(K).** One det(K) calculator feeds all 16 dividers. The
  published submodule figure draws a separate one in each submodule.
* **No stage on r.** The published figures draw a block labelled "Vx" on
  r. Its function is not described, so here r is simply delayed and
  multiplied by G in the last stage.
* **Control signals.** The `in_valid`/`out_valid` pair, `ce`, and the
  asynchronous reset.

Known departures and limits:

* The published latency in nanoseconds (Table III) does not equal the clock
  count divided by the published maximum frequency, so those figures are
  not reproduced.
* The published throughput (800 Mbit/s at 200 MHz, i.e. 4 bits per clock)
  is read as one input set per clock. This unit accepts one set per clock
  and delivers two PNC bits plus four stream estimates per clock.
* No timing closure or resource figure is claimed. The exact-width
  determinant arithmetic is far larger than a DSP-slice implementation
  with truncated words.
* Lint: Verilator reports the recursive `det_calc` instance's local `sub`
  and `sub_det` as unused and undriven. Simulation shows they are
  connected.

## Verification

Each block has a self-checking testbench in `tb/`. It drives random and
corner-case operands, toggles `ce` at random, and compares every output with
values computed independently in the testbench. It also checks the latency.
Each testbench prints `TB_RESULT checks=N failures=M`.

* `tb_det_calc` checks against the Leibniz permutation sum.
* `tb_matrix_inverse` compares bit for bit with a behavioural model. For
  diagonally dominant matrices it also checks that A·A^-1 ≈ I.
* `tb_complex_divider` compares with a model and with the real-valued
  quotient.
* `tb_relay_spu` runs the top at its default parameters (ZF, W = 12, C = 6).
  It builds random two-user channels, BPSK symbols and received vectors
  with a little noise. It checks y, `pnc` and `use_diff` bit-exactly against
  a model in `tb/relay_ref.svh`, and checks the W+C+30 latency. It requires
  that clock-enable stalls, input bubbles and both decision branches all
  occur. It also requires at least 80 % of the decisions to equal the true
  x(1) ⊕ x(2): about 90 % at C = 6, and 96–99 % at C = 12 in trial runs.
* `tb_relay_spu_mmse` does the same for the MMSE build (latency W+C+31).
* `tb_relay_spu_configs` repeats the test, with 40 channel sets each, at
  (W, C) = (12, 12) and (18, 18), in both the ZF and the MMSE build. The
  per-build test lives in `tb/relay_spu_checker.sv`.

To run one test with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_relay_spu \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/relay_pkg.sv tb/tb_relay_spu.sv
./obj_dir/Vtb_relay_spu
```

Change `W`, `C`, `F` or `DETECTOR` on `relay_spu` to build another
configuration. The testbenches keep the same names for their local copies.
