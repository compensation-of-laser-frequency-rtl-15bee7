# Parallel two-stage carrier recovery for 16-QAM coherent receivers

A coherent optical receiver must remove the carrier phase from every received symbol. Two
impairments pull in different directions. Laser phase noise is fast and random; a
feed-forward estimator such as blind phase search (BPS) handles it well. Laser *frequency*
fluctuations (mechanical vibration, supply noise) are slow, but they can swing the
frequency by hundreds of MHz. A feed-forward estimator averaging over a short window cannot
follow that, while a phase-locked loop can. This design therefore chains two stages:

```
 theta, |r|  ┌──────────────┐ psi   ┌────────────┐       ┌─────┐ psi'  ┌────────────┐     ┌────────┐
 ───────────►│ parallel     ├──────►│ derotate 1 ├──────►│ BPS ├──────►│ derotate 2 ├────►│ 16-QAM │──► decisions
 (P per clk) │ DPLL         │       │ theta-psi  │       │     │       │ theta-psi' │     │ slicer │
             └──────────────┘       └────────────┘       └─────┘       └────────────┘     └────────┘
```

At 32 GBd per polarization the logic cannot run at the symbol rate. It handles a block of
P = 80 symbols per clock, so f_clock = 32 GHz / 80 = 400 MHz. A loop built from P serial
copies would have far too long a critical path. The core of this design is a way to
**unroll a first-order phase-locked loop over a whole block and still close it in one clock
cycle**, for 16-QAM rather than QPSK.

All of it is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`. Self-checking
testbenches are in `tb/`.

## 1. The serial loop it starts from

The loop works entirely in the phase domain. Each sample r_n arrives as a phase θ_n and a
magnitude |r_n|. A 16-QAM symbol reduced modulo π/2 (into the first quadrant) can only take
three phases:

* π/4, for the 4 inner-ring and 4 outer-ring (diagonal) points;
* atan(1/3) or atan(3), for the 8 middle-ring points.

So the symbol's modulation can be stripped by reducing the phase modulo π/2 and subtracting
an estimate ρ_n of that first-quadrant phase:

```
ε_n   = (θ_n − ψ_{n−1}) mod π/2 − ρ_n          phase error
ψ_n   = ψ_{n−1} + Kp·ε_n                        NCO (first order, "type I")
ρ_n   = π/4        if |r_n| ≥ ρ_u or |r_n| ≤ ρ_l           (inner / outer ring)
        atan(1/3)  if ρ_l < |r_n| < ρ_u and θ̃_n ≤ π/4       (middle ring, lower half)
        atan(3)    if ρ_l < |r_n| < ρ_u and θ̃_n > π/4       (middle ring, upper half)
θ̃_n   = (θ_n − ψ_{n−1}) mod π/2
```

ρ_l and ρ_u are magnitude thresholds that separate the middle ring from the inner and
outer rings.

## 2. Unrolling over a block of P samples

For lane m of a block (lane 0 is the oldest sample n, lane P−1 the newest), the loop
becomes

```
ψ_{n+m} ≈ ψ_{n−1} + Kp · Σ_{k=0..m} [ (θ_{n+k} − ψ_{n−1}) mod π/2 − ρ_{n+k} ]
```

It uses two approximations:

1. **Every lane of a block is demodulated with the same phase ψ_{n−1}**, the NCO phase at
   the end of the previous block. This lets all P error terms be computed in parallel. The
   loop then needs only multi-operand adders.
2. **The estimates ρ are computed one block early.** Computing ρ needs a comparison after
   the demodulating addition. That does not fit in the same cycle as the big sum. So ρ for
   the block arriving now is formed with the NCO phase that is current *now*, which is one
   block older than the phase that will demodulate these samples one cycle later. Only the
   middle-ring symbols use θ̃ at all. Frequency fluctuations are also slow compared with the
   baud rate. The extra staleness therefore costs almost nothing.

The result is a loop whose feedback path holds one register. The loop latency is one
clock (L_w = 1).

```
cycle c   : block j arrives ─► mod π/2 ─► F_k (ρ with ψ of cycle c) ─► Σρ, negate ─► reg
                               └──────────────────────────────────────────────► reg (φ̃)
cycle c+1 : reg(φ̃) ⊕ (−ψ)_{π/2} ─► CSA( Kp⁻¹ψ, Σ demod, −Σρ ) ─► Kp⁻¹ψ register  (branch P−1)
                                  └► W_0..W_{P−2}: same sum over lanes 0..m ─► ψ_{n+m} outputs
```

## 3. Fixed-point form

This is the part to read before changing any width.

* **Binary angles.** A phase is an N_PSI-bit unsigned code (default 7 bits). Code c means
  2π·c/2^N_PSI, so all modulo-2π arithmetic is plain wrap-around. *Modulo π/2* means
  keeping the N_PSI−2 least significant bits (5 bits, 32 codes over a quarter turn).
* **Demodulation** (θ − ψ) mod π/2 is a 5-bit addition of φ̃ = θ mod π/2 and
  (−ψ) mod π/2, with the carry dropped.
* **The accumulator holds Kp⁻¹·ψ, not ψ.** With Kp = 2^−N_K (default N_K = 6), multiplying
  the loop equation by Kp⁻¹ removes the gain multiplier altogether:
  `Kp⁻¹ψ_{n+P−1} = Kp⁻¹ψ_{n−1} + Σ demod + (−Σρ)`, all modulo 2^(N_PSI+N_K) = 8192.
  ψ itself is the top N_PSI bits of the accumulator: a right shift by N_K.
* **The ρ sum is added as its two's complement**, truncated to N_PSI+N_K bits (the
  carry out of the complement is not needed).
* **Decision table**, in 5-bit codes over [0, π/2): atan(1/3) = 6.55 → **7**,
  π/4 → **16**, atan(3) = 25.45 → **25**. The middle-ring split is θ̃ > 16.
* **Magnitudes** |r| are N_R = 11-bit unsigned. The ring bounds are inputs in the same units.

Each branch sums P or fewer 5-bit terms plus two 13-bit words. `csa_tree` reduces them
with 3:2 carry-save rows (a Wallace tree, about log_{3/2}(P) rows) and one final adder.
That is what makes the one-cycle loop feasible.

## 4. Second stage: blind phase search and slicer

After the first derotation, the remaining phase error is the fast laser phase noise and
whatever the loop leaves behind. `bps` tries B = 32 test phases spread over the π/2
ambiguity range. With N_PSI = 7 these are the 32 consecutive codes −16 … +15. For each
test phase, `bps`:

1. rotates the sample by the test phase;
2. converts it to Cartesian form with a 128-entry cosine table;
3. slices it onto the 16-QAM grid;
4. keeps the squared distance, saturated to 20 bits.

The distances are summed over a window of M = 21 samples centred on the sample being
decided. The test phase with the smallest sum wins (the lowest index on a tie). The window
reaches 10 samples into the neighbouring blocks, so a block is decided only once the next
block has arrived. The cosine table is computed at elaboration by a power series
(`dpll_pkg::cos_value`: round(2047·cos(2πi/128))), so no data file is needed.

The second `phase_derotator` subtracts the BPS phase. `qam16_slicer` then decides each
axis against the thresholds 0 and ±2·unit. Level index 0..3 means −3, −1, +1, +3 units.

## 5. Interfaces and timing

Top level `cpr_top` (all arrays are unpacked, `[P]`, lane 0 oldest):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (NCO restarts at phase 0) |
| `in_valid` | in | 1 | a block is present. When low, the whole pipeline holds. |
| `theta[P]` | in | N_PSI | received phase θ per lane |
| `r_mag[P]` | in | N_R | received magnitude \|r\| per lane |
| `rho_l`, `rho_u` | in | N_R | ring bounds of the DPLL decision, ρ_l < ρ_u |
| `qam_unit` | in | N_R | 16-QAM grid unit amplitude (points at ±1, ±3 units) |
| `psi_dpll[P]`, `dpll_valid` | out | N_PSI, 1 | DPLL phase per lane, one cycle after the block |
| `theta_out[P]`, `r_out[P]` | out | N_PSI, N_R | sample after both derotations |
| `sym_i[P]`, `sym_q[P]`, `out_valid` | out | 2, 2, 1 | decisions |

Latency with one block per clock:

| point | cycle |
|---|---|
| block presented | c |
| DPLL phases, combinational from registers | c+1 |
| first derotation, registered | c+2 |
| BPS decision, registered | c+5 |
| second derotation, registered; decisions follow combinationally | c+6 |

A block leaves the BPS only when the next block enters it. At the end of a stream, one
extra block is needed to flush it.

For a 16-QAM constellation with unit amplitude u, the ring radii are √2·u, √10·u and √18·u.
Reasonable bounds are the midpoints between them. The testbenches use u = 280, ρ_l = 640
and ρ_u = 1036.

## 6. Module map

| module | role |
|---|---|
| `dpll_pkg` | default sizes, decision angles, helper functions (code rounding, cosine table) |
| `cpr_top` | the two-stage chain above |
| `pdpll_16qam` | parallel DPLL: mod-π/2 lane reduction, `nco_branch_last`, branches W_0..W_{P−2} |
| `nco_branch_last` | the loop itself: P × `rho_decision` (blocks F_k), ρ sum, registers, overflow adders, branch P−1, Kp⁻¹ψ register |
| `rho_decision` | block F_k: θ̂ = φ̃ ⊕ (−ψ)_{π/2}, then ρ from two magnitude comparators, their AND, a π/4 test and a 3-entry table |
| `rho_accumulator` | Σρ in a CSA tree, two's complement mod 2^(N_PSI+N_K) |
| `w_branch` | branch W_k: Kp⁻¹ψ_{n−1} + Σ demod + (−Σρ), output = top N_PSI bits |
| `csa_tree` | multi-operand adder mod 2^W: Wallace tree of 3:2 compressors + final adder |
| `phase_derotator` | θ − ψ mod 2π per lane, registered |
| `bps` | blind phase search, B test phases, window M |
| `polar_to_cart` | \|r\|, θ → x, y through the cosine table (used before the final slicer) |
| `qam16_slicer` | per-axis 16-QAM decision and squared distance |

Parameters and their defaults: `P = 80`, `N_PSI = 7`, `N_R = 11`, `N_K = 6` (Kp = 1/64),
`B = 32`, `M = 21`. The first four are the synthesized operating point of the DPLL. B and M
are the BPS settings of the performance study.

## 7. What the loop can and cannot track

This is a first-order (type I) loop with Kp = 2^−6. The middle-ring decision is right only
while the phase error it sees stays within about ±0.32 rad. A middle-ring point sits
atan(1/3) = 0.32 rad from the quadrant border. Beyond that error, the point is taken for
its neighbour across the border.

Under a frequency offset Ω (rad/symbol), three errors add up:

* the static error of a type I loop, (Kp⁻¹ − (P−1)/2)·Ω, for the first lane of a block;
* the drift of up to (P−1)·Ω across the block, because all lanes share one phase;
* one more block of drift, P·Ω, because ρ is computed one block early.

With P = 80 that totals about 184·Ω at the last lane. Keeping it under 0.32 rad limits the
loop to frequency deviations of roughly 9 MHz at 32 GBd. The testbenches use a 4 MHz offset
plus 4 MHz of sinusoidal FM and lock cleanly. A trial with 10 MHz + 10 MHz showed
middle-ring decision errors and a slow, biased pull-in, as this estimate predicts.

Studies of this architecture with vibration tones of up to 700 MHz amplitude use a
**second-order (type II)** loop with an integral path. Its integral path removes the
static error, and the block-unrolling technique applies to it as well. It is not built
here.

## 8. Departures from the reference architecture and own choices

* The symbol-phase decision logic is described only as "two comparators, an AND gate and a
  look-up table". The exact decomposition here, including nearest rounding of the table
  codes, is this design's own.
* Only the internal structure of branch P−1 is specified. The other W_k reuse it with
  fewer lanes. Each has its own ρ-prefix sum from per-lane ρ registers, so ρ is registered
  both per lane and as a negated sum for branch P−1.
* The ring bounds and the grid unit are run-time inputs; no values are prescribed.
* `in_valid` (a clock enable for the whole pipeline) and the asynchronous reset are added.
* Inputs are polar. The rectangular-to-polar conversion and the dispersion compensator
  ahead of it are outside this design.
* The complex multipliers by exp(−jψ) are phase subtractions.
* The BPS internals are a standard blind phase search chosen here:
  * test-phase grid as above;
  * 12-bit cosine table;
  * 20-bit saturated distances;
  * no unwrapping of the π/2-periodic estimate.
* There is no differential quadrant decoder. Decisions carry the usual unknown rotation by
  a multiple of π/2.

## 9. Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rho_decision` | exhaustive over phase codes × NCO phases × magnitudes around both bounds |
| `tb_csa_tree` | 3- and 82-operand trees against plain sums, all-ones corner case |
| `tb_rho_accumulator` | −Σρ mod 8192 for 80 estimates, including all-zero and all-31 |
| `tb_w_branch` | branches K = 0 and K = 9 against direct sums |
| `tb_nco_branch_last` | P = 8 loop, cycle by cycle, against a model written from the loop equations, with idle cycles |
| `tb_pdpll_16qam` | default P = 80 DPLL on a 16-QAM stream with frequency offset and sinusoidal FM: every lane phase against the model, one-cycle latency, lock (≥ 97 % of symbols within 4 codes), all three ρ values |
| `tb_phase_derotator` | θ − ψ and hold during idle cycles, latency |
| `tb_qam16_slicer` | against a brute-force nearest-point search |
| `tb_bps` | P = 16: recovers a known residual phase (±1 code), ignores an isolated phase kick, alignment of θ/\|r\| with the decision, 3-cycle latency |
| `tb_cpr_top` | the full chain with P = 16: 6-cycle latency, symbol error rate < 1 % after settling (modulo a π/2 rotation), and that each mechanism occurs |
| `tb_cpr_top_full` | the same test with every parameter at its default (P = 80) |

`tb_cpr_top` and `tb_cpr_top_full` also count these mechanisms and fail if any never happens:

* each of the three DPLL estimates;
* the DPLL phase wrapping through 2π;
* a non-zero BPS phase;
* an idle input cycle.

To run a testbench with Verilator 5 from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/dpll_pkg.sv tb/tb_pdpll_16qam.sv \
          --top-module tb_pdpll_16qam -j 0 -Mdir obj_pdpll
./obj_pdpll/Vtb_pdpll_16qam
```

Verilator finds the other modules in `rtl/` by file name. The full-size `tb_cpr_top_full`
elaborates 2,560 rotate-and-slice units in the BPS. Its C++ build takes about 8 minutes on
one core, so use `-j 0`. The simulation itself takes well under a second. To lint the whole design:

```
verilator --lint-only -Wall -Irtl rtl/dpll_pkg.sv rtl/cpr_top.sv --top-module cpr_top
```

The remaining lint warnings are unused signals: slicer outputs not needed by the BPS, the
θ̂ output of the F blocks, and the full-precision accumulator of the W_k branches, of which
only the top bits are used.

What the tests do not cover:

* timing closure at 400 MHz or any gate-level result;
* the closed-loop frequency response of the DPLL;
* OSNR or BER curves;
* tones of large amplitude, which need the type II loop (section 7).

Every module's testbench was also run against a deliberately broken copy of the module,
and each such copy made its testbench fail.
