# Heterogeneous least-squares accelerator for radio-telescope gain calibration

Calibrating a radio-telescope array means estimating one complex gain per
antenna, so that the measured visibilities `V` match the model visibilities
`M` as `V ≈ G M G^H` with `G = diag(g)`. StEFCal solves this by iterating a
small least-squares update for each antenna. Such a run needs about a hundred
iterations. The early iterations only need to move the estimate roughly in the
right direction, so they can be computed with less precision.

This design exploits that. It has two cores with the same datapath:

* an **accurate core**, whose fixed-point word lengths are the smallest that
  still converge like the double-precision algorithm;
* an **approximate core**, where the four multipliers of the
  multiply-accumulate stage and the two squarers of the square-accumulate stage
  are cheaper and less exact.

The host runs the first `N_ax` iterations on the approximate core. It then
switches that core off and finishes on the accurate core. The energy saved is
`(P_acc − P_ax)·N_ax / (P_acc·N_total)`. The host may also keep both cores on
and run two independent calibrations at once.

Published results for this scheme, for reference: 124 antennas, 4 channels, 92
iterations, and up to 29 % energy saved with unbiased input truncation on 64
of the 92 iterations. These numbers come from the source publication. This RTL
has not been synthesised for power.

## The update one core computes

Take antenna `p` in iteration `i`:

```
z      = M(:,p) .* g(i-1)                      element-wise product (EP)
g_p(i) = ( V(:,p)^H z ) / ( z^H z )            MAC sum over SAC sum
```

The vectors run over all antennas `q` and all channels. With 124 antennas and 4
channels, each gain is a sum of **496 terms**. A core is one serial structure.
It takes one term per clock as a *beat*:

| beat field | meaning | format |
|---|---|---|
| `a`, `b` | real and imaginary part of `g_q` from the previous iteration | 23.14, 22.14 |
| `c`, `d` | `M_qp` | 16.25, 15.25 |
| `h`, `t` | `V_qp`, imaginary part **negated** (see below) | 18.12, 18.12 |

Every term flows through one combinational path. The only registers are the
three accumulators `sac`, `mac_real` and `mac_imag`.

```
 a,b,c,d ──► EP: e = ac − bd, f = ad + bc ──┬─► SAC: e² + f² ──► (+) ─► sac
                                            └─► MAC: eh − ft ──► (+) ─► mac_real
                                        h,t ──►      et + fh ──► (+) ─► mac_imag
```

After the 496th term, the final sums go straight into two sequential dividers:
`mac_real / sac` and `mac_imag / sac`. The accumulators start on the next gain
in the very next clock.

**Conjugation convention.** The MAC stage computes `v·z`, with real part
`eh − ft` and imaginary part `et + fh`. These are the signal names of the
original datapath. The formula needs `conj(v)·z`. The host therefore stores
each visibility with its imaginary part negated (`t = −Im V`), and the datapath
then computes the formula exactly. All testbenches do this.

## Number formats

Every signal is signed two's complement, written `WL.FL`: `WL` bits in total,
of which `FL` are fractional. The integer part is `WL − FL` bits including the
sign, so it can be negative for small signals. The widths are those of the
optimised accurate core. `rtl/ls_pkg.sv` holds them as constants.

| signal | format | signal | format | signal | format |
|---|---|---|---|---|---|
| a | 23.14 | ac | 23.25 | eh | 28.25 |
| b | 22.14 | bd | 21.25 | ft | 26.25 |
| c | 16.25 | ad | 23.26 | et | 28.26 |
| d | 15.25 | bc | 24.26 | fh | 27.26 |
| h, t | 18.12 | e_sac | 21.23 | eh_minus_ft | 28.25 |
| sac | 24.23 | f_sac | 20.22 | et_plus_fh | 28.26 |
| esq, fsq, esq_plus_fsq | 22.28 | e_mac | 23.25 | mac_real | 25.18 |
| | | f_mac | 24.26 | mac_imag | 24.18 |

The two stages see `z` in different formats: `e_sac`/`f_sac` in SAC and
`e_mac`/`f_mac` in MAC. Each multiplier produces its full product. The
`fx_requant` helper then cuts every value to its format: it rounds to nearest
(ties upward) and wraps on overflow. The formats were sized so that valid data
never overflows. The new gain comes out of the dividers directly in the `a`/`b`
formats, ready for the next iteration.

The rounding mode is this design's own choice; the source does not state one.
Truncation was tried first. It leaves a bias of half an LSB on each of the 496
accumulated terms. In the full-size test, that held the convergence measure
near 2·10⁻⁴. With rounding it falls to about 3·10⁻⁶.

## The approximate core

`approx_mult` is one multiplier written as a partial-product array. Row `j` is
the sign-extended multiplicand shifted by `j`, gated by bit `j` of the
multiplier. The row of the multiplier's sign bit is subtracted. The squarers
are the same module with both operands tied together. The parameter `METHOD`
adds one of three approximations:

| `METHOD` | what changes | bias | default setting in the top |
|---|---|---|---|
| `AM_INPUT_TRUNC` | low operand bits forced to 0 | squarers err upward for negative operands; products' error follows the data signs | 8 bits of `e_sac`, `f_sac`, `e_mac`; 12 bits of `f_mac`; `h`, `t` untouched (published values) |
| `AM_PP_TRUNC` | partial-product bits in columns below `PPT_COLS` removed | always negative | `AX_PPT_COLS = 20` (not published, chosen here) |
| `AM_DRUM` | Dynamic Range Unbiased Multiplier: keep `k` bits from each magnitude's leading one, force the lowest kept bit to 1, multiply `k×k`, shift back, restore the sign | ≈ 0 | `AX_DRUM_K = 12` (not published, chosen here) |

The element-wise product is always exact. The top's default is input
truncation, the method published as most effective.

**Unbiasing.** The truncating methods leave a systematic error in the sums;
partial-product truncation always errs downward. To compensate, the
approximate core starts each gain with non-zero initial values in its three
accumulators. The host writes these values into registers. The source obtains
them offline: it simulates the accurate and the approximate datapath side by
side and takes the mean difference per accumulator. It does not print the
values. The accurate core always starts from zero.

## Timing and flow control inside a core (`ls_core`)

* One term per clock while `in_valid && in_ready`. A counter marks the first
  term, which loads `bias + term`, and the last term, which starts the dividers.
* The dividers use radix-2 restoring division on magnitudes, one quotient bit
  per clock. That is 44 clocks for `mac_real`: 25 numerator bits plus a shift
  of 19 fractional bits. The quotient is rounded toward zero and saturated. A
  zero divisor gives the saturated value.
* `out_valid` rises **45 clocks** after the clock that took the last term. The
  gain waits in `out_gain` until `out_ready`.
* **Stall:** `in_ready` drops on the *last* term of a gain in three cases: the
  previous division is still running, it is completing this cycle, or its
  result has not been taken. At 496 terms per gain this only happens when the
  host leaves results waiting. With very short gains it happens all the time.
* `en = 0` is "core switched off": the core takes nothing and keeps its state.

## Host interface (`ls_accelerator`, `hetero_ctrl`)

| register `cfg_addr` | content |
|---|---|
| 0 CTRL | bit 0: accurate core on; bit 1: approximate core on |
| 1 | approximate core `mac_real` initial value (low 25 bits, 25.18) |
| 2 | approximate core `mac_imag` initial value (low 24 bits, 24.18) |
| 3 | approximate core `sac` initial value (low 24 bits, 24.23) |

* **Data bus** (`bus_valid/bus_ready/bus_core/bus_beat`): each beat names its
  destination core. A beat held back by `bus_ready = 0` must stay unchanged;
  an assertion checks this.
* **Results** (`res_valid/res_ready/res_core/res_gain`): each gain is tagged
  with its core. When both cores offer a gain, the core not served last goes
  first.
* **Observation:** `core_on`, `core_stall`, a counter of CTRL changes
  (`n_switches`) and a counter of cycles with two results pending
  (`n_conflicts`).

The host does the rest of StEFCal:

* streams `g`, `M` and `V`. The accelerator stores no matrices: `M` and `V`
  alone are 2 × 61 504 complex words;
* collects the 124 new gains of each iteration;
* every second iteration, replaces the gains by the mean of the new and the
  previous ones. This is part of StEFCal, not of the datapath;
* evaluates `‖g_i − g_(i−1)‖ / ‖g_i‖`;
* decides when to switch cores.

## Verification

Every testbench compares the RTL bit-exactly with an integer reference model
(`tb/tb_ref_pkg.sv`). The model is written with `*`, `/` and power-of-two
arithmetic, independently of the RTL structure. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_approx_mult` | all four methods on random and extreme operands; truncation errs negative, DRUM's mean error ≈ 0 |
| `tb_ep_unit`, `tb_sac_unit`, `tb_mac_unit` | stage arithmetic, formats, first-term bias load, enable; a known value fixes the sign convention |
| `tb_gain_divider` | quotient, saturation, zero divisor, 44-clock latency |
| `tb_ls_core` | an accurate and an approximate core at 8 terms per gain: gains, the 45-clock latency, stalls, results waiting for `out_ready`, core switched off |
| `tb_hetero_ctrl` | registers, routing, alternating service, counters |
| `tb_ls_accelerator` | 8 antennas, 2 channels: 4 approximate iterations, a switch, 4 accurate iterations, then both cores on two problems. Each mechanism must occur: switch, stall, result collision, unbiased gains, approximate ≠ accurate, falling convergence measure |
| `tb_ls_pptrunc`, `tb_ls_drum` | the same with the other two approximation methods |
| `tb_ls_full` | all parameters at their defaults (124 antennas, 4 channels): the full published schedule of 64 approximate plus 28 accurate iterations, then one parallel iteration; about 20 s of simulation |

The end-to-end tests derive the unbiasing values the way the source
describes. Before the run, the host model compares the accurate and the
approximate accumulator sums over all gains of the first iteration. It then
writes the mean difference of each accumulator into the registers.

The test problems are synthetic and noise-free: random gains around 40 and
random model visibilities below 4.5·10⁻⁴. At full size, the convergence measure
falls from 0.2 to about 1.5·10⁻⁵ on the approximate core. It jumps up at the
switch, then settles near 3·10⁻⁶ on the accurate core. The published runs use
one LOFAR time slot and reach 10⁻⁶; that data is not part of this test.

To simulate with Verilator 5, for example the full-size test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ls_pkg.sv tb/tb_ref_pkg.sv tb/tb_ls_full.sv --top-module tb_ls_full
./obj_dir/Vtb_ls_full
```

Replace `tb_ls_full` with any other testbench name. `tb_ls_accelerator`,
`tb_ls_pptrunc`, `tb_ls_drum` and `tb_ls_full` share `tb/tb_ls_body.svh`.

## Where this RTL departs from, or adds to, the published design

* Rounding to nearest in every requantisation, as explained above.
* The `v·z` datapath together with the negated-imaginary storage convention.
* The divider's algorithm, 44-clock latency, rounding, saturation and
  handshake. The source names only the division.
* Division overlaps the next gain's accumulation, and the last term may stall.
* The register map, the bus protocol, result arbitration and the observation
  counters. The source shows only a CPU, a data bus and a control line.
* "Switched off" is an enable that freezes the core. There is no power gating.
* `AX_PPT_COLS` and `AX_DRUM_K` are guesses. The published truncation depth and
  DRUM width are not known, so only input truncation matches the published
  approximate core exactly.
* The unbiasing constants are host inputs; no values are built in.
* Not built: storage for `M`, `V` and `g`, and the host itself.
* No area or power figures are claimed for this RTL.

## Files

`rtl/`: `ls_pkg` (formats, types), `fx_requant`, `approx_mult`, `ep_unit`,
`sac_unit`, `mac_unit`, `gain_divider`, `ls_core`, `hetero_ctrl`,
`ls_accelerator` (top).
`tb/`: one testbench per module, the reference model `tb_ref_pkg`, and the
shared end-to-end body `tb_ls_body.svh`.
