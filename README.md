# Polynomial-predistortion FMCW PLL — digital core

An FMCW radar needs a frequency chirp that is both fast and straight. A PLL whose loop is
far too slow to follow a 10 GHz/µs ramp can still produce one by **two-point modulation**:
the same frequency control word `Fcw[k]` is applied to the divider (through a delta-sigma
modulator), and also directly to the oscillator's capacitor banks. The direct path is open
loop, so it is only as good as the mapping from `Fcw` to capacitor code. An LC DCO's frequency
falls as the inverse square root of its capacitance, so a linear code ramp gives a bent
chirp.

This core straightens the chirp with an **8th-order polynomial predistortion (DPD)**:

    tw = a0 + a1·x + a2·x² + … + a8·x⁸ ,   x = (Fcw − Fcw_center) / 8

Here `tw` is the tuning word in units of the DCO's smallest capacitor. The nine
coefficients come from a one-time sweep of `tw` against measured frequency and a
least-squares fit. A polynomial needs only 9 stored numbers, where a piecewise-linear table
needs hundreds of segments for the same error. The tuning word is then split over the two
capacitor banks by a **flash-quantizer overlap correction**. Each of the 31 coarse cells is
used with its own measured weight, so cell mismatch cannot leave steps or folds in the
tuning curve.

The design follows the 65-nm, 7.15–10.15 GHz, 100 MHz-reference PLL described in *"An
8.65-GHz 8th-Order-Polynomial DPD FMCW PLL Achieving 10-GHz/µs Chirp Slope with 0.039% rms
Frequency Error and 3-GHz Chirp Bandwidth"*. That paper publishes the algorithms, the bank
sizes and the chirp figures, but not the digital microarchitecture. Word widths, pipelining,
the delta-sigma modulator, divider and loop filter here are this design's own. The section
"What follows the paper and what does not" lists every such choice.

## Signal path

```
                      +------------+  tw_dpd   +---+ tw_total +--------------+ D_CTRLT[31:1]
 chirp_gen --Fcw--+-->| dpd_poly8  |---------->| + |--------->| overlap_corr |-------------> DCO coarse bank
 (saw/tri/const)  |   | Horner x8  |  10 clk   +---+          | flash + 11x  | D_CTRLB[15:0]
                  |   +------------+             ^            | 1-bit quant. |-------------> DCO fine bank
                  |                              |            +--------------+    2 clk     |
                  |                     +-----+  |                          precharge_delay_line
                  |         e_k ------->| dlf |--+                          (SW1 pulses, model)
                  |   (from the SPD)    +-----+
                  |   +-----------+        +-----+ n_div   +-----+
                  +-->| 11-clk    |------->| dsm |-------->| mmd |--> div_out (to the SPD)
                      | alignment |        +-----+  1 clk  +-----+  clocked by DCO/2
                      +-----------+           | dtc_code
                                              +--------------------> DTC
```

`fmcw_pll_top` holds everything drawn above, on one reference-rate clock `clk` (100 MHz); only the
divider runs on `clk_div2`, the oscillator after the divide-by-2. The analog blocks are not
here: DCO, DTC, sampling phase detector (SPD), injection-locked divide-by-2 and reference
buffer. Their digital connections are the top's ports. The bank controls and the DTC code
go out; the digitised phase error `e_k` and `clk_div2` come in.

Both modulation points are exactly 12 clocks long. The DCO path has 1 normalise register,
8 Horner registers, 1 rounding register and 2 overlap-correction registers. The divider path
has an 11-register delay and the DSM register. The divider and the oscillator therefore
change to the same word in the same reference period. The closed-loop testbench shows what
this buys: while the loop follows a 10 GHz/µs chirp, the phase error stays within about 0.002 of a
divided-clock cycle. One cycle of misalignment would add half a cycle of phase error per
chirp step.

## Number formats

All shared formats live in `rtl/fmcw_pkg.sv`.

| quantity | format | meaning |
|---|---|---|
| `Fcw` | unsigned 6.16 | divide ratio N, with f_DCO = 2 · 100 MHz · N. 7.15–10.15 GHz is N = 35.75–50.75. One LSB is 3.05 kHz of DCO frequency. |
| `x` (inside the DPD) | signed Q1.19 | (Fcw − fcw_center)/8, saturated to \|x\| < 1. It keeps every bit of Fcw. |
| `coef[i]`, Horner accumulator | signed 40 bit, 16 fraction bits | ±8.4 M fine LSBs of range |
| `tw`, `tw_total` | unsigned 22 bit | tuning word in fine-capacitor LSBs (one residue step). The model DCO uses about 1.8 M of the 4.19 M range. |
| `TH[1..31]`, `BIN[5..15]` | unsigned 22 bit | cumulative coarse weights and fine weights, in the same unit |
| `e_k` | signed 10 bit | phase-detector output |
| loop-filter output | signed 16 bit | fine LSBs added to `tw` |
| `dtc_code` | unsigned 10 bit | DSM residue, fraction of one divided-clock cycle |

The factor 2 in f_DCO is the injection-locked divide-by-2 between the DCO and the divider.
The paper's fractional-N example, 100 MHz × 2 × (50 + 2⁻¹⁴), is `Fcw = 50·65536 + 4`.

## Polynomial predistortion (`dpd_poly8`)

The polynomial is taken in a normalised variable, not in raw `Fcw`. With Fcw ≈ 43, the
powers of Fcw up to the 8th would need impossible word widths, while for |x| < 1 each Horner
step `y ← y·x + a` keeps `y` inside the accumulator. Any polynomial in `Fcw` is a polynomial
in `x` with other coefficients, so nothing is lost. The calibration simply fits against `x`.

The evaluator is a pipeline of eight multiply-add stages (40 × 20-bit products, truncated
back to 16 fraction bits, saturated). It accepts one word per clock with 10 clocks of
latency. The result is rounded and clipped to the tuning-word range; `tw_clipped` reports
the clip. A lower order is obtained by writing zero to the upper coefficients; nothing else
changes.

**Calibrating the coefficients** is not done in hardware (the paper runs it on the radar's
processor). Write a constant-only polynomial (`coef[0] = tw·2¹⁶`, others 0), step `tw` over
at least 9 evenly spaced points across the chirp band, and measure f_DCO at each point. Then
solve the least-squares problem

    minimise Σ_k ( tw_k − Σ_i a_i · x_k^i )² ,   x_k = (f_k / 200 MHz − fcw_center/2¹⁶) / 8

and write `coef[i] = round(a_i · 2¹⁶)`. `tb/dpd_fit_pkg.sv` does exactly this.

## Overlap correction (`overlap_corr`)

The DCO has 31 thermometer-coded coarse cells, `D_CTRLT[31:1]`, and a 16-bit binary fine bank,
`D_CTRLB[15:0]`. The fine bank covers slightly more than one coarse step. With mismatch,
simply concatenating "coarse code, fine code" gives a curve that jumps or folds back at every
coarse boundary. Instead:

1. **Flash quantizer.** `tw` is compared with all 31 cumulative coarse weights `TH[i]` at
   once. The comparator outputs are the thermometer code `D_CTRLT`, their count is `D_M`, and
   the remainder `RES[1] = tw − TH[D_M]` (with `TH[0] = 0`) goes to the fine bank. Because
   `TH[i]` is the measured sum of cells 1..i, each cell's own error is absorbed.
2. **Cascaded quantizer.** Eleven 1-bit stages, from `BIN[15]` down to `BIN[5]`. Each stage sets
   its bit if the running remainder is at least `BIN[j]`, and then subtracts `BIN[j]`.
3. **Residue.** What is left drives `D_CTRLB[4:0]` directly, clipped to 31. `resid_over` flags a
   clip.

The fine bank only needs to span **one** coarse step. A DSM-dithered coarse/fine split needs
two. The word is rebuilt exactly, as `TH[D_M] + Σ BIN[j]·D_CTRLB[j] + D_CTRLB[4:0] = tw`, as
long as two conditions hold:

* the fine range ≥ `TH[i+1] − TH[i]` for every i, and
* every fine weight satisfies `BIN[j] ≤ 32 + Σ_{5≤k<j} BIN[k]`, with `BIN[5] ≤ 32`.

If a fine bit is heavier than everything below it, the greedy cascade leaves gaps. An
exactly binary bank has no slack in the second condition, so the direction of the mismatch
matters. The lower ten fine bits sit behind a capacitive divider, and the weights are
measured in units of one residue step. Then:

* If the divided bits come out **heavy** by a fraction ε, bit 10 and above weigh
  2^j/(1+ε) < 2^j units. The condition holds and the rebuild is exact.
* If they come out **light**, `BIN[10]` exceeds 1024 units. That leaves a gap of about
  1024·ε units below bit 10, which the residue clip (`resid_over`) turns into an error of up
  to that size.

A design that must tolerate both directions needs a fine-bank radix slightly below 2. The
testbench DCO model has heavy divided bits. The full-core test checks in every cycle that
the bank controls rebuild the tuning word, within 2 units.

Latency is 2 clocks: one register after the flash quantizer, one at the output.

### Calibrating TH and BIN

The weights come from a foreground binary search on measured frequency. The reference
design runs it as software; `tb/overlap_cal_pkg.sv` does the same against the DCO model.
It works bottom-up, with the residue step as the unit:

* `BIN[j]` is the weight of the lower, already calibrated bits that matches the frequency
  of bit j alone.
* `TH[i] = TH[i−1] + w`, where `w` is the fine weight that, with i−1 cells on, matches the
  frequency of i cells on and the fine bank empty.

The search runs over weights, each turned into a code by the same greedy split the hardware
performs, so frequency stays monotone in the search variable. The last step is linearly
interpolated. With the model's ±3% cells, every coarse boundary of the calibrated curve
is within 0.5 of an ordinary fine step. Small common errors in the unit do no harm, because
the polynomial fit absorbs any scale.

## Chirp generator (`chirp_gen`)

Three modes, selected by `mode` (`chirp_mode_e`):

| mode | sequence (one word per 10 ns) | period |
|---|---|---|
| `CHIRP_SAW` | `n_idle` cycles at `fcw_start`, then `n_ramp` steps of `+fcw_step` | `n_ramp + max(n_idle, 1)` |
| `CHIRP_TRI` | `n_ramp` steps up, then `n_ramp` steps down (after `n_idle` cycles at `fcw_start` following a restart) | `2·n_ramp` |
| `CHIRP_CW` | `fcw_start` held (fractional-N operation) | – |

The package defaults give the paper's fastest chirp: start 7.15 GHz, `fcw_step = 0.5`
(100 MHz per 10 ns, i.e. 10 GHz/µs), `n_ramp = 30` (3 GHz in 300 ns) and `n_idle = 5` (50 ns).
The step resolution is 3.05 kHz per cycle, i.e. 0.3 MHz/µs of slope. With the 16-bit counters,
a 3 GHz chirp can be as slow as about 4.6 MHz/µs. `restart` starts a new chirp from
`fcw_start`, always beginning with the idle time. `ramp_start`, `turn` and `idle` mark the
chirp's phases.

The arithmetic wraps modulo 2²², so a negative `fcw_step` in two's complement gives a
down-chirp. The measured sawtooth of the reference design is one: −10 GHz/µs, 3.1 GHz in
310 ns. That is `fcw_start = 51·65536` (10.2 GHz), `fcw_step = 2²² − 32768` and
`n_ramp = 31`.

## Divider path: `dsm`, `mmd`, DTC code

The delta-sigma modulator is a single accumulator (first order). Each clock it adds the 16
fractional bits of `Fcw`; the carry increments the integer ratio `n_div`. The accumulator
content is exactly how far the divider edge will lead the ideal edge, in fractions of a
divided-clock cycle. Its top 10 bits are `dtc_code`, for a digital-to-time converter that
delays the reference by that amount. The phase detector then sees no fractional-N
sawtooth. The DTC gain (code to seconds) is an analog calibration outside this core.

`mmd` is a down-counter clocked by `clk_div2`. It loads `modulus − 1` at its terminal count
and emits a one-clock `div_out` pulse, so a ratio takes effect from the following output
period. Ratios below 2 are treated as 2.

The ratio crosses from `clk` to `clk_div2` without synchronisation. This is sound only when
`clk` is itself the retimed divider output, as is usual in such PLLs, so that `n_div` is
stable around the terminal count. Driving `clk` from an unrelated clock would break the
ratio hand-over.

## Loop filter and the second modulation point (`dlf`)

A proportional-integral filter with power-of-two gains:
`y = e·2^kp_shift + integ/2⁸`, where `integ += e·2^ki_shift`. Integrator and output saturate,
and `sat` reports it. `hold` freezes the integrator and `clear` empties it. The output is
added to the DPD word before overlap correction (`tw_total`), so the loop corrects whatever
the predistortion gets wrong. In the closed-loop test, a 3000-LSB drift of `a0` (5.9 MHz rms
error with the loop open) is absorbed by the integrator. Once the integrator is held, the stored correction keeps
later chirps on target with the loop opened.

## Fast-charging pre-charge pulses (`precharge_delay_line`)

When a switched capacitor turns off, its bias resistors recharge the switch nodes slowly and
the DCO frequency settles late. The fast-charging cells get a short pulse `SW1` right after
their control `SW` falls. The pulse turns on helper transistors that pull the nodes up at
once. This applies to the 31 coarse cells and to the six largest fine bits, `D_CTRLB[15:10]`.

`precharge_delay_line` is a behavioural model with `#` delays, not synthesizable logic. The
delay (5 ps) and width (30 ps) are placeholders. The top instantiates it on the bank controls
and brings the pulses out as `sw1_coarse` / `sw1_fine`. Synthesis sees these 37 outputs as
undriven.

## Verification

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_chirp_gen` | Exact word sequence of all three modes against closed-form expressions, with ramp and turn counts per period, including a down-chirp. |
| `tb_dpd_poly8` | Random coefficient sets and inputs against floating-point evaluation (±1 LSB); exact 10-clock latency at one word per clock; clipping. |
| `tb_overlap_corr` | Mismatched banks. Checks the thermometer code, `D_M`, the cascade bits against a greedy model, exact rebuilding of `tw`, and residue overflow with a too-weak fine bank. |
| `tb_dsm` | Ratio sums over 2¹⁶ cycles equal Fcw exactly, DTC code against the accumulated phase, and tracking of a ramping Fcw. |
| `tb_mmd` | Every output period equals the ratio presented in the period before. |
| `tb_dlf` | Cycle-exact PI output against an integer model, including hold, clear and saturation. |
| `tb_precharge_delay_line` | A pulse after falling edges only, with the right delay and width, on the right channel only. |
| `tb_fmcw_pll_top` | The full core at default sizes with a DCO frequency model. TH/BIN come from a binary-search calibration against the model, the polynomial is fitted from a 41-point sweep, and 10 GHz/µs, 3 GHz sawtooth and triangle chirps are run. It also covers the binary-search overlap calibration (fine weights within 2 units of the truth, no jump at any coarse boundary), fractional-N at 50 + 2⁻¹⁴, loop-filter injection, pre-charge pulses, divider/DCO alignment, the rebuilding of the tuning word from the bank controls in every cycle, and a count of every mechanism. |
| `tb_fmcw_workloads` | DPD order 2…8 for sawtooth and triangle at 10 GHz/µs; slopes of 0.1, 1 and 10 GHz/µs; a −10 GHz/µs down-chirp sawtooth of 3.1 GHz in 310 ns, from 10.2 to 7.1 GHz, with 50 ns idle. |
| `tb_fmcw_closed_loop` | The loop closed through a phase-detector/DTC model built from `n_div` and `dtc_code`. Checks settling with a fractional ratio, drift removal, and phase error during chirps. |

The DCO model (`tb/dco_model_pkg.sv`) follows f = 10.25 GHz/√(C/C0) over 7.05–10.25 GHz. It
has ±3% random coarse-cell mismatch and a common +0…3% error on the ten divided fine LSBs.
With it, the static chirp error of the core is:

| DPD order | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|
| sawtooth rms error (kHz) | 18 728 | 2 184 | 256 | 29.9 | 3.4 | 0.9 | 0.6 |
| triangle rms error (kHz) | 18 449 | 2 277 | 276 | 31.9 | 3.6 | 0.9 | 0.6 |

The 8th-order figure is about 0.00002% of the 3 GHz band. It is 0.7 kHz at 1 and at
0.1 GHz/µs, and 0.7 kHz for the 3.1 GHz down-chirp. These numbers describe the digital path
only: quantisation and fit residue. The model has no settling dynamics, supply effects or phase noise, so they are **not** a
prediction of a measured chip. The chip this design is modelled on measured 1.00 MHz
(sawtooth) and 1.17 MHz (triangle) rms at 10 GHz/µs. The gap to the figures above is what a
static model leaves out. The testbenches require the 8th-order error to stay below 0.039%
of the bandwidth. They also require it to beat the 2nd order by more than 2×.

## Simulating

With Verilator 5 (packages must be listed before the files that use them):

```
verilator --binary --timing -Irtl -y rtl -y tb \
    rtl/fmcw_pkg.sv tb/dco_model_pkg.sv tb/dpd_fit_pkg.sv tb/overlap_cal_pkg.sv \
    tb/tb_fmcw_pll_top.sv \
    --top-module tb_fmcw_pll_top
./obj_dir/Vtb_fmcw_pll_top
```

Replace `tb_fmcw_pll_top` by `tb_fmcw_workloads` or `tb_fmcw_closed_loop` for the system
tests. For a block testbench only the RTL package is needed, for example:

```
verilator --binary --timing -Irtl -y rtl rtl/fmcw_pkg.sv tb/tb_overlap_corr.sv --top-module tb_overlap_corr
```

Each testbench runs in about a second.

## Changing it

* **Word widths** are package constants in `fmcw_pkg`. If the divide-by-2 is absent, or the
  reference differs, only the meaning of `Fcw` changes: f_DCO = 2·f_ref·Fcw.
* **DPD range:** `X_SHIFT` in `dpd_poly8` and `X_W` set how wide a span of `Fcw` maps to
  |x| < 1. With the defaults that is ±8 around `fcw_center`, i.e. ±1.6 GHz. For a wider band,
  raise `X_SHIFT`, at the cost of Fcw resolution inside the polynomial.
* **Alignment:** if you change a pipeline depth, set `ALIGN_DLY` in `fmcw_pll_top` so that
  `ALIGN_DLY + 1` equals the DCO-path latency.
* **Bank sizes:** 31 coarse cells, 11 cascaded bits and a 5-bit residue are package constants.
  The quantizer loops follow them.

## What follows the paper and what does not

Taken from the paper:

* the two-point modulation structure;
* the 8th-order polynomial and its calibration by a tw sweep with at least 9 points;
* the binary-search calibration of TH and BIN (here as testbench code);
* the flash quantizer with per-cell cumulative weights, the eleven 1-bit cascaded quantizers
  and the 5-bit residue;
* the 31-cell thermometer / 16-bit binary banks;
* pre-charge pulses on the coarse cells and the first six fine bits;
* sawtooth and triangle chirps with a 50 ns idle time, and the −10 GHz/µs, 3.1 GHz, 310 ns
  down-chirp;
* the 100 MHz reference, the divide-by-2, and the 7.15–10.15 GHz, 10 GHz/µs, 3 GHz figures.

This design's own choices:

* every word width;
* the normalised polynomial variable;
* the Horner pipeline and all latencies;
* the first-order DSM and its DTC code;
* the counter-based divider;
* the PI loop filter, its gains, and adding its output before overlap correction;
* the alignment delay;
* the chirp generator's state machine and ports;
* reading "the first 6 bits" of the fine bank as its six most significant bits;
* the pre-charge delay and width;
* the weight-domain form of the binary search and its interpolation;
* the DCO model in the testbenches: its range, mismatch and heavy divided bits.

Not included:

* the analog blocks (DCO, DTC, SPD, divide-by-2, reference buffer);
* the block labelled GMC, whose role is not described;
* the foreground calibrations as hardware. They are software in the original and appear
  here only as testbench code (`tb/dpd_fit_pkg.sv`, `tb/overlap_cal_pkg.sv`);
* an LMS background calibration, which the paper mentions only as a possible addition;
* a register interface for the coefficients and weights, which are plain input ports.
