# Per-channel pulse amplitude reconstruction for a calorimeter readout (TileCal, HL-LHC)

In the upgraded readout of the ATLAS Tile Calorimeter, every photomultiplier (PMT) is
digitised at 40 MHz, which is one sample per LHC bunch crossing (BC). Every sample goes to the
off-detector PreProcessor. The PreProcessor has to turn the sample stream of each channel into a
pulse amplitude, which measures the energy the particle left in the calorimeter cell. It must do this
once per bunch crossing, at a fixed latency, while pulses from neighbouring crossings overlap
(pile-up).

This RTL computes that amplitude for one channel in two ways, side by side:

* **Optimal Filtering (OF):** a weighted sum of 7 samples with fixed, precomputed weights.
  This is the method in use today. It is exact for an isolated pulse of the expected shape, but it
  degrades under pile-up.
* **Single Layer Perceptron (SLP):** a single neuron. It normalises a 9-sample window, forms
  one weighted sum plus a bias, applies a piecewise-linear `tanh` and scales the result back to
  ADC counts. Once trained on realistic pulses, it is meant to cope better with pile-up.

Both run in fixed-point arithmetic in a 400 MHz processing clock domain, and both deliver their
results to the 40 MHz domain. The OF result arrives 7 BC after the first sample of its window,
and the SLP result 12 BC after.

## Signal path

```
            40 MHz domain (clk40)                 400 MHz domain (clk400)       40 MHz domain
 hg_sample ─┐                  ┌─ 7 newest ─ gain_select ─┐
 lg_sample ─┼─ sample_window ──┤                          ├─ of_core  ─ result ─ latency_align ─ of_amp
 in_valid  ─┘  (9 x {HG,LG})   └─ all 9 ──── gain_select ─┼─ slp_core ─ result ─ latency_align ─ slp_amp
                    │ win_toggle                          │   ▲
                    └──────────── bc_strobe_sync ─────────┴── start
```

| module | domain | role |
|---|---|---|
| `tilecal_reco_top` | both | wires the channel together and sets the latency padding |
| `sample_window` | 40 MHz | shift-register FIFO holding the last 9 HG/LG sample pairs |
| `gain_select` | 40 MHz (comb.) | picks the LG window when an HG sample of the window is saturated |
| `bc_strobe_sync` | 400 MHz | turns "new window" into a start strobe in the fast domain |
| `of_core` | 400 MHz | OF weighted sum, rounding, gain conversion |
| `slp_core` | 400 MHz | normalise → weight layer → tanh → de-normalise → gain conversion |
| `weighted_sum` | 400 MHz | multiply-accumulate engine with a selectable number of multipliers |
| `tanh_pwl` | comb. | 16-segment piecewise-linear tanh |
| `latency_align` | 40 MHz | samples a fast-domain result at a fixed BC and delays it to the target latency |
| `tilecal_pkg` | — | widths, fixed-point format, coefficients, tanh table |

## Clocking, hand-over and latency

This is the part that needs the most care when changing the design.

**Clocks.** `clk400` must be phase aligned with `clk40` and run at exactly ten times its
frequency. In a real system both come from the bunch-crossing clock. Each BC therefore offers
ten fast cycles.

**40 → 400 MHz.** On each `clk40` edge that completes a window, `sample_window` updates its
window registers and flips `win_toggle`. `bc_strobe_sync` passes the toggle through two flops
and an edge detector. The resulting `start` strobe is seen at fast edge 3 after the BC edge. The
window registers and the combinational gain selection behind them are not synchronised. They are
held for the whole BC, so the cores read them at fast edge 3, and the 7-product OF sum also
reads them at edge 4. All reads finish well before the next BC edge.

**Inside the fast domain** (fast edges counted from the BC edge at which the window completed):

| fast edge | OF (`LANES = 7`) | SLP (`LANES = 1`) |
|---|---|---|
| 3 | start sampled, gain flag captured | start sampled; samples normalised and registered |
| 4 | 7 products summed | multiply-accumulate started |
| 5 | rounded, ×40 if LG → **result register written** | 1st product accumulated |
| 6 … 13 | | 2nd … 9th product accumulated |
| 14 | | z scaled to Q.14 and saturated |
| 15 | | tanh registered |
| 16 | | de-normalised, ×40 if LG → **result register written** |

The SLP's single multiplier is busy on 9 of every 10 fast cycles, so one window per BC is
sustained. This is the point of the fast clock: one multiplier does the work of nine. The gain
flag travels down the SLP pipeline with its window, because the next window has already
started by the time the first one reaches the output.

**400 → 40 MHz.** The result registers change only at fast edge 5 (OF) or 16 (SLP) after each
window, so they are stable across the next `clk40` edge (OF) or the one after it (SLP).
`latency_align` samples them there, CAP_BC = 1 or 2 BC after the window. This is a multicycle
path between related clocks, not an asynchronous crossing. A timing constraint in an FPGA flow
should say so. If you change `SLP_LANES` or a core's pipeline, the top recomputes CAP_BC, and an
elaboration check rejects a write time that falls within two fast cycles of a `clk40` edge.

**Latency.** The latency is counted in `clk40` edges, from the edge that captures the first sample of
the window to the edge at which `*_valid` rises with the amplitude:

```
latency = (window length - 1) + CAP_BC + DELAY_BC
OF : 6 + 1 + 0 = 7        (OF_LATENCY_BC, default 7)
SLP: 8 + 2 + 2 = 12       (SLP_LATENCY_BC, default 12)
```

The OF path has no slack, while the SLP path is padded by two BC. Padding makes the latency a
fixed, chosen number, independent of how the arithmetic is scheduled. Asking for less than the
minimum (7 for OF, 10 for SLP at the defaults) fails at elaboration. With `in_valid` low, the
window simply waits. The outputs then come CAP_BC + DELAY_BC edges after the window's last sample.

## The two reconstructions

**Gain selection.** Each PMT is read in high gain (HG) and low gain (LG), with a gain ratio of
40. A window is reconstructed from HG samples unless one of them has reached 4095. In that case
the LG samples of the same window are used, and the amplitude is multiplied by 40 at the end.
Each algorithm decides on its own window, so the SLP can switch to LG because of a saturated
sample that lies outside the 7-sample OF window. `of_lg` and `slp_lg` report the choice.

**OF.** `A = Σ a_i·y_i` over raw samples `y_i`, the 7 newest of the 9 in the window. The
weights are Q.14 numbers. They come from an assumed reference pulse `g`, sampled at −75…+75 ns, with
white noise: `a_i = (g_i − mean g) / Σ (g_j − mean g)²`. The rounded weights are then trimmed
so that `Σ a_i = 0` (the pedestal cancels) and `Σ a_i g_i = 1`. The result is rounded half up
to whole ADC counts. It is signed, because pile-up can push it negative. Only the amplitude is
computed, not the pulse time.

**SLP.** Four stages:

1. `x_n = (y − PED) / 4096` in Q.14, with `PED = 50`.
2. `z = Σ w_i·x_n,i + b`, brought back to Q.14 and saturated to 24 bits.
3. `t = tanh(z)`. The magnitude is split into 16 segments of width 0.25 on [0, 4). Each
   segment interpolates linearly between `round(tanh(k/4)·2^14)` and the next breakpoint, and
   the output is constant at tanh(4) beyond that. The worst error is about 0.01.
4. `A = round(t·OUT_SCALE) + OUT_OFFSET` in ADC counts, ×40 if LG.

**Fixed-point formats.**

| quantity | format |
|---|---|
| ADC sample | 12-bit unsigned |
| OF / SLP coefficients | 18-bit signed, Q.14 |
| SLP normalised input | 18-bit signed, Q.14 |
| SLP `z` | 24-bit signed, Q.14 |
| tanh output | 16-bit signed, Q.14 |
| amplitude | 24-bit signed, ADC counts in HG scale |

## Coefficients: what to replace before use

The SLP weights, bias, `PED`, `OUT_SCALE` and `OUT_OFFSET` are **placeholders**, not trained
values. The weights are the OF formula applied to a 9-sample shape and scaled by 0.25. With
`OUT_SCALE = 4·4096`, the neuron is then almost linear for high-gain amplitudes. The OF weights
likewise stand for a calibrated set. All of them are parameters (`COEF`, `BIAS`, `PED`,
`OUT_SCALE`, `OUT_OFFSET` on `of_core` / `slp_core`), with defaults in `tilecal_pkg`. To use
trained values, convert them to Q.14. For a network trained with a different normalisation,
adjust stage 1 and stage 4. The bit widths are constants in `tilecal_pkg` (`FRAC_W`, `COEF_W`,
`AMP_W`), so the design can be rebuilt at other precisions.

With the placeholder coefficients the SLP is, as expected, no better than OF. Over 500 000
events of up to 3900 counts without pile-up, OF is within 5 counts of the true amplitude (RMS 1.6)
and the placeholder SLP within 83. Under pile-up both spread to an RMS of about 200 counts.

## Where this design makes its own choices

* Both algorithms run in parallel on one shared window. OF takes the 7 newest samples.
* The clock crossing is a toggle synchroniser in one direction and a fixed-BC multicycle
  capture in the other. Latency padding gives exactly 7 / 12 BC, with latency measured from the
  first sample of the window.
* The saturation rule is that any HG sample of the window at 4095 switches the whole window to LG.
* The number of multipliers is 7 for OF and 1 for the SLP (`SLP_LANES` on the top).
* All coefficients, the pedestal, the output scaling and the fixed-point widths are this
  design's choices.
* Reset is synchronous and active low, shared by both domains. Hold `rst_n` low for at least
  two `clk40` cycles.

The design covers the reconstruction of one channel only. The front-end electronics, the
optical links, the readout pipeline that feeds the central DAQ and the trigger sums are not
part of it. A full PreProcessor would instantiate one `tilecal_reco_top` per PMT channel behind
its link decoding.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and carries a watchdog. `tb/tb_ref_pkg.sv` holds integer
reference models of both algorithms, written from their formulas. Its tanh breakpoints are
computed with `$tanh`, not read from the design's table.

| testbench | what it shows |
|---|---|
| `tb_sample_window` | window contents against a queue model, first full window, pauses, toggle |
| `tb_gain_select` | the switch at 4095 but not at 4094, window choice |
| `tb_bc_strobe_sync` | one strobe per toggle, exactly three edges later |
| `tb_weighted_sum` | 1, 3 and 9 lanes, extreme operands, done after ceil(9/LANES) cycles |
| `tb_tanh_pwl` | bit-exact against the model, within 0.011 of tanh, odd, monotonic |
| `tb_of_core` | bit-exact amplitudes, an ideal pulse recovered within 2 counts at any pedestal, 2-cycle timing |
| `tb_slp_core` | bit-exact amplitudes with windows back to back every 10 cycles, 13-cycle timing, LG flag kept with its window |
| `tb_latency_align` | capture after 1 and 2 BC, delay 0 and 2, against a moving data input |
| `tb_tilecal_reco_top` | 4000 BC of pile-up with saturating pulses and input pauses, at default parameters. Every output bit-exact and on time, 7 / 12 BC latencies. It counts and requires LG switches in both paths, an SLP-only switch, negative OF amplitudes and pauses |
| `tb_workload_reco` | 2 × 500 000 events without and with pile-up. OF within 8 counts without pile-up, and spreading under pile-up |

Build and run a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/tilecal_pkg.sv tb/tb_ref_pkg.sv tb/tb_tilecal_reco_top.sv --top-module tb_tilecal_reco_top
./obj_dir/Vtb_tilecal_reco_top
```

The workload testbench takes about a minute. All others finish in well under a second.
