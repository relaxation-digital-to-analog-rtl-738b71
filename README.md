# Relaxation DAC with radix-based digital correction

A relaxation DAC (ReDAC) is almost entirely digital. A shift register plays
the bits of a code, least significant bit first and one bit per clock period
T, through a three-state buffer into a resistor and capacitor. After the last
bit, the capacitor voltage is the analog output. Each new bit pulls the
capacitor towards VDD or 0 by the fraction `1 - exp(-T/RC)`, so after the
bits `b0 .. b(M-1)`

    vC = VDD * (1 - 1/r) * sum_i b_i * r^(i-M+1),      r = exp(T/RC)

When `r = 2` (that is, `T = T* = RC ln 2`) this is `VDD * code / 2^M`, a
binary DAC. Any other clock period makes the DAC weigh bit i by `r^i`
instead of `2^i`. The result is large, saw-tooth shaped errors, worst at the
MSB transition. Earlier ReDACs fixed this by tuning the clock. This design
leaves the clock alone and fixes the code instead:

* **Radix correction.** Every radix-2 sample is rewritten as a radix-r code
  before it is played. The DAC's own radix-r weighting then turns it back
  into `VDD * sample / 2^N`.
* **Radix calibration.** The DAC's radix r is not known in advance. A
  start-up binary search finds it using only the DAC itself and one
  comparator.

The RTL has 10-bit input samples (`N`), 14-bit radix-r codes (`M`) and 16
clock cycles per sample. With a clock period 16 % short of `T*` (r = 1.79),
the simulated DAC goes from an INL/DNL of 62/118 LSB uncorrected to
0.30/0.33 LSB after calibration. Its SNDR goes from 24 dB to 62 dB.

## Radix correction: from radix 2 to radix r

Conversion is serial and works like a SAR search. A working register starts
at the sample value D (scaled to M bits). For i = M-1 down to 0, compare it
with the weight `w_i = r^i * G`:

* If it is below `w_i`, bit i of the radix-r code is 0.
* Otherwise bit i is 1 and `w_i` is subtracted.

The gain

    G = 2^M (r - 1) / r^M

comes straight from the vC formula above. With it, a code whose bits satisfy
`sum b_i r^i G = D` gives `vC = VDD * D / 2^M`. For r < 2 the weights are
redundant: each is less than the sum of all weights below it. The greedy
search therefore never gets stuck, and leaves a remainder below the smallest
weight G. That remainder is why the radix-r code needs more bits than the
input:

* With M = N = 10 and r = 1.79, G is 2.4 input LSB, and the DNL cannot get
  below about 2 LSB.
* With M = 14, G is `2^10 * 0.79 / 1.79^14 = 0.23` input LSB.

The N-bit sample enters the converter with `M - N` zeros appended.

`radix_weight_gen` computes the weights once per radix value, not per
sample:

1. A serial restoring divider forms `q = 1/r` (Q_FRAC = 20 cycles).
2. Then `C(M-1) = 2^M q` and `C(i-1) = C(i) q`, one multiply per cycle, which
   gives `C(i) = 2^M r^(i-M)`.
3. A conversion weight is `C(i) * (r - 1)`.

Only one division is needed. Weights carry 16 fractional bits. Over the
whole search range (1 < r < 4) they match floating point to within 0.002
input LSB plus 2e-5 relative.

If r > 2 the weights are not redundant, and codes between the reachable
values are lost. The design assumes a clock that is short of `T*`, not long.
See *Operating range* below.

## Radix calibration: a binary search on r

The search compares two adjacent codes around the MSB threshold of the
radix-r code, `A2 = ceil(2^M/r) - 1` and `B2 = ceil(2^M/r)`:

* If the assumed r equals the DAC's true radix, their outputs `VA` and `VB`
  differ by about one step.
* If the assumed r is too large, the DAC's error jumps from positive at A2 to
  negative at B2, so `VA > VB`.
* If r is too small, `VA < VB`.

So the sign of `VA - VB` tells which way to move r:

    r = 2, step = 1/2
    repeat M times:
        compute calibration weights for r; B2 = ceil(2^M/r), A2 = B2 - 1
        convert and play A2 -> store VA
        convert and play B2 -> compare VB with VA
        r = (VA > VB) ? r - step : r + step
        step = step / 2
    compute conversion weights for the final r

After M = 14 steps r is known to 2^-14. The search lowers r when `VA > VB`.
That is the direction that converges for the error signs described above.
Stepping the other way drives r to the end of its range (one of the broken
copies used to test the testbench does exactly that).

For calibration the weights leave out the `(r - 1)` factor, so the weight of
bit i is `2^M r^(i-M)`. The top weight is then exactly `2^M / r`. B2 is the
first code whose radix-r form is `100...0`, and A2 is the largest code below
it, which makes these two codes the pair the search compares.

The comparator is analog and is modelled in `va_vb_comparator`. It samples
and holds VA, then compares VB against it. On the digital side it is just
two strobes and one result bit.

## Operating range

The correction and the search work for any clock period shorter than `T*`,
that is for a radix `1 < r < 2`. `tb_rbdc_deviation` calibrates four
converters side by side:

| T/T* | true r | r found | INL max | DNL max |
|---|---|---|---|---|
| 0.75 | 1.68179 | 1.68292 | 0.81 LSB | 0.60 LSB |
| 0.84 | 1.79005 | 1.79034 | 0.30 LSB | 0.33 LSB |
| 0.92 | 1.89212 | 1.89227 | 0.11 LSB | 0.12 LSB |
| 0.99 | 1.98619 | 1.98639 | 0.11 LSB | 0.12 LSB |

The search settles where VA = VB, which is slightly above the true radix, and
this bias grows as r falls. Periods down to 0.999 T* were also calibrated
correctly.

**The search fails for `T >= T*`.** At exactly `T = T*` the first comparison
(r = 2, true radix 2) finds VA one step below VB, so the search moves r up.
For any assumed r > 2 the calibration code of A2 saturates at `0111...1`, and
the comparison then depends only on whether the true radix is below 2, not
on r. The search runs to r ≈ 3 and the DAC becomes very non-linear (INL of
about 175 LSB). Clock the DAC faster than `1/T*`, with some margin for
process spread, or start the search from a radix slightly above 2 (a change
to the reset value in `radix_cal_ctrl`).

## Frames, pipeline and timing

`redac_ctrl` divides time into frames of `M + HOLD = 16` cycles:

| frame cycle | LOAD/SHIFT | ENABLE (active low) | capacitor |
|---|---|---|---|
| 15 (last) | 1: next code loaded | 1 | holds previous output |
| 0 .. 13 | 0: shift | 0: buffer drives b0 .. b13 | charges |
| 14 | 0 | 1: buffer off | final; `sample_valid` |
| 15 | 1 | 1 | held |

Sixteen cycles per sample gives 1.45 MS/s at `T = T* = 43 ns` and 1.73 MS/s
at `T = 0.84 T*`.

Conversion is pipelined with playback. The converter starts on the same edge
that loads the shift register. It needs M + 1 cycles, which fits in a frame,
and its result waits in an output register for the next load. The timing is
therefore:

* `data_in` is taken in the cycle `data_take` is high, which is the last
  cycle of a frame.
* That sample is on the capacitor in the cycle `sample_valid` is high,
  `M + HOLD + M + 1 = 31` cycles later.
* The capacitor is not reset between samples. The previous output leaks
  into the next by `r^-M`, about 1/3500 at r = 1.79.

A calibration takes M iterations. Each iteration is one weight computation
(Q_FRAC + M + 2 = 36 cycles) plus three or four frames, 1376 cycles in all at
the defaults. While `cal_busy` is high, `data_take` stays low and no sample is
taken. The frame played right after calibration ends carries no sample.

After reset the weights are the binary ones `2^i` and r = 2, so until the
first calibration the DAC behaves as an uncorrected ReDAC. Calibration runs
when `cal_start` is pulsed. Nothing starts it automatically.

## Modules

| file | what it is |
|---|---|
| `rtl/rbdc_pkg.sv` | default sizes, the weight-mode enum |
| `rtl/redac_shift_reg.sv` | parallel-load, LSB-first shift register |
| `rtl/redac_ctrl.sv` | frame counter: LOAD/SHIFT, ENABLE, sample_valid |
| `rtl/radix_weight_gen.sv` | 1/r divider and weight recurrence; B2 |
| `rtl/radix_converter.sv` | serial radix-2 to radix-r conversion |
| `rtl/radix_cal_ctrl.sv` | binary search on r, frame sequencing of A2/B2 |
| `rtl/rbdc_core.sv` | all synthesizable logic wired together |
| `rtl/redac_output_stage.sv` | behavioural model: three-state buffer + RC network (real-valued) |
| `rtl/va_vb_comparator.sv` | behavioural model: sample-and-hold comparator |
| `rtl/rbdc_redac.sv` | top: core + both analog models, capacitor voltage as a `real` port |

`rbdc_core` is the part to synthesize. Its ports to the analog side are the
serial bit, ENABLE, `sample_valid`, the comparator strobes and the comparator
result. `rbdc_redac` exists so the whole converter can be simulated, and
`yosys` will not synthesize it because of the `real` signals. The core
synthesizes to about 180 word-level cells and 650 flip-flops at the default
size. Most of the flip-flops are the 14 weights of 30 bits each (420).

Parameters (defaults):

| parameter | default | meaning |
|---|---|---|
| `N` | 10 | input sample bits |
| `M` | 14 | radix-r code bits = shift-register length = search iterations |
| `HOLD` | 2 | idle cycles per frame (buffer off); must be at least 1 |
| `W_FRAC` | 16 | fractional bits of a weight |
| `Q_FRAC` | 20 | fractional bits of 1/r (at least `W_FRAC`) |
| `T_RATIO` | 0.84 | model only: clock period over `T*` |
| `VDD` | 0.7 | model only: buffer supply, V |

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/rbdc_pkg.sv tb/tb_rbdc_redac.sv --top-module tb_rbdc_redac
    ./obj_dir/Vtb_rbdc_redac

Use the same command for the others, with their names swapped in:

| testbench | what it checks |
|---|---|
| `tb_redac_shift_reg` | bit order after a load, one bit per cycle |
| `tb_redac_ctrl` | frame length and the position of LOAD, ENABLE and sample_valid |
| `tb_redac_output_stage` | capacitor voltage against the closed-form formula, hold while disabled |
| `tb_va_vb_comparator` | stored VA against later VB |
| `tb_radix_weight_gen` | weights and B2 against floating point, latency |
| `tb_radix_converter` | result against a greedy reference, r = 2 is the identity, latency |
| `tb_radix_cal_ctrl` | A2/B2 order, comparator strobes, M comparisons, final r within 2^-M |
| `tb_rbdc_core` | played bits before and after calibration, against a testbench RC model |
| `tb_rbdc_redac` | full-size end to end: uncorrected ramp, calibration, corrected ramp and random codes; INL/DNL and latency |
| `tb_rbdc_deviation` | calibration and corrected ramp at T/T* = 0.75, 0.84, 0.92 and 0.99 |
| `tb_rbdc_sine` | full-size SNDR/ENOB with a sine of 10 periods in 1024 samples, before and after calibration |

Results at the defaults (T = 0.84 T*, ideal analog models):

| | uncorrected | corrected |
|---|---|---|
| INL max (end-point fit) | 62.2 LSB | 0.30 LSB |
| DNL max | 118.3 LSB | 0.33 LSB |
| SNDR / ENOB | 24.0 dB / 3.7 | 62.0 dB / 10.0 |
| radix found | | 1.79034 (true 2^0.84 = 1.79005) |

For comparison, the transistor-level figures published for this technique are:

* INL 79.4 LSB before correction and 1.01 LSB after.
* DNL 158.3 LSB before and 0.45 LSB after.
* SNDR 22.2 dB before and 58.5 dB after.

The ideal buffer, resistor, capacitor and comparator here explain the better
corrected numbers.

## Where this design departs from, or fills in, the published description

* **The clock period.** The published description gives a 16 % clock
  deviation, T* = 43 ns, 1.7 MS/s and 1,450 kS/s. The `M + HOLD = 16`
  frame, and the reading of the deviation as a period that is 16 % short,
  are derived from those four numbers. The published 0.45 LSB DNL also
  needs M ≥ 13.
* **Width of the radix-r code.** The published text names the input width N
  and the radix-r code width M, but gives a number only for the 10-bit input.
  M = 14 is this design's choice within that range.
* **Calibration weights.** The published calibration uses "G = 1". Here that
  is taken as dropping only the `(r - 1)` factor (see above). A literal
  G = 1 cannot represent A2 on M bits when r < 2.
* **Direction of the search step.** The search lowers r when VA > VB, the
  direction in which the search converges.
* **Made-up details.** The published description does not specify the
  following; this design chooses them:
  * how the weights are computed (divider plus recurrence)
  * all fixed-point widths
  * the frame sequencing of calibration
  * the comparator as a sample-and-hold
  * the input handshake
  * reset values
  * the binary weights used before calibration
* **Analog parts.** The buffer, RC network and comparator are ideal
  behavioural models. Nothing is modelled of their noise, offset, finite
  buffer resistance or supply. The relaxation oscillator that clocks the
  DAC is not modelled: the clock is an input.
