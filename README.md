# Sine-wave histogram analyzer for ADC test

This is synthesizable SystemVerilog for an on-chip ADC output analyzer. It
characterizes an N-bit analog-to-digital converter from one sine-wave
histogram test. A sine slightly larger than the converter's full scale is
applied. The analyzer reads the converter's output codes and reports:

- the fitted input offset and amplitude;
- the offset error and the gain error;
- DNL and INL, per code and as extremes;
- an estimate of the SNR lost to these static errors (the "degraded SNR",
  SNR_d).

No histogram memory is used, neither for the measured histogram nor for the
reference one. The expensive functions of the textbook histogram test are
replaced by cheap ones:

- the cosines in the sine fit become squares (a Maclaurin approximation);
- the arcsines of the reference histogram come from a shift-and-add CORDIC;
- the logarithm of the SNR comes from a small table.

The method, its approximations and the block structure (two counters, a
sine-fit unit, a CORDIC-based reference-count calculator, arithmetic units
and an SNR table) are those of H.-W. Ting, B.-D. Liu and S.-J. Chang, "A
Histogram-Based Testing Method for Estimating A/D Converter Performance"
(IEEE Trans. Instrumentation and Measurement, 2008). The paper gives the
formulas and the block diagram but no RTL. Everything below the block
diagram is this implementation's own: sequencing, handshakes, widths, number
formats, the CORDIC variant, the divider and the table size. The section
"Where this design departs from the method" lists those choices.

Default configuration: an 8-bit ADC, N_t = 32768 samples per histogram, and
a CORDIC with 24 iterations.

## How one test runs

Two counters do the histogram work:

- **C1** (`code_index_counter`) names the code under analysis.
- **C2** (`hit_counter`) counts how many of the next N_t accepted samples
  equal that code.

Each code gets its own pass of N_t samples, so only one count is held at a
time. The samples can come from a stored record that is replayed for every
pass; the analyzer pulses `record_start` before each pass. They can also
come from a live converter that is sampled coherently: with J input cycles
in every M samples (J and M coprime, N_t a multiple of M), every block of
N_t samples has the same histogram.

C1 visits the codes in this order:

1. **Code 0, then code 2^N-1.** Their counts H(0) and H(2^N-1) go to
   `offset_amp_estimator`, which fits the sine offset V_o and amplitude A.
2. **Codes 1 to 2^N-2, one after another.** After the pass for code i:
   - `href_calculator` computes the reference count Href(i): the hits an
     ideal converter would get from the fitted sine;
   - `seq_divider` forms r(i) = H(i)/Href(i);
   - `adc_param_unit` updates DNL(i) = r(i) - 1 and INL(i) = DNL(1) + ... + DNL(i),
     and sends them out on the per-code result stream.
3. **After the last code:**
   - `adc_param_unit` computes gain, gain error, offset error and Error;
   - `snr_lut` converts Error to SNR_d;
   - `done` pulses.

The arithmetic for one code takes about 80 to 110 cycles. That is small
against a pass of 32768 samples, so it runs between passes and nothing is
overlapped. A full test takes 2^N passes: about 8.4 million cycles at the
default size when the stream has no bubbles.

## Fitting the sine from the two end codes

For a sine of offset V_o and amplitude A (in LSB), the fraction of samples
that land in an end code depends on the cosine of pi·H/N_t. The exact fit
needs two cosines and a division. For N >= 8, an end code is hit in less than
about 1/8 of pi of the samples. So cos x can be replaced by 1 - x²/2, which
leaves

    V_o ≈ (pi²/N_t²) · (H(2^N-1) + H(0)) · (H(2^N-1) - H(0)) · 2^(N-3)
    A   ≈ (2^(N-1) - 1 - V_o) · (1 + 2^(1-N)) + V_OD

N_t is a power of two, so the division by N_t² is a shift. `offset_amp_estimator`
is therefore:

- two squarers;
- one multiplier by the constant pi² (Q16);
- shifters and adders.

The overdrive V_OD is how far the sine goes beyond full scale. It is a
property of the test set-up, so it is a run-time input (`vod`).

## The reference histogram: arcsine by CORDIC

This is the least obvious part of the design. An ideal converter driven by
the fitted sine hits code i

    Href(i) = N_t/pi · [ asin((i+1-2^(N-1)-V_o)/A) - asin((i-2^(N-1)-V_o)/A) ]

times. Computing this directly needs a division and an arcsine for every
code.

**Double-rotation arcsine CORDIC** (`cordic_asin`). The unit computes
asin(t/a) without dividing:

- A vector of length a starts on the x axis.
- Iteration i (i = 1 to 24) rotates it twice by ±atan(2^-i). The sign is
  chosen so that its height y moves towards the target t.
- An ordinary CORDIC rotation lengthens the vector by sqrt(1+2^-2i). Two
  equal rotations lengthen it by exactly 1+2^-2i.
- The target is scaled by the same factor every iteration (c += c >> 2i),
  so the comparison between y and c stays exact and no gain correction is
  needed.
- The angles are summed. The rotation angles from i = 1 add up to 1.92 rad,
  which covers ±pi/2.
- The rotation angles 2·atan(2^-i) are a small constant table in `hta_pkg`
  (they are 2^(25-i) in Q24 from i = 9 on).

**Mirror solution.** The first iterations take large steps and can swing the
vector past ±90°. The height y then also equals the target at pi - theta,
the wrong branch of the arcsine. The direction rule therefore turns the
vector back towards the x axis whenever x < 0; it steers towards the target
only while x >= 0.

**Accuracy.** The datapath is 48 bits wide with 32 fractional bits. The
result is within 2·10^-6 rad of the true arcsine, and within 2·10^-5 rad
when |t/a| > 0.999, where the arcsine is steep. Arguments with |t| > a are
clamped to ±pi/2.

**One CORDIC run per code** (`href_calculator`). The upper arcsine of code i
is the lower arcsine of code i+1. The calculator keeps it, so codes in
ascending order need one CORDIC run each. The first code, or any code that
does not follow the previous one, needs two runs. The angle difference is
scaled by N_t/pi: one constant multiplication by 1/pi (Q32) and a shift by
log2 N_t.

Latency, from the cycle with `start` high to the cycle with `done` high:

| Unit | Cycles |
|---|---|
| `cordic_asin` | ITER + 1 |
| `href_calculator`, one CORDIC run | ITER + 4 |
| `href_calculator`, two CORDIC runs | 2·ITER + 6 |

## From counts to parameters

`seq_divider` is a radix-2 restoring divider, one quotient bit per cycle. It
divides H(i)·2^32 by Href(i) (Q16), which gives r(i) in Q16. The result is
saturated at 2^15. That only happens for a code whose bin lies outside the
fitted sine, where Href = 0.

`adc_param_unit` keeps these values while the codes go by:

- DNL(i) = r(i) - 1 and the running INL(i), with their largest and smallest
  values;
- the DNL sum over codes 2 to 2^N-2;
- the sum of |DNL² + 2·DNL| = |r² - 1| over all inner codes.

With D = 2^N - 2, the end of the test gives

    G            = 1 - ΣDNL / D                 (gain of the transfer curve)
    Gain_Error   = -(2^N / D) · ΣDNL            (LSB)
    DNL_act      = G · (1 + DNL) - 1            (gain-corrected DNL, LSB)
    Offset_Error = (1 + 2^(1-N)) · V_o          (LSB)
    Error        = 1 + G² · Σ|DNL² + 2·DNL| / D
    SNR_d        = -10·log10(Error)             (dB)

G is known only after the last code, so the gain-corrected DNL is reported
for the largest and smallest DNL only. G is positive, so those are also its
extremes.

Error is the mean squared quantization error relative to that of an ideal
converter. A code of width 1+DNL contributes (1+DNL)² of the ideal squared
error, and its excess is counted in absolute value. G² is positive, so it
comes out of the absolute value. The sum can therefore be formed before G is
known, and G² is applied once at the end. Division by D is a multiplication
by a rounded Q32 reciprocal.

`snr_lut` replaces the logarithm:

- Error is rounded to the nearest 1/32, between 1 and 4.97.
- Entry k of the table is round(256 · -10·log10(1 + k/32)), the SNR in dB
  with 8 fractional bits.
- The table is computed from this formula at elaboration and synthesizes to
  a 128 × 16-bit constant ROM.
- Error = 1.25 gives -248/256 = -0.97 dB.
- Near Error = 1.25, one table step is worth about 0.1 dB.

## Number formats

Defined in `hta_pkg`:

| Quantity | Format |
|---|---|
| V_o, A, V_OD, DNL, INL, offset error, gain error | signed, 32 bits, 16 fractional bits (Q16), in LSB |
| G, Error | signed Q16, no unit |
| Href(i), r(i) | unsigned Q16, 32 bits |
| Angles | signed Q24, in radians |
| SNR_d | signed Q8, 16 bits, in dB |
| Counts H(i) | unsigned, log2(N_t)+1 bits |

## Top-level interface (`adc_output_analyzer`)

Parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `ADC_BITS` | 8 | Resolution N of the converter under test |
| `LOG2_NT` | 15 | log2 of the samples per pass, N_t. At most 20, so the estimator's 64-bit product does not overflow, and at least (N-2)/2 |
| `CORDIC_ITER` | 24 | Arcsine iterations |
| `GAIN_IN_ERROR` | 1 | 1: Error includes G². 0: G² is left out, which saves two multipliers and is adequate when the gain error is small (G within 1 ± 0.01) |

Ports:

- **Control.** `start` is a one-cycle strobe and is ignored while `busy`.
  `vod` is the overdrive, in Q16 LSB, held for the whole test.
- **Sample stream.** `in_valid`, `in_ready` and `in_code`. A sample is
  taken in a cycle where both valid and ready are high. `in_ready` is high
  only during a pass.
- **Record restart.** `record_start` is high in the cycle before a pass
  opens. A replay source should present its first sample from the next
  cycle on.
- **Code in progress.** `cur_code` is the code C1 has selected.
- **Per-code results.** `code_valid` pulses once per inner code, in
  ascending order. With it come `code_out`, `hits_out` (H(i)), `href_out`
  (Href(i)), `dnl_out` and `inl_out`.
- **Final results.** `done` pulses at the end of a test. From then until
  the next `start` these outputs hold the results:
  - `h_low` and `h_high`: the end-code counts;
  - `vo` and `amp`: the fitted offset and amplitude;
  - `result`, a `test_result_t` struct: offset error, gain error, G, DNL
    and INL maximum and minimum, the maximum and minimum of the
    gain-corrected DNL, and Error;
  - `snr_d`: the degraded SNR.

Reset is asynchronous and active low. Assertions check that no sub-unit is
started while it is busy.

## Files

| File | Contents |
|---|---|
| `rtl/hta_pkg.sv` | Formats, constants, result struct, CORDIC angle table |
| `rtl/adc_output_analyzer.sv` | Top: controller and wiring |
| `rtl/code_index_counter.sv` | C1, code sequence 0, 2^N-1, 1 … 2^N-2 |
| `rtl/hit_counter.sv` | C2, hits of one code in N_t samples |
| `rtl/offset_amp_estimator.sv` | V_o and A from the end-code counts |
| `rtl/cordic_asin.sv` | Double-rotation arcsine CORDIC |
| `rtl/href_calculator.sv` | Href(i) from two arcsines |
| `rtl/seq_divider.sv` | Restoring divider |
| `rtl/adc_param_unit.sv` | DNL, INL, gain, offset, Error |
| `rtl/snr_lut.sv` | Error to SNR_d table |
| `tb/tb_<module>.sv` | Self-checking testbench for each module |
| `tb/tb_dnl_levels.sv` | Full-size runs for three DNL classes |

## Simulating

Every testbench is self-checking and prints one line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
        rtl/hta_pkg.sv tb/tb_adc_output_analyzer.sv --top-module tb_adc_output_analyzer
    ./obj_dir/Vtb_adc_output_analyzer

To run another test, substitute its name.

What the testbenches cover:

- **`tb_adc_output_analyzer`**, the full-size end-to-end test with all
  parameters at their defaults. It takes about 5 s of simulation.
  - The source is an 8-bit converter model. Its code widths are random,
    with DNL up to ±0.35 LSB.
  - The input is a coherently sampled sine: M = 2048 samples per record,
    J = 19 cycles per record, 0.6 LSB offset and 1.5 LSB overdrive.
  - The stream has random bubbles.
  - Every per-code and final output is compared with a real-number model of
    the same formulas. H(i) must match exactly. DNL must be within 10^-3
    LSB, Error within 10^-3, and SNR_d within 0.08 dB.
  - The cycle count is checked.
  - The test fails unless it sees back-pressure stalls, one record restart
    per pass, and both signs of DNL.
- **`tb_dnl_levels`** runs three full tests back to back. The converter
  models have Gaussian DNL within ±0.25, ±0.5 and ±1 LSB, the DNL classes
  the paper uses to study the SNR estimate. It prints the SNR_d of each.
- **The unit testbenches** check each module against real arithmetic and
  check its latency: the CORDIC over random and extreme arguments, the
  divider against `/` and `%`, the estimator against both the approximation
  and the exact cosine fit, and the table against `log10`.

## Where this design departs from the method, and what to trust

**Choices the method leaves open:**

- **One pass per code.** The method names counter C1 (code under analysis)
  and counter C2 (its hits) and stores no histogram. This design reads that
  as one pass of N_t samples per code, 2^N passes in all. The source must
  either replay its record or be sampled coherently.
- **Order of codes.** The two end codes are counted first, because every
  Href(i) depends on the fit they give. The inner codes follow in ascending
  order, which lets the calculator reuse arcsines.
- **G is kept in Error by default.** The method allows dropping G when the
  gain error is small. Here it costs only two multiplications at the end of
  the test; `GAIN_IN_ERROR = 0` drops it.
- **Reference counts.** DNL is H(i)/Href(i) - 1, with Href taken from the
  fitted sine.
- **INL** is the plain running sum of DNL, without end-point correction.
  The gain sum starts at code 2, as the method's gain approximation does.
- **Invented details.** V_OD is an input. The CORDIC variant, the iteration
  count, the widths, the reciprocal constants and the table range are not
  given by the method.

**What has not been shown:**

- **No real converter data.** The paper validates the method on a
  commercial 8-bit converter, with 32768 samples from 16 records of 2048.
  It reports DNL and INL of ±0.40 LSB, -0.24 LSB offset error, -0.26 LSB
  gain error and SNR_d = -1.24 dB. Those measured codes are not available,
  so these numbers are not reproduced. The testbenches use modelled
  converters at the same sizes.
- **Area.** The paper reports a 50 MHz, 15171-gate synthesis in 0.18 µm.
  This RTL uses wider datapaths than that gate count suggests:
  - 64-bit products in the estimator, in the Href scaling and in the final
    parameter stage;
  - a 48-bit CORDIC;
  - about 1400 flip-flops.

  The widths were chosen for accuracy margin, not area, and no timing
  closure has been attempted. Narrowing them is the obvious first step for
  a gate-count-sensitive use; the testbench tolerances say how much
  accuracy must be kept.
- **Accuracy of the method itself.** The testbenches check the hardware
  against the method's own formulas, not against a converter's true
  parameters. Those formulas are approximations: the squared cosine in the
  sine fit, the gain from the DNL sum, and the SNR estimate from static
  errors.
