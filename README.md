# Farrow fractional-delay filter for TIADC clock-skew correction

A time-interleaved ADC (TIADC) gets a high sample rate by running several
slower ADCs on the same input, each starting its conversion at a staggered
time. Here there are two 8-bit channels. If ADC2's sampling is skewed by a
fraction d of its period (modelled here as its input arriving d late), a
tone at f_in gets a spur at f_s/2 - f_in. This spur limits the SFDR of the
interleaved converter. The error can be corrected digitally. Channel 1 is
delayed by the same fraction of a sample period as channel 2's skew, so the
two channels are again exactly half a period apart.

Such a fractional delay needs a FIR interpolator whose taps depend on the
delay. A **Farrow structure** writes every tap as a polynomial in the delay
`d`:

    h(n; d) = sum_m c_m(n) d^m

So the filter becomes a bank of fixed-coefficient FIR sub-filters `C_m`,
which all see the same input taps. Their outputs are combined with a few
multiplications by `d`. Changing `d` at run time changes the delay, and no
coefficients are recomputed or stored per delay.

This repository contains:

* the correction filter itself (`skew_correction_filter`), with two
  coefficient sets;
* the on-chip test structure that checks it against precomputed results
  (`farrow_test_top`). The structure has ROMs, an address counter, a
  prescaler, switch debouncers and comparators.

## The filter

### Base interpolator and delay convention

The base filter is a ninth-order Lagrange interpolator. It has ten taps,
n = 0..9, and a total delay of `DINT + d`, with `DINT = 4` and `0 <= d < 1`:

    h(n; d) = prod_{k != n} (4 + d - k) / (n - k)

With this centring the interpolator works on its most accurate interval,
between taps 4 and 5. The uncorrected channel (ADC2) is delayed by exactly
`DINT = 4` samples, so the two outputs stay aligned. The design has
9 × 8 bits of Farrow delay line plus 4 × 8 bits of integer delay, or 104
register bits.

### Two coefficient sets (`farrow_pkg::farrow_kind_e`)

| `KIND`            | sub-filters | coefficients       | variable multipliers | how `c_m(n)` is obtained |
|-------------------|-------------|--------------------|----------------------|--------------------------|
| `FARROW_LAGRANGE` | 10 (C0..C9) | 39 bit, 28 frac    | 9                    | exact expansion of `h(n; d)` in powers of `d` |
| `FARROW_LSP`      | 4 (C0..C3)  | 12 bit, 10 frac    | 3                    | least-squares cubic fit of `h(n; d)` over `d` in [0, 1] |

Both sets give almost the same correction. The cubic set needs about a
tenth of the arithmetic. `FARROW_LAGRANGE` is the default.

**No coefficient table exists in the source.** `farrow_pkg::farrow_coef`
computes every coefficient at elaboration time, using exact integer
arithmetic, and then rounds it (half away from zero) to the fixed-point
grid:

* **Lagrange.** `prod_{k!=n}(d + 4 - k) = sum_j a_j(n) d^j` has integer
  `a_j`. With `den(n) = prod_{k!=n}(n - k)`, the coefficient is
  `c_j(n) = a_j(n) / den(n)`.
* **Least squares.** The continuous L2 fit onto `1, d, d², d³` over [0, 1]
  has the 4×4 Hilbert matrix `1/(i+k+1)` as its normal matrix. The inverse of
  that matrix is an integer matrix. The fitted coefficients are
  `c_i(n) = sum_k Hinv[i][k] · sum_j a_j(n) / ((k+j+1)·den(n))`.
  Scaling by LCM(1..13) = 360360 makes every term an integer. This fit is
  the limit of fitting many evenly spaced delay designs.

Changing `NUM_TAPS`, `DINT` or the formats in `farrow_pkg` regenerates the
coefficients. The LSP path assumes a cubic fit.

### Datapath and number formats

```
x_in ─┬─ hist[0..8] (9 × 8-bit registers, advance on ce)
      │
  taps[0..9] ──► C0 ─ v0 ─────────────────────────────┐
             ──► C1 ─ v1 ──────────────────────┐      │
             ...                               │      │
             ──► C_{NB-1} ─► (·d) + v_{NB-2} ► ... (·d) + v0 ─► round, saturate ─► y
```

* Input: signed 8-bit ADC samples.
* `d`: unsigned Q0.16 (`frac_delay_t`).
* Sub-filter outputs `v_m` are kept at full precision:
  8 + coefficient width + 4 bits, with the coefficient's fractional bits.
* Horner's rule: `acc = v_{NB-1}`, then `acc = ((acc·d) >>> 16) + v_m`.
  Each product is truncated (floor) back to the coefficient fraction. The
  accumulator has 4 guard bits.
* Output: signed 16-bit Q8.8 (`out_sample_t`), rounded half up and
  saturated at ±128. The ADC2 path is shifted into the same format.

### Timing

The filter is fully parallel and processes one sample per clock.

* The newest sample `x_in` feeds tap 0 directly. The output `y` is a
  combinational function of `x_in` and the nine registered past samples.
* On a rising edge with `ce` high, `x_in` moves into the delay line.
* There are no pipeline registers. The critical path is one 8×39-bit
  multiply, a ten-input sum, then nine multiply-adds in a row. In the test
  structure that path has a full divided-clock period to settle.

If you need the filter at a high rate, add pipeline registers after the
sub-filters and between the Horner stages. Then account for the added
latency in the ADC2 integer delay.

## The test structure (`farrow_test_top`)

It runs on a 50 MHz board clock. Every register is clocked by `clk`, and the
slow "clocks" of the structure are one-cycle enables made by the prescaler.

| block | what it does |
|-------|--------------|
| `debounce` × 2 | Reset and enable switches. A 2-FF synchroniser, then a stability counter (default 500,000 cycles = 10 ms). `q` changes `STABLE_CYCLES + 2` cycles after a clean edge. |
| `prescaler` | Divides `clk` by 2^`DIV_LOG2` (default 16). `fir_tick` marks the rising edge of the slow sample clock; `rom_tick` marks its falling edge (the inverted clock), half a period earlier. |
| `address_counter` | Advances once per sample. After the last word it holds and raises `done`, so one run presents every ROM word once. |
| `rom` × 4 | ADC1 input, ADC2 input, expected ADC1 output, expected ADC2 output. Registered read on `rom_tick`, contents read from `rtl/*.hex`. |
| `skew_correction_filter` | The filter under test, with `d = D_CODE`. |
| `comparator` × 2 | On each sample edge, registers `filter output == stored output`. Also counts comparisons and mismatches. `cmp_ok == 2'b11` means both channels match. |

The sequence for each sample is as follows:

1. `rom_tick`: the ROMs output sample *a*.
2. Half a period later, `fir_tick`:
   * the comparators sample the filter outputs for *a*, which are
     combinational from the ROM data;
   * the delay lines take sample *a*;
   * the address moves to *a+1*.

A `loaded` flag ties each filter step to a completed ROM read. Disabling can
therefore pause the run between any two edges without misaligning the data.
Switch reset clears the run, including the filter delay lines, and a new run
starts when it is released. One sample takes 16 clock cycles, and a
256-sample run takes 4096 cycles after the switch debounce.

### The test data

The `.hex` files use one word per line:

* 8-bit two's-complement samples for the inputs;
* 16-bit Q8.8 values for the outputs.

They model a TIADC with two 1 GS/s channels (2 GS/s interleaved):

* input: a 60 MHz sine at 0.9 of full scale;
* noise: 0.5 LSB rms of white noise on each channel;
* skew: the input of ADC2 delayed by `0.3` of its period, so ADC2 sample n is
  x(nT + T/2 - 0.3T) (`D_CODE = 19661`).

The expected outputs are those of this exact fixed-point filter, starting
from a cleared delay line. `adc1_out_lagrange.hex` is for `KIND =
FARROW_LAGRANGE` and `adc1_out_lsp.hex` for `FARROW_LSP`. The top picks the
right file from `KIND`. If you change `D_CODE`, `ROM_DEPTH`, `KIND` or any
number format, regenerate the files: the comparators will otherwise, and
correctly, report mismatches.

How the expected data is computed:

* ADC1 output: the bit-exact filter arithmetic described above, applied to
  the ADC1 samples with the delay line starting at zero.
* ADC2 output: the ADC2 input four samples earlier, times 256.

## Where this design makes its own choices

The following are choices made here, not requirements of the method:

* Integer delay `DINT = 4`. The 104-register count supports this choice.
* The `d` format (Q0.16), the output format (Q8.8 with round half up and
  saturation), and truncation inside the Horner chain.
* Horner evaluation, rather than separate powers of `d`.
* The least-squares fit as a continuous fit over [0, 1].
* Enables instead of derived clocks.
* A power-on reset input `rst_n`.
* Comparator results are registered, and the comparators also count.
* ROM depth 256.
* Prescale ratio 16.
* Debounce time of 10 ms.
* The address counter stops at the end of the ROM.
* The test signal and the skew value.

The following are not built:

* The interleaving multiplexer. Both corrected channels are outputs, and
  interleaving them (`out1`, then `out2`) gives the 2 GS/s stream.
* The ADCs themselves.
* Any logic-analyser core. The signals to watch are top-level ports.

Count of non-zero coefficients:

* Lagrange set: 87. C0 is a single 1, and C2, C4, C6 and C8 each have one
  zero tap.
* Cubic set: 34.

Synthesis removes zero-coefficient multipliers.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M`. The filter testbenches do not reuse the
design's integer coefficient code. `tb/farrow_ref_pkg.sv` recomputes the
coefficients in floating point from their definitions.

| testbench | what it checks |
|-----------|----------------|
| `farrow_branch_tb` | Four sub-filters with impulses, extremes and random data. The output must equal `sum_n c_q(n)·x` exactly. |
| `farrow_horner_tb` | Both sets. Exact against an integer Horner model, and within NB-1 LSB below the exact polynomial. |
| `farrow_filter_tb` | Both sets with random data, random `d` and irregular `ce`. Within 1 LSB (Lagrange) or 1.5 LSB (cubic) of the floating-point filter. The Lagrange set is also within 1 LSB of the ideal interpolator. With `d = 0` the output is an exact 4-sample delay. |
| `skew_correction_filter_tb` | A skewed two-channel sine with four `d` values changed at run time. ADC1 must match the ideal interpolator within 1 LSB, and ADC2 must be delayed exactly. Both outputs must lie on the true sine, within 2 ADC LSB, at instants exactly half a period apart, so the skew is gone. |
| `integer_delay_tb`, `rom_tb`, `address_counter_tb`, `prescaler_tb`, `debounce_tb`, `comparator_tb` | Each block against a cycle model, including tick phases and debounce latency. |
| `farrow_test_top_tb` | The whole structure at its default parameters (Lagrange set, 500,000-cycle debounce). It covers a rejected bouncing switch, a pause by the enable switch, a complete run and a restart by the reset switch. Every sample is checked against the ideal interpolator (1 LSB) and against the on-chip comparators. The sample spacing must be 16 cycles. About 3.3 M cycles. |
| `farrow_test_top_lsp_tb` | A full run with the cubic set and a short debounce. |
| `tiadc_sfdr_tb` | Spur suppression. A 2 GS/s two-channel TIADC with skew d = 0.3 is simulated at about 60, 100, 150, 200 and 250 MHz, and the fs/2 − fin spur is measured before and after correction. Both sets must improve it by more than 30 dB from 100 to 250 MHz. |

Measured tone-to-spur ratios from `tiadc_sfdr_tb`:

| f_in (MHz) | uncorrected | Lagrange set | cubic LSP set |
|-----------:|------------:|-------------:|--------------:|
| 58.6  | 25.1 dB | 116.3 dB | 70.9 dB |
| 101.6 | 20.4 dB | 67.6 dB  | 63.9 dB |
| 148.4 | 17.0 dB | 66.9 dB  | 63.4 dB |
| 199.2 | 14.4 dB | 67.3 dB  | 61.2 dB |
| 250.0 | 12.3 dB | 45.9 dB  | 45.3 dB |

To simulate with Verilator, run from the repository root, so that the ROM
files are found as `rtl/*.hex`:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/farrow_pkg.sv tb/farrow_ref_pkg.sv rtl/*.sv tb/farrow_test_top_tb.sv \
  --top-module farrow_test_top_tb -o sim
./obj_dir/sim
```

Package files must come first. Verilator warns that `farrow_pkg.sv` is
listed twice in this command; the warning is harmless. The full-size
top-level test takes about a minute.
