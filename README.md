# Fractional-order integrator/differentiator (Grünwald–Letnikov, fixed point)

This RTL computes the fractional derivative or integral of a sampled signal
in real time. It applies the operator s^γ to an analog input and drives the
result to an analog output. γ is any real order: γ > 0 gives a fractional
derivative, γ < 0 a fractional integral. γ = 0.2, −0.6 and 0.99 are the
cases tested here. Such operators are the building blocks of fractional-order
controllers (PI^λD^μ) and of fractional filters.

The operator uses the Grünwald–Letnikov approximation. It is the backward
difference (1 − z⁻¹)/T, raised to the power γ by binomial expansion and cut
off after L terms (a "short memory"):

```
y[n] = T^-γ · Σ_{j=0}^{L-1} b_j · x[n-j]

b_0 = 1,   b_j = (1 − (1+γ)/j) · b_{j-1}        (b_j = (−1)^j · C(γ, j))
```

Here T is the sampling interval. The hardware needs only a delay line,
multipliers and adders. It also needs two quantities that depend on γ: the
weights b_j and the gain T^-γ. The design computes both itself, in
hardware, whenever a new γ is loaded.

## Datapath

```
 adc_code ─► adc_scale ─► sample_window ──x[n-j]──┐
 (16 bit)    (→ volts,     (last L samples,       ▼
              Q7.17)        circular RAM)      gl_mac ──Σ──► out_scale ──y──► dac_scale ─► dac_code
                                                  ▲          (× T^-γ,           (→ code,
              coef_gen ──► coef_mem ───b_j────────┘           saturate)          saturate)
              (recursion)  (L weights)                            ▲
              scale_factor: T^-γ = (exp(−γ·lnT/10))^10 ───────────┘
              gl_ctrl (sequencer), loop_timer (sampling interval)
```

* **adc_scale / dac_scale.** The converters work in codes, with 3276.7
  counts per volt (a 16-bit code over ±10 V). The arithmetic works in
  volts. Each block is one multiplication by a constant, rounded to
  nearest. dac_scale clips to the code range and reports it on `dac_sat`.
* **sample_window.** This is the short memory. It behaves like an array
  of L samples that shifts right on each new sample, with the newest at
  index 0 and the oldest dropped. A configuration clears it to zero. It is
  built as a circular buffer in one RAM: a push overwrites the oldest
  entry, and lag j is read at address `head − j mod L`. So no data moves
  per sample, and L = 400 costs memory, not registers.
* **coef_gen + coef_mem.** coef_gen evaluates the recursion for b_j, one
  weight at a time. For each weight it does one multiplication,
  p = b_{j−1}·(1+γ). Then a restoring divider works out p/j, one quotient
  bit per cycle. The result is rounded and subtracted from b_{j−1}. Each
  weight is written to coef_mem as soon as it is ready. This takes about
  59 cycles per weight, so 5.8k cycles for L = 100. It runs only at
  configuration.
* **gl_mac.** One multiplier handles one term per clock. Index j goes to
  both memories at once, as a coefficient address and as a window lag, and
  the product is added one cycle later. The accumulator keeps full
  precision (63 bits at L = 100), so it cannot overflow. The sum is ready
  L + 1 cycles after the start.
* **scale_factor.** See below.
* **out_scale.** Multiplies the sum by T^-γ, rounds to the output format
  and clips to ±64 V. A clipped result sets `out_sat`.

## Computing T^-γ without a power function

The gain T^-γ is computed as an exponential:

```
T^-γ = e^(−γ·ln T) = ( e^(−γ·ln T / 10) )^10
```

The exponential unit (`exp_unit`) only covers arguments in [−1, +1]. The
argument is therefore divided by 10 first. This handles |γ·ln T| up to 10,
which is enough for T = 0.5 ms (ln T = −7.6) and |γ| ≤ 1.3. The result is
then raised to the tenth power (`pow10_unit`: y², y⁴, y⁵, y¹⁰ on one
multiplier).

* `exp_unit` evaluates a 12-term Taylor series in Horner form, one term per
  cycle. The truncation error for |x| ≤ 1 is below 1/13!, which is smaller
  than one step of the format.
* If the argument goes beyond ±10, it is clamped. `range_err` is then set,
  and the gain saturates at e^±10 instead of wrapping.
* ln T is **not** computed. The host supplies it on `ln_t` together with
  γ, for example −7.6009 for T = 0.5 ms. It must match `period`, which
  sets the actual sampling interval in clock cycles. The arithmetic sees T
  only through ln T.

## Number formats

All words are two's complement (see `gl_pkg`).

| word | format | range / step | used for |
|---|---|---|---|
| `data_t` | Q7.17, 24 bit | ±64, 7.6·10⁻⁶ | samples, γ, ln T, output (volts) |
| `coef_t` | Q4.28, 32 bit | ±8, 3.7·10⁻⁹ | weights b_j |
| `wide_t` | Q20.28, 48 bit | ±524288, 3.7·10⁻⁹ | exp argument, e^x, T^-γ (up to e^10 ≈ 22026) |
| accumulator | 56 + ⌈log₂L⌉ bit, 45 fraction bits | exact | Σ b_j x[n−j] |

The 24-bit Q7.17 data word comes from the operator's specification. The
wider weight and gain words are this design's own choice. The weights of a
long window become small: b_99 is about −7·10⁻⁴ for γ = 0.2 and −1·10⁻⁶
for γ = 0.99. In Q7.17 they would lose most of their digits. |b_j| ≤ 1
holds for γ ≥ −1. Below that the weights grow, and they saturate at the
Q4.28 limit.

## Control and timing

`gl_ctrl` sequences the work in two phases.

1. **Configuration** (`cfg_load`, accepted between iterations). It latches
   γ and ln T, then starts three jobs in parallel: weight generation, the
   T^-γ computation and the window clear. When all three finish it raises
   `ready`. This takes about L·59 cycles, set by the weight generator.
2. **Sampling loop.** On each tick of `loop_timer` it goes through four
   steps:
   1. take the input code and convert it;
   2. push the sample into the window;
   3. run the MAC;
   4. scale the sum, and update `y` (then `dac_code` one cycle later).

   `busy` is high for L + 8 cycles per sample, and `dac_valid` follows
   right after it drops.

`period` is the sampling interval in clock cycles, and it must be longer
than one iteration. If a tick arrives while `busy` is high, that sample is
skipped and `overrun` pulses. The output then keeps its sampling rate, but
the window misses one sample.

The window starts empty. The first L outputs are therefore a start-up
transient, in which only the samples seen so far contribute. `settled`
rises once L samples have arrived since the last configuration.

## Top-level interface (`gl_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cfg_load` | in | 1 | pulse: load `gamma`, `ln_t`; recompute weights and gain; clear window |
| `gamma`, `ln_t` | in | 24 | order γ and ln(T in seconds), Q7.17 |
| `period` | in | 32 | clock cycles per sample |
| `adc_code` | in | 16 | input code, 3276.7 counts/V; read once per tick |
| `dac_code`, `dac_valid` | out | 16, 1 | output code and its update strobe |
| `y`, `y_valid` | out | 24, 1 | output in volts (Q7.17), one cycle before `dac_code` |
| `ready`, `busy`, `settled` | out | 1 | configured / iteration running / transient over |
| `overrun`, `range_err`, `out_sat`, `dac_sat` | out | 1 | skipped sample / gain clamped / output clipped at ±64 V / at ±10 V |

The parameters are `L` (window length, default 100), `CNT_W` (timer width,
32) and `N_TERMS` (exponential series terms, 12). The clock frequency is
not fixed. At 40 MHz, T = 0.5 ms is `period = 20000`, and an iteration
takes 2.7 µs at L = 100 or 10.2 µs at L = 400.

## Measured behaviour

These results come from simulation, with each output checked against a
floating-point model of the same truncated sum. The input is a 1 V sine,
T = 0.5 ms.

| case | gain | ideal (2πf)^γ | phase |
|---|---|---|---|
| γ = 0.2, 20 Hz, L = 100 | 2.623 | 2.629 | output leads by 4–5 samples (ideal 5) |
| γ = −0.6, 20 Hz, L = 100 | 0.0412 | 0.0550 | output lags by about 12 samples (ideal 15) |
| γ = 0.99, 20 Hz, L = 100, 50 mV input | 127.8 | 119.7 | output leads by 23–24 samples (ideal 24.7, about 90°) |
| γ = 0.2, 2 / 5 / 10 / 20 Hz, L = 400 | 1.610 / 1.989 / 2.285 / 2.626 | 1.659 / 1.993 / 2.289 / 2.629 | |
| γ = −0.6, 2 / 5 / 10 / 20 Hz, L = 400 | 0.316 / 0.095 / 0.068 / 0.047 | 0.219 / 0.126 / 0.083 / 0.055 | |

The derivative is close to ideal over 2–20 Hz. The integral is limited by
the short memory, which is only 50 ms at L = 100 and 200 ms at L = 400,
against a wave period of 50–500 ms. Its error is largest at low
frequencies. This is a property of the truncated sum, not of the
arithmetic: the fixed-point output matches the floating-point model of the
same sum to within 0.1%.

For γ = 0.99 the gain T^-γ is 1853. A 1 V, 20 Hz sine would then give
about 125 V, so the output clips, and `out_sat` and `dac_sat` report it.
To view a near-full derivative, the input must be attenuated, or the
output scaled down outside this design. With a 50 mV input the output
stays in range and leads the input by almost a quarter period, as a true
derivative would.

## Departures from the operator as specified, and limits

* **Window length.** The sum has L terms (j = 0 … L−1), so an array of 100
  samples means 100 products. A literal reading of the sum's upper limit
  would give L + 1 terms.
* **Window storage.** The window is always a circular RAM. The specified
  operator shifts an array for L = 100 and uses FIFO memory for L = 400.
  The behaviour is identical.
* **Weights and gain on chip.** The weights and T^-γ are computed on chip
  at each configuration, not loaded precomputed.
* **ln T from the host.** ln T is an input. Nothing in the design checks
  that it matches `period`.
* **Iteration time.** An iteration takes L + 8 cycles with one multiplier,
  about 2.7 µs at 40 MHz. The reference implementation needed about 20 µs
  per iteration. Any sampling interval above the iteration time works.
* **Overrun.** The overrun behaviour (skip the sample, flag it) is this
  design's. The operator only requires the interval to be long enough.
* **Range checks.** The clamp of |γ·ln T| at 10 and all saturation flags
  are additions.
* **No converters.** The analog input and output converters, the host and
  the test instruments are outside this RTL. `adc_code` and `dac_code` are
  the converter interfaces.

## Simulating

Each block `X` has a self-checking testbench `tb/tb_X.sv`, which prints
`TB_RESULT checks=N failures=M`. With plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
          rtl/gl_pkg.sv tb/tb_gl_top.sv --top-module tb_gl_top
./obj_dir/Vtb_gl_top
```

Three testbenches cover the whole design:

* **`tb_gl_top`** runs at default parameters with a short `period`. It
  covers:
  * the derivative and integral of sine and square waves;
  * reconfiguration between orders;
  * the start-up transient;
  * overrun;
  * the gain clamp;
  * output and converter saturation;
  * the sampling rate and the iteration time.
* **`tb_gl_top_full`** runs the 20 Hz cases at the default parameters with
  `period = 20000`. It takes about 15 million cycles, roughly 15 seconds.
* **`tb_gl_freq`** runs the 2–20 Hz frequency response with L = 400.

Every testbench can run with a different `L` (override the parameter). The
testbench models use the same formulas as above, computed in floating
point.

## Files

`rtl/gl_pkg.sv` holds the formats. The modules are:

* `gl_top`, `gl_ctrl`, `loop_timer`;
* `adc_scale`, `dac_scale`;
* `sample_window`, `coef_gen`, `coef_mem`, `gl_mac`;
* `scale_factor`, `exp_unit`, `pow10_unit`;
* `out_scale`.

Each file opens with a description of its function, interface and timing.
