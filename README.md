# Equation-Error LMS adaptive IIR filter

An adaptive IIR filter is cheaper than an adaptive FIR filter: a few poles can
stand in for dozens of FIR taps. The catch is that adapting the feedback
coefficients of a truly recursive filter can make it unstable, and its error
surface can have local minima. The **equation-error** form avoids both
problems. Its feedback taps are not the filter's own past outputs but past
samples of the *desired* signal d(n):

    y(n) = a_0 x(n) + ... + a_{NA-1} x(n-NA+1)  +  b_1 d(n-1) + ... + b_NB d(n-NB)
    e(n) = d(n) - y(n)
    w(n+1) = w(n) + mu * e(n) * u(n)        (for every coefficient w, with its tap u)

While it adapts, the filter has no feedback path, so it cannot go unstable.
In effect it is two FIR LMS filters that share one error signal. When it has
converged, the coefficients describe the pole-zero transfer function

    G(z) = (a_0 + a_1 z^-1 + ...) / (1 - b_1 z^-1 - b_2 z^-2 - ...)

This repository holds synthesizable SystemVerilog for this filter in direct
form. By default it has two coefficients, a_0 and b_1. It also holds
testbenches for the filter's two typical uses:

- **Inverse system identification.** d(n) is fed through an unknown system to
  give x(n). The filter learns the inverse of that system. For
  H(z) = 1 - 0.5 z^-1, two coefficients are enough (a_0 = 1, b_1 = 0.5),
  where an FIR inverse would need an endless series of taps.
- **Interference cancellation.** d(n) is a wanted signal plus power-line hum,
  and x(n) is a reference of the hum. e(n) is the cleaned output.

The equation-error structure, the LMS update, the step size mu = 1/4 and the
scaling of all values by 128 follow the published design that this RTL
implements. The points listed under "Design choices" below are this RTL's own.

## Number format

All samples (x, d, y, e) and all coefficients are 8-bit signed integers. Each
one stands for its value divided by 128, so 64 means 0.5 and 127 means 0.992.
A coefficient cannot be 1.0 exactly: full scale is 127/128.

- **Filter products.** A product of a coefficient and a sample carries 14
  fraction bits. All products are summed at full width. The sum is then
  shifted right by 7 once, in the error unit, to give y(n). This shift is an
  arithmetic shift, so it truncates toward minus infinity.
- **Coefficient update.** The step `mu * e * u`, rescaled, is
  `(e * u + 256) >>> 9`. The shift of 9 is 7 for the format plus 2 for
  mu = 1/4. Adding 256 first rounds half up.
- **Saturation.** y(n), e(n) and every coefficient saturate at -128 and +127
  instead of wrapping. The outputs `sat_y` and `sat_e` flag a clipped y or e
  in the current sample.

The rounding of the update matters. With plain truncation, every update is
biased downward by half an LSB. Bit-accurate models of both applications then
stall far from the right coefficients, because the true update steps are
often smaller than one LSB. With rounding, the inverse-identification test
driven by a sinusoid at a quarter of the sample rate reaches a_0 = 126 and
b_1 = 59 (0.98 and 0.46; the ideal values are 1 and 0.5). That is close to
what the published hardware reports (123/128 and 57/128). A slower sinusoid
(period 16) gives a_0 = 114 and b_1 = 70.

## Datapath

```
            x_in ──► tap_delay_line (NA taps) ──► x(n)..x(n-NA+1) ──► lms_section u_ff ──► acc_ff ─┐
                                                                       (a_i, update)               │
            d_in ──► tap_delay_line (NB+1 taps) ─► d(n-1)..d(n-NB) ─► lms_section u_fb ──► acc_fb ─┤
              │                                                        (b_j, update)               │
              └────────────────────────────────────────────────────────────────────► error_unit ◄──┘
                                                                                        │
                                                           e(n) ◄───────────────────────┤ (back to both
                                                           y(n) ◄───────────────────────┘  sections' err)
```

| module | role |
|---|---|
| `ee_lms_iir` | Top module. Wires two delay lines, two LMS sections and the error unit together. |
| `tap_delay_line` | Shift register for one signal. Tap 0 is the current input, passed straight through. Taps 1 and up are registered, and shift once per strobed sample. |
| `lms_section` | One FIR LMS filter. It sums coef[k] × u[k] at full width. On each strobed sample it updates every coefficient by the rounded, saturated LMS step. |
| `error_unit` | The adder block. It adds the two partial sums, removes 7 fraction bits, and forms e = d − y. Both y and e are saturated. |
| `iir_pkg` | Default widths: 8-bit data and coefficients, 7 fraction bits, mu shift of 2. |

Each coefficient needs two multipliers: one for its filter product and one
for its update product. The default two-coefficient filter therefore uses 4
multipliers, and 3 and 5 coefficients use 6 and 10. Registers are one 8-bit
register per coefficient, plus one per delayed sample. The default filter has
24 flip-flops: a_0, b_1 and d(n-1). There are no output registers.

## Interface and timing

Ports of `ee_lms_iir`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset. Clears coefficients and delay lines to 0. |
| `en` | in | 1 | sample strobe. The sample on `x_in`/`d_in` is taken at this clock edge. |
| `x_in` | in | 8 | x(n): filter input, or the interference reference |
| `d_in` | in | 8 | d(n): desired signal, or the primary signal |
| `y_out` | out | 8 | y(n) |
| `e_out` | out | 8 | e(n). In interference cancellation, this is the system output. |
| `a_out[NA]` | out | 8 each | a_0 .. a_{NA-1} |
| `b_out[NB]` | out | 8 each | b_1 .. b_NB |
| `sat_y`, `sat_e` | out | 1 | y(n) or e(n) was clipped |

- **Throughput.** The filter takes at most one sample per clock, and can take
  one on every clock.
- **Outputs.** `y_out` and `e_out` are combinational. They depend on the
  present `x_in`/`d_in` and on the coefficients and delayed samples stored
  before the clock edge. They are valid in the same cycle as the sample.
- **State update.** At the edge where `en` is high, the coefficients take
  their LMS step and both delay lines shift.
- **Holding.** With `en` low, nothing changes, so a slower sample rate is set
  by strobing `en`.

The critical path runs from the inputs through a multiplier, the adder tree,
the error subtraction and the update multiplier into the coefficient
registers. Pipelining this path would change the algorithm, because the
update would then use a delayed error.

Parameters: `NA`, `NB` (defaults 1 and 1), `DW`, `CW`, `FRAC` and `MU_SHIFT`.
The defaults of the last four come from `iir_pkg`.

## Configurations

Two coefficients (`NA=1, NB=1`: a_0, b_1) are used in both applications.
Three- and five-coefficient filters were also evaluated for interference
cancellation, but how their coefficients divide between numerator and
denominator is not given. This RTL uses `NA=2, NB=1` for three and
`NA=3, NB=2` for five. Those splits match the register count of one delay
register per added coefficient.

## Design choices

These are this RTL's own decisions, made where the published design gives no
detail:

- **Word lengths.** 8-bit data and coefficients. This width is inferred from
  the reported register counts: 24 registers for two coefficients, plus 16
  for each added coefficient.
- **Arithmetic.** y is truncated when rescaled. The update step rounds half
  up. Coefficients, y and e saturate.
- **Reset.** Synchronous, active low, to zero.
- **Sample strobe.** `en` marks the samples; one sample per clock at most.
- **3 and 5 coefficients.** The numerator/denominator split of the 3- and
  5-coefficient variants, described under "Configurations".

Not included:

- **FIR baseline.** The adaptive FIR LMS filter that the IIR filter was
  compared against is not part of this design.
- **Test environment.** The "unknown system" and the signal sources belong to
  the test environment. They are modelled in the testbenches.

## Verification

Every block has a self-checking testbench. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_tap_delay_line` | Random samples with random strobes against a software history; reset. |
| `tb_lms_section` | 3 taps against an integer model of the sum and the rounded, saturated update. Both saturation limits are hit. |
| `tb_error_unit` | Random and extreme partial sums against integer arithmetic; both saturation flags. |
| `tb_ee_lms_iir` | The top at its default size, against the integer model in `ee_lms_ref_pkg` on every cycle. It runs random and overload phases, then inverse identification of 1 − 0.5z⁻¹ with two source sinusoids, then hum cancellation. See below. |
| `tb_interference_sizes` | Hum cancellation with 2, 3 and 5 coefficients side by side (via `ic_lane`). Each must be bit-exact to the model and must remove the hum. |

`tb_ee_lms_iir` checks the following:

- Both inverse-identification runs end with mean |e| below 4/128.
- With the period-16 source, a_0 must end at 100 or above and b_1 between
  48 and 84. With the fs/4 source, a_0 must end at 115 or above and b_1
  between 52 and 72.
- Hum cancellation must leave less than 1/20 of the hum power.
- It also counts each mechanism and fails if one never occurred: updates,
  held samples, coefficient saturation, y and e saturation, and reset during
  operation.

The reference model is written from the equations above, not from the RTL.
It applies the same arithmetic choices, so the comparisons are bit-exact. The
convergence checks do not depend on those choices.

Typical results: the two-coefficient hum canceller settles near a_0 = 58,
b_1 = 74. This agrees with the analytic optimum of about 57.7 and 73.9 for
these signals, with b_1 slightly biased by the data in d. The three- and
five-coefficient filters leave less hum than the two-coefficient one.

### Running with Verilator

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/iir_pkg.sv tb/ee_lms_ref_pkg.sv rtl/tap_delay_line.sv rtl/lms_section.sv \
    rtl/error_unit.sv rtl/ee_lms_iir.sv tb/tb_ee_lms_iir.sv --top-module tb_ee_lms_iir
./obj_dir/Vtb_ee_lms_iir
```

For the size sweep, add `tb/ic_lane.sv` and use `tb/tb_interference_sizes.sv`
as the top. Lint a module with
`verilator --lint-only -Wall rtl/iir_pkg.sv rtl/<module>.sv` (plus the files
it instantiates).

### Lint notes

- With `NA=1`, the x delay line has no registers, so its `clk`, `rst_n` and
  `en` inputs are unused. Verilator reports them as unused signals.
- Modules that use only some of the constants in `iir_pkg` get
  unused-parameter warnings.
