# TDTL fractional-N frequency synthesizer

A fractional-N synthesizer built around a **time-delay digital tanlock loop
(TDTL)**. Its digitally controlled oscillator (DCO) runs at N.f times the
frequency of a reference input. A prescaler divides the DCO output back down,
and the divided pulses sample the reference. The loop locks those sampling
instants to the reference, so the DCO output is the synthesized frequency
`(N.f) * f_ref`.

Putting a divider inside a TDTL normally destroys the lock. The divider
changes both the free-running sampling rate and the effective loop gain, and
that moves the loop far outside its lock range. A **register-based adaptation
(RBA)** fixes this. It feeds the division factor in use back to the DCO and
to the loop filter. The loop then sees the same operating point it had
without a divider.

The architecture follows the TDTL-FFS of M. Al-Qutayri, S. Al-Araji and
A. Al-Humaidan ("Fast Switching Fractional-N Frequency Synthesizer
Architecture Using TDTL"). The published description is at block-diagram
level. All word widths, the time base, the arctangent circuit, the control
unit's algorithm and the exact form of the adaptation are this
implementation's own choices. They are listed under "Where this RTL makes its
own choices" below.

## The loop

```
 y_i ──┬──► time_delay (TAU) ──► sample_hold #1 ──x(k)──┐
       │                               ▲                  ▼
       └──────────────────────► sample_hold #2 ──y(k)──► phase_error_detector
                                       ▲                  │ e(k) = atan2(x, y)
                                       │ f_s              ▼
                  prescaler_frac_divider ◄── f_out ── dco ◄── c/D ── digital_filter
                  (÷N / ÷N+1, control)           ▲                     ▲
                        │ R1,R2, counts          │ D                   │ D
                        └──────────► rba ────────┴─────────────────────┘
```

Everything runs on one master clock. The input `y_i` is one signed 12-bit
sample per clock, for example from an ADC. All times are in clock ticks.

* **Time delay.** A copy of the input is delayed by `TAU` clocks. At the
  nominal sampling period `T0` the delay is a lag of `psi_o = 2*pi*TAU/T0`.
  The defaults, `T0 = 256` and `TAU = 64`, give `pi/2`, the operating point
  the TDTL is designed for. The lag changes with the input frequency, which
  is what gives the TDTL its wide lock range.
* **Samplers.** At each sampling pulse `f_s`, the direct input is captured as
  `y(k)` and the delayed input as `x(k)`.
* **Phase error detector.** It computes `e(k) = atan2(x(k), y(k))`, wrapped
  into [-pi, pi). With a pi/2 lag, `x = sin(phi)` and `y = cos(phi)`, so
  `e` is the phase error `phi` itself. At other lags it is a mildly
  nonlinear function of `phi`. Phases are 16-bit binary angles, where
  2^16 is 2*pi, so the wrap costs no logic.
* **Digital filter.** The filter is a single gain: `c(k) = G*e(k)`. The gain
  is entered as the normalised loop gain `K1 = G*omega_o` (`k1_i`, Q4.12,
  where 4096 = 1.0). In ticks this is `c = K1 * T0 * e / 2^16`. `K1 = 1` is
  the optimum point of the first-order loop. It allows the widest symmetric
  variation of input frequency and gain.
* **DCO.** Without a divider the DCO period is `T(k) = T0 - c(k-1)`. A
  positive phase error shortens the next period and a negative one
  lengthens it. In steady state the loop settles where `c = T0 - T_in`,
  which leaves a constant, nonzero phase error. This is the known property
  of a first-order TDTL.

Latency from a sampling pulse to the new correction is 3 clocks: sampler,
detector register and filter register. The DCO compares against its period
every clock, so a correction that arrives a few clocks into a period still
applies to that period.

## The adaptation (the part that makes division possible)

Suppose the prescaler divides the DCO by `D` and nothing else changes. One
sampling period then spans `D` DCO periods. The free-running sampling period
becomes `D*T0`, which is `W = 1/D`, and the correction acts `D` times per
sample. With `D = 4` the loop lands far outside its lock range.
`tb_tdtl_ffs` reproduces this: with `adapt_en_i = 0` the sampling period
wanders to about four times the input period and the phase error slips
through the whole circle.

The RBA removes this effect. Two registers hold the division factor of each
divider. **Register 1** is loaded with the count of the ÷N divider when that
divider fires (its pulse R1). **Register 2** is loaded with the count of the
÷N+1 divider on its pulse R2. A multiplexer, steered by the control unit,
outputs the register of the divider now in use as the **adapting signal D**.
D goes to two places:

* the DCO, whose free-running period becomes `T0/D`;
* the filter, whose output is divided by `D` (`c_o = c_full_o / D`).

Each DCO period is then `(T0 - c)/D`. The `D` periods that make up one
sampling interval add up to exactly `T0 - c(k-1)`, the period of the
undivided loop. So the sampling loop, its lock range and its transient
response are those of the plain TDTL for every `N.f`, while `f_out` runs D
times faster. The division by D is a multiplication by a rounded reciprocal
`2^20/D`, computed by a constant function for every 5-bit D.

Both registers are loaded with N and N+1 at reset. If `n_i` changes while
running, the first cycle of each divider still uses the old value. This
gives a short transient, which the loop absorbs: a 4 → 3.8 change settles in
4 samples in `tb_tdtl_ffs`.

## Prescaler fractional divider

A DeMUX sends each DCO pulse to the ÷N or the ÷N+1 counter, as chosen by
the control unit. Each counter fires on its last input pulse, in the same
clock. A MUX passes the active counter's output on as `f_s`, which drives
both samplers. The counter outputs are also the control unit's inputs and
the register load pulses R1 and R2.

The control unit is a first-order fraction accumulator. On each output
pulse it adds `fnum_i`. When the sum reaches `fden_i`, it subtracts `fden_i`
and selects N+1 for the next cycle. Of every `fden` cycles, `fnum` use N+1.
If the prescaler divides by N for P DCO pulses and by N+1 for Q pulses, the
ratio is `(P+Q) / (P/N + Q/(N+1)) = N + fnum/fden`. Settings for the ratios
used in the tests:

| ratio       | `n_i` | `fnum_i` | `fden_i` |
|-------------|-------|----------|----------|
| 4           | 4     | 0        | 0        |
| 3.5         | 3     | 1        | 2        |
| 3.8         | 3     | 4        | 5        |
| 2.0714285   | 2     | 1        | 14       |
| 1 (no division, plain TDTL) | 1 | 0 | 0 |

`fden_i = 0` means integer division. `fnum_i` must be less than `fden_i`,
and `n_i` must be between 1 and 30.

## Top-level interface (`tdtl_ffs`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | master clock; synchronous active-low reset |
| `y_i` | in | 12 | reference input, one signed sample per clock |
| `n_i` | in | 5 | integer part N |
| `fnum_i`, `fden_i` | in | 8 | fractional part as fnum/fden |
| `k1_i` | in | 16 | loop gain K1, Q4.12 (4096 = 1.0) |
| `adapt_en_i` | in | 1 | 1: adaptation on; 0: D forced to 1 |
| `f_out_o` | out | 1 | DCO pulses, the synthesized (N.f) f_ref |
| `f_s_o` | out | 1 | divided pulses that sample the input |
| `e_o`, `e_valid_o` | out | 16, 1 | phase error e(k), binary angle, and its update strobe |
| `c_full_o`, `c_valid_o` | out | 32, 1 | filter output G*e(k) in ticks (Q16.16) and its strobe |
| `c_o` | out | 32 | adapted correction c/D sent to the DCO |
| `x_k_o`, `y_k_o` | out | 12 | the held samples |
| `adapt_o` | out | 5 | adapting signal D |
| `sel_o` | out | 1 | 0: dividing by N, 1: dividing by N+1 |

Parameters: `T0` (256, nominal sampling period in clocks), `TAU` (T0/4),
`CORDIC_ITER` (14). The shared widths and formats are in `tdtl_pkg`.

With `K1 = 1` the filter output spans ±T0/2, so the input period can range
from about 0.5*T0 to 1.5*T0 (128 to 384 clocks). Within that span the
lock-range condition of the first-order TDTL decides.

## Files

| file | content |
|---|---|
| `rtl/tdtl_pkg.sv` | widths, types, the reciprocal and CORDIC angle functions |
| `rtl/tdtl_ffs.sv` | top level |
| `rtl/time_delay.sv` | circular-buffer delay line |
| `rtl/sample_hold.sv` | sampler |
| `rtl/phase_error_detector.sv` | unrolled vectoring CORDIC atan2 |
| `rtl/digital_filter.sv` | gain K1, adapted by 1/D |
| `rtl/dco.sv` | fractional-period tick accumulator |
| `rtl/prescaler_frac_divider.sv` | DeMUX, ÷N, ÷N+1, control unit, MUX |
| `rtl/mod_divider.sv` | one ÷M counter |
| `rtl/pfd_control_unit.sv` | N / N+1 selection |
| `rtl/rba.sv` | Register 1, Register 2 and the adapting MUX |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_tdtl_ffs_noise.sv` | MSE against frequency step, with and without input noise |
| `tb/tb_tdtl_ffs_lockrange.sv` | lock / no lock at points inside and outside the (W, K1) lock region |

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

`tb_tdtl_ffs` runs the whole synthesizer at its default parameters. Each
case resets at `W = 1` (input period T0), settles, and applies an input
frequency step. It then checks four things over the last 20 to 28 samples:

* lock: the mean sampling period is within 0.25 clock of the input period
  and the phase error is steady;
* the steady-state error `(T0 - T_in)/(K1*T0)` turns;
* the exact number of DCO pulses, which is window × N.f;
* `f_out/f_ref = N.f`.

It also checks that the loop settles within 12 samples of the step. Results:

| case | settles in |
|---|---|
| TDTL alone, step +0.4 (W = 0.71) | 2–3 samples |
| TDTL alone, W = 1.42 | 6 samples |
| ratio 4 with RBA, +0.4 | 3 samples |
| ratio 4 without adaptation, +0.4 | loses lock (sampling period ≈ 1025 clocks) |
| ratio 3.5, +0.4 | 2–3 samples |
| ratio 3.8, W = 1.42 | 6 samples |
| ratio 2.0714285, +0.4 | 2 samples |
| ratio change 4 → 3.8 while running | 4 samples |

The testbench also counts each mechanism and requires every count to be
nonzero: N+1 cycles, R1 and R2 loads, phase-detector wraps, relocks, loss of
lock without adaptation, and a runtime ratio change.

`tb_tdtl_ffs_lockrange` probes the lock region at ratio 3.8. On its lower
side, the first-order TDTL with a pi/2 delay locks only where
`2|1 - W| < K1`, with `W = omega_o/omega`. Points inside this region lock:
(W, K1) = (0.6, 1), (0.71, 1), (1.2, 0.6), (1.42, 1) and (1.6, 1.5). Points
outside it do not: (1.4, 0.6), (1.6, 1), and the too-high gain (1, 2.5).
The adapted synthesizer thus keeps the lock region of the undivided loop.

`tb_tdtl_ffs_noise` steps the input by 0.1 to 0.5 at ratio 3.8. It
measures the mean square of `e(k)` about its theoretical steady state over
the 40 samples after the step, once clean and once with white Gaussian noise
(standard deviation 87 on a 1800-amplitude sine, about 23 dB SNR). The
noise-free MSE rises from about 0.008 rad² at step 0.1 to 0.11 rad² at step
0.5. Noise raises it by 0.005 to 0.03 rad². The loop stays locked in
every run.

Sampling instants fall on clock edges. The sampled phase therefore jitters
by ±1 clock (±1.4° at T0 = 256), which is ±256 binary-angle units of
`e(k)`. The tests allow for this.

## Where this RTL makes its own choices

* **Digital time base.** The reference is a clocked sample stream. The
  analog delay becomes a buffer of `TAU` clocks, and sampling becomes a
  register load. Sampling-phase resolution is one clock, so a larger `T0`
  gives finer phase.
* **Adaptation form.** The published description says only that the
  registers store the division outputs and steer the DCO and the filter
  gain. Here that means: D is the division factor in use, the free-running
  DCO period is `T0/D`, and the filter gain is divided by `D`. This is the
  simplest form that keeps the sampling loop unchanged.
* **Control unit.** A fraction accumulator, `N + fnum/fden`. Higher-order
  noise shaping is not part of this design.
* **Arctangent.** A 14-step unrolled CORDIC with 6 guard bits. Its error
  stays within 8/65536 of a turn.
* **Limits.** The DCO period is clamped at 2 clocks. Widths are 12-bit
  samples, 16-bit phase, Q16.16 ticks, 5-bit N and 8-bit fraction.
* **Reset.** All state uses a synchronous active-low reset. The delay
  buffer is cleared by reset.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/tdtl_pkg.sv tb/tb_tdtl_ffs.sv \
          --top-module tb_tdtl_ffs -o sim && obj_dir/sim
```

Replace `tb_tdtl_ffs` with any other `tb_*` module to run it. The package
must be read first. All other modules are found through `-Irtl`. The whole
synthesizer test simulates in well under a second.
