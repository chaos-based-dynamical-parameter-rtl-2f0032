# Identifying a chaotic transmitter by estimating its oscillator parameter

A sensor node that carries a simple analog chaotic oscillator can be
recognised by the value of one circuit parameter of that oscillator. A
gateway that runs a digital model of the same oscillator can synchronize the
model to the received chaotic signal and then *measure* that parameter from
the signals alone. The measured value acts as a hardware-encoded identifier:
a transmitter with the same oscillator type but a different component value
produces a different estimate and can be rejected.

This repository holds synthesizable SystemVerilog for the gateway side of
such a scheme, built around the Vilnius chaotic oscillator:

* a discrete-time Vilnius oscillator that advances one integration step per
  clock and can be driven by a received signal (Pecora–Carroll
  synchronization);
* an estimator of the oscillator parameter `a`, built from a short
  arithmetic pipeline and a least-mean-squares (LMS) adaptive filter, with
  no divider;
* a receiver top level, `pla_receiver`, that joins the two.

## The oscillator and the parameter `a`

In normalized form the Vilnius oscillator obeys

    dx/dθ = y
    dy/dθ = a·y − x − z
    ε·dz/dθ = b + y − c·(exp(z) − 1)

x and z are capacitor voltages and y is the inductor current, all divided by
the diode thermal voltage. The diode gives the exp(z) term. `a` sets the
damping of the LC loop; in the circuit it is fixed by a gain and a
resistor, a = (k − 1)·R1/ρ. As a grows, the oscillator goes from rest to a
periodic orbit, then through period doubling into chaos with periodic
windows, and back. In the discrete model built here, oscillation starts near
a ≈ 0.22. Below that the equilibrium is stable and there is no signal from
which to estimate a.

`vilnius_oscillator` integrates these equations with the forward Euler rule,

    v[n+1] = v[n] + dv[n]·Δθ ,   Δθ = 2^-7

so every clock edge gives one new sample of x, y and z. The constants used
are these:

| quantity | value | how it is built |
|---|---|---|
| state format | Q8.14, 22 bits | `state_t` in `vpla_pkg` |
| ε | 0.125 | 1/ε is a left shift by 3 (`EPS_SHIFT`) |
| b/ε | 34.46 (b ≈ 4.31 for a 2 V supply through 18 kΩ) | run-time input `b_over_eps` |
| c/ε | 6.2·10⁻⁹ (c = ρ·i_S/V_T ≈ 7.75·10⁻¹⁰) | baked into the exp ROM |
| Δθ | 2^-7 | right shift by `DT_SHIFT` |
| a | any value with \|a\| < 8 | run-time input |

The diode term (c/ε)(exp(z) − 1) comes from a 4096 × 22-bit ROM (`exp_lut`).
The ROM covers z ∈ [0, 32) in steps of 2^-7. Below zero the term is far
smaller than one LSB and reads as 0; above 32 the last entry is used. The
table is computed when the design is elaborated: exp(i·2^-7) is built by
repeated multiplication in 128-bit fixed point, then scaled by c/ε (the
`C_OVER_EPS_Q74` parameter, c/ε·2^74) and clipped to the Q8.14 range. No
data file is involved.

Derivatives are computed combinationally (`vilnius_derivatives`) and carry
four extra integer bits (Q12.14), because (1/ε)·y + b/ε can exceed ±128. State
updates saturate at the Q8.14 limits. With b/ε = 34.46 and a = 0.47 the
attractor stays within x ∈ [−27, −16], y ∈ [−6, 6] and z ∈ [14, 24].

### Synchronization

With `sync_en` high, the received y_m replaces the oscillator's own y, both
in the derivative inputs and in the y register. The z equation then depends
only on y_m and z. Its diode term is dissipative, so the local z_s converges
to the transmitter's z_m. In simulation it matches bit for bit once
converged. x does not converge, because dx = y has no restoring term. This
is why the transmitter sends x_m as well: the estimator uses x_m, y_m and
the local z_s.

Note one consequence of the equations as built: once the receiver is
synchronized, its z_s no longer depends on its own `a_rx`. Changing `a_rx`
only changes the receiver's behaviour before synchronization and in
self-test mode.

## Estimating `a` without a divider

Rearranging the y equation gives

    a = s[n] / y[n],   s[n] = (y[n+1] − y[n])/Δθ + x[n] + z[n]

**Numerator pipeline** (`numerator_pipeline`): four register levels. y is
shifted left by `DT_SHIFT`, which is the division by Δθ. Two registers hold
consecutive samples, and their difference is registered. Separately x and z
are registered, added and delayed twice, so that both branches meet at the
same sample n. The sum is registered as s[n]. A four-register delay line
gives y_delayed[n] in the same phase. s is 31 bits wide with 14 fractional
bits, enough to hold y·2^7 exactly, so nothing in the pipeline overflows.

**LMS filter** (`lms_filter`): instead of dividing, the filter finds the `a`
that minimises E[(s − a·y)²], using the stochastic-gradient update

    a_est ← a_est + 2μ · y · (s − a_est · y)

2μ is a power of two (2^-mu_shift), so the step-size product is a shift.
`mu_shift = 17` gives 7.6·10⁻⁶, the largest power of two not above 10⁻⁵.
`mu_shift = 19` gives the same for 3·10⁻⁶. The register chain is:

    s ──► Rs2 ─────────────┐
    y_d ─(× a_est)─► Rp ──(−)► Re ─(× Ry3)─► Rg ─(»shift, round)─(+)─► a_est
    y_d ──► Ry2 ──► Ry3 ───────────┘                                  ▲ │
                                                                      └─┘

The product a_est·y_d uses the current a_est, so the gradient applied to
a_est is three clocks old (a "delayed LMS"). With steps this small the delay
has no visible effect. a_est is Q4.20: 20 fractional bits are needed
because the updates are tiny, and 4 integer bits leave headroom over the
expected range 0 < a < 2. The sum saturates instead of wrapping.

Two fixed-point effects matter, and both were measured:

* **Rounding of the update.** If 2μ·y·e is truncated (floored), every
  update is biased downward and the estimate settles about 2^-9 too low. The
  update is therefore rounded to nearest.
* **Dead zone.** Once |a − a_est|·y² < 2^-4 (for 2^-17), the rounded update
  is zero and a_est stops moving. With |y| ≲ 8 the estimate approaches from
  below and stops about 0.001 short of the value it is converging to. The
  dead zone is four times wider at 2^-19.

The estimate converges to the best mean-square fit, not exactly to the
physical `a`. Another consequence: over a long run the term
(y[n+1] − y[n])·y[n] averages to nearly zero, so the estimate is carried
mostly by E[(x + z)·y]/E[y²]. Errors in the derivative branch (even a wrong
Δθ scale) therefore shift the result much less than errors in x or z.

### Measured behaviour (default parameters)

| setup | true a | settled a_est | settling |
|---|---|---|---|
| self-test, clean signal | 0.47 | 0.4692 | ≈ 5·10⁴ clocks from 0 |
| self-test, clean signal | 0.30 | 0.3026 | ≈ 4·10⁴ clocks |
| synchronized, transmitter switched | 0.60 | 0.5994 | — |
| synchronized, transmitter switched | 0.50 | 0.5011 | 1.9·10⁴ clocks after the switch |
| synchronized, transmitter switched | 0.30 | 0.3026 | 3.7·10⁴ clocks |
| synchronized, 2μ = 2^-19 | 0.47 | 0.4625 | 1.1·10⁵ clocks to within 0.03 |

Without noise the ripple on the settled value is below 3·10⁻⁴. At a 50 MHz
clock, 5·10⁴ clocks is 1 ms.

## Behaviour over the evaluated operating range

Three further testbenches cover the operating range: the oscillator's own
bifurcation sweep, the full sweep of the transmitter's a, and a noisy
channel.

**Bifurcation sweep** (`tb_bifurcation`): the free-running oscillator is run
for a from 0.20 to 1.20 in steps of 0.05. The testbench counts the distinct
maxima of y, rounded to 2^-6. The result is the familiar route to chaos:

| a | orbit |
|---|---|
| 0.20 | at rest (the oscillation decays) |
| 0.25–0.35 | period 1 |
| 0.40–0.45 | period 2 |
| 0.50–0.90 | chaotic, with a period-2 window at 0.65 |
| ≥ 0.95 | grows past the ±128 state range and is clamped |

Above a ≈ 0.9 a floating-point run of the same Euler equations diverges
as well, so the escape comes from the equations at these constants, not
from the fixed-point format. The built number ranges cover the whole
bounded part of the sweep.

**Sweep of the transmitter's a** (`tb_sweep_a`): a_tx from 0.20 to 0.70 in
steps of 0.01, receiver synchronized, 1.4·10⁵ clocks per point, statistics
over the last 4·10⁴ clocks.

* From 0.24 to 0.70, every estimate lies within 0.03 of a_tx, and the
  estimates increase strictly.
* Every pair of neighbouring points has non-overlapping min–max ranges
  (46 of 46).
* From about 0.28 upward the offset is nearly constant, around −0.002.
  Close to the oscillation onset (0.23–0.27) the amplitude is small and the
  estimate is still settling at the end of the window.
* Below 0.23 the transmitter does not oscillate, and the estimate is
  meaningless.
* The results for receiver a = 0.47 and 0.60 are identical (see
  *Synchronization*).

**Noisy channel** (`tb_noise_snr`): band-limited Gaussian noise is added to
x_m and y_m, with a = 0.47 on both sides. The noise is white noise through a
one-pole low-pass with a 32-clock time constant, scaled to the measured
signal variance. Results over the last 10⁵ clocks:

| SNR | 2μ = 2^-17: mean, min–max | 2μ = 2^-19: mean, min–max |
|---|---|---|
| 50 dB | 0.4700, 0.0010 | 0.4698, 0.0003 |
| 40 dB | 0.4685, 0.0071 | 0.4692, 0.0015 |
| 30 dB | 0.4655, 0.0116 | 0.4678, 0.0032 |
| 24 dB | 0.4540, 0.0359 | 0.4541, 0.0115 |
| 18 dB | 0.4144, 0.0498 | 0.4164, 0.0142 |

The spread grows as the SNR falls, and the slower step narrows it about
3 to 4 times, at the price of four times the settling time. The mean also falls
at low SNR. Noise on y_m is correlated with itself in both s and y, and it
disturbs the synchronization of z_s; together these pull the least-squares
fit down.

## The receiver top level

`pla_receiver` holds one `vilnius_oscillator` and one `a_estimator`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `a_rx` | in | 22 | receiver oscillator's own a, Q8.14 |
| `b_over_eps` | in | 22 | b/ε, Q8.14 (34.46 → 564593) |
| `x_m`, `y_m` | in | 22 | demodulated transmitter x and y, one sample per clock |
| `sync_en` | in | 1 | y_m drives the local oscillator |
| `use_local` | in | 1 | 1: estimate from the local x_s, y_s, z_s (self-test); 0: from x_m, y_m, z_s |
| `mu_shift` | in | 5 | 2μ = 2^-mu_shift |
| `x_s`, `y_s`, `z_s` | out | 22 | local oscillator state (y_s = y_m while synchronized) |
| `a_est` | out | 24 | estimate, Q4.20 |

Latency from a sample to its first effect on a_est is 8 clocks: four in the
numerator pipeline and four in the LMS loop. The reset values of the local
oscillator are parameters (`X0`, `Y0`, `Z0`).

Not included: the RF modulator, channel and demodulator; the analog
oscillator of the sensor node; and the decision logic that would compare
a_est with an expected, offset-calibrated value to accept or reject a
transmitter. The scheme leaves that rule open. The receiver takes samples that have already
been demodulated and are aligned to its clock. In the testbenches a second
`vilnius_oscillator` plays the transmitter.

## How these results differ from the published scheme

* **Receiver parameter.** In the published scheme the receiver's own a
  decides which transmitter values can be told apart. In this
  implementation, once the receiver is synchronized its z_s depends only on
  y_m, so a_rx has no effect on the estimate.
* **Sign of the offset.** The published estimator reads 0.01–0.02 high,
  with a constant offset of about 0.017. This one reads about 0.002 low. The
  difference most likely comes from the different time step, ROM mapping
  and rounding.
* **Settling time.** Settling takes about 5·10⁴ clocks from zero. The
  published figure is about 4·10⁴.
* **Behaviour at low SNR.** Under strong noise the published mean stays
  near the noise-free level. Here it drifts down by 0.05 at 18 dB.
* **Oscillation onset.** The discrete oscillator built here starts
  oscillating only near a ≈ 0.22, so the lowest values of the published
  sweep give no estimate.
* **Upper end of the bifurcation sweep.** With the constants used here,
  the equations have no bounded orbit above a ≈ 0.9, so the sweep cannot
  follow the published one up to 1.2.

## Where this design makes its own choices

These points are not fixed by the scheme as published; each is a decision
of this implementation:

* **Δθ = 2^-7.** The step only has to be a power of two. The value was
  chosen to keep the stiff diode term stable in forward Euler.
* **Combinational derivatives.** The derivative block is described as a
  pipeline with equal delays on its three outputs. A pipelined derivative
  cannot close a one-step-per-clock recurrence, so here the delay is zero on
  all three.
* **Forward Euler.** All three derivatives use the values of step n, as in
  the difference equations. Euler–Cromer, which would use x[n+1] or y[n+1]
  inside the same step, was not used.
* **ROM address mapping**, asynchronous ROM read, and saturation of states
  and estimate.
* **The combining element of the numerator pipeline is an adder**, as the
  equation for s[n] requires. The numerator's x + z term (not x + y) follows
  from the derivation.
* **Rounded LMS update** (see above).
* **`mu_shift` and `use_local` as run-time inputs**, so that the two
  published step sizes and the self-test setup can be selected without
  rebuilding.

## Files

| file | contents |
|---|---|
| `rtl/vpla_pkg.sv` | formats (`state_t` Q8.14, `est_t` Q4.20, `deriv_t` Q12.14), Δθ default |
| `rtl/exp_lut.sv` | 4096-entry diode-term ROM |
| `rtl/vilnius_derivatives.sv` | right-hand sides of the equations |
| `rtl/vilnius_oscillator.sv` | state registers, Euler step, synchronization input |
| `rtl/numerator_pipeline.sv` | s[n] and y_delayed[n] |
| `rtl/lms_filter.sv` | LMS update of a_est |
| `rtl/a_estimator.sv` | numerator pipeline + LMS filter |
| `rtl/pla_receiver.sv` | top level |
| `tb/tb_ref_pkg.sv` | reference model: exp term in real arithmetic, Euler step on 64-bit integers |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, the end-to-end test (1.25 million clocks, a few seconds):

    verilator --binary --timing -Wno-fatal --top-module tb_pla_receiver \
      -y rtl -y tb +libext+.sv rtl/vpla_pkg.sv tb/tb_ref_pkg.sv tb/tb_pla_receiver.sv
    ./obj_dir/Vtb_pla_receiver

Run it from the repository root. The package files must come first on the
command line; verilator finds the other modules through `-y`.

| testbench | what it establishes |
|---|---|
| `tb_exp_lut` | every ROM entry class (negative, in range, beyond range, clipped) against exp() in real arithmetic; monotonic table |
| `tb_vilnius_derivatives` | the three right-hand sides, bit-exact, for random states |
| `tb_vilnius_oscillator` | bit-exact trajectory against the reference model for 10⁵ steps; y follows the drive; z locks to a drive oscillator with a different a |
| `tb_numerator_pipeline` | s[n] and y_delayed[n] bit-exact with 4-clock latency |
| `tb_lms_filter` | first update exact (8 LSB after 4 clocks); convergence to within 0.002 for four values of a; 2^-19 slower than 2^-17; saturation |
| `tb_a_estimator` | 8-clock latency; settling level, ripple and time for a = 0.47 and 0.30 |
| `tb_pla_receiver` | self-test, unsynchronized period, lock, tracking of 0.6 → 0.5 → 0.3, slow step size, all at default parameters |
| `tb_bifurcation` | free-running oscillator, a from 0.20 to 1.20: rest, period 1, period doubling, chaos, no saturation below 0.92 |
| `tb_sweep_a` | a_tx sweep 0.20–0.70 for two receiver values (about 15 s) |
| `tb_noise_snr` | five SNR values, two step sizes |

## Changing the design

* A different ε, if it is a power of two: set `EPS_SHIFT`, and
  `C_OVER_EPS_Q74` = round(c/ε·2^74).
* A different time step: `DT_SHIFT`. It changes the numerator width
  (`STATE_W + DT_SHIFT + 2`) and the convergence behaviour. Keep
  Δθ·(1/ε)·(b + y) well below 2, or forward Euler becomes unstable on the
  diode term.
* The ROM step (2^-7) is tied to the constant `EXP_STEP_Q60` = exp(2^-7)·2^60
  in `exp_lut`. Change both together.
