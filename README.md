# Vector controller for an induction motor in about 120 clock cycles

This RTL computes one complete control step of field-oriented (vector)
control for a three-phase induction motor as a dedicated datapath. The aim is
a full control lap of a few microseconds or less on one chip. A step takes the
sampled phase currents and voltages, the measured rotor speed, and the speed
and flux references. It returns the three phase-voltage references for the
inverter. With a 32-bit word the lap takes **124 clock cycles**, which is
1.24 µs at 100 MHz.

Vector control treats the induction machine like a DC machine. The stator
current is seen in a frame that turns with the rotor flux. In that frame its
*d* component sets the flux and its *q* component sets the torque, and each is
controlled by its own PI loop. The hard part is knowing where the flux points.
This design estimates the flux vector, then takes its length with a square
root and its direction with two divisions:

    cos θ = Ψrα / |Ψr|,   sin θ = Ψrβ / |Ψr|

So the whole controller needs no sine, no cosine and no angle accumulator.
Besides multipliers, it uses three dividers and one square-root unit. All of
them are sequential and non-restoring, one result bit per clock. These
operators set the lap time.

## The control lap

```
 i_abc ─clarke─► i_αβ ─┬──────────────► rotor_flux_est ─► |Ψr|, cosθ, sinθ, Ψr_αβ
 u_abc ─clarke─► u_αβ ─┘                      │
 i_αβ, cosθ, sinθ ───────park──────────► i_sd, i_sq
 i_sq, |Ψr|, ω_r ─────omega_est────────► ω        (frame speed)
 ω_r* − ω_r ─err_diff─► pi_ctrl ─► i_sq*           (speed loop)
 Ψr*  − |Ψr| ─err_diff─► pi_ctrl ─► i_sd*          (flux loop)
 i_sq* − i_sq ─err_diff─► pi_ctrl ─► v_sq          (q-current loop)
 i_sd* − i_sd ─err_diff─► pi_ctrl ─► v_sd          (d-current loop)
 v_sd, v_sq, i_sd, i_sq, |Ψr|, ω ─decoupling─► u_sd, u_sq
 u_sd, u_sq, cosθ, sinθ ─inv_park─► u_αβ ─inv_clarke─► u_ref (a, b, c)
```

| module | computes |
|---|---|
| `clarke` | α = (2a − b − c)/3, β = (b − c)/√3 (amplitude-invariant); one instance for currents, one for voltages |
| `rotor_flux_est` | Ψs += Ts (u_s − Rs i_s); Ψr = (Lr/M)(Ψs − σLs i_s); \|Ψr\| = √(Ψrα² + Ψrβ²); cos/sin θ by division |
| `park` | i_sd = cosθ i_α + sinθ i_β, i_sq = −sinθ i_α + cosθ i_β |
| `omega_est` | ω = Pp ω_r + M β_r i_sq / \|Ψr\|, with β_r = Rr/Lr (rotor speed plus slip) |
| `err_diff` | ε = reference − measured (four instances) |
| `pi_ctrl` | y = kp ε + Σ ki Ts ε (four instances) |
| `decoupling` | u_sd = v_sd − σLs ω i_sq + (M β_r/Lr)(M i_sd − \|Ψr\|); u_sq = v_sq + σLs ω i_sd + (M/Lr) ω \|Ψr\| |
| `inv_park` | u_α = cosθ u_sd − sinθ u_sq, u_β = sinθ u_sd + cosθ u_sq |
| `inv_clarke` | a = α, b,c = −α/2 ± (√3/2) β |
| `nr_div`, `nr_sqrt` | sequential non-restoring divider and square root |

Here σ = 1 − M²/(Ls Lr) is the leakage coefficient. The decoupling adds the
terms that the machine equations couple between the two axes. The first is
the cross term σLs ω i. The second is the back-EMF term (M/Lr) ω Ψr on the
q axis. The third is the flux-change term (M/Lr) dΨr/dt on the d axis, where
dΨr/dt = β_r (M i_sd − Ψr). With these added, the current PI controllers only
have to drive R i + σL di/dt.

The flux estimator is a *voltage model*. It integrates the stator EMF to get
the stator flux, then removes the leakage flux. It uses only stator
quantities and the machine constants. It runs once per lap, with forward
Euler integration.

## Sequencing and timing

Each unit has a `start` input and a `done` output. `start` samples the
unit's operands. `done` pulses when its registered outputs are valid, and the
outputs hold until the next `done`. `vc_top` starts each unit as soon as all
its operands are ready, so work that does not depend on the flux estimate
runs alongside it. For example, the speed loop runs during the flux
estimator's square root. The critical path, with its latency in cycles at the
default W = 32, is:

| stage | cycles | formula |
|---|---|---|
| Clarke transforms | 2 | |
| rotor flux estimator | 77 | 2W + 13: four registered stages, sum of squares, square root (W + 2), divider launch, two divisions in parallel (W + 2), output |
| Park transform | 2 | |
| omega estimator | 36 | W + 4: one divider |
| decoupling | 3 | |
| inverse Park | 2 | |
| inverse Clarke | 2 | |
| **lap** | **124** | 3W + 28 |

Off the critical path:

- **Flux loop.** Its error difference and PI controller start when the flux
  estimate is ready.
- **Current loops.** Their error differences and PI controllers start when
  both of the following are ready: the Park result and the current
  references.
- **Decoupling.** It waits for whichever finishes last: the current loops or
  the omega estimator.

The waits are simple sticky "done seen" flags in `vc_top`.

The dividers and the square root iterate one bit per clock, so the lap scales
linearly with the word length. A radix-4 or combinational operator would
shorten the lap. A fully combinational operator would also cap the clock rate
far lower.

## Number format

Every signal is a 32-bit two's-complement fixed-point value with 24
fractional bits (Q7.24). The range is ±128 and the resolution is 6·10⁻⁸. All
quantities are in per unit: time is in units of 1/ω_base, and the machine
constants are per-unit values. This is why small constants such as the
sample period Ts = 0.0314 (100 µs at a 50 Hz base) keep their precision.
`vc_pkg` holds the format, the `abc_t`, `ab_t` and `dq_t` structs, and the
helpers:

- `fx_mul` keeps the full 64-bit product, shifts it right by 24 (rounding
  toward −∞) and saturates.
- `fx_add` and `fx_sub` saturate.
- `to_fx` converts real-valued parameters when the design is elaborated.

Nothing in the datapath wraps around: it clamps at ±128.

The square root takes the exact 64-bit sum Ψrα² + Ψrβ². That sum has 48
fractional bits, so its integer square root has 24 fractional bits again, and
no rescaling is needed.

The divider forms (|num|·2²⁴)/|den|, which is a 56-bit dividend. It still
iterates only 32 quotient bits:

- The top 24 dividend bits seed the partial remainder.
- An overflow (quotient ≥ 2³²) is detected before iterating, by comparing
  those bits with the divisor.
- Results that do not fit saturate.
- A zero divisor saturates, and 0/0 gives 0.

## Non-restoring operators

`nr_div` keeps a signed partial remainder. Each clock it shifts in the next
dividend bit. It then subtracts the divisor if the remainder is non-negative,
or adds it if the remainder is negative. The new quotient bit is 1 when the
result is non-negative. The quotient needs no final correction.

`nr_sqrt` follows the same pattern for the square root. Each clock it brings
in two radicand bits, then either subtracts 4q + 1 or adds 4q + 3, and the
sign of the result gives the next root bit.

Both operators take W + 2 cycles from `start` to `done`: one load cycle, W
iterations and one output cycle. They assert that `start` never arrives while
they are busy.

## Start-up

When no flux exists yet, the flux modulus is zero and the angle is undefined.
`rotor_flux_est` then reports θ = 0 (cos = 1, sin = 0). The first laps
therefore magnetise the machine along the α axis, and the estimated angle
takes over as soon as flux builds up. Without this rule the loop stays at
zero for good, because 0/0 gives cos = sin = 0 and the voltage references
stay zero.

## Top-level interface (`vc_top`)

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | | clock; synchronous active-low reset that clears every integrator and the stator-flux state |
| `start` | in | 1 | one-cycle pulse that samples all inputs; only while `busy` is low |
| `omega_r_ref`, `psi_r_ref` | in | `fx_t` | speed and rotor-flux references |
| `i_abc`, `u_abc` | in | `abc_t` | sampled stator phase currents and phase voltages |
| `omega_r` | in | `fx_t` | measured rotor speed (from a speed sensor) |
| `done` | out | 1 | pulse: `u_ref` and the observation outputs are updated |
| `busy` | out | 1 | high from the cycle after `start` through the `done` cycle |
| `u_ref` | out | `abc_t` | phase voltage references for the inverter's PWM |
| `psi_r`, `psi_ab`, `cos_th`, `sin_th` | out | | flux modulus, flux vector and field angle |
| `i_dq`, `omega` | out | | field-frame currents and frame speed |
| `lap_cycles` | out | 16 | clocks from `start` to `done` of the last lap (valid with `done`) |

Parameters of `vc_top` are all `real` and per unit:

- Machine: `RS`, `RR`, `LS`, `LR`, `LM`, `NP` (pole pairs).
- Sample period: `TS`.
- PI gains: `KP_SPEED`, `KI_SPEED`, `KP_FLUX`, `KI_FLUX`, `KP_ICUR`,
  `KI_ICUR`.

They default to the values in `vc_pkg`, which describe a generic small
machine. Set them for your motor. To change the word length, edit `W` and
`FRAC` in `vc_pkg`. Every width and latency follows from them.

## What is not in the RTL

- **Speed sensor interface.** `omega_r` is an input. Its decoding (encoder
  or tachometer) is not specified here.
- **Inverter PWM and gating.** `u_ref` is the output. Carrier, modulation
  scheme and dead time are left to the integrator.
- **Sensorless speed/flux observer.** A fully sensorless controller would
  replace the measured `omega_r` with an extended-Kalman-filter observer.
  That observer is not part of this design.
- **Drift compensation.** The voltage-model integrator has none. With offsets
  on the voltage or current samples, the estimated stator flux drifts. A
  production design would add a high-pass or low-pass substitute for the pure
  integrator.
- **Anti-windup.** The PI integrators have none. They clamp only at the
  number range.

## Where this design departs from the reference implementation

The reference is a 32-bit parallel design with registered module outputs and
sequential dividers and square root. It reports the following per-stage
cycle counts:

| stage | reference (cycles) | this RTL (cycles) |
|---|---|---|
| Clarke | 3 | 2 |
| flux estimator | 77 | 77 |
| Park | 6 | 2 |
| omega estimator | 34 | 36 |
| lap | 120 | 124 |

The operator mix matches the reference: three divisions and one square root.
The reference counts 24 multiplications. This RTL has 41 product operations,
because every constant factor is its own constant multiplication instead of
being merged into its neighbours. Ten of them are in the flux estimator and
eight in the decoupling. Most of the 41 are by constants, which synthesis
can reduce to shift-and-add logic.

These do not follow the reference:

- the number format and per-unit scaling;
- the voltage-model flux observer (the reference gives only the modulus and
  cos/sin step);
- the start-up angle rule;
- the saturation rules;
- the handshake and reset;
- all machine constants and gains.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- **Exact integer references.** The divider is checked against 64-bit
  integer division, including signs, saturation and a zero divisor. The
  square root is checked against an integer bisection, including the all-ones
  radicand. The error difference is checked against clamped integer
  subtraction.
- **Real-valued references.** The transforms, PI, decoupling and estimators
  are checked against real-valued models, with tolerances of 1e-5 to 1e-4.
- **Latency.** Every testbench checks the start-to-done latency stated
  above.

`tb_vc_top` runs the whole controller at its default parameters, in closed
loop with a per-unit induction-machine model and an ideal inverter, for 2000
laps:

- The flux reference of 0.9 is applied from the start.
- After 400 laps the speed reference steps from 0 to 0.5.
- Every lap, every output is compared with a real-valued model of the lap.
  The model starts each lap from the design's integrator states, and the
  largest deviation observed is about 1e-6.
- Every lap must take exactly 124 cycles.
- The test counts how often each sequencing case occurs, and fails if one
  never does:
  - the zero-flux start-up rule is used;
  - the current loops wait for the flux loop;
  - the decoupling waits for the omega estimator.
- The field angle must pass through all four quadrants.
- By the end, the flux must reach its reference and the rotor must follow
  the speed step.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/vc_pkg.sv tb/tb_fx_pkg.sv tb/tb_vc_top.sv --top-module tb_vc_top -o sim
./obj_dir/sim
```

Replace `tb_vc_top` with any other `tb_<module>` to run that testbench.

`verilator --lint-only -Wall` reports only parameters of `vc_pkg` that a
given module does not use, and one output bit that never changes: the sign
bit of `psi_r`, which cannot be negative.
