# Fixed-point indirect field-oriented speed controller for an induction machine

This RTL is a speed controller for a three-phase induction machine. It uses
*indirect* field orientation. The controller never measures or estimates the
rotor flux. It assumes the flux is held at its rated value by a constant
d-axis current, and it computes where the flux points: the rotor position from
an encoder plus the slip angle, which is the integral of a slip frequency
proportional to the torque current. In that rotating frame torque and flux are
controlled independently, as in a DC machine. The controller outputs three
phase-current commands and forces the inverter to follow them with
hysteresis (bang-bang) comparators, one per phase.

All arithmetic is fixed point, all constants are fixed at build time, and
there is no processor. The structure is a one-to-one hardware rendering of a
block-diagram controller built for a Xilinx Spartan-3 XC3S200. The blocks,
gains and word formats follow that design. Where it left details open, the
choices made here are listed under "Where this RTL makes its own choices"
below.

## Signal flow

```
 w_ref ─┐  (sampled every dt)
        ├─ speed_error ─ pi_controller ──────────── te_ref ─ ×1.18 ─┬─ iq*
 w_m ───┘                 P: ×35                                   │
                          I: Σ 5·e·dt                              │
                          limit ±1.2 pu                            │
                                                                   │
 theta_m ─ teta_position (×2, wrap) ─ theta_r ─┐                   │
 iq* ───── slip_angle (Σ 15.4·iq*·dt) ─ theta_s ┴─ theta_ref ─ idx ─┤
                                               (wrap, ×40.75)      │
 id* = 0.9375 ──────────────────────────────────────────────────── dq_abc
                                    sincos ─ inverse Park ─ inverse Clarke
                                                                   │
 iabc_meas ────────────────────────────────── hysteresis_control ◄─┘ iabc_ref
                                               (3 legs, 20 kHz)  ─► pulses[5:0]
```

Module hierarchy (each module is in `rtl/<name>.sv`, and all share `foc_pkg`):

```
foc_controller
├── speed_error
├── pi_controller
│   ├── p_gain
│   ├── integrator
│   └── torque_limiter
├── rotor_field_angle
│   ├── slip_angle
│   ├── teta_position
│   └── theta_ref
├── dq_abc
│   ├── sincos
│   └── dq_abc_subsystem
└── hysteresis_control
    └── hysteresis_phase ×3
```

## Numbers: the 14_7 format

Every datapath word is a 14-bit signed number with 7 fractional bits ("14_7"),
type `fx_t` in `foc_pkg`. Its range is −64 … +63.99 and one LSB is 2⁻⁷ =
0.0078125. Speeds, torques and currents are in per unit and angles are in
radians. The constants are the nearest 14_7 values of the design figures:

| constant | nominal | stored (×2⁻⁷) | used in |
|---|---|---|---|
| proportional gain K1 | 35 | integer 35 | `p_gain` |
| integral gain KI | 5 | integer 5 | `integrator` |
| integration step dt | 0.0078125 s | shift by 7 | `integrator`, `slip_angle` |
| torque limit | 1.2 pu | 154 (1.2031) | `torque_limiter` |
| torque → iq* gain | 1.18 | 151 (1.1797) | `foc_controller` |
| flux current id* | 0.9375 pu | 120 (exact) | `foc_controller` |
| slip gain Ks = r_r·L_m/(L_r·λ_dr) | 15.4 | 1971 (15.398) | `slip_angle` |
| 2π | 6.2832 | 804 (6.28125) | angle wraps |
| 256/2π | 40.75 | 5216 (exact) | `theta_ref` |
| √3 | 1.732 | 221 (1.7266) | `dq_abc_subsystem` |
| hysteresis threshold | 0.0078125 pu | 1 | `hysteresis_phase` |
| pole pairs | 2 | 2 | `teta_position` |

Note that dt is exactly one LSB of the format. Multiplying by dt is therefore
a 7-bit shift. Both integrators keep 14 fractional bits internally so that
small increments are not lost, and they present 14_7 at their outputs.

Because 2π is stored as 6.28125, the angle arithmetic closes a turn 0.002 rad
early. The sine table has 256 steps per turn, so this error never shows in the
table index.

## Timing

One clock drives everything. Its rate is the rate of the hysteresis
comparators, 400 kHz in the reference setting. A counter in `foc_controller`
makes the control-sample strobe `sample`, one clock in every
`CLKS_PER_SAMPLE` = 3125 (400 kHz × 2⁻⁷ s). The strobe does three things:

* the speed inputs `w_ref` and `w_m` are registered on it;
* the PI integrator steps on it;
* the slip-angle integrator steps on it.

Everything else runs at the full clock rate:

* the encoder angle goes combinationally through `teta_position` and
  `theta_ref` to the sine table, so the current commands follow the rotor
  continuously, not only once per sample;
* the four multipliers of the inverse Park transform have a 3-clock pipeline;
* the limiter, wrap and hysteresis comparators each have a 1-clock register
  on their result.

After a control sample all outputs settle within about 5 clocks. The
hysteresis outputs are re-sampled once every `HYST_DIV` = 20 clocks, so the
gate signals change at most at 20 kHz.

The limiter's registered select is a detail to keep in mind. For one clock
after its input changes, the unclamped value passes through. The controller
changes that input only right after a sample edge, and nothing reads the
torque reference until the next sample edge, 3125 clocks later. So the
glitch has no effect inside the loop, but it is visible on the `te_ref`
port.

## The angle path

This is the part that needs the most care.

1. **Slip angle** (`slip_angle`). On each sample the slip angle grows by
   15.4 · iq* · dt. Two comparators watch it. Once it is above +6.28125 or
   below −6.28125, it is set back to **0**, both at the output and in the
   accumulator. It is not reduced by 2π. The slip angle therefore stays in
   (−2π, 2π) but jumps by about 2π plus the overshoot, at most one step of
   15.4 · 1.42 · 2⁻⁷ ≈ 0.17 rad. This reset is how the reference design
   defines the block, and it is kept.
2. **Electrical rotor angle** (`teta_position`). The encoder's mechanical angle
   (0 … 2π) is doubled (two pole pairs). If the result exceeds 2π, 2π is
   subtracted once. This works for one or two pole pairs only, and the module
   refuses other values at elaboration.
3. **Field angle** (`theta_ref`). The field angle is the sum
   θe = θs + θr. Above +2π, 2π is subtracted. Below −2π, 2π is added, but
   with θs > −2π and θr ≥ 0 this case cannot occur in the assembled
   controller. Sums between −2π and 0 stay negative.
4. **Table index.** θe × 40.75 gives the angle in 1/256 turn. Its integer
   part, taken modulo 256 (two's complement), is the 8-bit index. The modulo
   is what makes negative angles land on the right point of the circle.
5. **Sine/cosine** (`sincos`). A 256-entry table of round(128·sin(2πk/256))
   is computed at elaboration from that formula (9-bit values, 7 fractional
   bits). The cosine is read 64 entries ahead.

## Current commands and current control

`dq_abc_subsystem` computes:

* the inverse Park transform, iqs = iq·cos θ + id·sin θ and
  ids = id·cos θ − iq·sin θ;
* the inverse Clarke transform, ia = iqs, ib = ½(−√3·ids − iqs) and
  ic = ½(√3·ids − iqs).

These follow the usual q-axis-leading convention. The forward transform
q = ⅔·Σ iₓ cos(θ − φₓ) recovers (iq, id).

`hysteresis_control` forms error = command − measurement for each phase and
passes it to `hysteresis_phase`. Each leg has two registered comparators,
error > +1 LSB and error > −1 LSB, and their OR turns the upper switch on.
The inverse of the OR turns the lower switch on. This is the structure of the
reference design. The OR reduces to a single comparison, error > −1 LSB, so
the leg has no memory and no real hysteresis band. The ripple comes from the
20 kHz re-sampling of the gate signals instead.

Gate output order is `pulses[0]` a-upper, `[1]` a-lower, `[2]` b-upper,
`[3]` b-lower, `[4]` c-upper, `[5]` c-lower. After reset all upper switches
are off and all lower switches are on. An assertion checks that the two
switches of a leg are never on together.

## Top-level interface (`foc_controller`)

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (400 kHz nominal); asynchronous active-low reset |
| `w_ref`, `w_m` | in | `fx_t` | speed reference and measured speed, pu |
| `theta_m` | in | `fx_t` | mechanical rotor angle from the encoder, rad, 0 … 2π |
| `iabc_meas` | in | `abc_t` | measured phase currents, pu |
| `pulses` | out | 6 | inverter gate signals |
| `iabc_ref` | out | `abc_t` | phase current commands, pu |
| `te_ref` | out | `fx_t` | torque reference, pu |
| `theta_s`, `theta_r`, `theta_e` | out | `fx_t` | slip, electrical rotor and field angle (monitoring) |
| `theta_idx` | out | 8 | field angle in 1/256 turn |
| `sample` | out | 1 | control-sample strobe |

Parameters: `CLKS_PER_SAMPLE` (3125) and `HYST_DIV` (20). The gains and
limits are parameters of the leaf modules, with defaults from `foc_pkg`.

The inverter, the machine, the encoder and the current/speed converters are
not part of this RTL. Their signals are the ports above.

## Where this RTL makes its own choices

These points were not fixed by the reference design. Each was decided here.

* **Clock and sample rate.** The 400 kHz clock is the stated comparator rate.
  The 3125-clock sample period follows from it and from dt = 2⁻⁷ s.
* **Speed input sampling.** The speed inputs are registered once per sample.
* **Word format.** The 14_7 word is used everywhere, including the speed
  path. The PI sum is widened to 26 bits so that it cannot wrap before the
  limiter.
* **No anti-windup.** The PI integrator has none. After a speed reversal at
  the torque limit the speed overshoots by a few hundredths of a pu and
  recovers slowly (the integral time constant is 35/5 = 7 s). The reference
  design's own simulation shows the same overshoot.
* **Sine table.** The table is combinational (an asynchronous-read ROM).
  For block RAM it would need a register, which adds one clock to the current
  commands.
* **Product rounding.** Products are truncated (rounded toward −∞) back to
  14_7.
* **Integration step.** The integration step is 2⁻⁷ s = 0.0078125 s, the
  value that matches the gain blocks and the "smallest representable time"
  definition. A value ten times smaller, 0.00078 s, also appears in the
  description of the reference design. Using it would make both integrals
  ten times slower.
* **Reset.** Reset is asynchronous and active low. It clears every register
  and gives zero angles and zero integrals.

## Verification

Every module has a self-checking testbench in `tb/tb_<module>.sv`. Each one
compares the module with values computed independently in the testbench,
either integer models of the fixed-point arithmetic or real-valued math with
a tolerance. Each ends with a `TB_RESULT checks=N failures=M` line and has a
watchdog.

Two closed-loop testbenches run the complete controller at its default
parameters. The controller, the plant and all checks live in
`tb/foc_loop_harness.sv`, and the behavioural plant is `tb/foc_plant.sv`. The
plant works like this:

* each phase current ramps up or down at 8/128 pu per 20 clocks, depending on
  its upper switch;
* the torque is the measured q-axis current in the controller's own field
  frame divided by 1.18;
* the inertia constant is H = 0.5 s.

In both runs the speed reference is +0.7 pu for 2 s, then −0.7 pu.

* `tb_foc_controller` runs 4.5 s (1.8 million clocks). The load is
  0 / +1 / 0 / −1 pu over 0–1, 1–2, 2–3.5 and 3.5–4.5 s.
* `tb_foc_load_steps` runs 4 s. The load is 0 / +1 / 0 / −1 pu over
  0–1, 1–2, 2–3 and 3–4 s. The −1 pu load starts at 3 s while the machine
  is still reversing at the torque limit, so speed is checked at 1, 2 and
  4 s only.

Both runs check:

* the speed at the end of the load segments;
* that the phase currents track their commands;
* on every sample, that the commands, transformed back with the controller's
  own angle, equal (1.18·te_ref, 0.9375);
* that the field angle is θs + θr wrapped and its index is θe·40.75;
* that the torque reference stays within ±1.2 pu;
* that there are 128 control samples per second.

They also count that these events each occur at least once:

* clamping at +1.2 pu and at −1.2 pu;
* slip-angle reset;
* electrical-angle wrap;
* field-angle wrap;
* regenerating operation;
* both switch states on every leg.

In the 4.5 s run the measured speeds at 1.0 / 2.0 / 3.5 / 4.5 s are
0.731 / 0.699 / −0.792 / −0.753 pu. After each speed step the speed
overshoots and then settles slowly, because the regulator has no
anti-windup.

To run a testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/foc_pkg.sv tb/tb_foc_controller.sv --top-module tb_foc_controller
./obj_dir/Vtb_foc_controller
```

Replace `tb_foc_controller` with any other testbench name to run that one
instead. The full closed-loop run takes a few seconds.

## Limits

* The plant in `tb/foc_plant.sv` is a behavioural stand-in. It treats the
  three phase currents as independent and the flux as always at its rated
  value. It shows that the controller closes the loop and runs every
  mechanism, not how a real machine would respond.
* Resource use on the target FPGA was not measured. Generic synthesis gives
  264 flip-flop bits, 4 variable 14×14 multipliers plus constant multipliers,
  and a 256 × 9-bit sine table (read at two addresses). This is well within an
  XC3S200 (3840 flip-flops, 12 hardware multipliers). The control pins
  need 92 I/Os out of the device's 173. The monitoring outputs (current
  commands, torque reference, angles, sample strobe) add 107 more, so a
  board build should leave most of them unconnected.
