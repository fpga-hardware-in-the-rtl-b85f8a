# Direct torque control of an induction machine, in SystemVerilog

Direct torque control (DTC) drives an induction machine without current
loops or a PWM modulator. Every sample the controller estimates the stator
flux vector and the electromagnetic torque, compares flux magnitude and
torque with their references, finds which 60-degree sector of the plane the
flux points into, and picks one of the eight states of a two-level inverter
from a fixed table (the Takahashi switching table). A PI regulator on the
speed error produces the torque reference.

This RTL is the complete controller side of that loop: estimation,
switching decision and speed regulation. It is written as a single-rate
dataflow, one Euler step of 1.001e-5 s per enabled clock, so that it can
sit in a hardware-in-the-loop setup where a simulated inverter and machine
answer each sample with new currents and a new speed. The inverter and the
machine themselves are not logic; a real-valued model of both is provided
for the testbenches (`tb/im_plant.sv`).

```
            isa, isb ─────────────┐
                                  ▼
         ┌──────────────────── dtc_estimation ─────────────────────┐
{Sa,Sb,Sc}──► alpha_beta_calc ─► flux_estimator ─┬─► torque_estimator ──► torque
  ▲      │   (Vs, Is in αβ)      (Euler, z^-1)   └─► cordic ─► ×0.6073 ──► flux_mag
  │      │                                             └──────────────────► flux_angle
  │      └──────────────────────────────────────────────────────────┘
  │      ┌──────────────────── dtc_switching ─────────────────────┐
  └──────┤ switching_table ◄── sector_select ◄── flux_angle         │
         │        ▲   ▲  ◄──── flux_comparator ◄── flux_ref, flux_mag│
         │        │   └─────── torque_comparator ◄── torque_ref, torque
         └────────┴───────────────────────────────────────────────┘
   w_ref, w ─► speed_pi ─► torque_ref
```

The switching state chosen by `dtc_switching` goes out to the inverter and
is also the state the estimator integrates, so the voltage is never
measured: it is reconstructed from the DC link (fixed in the gains) and the
leg commands.

## Number formats

All signals between blocks are signed fixed point, 32 bits with 20
fraction bits (Q11.20), in SI units: volts, amps, webers, newton-metres,
rad/s, radians. That gives a range of ±2048 with steps near 1e-6, enough for
the 1.001e-5 s integration steps (a flux step is a few milliwebers).
Constant gains are 48-bit numbers with 32 fraction bits, applied by
`dtc_pkg::kmul`, which rounds to the nearest datapath step; rounding
instead of truncating keeps the three integrators from drifting.

The CORDIC has 16-bit ports with 12 fraction bits (±8, for both flux in
webers and angle in radians). The flux is rounded and saturated on the way
in, and angle and magnitude are widened on the way out, so their 8 lowest
datapath bits are always zero.

All formats are set in `rtl/dtc_pkg.sv`. The gain values in the package are
the design's own; the word widths are this implementation's choice.

## Estimation

**αβ transform** (`alpha_beta_calc`, combinational). The power-invariant
Clarke transform. For the voltage, each leg command selects a constant:

    Vα = 420.2·Sa − 210.1·Sb − 210.1·Sc        Vβ = 363.9·(Sb − Sc)

which is that transform of a 514.6 V DC link. For the current, with
ia + ib + ic = 0:

    Iα = 1.225·ia        Iβ = 0.7071·ia + 1.414·ib

**Flux** (`flux_estimator`). One accumulator per axis:
φ[n+1] = φ[n] + Ts·(V − Rs·I), with Ts = 1.001e-5 s and Rs = 10 Ω. The flux
outputs are the accumulator registers, so a new voltage shows up one
sample later. This open-loop integrator is exact only as long as Rs
matches the machine. Nothing removes offset drift, and the design adds
nothing to do so.

**Torque** (`torque_estimator`). Cem = 2·(φα·iβ − φβ·iα). The factor 2 is
the pole-pair number in the power-invariant frame. The two multipliers are
three samples deep, so the torque is the torque of the flux and current
three samples ago.

**Magnitude and angle** (`cordic`, then ×0.6073). This is CORDIC in
vectoring mode. A pre-rotation by ±90° brings vectors in the left
half-plane to the right half-plane. Then come ten shift-and-add
micro-rotations, each one turning the vector towards the x axis by
atan(2^-i) while the angle register adds up the turns. The result is
atan2(φβ, φα) in (−π, π]. The magnitude comes out multiplied by the CORDIC
gain 1.6468, and the factor 0.6073 after the block removes it. The CORDIC is
fully unrolled: one result per sample and 11 samples of latency. That delay
is negligible against the flux rotation: 11 samples at 50 Hz electrical is
under 2°.

## Switching decision

**Flux comparator.** Outputs 1 ("raise the flux") when the reference exceeds
the estimate, else 0. As drawn, it has no hysteresis band.

**Torque comparator.** Three levels, coded for the table as
2 = raise (+1), 1 = hold (0) and 0 = lower (−1). The error is compared with
+BAND and −BAND. BAND is a parameter (`TQ_BAND` on the top) that defaults
to 0, as drawn. With a band of 0 the hold code only occurs when the error
is exactly zero, so the controller in practice never applies a zero vector.
A band of a fraction of a newton-metre brings the zero vectors into use.

**Sector** (`sector_select`). 6.28125 is added to a negative angle; this is
2π as the design's constant has it. The result is multiplied by
0.9549 (6/2π), 1 is added, and the integer part is the sector. Sector 1 is
[0°, 60°), sector 2 is [60°, 120°), and so on. Because 6.28125 is slightly
less than 2π, the boundaries of the negative half-plane sit up to about
2 mrad early.

**Switching table** (`switching_table`). With the voltage vectors numbered
V1..V6 = 100, 110, 010, 011, 001, 101 ({Sa,Sb,Sc}, Sa the MSB), the table
applies these vectors in sector N:

| flux | torque | vector |
|---|---|---|
| raise | raise | V(N+1) |
| lower | raise | V(N+2) |
| raise | lower | V(N−1) |
| lower | lower | V(N−2) |
| either | hold | 111 or 000 |

For torque hold, the table uses 111 when "N odd" and "raise flux" agree,
and 000 otherwise. An invalid sector or torque code gives 000.

### Note on the sector layout

The table above is the classic Takahashi table, written for sectors
*centred* on V1..V6 (sector 1 = −30°..30°). The sector block of this design
starts sector 1 at 0°, so the two are 30° apart. Both are built as drawn.
In closed loop this works, but with two consequences you can see in the
testbench:

- Near the end of each sector the "lower the flux" vector is almost
  perpendicular to the flux. As a result the flux magnitude rides 5–15 %
  above its reference: about 1.25–1.35 Wb for a 1.2 Wb reference.
- A large braking demand (a big step down of the speed reference) can pull
  the flux down to a fraction of its reference, and the machine then coasts
  instead of braking.

Shifting the angle by +30° before `sector_select` (or changing its offset
constant) would give the textbook alignment. It is left out here because
the design does not do it.

## Speed regulator

`speed_pi` computes Te_ref = Kp·e + Ki·∫e dt with e = ω_ref − ω, Kp = 1 and
Ki = 8. The integral is an Euler accumulator with the same 1.001e-5 s step.
There is no output limit and no anti-windup. During the start-up the
machine can deliver only about 15 N·m while the regulator asks for over
100 N·m. The integral winds up, and the speed overshoots to about 150 rad/s
for a 100 rad/s reference before settling, about 0.7 s after the start.

## Top-level interface (`dtc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock; synchronous active-high reset (clears all state) |
| ce | in | 1 | sample strobe: each enabled cycle is one 1.001e-5 s step; tie high for one sample per clock |
| isa, isb | in | Q11.20 | measured phase currents a and b, A |
| w | in | Q11.20 | measured rotor speed, rad/s |
| w_ref | in | Q11.20 | speed reference, rad/s |
| flux_ref | in | Q11.20 | stator flux reference, Wb |
| sw | out | 3 | inverter leg commands {Sa, Sb, Sc} (struct `sw_state_t`) |
| qsd, qsq, flux_mag, flux_angle, torque, torque_ref | out | Q11.20 | estimates and torque reference, for observation |
| sector, cflux, ctq | out | 3, 1, 2 | internal decisions, for observation |

Parameter `TQ_BAND` (Q11.20, default 0) sets the torque comparator band.

Timing: `sw` is combinational in `w`, `w_ref`, `flux_ref` and the
registered state, so it is valid in the same cycle as the inputs. The
currents act on the flux at the next enabled edge. The longest
combinational path runs from the speed inputs through the PI, the torque
comparator and the table to `sw`, and on through the αβ voltage into the
flux accumulators. It has not been timed for any device.

## Verification

Each block has a self-checking testbench in `tb/` that compares the block
with an independent real-valued model and checks latencies: 1 sample for
the flux, 3 for the torque, 11 for the CORDIC. The switching table is checked
exhaustively against the vector rule above rather than against a copy of
the table.

`tb_dtc_top` closes the loop with `im_plant`: a two-level inverter on a
514.6 V link and an induction machine with Rs = 10 Ω, Rr = 6.3 Ω,
Ls = 0.4642 H, Lr = 0.4612 H, Lm = 0.4212 H, J = 0.02 kg·m² and 2 pole pairs.
The profile runs 1.1 s:

- start from rest towards 100 rad/s at 1.2 Wb;
- a 5 N·m load at 0.8 s;
- a step down to 90 rad/s at 1.0 s.

It checks the following:

- The estimated flux matches the machine's flux within 0.03 Wb.
- The flux magnitude stays within 1.05–1.45 Wb.
- The speed settles within 2 rad/s of the reference, with and without load.
- The torque carries the load.
- Every sector, both flux decisions, all three torque decisions, both zero
  vectors and the active vectors occur.

It runs with `TQ_BAND` = 0.5 N·m. `tb_dtc_top_full` runs the same profile
with every parameter at its default, where the zero vectors do not occur.

`tb_dtc_workload_speed_profile` runs a 2 s profile at the default
parameters, which is 199,800 samples:

- start from rest towards 130 rad/s;
- an 8 N·m load from 0.5 s;
- the reference drops to 100 rad/s at 1.0 s and to 70 rad/s at 1.4 s.

Near 150 rad/s the machine runs out of voltage at 1.2 Wb on a 514.6 V link.
There the machine torque falls to zero while the wound-up integral still
asks for more, so the speed overshoots to about 154 rad/s. It comes back to
about 132 rad/s once the load is applied. The run ends within 0.1 rad/s of
70 rad/s, with the machine torque carrying the load.

Run any testbench with plain Verilator from the repository root, for
example:

    verilator --binary --timing --assert -Wno-fatal rtl/dtc_pkg.sv -y rtl -y tb \
        tb/tb_dtc_top.sv --top-module tb_dtc_top -Mdir obj_tb -o sim
    ./obj_tb/sim

Each prints `TB_RESULT checks=N failures=M`. The closed-loop run takes well
under a second, and it prints the speed, torque and flux every 0.1 s.

## Where this departs from, or adds to, the design

- **Numbers.** Word widths, fraction positions and rounding are this
  implementation's own. The design gives only its gains and the 16-bit
  CORDIC ports.
- **Sample strobe and reset.** The `ce` sample strobe and the synchronous
  reset that clears all state are additions.
- **CORDIC.** The CORDIC architecture (unrolled pipeline, quadrant
  pre-rotation, 4 guard bits) is a choice. The design fixes only its
  equations, 10 iterations and the ports.
- **Torque comparator.** The drawing shows two comparators against 0
  feeding a 3-way multiplexer. They are read as "e > BAND" and "e ≥ −BAND".
  Taken literally, two identical comparators against zero could not produce
  the middle code.
- **Switching gains.** The gains on the 1-bit switching signals are
  constant selects rather than multipliers, which gives the same result.
- **Not included.** The point-to-point Ethernet co-simulation link that
  connects the controller to the simulation host is vendor-generated and is
  not part of this RTL. The inverter and the machine exist only as the
  testbench model.
