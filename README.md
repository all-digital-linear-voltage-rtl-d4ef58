# All-digital push-pull linear voltage regulator (0.5 V to 1.0 V)

A linear regulator normally closes its loop with an analog error amplifier
that drives the gate of a large pass transistor. This design replaces every
analog loop element with digital logic. A pair of delay lines acts as the
error amplifier. The pass devices are only ever fully on or fully off. The
loop decision is a 2-bit code that needs no arithmetic: it drives the gate
drivers almost directly. The regulator runs from a 1.1 V supply and delivers
0.5, 0.6, ... 1.0 V at up to 100 mA from an on-chip decoupling capacitor
(4.5 nF by default). An optional second error detector, running half a
period out of step, halves the loop's sampling delay ("time-interleaved
control").

The synthesizable parts are the mode decoder, the driver control logic, the
interleaving switch and the detector flip-flops. The delay cells, the
resistive divider and the output devices with their capacitor are analog.
They are written as behavioural models with `real` voltages, so the whole
regulator can be simulated as a closed loop in plain Verilator.

## How the loop works

```
            +--------------------------- VREG ---------------------------+
            |                                                            |
   level -> mode_indicator --div_sel--> voltage_divider --VCMP-->        |
                  |                                        |             |
                  | grp_en               VREF (0.5 V) --> ded[0..N-1]    |
                  |                                        | Q1/Q2       |
                  |                                 control_switch       |
                  v                                        |             |
              control_logic <------------------------------+             |
                  | MPC/MPDisC per push group, MNC/MNDisC                |
                  v                                                      |
              output_stage: 6 pMOS push groups, nMOS pull, decap --------+
```

1. **Divide.** The divider scales VREG by 5/(5+k) for level k. That gives
   ratios of 1, 5/6, 5/7, 5/8, 5/9 and 1/2, so VCMP is 0.5 V exactly when
   VREG is on target. VREF is always 0.5 V.
2. **Detect.** The digital error detector (DED) compares VCMP with VREF
   once per trigger period (600 ps) and gives one of three codes:

   | VCMP vs VREF        | Q1 | Q2 | push groups      | pull device |
   |---------------------|----|----|------------------|-------------|
   | below (too low)     | 1  | 1  | driven on        | off         |
   | within resolution   | 0  | 1  | gate floats: hold | off        |
   | above (too high)    | 0  | 0  | driven off       | on          |

3. **Drive.** Every output-device gate has two drivers, one pulling up and
   one pulling down. On the push side, MPC pulls the gate of the pMOS up
   (device off) and MPDisC pulls it down (device on). On the pull side, MNC
   pulls the gate of the nMOS up (device on) and MNDisC pulls it down. In the
   middle code both push drivers are off. The gate floats and keeps its
   charge, so the push device stays in whatever state the previous decision
   left it. Because of this, the output settles slightly above the target.
   MPC, MNC and MNDisC follow Q2; MPDisC follows Q1.

There is no integrator and no digital filter. The loop is a bang-bang
controller with three states, and the decoupling capacitor does all the
smoothing. The ripple is set by how far the output moves during one loop
response: one detection period plus the propagation delay to the gates
(0.6 ns + 0.45 ns by default). It shrinks with a larger capacitor or a
faster loop.

## The digital error detector (the part that needs the most care)

`ded` is built from two identical voltage-controlled delay cells (`vcdl`).
The delay of each cell grows with its control voltage, by 2.28 ps per mV.

```
trig --> VCDL(VCMP) -> inv -> inv -> inv -----------------------> D0
trig --> VCDL(VREF) -> inv -+-> inv -> C1 -> inv -> inv -> C2
                            |
          EN -> NAND <------+
                 |
                 +-> inv -> trig (back to both cells)
```

- **Trigger.** The reference line closes a ring oscillator through a NAND
  gate with EN and one inverter. The loop has an odd number of inversions
  and takes 270 + 3 x 10 ps, so the trigger toggles every 300 ps: a 600 ps
  period. EN low stops the oscillator, and the result then stays frozen.
- **Three bands.** D0 sits three inverters after its cell. C1 and C2 sit two
  and four inverters after theirs. With VCMP = VREF, D0 therefore switches
  exactly halfway between C1 and C2, one inverter delay (10 ps) from each.
  VCMP must move about 4.4 mV before the delay difference exceeds one
  inverter, so the detector's resolution is about +/-4.4 mV at VCMP. That
  is +/-8.8 mV at a 1.0 V output, where the ratio is 1/2.
- **Sampling edge.** `phase_comparator` samples D0 on the **falling** edges
  of C1 and C2. These follow a falling trigger edge, which makes D0 rise,
  so a fast comparison line (VCMP low) has D0 already high at both samples
  and gives 1 1. This polarity follows from the inverter counts above. If
  you change the number of inverters on either line, also change the
  sampling edge.
- **Clamps.** The delay cell's delay is clamped to 20 to 520 ps. Without
  the clamp, a VCMP far above VREF (for example right after switching from
  1.0 V to 0.5 V) would push D0 past the next half period. The comparison
  would then wrap round and read "too low", and the output would run away.
- **Code 1 0.** This code cannot occur in normal operation. A flip-flop
  that samples right on an edge can produce it, so `control_logic` treats
  it as "too high". MPDisC is driven by Q1 AND Q2, which means a push gate
  never has both drivers on.

## Output levels and push-device groups

The same pMOS width delivers about four times as much current at 0.5 V
output (0.6 V across it) as at 1.0 V (0.1 V across it). The push devices are
therefore split into six groups that switch in cumulatively: level k enables
groups 1..k+1.

| level | 0.5 V | 0.6 V | 0.7 V | 0.8 V | 0.9 V | 1.0 V |
|-------|-------|-------|-------|-------|-------|-------|
| groups on | 1 | 1-2 | 1-3 | 1-4 | 1-5 | 1-6 |
| divider tap | 1 | 5/6 | 5/7 | 5/8 | 5/9 | 1/2 |

`mode_indicator` makes both decodes from the 3-bit level code
(0 = 0.5 V ... 5 = 1.0 V). Codes 6 and 7 act as 0.5 V. In `output_stage`,
the groups are sized so that the groups active at each level deliver
`I_PUSH_A` (120 mA) at that level's voltage. This is 20 % above the 100 mA
design load, so the output can recover under full load. A disabled group is
held off by its MPC driver.

## Time-interleaved control

With `interleave` high, `N_DED` detectors (default 2) run together. Detector 0
keeps its own oscillator. Detector k is triggered by detector 0's trigger
delayed by k x 600 ps / N_DED. It has no oscillator of its own.
`control_switch` passes on the result of the detector that sampled last.
Detector k is the freshest while its own C2 is low and detector k+1's C2 is
still high. This follows from the 50 % duty cycle of the trigger. As a
result, the output devices get a new decision every 300 ps instead of every
600 ps. With `interleave` low, only detector 0 runs and the switch passes it
through: this is the single control type. Both types drive the same output
devices.

## Timing summary

| quantity | value | where |
|---|---|---|
| trigger period (detection time) | 600 ps | `ded` gate delays + `vcdl` `D_NOM_PS` |
| decision to gate, single | 450 ps | `output_stage.T_D_PS` |
| decision to gate, dual | 580 ps | `output_stage.T_D_LONG_PS`, selected by `long_path` = `interleave` |
| worst loop response, single | about 1.05 ns | 600 + 450 ps |
| worst loop response, dual | about 0.88 ns | 300 + 580 ps |
| integration step | 5 ps | `output_stage.DT_PS` |

## Files

| file | kind | content |
|---|---|---|
| `rtl/dlvr_pkg.sv` | package | level code, `ded_res_t` {q1,q2}, `drv_t` {pc_on,disc_on}, ratio functions |
| `rtl/mode_indicator.sv` | RTL | level to divider select and group enables |
| `rtl/control_logic.sv` | RTL | Q1/Q2 to driver commands |
| `rtl/control_switch.sv` | RTL | interleaving MUX |
| `rtl/phase_comparator.sv` | RTL | the two detector flip-flops |
| `rtl/vcdl.sv` | model | voltage-controlled delay cell |
| `rtl/ded.sv` | model | detector: delay lines, ring oscillator, flip-flops |
| `rtl/voltage_divider.sv` | model | switched resistive divider |
| `rtl/output_stage.sv` | model | drivers with gate hold, push groups, pull device, decap |
| `rtl/dlvr_top.sv` | model (top) | the complete regulator |
| `tb/tb_*.sv` | testbenches | one per block, the end-to-end test, a capacitor sweep and a line-regulation test |

The top's parameters:

| parameter | default | meaning |
|---|---|---|
| `N_DED` | 2 | detectors used with `interleave` high (3 gives a decision every 200 ps) |
| `T_TRIG_PS` | 600 | trigger period, used to space the interleaved triggers |
| `C_DECAP_F` | 4.5e-9 | decoupling capacitor (F) |
| `I_PUSH_A` | 0.12 | push current that the active groups deliver at each level (A) |
| `VDD_RUN` | 1.1 | supply applied to the output devices (V); devices stay sized for 1.1 V |

The delays and device constants live in `ded`, `vcdl` and `output_stage`.
`T_TRIG_PS` must match the ring period that those delays produce.

The top's analog ports are `real`: `vref` and `vreg` are in volts, and
`i_load` is in amperes. Everything uses `timescale 1ps/1fs`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Examples:

```
verilator --binary --timing --assert rtl/dlvr_pkg.sv rtl/*.sv tb/tb_dlvr_top.sv \
          --top-module tb_dlvr_top -Wno-fatal && ./obj_dir/Vtb_dlvr_top
verilator --binary --timing --assert rtl/dlvr_pkg.sv rtl/*.sv tb/tb_dlvr_decap_sweep.sv \
          --top-module tb_dlvr_decap_sweep -Wno-fatal && ./obj_dir/Vtb_dlvr_decap_sweep
```

A unit testbench only needs the package and its own module(s). `tb_ded`,
for example, needs `dlvr_pkg`, `vcdl`, `phase_comparator` and `ded`.

- `tb_dlvr_top` runs the top at its default parameters. It steps through all
  six levels, first with single and then with dual control. At each level it
  waits with no load, then applies a 100 mA load step. It checks the mean
  output (within 25 mV), the ripple band, the group enables and the rate at
  which the switch alternates. In dual mode it checks that the control logic
  always sees the selected detector's result. It checks that the interleaved
  worst undershoot, summed over the levels, is within 15 % of the single
  type's, and that every mechanism (push, hold, pull, a held-on
  gate, mode switch, detector switch, load step) occurred. It takes about 3 µs
  of simulated time and well under a second of wall time.
- `tb_dlvr_decap_sweep` runs four regulators side by side: 1.5, 3 and 4.5 nF
  with two detectors, and 3 nF with three. It prints the full-load undershoot
  per level. In this model, the undershoot at 4.5 nF is about 44-55 mV with
  either control type. The checks cover the trends: a larger capacitor gives
  less undershoot, interleaving stays within 15 % of single control, and
  three detectors are no worse than two.

- `tb_dlvr_line` checks line regulation. It runs regulators whose output
  devices see 1.1 V, 0.99 V and 1.21 V (parameter `VDD_RUN` on the top; the
  devices stay sized for 1.1 V). The mean output must stay within 25 mV of
  the target and within 20 mV of the nominal-supply mean. At 1.21 V every
  level runs at 100 mA. At 0.99 V the push devices cannot source 100 mA,
  because their 20 % margin is lost to the reduced headroom. That case is
  therefore run at 50 mA on the 0.5 to 0.8 V levels. In the model the mean
  moves by less than 5 mV.

**Known difference from the source figures.** The reported measurements show
interleaving cutting the undershoot by roughly a third. This model does not
reproduce that gain. Interleaving halves the sampling delay (average 300 ps
down to 150 ps), but the extra 130 ps of switch delay cancels most of it, so
the average loop delay barely changes (750 ps vs 730 ps). The ripple of a
bang-bang loop follows the average delay more than the worst one. With
`T_D_LONG_PS` set equal to `T_D_PS` (450 ps), the model shows interleaving
lowering the undershoot by about 15 %. The remaining gap is probably due to
effects this first-order model leaves out.

## How far to trust it

The following come from the regulator's description: the loop structure, the
detector's gate-level structure and three-band code, the driver truth table,
the hold behaviour, the divider ratios and switch order, the cumulative group
enables, the 600 ps detection period, the 450 ps and 0.58 ns propagation
delays of the two control types, the 1.1 V supply, the device current equations and the interleaved triggering.

The following are this design's own choices:

- The level encoding and the handling of unused codes.
- The `en` input on the control logic, and the reset value of the flip-flops
  (0 1, hold).
- The falling-edge sampling, derived above.
- The select rule of the interleaving switch.
- The treatment of the invalid code 1 0.
- The delay-cell law: linear with clamps, a 270 ps nominal delay and a
  narrow-pulse filter. The 2.28 ps/mV slope is matched to a reported delay
  difference of 11.4 ps at 5 mV.
- Threshold voltages of 0.35 V, chosen so the current ratio between 0.5 V
  and 1.0 V is about 4x.
- The 20 % push margin.
- The pull-device size.
- Modelling the dual type's extra delay as a fixed longer transport delay in
  the output stage, instead of as delay inside the switch.

The analog models are first-order. The delay cell samples its control voltage
at the input edge instead of averaging it over the transit. Devices switch
instantly after `T_D_PS`. The divider is ideal and draws no current. Quiescent
current, process and temperature variation, the supply dependence of the
detector and metastability are not modelled. The absolute
ripple numbers are therefore indicative only. The digital blocks are exact,
and their decisions do not depend on the model values.

The synthesizable blocks (`mode_indicator`, `control_logic`,
`control_switch`, `phase_comparator`) have no clock of their own. The
detector's C1/C2 nodes clock the flip-flops, and the rest is combinational.
In a real implementation the fan-out buffer trees between `control_logic` and
the drivers must be sized for the gate load of each group. That sizing is a
physical-design task and is not expressed in RTL.
