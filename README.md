# Multi-level waveform generator for a 5-level class D stage

A conventional class D H-bridge switches the load between +VDD, 0 and
-VDD. That square-edged waveform carries strong harmonics, and only the
load's own filtering removes them. Adding a mid supply Vx = VDD/2 and two
more switches gives a bridge with five load levels: -VDD, -VDD/2, 0,
+VDD/2 and +VDD. With these levels every transition becomes a staircase
that is closer to a sine.

The hard part is driving the six switches. This design makes all six drives
from the same PWM pair (A, B) that would drive a 3-level bridge. It uses
only two edge detectors, eight flip-flops and a few gates. A 4-bit code sets
the length of each intermediate VDD/2 step, so the step can be tuned to the
PWM frequency.

The RTL is asynchronous, like the circuit it describes. It has no clock. The
flip-flops are clocked by edge pulses derived from A and B. The only analog
element is the code-controlled RC delay, which appears as a behavioural
model.

## The 5-level bridge

```
              VDD                         VDD
               |                           |
              A1                          B1
               |                           |
   Vx --- C ---+---- left [ LOAD ] right --+--- D --- Vx
               |                           |
              B2                          A2
               |                           |
              GND                         GND
```

The load voltage is left minus right. The drive patterns are:

| load level | switches on | meaning |
|---|---|---|
| +VDD   | A1, A2 | left at VDD, right at GND |
| +VDD/2 | C, A2  | left at Vx, right at GND |
| 0      | C, D   | both terminals at Vx |
| -VDD/2 | B2, D  | left at GND, right at Vx |
| -VDD   | B1, B2 | left at GND, right at VDD |

No leg may ever have two switches on, because that would short two
supplies. `hbridge_5level` reports the load level in VDD/2 steps. It also
flags a floating terminal and any shoot-through.

## What the generator does to each PWM edge

The inputs A and B are non-overlapping: A is high, then there is a dead
time, then B is high, then another dead time. Let W be the delay set by the
code. The generator turns each PWM edge into a half step that lasts W:

| event | load level for the first W | then |
|---|---|---|
| A rises  | +VDD/2 | +VDD |
| A falls  | +VDD/2 | 0 (for the rest of the dead time) |
| B rises  | -VDD/2 | -VDD |
| B falls  | -VDD/2 | 0 |

So one period gives the staircase 0, +1/2, +1, +1/2, 0, -1/2, -1, -1/2, 0
(in units of VDD). If a dead time is exactly W, the zero level disappears
and the load steps straight from +VDD/2 to -VDD/2. The published
measurements used that operating point.

The outputs A and B are also brought out unchanged, so the same part can
drive a conventional 3-level bridge.

## Edge detector and delay cell

`edge_detector` compares its input with a delayed and inverted copy of
itself:

- `vout_pe = vin AND vdelay` is high for W after a rising edge.
- `vout_ne = NOR(vin, vdelay)` is high for W after a falling edge.

Two detectors, one on A and one on B, share the code. Together they produce
A_PE, A_NE, B_PE and B_NE.

The delay cell is an inverter, then four equal series resistors, each
followed by a capacitor that CTRL[k] switches in, then a second inverter.
`rc_delay_cell` models it with an Elmore delay of equal stages. The
capacitor at node k charges through k resistors, so:

    W = T_FIXED + T_STAGE * (1*CTRL[1] + 2*CTRL[2] + 3*CTRL[3] + 4*CTRL[4])

The defaults are T_FIXED = 30 ns and T_STAGE = 45 ns. Code 1111 therefore
gives 480 ns, the largest step length reported for the fabricated part.
The 30 ns minimum is an assumed value.

| ctrl[4:1] | units | W (ns) |   | ctrl[4:1] | units | W (ns) |
|---|---|---|---|---|---|---|
| 0000 | 0 | 30  | | 1000 | 4  | 210 |
| 0001 | 1 | 75  | | 1001 | 5  | 255 |
| 0010 | 2 | 120 | | 1010 | 6  | 300 |
| 0011 | 3 | 165 | | 1011 | 7  | 345 |
| 0100 | 3 | 165 | | 1100 | 7  | 345 |
| 0101 | 4 | 210 | | 1101 | 8  | 390 |
| 0110 | 5 | 255 | | 1110 | 9  | 435 |
| 0111 | 6 | 300 | | 1111 | 10 | 480 |

Because the stages are equal, the 16 codes give only 11 distinct delays.
0000 is still the shortest and 1111 the longest. If the real cell uses
binary-weighted capacitors instead, so that all 16 codes give distinct
steps, change `ladder_weight()` in `mlwg_pkg`.

The model's delay is inertial: an input pulse shorter than W never reaches
the output. It only represents timing. Its code is sampled at each input
edge.

## C and D: pairs of toggling flip-flops

This is the least obvious part of the design. The mid-supply drives must
cover two different kinds of interval:

- C: from A falling to B rising (the dead time after A), and from
  B falling + W to A rising + W.
- D: from A falling + W to B rising + W, and from B falling to A rising
  (the dead time after B).

`cd_generator` builds each output from four `toggle_dff`s. Each is a D
flip-flop whose D input comes from its own Q-bar, so it changes state on
every clock edge. Each flip-flop is clocked by one edge pulse, in one of
two ways:

- directly, so it toggles when the pulse starts, which is at the PWM edge;
- through an inverter, so it toggles when the pulse ends, W after the PWM
  edge.

The XOR of two toggles that alternate is high from the first one's event
to the second one's event. Each output ORs two such XORs, built as a NOR
followed by an inverter:

    C = (T[A_NE start] ^ T[B_PE start]) | (T[B_NE end]   ^ T[A_PE end])
    D = (T[A_NE end]   ^ T[B_PE end])   | (T[B_NE start] ^ T[A_PE start])

Because the pairs count edges rather than look at levels, they must start
in step. `en` low clears all eight flip-flops. Raise `en` while A or B has
been steady for longer than W. If the pairs start out of step, C and D
stay inverted until the next clear.

## Output gates

`pulse_modulator` makes the main drives:

    A1 = NOR(NOT A, C)               = A and not C
    A2 = NAND(NAND(NOT D, C), NOT A) = A or (C and not D)
    B1 = NOR(NOT B, D)               = B and not D
    B2 = NAND(NAND(NOT C, D), NOT B) = B or (D and not C)

A1 and B1 are the VDD switches. They turn off with A and B but turn on only
after C or D ends. A2 and B2 are the GND switches. They turn on with A and
B but stay on while C (for A2) or D (for B2) holds the other terminal at
Vx. Each drive therefore keeps one edge of its PWM signal and takes the
other edge from C or D.

## Operating rules

These follow from the circuit. Nothing in the hardware enforces them.
In simulation, assertions in `waveform_generator` flag overlapping inputs
and pulses shorter than W.

1. A and B must never be high together.
2. Every A pulse, every B pulse and every dead time must last at least W.
   A shorter pulse is absorbed by the delay cell. Its edge pulses then go
   missing, the toggle pairs fall out of step, and the drives are wrong
   until `en` is cycled. At 200 kHz and code 1111 this leaves
   2.5 us - 2 x 0.48 us of full-VDD time per half period.
3. Change `ctrl` only when no edge pulse is active, that is, at least W
   after the last PWM edge.
4. The flip-flops have an asynchronous clear. In simulation, the clear
   needs a falling edge on `en`. Start with `en` high and drop it, or
   otherwise make sure `en` goes from 1 to 0 before use.

## Modules

| file | what it is |
|---|---|
| `mlwg_pkg.sv` | `edge_pulses_t`, `drive_t`, `CTRL_BITS`, `ladder_weight()` |
| `rc_delay_cell.sv` | behavioural model of the RC delay; parameters `T_FIXED_PS`, `T_STAGE_PS` |
| `edge_detector.sv` | delay cell, inverter, AND and NOR |
| `toggle_dff.sv` | D flip-flop with D = Q-bar and clear on `en` low |
| `cd_generator.sv` | eight toggles making C and D |
| `pulse_modulator.sv` | output gates making A1, A2, B1, B2 |
| `waveform_generator.sv` | the generator: 2 detectors, `cd_generator`, `pulse_modulator`; outputs `drv`, `a_o`, `b_o` |
| `hbridge_5level.sv` | behavioural model of the 6-switch bridge; parameter `VDD_MV` (default 5000) |
| `class_d_system.sv` | top: generator driving the bridge model |

The top's ports are:

- inputs: `a`, `b`, `en`, `ctrl[4:1]`;
- outputs: `drv` (a1, a2, b1, b2, c, d), `a_o`, `b_o`, `level` (signed,
  in VDD/2 steps), `v_load_mv`, `driven` and `shoot_through`.

The PWM modulator that would produce A and B is not included. The
testbenches generate A and B directly.

All files use `timescale 1ns/1ps`, except `rc_delay_cell`, which counts in
picoseconds. `cd_generator`, `toggle_dff` and `pulse_modulator` are plain
synthesizable logic. `edge_detector` and everything above it contain the
behavioural delay model. For a real implementation, replace that model
with the analog cell or a delay line.

## Simulation

Each testbench checks itself and ends with a `TB_RESULT checks=N
failures=M` line. To build and run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mlwg_pkg.sv tb/tb_class_d_system.sv --top-module tb_class_d_system
./obj_dir/Vtb_class_d_system
```

Verilator warns `ZERODLY` about the variable delay. The warning is
harmless; add `-Wno-fatal` if your setup treats warnings as errors.

| testbench | what it checks |
|---|---|
| `tb_rc_delay_cell` | delay of all 16 codes (30 to 480 ns); a short pulse is absorbed, a long one passes whole |
| `tb_edge_detector` | PE and NE windows sampled every ns for all 16 codes, and pulse lengths |
| `tb_cd_generator` | C and D against the interval rules, with randomised widths, dead times and W; the clear |
| `tb_pulse_modulator` | all 16 input combinations |
| `tb_hbridge_5level` | all 64 switch patterns: level, floating and shoot-through |
| `tb_waveform_generator` | all six drives against a reference built from edge times, for codes 0, 5, 10 and 15, with dead times equal to and longer than W; C and D pulse lengths |
| `tb_class_d_system` | see below |
| `tb_operating_range` | the same checks at 1 kHz and at 230 kHz (codes 0000 and 1111), the ends of the reported operating range |

`tb_class_d_system` runs the whole design at its default parameters. It
uses the measured operating points: PWM at 100 kHz and 200 kHz, codes 0000
and 1111, with the dead time equal to W. It then runs a 200 kHz
sine-modulated sequence with longer dead times, changing the code on the
fly. Every ns it checks:

- the load level against the staircase rule;
- that no leg shorts two supplies;
- that both terminals are driven;
- that every VDD/2 step lasts W.

It also counts each of the five levels, steps at both extreme codes, code
changes and clears, and fails if any of them never occurs.

## How far to trust it

The following come from the published circuit:

- the edge-detector structure (delay cell, inverter, AND, NOR);
- the use of D flip-flops clocked by the four edge pulses, two of them
  through inverters, feeding XOR/NOR/inverter trees;
- the output gate network;
- the bridge's switch arrangement;
- the 4-bit code and the 480 ns maximum step.

The following are this design's own reading or choice:

- **Flip-flop wiring.** The flip-flops are wired as toggles (D from
  Q-bar). This reproduces the stated definition of C (from A falling to B
  rising) and the intended 5-level staircase. The original drawing does not
  spell out every pin connection, so this wiring is an interpretation.
- **Delay law.** The delay follows the Elmore law of equal stages, with an
  assumed 30 ns minimum. The published text also speaks of 16 distinct
  steps, which equal stages cannot give (see above).
- **Enable.** `en` is active high and clears the flip-flops. The original
  has an enable input, but its effect is not specified.
- **Timing.** The gates switch with zero delay. The only delay is W.
- **Bridge output.** The bridge model gives ideal levels only, with no
  load, no filtering and no spectrum. The harmonic figures quoted for the
  5-level stage cannot be reproduced with it.
