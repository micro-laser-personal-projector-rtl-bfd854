# Laser personal projector: main driver RTL

A pocket projector can skip the two scanning mirrors of a classic laser
display if it uses a **row of lasers** in place of a single beam. Here 50 red
VCSELs (two dice of 25) form one horizontal row. A six-facet mirror prism on
a small brushless motor sweeps the row down the screen, one row position per
video scan line. Nothing scans horizontally, and each laser only has to be
bright enough for its own column.

This RTL is the digital core that sits between a VGA source and the lasers.
It takes the red component of the video, already digitised by an external
8-bit ADC clocked at 50 MHz, together with H-sync and V-sync. It produces:

* 50 laser drive lines, where brightness is the length of each laser pulse;
* a 2-bit staircase code that an external resistor-ladder DAC turns into the
  drive for a piezo lens shifter;
* a 50 %-duty signal that locks the mirror motor to the frame rate.

Three ideas carry the design:

1. **Four pixels per laser.** A line is sampled as 200 pixels and shown in
   four phases T1..T4. In phase *p* (0..3), laser *i* shows pixel
   4*i*+*p*+1. A piezo actuator is meant to move the lens by one laser
   spot between phases, which turns 50 lasers into 200 columns. That
   actuator is mechanical and not part of this RTL. Without it, the four
   phases fall on the same spot.
2. **Brightness as on-time.** Only the two most significant ADC bits are
   used, which gives four levels. Each level becomes a pulse length inside the
   laser's 317-clock phase slot.
3. **Everything is timed from one counter.** `hcnt` counts 50 MHz clocks
   from the rise of H-sync. Every sample, buffer load and trigger happens at
   a fixed `hcnt` value, so the design needs no handshakes at all.

## Brightness coding

| ADC D7 D6 | level  | laser on (clocks at 50 MHz) |
|-----------|--------|-----------------------------|
| 11        | high   | 314 (6.28 us)               |
| 10        | medium | 157 (3.14 us)               |
| 01        | low    | 79 (1.58 us)                |
| 00        | off    | 0                           |

`mlpp_pkg::bright_e` names these codes, and `mlpp_pkg::on_clocks()` maps
them to the on-times.

## The line schedule

Once you know these `hcnt` values you know the design. Each value is the
line counter's reading during the clock in question. A pixel lasts two
clocks, and pixel *k* (1..200) is present while `hcnt` is 100+2(*k*-1) or
101+2(*k*-1).

| event                         | phase 0 (T1) | phase 1 (T2) | phase 2 (T3) | phase 3 (T4) |
|-------------------------------|--------------|--------------|--------------|--------------|
| lane *i* samples red at       | 100+8*i*     | 102+8*i*     | 104+8*i*     | 106+8*i*     |
| last sample (lane 49)         | 492          | 494          | 496          | 498          |
| buffer enable `be` high       | 492-493      | 494-495      | 496-497      | 498-499      |
| trigger `sme` high            | 98-99        | 415-416      | 732-733      | 1049-1050    |
| lasers lit (high level)       | 99-412       | 416-729      | 733-1046     | 1050-1363    |
| line shown                    | previous     | previous     | current      | current      |

The triggers are 317 clocks apart: the 314-clock longest pulse plus a few
clocks of margin. T1 and T2 fire before their phase's buffer is refilled, so
they show the line before. T3 and T4 fire after the refill, so they show the
line being received. The picture is therefore at most one scan line behind
the source. On the first line after reset, T1 and T2 show the cleared
buffers, which means all lasers are off.

`hcnt` is held at 0 while H-sync is low and rolls over to 0 after 1400.
This gives two limits on the input timing:

* H-sync must stay high for at least 1049 clocks, so that `hcnt` reaches
  1049, the first clock of T4. The laser pulses themselves run on after
  H-sync falls.
* H-sync must fall within 1498 clocks, or the counter wraps and fires T1
  again.

The line period must also be at least 1265 clocks, so that T4's longest
pulse (lit through `hcnt` 1363) ends before the next line's T1 pulse starts.
On a shorter line, the next trigger cuts that pulse short. A 32 kHz line is
1562 clocks and fits. `tb_mlpp_sync_window` checks the picture at these
limits.

Only 400 clocks of each line (8 us) are sampled. This matches 200 pixels at
40 ns each. A 640-pixel VGA line therefore contributes its 200 pixels that
start 2 us after H-sync rises, and the rest of the line is not shown.

## Structure

```
mlpp_top
├── data_selector          line counter + four phase samplers
│   ├── line_counter       hcnt
│   └── phase_sampler x4   50 lanes of 2-bit codes, be, sme (T1..T4)
├── pixel_buffer x4        holds one phase's 50 codes from be to be
├── tristate_stage x4      puts a buffer on the laser bus while its sme is high
├── laser_actuator         shared actuator counter
│   └── laser_fsm x50      off/low/medium/high state machine per laser
├── piezo_memory           last trigger -> 2-bit staircase code
└── motor_sync_divider     V-sync (96 % duty) -> 50 % duty motor signal
```

All files are in `rtl/`, one module or package per file. `mlpp_pkg.sv` holds
the shared constants and must be compiled first.

* **phase_sampler** compares `hcnt` with its 50 sample times and registers
  the red code of the matching lane. The same unit decodes `be` and `sme`
  combinationally from `hcnt`.
* **pixel_buffer** is loaded while `be` is high, on both clocks. The copy
  made on the second clock includes the last lane, which is sampled on the
  first.
* **tristate_stage** and the bus: four buffers share the path to the
  lasers. Each stage outputs its codes while its trigger is high and zeros
  otherwise, and `mlpp_top` ORs the four together. An assertion in
  `mlpp_top` checks that no two stages drive the bus at once.
* **laser_actuator / laser_fsm**: on the first clock of any trigger, the
  shared counter `acnt` restarts at 0 and every state machine loads its code.
  A lit state returns to off once `acnt` reaches its on-time minus one, so
  the laser is on for exactly 314, 157 or 79 clocks, starting the clock after
  the trigger starts. Codes on the bus during the second trigger clock are
  ignored.
* **piezo_memory** stores which trigger came last. It outputs that trigger as
  a one-hot `piezo_phase` and as a binary `piezo_step` (0 after T1 up to 3
  after T4). Through a 2-bit ladder DAC, `piezo_step` gives a four-step
  staircase that repeats every line.
* **motor_sync_divider** counts clocks between rising edges of V-sync. It
  keeps the last full count as the period and holds `motor_ctrl` high for
  the first half of every frame. The output stays low until one full frame
  has been measured. The 21-bit counter holds a 60 Hz frame (833,333 clocks).

## Top-level interface (`mlpp_top`)

| port          | dir | width | meaning                                          |
|---------------|-----|-------|--------------------------------------------------|
| `clk`         | in  | 1     | 50 MHz, the same clock as the ADC                |
| `rst_n`       | in  | 1     | asynchronous reset, active low                   |
| `hsync`       | in  | 1     | H-sync, high during the line                     |
| `vsync`       | in  | 1     | V-sync, high about 96 % of the frame             |
| `red`         | in  | 2     | ADC bits D7 (bit 1) and D6 (bit 0)               |
| `laser`       | out | 50    | laser drive, bit *i* = laser *i*                 |
| `piezo_step`  | out | 2     | staircase code for the ladder DAC                |
| `piezo_phase` | out | 4     | the same, one-hot                                |
| `motor_ctrl`  | out | 1     | 50 % duty frame-locked motor signal              |
| `sme`         | out | 4     | triggers T1..T4                                  |
| `hcnt`        | out | 11    | line counter, for observation                    |
| `hsync_out`, `vsync_out`, `red_out` | out | 1,1,2 | inputs passed through to the board |

All inputs are assumed to be synchronous to `clk`. There are no input
synchronisers. The only top-level parameter is `N_LASERS` (default 50). The
timing constants are in `mlpp_pkg` and in the parameters of
`phase_sampler`, `laser_fsm` and `laser_actuator`.

## Where this RTL departs from the original prototype, and what it leaves out

* The prototype's buffers were level-sensitive latches, and its bus used
  real three-state outputs. Here they are clock-enabled registers and an
  AND-OR bus with an ownership assertion.
* The prototype gave each of its four phase drivers its own identical line
  counter. Here a single counter is shared.
* The prototype's state machines compared a free-running counter with
  "greater than 314/157/79" and loaded on every clock of a trigger. Here the
  actuator counter restarts on each trigger, and the machines load only on
  its first clock. The on-times are therefore exactly 314, 157 and 79
  clocks.
* The prototype split each phase into two 25-laser halves. Here each unit is
  50 lanes wide.
* The encoding of the piezo memory output, the motor divider's
  period-halving method, all reset values and the reset polarity are this
  design's own choices.
* These parts are outside this RTL: the video ADC, the VCSEL arrays, the
  lens, the motor and prism, the piezo actuator and the resistor-ladder DAC.
  `tb/ladder_dac.sv` is an ideal behavioural model of the ladder, used only
  by the end-to-end testbench.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mlpp_pkg.sv \
          tb/tb_mlpp_top.sv --top-module tb_mlpp_top -o sim
obj_dir/sim
```

Replace `tb_mlpp_top` with any other testbench name. The simulator is
two-state, so every register the design reads is reset.

`tb_mlpp_top` runs the whole design at its default size for three frames of
525 lines (about 2.5 million clocks; a few seconds). The video source is
random 8-bit samples, and the testbench works out the expected picture from
their value ranges. It then checks all 50 lasers on every clock, along with
the triggers, the staircase code and the DAC voltage, the motor duty cycle
over a full frame, and the pass-through outputs. It also counts and requires
each mechanism at least once: each brightness level, each trigger, a phase
showing the previous line and one showing the current line, each staircase
step, and a full motor period.

`tb_mlpp_sync_window` varies the line timing from line to line. The H-sync
high time ranges over 1049..1498 clocks, and the line length goes down to
1265 clocks with H-sync low for as little as one clock. Every laser is
checked on every clock.

The block testbenches check each unit against its own reference:

* the counter's clear and roll-over;
* the sample times, `be` and `sme` to the clock, for the first and last
  phases;
* the full pixel-to-lane mapping over whole lines;
* the pulse lengths and start clocks for all codes, including a trigger that
  cuts a pulse short;
* the staircase held between triggers;
* the motor duty at a short period and at a real 60 Hz frame.
