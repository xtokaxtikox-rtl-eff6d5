# XtokaxtikoX: a stochastic-computing line follower in SystemVerilog

This RTL steers a two-wheeled line-following robot. Every value on the way
from light sensor to motor is a **stochastic bitstream**, a serial stream of
bits whose fraction of 1s is the number. The design has no ADC, no DAC and no
binary arithmetic:

- An analog sensor voltage becomes a bitstream through a comparator and a
  reference triangle that the chip generates itself.
- The controller works on bitstreams with a few gates and counters.
- A bitstream looks like a PWM signal with a random duty cycle. After an R-C
  low-pass filter it can drive a motor directly.

The design is based on the published XtokaxtikoX system (Duarte, Neto,
Véstias; INESC-ID). It follows that work wherever it is specific. Where it is
silent, this implementation makes its own choices. The section
"Departures and own choices" lists them.

```
 photo-resistor ──► comparator ──cmp_in──► an2sto ──i──► Controller I  ─┐
   divider            ▲ (external)          │            Controller II ─┴─ctrl_sel─► motor ──► R-C ──► motor driver
                      └── R-C ◄──pwm_ref────┘                 ▲    ▲
                                                         c (SNG)  threshold (SNG)
```

## Numbers as bitstreams

A stream with a fraction p of 1s encodes p, a value in [0, 1]. Arithmetic on
such streams is done one bit per clock:

| unit          | module       | circuit                                     | result for independent streams |
|---------------|--------------|---------------------------------------------|--------------------------------|
| multiply      | `sto_mul`    | AND of N inputs                             | product                        |
| complement    | `sto_not`    | inverter                                    | 1 − A                          |
| square        | `sto_square` | A AND (A delayed one clock)                 | A²                             |
| scaled add    | `sto_add`    | N-input mux, select = modulo-N counter      | (A₁+…+A_N)/N                   |
| double        | `sto_double` | A OR (A delayed one clock)                  | ≈ 2A for small A (exact: 1−(1−A)²) |
| binary → stream | `sng`      | 32-bit LFSR, output = (LFSR < value)        | value / 2³²                    |
| stream → binary | `s2b`      | count of 1s and count of bits               | ones / total                   |

The doubler repeats every 1 in the next bit. Two 1s in a row therefore give
three 1s, not four, so the result is only near 2A while A is small. It
approaches 1 as A nears 0.5. For example, the input 0,1,1,0,0,1,0,0 (in time
order) becomes 0,1,1,1,0,1,1,0.

All the formulas in the table need streams whose bits do not depend on each
other. This is not true of an LFSR-based SNG. Each LFSR state is the previous
state shifted by one bit, so neighbouring bits of the output are correlated.
For c = 0.25, c[n] and c[n−1] are both 1 with probability 0.125 rather than
0.0625. Any unit that combines a stream with its own delayed copy sees this.
The square and double units see it, and so does Controller I with `d = 1`.
The doubled output then has density 2c − P(c[n]·c[n−1]) = 0.375, not
1−(1−c)² = 0.4375. The top-level testbench measures this and checks for it.

## From a sensor voltage to a bitstream (`pwm_gen`, `an2sto`)

This is the least obvious part of the design. The sensor voltage goes to the
+ input of an external comparator. The − input is a reference triangle, which
is the chip's `pwm_ref` output smoothed by an external R-C. The comparator
output is high while the sensor voltage is above the triangle. Over a whole
triangle period the fraction of high time is therefore V_in / V_supply.
That comparator output is already the bitstream. `an2sto` only passes it
through a two-flop synchronizer.

`pwm_gen` makes the triangle:

- A `PWM_W`-bit carrier counter runs freely (256 clocks per carrier period by
  default).
- A duty `level` steps 0 → 255 → 0, one step every `dwell` carrier periods.
  The filtered output ramps up and down at the same rate, so the triangle has
  a 50 % duty cycle.
- A new `dwell` in 1..2^`DWELL_W` is drawn from a 16-bit LFSR at the bottom of
  every triangle. The triangle period is 2·255·dwell·256 clocks: 130,560 to
  522,240 clocks at the defaults. It changes pseudo-randomly from one period
  to the next. This spreads the comparator pulses and keeps the two sensor
  channels (different seeds) uncorrelated.
- A dither of 0..2^`DITHER_W`−1 from the same LFSR is added to the duty in
  every carrier period. It makes small variations in the reference amplitude,
  so the comparator toggles a few times near each crossing instead of making
  one clean step.

Choosing the external R-C: the time constant must be long against the carrier
period, so that the carrier ripple is small. It must be short against one
level step, so that the triangle follows the ramp. The testbench model uses a
time constant of 4096 clocks, which is 16 carrier periods. With this it
measures densities of 0.45 for 1.5 V and 0.89–0.92 for 3.0 V on a 3.3 V
supply. Published oscilloscope traces of the reference show a period of about
a second. The clock frequency is not known, so this is not matched. Raising
`DWELL_W` lengthens the period in proportion.

Because the comparator output is high for one long stretch per triangle, the
sensor stream is a bitstream with long runs of 1s. It is not a stream of
independent bits. Its density is right, but its bits are not independent,
and this matters for Controller II (below).

## The controllers

Both controllers from the published design are built. `ctrl_sel` selects
which one drives the motors (0 = Controller I, 1 = Controller II).

**Controller I (`controller_1`), proportional.** For each channel:

```
p   = i AND c                      speed limit c
o   = NOT( p OR (d AND p_delayed) )
```

The output density is about 1 − i·c, or 1 − 2·i·c when `d` doubles the
product. A dark sensor (high voltage, high i) slows its own motor, and a
light one lets it run. The final inversion suits the board's PNP motor
drivers, which are on when their input is low. The published equations give
o = i·c, but its text and circuit include the inversion, and this
implementation follows the text and circuit.

**Controller II (`controller_2`), on-off with threshold.** Each channel has an
8-bit two's-complement up/down counter:

- enable = i XOR thr
- direction = up when i = 1

The counter drifts by (i − thr) per clock. Its MSb, which is the output, is 1
while the sensor stream encodes less than the threshold. The counter
saturates at +127 and −128, so it never wraps and flips the sign. The
threshold stream is shared by both channels.

The sensor streams come from the comparator in long runs, so the counter
reaches its limit within a few hundred clocks of every comparator edge. The
motor output then follows the inverted comparator output, and its density is
about 1 − i. The threshold still acts at the extremes: threshold 0 keeps both
motors off and threshold ≈1 keeps them on. The testbench checks all three.

## Top level (`xtokaxtikox_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; active-high asynchronous reset |
| `cmp_in` | in | 2 | comparator outputs for sensors 1 and 2 (asynchronous) |
| `pwm_ref` | out | 2 | PWM outputs to the reference R-Cs |
| `ctrl_sel` | in | 1 | 0 = Controller I, 1 = Controller II |
| `c_val` | in | 32 | speed limit c, as c·2³² |
| `d` | in | 1 | Controller I doubling on |
| `thr_val` | in | 32 | Controller II threshold, as thr·2³² |
| `prng_load` | in | 1 | reload the c and threshold SNG seeds |
| `motor` | out | 2 | stochastic motor drive o1, o2 (to R-C and driver) |
| `ref_level` | out | 2×8 | current level of each reference triangle (observation) |
| `au_m` | in | 3 | input streams of the stand-alone arithmetic units |
| `au_sum`, `au_prod` | out | 1 | 3-input scaled adder and multiplier of `au_m` |
| `au_not`, `au_sq`, `au_dbl` | out | 1 | complement, square and double of `au_m[0]` |
| `au_ones`, `au_total` | out | 16 | stream-to-binary counts of `au_m[0]` |

Latency: a bit on `cmp_in` reaches `motor` three clocks later. Two clocks are
spent in the synchronizer and one in the registered motor output. The
controllers themselves add no latency.

The general arithmetic units (`au_*`) are not used by the line follower. They
are built into the top beside it, with their own ports, so that they can be
used and tested in the same chip.

Parameters: `LFSR_W` = 32 (SNG width, as published), `PWM_W` = 8, `CNT_W` = 8
and `S2B_W` = 16. The last three are this implementation's choices.

Hierarchy:

```
xtokaxtikox_top
├── an2sto ×2 ── pwm_gen ── lfsr (16 bit)
├── sng ×2 (c, threshold) ── lfsr (32 bit)
├── controller_1 ── sto_mul ×2
├── controller_2
└── sto_add, sto_mul, sto_not, sto_square, sto_double, s2b
```

The whole top synthesizes to about 220 flip-flops. Most of them are in the
two 32-bit SNGs and the two 16-bit reference LFSRs.

## Departures and own choices

- **One clock.** The published SNG and adder clock themselves from local
  self-timed ring oscillators, so that streams are less correlated. These
  oscillators are asynchronous and depend on the process, and they are not
  built here. Every unit runs on `clk`.
- **Both controllers in one top.** The published system holds one controller
  at a time. Here both are present behind `ctrl_sel`.
- **Where c and the threshold come from.** The published design does not say
  how the c and threshold streams are generated. Here each one comes from a
  32-bit SNG fed by a binary input.
- **Reference generator details.** The ramp shape, the 8-bit resolution, the
  dwell range and the dither size are own choices. Only the principle is
  published: a PWM-derived triangle with a 50 % duty cycle, a pseudo-random
  period and small amplitude variations.
- **Own choices in the controllers and converters.**
  - The LFSR polynomial (x³²+x²²+x²+x+1), seeds, and the guard that replaces
    a zero seed with 1.
  - The saturation of the Controller II counter and its 8-bit width.
  - The stop-when-full rule and the 16-bit width of `s2b`.
  - The synchronizer, the registered motor outputs, and the active-high
    asynchronous reset.
- **Off-chip parts.** The comparators, R-C networks, photo-resistors, motor
  drivers and motors are outside the chip and are not modelled in `rtl/`. The
  testbench has a simple model of the input R-C and comparator
  (`tb/analog_frontend_model.sv`).
- **Size.** The published system fits in 38 logic cells. This one is much
  larger, mainly because of the 32-bit SNGs, whose published width is kept.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example, to build and run the top-level
testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl --top-module tb_xtokaxtikox_top tb/tb_xtokaxtikox_top.sv -o sim
./obj_dir/sim
```

`tb_xtokaxtikox_top` runs the top with all of its parameters at their
defaults. It runs about 6 million clocks, which takes a few seconds. It
checks the following:

- the three-clock latency;
- the sensor densities against V_in / 3.3 V;
- the Controller I motor densities with and without doubling;
- the Controller II behaviour;
- the stand-alone units, bit by bit.

It also requires that each mechanism happens at least once:

- varying triangle periods;
- doubling repeats;
- Controller II on, off and saturation;
- a controller switch;
- an SNG reload;
- the `s2b` counter full.

Each unit also has its own testbench, `tb/tb_<module>.sv`. These compare
the unit clock by clock with a model computed in the testbench, and check
the stream densities. Some of them use smaller parameters, for example
`PWM_W = 4` for `pwm_gen`, to keep the runs short.
