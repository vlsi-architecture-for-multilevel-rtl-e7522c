# Five-level phase-disposition PWM modulator for a transistor-clamped H-bridge

A multilevel inverter builds its AC output from several small voltage steps
instead of switching the whole DC link, so its output needs less filtering
and has less harmonic distortion than a two-level inverter switched at the
same frequency. The transistor-clamped H-bridge (TCHB) gets five output
levels from only five switches: an ordinary H-bridge plus one bidirectional
switch that ties one leg to the midpoint of a split DC capacitor.

This RTL is the digital modulator for such an inverter. From a board clock
and a modulation index M (an IEEE-754 single-precision number) it produces,
cycle by cycle:

* `tchb_gates` — the gate signals S1..S5 of the five-level TCHB, by
  **phase-disposition (PD) PWM**: one reference sine compared against four
  identical triangular carriers stacked on top of each other, all in phase;
* `fb_gates` — the gate signals Ta+, Ta-, Tb+, Tb- of an ordinary full
  bridge, by **unipolar sinusoidal PWM**: a sine and its inverse compared
  against one full-height carrier (a three-level output across the bridge).

Both outputs come from one shared datapath built around two look-up tables
(a sine and a triangle), as in a classic FPGA SPWM generator. With the
default parameters the switching frequency is 20 kHz and the output
fundamental 50 Hz, from a 50 MHz clock.

## Datapath

```
 m_float ──► modulation_index ──────────────── index (Q2.8) ──────────┐
                                                                        ▼
 clk ──► clock_generator ── tick ──► sine_carrier ──ref1──► amplitude_scaler (sineRef1) ─ya1─┬─► spwm_comparison ─► fb_gates
                                      │  control_unit         amplitude_scaler (sineRef2) ─ya2─┘        ▲
                                      │  sine_memory  ─ref2──►                                        │
                                      │  carrier_memory                                              │
                                      │  sine_processing_unit                                        │
                                      └──carrier──► delay_line (1 clock) ── carrier_d ──────────────┤
                                                                                                    ▼
                                                    ya1 ───────────────────────────────► pd_modulator ─level─► tchb_gate_logic ─► tchb_gates
```

Everything runs in the single `clk` domain. `tick` is a clock enable at the
sample rate; only the address counters in `control_unit` look at it, every
other register updates on every clock, so a new sample ripples through the
pipeline a few clocks after each tick.

### Number format

All samples are unsigned 8 bit. A sine that spans [-1, 1] is held in
[0, 255] with the zero line at **128**. The modulation index is unsigned
fixed point Q2.8 (10 bits, 1.0 = 256), so indices up to 3.996 can be
represented; the inverter is meant to be run between about 0.85 and 1.25.

### Sample rate (`clock_generator`)

A two-state FSM halves the clock. On each of its second-phase cycles an
accumulator adds `CLKFX_MULTIPLY` and, when it reaches `CLKFX_DIVIDE`,
subtracts it and emits a one-clock `tick`. The tick rate is

    f_tick = f_clk / 2 × CLKFX_MULTIPLY / CLKFX_DIVIDE   (needs MULTIPLY ≤ DIVIDE)

The two parameter names are those of the FPGA clock manager an FPGA version
would use for this rate change; here the ratio is a fractional clock enable
rather than a synthesised clock, so the design has no second clock domain
and no vendor primitive. Defaults: 50 MHz × ½ × 51/125 = 10.2 MHz.
Ticks are 4 or 6 clocks apart (4.9 on average), which only matters if a
carrier sample is required to last an exact number of clocks.

### Sine and carrier (`sine_carrier`)

`control_unit` keeps two addresses. The carrier address steps on every tick
through the `CARRIER_N` = 510 samples of one carrier period; at the end of
each carrier period the sine address steps once, so each sine sample is
held for a whole carrier period. The sine table holds only **half** a period
(`SINE_HALF_N` = 200 samples of 128 + 127·sin(πi/200), rising from 128 to
255 and back). When the sine address wraps, `flag` toggles.

`sine_processing_unit` makes the full sine out of the half-wave: it mirrors
the stored sample about 128 (ys = 256 − sample) and two multiplexers pick,
according to `flag`,

| flag | ref1 (sine) | ref2 (inverted sine) |
|------|-------------|----------------------|
| 0    | sample      | ys                   |
| 1    | ys          | sample               |

So ref1 is a full sine, ref2 the same sine in opposite phase, and the
fundamental frequency is

    f_1 = f_tick / (2 · SINE_HALF_N · CARRIER_N) = 10.2 MHz / 204000 = 50 Hz
    f_sw = f_tick / CARRIER_N = 20 kHz

Both tables are block-RAM style ROMs with a registered read, computed when
the design is elaborated (no data files). The carrier table is the triangle
0, 1, …, 255, 254, …, 1.

### Amplitude (`amplitude_scaler`, instantiated twice)

    y_a = clamp(128 + round((ref − 128) · index / 256), 0, 255)

Index 1.0 reproduces the reference; index 0 gives a flat 128. Above 1.0
the sine is clipped at 0 and 255, which is over-modulation: the PWM then
holds the outer level for several carrier periods around each peak, and
the fundamental grows less than in proportion to M. `delay_line` holds the
carrier back by the scaler's one-clock latency so every comparator sees a
sine and a carrier from the same sample instant.

### Unipolar SPWM (`spwm_comparison`)

    Ta+ = (ya1 ≥ carrier)   Ta- = not Ta+
    Tb+ = (ya2 ≥ carrier)   Tb- = not Tb+

Equality turns the upper switch on. Each leg thus always has exactly one
switch on (asserted in the RTL). No dead time is inserted; a gate driver
must add it.

## Five-level phase-disposition modulation

This is the part that is least obvious from the code.

### Carriers and levels (`pd_modulator`)

The four carriers divide the 0..255 range into equal bands, all rising and
falling together. They are derived from the one full-scale carrier sample c:

    carrier k = 64·k + c/4      k = 0 (bottom) … 3 (top), band [64k, 64k+63]

The scaled reference ya1 is compared with all four (≥, as above); the number
of carriers it is at or above, minus two, is the output level:

| ya1 is at or above          | level | output voltage   |
|-----------------------------|-------|------------------|
| all four carriers           | +2    | +Vdc             |
| all but the top one         | +1    | +Vdc/2           |
| the two lower ones only     |  0    | 0                |
| the bottom one only         | −1    | −Vdc/2           |
| none                        | −2    | −Vdc             |

Only the carrier whose band contains the sine at the moment can change its
comparison, so the output toggles between two adjacent levels within one
carrier period. `pos_half` (ya1 ≥ 128) travels with the level; it decides
which zero state is used.

### Switch table (`tchb_gate_logic`)

```
        +Vdc ──┬──────────────┬──────────────┐
               C1 (Vdc/2)     S2             S4
   midpoint ───┤──── S1 ──────┤ A            ├ B       v_out = v_A − v_B
               C2 (Vdc/2)     S3             S5
           0 ──┴──────────────┴──────────────┘
```

S1 is a single IGBT inside a four-diode bridge, so it conducts in both
directions and places leg A at the capacitor midpoint.

| level | on     | v_A    | v_B  |
|-------|--------|--------|------|
| +2    | S2, S5 | Vdc    | 0    |
| +1    | S1, S5 | Vdc/2  | 0    |
| 0 (positive half) | S3, S5 | 0 | 0 |
| 0 (negative half) | S2, S4 | Vdc | Vdc |
| −1    | S1, S4 | Vdc/2  | Vdc  |
| −2    | S3, S4 | 0      | Vdc  |

The right leg (S4/S5) therefore switches only at the fundamental frequency,
S5 for the positive half and S4 for the negative half, while the left leg and
S1 do the carrier-rate switching. Choosing the zero state by half period
means each carrier-rate transition changes one switch pair in the left leg
group only. The RTL asserts that exactly one of S1/S2/S3 and exactly one of
S4/S5 is on at any time, which rules out shorting a capacitor or the DC
link. As for the full bridge, dead time is left to the gate driver.

## Timing

Latency from a change of the control unit's addresses (one clock after a
tick):

| output          | clocks |
|-----------------|--------|
| ref1, ref2, carrier (memory read) | 1 |
| ya1, ya2, carrier_d               | 2 |
| fb_gates, level                   | 3 |
| tchb_gates                        | 4 |

A new `m_float` reaches `index` after one clock and the gate outputs two to
three clocks after that. All resets are synchronous and active high; after
reset the full bridge sits with both lower switches on and the TCHB in the
S3+S5 zero state, i.e. 0 V output.

## Top-level interface (`tchb_pwm_top`)

| port        | dir | type / width   | meaning |
|-------------|-----|----------------|---------|
| clk         | in  | 1              | clock (50 MHz for the default rates) |
| rst         | in  | 1              | synchronous reset, active high |
| m_float     | in  | 32             | modulation index, IEEE-754 single |
| fb_gates    | out | `fb_gates_t`   | {ta_p, ta_m, tb_p, tb_m} |
| tchb_gates  | out | `tchb_gates_t` | {s1, s2, s3, s4, s5} |
| level       | out | `level_t` (3, signed) | five-level command −2..+2 |
| flag        | out | 1              | half-period flag (0: positive half of ref1) |

Types and constants are in `rtl/pwm_pkg.sv`.

| parameter        | default | effect |
|------------------|---------|--------|
| CLKFX_MULTIPLY   | 51      | sample rate = f_clk/2 × MULTIPLY/DIVIDE |
| CLKFX_DIVIDE     | 125     | |
| SINE_HALF_N      | 200     | sine samples per half period (carrier periods per half period) |
| CARRIER_N        | 510     | samples per carrier period |

For another switching frequency f_sw and output frequency f_1 at clock
f_clk: pick `CARRIER_N` (510 uses every 8-bit carrier value), set
MULTIPLY/DIVIDE = 2 · f_sw · CARRIER_N / f_clk, and
`SINE_HALF_N` = f_sw / (2 f_1).

## Where this design makes its own choices

The overall structure — the clock generator with a two-state halving FSM,
the float-to-fixed modulation index, the sine and carrier look-up tables
with their control unit, processing unit and two multiplexers, the two
adjustable-amplitude sines, the carrier delay, the "≥" comparators with
inverted lower-switch signals, four in-phase stacked carriers for five
levels, and the five-switch TCHB — follows the published architecture.
The following are this design's own and are the first things to revisit
for a different target:

* the 50 MHz clock, the table sizes (200 and 510) and the resulting
  10.2 MHz sample rate;
* the clock enable in place of a clock manager's synthesised clock;
* IEEE-754 single precision for M, the Q2.8 index, rounding half up and
  saturation of out-of-range values;
* storing half a sine period and the exact mirror formula ys = 256 − x;
* the amplitude formula and clipping on over-modulation;
* deriving the four PD carriers from one table;
* the switch table (derived from the bridge circuit) and the zero-state
  choice by half period;
* one-clock register stages and synchronous active-high reset;
* no dead time.

Not included: the power stages themselves (IGBTs, diodes, capacitors, LC
filter), the FPGA clock manager, and any dead-time generator.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
values worked out independently (real-number formulas or a cycle count) and
prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| tb_clock_generator | FSM alternation, exact tick count floor(51·⌊k/2⌋/125) after every clock |
| tb_modulation_index | round(M·256) for the operating range, ties, 1000 random values, ±0, subnormal, ∞, NaN |
| tb_control_unit | address/flag sequence against a tick count, random tick pattern, reduced sizes |
| tb_sine_memory / tb_carrier_memory | every table entry and the read latency |
| tb_sine_processing_unit | exhaustive mirror and multiplexer behaviour |
| tb_sine_carrier | a full fundamental period at default sizes against the sine/triangle formulas |
| tb_amplitude_scaler | all references at M = 0, 0.85, 1, 1.25 plus 20000 random pairs, clipping |
| tb_delay_line | depths 1 and 3 |
| tb_spwm_comparison | every sine value against every third carrier value, equality included |
| tb_pd_modulator | all reference/carrier pairs (carrier step 5) against real-valued carrier bands; all five levels |
| tb_tchb_gate_logic | each level in each half through an ideal bridge: output = level, no short |
| tb_tchb_pwm_top | whole design at default parameters (below) |
| tb_tchb_workloads | output voltage fundamental at M = 0.85, 1.0, 1.25 (below) |

`tb_tchb_pwm_top` runs the unmodified top for one full 20 ms output period
at M = 1.0 and then parts of periods at M = 0.85 and 1.25 (about 1.9 million
clocks, a couple of seconds). It carries its own cycle-exact model of the
tick train, tables, scaling and comparisons and checks every gate output on
every clock; the TCHB gates also drive a behavioural bridge model
(`tb/tchb_bridge_model.sv`, 325 V DC link) whose output must equal
level × 162.5 V. It also requires that every level occurs, both flag
edges occur exactly 500000 clocks apart (50 Hz), the sine clips at
M = 1.25, and the index changes take effect.

`tb_tchb_workloads` runs a full output period at each of M = 0.85, 1.0 and
1.25 through the bridge model and compares the fundamental component of the
output voltage, and of the full bridge's Va − Vb, with the value PWM theory
predicts. Results with the default parameters (unfiltered waveforms,
325 V DC link):

| M    | expected fundamental | five-level | full bridge | THD five-level | THD three-level |
|------|----------------------|------------|-------------|----------------|-----------------|
| 0.85 | 274.1 V | 274.4 V | 275.4 V | 36.4 % | 70.9 % |
| 1.00 | 322.5 V | 322.4 V | 323.5 V | 27.5 % | 52.9 % |
| 1.25 | 362.1 V | 362.2 V | 362.9 V | 22.0 % | 40.5 % |

At the same 20 kHz carrier the five-level output carries roughly half the
harmonic content of the three-level one, which is the point of the
multilevel topology. The test requires agreement within 1.5 % and the
five-level THD to be the lower.

Run a testbench with Verilator 5 from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/pwm_pkg.sv tb/tb_tchb_pwm_top.sv \
    --top-module tb_tchb_pwm_top
./obj_dir/Vtb_tchb_pwm_top
```

Lint a module on its own with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/pwm_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are two deliberately unconnected observation
outputs in the top (`div2`, `above`) and package constants that some
modules do not use.

## Files

`rtl/`: `pwm_pkg`, `clock_generator`, `modulation_index`, `control_unit`,
`sine_memory`, `carrier_memory`, `sine_processing_unit`, `sine_carrier`,
`amplitude_scaler`, `delay_line`, `spwm_comparison`, `pd_modulator`,
`tchb_gate_logic`, `tchb_pwm_top`. Each file begins with a description of
the module, its interface and its timing.

`tb/`: one `tb_<module>.sv` per module, `tb_tchb_workloads.sv`, and the
behavioural bridge model `tchb_bridge_model.sv`.
