# CORDIC-based universal modulator

One datapath gives amplitude, frequency and phase modulation. A numerically
controlled oscillator produces a carrier phase. A CORDIC rotator turns the
vector `(a, 0)` by that phase, so it yields both `a·cos(ωt+φ)` and `a·sin(ωt+φ)`
without a sine lookup table. Which kind of modulation you get depends only on
which input carries the message:

| mode             | `x_in` (amplitude) | `delta_f` (frequency word) | `phi` (phase word) |
|------------------|--------------------|----------------------------|--------------------|
| plain carrier    | constant           | constant                   | 0                  |
| AM               | message `a(t)`     | constant                   | 0                  |
| FM               | constant           | carrier word + message     | 0                  |
| PM               | constant           | constant                   | message `φ(t)`     |

The rotator is an 8-stage CORDIC. Its first three stages are replaced by
multiplexers, and it has two levels of pipeline registers. The cosine output
drives a 12-bit LTC2624 serial DAC, and an analog low-pass filter (not part of
this RTL) follows the DAC.

```
 delta_f ──►(+)──►[N-bit reg]──┬──►(+ Adder 2)──theta──►┌──────────────┐──cos_out──►[dac_spi]──► LTC2624 ─► LPF
             ▲                 │         ▲              │  mux_cordic  │──sin_out──►
             └─────────────────┘        phi    x_in ───►└──────────────┘
        phase_accumulator        phase_adder
```

## Phase generation

`phase_accumulator` adds `delta_f` into an N-bit register on every clock (the
sample clock `f_s` is `clk`). The register holds the phase as a *binary angle*:
2^N is one full turn. The output frequency is therefore

    f_out = delta_f · f_s / 2^N        (N = 16, f_s = 50 MHz → 763 Hz per LSB)

`phase_adder` (Adder 2) adds the phase word `phi` to the top W bits of the
register. Its result `theta` is a W-bit binary angle, so `phi = 2^(W-2)` is
+90°. Both adders wrap modulo one turn, which is exactly what a phase needs.

## The multiplexer-based CORDIC (`mux_cordic`)

### Rotation by micro-rotations

A rotation by θ is built from eight elementary rotations by ±atan(2^-i),
i = 0…7. Each one needs only shifts and adds:

    d   = sign(z)               (z ≥ 0 counts as +)
    a'  = a − d·(b >>> i)
    b'  = b + d·(a >>> i)
    z'  = z − d·atan(2^-i)

`z` is the angle still left to rotate. The vector grows by
R = ∏ sqrt(1+2^-2i) = 1.646744 over the eight stages, so the start vector is
`(x_in/R, 0)`. In hardware this is one constant multiply by
`round(2^15/R) = 19899` in Q1.15. `cordic_stage` is one such micro-rotation.

### Why stages 1–3 are multiplexers

The start vector always has b = 0. So stage 1 (shift 0) always turns
anticlockwise by 45° and gives `(a, a)`. After stages 2 and 3, only the two
direction bits d2 and d3 have been free. The vector is therefore one of four
values, each a fixed multiple of a/8:

| d2 | d3 | (a3, b3)         |
|----|----|------------------|
| +  | +  | (a/8, 13a/8)     |
| −  | +  | (11a/8, 7a/8)    |
| +  | −  | (7a/8, 11a/8)    |
| −  | −  | (13a/8, a/8)     |

`cordic_mux_front` builds a/8, 7a/8, 11a/8 and 13a/8 once, with shift-and-add:
7a = 8a−a, 11a = 8a+2a+a, 13a = 8a+4a+a. Two levels of 2:1 multiplexers
choose among them. The first level is steered by d2 and the second by d3.
The angle path still needs its three constant adders, because their sign bits
are the multiplexer selects and their result is the remaining angle for
stage 4. Stages 4–8 are ordinary `cordic_stage` instances with shifts 3…7.

### Quadrants

Fixing stage 1 at +45° limits the reachable angles to about −9.5°…+99.5°.
To cover the full circle, the two top bits of `theta` give the quadrant q, and
only the remaining 0…90° go through the stages. After stage 8 the vector is
turned by q·90° by swapping and negating: `(a,b)`, `(−b,a)`, `(−a,−b)`,
`(b,−a)`. The quadrant bits travel down the pipeline with the data.

### Pipeline

Registers sit after stage 4 and after stage 7. They hold a, b, the remaining
angle, the quadrant and a valid bit, so the core has a latency of 2 clocks
and takes a new sample on every clock, with no stall. Stage 8, the quadrant
turn and the output rounding are combinational after the second register.
Set `PIPELINED = 0` to remove both registers. This gives the unpipelined
variant of the same datapath, with zero latency.

### Accuracy

With eight stages, up to atan(2^-7) = 0.45° of angle is always left over. The
output is therefore within about 0.8 % of |x_in| of the exact `x·cos θ`,
`x·sin θ`. At θ = 0 the cosine is `x·cos 0.45°`, and the sine shows a
residual of about 0.7 % of full scale. Rounding adds less than 2 LSB on top.
Inside the core, words are W+2+FRAC = 21 bits wide. Three fraction bits make
a/8 exact, and two more integer bits give headroom. The outputs are rounded
back to W bits and saturated. Saturation only matters for `x_in = −32768`,
whose negation does not fit.

## Number formats

| signal              | format                                              |
|---------------------|-----------------------------------------------------|
| `delta_f`, phase    | N-bit unsigned binary angle (2^N = 360°)            |
| `phi`, `theta`      | W-bit binary angle (2^W = 360°)                     |
| `x_in`              | W-bit two's complement amplitude                    |
| `cos_out`, `sin_out`| W-bit two's complement, `x_in·cos θ`, `x_in·sin θ`  |
| atan constants      | `round(atan(2^-i)/2π · 2^W)`, from a 32-bit table in `um_pkg` |

## Timing of the top level (`universal_modulator`)

* `rst_n` is synchronous and active low. It clears the phase and the
  pipeline, and it aborts a DAC frame in progress.
* `out_valid` rises 3 clocks after reset is released and then stays high.
* `phi` and `x_in` show at the outputs 2 clock edges after they are applied.
  A new `delta_f` is added at the next edge and shows 3 edges after it is
  applied.
* One sample per clock. There are no stalls and no back-pressure.

## DAC link (`dac_spi`)

The LTC2624 takes 12-bit unsigned codes over a serial link. `dac_spi` turns a
signed sample into offset binary: it keeps the top 12 bits and inverts the
sign bit, so 0 becomes code 2048. It then sends one 32-bit frame, MSB first:

    8 × don't care | command (0011 = write and update) | address (0000 = DAC A) | 12 data bits | 4 × don't care

`dac_cs_n` is low for the frame. `dac_mosi` changes while `dac_sck` is low,
and the converter samples it on the rising edge. The DAC output updates when
`dac_cs_n` rises. With `SCK_HALF = 1`, `dac_sck` runs at clk/2 (25 MHz from a
50 MHz clock) and a frame starts every 66 clocks. Samples that arrive during
a frame are dropped, so the DAC plays the modulator output decimated by 66.
The analog reconstruction filter has to be chosen with that rate in mind.
Change `SCK_HALF` to slow the link down, and `DAC_ADDR` to pick another
channel.

## How far this follows the published architecture

Taken from the published design:
* the block structure: phase accumulator (Adder 1 with an N-bit register),
  Adder 2, CORDIC and DAC;
* the three ways of modulating;
* the eight stages and the start vector `(1/R, 0)`;
* the four multiples of a/8 and the multiplexers for stages 1–3;
* pipeline registers after stages 4 and 7;
* 16-bit words;
* the LTC2624 as the converter.

Choices made here, where the architecture says nothing:
* the N = 16 accumulator width;
* the binary-angle format;
* the quadrant folding (without it the multiplexer CORDIC covers only
  0–90°);
* the guard bits, rounding and saturation;
* the reset and valid signals;
* the whole DAC frame logic, which follows the converter's own serial format.

Departures and limits:
* The modulator has no `y_in` input. The multiplexer front assumes the start
  vector `(a, 0)`, so `y_in` is always 0. AM therefore uses `x_in` alone,
  which is enough for the usual `a(t)·cos ωt` form. Quadrature AM with a
  second message on `y_in` is not possible with this front end.
* The residual angle of stage 8 is computed in the architecture but not
  used, so it is not brought out here.
* Only the cosine goes to the DAC. `sin_out` is available as a port.
* The published results are for a Spartan-3E at 50 MHz. No FPGA-specific
  primitives are used here, and timing closure has not been checked.

## Files and parameters

| file | contents |
|------|----------|
| `rtl/um_pkg.sv` | atan table, 1/R constant, direction type |
| `rtl/phase_accumulator.sv` | Adder 1 + N-bit phase register (`N`) |
| `rtl/phase_adder.sv` | Adder 2 (`N`, `W`) |
| `rtl/cordic_stage.sv` | one shift-and-add micro-rotation (`DW`, `ZW`, `SHIFT`) |
| `rtl/cordic_mux_front.sv` | stages 1–3 as multiples and multiplexers (`DW`, `ZW`) |
| `rtl/mux_cordic.sv` | complete pipelined CORDIC (`W`, `FRAC`, `PIPELINED`) |
| `rtl/dac_spi.sv` | LTC2624 serial interface (`W`, `SCK_HALF`, `CMD`, `ADDR`) |
| `rtl/universal_modulator.sv` | top level (`N`, `W`, `PIPELINED`, `SCK_HALF`, `DAC_ADDR`) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/ltc2624_model.sv` | behavioural model of the converter's serial input (testbench only) |

The defaults are N = W = 16, FRAC = 3, PIPELINED = 1 and SCK_HALF = 1. The
stage count is fixed at eight, because the multiplexer front and the register
positions are specific to it. W is a parameter: the DAC link needs at least
12 bits, and the atan constants are re-rounded for any W up to 32. Only
W = 16 has been simulated.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. For
example, to run the end-to-end test:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/um_pkg.sv tb/tb_universal_modulator.sv --top-module tb_universal_modulator
./obj_dir/Vtb_universal_modulator
```

Replace the testbench name to run the others. To lint the RTL, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/um_pkg.sv rtl/universal_modulator.sv`.

## What the tests establish

* `tb_universal_modulator` runs the top at its default parameters. It goes
  through the carrier, AM, FM and PM modes, then a reset in the middle of a
  run, about 15,000 samples in all. Every output sample is checked against an
  independent model in two ways:
  * within 2.5 LSB of the angle the micro-rotations actually reach;
  * within 0.8 % of the exact `x·cos θ`, `x·sin θ`.

  It also checks the 2- and 3-cycle latencies. It decodes the DAC frames and
  compares each code with the cosine sample it carries. It counts, and
  requires, the following: every mode, the mode switches, phase wraps, all
  four quadrants, all four multiplexer cases, DAC frames and the reset.
* `tb_universal_modulator_comb` repeats that test with `PIPELINED = 0`. In
  that case each output belongs to the inputs of the same cycle.
* `tb_mux_cordic` streams 6,000 random and corner-case samples, with gaps in
  `in_valid`, through the pipelined core and through an unpipelined instance.
  It checks values, the 2-cycle latency and the valid flag.
* `tb_cordic_mux_front` and `tb_cordic_stage` compare against real-number
  models. `tb_cordic_mux_front` also requires all four multiplexer cases to
  occur.
* `tb_dac_spi` checks the frame content, length and timing at two SCK rates
  and two channels, using the converter model.
* `tb_phase_accumulator` and `tb_phase_adder` check the adders, including
  wrap-around.

Each testbench has been shown to fail when its module is broken on purpose,
for example when the 13a/8 multiple or a quadrant sign is wrong.
