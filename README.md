# Parallel-pipelined CORDIC

CORDIC computes rotations of a vector using only shifts, additions and a small
table of angles. A rotation by an arbitrary angle is split into a series of
micro-rotations by the fixed angles atan(2^-i) = 45, 26.57, 14.04, 7.13, ...
degrees. Each one is taken either clockwise or counter-clockwise. With those
angles, multiplying by tan(atan 2^-i) is just a right shift by i bits.

A CORDIC engine can be built three ways:

- iteratively: one row of hardware reused n times;
- unrolled: n rows chained as combinational logic;
- unrolled and pipelined.

This design is the third kind. There is one hardware row per iteration, with a
register after every row. The critical path is therefore a single add/subtract
plus a shifter, not the whole chain. A new sample can enter on every clock
cycle. The cost is the pipeline registers.

At its default size the pipeline has:

- 16-bit x and y;
- a 32-bit angle;
- 16 micro-rotation rows;
- one row in front that turns the vector by a quarter turn when needed.

It works in both standard CORDIC modes, chosen per sample:

| mode | drives to 0 | results (K ~ 1.6468) |
|---|---|---|
| rotation (`CORDIC_ROTATE`) | z | x' = K(x cos z - y sin z), y' = K(y cos z + x sin z) |
| vectoring (`CORDIC_VECTOR`) | y | x' = K sqrt(x^2 + y^2), z' = z + atan2(y, x) |

For sine and cosine, feed x = 1/K (0.60725 in your chosen scale), y = 0 and
the angle in rotation mode: out_x = cos z and out_y = sin z. For example,
x = 19429 gives outputs with an amplitude of about 32000.

## The micro-rotation row (`cordic_stage`)

Row i holds the following hardware:

- two arithmetic shifters, for x >>> i and y >>> i;
- three adder/subtractors;
- the constant alpha_i = atan(2^-i).

For a direction d = +1 or -1 it computes:

    x' = x - d * (y >>> i)
    y' = y + d * (x >>> i)
    z' = z - d * alpha_i

The direction is the only decision in the row, and it steers all three
adder/subtractors:

- **rotation mode:** d = sign(z), with zero counted as positive. The remaining
  angle shrinks towards 0 and the vector turns by the requested angle.
- **vectoring mode:** d = -sign(y). The vector is driven onto the positive
  x axis, and z collects the angle it was turned through.

A micro-rotation is not a pure rotation. Each row also stretches the vector by
sqrt(1 + 2^-2i). Over 16 rows the total gain is K = 1.646760. The hardware does
not correct for this gain. Pre-scale the input (x = 1/K for sin/cos), or scale
the result.

Example: rotating x = 0.6073, y = 0 by 30 degrees. The rows take the directions
+ - + - + + - + ... and the remaining angle runs +30, -15, +11.6, -2.4, +4.7,
+1.1, -0.7, +0.2 ... degrees, while (x, y) approaches (0.866, 0.5).
`tb/tb_cordic_tables.sv` checks this trace row by row, and does the same for
vectoring (1, 2) to 63.43 degrees.

## Covering the full circle (`cordic_prerotate`)

The micro-rotation angles add up to about 99.7 degrees, so the rows alone can
only reach angles within about +-99.7 degrees. A registered row in front of
them turns the vector by 0, +90 or -90 degrees first. A quarter turn costs only
a swap and a negation of x and y:

| mode | condition | turn | x, y become | z becomes |
|---|---|---|---|---|
| rotation | z in [90, 180) | +90 | -y, x | z - 90 |
| rotation | z in [-180, -90) | -90 | y, -x | z + 90 |
| vectoring | x < 0, y >= 0 | -90 | y, -x | z + 90 |
| vectoring | x < 0, y < 0 | +90 | -y, x | z - 90 |
| either | otherwise | none | x, y | z |

In rotation mode the test reads only the two top bits of the binary angle.
After this row, the remaining angle is within +-90 degrees in rotation mode. In
vectoring mode the vector is in the first or fourth quadrant.

## Number formats and accuracy

- **x, y:** `XY_W`-bit two's complement. The binary point is yours to place,
  but it must be the same on input and output. The results grow by K, so
  K * sqrt(x^2 + y^2) must stay below 2^(XY_W-1). For 16 bits this means a
  vector length of at most about 19898 LSB. Do not use the most negative value,
  -2^(XY_W-1): the quadrant row negates its inputs.
- **z:** a `Z_W`-bit binary angle. 2^Z_W is a full turn, 2^(Z_W-2) is 90
  degrees, and values wrap at +-180 degrees. Convert with
  degrees = z_signed * 360 / 2^Z_W.
- **Angle table:** entry i = round(atan(2^-i) / (2 pi) * 2^32), held at 32-bit
  resolution in `cordic_pkg` for i = 0..31. Narrower angle words use a rounded
  copy.
- **Accuracy:** each shift truncates, and there are no guard bits. Errors
  therefore build up over the rows. Over the full test set, out_x and out_y are
  within 12 LSB of the exact result (within 16 LSB is what the tests require).
  The final angle in rotation mode is within 0.01 degrees of zero. In vectoring
  mode the angle error is about 8 LSB divided by the result length, in radians.
  If you need more accuracy, widen `XY_W` and place the binary point lower.

## Interface and timing (`cordic_pipeline`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; every register is rising-edge |
| `rst_n` | in | 1 | asynchronous, active low; clears only the valid bits |
| `in_valid` | in | 1 | a sample is present this cycle |
| `in_mode` | in | 1 | `cordic_mode_e`: 0 rotation, 1 vectoring |
| `in_x`, `in_y` | in | `XY_W` | input vector, signed |
| `in_z` | in | `Z_W` | input angle, binary angle |
| `out_valid` | out | 1 | a result is present |
| `out_mode` | out | 1 | mode of that result |
| `out_x`, `out_y`, `out_z` | out | `XY_W`, `XY_W`, `Z_W` | result |

Parameters:

- `XY_W` = 16;
- `Z_W` = 32;
- `STAGES` = 16, at most 32.

Timing:

- **Latency:** `STAGES + 1` = 17 cycles. That is one cycle for the quadrant
  row, then one for each micro-rotation row.
- **Throughput:** one sample per clock.
- **Flow control:** none. There is no back-pressure. A sample's mode and valid
  bit travel with it, so rotation and vectoring samples can be mixed freely,
  including in consecutive cycles.
- **Data registers:** they load only while their valid bit is high, and are
  not reset.

Size at the defaults: 17 rows x 66 register bits (x, y, z, valid and mode) =
1122 flip-flops, plus 48 adder/subtractors in the micro-rotation rows. The
shifts are wiring, and each
table constant folds into its row.

## Files

| file | contents |
|---|---|
| `rtl/cordic_pkg.sv` | mode enum, angle table, `atan_angle()` rounding helper |
| `rtl/cordic_atan_lut.sv` | table lookup, index to atan(2^-i); every row uses it at a constant index |
| `rtl/cordic_prerotate.sv` | quadrant row |
| `rtl/cordic_stage.sv` | one micro-rotation row and its register |
| `rtl/cordic_pipeline.sv` | top level: quadrant row plus `STAGES` rows in a generate loop |
| `tb/tb_cordic_atan_lut.sv` | table against `$atan`, at 32-bit and 16-bit resolution |
| `tb/tb_cordic_prerotate.sv` | random samples in both modes; every kind of quarter turn must occur |
| `tb/tb_cordic_stage.sv` | rows 0, 3 and 15 against a real-arithmetic model; both directions in both modes |
| `tb/tb_cordic_pipeline.sv` | end to end at the default size (see below) |
| `tb/tb_cordic_tables.sv` | the 30-degree rotation and the (1, 2) vectoring traced row by row |

## Simulating

Every testbench checks its own results. Each one prints
`TB_RESULT checks=N failures=M` and calls `$finish`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/cordic_pkg.sv rtl/cordic_atan_lut.sv rtl/cordic_prerotate.sv \
        rtl/cordic_stage.sv rtl/cordic_pipeline.sv tb/tb_cordic_pipeline.sv \
        --top-module tb_cordic_pipeline
    ./obj_dir/Vtb_cordic_pipeline

The package must come first. Each testbench runs in well under a second.

`tb_cordic_pipeline` runs the top level with its default parameters. It has
four phases:

1. Sweep the angle from 0 to 360 degrees in 1-degree steps, with x = 19429 and
   y = 0. This traces a cosine and a sine of amplitude about 32000, one sample
   per clock.
2. The 30-degree rotation.
3. The atan(2) vectoring.
4. 4000 cycles of random mixed traffic with random gaps.

Every result is checked against `$sin`, `$cos`, `$atan2` and `$sqrt`, scaled
by K. Its latency must be exactly 17 cycles. The testbench also counts how
often each mechanism occurs, and fails if any of them never happens:

- each of the three quarter-turn cases in each mode;
- back-to-back samples;
- gaps;
- changes of mode between consecutive samples.

## Design choices and departures

The following follow the classic parallel-pipelined CORDIC:

- the row structure;
- the shift amounts 0..15;
- 16 iterations for 16-bit data;
- a register between rows;
- both modes;
- the uncompensated gain, with inputs pre-scaled by 1/K;
- the +-90 degree input turn.

The following are this design's own choices:

- **Register after the last row.** The outputs come straight from flip-flops.
  A version without it would save one cycle of latency but leave a full row of
  logic on the output.
- **Quadrant row as its own pipeline stage.** This costs one cycle of latency.
- **Valid bit and per-sample mode.** Both travel down the pipeline with the
  data. The rotate-or-vector decision is a per-sample input rather than a build
  option.
- **Binary-angle format, 32 bits wide.**
- **Truncating shifts with no guard bits.** See the accuracy figures above.
- **Asynchronous reset of the valid bits only.**
- **No range reduction by atan(1/y) = pi/2 - atan(y).** Vectoring uses the
  quadrant row instead.

Not included:

- the iterative engine (one row with multiplexers and feedback registers);
- the unpipelined unrolled chain.

Both are the same rows arranged differently, and are what this pipeline
improves on. For reference, a published Virtex-5 implementation of this
architecture reports 873 flip-flops and 464.6 MHz. This RTL has not been run
through FPGA tools, so its clock rate is unknown.
