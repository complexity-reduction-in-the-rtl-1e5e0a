# Unrolled sine/cosine CORDIC with MUX-replaced first stages

An unrolled CORDIC computes cos(a) and sin(a) by rotating a vector through a
fixed sequence of angles ±arctan(2^-(i-1)), each rotation costing one adder per
coordinate plus one adder for the residual angle. This design removes the
first three of those rotations, and the first residual-angle adder, without
losing accuracy. It does so by observing that after three rotations from
(K, 0) the vector can only be in one of four places. The four results are
constants, so a handful of multiplexers choose among them. The first
comparison (is the angle above 45°?) becomes a small gate network instead of
an adder.

The core is fully combinational and sits between an input register and an
output register. It takes one new angle every clock cycle and returns the
result one cycle later.

## Number formats

| Quantity | Width | Format |
| --- | --- | --- |
| input angle `angle` | 22 | unsigned degrees, 7 integer + 15 fraction bits; valid 0 … 90° |
| residual angle (internal) | 23 | two's complement degrees, 8 integer (incl. sign) + 15 fraction bits |
| x, y (internal) | `XY_FRAC`+2 = 22 | two's complement, sign + 1 integer + 20 fraction bits |
| `cos_out`, `sin_out` | `OUT_FRAC`+2 = 17 | two's complement, sign + 1 integer + 15 fraction bits |

The coefficient angles α_i = arctan(2^-(i-1)) · 180/π, i = 1 … 19, are stored
in `cordic_pkg` as integers equal to α_i · 2^15 truncated toward zero
(1474560 for 45°, down to 7 for 0.000214°).

## Rotation sequence

This is the plain rotation-mode CORDIC the design is equivalent to. Here d_i = 1
means a counter-clockwise rotation:

    z1 = a,  (x1, y1) = (K, 0)
    x(i+1) = x(i) - (d_i ? +1 : -1) · y(i) · 2^-(i-1)
    y(i+1) = y(i) + (d_i ? +1 : -1) · x(i) · 2^-(i-1)
    z(i+1) = z(i) - (d_i ? +1 : -1) · α_i,      d_i = (z(i) >= 0)

After N_ROT = 19 rotations, x ≈ cos a and y ≈ sin a. This holds because the
starting length K is the inverse of the total CORDIC gain:
K = Π 1/√(1+2^-2i) = 0.607253 for 19 rotations. The package computes K with
a constant function, so it follows N_ROT.

## What replaces rotations 1–3

**Rotation 1** is always +45°, because the input angle is never negative.

**Rotation 2: the Sgn detector.** Its direction is d2 = (a ≥ 45°). No adder
computes a − 45°. The function below looks only at input bits 21..16, which
weigh 64, 32, 16, 8, 4 and 2 degrees:

    sgn = a21 | a20·a19 | a20·a18·a17·a16

The function is exact only at 2° resolution. It is true from **46°**, so
angles in [45°, 46°) take the "below 45°" branch. That is safe: the vector
then starts at 32.47°. The remaining rotations 4 … 19 can still turn it by up
to 14.28°, and the largest residual in that band is 13.53°. Testbenches
exercise the band on purpose.

**The angle MUX.** The residual after rotation 2 would be
a − 45° ∓ 26.565°. A MUX steered by `sgn` picks the constant α1+α2 = 71.565°
or α1−α2 = 18.435°. One adder then forms z3 = a − constant, and its sign is
d3. The remaining residual adders compute z4 … z19 as usual (`angle_row`:
17 adders).

**Rotation 3 and the start-vector MUXes.** (d2, d3) pick one of four
starting vectors for rotation 4:

| d2 d3 | start angle | (x4, y4) |
| --- | --- | --- |
| 0 0 | 4.40° | K·(13/8, 1/8) |
| 0 1 | 32.47° | K·(11/8, 7/8) |
| 1 0 | 57.53° | K·(7/8, 11/8) |
| 1 1 | 85.60° | K·(1/8, 13/8) |

These four points are where three rotations of (K, 0) by +45°, ±26.57° and
±14.04° land. The eighths come out exactly, because the shifts are 0, 1
and 2 bits. Each coordinate is a 4:1 choice built from two levels of 2:1
MUXes: d3 steers the first level and d2 the second. That makes six 2:1 MUXes
in all, plus the angle MUX. The constants are rounded once to 20 fraction
bits.

**Rotations 4 … 19** are ordinary micro-rotations (`rotation_stage`). Each
adds or subtracts the other coordinate, shifted right by i−1 bits. The shift
is a wired arithmetic shift, so it truncates toward −∞. The remaining
hardware is 16 x/y stages (32 adders) and 17 angle adders. A straightforward
19-rotation design needs 19 x/y stages and 18 angle adders.

## Module hierarchy

    cordic_final            input/output registers, valid bit, output truncation
    ├── sgn_detector        direction of rotation 2 from the top six angle bits
    ├── angle_row           angle MUX + residual adders -> dir[N_ROT-1:0]
    ├── start_vector_mux    six 2:1 MUXes -> (x4, y4)
    └── xy_rows             rotations 4 .. N_ROT
        └── rotation_stage  one micro-rotation (x and y adder)
    cordic_pkg              formats, coefficient angles, K and start constants

`dir[k]` is the direction of rotation k+1. `dir[0]` is constant 1 and
`dir[1]` is `sgn`. Every other bit is the sign of a residual angle.

## Interface and timing of `cordic_final`

| Port | Dir | Width | Meaning |
| --- | --- | --- | --- |
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset; clears valid bits and data registers |
| `in_valid` | in | 1 | `angle` is sampled at this rising edge |
| `angle` | in | 22 | degrees, 15 fraction bits |
| `out_valid` | out | 1 | `cos_out`/`sin_out` carry a new result |
| `cos_out`, `sin_out` | out | 17 | results, 15 fraction bits |

Suppose an angle is sampled at rising edge n. Its result is registered at
edge n+1, and `out_valid` is high after that edge. The data registers hold
their value while no valid sample is present. The whole unrolled core is one
combinational path between the two registers. The longest path runs through
the chain of residual-angle adders into the last rotation stage.

Parameters: `N_ROT` (4 … 19, default 19), `XY_FRAC` (default 20) and
`OUT_FRAC` (default 15, at most `XY_FRAC`). Every sub-module takes the same
parameters, and the start constants and K are recomputed from them.

## Accuracy

The error testbench streams the 32768 angles k·90/32768° through the core at
its default parameters. Measured against real cos/sin, the error is:

* cos: −4.1·10⁻⁵ … +0.7·10⁻⁵, mean −1.5·10⁻⁵, i.e. 14.6 bits
  (n = −log2 max|error|)
* sin: −3.8·10⁻⁵ … +0.8·10⁻⁵, i.e. 14.7 bits

Most of the error is the final truncation to 15 fraction bits. That
truncation alone costs up to 2^-15 = 3.05·10⁻⁵ and biases the error negative.
The rest comes from the last rotation angle (α19 = 3.7·10⁻⁶ rad) and the
truncating shifts. A reference design of this kind is reported to reach
about 15.3 bits, with an error range of −2.4·10⁻⁵ … +0.4·10⁻⁵. This
implementation stays slightly short of that, and more internal fraction bits
do not close the gap (22 or 24 bits give 14.7–14.8 bits). The remaining
difference lies in how the error is measured or rounded, which is not known
here.

## Where this RTL makes its own choices

* **Rotation count.** The default of 19 rotations matches the 19-entry
  coefficient table. An 18-rotation variant is obtained with `N_ROT = 18`.
* **Starting length.** K is the gain of all N_ROT rotations (0.60725). The
  0.6088 often quoted for this structure is the gain of five rotations only,
  and would make the outputs 0.25 % too large.
* **x/y width.** 20 fraction bits is a choice. With 5 guard bits over the
  output, internal rounding stays below the output LSB.
* **Registers.** The input and output registers, the valid bit, the
  asynchronous reset and the 1-cycle latency are choices.
* **Sgn detector.** It is kept exactly as its logic equation, threshold 46°
  (see above), and is written as a sum of products. The NAND-level mapping is
  left to synthesis.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
They need `--timing`:

    verilator --binary --timing --assert -Irtl rtl/cordic_pkg.sv rtl/*.sv \
        tb/tb_cordic_final.sv --top-module tb_cordic_final -o sim
    ./obj_dir/sim

| Testbench | What it checks |
| --- | --- |
| `tb_sgn_detector` | all 64 bit patterns; every whole degree 0 … 90 |
| `tb_angle_row` | direction bits against a residual recursion whose angles come from `$atan` |
| `tb_start_vector_mux` | the four start vectors against real-arithmetic rotations of (K, 0) |
| `tb_rotation_stage` | random micro-rotations, shifts 3 and 11, bit-exact |
| `tb_xy_rows` | random start vectors and directions, bit-exact; real-valued cos/sin for known angles |
| `tb_cordic_final` | end to end at default parameters: corner and random angles, error ≤ 2^-14, latency exactly 1 cycle, reset. It also checks that all four start vectors, both angle-MUX settings and the 45–46° band were exercised |
| `tb_error_sweep` | 32768-angle error sweep; reports error range and bits, requires ≥ 14 bits |

To change the widths, override `XY_FRAC`/`OUT_FRAC` on `cordic_final`. The
testbenches assume the default 17-bit outputs.
