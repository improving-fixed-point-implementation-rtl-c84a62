# 4x4 QR decomposition with round-to-nearest at the cost of truncation

This is a fully pipelined fixed-point QR decomposition of 4x4 matrices, built from
CORDIC units that perform Givens rotations. All numbers are in a **half-unit biased (HUB)**
fixed-point format. In this format, truncating a result already rounds it to the nearest
representable value. Every adder and multiplier therefore rounds to nearest, yet needs no
rounding logic. Round-to-nearest has about half the error of truncation. So a HUB datapath
can be one bit narrower than a conventional truncating datapath with the same error bound.
The default word is 15 bits, which stands in for a conventional 16-bit design. The same RTL
built with `WIDTH = 31` stands in for a 32-bit one.

The method (HUB numbers, and a CORDIC iteration whose adder carry-in comes from the shifted
operand) follows the publication *Improving Fixed-Point Implementation of QR Decomposition
by Rounding-to-Nearest*. That publication describes the CORDIC iteration in detail. It does
not describe the array around it. The array, number format, iteration count and interfaces
in this RTL are this design's own (see [Own choices](#own-choices-and-departures)).

## HUB numbers

A HUB number stores `WIDTH` explicit two's-complement bits `x`. It also has an implicit
least significant bit that is always 1 and is never stored. Its value is

    value = (x + 1/2) * 2^-FRAC          FRAC = WIDTH - 3

So the representable values sit halfway between the grid points of a conventional format.
Three consequences shape the whole datapath:

* **Truncation rounds to nearest.** Take any exact result `w` in LSB units. The nearest
  HUB value is `floor(w) + 1/2`, so the explicit field is just `floor(w)`.
* **Negation is bit inversion.** `~x` is `-x - 1`, and `(-x - 1) + 1/2 = -(x + 1/2)`.
  So the one's complement is the exact negative, with no +1 and no carry chain.
* **No value is exactly 0 or 1.** The smallest magnitudes are +/- 1/2 LSB. The identity
  matrix that seeds Q therefore enters as explicit `0` (value +1/2 LSB) off the diagonal
  and `2^FRAC - 1` (value 1 - 1/2 LSB) on it.

With the default `WIDTH = 15` there are 12 fraction bits, two integer bits and a sign, so the
range is [-4, 4). Inputs must lie in (-1, 1). Then every column of R has a norm below 2. Before
gain compensation, values reach at most 1.647 x 2 = 3.3, which fits the range.

## The HUB CORDIC iteration (`hub_cordic_stage`)

This is the part that differs from a textbook CORDIC. Iteration `s` computes

    cnt = 1:  x' = x + (y >> s)    y' = y - (x >> s)     (clockwise)
    cnt = 0:  x' = x - (y >> s)    y' = y + (x >> s)     (counter-clockwise)

In a conventional CORDIC, a subtraction inverts the shifted operand and feeds the adder a
carry-in of 1. The carry-in is tied to the direction signal. In the HUB version the carry-in
comes from the operand itself:

1. Append the hidden 1 to the operand, giving `2x + 1` at half-LSB resolution. Shift it
   arithmetically right by `s`. The upper `WIDTH` bits are the shifted explicit field `q`.
   The bit below them, the first bit that drops off, is `P`.
2. The conditional inverter inverts both `q` and `P` when the term is subtracted.
3. The adder computes `x + q' + P'`, using `P'` as its carry-in.

Why this rounds to nearest: the exact sum is `x + 1/2 + q + r`, where `r` in [0, 1) is the
dropped fraction. Its HUB truncation is `x + q + floor(1/2 + r)`, which is `x + q + P`. The
half-LSB bits of the two operands (the hidden 1 of `x` and `P`) add to give a carry of
exactly `P`. Subtraction works the same way, using `~q = -q - 1` and the inverted `P`. For
`s = 0` the dropped bit is the hidden 1 itself. That stage then gets carry 1 when adding and
carry 0 when subtracting. An exact tie in a subtraction (dropped bits exactly one half) goes
to the lower of the two nearest values. The rounding error is therefore at most 1/2 LSB, where
truncation would give up to 1 LSB.

The two conditional inverters receive `cnt` in opposite polarity, so exactly one of the two
shifted terms is subtracted. The stage is combinational; the rotator puts a register after
each iteration.

## Gain compensation (`hub_scale_mult`)

`ITERS` micro-rotations stretch a vector by `K = prod_{i<ITERS} sqrt(1 + 2^-2i)`, which is
about 1.6468. Each output coordinate of a rotation is multiplied by the constant `1/K`. The
constant has `WIDTH + 8` fraction bits and is computed at elaboration by the constant
functions in `hub_pkg`. The multiplicand includes its hidden bit (`2x + 1`). So truncating the
product again gives the nearest HUB value, with an extra error under 1/1000 LSB from the
constant.

## One Givens rotation (`hub_givens_rotator`)

A Givens rotation turns two rows by the angle that zeroes the lower element of the pivot
column. The rotator holds the two rows as `LANES` pairs `(x_in[l], y_in[l])`, one pair per
column:

* **Lane 0 (vectoring).** At every iteration, `cnt` is set from the sign of this lane's `y`
  (`cnt = 1` while `y >= 0`). This drives `y` towards zero. A HUB number is never zero, so
  the sign bit alone decides.
* **Lanes 1 and up (rotation).** They use the same `cnt` as lane 0 in the same pipeline stage.
  So they turn by the same angle, without ever forming the angle.
* **Pre-rotation.** If the pivot `x` is negative, both rows are first negated by inverting
  their bits (a 180 degree turn). This keeps the pivot inside the CORDIC convergence range.
  The pivot then leaves with `x = +sqrt(x^2 + y^2)`. `flip_out` reports that the
  pre-rotation was applied.

Pipeline: one register after the pre-rotation, one after each of the `ITERS` iterations, and
one after compensation. Latency is `ITERS + 2` cycles (17 by default). A new row pair can enter
every cycle. `rst_n` (asynchronous, active low) clears only the valid pipeline. Data
registers are not reset.

When the pivot is only a few LSB long, its angle is only known to about `1 LSB / |pivot|`.
Longer lanes then see a proportionally larger error. That is inherent to any fixed-point
vectoring and does not affect `A = QR`, since Q and R receive the same rotation.

## The 4x4 array (`hub_qrd_4x4`, top)

The elements below the diagonal are zeroed column by column from the left. Within a column
they are zeroed from the bottom row up, each rotation using two adjacent rows:

| rotation k | 0     | 1     | 2     | 3     | 4     | 5     |
|------------|-------|-------|-------|-------|-------|-------|
| rows       | 2,3   | 1,2   | 0,1   | 2,3   | 1,2   | 2,3   |
| pivot col  | 0     | 0     | 0     | 1     | 1     | 2     |
| lanes      | 8     | 8     | 8     | 7     | 7     | 6     |

Each row carries eight values: its four columns of A, then one row of the 4x4 identity. The
same rotations turn `[A | I]` into `[R | Q^T]`. Rotation `k` is one `hub_givens_rotator` with
`8 - col` lanes. Columns to the left of the pivot are already zero and are not rotated. The
rows a rotation does not touch pass through a delay line of equal length. The result is a
two-dimensional grid of CORDIC lanes (rotation x column) that accepts one matrix per clock.

Interface:

| port        | dir | meaning                                                        |
|-------------|-----|----------------------------------------------------------------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of the valid pipeline  |
| `in_valid`  | in  | `a_in` holds a matrix this cycle                                |
| `a_in[r][c]`| in  | A, HUB, entries in (-1, 1)                                     |
| `out_valid` | out | results present, `6 * (ITERS + 2)` = 102 cycles after input    |
| `r_out[r][c]` | out | R; entries below the diagonal are residuals of a few LSB     |
| `qt_out[r][c]`| out | Q transposed, so `A ~ transpose(qt_out) * r_out`             |

The diagonal entries R[0][0] to R[2][2] come out non-negative. R[3][3] keeps the sign it
acquires, because no rotation uses row 3 as a pivot.

Parameters are `WIDTH` (15) and `ITERS` (15). Both the 15-bit and the 31-bit
(`WIDTH = 31, ITERS = 31`) builds are tested.

## Accuracy

`tb_hub_qrd_4x4` reconstructs `A' = Q R` in floating point for 50,000 random matrices with
entries uniform in (-1, 1). It reports the largest and mean element error `|A - A'|`:

| build     | max \|A - QR\| | mean \|A - QR\| | max \|Q^T Q - I\| |
|-----------|---------------|-----------------|------------------|
| 15 bits   | 2.86e-3       | 3.68e-4         | 3.28e-3          |
| 31 bits (20,000 matrices) | 5.5e-8 | 7.3e-9 | 6.1e-8       |

The source publication reports a maximum error of 6.9e-4 for its 15-bit HUB design and
1.5e-8 for its 31-bit one. Its mean errors are 1.5e-4 and 3.2e-9 for 16 and 32 bits. The
errors here are about four times larger in the maximum and about two times in the mean.
The likely causes are the array, binary point and iteration count chosen here. The
publication gives none of these, and its test matrices are not specified. Treat these numbers
as what this RTL achieves, not as a reproduction.

## Own choices and departures

* **Array structure.** The source bases its design on an earlier 2-D systolic pipelined QRD
  array, which it does not describe. The grid of rotators and delay lines here is a simple
  structure with the same Givens ordering. It is not that array.
* **Number format.** The binary point (2 integer bits + sign) and the identity encoding are
  this design's choices.
* **ITERS = WIDTH** iterations, shifts `0 .. ITERS-1`.
* **Pre-rotation** by bit inversion for a negative pivot.
* **Gain compensation.** One constant multiplier per output coordinate after every rotation.
  The source says only that multipliers compensate the CORDIC gain.
* **Direction encoding.** `cnt = 1` is the clockwise turn. The source does not fix which
  polarity is which.
* **Handshake.** A valid signal without back-pressure. Reset applies only to the valid bits.
* **Overflow.** Additions wrap; the input range above prevents overflow. An assertion in `hub_qrd_4x4` reports inputs outside (-1, 1) in simulation.
* **Not included.** The conventional (two's-complement, truncating) CORDIC the source compares
  against is not included.

## Files

| file | content |
|------|---------|
| `rtl/hub_pkg.sv` | format constant `INT_BITS`, CORDIC gain and `1/K` constant functions |
| `rtl/hub_cordic_stage.sv` | one HUB CORDIC iteration |
| `rtl/hub_scale_mult.sv` | `1/K` constant multiplier |
| `rtl/hub_givens_rotator.sv` | pipelined vectoring + rotation CORDIC for two rows |
| `rtl/hub_qrd_4x4.sv` | the 4x4 QRD array (top) |
| `tb/tb_hub_cordic_stage.sv` | every shift 0..14: result is a nearest HUB value of the exact sum |
| `tb/tb_hub_scale_mult.sv` | all 2^15 inputs against an independently computed product |
| `tb/tb_hub_givens_rotator.sv` | 3,000 streamed row pairs vs floating-point rotation, latency, pre-rotation |
| `tb/tb_hub_qrd_4x4.sv` | 50,000 matrices at default parameters: reconstruction, orthogonality, triangularity, latency, mechanism counts |
| `tb/tb_hub_qrd_4x4_w31.sv` | the same checks for the 31-bit build, 20,000 matrices |

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -j 4 -y rtl rtl/hub_pkg.sv tb/tb_hub_qrd_4x4.sv \
              --top-module tb_hub_qrd_4x4 -Mdir obj_qrd
    ./obj_qrd/Vtb_hub_qrd_4x4

Use the same command for any other testbench, with its name in place of `tb_hub_qrd_4x4`.
`rtl/hub_pkg.sv` must come first, because the modules import it. The top testbench reads the
internal `flip` signal of each rotation stage by hierarchical reference to count
pre-rotations. If the generate block names in `hub_qrd_4x4` change, those references must
change too.

To change the word length, set `WIDTH` (and normally `ITERS = WIDTH`) on `hub_qrd_4x4`. The
testbenches derive FRAC as `WIDTH - 3`. To move the binary point, change `hub_pkg::INT_BITS`
and the matching `FRAC` lines in the testbenches.
