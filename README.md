# Multiplierless 8x8 2-D DCT and IDCT processors built on CORDIC rotation

This design computes the 8x8 two-dimensional discrete cosine transform (DCT) and its inverse
(IDCT), as used by JPEG, MPEG-4 and H.264. It uses no multipliers. Each product by a cosine
coefficient is done by a CORDIC rotator, which only shifts and adds. There is one processor
for each direction. Each takes one row of 8 samples per clock and returns one column of 8
results per clock. Inside, it has:

* two 8-point 1-D transform processors (P1 and P2), each with five CORDIC rotators and 18 adders;
* a single 64-word memory bank that transposes the intermediate result;
* a 6-word coefficient ROM;
* a small control unit.

The architecture follows a published CORDIC-based DCT/IDCT design: the structure, the rotation
angles, the memory sizes, the rate and the 1-D latency come from it. The arithmetic details,
the control and the interfaces are this implementation's own. Section
[Departures and choices](#departures-and-choices) lists them.

## The transform and its scaling

The orthonormal 8-point DCT is `Y = T x`. Here `T = (1/sqrt 8) * T'`, and the matrix `T'` holds
only ±1 and six constants:

```
a = sqrt2 cos(pi/16)   b = sqrt2 cos(pi/8)    c = sqrt2 cos(3pi/16)
d = sqrt2 cos(5pi/16)  e = sqrt2 cos(3pi/8)   f = sqrt2 cos(7pi/16)
```

The 1-D processors compute `T' x`, the transform without the `1/sqrt 8`. The 2-D transform is
separable, `Z = T (T X^t)^t`. So two unnormalised passes give `8 Z`. The 2-D processor removes
the 8 with a 3-bit arithmetic right shift at its output. This shift is the only scaling step.
Every intermediate value therefore keeps the same scale, and no path needs a different
correction.

The six constants come in pairs that are the cosine and sine of one angle, times sqrt 2:

| pair  | angle   |
|-------|---------|
| (a,f) | pi/16   |
| (d,c) | 5pi/16  |
| (e,b) | 6pi/16  |

Every multiplication can therefore be written as a rotation scaled by sqrt 2:

```
R_theta(x, y) = sqrt2 * ( cos(theta) x - sin(theta) y ,  sin(theta) x + cos(theta) y )
```

This is the one operation `cordic_rot` computes.

## 8-point DCT as five rotations (`dct1d`)

The input butterfly splits the vector into sums and differences:

* sums: `s_k = x(k) + x(7-k)`;
* differences: `d0 = x0-x7`, `d1 = x6-x1`, `d2 = x2-x5`, `d3 = x4-x3`.

The sign convention of the differences makes the odd half regular.

**Even half.** There is no multiplier for `Y0` and `Y4`, and one rotator for `Y2` and `Y6`:

```
Y0 = (s0+s3) + (s1+s2)        Y4 = (s0+s3) - (s1+s2)
(Y6, Y2) = R_{6pi/16}(s0-s3, s1-s2)
```

**Odd half.** Each of the four outputs is a sum of four products. Grouping the products in
pairs turns them into four rotations, two by pi/16 and two by 5pi/16, followed by four adders:

```
U = R_{pi/16}(d0, d3)    V = R_{5pi/16}(d2, d1)
P = R_{5pi/16}(d0, d3)   Q = R_{pi/16}(d2, d1)
Y1 = U.x + V.x     Y7 = U.y + V.y     Y3 = P.y - Q.x     Y5 = P.x + Q.y
```

That makes five rotators and 8 + 4 + 2 + 4 = 18 adders. The pipeline has 8 registers:

| clock | work |
|-------|------|
| 1     | input butterfly |
| 2     | even butterfly |
| 3-7   | the rotators; `Y0` and `Y4` are formed in clock 3 and delayed alongside |
| 8     | odd output adders |

A vector enters every clock, and its result leaves 8 clocks later.

## 8-point IDCT (`idct1d`)

The IDCT is the transpose of the DCT. The transpose of a rotation by `theta` is a rotation by
`-theta`. A rotation by `-theta` is the same rotator fed with `(y, x)`, whose outputs are then
read swapped. So the IDCT uses the same five rotator structures: R0 at pi/16 (two copies), R2
at 5pi/16 (two copies) and R1 at 6pi/16.

```
g0 = Y0+Y4   g1 = Y0-Y4   (r2, r1) = R_{6pi/16}(Y2, Y6)
E0 = g0+r1   E3 = g0-r1   E1 = g1+r2   E2 = g1-r2
A = R_{pi/16}(Y7,Y1)   B = R_{5pi/16}(Y3,Y5)   C = R_{5pi/16}(Y7,Y1)   D = R_{pi/16}(Y3,Y5)
O0 = A.y+B.y   O1 = C.x+D.y   O2 = C.y-D.x   O3 = A.x+B.x
x0 = E0+O0  x7 = E0-O0   x1 = E1-O1  x6 = E1+O1   x2 = E2+O2  x5 = E2-O2   x3 = E3-O3  x4 = E3+O3
```

This also uses 2 + 8 + 8 = 18 adders and has a latency of 8 clocks:

| clock | work |
|-------|------|
| 1     | `g0`, `g1` |
| 2-6   | the rotators |
| 7     | `E` and `O` sums |
| 8     | output butterfly |

## The CORDIC rotator (`cordic_rot`)

The angle of every rotator is fixed, so the micro-rotation directions are fixed too. They are
worked out once, by running the rotation-mode recursion `z_{i+1} = z_i - sigma_i atan(2^-i)` from
`z_0 = theta`, and stored as one 32-bit word: bit `i` set means `sigma_i = -1`. The hardware
then does only the x/y recursion:

```
x_{i+1} = x_i - sigma_i 2^-i y_i      y_{i+1} = y_i + sigma_i 2^-i x_i      i = 0..14
```

Each step is one shifter pair and one add/subtract pair, with a constant shift. Fifteen steps
leave a residual angle error below 3e-5 rad. All angles are at most 67.5 degrees, inside the
basic convergence range, so the extended iteration sequence that starts with repeated 0 steps is
not needed.

Fifteen steps scale the vector by `K = prod sqrt(1 + 2^-2i) = 1.64676`. The rotator multiplies
the result by the constant `sqrt2 / K = 0.858795`, done with shifts and adds. That one step
removes the gain and adds the `sqrt 2` the coefficients need. The constant is stored in
canonical signed-digit form: 16 two-bit digits of weight `2^-j`, where `01` = +1, `11` = -1 and
`00` = 0. Its value is `1 - 2^-3 - 2^-6 - 2^-11 - 2^-13 + 2^-15`, which is six shifted terms.

The 15 steps are spread over 5 pipeline registers, 3 steps before each register. The
compensation sits in front of the last register. Shifts truncate.

## Coefficient ROM and its contents (`coef_rom`)

Both 1-D processors use the same three angles, so the ROM holds six words:

| address | word |
|---------|------|
| 0 | `32'h0000_7216`: directions for pi/16 |
| 1 | `32'h4cc0_30c1`: compensation |
| 2 | `32'h0000_6e8c`: directions for 5pi/16 |
| 3 | `32'h4cc0_30c1`: compensation |
| 4 | `32'h0000_0b24`: directions for 6pi/16 |
| 5 | `32'h4cc0_30c1`: compensation |

The compensation words are equal because every rotator runs the same 15 steps. The control
unit copies the ROM into a coefficient register after reset (6 clocks). That register feeds
all ten rotators of the processor.

## One memory bank as a transposer (`tpose_sram`, `ctrl_unit`)

P1 turns each row of the input block into a row of the intermediate result. P2 needs columns.
Normally this needs two banks, one being written while the other is read. Here one 64-word bank
is enough, because the write direction alternates from block to block:

* **Blocks 0, 2, 4, …:** P1 writes row `m` to memory line `m` as a row. P2 reads the block back
  column by column.
* **Blocks 1, 3, 5, …:** P1 writes row `m` of the block into memory *column* `m`. P2 reads the
  block back row by row, which again gives it the logical columns.

P2 starts reading a block in the clock after its last line is written. It then reads one line
per clock. P1 writes the next block in the same orientation that P2 is reading. So it writes
line `j` of block `n+1` no earlier than the clock in which P2 reads line `j` of block `n`.
The read is registered and sees the old contents when both happen in the same clock (read
before write). Neither side ever has to wait. Input gaps only delay P1. P2's 8-clock burst
always ends no later than the clock in which the next block can complete. If a block does
complete in that clock, the next burst follows without a gap.

The bank is a register array with one line-wide write port and one line-wide read port. Each
port handles a row or a column of 8 words, because 8 words per clock in and out leave no room
for a narrower memory.

The control unit's FSM has three states:

| state | what happens |
|-------|--------------|
| `LOAD` | reads the ROM; `in_ready` is low |
| `IDLE` | no read in progress |
| `READ` | 8-clock read burst |

Next to the FSM run a write line counter and the row/column orientation bit, which flips after
every eighth line. An assertion checks that a block never completes during a read burst except
in its last clock.

## Interfaces, number format and timing

`xform2d` is the 2-D processor: `INVERSE = 0` gives the DCT and `1` the IDCT. `dct_idct_top`
holds one of each, side by side, with separate ports and a shared clock and reset.

* **Words.** Every sample is 32-bit two's complement with 12 fractional bits, so an 8-bit
  pixel `p` enters as `p << 12`. For 8-bit input the largest internal value is about 2^15,
  against the 2^19 the format allows.
* **Input.** Use `in_valid` / `in_ready`, one row `x(m, 0..7)` per clock. Present the rows of a
  block in order, `m = 0..7`. Any number of idle clocks may separate rows, and also blocks.
  Rows offered while `in_ready` is low, for the 6 clocks after reset, are ignored.
* **Output.** `out_valid` comes with one column `Z(0..7, v)` per clock, `v = 0..7`, on 8
  consecutive clocks. There is no back-pressure: the consumer must accept every column.
* **Timing.** Counted from the clock in which a block's last row enters, its first column
  leaves 18 clocks later and its last 25 clocks later:

  | clocks | step |
  |--------|------|
  | 8 | P1 |
  | 1 | write |
  | 1 | registered read |
  | 8 | P2 |

  The processor sustains one block every 8 clocks, that is 8 samples per clock.
* **Chaining.** DCT output can feed the IDCT input directly. A column of `Z` is a row of
  `Z^t`, and `IDCT(Z^t) = X^t`, whose columns are the rows of `X`. The round trip therefore
  returns the image rows in their original order.

## Accuracy

Measured in simulation on a generated 512x512 8-bit image with edges, texture and noise. No
quantisation was applied between the transforms.

* **DCT coefficients.** Within 0.03 + 1e-4·|Z| of the exact values.
* **Round trip (DCT then IDCT).** Every sample is within 0.01 of the original. After rounding
  to 8 bits the image is reconstructed exactly.

The source design reports 44.6 dB PSNR for its 32-bit fixed-point version on a 512x512 test
image. Its rounding and scaling scheme is not known, so the two figures are not directly
comparable.

## Departures and choices

These follow the source design:

* the five-rotator, 18-adder 1-D processors;
* the angles pi/16 and 5pi/16 of the four odd rotators, and 6pi/16 of the IDCT's R1;
* the single 64-word bank written by rows and by columns alternately;
* the 6-word coefficient ROM;
* the 8-in/8-out rate per clock, the 8-clock 1-D latency and the 32-bit word.

These are this implementation's own:

* The angle of the DCT's even rotator (6pi/16, the same as the IDCT's R1). The exact wiring of
  the odd rotators and of the whole IDCT was derived here from the transform matrix.
* What the ROM words hold, the 15 micro-rotations, the precomputed directions (there is no
  angle datapath) and the signed-digit gain compensation.
* Where the 8 clocks of each 1-D processor fall, and the 5-register rotator pipeline.
* The unnormalised 1-D passes with a single shift by 3 at the output. The 3-bit shift
  truncates.
* The 12 fractional bits, the handshake, the absence of output back-pressure and the reset
  style: asynchronous active-low on control and valid bits only.
* The register-array realisation of the bank and its registered, read-before-write read port.
* The control FSM's states and the coefficient load after reset.

Not covered by this RTL: area, power and clock rate. The source design reports about 34 MHz
for a 0.18 µm standard-cell implementation, which depends on its cell library.

## Files

| file | contents |
|------|----------|
| `rtl/dct_pkg.sv` | word width, fraction bits, rotator constants, coefficient types, ROM address map |
| `rtl/cordic_rot.sv` | pipelined fixed-angle CORDIC rotator with gain compensation |
| `rtl/dct1d.sv`, `rtl/idct1d.sv` | 8-point 1-D DCT and IDCT processors |
| `rtl/tpose_sram.sv` | 64-word row/column transpose bank |
| `rtl/coef_rom.sv` | 6-word coefficient ROM |
| `rtl/ctrl_unit.sv` | control FSM, coefficient load, memory sequencing |
| `rtl/xform2d.sv` | 2-D DCT or IDCT processor |
| `rtl/dct_idct_top.sv` | both processors side by side |
| `tb/dct_ref_pkg.sv` | real-valued reference kernel and fixed-point helpers |
| `tb/tb_*.sv` | one self-checking testbench per module |

`tb_dct_idct_top` is the end-to-end test. It runs the full 512x512 image (4096 blocks) through
the DCT and straight into the IDCT. It checks:

* every coefficient and every reconstructed sample;
* the PSNR of the rounded image;
* the 18-clock output timing.

It also counts the design's mechanisms and fails if one never happened: the coefficient load,
row-written blocks, column-written blocks, input gaps and back-to-back blocks.

Every testbench prints `TB_RESULT checks=N failures=M` at the end.

## Simulating

With Verilator 5, from the repository root (`tb_dct_idct_top` as the example):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct_idct_top.sv --top-module tb_dct_idct_top
./obj_dir/Vtb_dct_idct_top
```

Any other testbench builds the same way: replace the testbench file and the top-module name.
`-y rtl` lets Verilator find the modules by file name. The full-image test takes well under a
minute.

## Changing it

* **Precision.** Change `CORDIC_ITER` in `dct_pkg`. The direction words and the compensation
  constant in `coef_rom` must be recomputed to match, using the two recursions given in that
  file's header.
* **Rotator pipeline depth.** `CORDIC_STAGES` sets it. The 1-D processors' delay lines follow
  it, but their documented latency of 8 assumes 5.
* **Word width.** `W` on `xform2d` and on the modules below it is the word width. The ports of
  `dct_idct_top` use `DATA_W` from the package.
