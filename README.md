# Multiplier-free 16 x 16 approximate 2D DCT

This is a streaming two-dimensional discrete cosine transform for image and
video blocks. It uses only adders: no multipliers and no shifters. The exact
DCT needs cosine multiplications. Here it is replaced by an *approximate* DCT
whose matrix holds only 0, +1 and -1, so every coefficient is a short signed
sum of input samples. An 8-point transform costs 12 additions. A 16-point
transform is made from two 8-point ones and 16 more additions. The 2D
transform runs a row pass and a column pass with a transposition buffer
between them.

Every addition is done by a 16-bit ripple carry adder built from one-bit
full-adder cells. In the original circuit those cells are 8-transistor
Modified Gate Diffusion Input (MGDI) full adders. The RTL keeps that adder
structure but describes the cells only by their logic function.

The default configuration transforms 16 x 16 blocks of 8-bit pixels. It takes
one row per clock and gives one column of coefficients per clock. An
8 x 8 configuration is available with a parameter.

## The 8-point approximate transform (`dct8_approx`)

The transform is `y = T8 * x` with

```
        x0 x1 x2 x3 x4 x5 x6 x7
  y0  [  1  0  0  0  0  0  0  1 ]
  y1  [  1  1  0  0  0  0  1  1 ]
  y2  [  0  0  1  0  0  1  0  0 ]
  y3  [  0  0  1  1  1  1  0  0 ]
  y4  [  0  0  1  1 -1 -1  0  0 ]
  y5  [  0  0  1  0  0 -1  0  0 ]
  y6  [  1  1  0  0  0  0 -1 -1 ]
  y7  [  1  0  0  0  0  0  0 -1 ]
```

The approximation's scale factor is a constant 1/2
on every output. The RTL leaves it out, since a quantiser can absorb it.

The sums share terms, so 12 adders suffice. They are arranged in two
pipeline stages:

* **Stage I** (8 adders, a butterfly): `s_i = x_i + x_(7-i)` and
  `d_i = x_i - x_(7-i)` for i = 0..3.
* **Stage II** (4 adders): `y1 = s0 + s1`, `y3 = s2 + s3`, `y4 = d3 + d2`,
  `y6 = d0 + d1`. The other outputs are stage I values passed on:
  `y0 = s0`, `y2 = s2`, `y5 = d2`, `y7 = d0`.

A register bank follows each stage, so a vector comes out two clocks after it
enters. The unit accepts a new vector every clock.

## From 8 to 16 points (`dct16_input_adder`, `dct16_approx`)

The 16-point transform is `C16 = P16 * diag(T8, T8) * B16`:

1. **Input adder unit** (`B16`, 16 adders, one register stage). The upper
   half gets `v[i] = x[i] + x[15-i]` and the lower half gets
   `v[8+i] = x[7-i] - x[8+i]`, for i = 0..7.
2. **Two 8-point units.** Each half goes through its own `dct8_approx`.
3. **Output permutation unit** (`P16`, wiring only). The upper unit supplies
   the even coefficients and the lower unit the odd ones:
   `f[2k] = upper[k]` and `f[2k+1] = lower[k]`.

This costs 16 + 2 * 12 = 40 additions and has a latency of 3 clocks. The same
construction (two N-point units, an input butterfly and an interleave) would
give 32 points from two 16-point units. That extension is not built here.

## The transposition buffer (`transpose_buffer`)

The row pass gives out one *row* of N results per clock. The column pass
needs one *column* per clock. The buffer sits between them. It has three
parts:

* an N x N grid of word registers;
* a counter `cnt` that indexes the current row;
* N output multiplexers, each picking one of N grid registers, followed by N
  output registers.

The buffer must run at full rate ("real time"), so it is read and refilled at
the same time. With a single grid this only works if the write direction
alternates from block to block:

| block written in | row r of that block goes to | column k is read back from |
|------------------|-----------------------------|----------------------------|
| mode 0           | grid column r               | grid row k                 |
| mode 1           | grid row r                  | grid column k              |

Say block b was written in mode 0. While block b+1 arrives, beat k reads
grid row k, which holds column k of block b. The same beat writes row k of
block b+1 into grid row k, the slot just freed. Block b+1 therefore ends up
stored in mode 1. During block b+2 it is read out column by column, and
block b+2 is written into the freed grid columns. The `wr_mode` bit toggles
at every block boundary. The multiplexers use it to pick grid row or grid
column.

Timing follows from this:

* The buffer advances only when `in_valid` is high.
* Column k of block b is on `dout` (with `out_valid` and `col_idx = k`) in
  the cycle after row k of block b+1 was accepted.
* The first block produces no output while it fills the buffer.
* **The last block needs a push.** Feed another block, or N rows of filler,
  to get it out.
* Gaps in `in_valid` simply stretch both streams.

## The top: `dct2d_approx`

```
pix rows --> [1D DCT, rows] --> [transposition buffer] --> [1D DCT, columns] --> coef columns
```

Both passes use the same 1D unit: `dct16_approx` for N = 16, `dct8_approx`
for N = 8.

| port         | dir | width         | meaning                                          |
|--------------|-----|---------------|--------------------------------------------------|
| `clk`        | in  | 1             | clock                                            |
| `rst_n`      | in  | 1             | asynchronous active-low reset (valid flags, counter, buffer mode) |
| `in_valid`   | in  | 1             | `pix` holds a row                                |
| `pix[N]`     | in  | N x `PIX_W`   | pixel row r, `pix[i]` = s(r, i), unsigned        |
| `coef_valid` | out | 1             | `coef` holds a result column                     |
| `coef[N]`    | out | N x 16 signed | column k of Z: `coef[v] = Z[v][k]`               |
| `col_idx`    | out | log2 N        | k                                                |

The rows of a block enter in order 0..N-1. For pixel block S the result is
`Z = T * S * T'`, where T is the N-point matrix above, with no scaling.
Pixels are zero-extended to 16 bits.

**Latency.** Column k of block b leaves `2*L1 + 1` clocks after row k of
block b+1 enters. L1 is the 1D latency: 3 for N = 16, 2 for N = 8. With a
continuous stream at N = 16, the first coefficient column of block 0
appears 23 clocks after its first row. After that, one column follows per
clock.

**Parameters.** `N` = 16 (the main configuration) or 8. `PIX_W` = 8.
`dct_pkg::DATA_W` = 16 is the word width of every adder and register.

## Word width and the adders (`rca_addsub`, `mgdi_fa8t`, `stage_reg`)

All arithmetic is 16-bit two's complement. Each addition is an
`rca_addsub`: a chain of 16 `mgdi_fa8t` full-adder cells. It subtracts by
inverting operand b and setting the carry in. Results wrap, but nothing can
overflow for 8-bit pixels:

* A 16-point output sums at most 8 inputs, so each pass grows values by at
  most a factor of 8.
* The worst 2D coefficient is 64 * 255 = 16320, which is below 2^15.

`stage_reg` is the per-stage register bank. Only the valid flags and
counters are reset; the data registers are not.

The cost at N = 16 is 80 adders of 16 bits. On top of that come the
pipeline registers and the 256-word transposition grid.

## How this RTL relates to the original circuit

Taken from the original architecture:

* the 0/+1/-1 matrix and its 12-adder, two-stage structure;
* the 16-point construction from an input adder unit, two 8-point units and
  an output permutation;
* the row / transpose / column chain with identical 1D units;
* the 16-bit ripple carry adders of full-adder cells, and subtraction by
  two's complement;
* a grid of registers, a counter and per-output multiplexers in the
  transposition buffer;
* the 16 x 16 main configuration.

Choices made here, where the original is silent or unclear:

* **Transistor level.** The MGDI cell is a transistor circuit with sized
  (weak) nMOS devices and bulk ties for full swing. `mgdi_fa8t` models only
  its Boolean full-adder function. Area, power and speed of the cell are not
  represented.
* **Registers.** The stage registers are edge-triggered flip-flops. The
  original describes them as latches that delay data by one unit.
* **Stage II alignment.** The four pass-through outputs of the 8-point unit
  are also registered in stage II, so that all eight outputs leave
  together.
* **Output labels.** The order of the 8-point outputs follows the matrix
  above (output k is row k). A drawing of the original circuit labels its
  outputs in a different order.
* **Input butterfly details.** The pairing and sign of the differences, and
  the register after the input adder unit, are this design's choice.
* **Transposition buffer operation.** In the original drawing the grid's
  registers appear to be chained per input lane. How that chain is read
  while refilled is not spelled out, so this design uses the
  alternating-direction grid described above instead.
* **Interface.** The valid handshake, the reset, the pixel format (unsigned,
  zero-extended), the column-per-beat output order and the flush behaviour
  are all this design's own.
* **Scaling.** The approximation's scale factor is not applied.

## Verification

Each module has a self-checking testbench in `tb/`. The reference model is
`tb/tb_dct_ref_pkg.sv`. It writes out T8, builds T16 from it as
`P16 * diag(T8, T8) * B16`, and computes 1D and 2D results by plain integer
matrix products.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_mgdi_fa8t`          | all 8 input combinations |
| `tb_rca_addsub`         | corner cases and 4000 random add/subtract operations, result and carry |
| `tb_stage_reg`          | one-clock delay |
| `tb_dct8_approx`        | 3000 random vectors with random gaps; values and 2-clock latency |
| `tb_dct16_input_adder`  | 3000 random vectors; values and 1-clock latency |
| `tb_dct16_approx`       | 3000 random vectors; values and 3-clock latency |
| `tb_transpose_buffer`   | 12 random 16 x 16 blocks with gaps; every column, its index and its cycle; blocks in both write directions |
| `tb_dct2d_approx`       | the top at default parameters (16 x 16): 10 blocks plus a flush block |
| `tb_dct2d_approx_n8`    | the same test at N = 8 |

The two top-level tests use random, all-255 and checkerboard blocks. They
check every coefficient and the exact output cycle. They also count, and
require at least once:

* blocks sent back to back;
* idle beats inside a block;
* blocks verified in each buffer write direction;
* the final flush.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_dct2d_approx rtl/dct_pkg.sv tb/tb_dct_ref_pkg.sv tb/tb_dct2d_approx.sv
./obj_dir/Vtb_dct2d_approx
```

For another testbench, replace its name. Testbenches that do not use
`tb_dct_ref_pkg` do not need that file on the command line.

## Changing it

* **8 x 8 blocks.** Instantiate `dct2d_approx #(.N(8))`.
* **Another 1D approximation.** Replace `dct8_approx`, keeping its ports and
  latency. The 16-point wrapper and the 2D chain stay as they are. If the
  latency changes, update `L1` in `dct2d_approx`.
* **Wider pixels.** Raise `PIX_W`. Keep `64 * (2^PIX_W - 1) < 2^(DATA_W-1)`,
  or raise `DATA_W` in `dct_pkg`.
* **Faster adders.** Swap `rca_addsub` for another adder with the same
  ports. The function does not change.
