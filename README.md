# Multiplier-free 8x8 approximate DCT with 12 additions per transform

JPEG-style image compression cuts an image into 8x8 blocks and applies a
two-dimensional discrete cosine transform (DCT) to each block. The exact DCT
needs real-valued multiplications. This design replaces the DCT matrix with
an 8x8 matrix `T` whose entries are only 0, +1 and -1. One 8-point transform
then costs 12 additions and no multiplier or shifter. The 2-D transform of a
block is `Y = T * X * T'`, computed as a row pass and then a column pass of
the same 1-D circuit, with a register-array transposition memory between
them. Every adder is a 12-bit add-one carry-select adder (A1CSA). All words
are 12 bits wide.

The design takes one row of eight samples per clock. It returns one column
of the result per clock, and runs continuously when blocks arrive back to
back.

```
 x_in[0..7] ──► row 1-D DCT ──► transposition ──► column 1-D DCT ──► y_out[0..7]
 (one row/clk)   (appdct1d)      memory 8x8x12     (appdct1d)         (one column/clk)
                                 (transpose_mem)
                     ▲                 ▲ shift, sel
 in_valid/in_ready ──┴── transpose_ctrl┘
```

## The transform

```
        | 1  0  0  0  0  0  0  1 |
        | 1  1  0  0  0  0  1  1 |
        | 0  0  1  0  0  1  0  0 |
    T = | 0  0  1  1  1  1  0  0 |        y = T * x
        | 0  0  1  1 -1 -1  0  0 |
        | 0  0  1  0  0 -1  0  0 |
        | 1  1  0  0  0  0 -1 -1 |
        | 1  0  0  0  0  0  0 -1 |
```

The sums and differences of mirrored inputs are shared, which gives a
two-stage butterfly (`rtl/appdct1d.sv`):

| stage | operations | adders |
|-------|------------|--------|
| 1 | `s_i = x_i + x_(7-i)`, `d_i = x_i - x_(7-i)`, i = 0..3 | 8 |
| 2 | `y1 = s0+s1`, `y3 = s2+s3`, `y4 = d2+d3`, `y6 = d0+d1` | 4 |
| pass-through | `y0 = s0`, `y2 = s2`, `y5 = d2`, `y7 = d0` | 0 |

Each stage ends in a register, so the 1-D transform has a latency of 2
clocks and accepts a new vector every clock. Output `y_k` is row `k` of
`T`. This ordering is not the frequency order of the real DCT (`y0` is
`x0 + x7`, for example). A quantiser that follows the transform must use
the same order.

The inverse transform is `T^-1 = 1/2 * M`, where `M` also has only 0 and
±1 entries:

```
    M = [ 1 0 0 0 0 0 0 1;  -1 1 0 0 0 0 1 -1;  0 0 1 0 0 1 0 0;  0 0 -1 1 1 -1 0 0;
          0 0 -1 1 -1 1 0 0;  0 0 1 0 0 -1 0 0;  -1 1 0 0 0 0 -1 1;  1 0 0 0 0 0 0 -1 ]
```

The factor 1/2 per dimension is meant to be folded into the
(de)quantisation tables. No inverse-transform hardware is included here.

## Word width: why 12 bits are enough

The top expects signed 8-bit samples, i.e. pixels already level-shifted by
-128 as JPEG does. Each pass grows values by at most a factor of 4, because
a row of `T` sums at most four inputs:

| point | range |
|-------|-------|
| input sample | -128 .. 127 |
| after row pass | -512 .. 510 |
| after column pass | -2048 .. 2044 |

So both passes fit exactly in 12-bit two's complement, and no stage ever
wraps. If you feed raw 0..255 pixels instead, the row pass still fits, but
the column pass can reach 4080 and will wrap. To accept raw pixels, invert
the MSB of each sample before `x_in`, or raise `WIDTH`. `WIDTH` must be a
multiple of 4, because of the adder slices.

## The A1CSA adder

`rtl/a1csa.sv` splits a 12-bit addition into three 4-bit slices. Each slice
is added by a carry look-ahead block (`rtl/cla4.sv`).

- **Lowest slice.** It receives the real carry in.
- **Upper slices.** Each is added only once, assuming carry in 0. This gives
  a provisional sum `s0` and a slice carry `cb`.
- **Correction.** When the real carry `c` into an upper slice is known, the
  slice adds one to `s0` (hence "add-one").
  - Bit `j` flips when `c` and all lower bits of `s0` are 1.
  - `P = &s0` says whether the added one runs through the whole slice.
  - The carry out of the slice is `cb | (P & c)`.

A conventional carry-select adder keeps two adders per slice and a
multiplexer. Here each slice has one adder, and the only path between
slices is the short `cb | (P & c)` chain. Subtraction is `a + ~b + 1`,
using the carry in of the lowest slice. Of the butterfly's 12 adders, 4 are
used as subtractors.

## The transposition memory

The row pass produces row vectors, but the column pass needs column
vectors. `rtl/transpose_mem.sv` is an 8x8 array of 12-bit registers. In
front of every register is a 2:1 multiplexer that takes either the register
above or the register to the left. A single select line `sel` drives all
the multiplexers.

- `sel = 1`: the array shifts **down**. The eight input words enter the top
  row, and the bottom row is the output.
- `sel = 0`: the array shifts **right**. The eight input words enter the
  left column, and the right column is the output.

### How one array transposes a continuous stream

Suppose eight rows are written while the array shifts down. Each row now
occupies one row of the array, in arrival order. Now flip `sel` and shift
right eight times. On each shift, the right-most column leaves the array.
That column holds one element from every stored row, so it is a column
vector of the block. Meanwhile, the same sideways shifts write the next
block into the array from the left, one column per row vector.

After eight clocks, the first block has left and the second one fills the
array, now stored "on its side". Flipping `sel` back and shifting down
reads the second block out through the bottom row, and writes a third block
from the top. Alternating the direction every eight clocks therefore
transposes an endless stream of blocks. It uses one 64-register array, with
no double buffering and no address logic.

Input word `j` enters at the mirrored position (column `7-j` when shifting
down, row `7-j` when shifting sideways). With this entry order, output `j`
is always row `j` of the block being read. On the `k`-th shift of a
read-out, `dout[j] = block[j][k]`. The last block of a burst leaves during
the eight clocks after its last row was written.

## Sequencing and the input handshake

`rtl/transpose_ctrl.sv` divides time into **phases** of eight shifts. In
each phase the controller:

- writes a block, if rows arrive;
- reads out the block written in the previous phase, if there was one;
- flips `sel` at the end of the phase.

When a block is followed by no input, the controller still runs one more
phase with no input, to empty the memory. Because a block must start on a
phase boundary, `in_ready` is low during such an emptying phase. It is
never low while blocks arrive back to back.

The protocol at the top:

- A block is eight rows on eight consecutive clocks with `in_valid` high,
  row 0 first.
- A block may begin on any clock where `in_ready` is high.
- Once begun, `in_valid` must stay high for all eight rows. An assertion
  checks this.

The controller keeps its state in the time frame of the input. It delays
`shift`, `sel` and the read-out valid flag by `ROW_LAT = 2` clocks, so that
they reach the memory together with the rows coming out of the row pass.
This lets `in_ready` be computed without looking ahead.

### Timing of one block

| event (clock numbers from the first row) | clocks |
|---|---|
| rows 0..7 sampled at the input | 0 .. 7 |
| transformed rows written into the memory | 2 .. 9 |
| columns 0..7 read from the memory into the column pass | 10 .. 17 |
| `out_valid` high, result columns 0..7 on `y_out` | 12 .. 19 |

The first result column leaves 12 clocks after the first row entered
(2 + 8 + 2). With blocks back to back, one block completes every 8 clocks.
On the `k`-th valid clock of a block, `y_out[j] = Y[j][k]`.

## Top-level interface (`appdct2d_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst` | in | 1 | synchronous reset, active high |
| `in_valid` | in | 1 | `x_in` carries a row |
| `in_ready` | out | 1 | a row may be given on this clock |
| `x_in[0:7]` | in | 8 x `PIX_W` (8) | one row of the block, signed samples |
| `out_valid` | out | 1 | `y_out` carries a result column |
| `y_out[0:7]` | out | 8 x `WIDTH` (12) | column `k` of `Y = T X T'` on the `k`-th valid clock |

Parameters: `PIX_W = 8` and `WIDTH = 12`. The shared constants live in
`rtl/appdct_pkg.sv`.

Size after generic synthesis: 399 flip-flop bits in the two pipelines and
the controller, plus 768 register bits in the array (8 x 8 x 12), which
makes 1167 register bits. The datapath uses 24 A1CSA adders.

## Files

| file | content |
|------|---------|
| `rtl/appdct_pkg.sv` | shared constants (transform size, word width, slice width, sample width) |
| `rtl/cla4.sv` | 4-bit carry look-ahead adder |
| `rtl/a1csa.sv` | WIDTH-bit add-one carry-select adder |
| `rtl/appdct1d.sv` | 8-point 12-addition transform, 2-stage pipeline |
| `rtl/transpose_mem.sv` | 8x8 alternating-direction transposition array |
| `rtl/transpose_ctrl.sv` | phase sequencer, select line, handshake |
| `rtl/appdct2d_top.sv` | the 2-D transform |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/appdct2d_image_tb.sv` | a 64x64 test image through the whole design |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends any run that hangs. For example, for the whole design:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/appdct_pkg.sv tb/appdct2d_top_tb.sv --top-module appdct2d_top_tb -o sim
./obj_dir/sim
```

Substitute the testbench name for the other modules.

## What has been verified

Each testbench compares the outputs with values computed separately, in
integer arithmetic from the matrix `T`, not from the butterfly:

| testbench | what it checks |
|-----------|----------------|
| `cla4_tb` | exhaustive |
| `a1csa_tb` | every slice-carry pattern, 20 000 random additions, 2 000 random subtractions |
| `appdct1d_tb` | 3 000 vectors with idle clocks between them; 2-clock latency |
| `transpose_mem_tb` | 40 back-to-back blocks in both directions; hold clocks; emptying within 8 clocks |
| `transpose_ctrl_tb` | predicted shift / valid / index / select on every clock over 300 blocks with random gaps |
| `appdct2d_top_tb` | 400 blocks, see below |
| `appdct2d_image_tb` | a generated 64x64 image, 64 blocks back to back; exact reconstruction through `M Y M' / 4`; 64 blocks in 8 x 64 + 12 clocks |

`appdct2d_top_tb` runs with default parameters. Its 400 blocks include
extreme blocks that reach -2048. It checks the 12-clock latency and
consecutive output columns. It also requires that each of these happened
at least once:

- a block following directly after the previous one;
- the memory emptying with no input;
- `in_ready` refusing a start.

Not verified: timing closure at any clock rate, and gate-level behaviour.
The published FPGA prototype (Spartan-3E) ran at 176 MHz; no timing has
been checked for this RTL.

## Design choices and departures

Taken from the published architecture:

- the matrix `T` and its 12-addition count;
- the 8 + 4 adders in two registered stages;
- 12-bit A1CSA adders built from 4-bit carry look-ahead slices;
- the 8x8 array of 12-bit registers with a multiplexer per register, which
  shifts down while rows are loaded and is switched by a select line for
  read-out;
- the row-pass / transpose / column-pass structure.

Choices made for this RTL:

- **Input samples.** Signed 8-bit, pre-shifted by -128.
- **Output order.** Output `k` of the 1-D transform is row `k` of `T`.
  The published butterfly drawing and its simulation trace number the
  outputs differently (their output 0 carries `x0 + x1 + x6 + x7`, row 1
  of `T`). Here the matrix order is kept; renumber `y_out` if the other
  order is wanted.
- **Continuous transposition.** The next block is loaded while the current
  one is read out, with the direction alternating every phase.
- **Controller.** The phase-counter controller and the
  `in_valid`/`in_ready` handshake are this design's own.
- **Reset.** Synchronous, active high.
- **A1CSA carry in.** The lowest slice of the A1CSA takes a carry in. This
  is used for subtraction; for addition it is 0.
- **Scaling.** The scaling by 1/2 and the quantiser are left to the
  surrounding system.
