# 32x32 HEVC forward DCT with shift-and-add constant multipliers

HEVC codes residuals with integer DCTs up to 32x32. A 2D transform of that size is
usually built as a 1D row transform, a transpose memory and a 1D column transform.
The transpose memory is fixed by the largest block size. The two 1D transforms are
the part whose area can be reduced, and most of that area is multipliers.

This RTL removes every general multiplier from the 1D transform, in two steps:

1. **Partial butterfly.** Sums and differences of mirrored inputs split the 32-point
   transform into smaller ones. This is the decomposition of the HEVC reference
   encoder (HM). Only about a third of the 32x32 products remain.
2. **Multiple constant multiplication (MCM).** Each value left to multiply is
   multiplied by a fixed, known set of constants. One shift-and-add network per value
   produces all of those products at once. A partial product shared by several
   constants (for example 5x, inside both 21x and 10x) is built only once.

The MCM networks take a bound on their **adder depth**: the longest chain of adders
from the input to any product. A tighter bound gives a shorter combinational path
but needs more adders. A looser bound allows more sharing and fewer adders. The
parameter `ADDER_DEPTH` (2, 3 or 4, default 4) sets this bound throughout the design.

## Data flow and timing

```
in_row[32] --> dct32_1d (rows, >>4) --> reg --> transpose_buffer --> dct32_1d (columns, >>11) --> reg --> out_col[32]
 9-bit residuals         16-bit words        32x32 x 16 bit                16-bit coefficients
```

- **Input.** One row of 32 residuals per clock, rows 0..31 of a block in order.
  Samples are 8-bit video, so residuals are 9 bits signed.
- **Output.** One beat per clock, 32 beats per block. Beat `u` (`out_idx = u`)
  carries column `u` of the coefficient block: `out_col[v]` is the coefficient at
  vertical frequency `v` and horizontal frequency `u`. `out_last` marks beat 31.
- **Registers.** Each 1D transform is purely combinational, with a register on each
  side. The critical path is a butterfly, an MCM network, a row sum and the rounding adder.
- **Rate and latency.** A block streams in at one row per clock and out at one
  column per clock. Blocks follow each other without gaps: 32 cycles per block. The
  first column of a block is valid 3 cycles after its last row is accepted.
- **Handshake.** Both ports use valid/ready. When `out_ready` is low, the output
  register holds. That backpressure reaches the transpose memory, and then `in_ready`.
- **Reset.** `rst_n` is asynchronous and active low. It clears only control state.

The result matches the HM forward transform bit for bit:

- First stage: `(sum + 8) >> 4`.
- Second stage: `(sum + 1024) >> 11`.
- Both stages keep 16-bit words.

For other bit depths, `BIT_DEPTH` sets the residual width (`BIT_DEPTH+1`). It also
sets the first shift (`BIT_DEPTH-4`), following HM. Only 8 bits is tested.

## The partial butterfly (`dct32_1d`)

For inputs `x[0..31]` and the HEVC matrix `T` (`dct_pkg::coef`), the butterfly stages are:

| stage | values, j in range | rows they produce |
|---|---|---|
| `E[j] = x[j]+x[31-j]`, `O[j] = x[j]-x[31-j]` | j < 16 | odd rows 1,3,..,31 from `O` |
| `EE[j] = E[j]+E[15-j]`, `EO[j] = E[j]-E[15-j]` | j < 8 | rows 2,6,..,30 from `EO` |
| `EEE[j] = EE[j]+EE[7-j]`, `EEO[j] = EE[j]-EE[7-j]` | j < 4 | rows 4,12,20,28 from `EEO` |
| `EEEE[j] = EEE[j]+EEE[3-j]`, `EEEO[j] = EEE[j]-EEE[3-j]` | j < 2 | rows 8,24 from `EEEO`; rows 0,16 from `EEEE` |

Row `k` is `sum_j T[k][j] * (stage value j)`. Every coefficient in one group is
multiplied by each value of that group. For example, each `O[j]` meets all 16
odd-row coefficients. So each value feeds one MCM block:

| value | MCM module | constants |
|---|---|---|
| `O[j]` (16 instances) | `mcm_odd32` | 90 88 85 82 78 73 67 61 54 46 38 31 22 13 4 |
| `EO[j]` (8) | `mcm_odd16` | 90 87 80 70 57 43 25 9 |
| `EEO[j]` (4) | `mcm_odd8` | 89 75 50 18 |
| `EEEO[j]` (2) | `mcm_odd4` | 83 36 |

Rows 0 and 16 use only ±64, so their multiplier is a 6-bit shift. Each row sum takes
the right product from each MCM block and adds or subtracts it, by the sign of the
matrix entry. `dct_pkg` computes at elaboration time which product and which sign
each row uses. It builds the matrix from 33 magnitudes `A[i]` by the rule
`i = (2n+1)k mod 128`, folded by cosine symmetry. So no 32x32 table is written out
anywhere.

Row sums are balanced adder trees: 4 levels for the odd rows, 3 for rows built from
`EO`, 2 for rows built from `EEO`. The paths through the deeper butterfly stages end
in smaller sums. On the path through `O`, the adder levels are:

- 1 in the butterfly;
- up to `ADDER_DEPTH` in the MCM network;
- 4 in the row sum;
- 1 for rounding.

The path through `EEEO` has the same kind of count: 4 + 2 + 1 + 1.

## The MCM networks and the adder-depth bound

Each MCM module is a list of *fundamentals*, which are odd multiples of the input:

```
f9  = (f1 <<< 3) + f1     // 9x, depth 1
f25 = (f1 <<< 4) + f9     // 25x, depth 2
f75 = (f25 <<< 1) + f25   // 75x, depth 3
```

Each output is a fundamental shifted left: 50x is `f25 <<< 1`, 18x is `f9 <<< 1`.
Every line is one adder or subtractor. Its depth is one more than the deeper of its
operands. One generate branch per depth bound holds a separate network. The bound
is met by construction, and the comment on each line gives that line's depth.

The networks were searched with a greedy, depth-bounded heuristic of the usual kind
(as in Hcub). The heuristic works in this order:

1. Add every constant reachable with one adder from the fundamentals already built.
2. Otherwise, add the intermediate value that brings the most remaining constants
   within one adder.
3. Otherwise, split the cheapest constant along its canonical-signed-digit form.

Adders per MCM block and per 1D transform:

| ADDER_DEPTH | mcm_odd32 | mcm_odd16 | mcm_odd8 | mcm_odd4 | MCM adders per 1D transform |
|---|---|---|---|---|---|
| 2 | 15 | 9 | 5 | 3 | 338 |
| 3 | 13 | 9 | 4 | 3 | 302 |
| 4 | 13 | 8 | 4 | 3 | 294 |

Each 1D transform also has other adders:

- 60 in the butterfly.
- 312 in the row sums.
- 32 for rounding.

Depth 4 is the default because it is the smallest network. Depths 2 and 3 trade
area for a shorter path. Internal words are `IW+11` bits, where `IW` is the input
width, and products are `IW+8` bits. Both widths are exact for every input.

### The two small example circuits

`mcm_fig1` and `mcm_fig2` are textbook-sized demonstrations of the same technique.
They sit beside the transform in the top level, on ports of their own (`ex1_*`,
`ex2_*`), and take no part in it.

- **`mcm_fig1`** builds 21x and 10x with two adders, because 5x = x + 4x is shared:
  21x = 16x + 5x and 10x = 5x << 1.
- **`mcm_fig2`** builds 101x and 50x in two ways:
  - Depth 2 uses 129x, 7x, 101x = 129x − 28x and 25x = 32x − 7x: four adders and five shifts.
  - Depth 3 uses 33x, 25x = 33x − 8x and 101x = 100x + x: three adders and four
    shifts. It saves one adder and one shifter at the price of one more adder level.

## The transpose memory (`transpose_buffer`)

It is a single 32x32 array of 16-bit registers. Writes are a whole row per clock and
reads a whole column per clock. To avoid a second 32x32 buffer, the storage
orientation alternates from block to block:

- A block stored as rows is read out as storage columns.
- While it is read, the next block is written *as columns*, into the storage columns
  already read.
- That block is then read as storage rows, and so on.

`in_ready` enforces one rule: storage line `w` of the new block can be written only
once line `w` of the old block has been read, at the latest in the same clock. At
full rate the writer and reader run in lockstep, so there is no stall. Under output
backpressure the writer waits. Two assertions check the rules:

- A write never overtakes a read.
- An offered column stays in place until it is taken.

## Files

| file | content |
|---|---|
| `rtl/dct_pkg.sv` | transform size, HEVC matrix rule, MCM constant lists |
| `rtl/hevc_dct32_top.sv` | top level: row transform, registers, transpose memory, column transform, example circuits |
| `rtl/dct32_1d.sv` | combinational 32-point partial butterfly with MCM blocks and rounding |
| `rtl/mcm_odd32.sv`, `mcm_odd16.sv`, `mcm_odd8.sv`, `mcm_odd4.sv` | MCM networks for depth bounds 2, 3 and 4 |
| `rtl/transpose_buffer.sv` | 32x32 transpose memory with alternating orientation |
| `rtl/mcm_fig1.sv`, `rtl/mcm_fig2.sv` | small MCM example circuits |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_hevc_dct32_depths` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
From the project root, for example:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/dct_pkg.sv \
    tb/tb_hevc_dct32_top.sv --top-module tb_hevc_dct32_top
./obj_dir/Vtb_hevc_dct32_top
```

Replace the testbench name to run another one. Building the full 2D design takes
about a minute. Running it takes well under a second.

Every testbench compares against a reference computed independently in the
testbench: a plain 32x32 matrix product, or the `*` operator. None of them use the
butterfly or the shift-and-add networks.

- `tb_hevc_dct32_top` is the end-to-end test at default parameters. It runs 10
  blocks: random, all +255, all −256, and a checkerboard. It covers:
  - full-rate streaming, checking 32 cycles per block and a latency of 3;
  - random valid/ready;
  - reads in both transpose orientations;
  - writes overlapping reads;
  - the example circuits.

  It fails if any of these never happens.
- `tb_hevc_dct32_depths` runs the whole 2D transform at `ADDER_DEPTH` 2 and 3.
- `tb_dct32_1d` checks the 1D transform in both its row and column configurations,
  at all three depths.
- `tb_mcm_*` test every output of every depth variant. The inputs are the extremes
  plus random values.

## How far to trust it, and where it departs

- **Bit-exact.** The arithmetic is exact against the HM forward transform for 8-bit
  video. The tests cover extreme inputs.
- **Transform size.** Only the 32-point transform is built. HEVC's 4-, 8- and
  16-point transforms are nested inside the 32-point butterfly (the even half), but
  there is no size selection. A block smaller than 32x32 cannot be transformed on
  its own.
- **MCM networks.** The networks are this design's own search results. They are not
  a reproduction of a specific published MCM algorithm's output. Adder counts will
  differ from other MCM tools.
- **Area and speed.** This design has not been mapped to a standard-cell library.
  For reference, the technique was reported to bring a 32-point 1D transform in a
  65 nm process from about 223K gates at 304 MHz (no MCM) to:

  | MCM adder depth | gates | clock |
  |---|---|---|
  | 2 | 139K | 279 MHz |
  | 3 | 124K | 273 MHz |
  | 4 | 120K | 269 MHz |

  Nothing here reproduces those numbers.
- **Structural choices.** The following are choices made for this RTL:
  - the register placement and valid/ready handshakes;
  - the single-buffer transpose scheme;
  - the 16-bit intermediate words;
  - the reset style.

  Pipelining inside a 1D transform is a known alternative for closing timing. It is
  not implemented. The adder-depth bound is used instead.
- **Lint warnings that remain.**
  - Unused upper bits of some fundamentals: each output keeps only the bits a
    product needs.
  - `rst_n` is used both as the asynchronous reset and in the assertions'
    `disable iff`.
