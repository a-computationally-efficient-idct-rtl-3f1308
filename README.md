# Sparse 8x8 inverse DCT with a single 1-D unit

Most coefficients that reach the inverse DCT of a video decoder are zero:
after quantisation typically three quarters or more of an 8x8 block, and
still around half of the intermediate values between the two 1-D passes. A
conventional row-column IDCT computes inner products of whole vectors and
therefore spends the same time on every block: 64 samples per pass, 128
clocks per block at one sample per clock.

This design turns the computation around. Instead of computing each output as
an inner product, it takes one input coefficient at a time and adds its
contribution to every output it affects. A zero coefficient contributes
nothing, so it is never sent. A block then costs about as many clocks as it
has non-zero values, in the input and between the passes. That is fast
enough for one 1-D unit to do both passes of the 2-D transform.

## The algorithm

The 2-D IDCT is `Z = C X C^T`, where `C` is the 8x8 cosine kernel

    C[n][u] = 0.5 * c_u * cos((2n+1) u pi / 16),   c_0 = 1/sqrt(2), c_u = 1 otherwise

It is done in two passes: `Y = C X`, then `Z^T = C Y^T`.

In each pass, a coefficient `X[u][v]` meets only column `u` of the kernel.
It changes only column `v` of the result:

    Y[n][v] += C[n][u] * X[u][v]      for n = 0..7

The eight outputs of a vector are therefore eight accumulators. Each
non-zero coefficient adds its eight partial products to them. When the last
non-zero coefficient of the vector has been added, the accumulators hold the
result.

The kernel is symmetric: `C[7-n][u] = (-1)^u C[n][u]`. This halves the work.
Four multipliers form `C[k][u] * X` for k = 0..3. Each product goes to two
accumulators:

- the "add" accumulator of row `k`, which always adds it;
- the "add/sub" accumulator of row `7-k`, which adds it when `u` is even and
  subtracts it when `u` is odd.

The unit has 4 multipliers and 8 accumulators for an 8-point transform.

## Datapath

```
        core input ----+
                       |-- mux --+--> KSL0..KSL3 (u -> C[k][u])        stage 1
 transpose memory -----+         |
                                 v
                          4 multipliers                                stage 2
                                 v
              4 x (add accumulator, add/sub accumulator)               stage 3
                                 v
                     write bus (8 words at once)                       stage 4
                    /                          \
        transpose memory (pass 1)      output memory (pass 2)
```

| module          | role |
|-----------------|------|
| `idct2d_top`    | the whole 2-D IDCT |
| `idct_ctrl`     | sequences the two passes; feeds only non-zero values to the unit |
| `idct_1d`       | the 1-D unit: input mux, kernel select, multipliers, accumulators |
| `ksl`           | kernel select logic: `u` -> `C[ROW][u]`, one instance per upper row |
| `idct_mult`     | registered signed multiplier |
| `acc_pair`      | the add and add/sub accumulators behind one multiplier |
| `write_bus`     | rounds and routes a finished vector to one of the two memories |
| `transpose_mem` | first-pass result `Y`, with a non-zero flag per word |
| `output_mem`    | result block `Z`, with a "written" flag per row |
| `idct_pkg`      | widths, kernel constants, the `coef_t` record that travels with each coefficient |

Each coefficient travels through the pipeline as a `coef_t` record. The
record carries:

- the value;
- `u`, which selects the kernel column;
- the vector index;
- `first`, which makes the accumulators load instead of add;
- `last`, which sends the eight sums onto the write bus;
- `eob`, which marks the end of the pass.

Loading on `first` is the same as clearing the accumulators before the
vector. It costs no clock, so vectors follow each other without gaps.

## How a block flows, and what it costs

1. **First pass.** The core accepts the block's non-zero coefficients, one
   per clock, column by column (`v` ascending; any order of `u` inside a
   column). Each finished column of `Y` is written into the transpose memory
   as one 8-word write. Each word gets a flag that says whether it is
   non-zero. A column with no non-zero input is never sent and never
   written; its flags stay clear.
2. **Drain and load.** Four clocks later the last column is in the
   transpose memory. In the next clock the controller copies the 64 flags
   into its own mask register. It also clears the flags of both memories
   for the next block.
3. **Second pass.** In each clock, a lowest-set-bit search over the mask
   picks the next non-zero `Y[r][c]` in row-major order. Row `r` of `Y` is
   column `r` of `Y^T`, so this word goes to the unit as coefficient `u = c`
   of vector `r`. Zero words cost no clock. Neither do rows that are all
   zero: the output memory returns zero for any row it has not written since
   the block began.
4. Each finished vector is written as one row of `Z` into the output memory.
   `done` pulses in the clock after the last row is written, when the
   whole block can be read.

With `k1` non-zero inputs and `k2` non-zero first-pass words, a block takes
**k1 + k2 + 8 clocks**. This counts from the clock the first coefficient is
accepted to the clock of `done`, both included. If `k2 = 0`, it takes
k1 + 5 clocks. The next block may enter as soon as the second-pass reads
end. Its first pass then overlaps the last pipeline stages of the previous
block, so the steady-state cost is k1 + k2 + 5 clocks per block. The
testbenches check these counts exactly.

Compare this with 128 clocks for a one-sample-per-clock row-column IDCT.
With the zero shares typical of MPEG-2 streams (76 / 91 / 95 % zeros in
I / P / B pictures at the input, 58 / 65 / 78 % between the passes), a block
averages about 47, 33 and 22 clocks. A 720x480 frame (8100 blocks) then
needs about 383k, 269k and 181k clocks. At 27 MHz and 30 frames/s the budget
is 900k clocks per frame.

## Interface (`idct2d_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | handshake for one non-zero coefficient |
| `in_data` | in | 12 | `X[u][v]`, signed |
| `in_u`, `in_v` | in | 3 | row index (kernel column) and column index (vector) |
| `in_last` | in | 1 | last non-zero coefficient of column `v` |
| `in_eob` | in | 1 | last non-zero coefficient of the block |
| `done` | out | 1 | result block complete |
| `unit_busy` | out | 1 | a coefficient is inside the 1-D unit |
| `out_rd_row` / `out_rd_data` | in / out | 3 / 8 x 9 | asynchronous row read of `Z` |

Rules for the user:

- Hold `in_valid` and the coefficient until `in_ready` is high. An
  assertion in `idct_ctrl` checks that `in_valid` is not withdrawn while it
  waits.
- `in_ready` is low while a block drains and while its second pass reads
  the transpose memory.
- Send an all-zero block as one zero coefficient with `in_last` and
  `in_eob` set.
- Read the result after `done`. It stays valid until the next block's
  second pass begins, which is at least that block's `k1 + 4` clocks after
  its first coefficient is accepted. The output memory is not double
  buffered, so a consumer that needs longer must hold back the next block.

## Number formats

The architecture fixes no word widths. The widths below are this design's
choices. They are set in `idct_pkg`.

| quantity | format |
|----------|--------|
| input coefficient | 12-bit signed integer (the MPEG-2 range) |
| kernel constants `0.5*cos(k pi/16)` | 16-bit signed, 14 fraction bits |
| value entering the 1-D unit | 18-bit signed, 4 fraction bits; first-pass inputs are shifted left by 4 |
| product | 34 bits, 18 fraction bits |
| accumulator | 37 bits (room for 8 products) |
| transpose memory word | 18 bits, 4 fraction bits, rounded half up and saturated |
| output pixel | 9-bit signed, rounded half up, saturated to [-256, 255] |

Against an exact double-precision IDCT, every output pixel in the tests is
within 1. The design was not measured against the IEEE 1180 accuracy
procedure.

## Where this RTL goes beyond, or departs from, the architecture

The architecture describes the kernel select logics, multipliers,
add / add-sub accumulators, write bus, transpose memory and output memory,
the 4-stage pipeline and the multiplexed single 1-D unit. The following are
this design's own choices:

- **The input stream format.** This covers the `in_last` / `in_eob` flags
  and column-major order. The source of the coefficients (a variable-length
  decoder) is not part of the design.
- **Finding the non-zero words between the passes.** This uses the
  per-word flags and the 64-bit lowest-set-bit search. The "written" row
  flags in the output memory, which let all-zero rows be skipped, are also
  this design's.
- **The write bus width.** It writes all eight words in one clock, with
  rounding and saturation on the way.
- **The drain between the passes.** It costs four clocks plus one load
  clock.
- **Not built: sharing the accumulator adders with motion compensation.**
  In P and B pictures the IDCT finishes early, and the spare time could be
  used to run motion compensation on the same adders. No datapath or
  control for this sharing is defined, so none is built.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_ksl` | kernel table against the cosine formula; symmetry of the lower rows |
| `tb_idct_mult` | products including extreme operands; hold when disabled |
| `tb_acc_pair` | sums, parity-controlled subtraction, restart on `first` |
| `tb_idct_1d` | random sparse vectors through both inputs; exact sums; 3-clock latency |
| `tb_write_bus` | rounding and saturation against real arithmetic; routing flags |
| `tb_transpose_mem` | column writes, word reads, non-zero map, clear |
| `tb_output_mem` | row writes, unwritten rows reading as zero |
| `tb_idct_ctrl` | controller against models of its neighbours: second-pass order and flags, stalls, empty passes |
| `tb_idct2d_top` | 600 mixed blocks end to end against a double-precision reference; exact clock counts per block |
| `tb_mpeg2_frame` | one 8100-block frame each of I, P and B density; real-time budget; prints normalised time |

`tb_idct2d_top` counts how often each mechanism occurs and fails if one
never does. The mechanisms are:

- skipped zero inputs and skipped empty columns;
- skipped zero words and empty rows in the second pass;
- an all-zero second pass;
- subtraction on the add/sub side;
- input stalls;
- output saturation;
- a block entering while the previous one is still in the unit.

The two end-to-end tests, `tb_idct2d_top` and `tb_mpeg2_frame`, share the
reference model in `tb/idct_ref_pkg.sv`.

The frame test uses synthetic blocks, because the coefficient data of real
streams is not included. Their non-zero inputs are placed with a probability
that falls as `exp(-(u+v)/3)`. Typical results are 0.54, 0.31 and 0.22 of
the 1,036,800-clock reference for I, P and B. Real streams leave more zeros
between the passes than these blocks do, so the real times would be lower.

To simulate with Verilator, for example the end-to-end test (for a unit
testbench, leave out `tb/idct_ref_pkg.sv` and name that testbench instead):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_idct2d_top \
    -y rtl -y tb rtl/idct_pkg.sv tb/idct_ref_pkg.sv tb/tb_idct2d_top.sv
./obj_dir/Vtb_idct2d_top
```

Every module has default parameters. `idct2d_top` synthesises to about 470
word-level cells, 680 flip-flop bits and two 64-word memories. A clock rate
of 27 MHz is enough for real-time MPEG-2 at 720x480. This RTL has not been
through timing analysis, so that rate is not confirmed; the longest paths are
the 18x16 multipliers and the 64-bit lowest-set-bit search in the
controller.
