# Configurable integer DCT engines for HEVC

This RTL computes the forward integer DCT of HEVC video coding. HEVC
transforms residual blocks of 4x4 to 32x32 samples with a fixed integer
matrix. The design rests on one idea: no multiplier is ever built. Every HEVC
coefficient (90, 87, 83, ... 4) has at most five bits set. So `c * x` is the sum
of at most five left-shifted copies of `|x|`. A few multiplexers pick those
copies, and a small carry-save adder tree adds them. A tree of signed adders
then adds 32 such products. Every level of that tree gives a useful result.
Level 5 gives one 32-point DCT, level 4 two 16-point DCTs, and so on down to
level 1, which gives sixteen 2-point DCTs. So a single 32-point core also
does all the smaller transform sizes, several blocks at a time.

Two 2D engines are built around this core. Both use row-column decomposition
through a 32x32 transposition buffer:

* `dct2d_folded` uses one core for both the row pass and the column pass.
* `dct2d_parallel` has a row core and a column core working on consecutive
  blocks, with two buffers that swap roles.

A third, independent engine, `dct8x8_2d`, is a classic 8x8 2D DCT for 8-bit
image pixels. It is built from array multipliers, an even/odd (sparse-matrix)
8-point DCT and a shift-register transpose. The top level `hevc_dct_top`
places all three engines side by side, each with its own ports.

## The coefficients

The 32-point HEVC matrix entry `(k, n)` is the integer form of
`64*sqrt(2)*cos(pi*k*(2n+1)/64)`, with row 0 equal to 64. The RTL never stores
the matrix. `dct_pkg::hevc_coef32` reduces `a = k*(2n+1) mod 128` to a
first-quadrant index `m` in 1..31 and a sign, then looks up the 31 distinct
HEVC magnitudes. The N-point matrix (N = 16, 8, 4, 2) is rows `k*32/N` of the
32-point matrix, taken over its first N columns. `cell_sels()` turns a
magnitude into five 3-bit cell selects. A select of 0 means a zero term; a
select of s means "shift left by s-1". For example, 87 = 64+16+4+2+1 gives
selects 1, 2, 3, 5, 7.

## The 1D core (`dct1d_32`)

* **Cell** (`csa_cell`). An 8-way multiplexer that outputs 0 or `|x| << 0..6`.
* **Block** (`csa_block`). Five cells feed a carry-save tree of three 3:2
  levels, which reduces five terms to one sum word and one carry word
  (ceil(log2 5) = 3). One carry-propagate adder combines the two words. A
  final multiplexer then picks the product or its negation from
  `sign(x) xor sign(c)`. The output is the exact signed product. A 16-bit
  input gives a 23-bit product.
* **Coefficient decoder**. For each input `j`, the mode `se` and the frequency
  `k`, the decoder finds the sub-transform `s = j >> log2N`, the position
  `n = j mod N` and the coefficient `C_N[k][n]`. It then drives the Block's
  selects and sign. All of this is combinational logic computed from a
  function, with no ROM file.
* **Adder tree** (`adder_tree32`). Five levels of signed adders.
  `lvl[L-1][s]` is the sum of products `s*2^L .. s*2^L+2^L-1`. In N-point
  mode, level log2N holds the 32/N results. The tree's depth is log2(32)
  adders.

| `se` | transform | results per cycle | tree level used |
|------|-----------|-------------------|-----------------|
| 0 | 1 x 32-point | 1 | 5 |
| 1 | 2 x 16-point | 2 | 4 |
| 2 | 4 x 8-point  | 4 | 3 |
| 3 | 8 x 4-point  | 8 | 2 |
| 4 | 16 x 2-point | 16 | 1 |

Timing: the core computes one output frequency `k` per cycle for every
sub-transform. The products are registered, and so are the tree sums. The
result therefore appears on `lvl` two cycles after `x`, `se` and `k` are
applied, with a new set of inputs accepted every cycle.

## Scaling between passes (`stage_scaler`)

HEVC keeps intermediate values within 16 bits by scaling after each pass:

* after the row pass, by `2^-(log2N + B - 9)`, where B is the bit depth;
* after the column pass, by `2^-(log2N + 6)`.

Each tree level has its own constant shift, so no variable shifter is needed.
The scaler adds half an LSB, shifts arithmetically and saturates to 16 bits.
`SHIFT_OFS` is `B-9` for the row pass and `6` for the column pass.

## The transposition buffer (the part that needs the most care)

`buf32x32` holds 32 rows (`buf_row32`), each made of 32 16-bit registers.
Every register sits behind a 2-to-1 multiplexer, and all 32 multiplexers of a
row share one enable `en[i]`. With the enable at 0 the row holds its values.
With the enable at 1 a new value enters `q[0]` and the others move up one
place. Each row is fed by one multiplexer from a column of 32 5-to-1
multiplexers, all controlled by `se`. Multiplexer `i` passes the scaled
level-log2N output of sub-transform `i >> log2N`.

The row-pass controller holds input row `r` of a block for N cycles and
computes frequencies `k = 0..N-1`. For each `k` it enables rows `s*N + k`,
one per sub-block `s`. After the N rows of the block:

* row `s*N + k` of the buffer holds column `k` of sub-block `s`'s row-pass
  result;
* row `r` of that column sits at tap `N-1-r`.

In other words, each buffer row has already been turned into a column. For
the column pass of column `k`, core input `j = s*N + r` reads row
`s*N + k`, tap `N-1-r` (`rd_vec`). This read is a combinational gather, and
it gives the same result for every `se`.

## The 2D engines

Both engines have the same ports (see the module headers):

* **Input.** `in_row` carries 32 residual samples (9-bit signed for 8-bit
  video), one row of the 32/N side-by-side N x N blocks. A row is taken when
  `in_valid && in_ready`. The engine samples `se_in` with the first row of
  each block.
* **Output.** One cycle per coefficient position. `out_coef[s]` is
  coefficient `(out_u, out_k)` of sub-block `s`, for `s < 32/N`. Here `out_u`
  is the vertical frequency and `out_k` the horizontal one. Columns come out
  in order, with `out_u` changing fastest. `out_last` marks the last output
  of a block. The outputs are the standard HEVC forward-transform
  coefficients, bit-exact.

**Folded** (`dct2d_folded`). The engine runs N*N row-pass cycles. With a
continuous input, rows arrive one every N cycles. Two idle cycles follow,
while the core pipeline empties into the buffer. Then come N*N column-pass
cycles. The last coefficient of a block appears `2*N*N + 5` cycles after its
first row was taken. A new block can start every `2*N*N + 3` cycles: 2051
cycles for 32x32, or 35 cycles for sixteen 2x2 blocks.

**Parallel** (`dct2d_parallel`). There are two cores and two buffers. When
the row core has filled a buffer, it hands that buffer to the column core as
soon as the column core is free. It then fills the other buffer with the next
block. If the column core is still busy, for example after a small block
that follows a 32x32 one, the row core holds `in_ready` low. Latency is the
same as for the folded engine. With blocks of one size the period drops to
`N*N + 3` cycles, about twice the throughput.

## The 8x8 DCT engine

`dct8_1d` computes the orthonormal 8-point DCT-II with the even/odd
factorisation:

* Four adders and four subtracters form `x(i) ± x(7-i)`.
* The even outputs Y0, Y4, Y2 and Y6 use C4, C2 and C6.
* The odd outputs use a 4x4 matrix of C1, C3, C5 and C7.

Each of the 22 products is an unsigned `array_mult` (AND gates and rows of
ripple full adders) working on magnitudes, with the sign applied afterwards.
The coefficients are `round(128*cos(k*pi/16))`, i.e. `cos/2` with 8 fraction
bits. Outputs are rounded and clipped to 12 bits, with one cycle of latency.

`transpose8x8` is an 8x8 array of 12-bit shift registers. While one block
shifts in as rows, the previous block shifts out as columns. The shift
direction alternates every 8 rows, so a continuous stream needs no idle
cycles. A complete block followed by a pause in the input drains by itself:
it shifts out with zero fill while `in_ready` is low. Input must come in
whole blocks of 8 rows.

`dct8x8_2d` chains a row `dct8_1d`, the transpose and a column `dct8_1d`.
Pixels are 8-bit unsigned with no level shift. The engine outputs one column
of 8 coefficients per cycle, with `out_v` giving the column index.

## Where this RTL departs from, or adds to, the original description

The original description covers the Cell, the CSA-tree Block, the five-level
adder tree, the five modes, the 1x32 and 32x32 buffers, the per-stage scaling,
the array multiplier, the 8-point factorisation and the 12-bit transpose
array. The following are choices made in this RTL:

* **Schedule.** The 1D core computes one output frequency per cycle. Two
  pipeline registers sit inside the core, and two drain cycles separate the
  passes.
* **Buffer.** Each buffer row is a shift register, so a row collects one
  column of the intermediate result.
* **Parallel engine.** The original only names this design and reports its
  timing. Its organisation here (row core, column core, two ping-pong
  buffers) is this design's own.
* **Column-pass scaling.** The RTL follows HEVC (`2^-(log2N+6)`). The original
  text quotes a different figure that only fits a special 4x4 case.
* **Handshakes.** All handshakes, output orders, rounding-to-nearest and
  saturation are this design's own.
* **8x8 datapath.** The 8x8 engine is word-parallel. The original uses
  bit-serial adders and subtracters and pipelines its multipliers every two
  cells; neither is reproduced. The original also quotes 38 multipliers,
  where its own sparse matrix needs 22; the RTL builds 22.
* **Widths.** The coefficient precision of the 8x8 engine (8 fraction bits)
  and the 8-bit default bit depth are assumptions.

Not covered:

* the inverse transform, which appears only as a formula;
* the scalar quantiser that would follow the 8x8 DCT in an image coder,
  whose step sizes are not specified;
* the 45 nm timing and area figures and the FPGA utilisation figures, which
  depend on a tool flow rather than on the RTL.

## Size

With default parameters the top synthesises (coarse, word level) to about
37k cells and 55k flip-flop bits, plus about 87k bits that synthesis maps to
memory cells. Most of this is the 16-bit 32x32 transposition buffers: one in
the folded engine and two in the parallel engine.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/dct_ref_pkg.sv` holds the reference
models, written independently of the RTL:

* HEVC coefficients come from the nearest HEVC magnitude to the real cosine.
* A plain two-pass matrix model serves as the 2D HEVC reference.
* A direct matrix product serves as the 8-point reference.

For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/hevc_dct_top_tb.sv --top-module hevc_dct_top_tb
./obj_dir/Vhevc_dct_top_tb
```

`hevc_dct_top_tb` runs the whole design at its default parameters. It feeds
both HEVC engines the same blocks (32x32 and every smaller size, with input
pauses) and checks every coefficient. At the same time it streams 8x8 pixel
blocks through the third engine. It also checks that each mechanism occurred:
every size, back-pressure, the parallel engine's overlap and its wait for the
column core, and the transpose's self-drain and streaming. It runs in about
half a minute. `dct2d_folded_tb` and `dct2d_parallel_tb` also check the cycle
counts given above. `image256_tb` transforms a whole synthetic 256x256 8-bit
image (1024 blocks) with the 8x8 engine. It checks every coefficient, that
the engine never stalls, and that the image takes 8192 + 9 cycles.

Parameters worth changing: `BIT_DEPTH` of the 2D engines (the row-pass shift
follows it); the widths in `dct_pkg` (`CORE_IW`, `DW`); and `IW`/`OW` of
`dct8_1d`.
