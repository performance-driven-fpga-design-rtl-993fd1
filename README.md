# Vector-quantisation image encoder

Vector quantisation (VQ) compresses an image by cutting it into small blocks
of pixels and replacing each block by the number of the most similar entry in
a fixed table of typical blocks, the *codebook*. Only the numbers are stored or
sent; a decoder looks the blocks up again. The expensive part is the encoder's
search: for every block it must find, among N codevectors, the one with the
least squared distortion

    D_n = sum over k of (x_k - c_n,k)^2,      k = 0 .. K-1

where x is the K-pixel input block and c_n the n-th codevector.

This RTL implements that search as a streaming encoder. Its default
configuration: a codebook of N = 256 codevectors and 2x2 blocks (K = 4) of
8-bit pixels. All N distortions are computed side by side, one unit per
codevector. A tree of small four-way "VQ1" selection stages then picks the
winner. The design follows the architecture of *Performance Driven FPGA Design
Analysis with ASIC Perspective of Vector Quantization*. That paper compares
two ways of computing the distortions; both are here, selected by a parameter.

## Data flow

```
pixels --> image_vectorizer --> feed --> N x distortion unit --> vq_winner_tree --> index, distortion
 (raster)   (2x2 blocks)                   ^                       (log4 N levels
                                            |                        of vq1_select)
                             vq_codebook ---+  (all N codevectors read at once)
```

`vq_encoder_top` wires these together:

1. `image_vectorizer` receives the image row by row, one pixel per clock. It
   outputs one K-pixel vector for each BH x BW block.
2. `vq_codebook` holds the N x K codebook and presents every codevector
   simultaneously.
3. One distortion unit per codevector computes D_n. There are two
   architectures (next section).
4. `vq_winner_tree` reduces the N distortions to the smallest one and its
   index. Each level is a row of `vq1_select` stages, and each stage picks one
   winner out of four.

## The two distortion architectures (`PARALLEL_K`)

Parallelism across the codebook is common to both: there are always N units
working in lock step. They differ in what happens along the vector dimension K.

**`PARALLEL_K = 0`, parallel in N only (default; `vq_dist_seq`).**
Each unit has one subtractor, one squarer and one accumulator. The top holds
the current vector in a register and steps a dimension counter k. On each
clock every unit gets x_k and its own c_n,k. The unit is a three-stage
pipeline: subtract, square, accumulate. The accumulator restarts on the
`in_first` flag. The unit finishes a vector K clocks after starting it, and
the next vector can follow without a gap. Hardware grows with N, but not
with K. This is the variant the paper recommends for an ASIC, and the
default.

**`PARALLEL_K = 1`, parallel in N and K (`vq_dist_par`).**
Each unit has K subtractors and K squarers, followed by a pairwise adder tree
of log2(K) levels. All stages are registered, so each unit accepts a whole
vector every clock. Latency stays nearly flat as K grows (2 + log2 K), but
area grows with N x K. K must be a power of two.

In this top the pixel input carries one pixel per clock. A parallel-K encoder
therefore receives at most one block per BW clocks, and it never stalls. A
sequential-K encoder needs K clocks per block. On the last row of each band of
BH rows, a block is completed every BW pixels. In the default configuration
(K = 4, BW = 2) the encoder therefore holds off the pixel input
(`pix_ready` low) for about half the clocks of every second row.

## The VQ1 selection stage

`vq1_select` finds the smallest of four distortions D1..D4 without a sorting
network. It uses three sign bits and a lookup table:

| block            | what it does |
|------------------|--------------|
| `vq_comparator`  | A1 = sign(D1 - D2), A2 = sign(D3 - D4). It also forms all four cross differences D1-D4, D1-D3, D2-D3, D2-D4 in parallel with A1/A2. |
| `vq_a3_mux`      | A1 and A2 say which of each pair won. The mux picks the one cross difference that compares the two pair winners, and its sign becomes A3. |
| `vq_index_lut`   | Maps (A1, A2, A3) to the position 0..3 of the winner. |
| `vq_decoder`     | Outputs the winner's distortion Dx and index Ix. |

The mux and LUT tables:

| A1 | A2 | mux picks | A3 = 1 means | LUT: A3=1 | LUT: A3=0 |
|----|----|-----------|--------------|-----------|-----------|
| 1  | 1  | D1 - D3   | D1 < D3      | 0 (D1)    | 2 (D3)    |
| 1  | 0  | D1 - D4   | D1 < D4      | 0 (D1)    | 3 (D4)    |
| 0  | 1  | D2 - D3   | D2 < D3      | 1 (D2)    | 2 (D3)    |
| 0  | 0  | D2 - D4   | D2 < D4      | 1 (D2)    | 3 (D4)    |

The cross differences do not wait for A1 and A2. The critical path is
therefore one subtractor, a 4:1 mux, the LUT and the output mux, rather than
two subtractors in series.

**Ties.** Every flag is the sign of a difference, so "less than" is strict. When
two distortions are equal, the later input wins. Across the whole tree, the
winner is the highest codebook index among those with the least distortion.
The paper does not say how ties are resolved; this rule follows directly from
the sign-bit comparisons.

## Hierarchy for large codebooks

The paper builds larger codebooks by reusing the four-codeword VQ1 stage in
parallel. `vq_winner_tree` continues this reuse upward:

- Level 0 has N/4 `vq1_select` stages. Their index inputs are the codevector
  numbers.
- Level 1 has N/16 stages. Their inputs are the level-0 winners, and each
  winner's full index travels with it.
- Levels continue until one winner is left.

This requires N to be a power of four (4, 16, 64, 256, ...). A register closes
each level, so a new set of N distortions can enter every clock. For N = 256
the tree has 4 levels (85 VQ1 stages).

## Image vectoriser

`image_vectorizer` counts columns and rows itself. A frame is IMG_H rows of
IMG_W pixels and starts at the first pixel after reset or after the previous
frame. The first BH-1 rows of every band go into a line buffer of
(BH-1) x IMG_W pixels. On the band's last row, every BW-th pixel completes a
block. The vector is then assembled from:

- the line buffer;
- the last BW-1 pixels of the current row;
- the incoming pixel.

Vector element `X[r*BW + c]` is the pixel in row r, column c of the block.
Blocks leave in raster order of blocks, and `vec_last` marks the last block of
a frame.

## Codebook

The codebook is trained off line, so `vq_codebook` is a register file that is
written one pixel per clock through `cb_wr_en / cb_wr_n / cb_wr_k /
cb_wr_data`. It is a register file and not a RAM because all N x K pixels are
read in every clock. The sequential architecture reads one column
(dimension `rd_k` of every codevector), and the parallel one reads
everything. Load it before sending pixels, and reload it only between frames:
a write takes effect immediately, for blocks still in flight too. The contents
are not reset.

## Interface and timing (`vq_encoder_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `cb_wr_en`, `cb_wr_n`, `cb_wr_k`, `cb_wr_data` | in | 1, log2 N, log2 K, 8 | codebook write |
| `pix_valid`, `pix_ready`, `pix` | in/out/in | 1, 1, 8 | pixel stream, raster order; a pixel moves when valid and ready are both high |
| `idx_valid` | out | 1 | one-clock pulse per block |
| `idx_out` | out | log2 N | index of the nearest codevector |
| `idx_dist` | out | dist_width(K) (18 for K = 4) | its distortion |
| `idx_last` | out | 1 | result of the frame's last block |

The result port has no back-pressure. Results come out in block order.

Latency is counted from the clock edge that accepts a block's last pixel. If
no earlier block is still queued, `idx_valid` rises L edges after that edge:

- `PARALLEL_K = 0`: L = 1 + (K-1) + 3 + log4 N. For the defaults that is
  L = 11.
- `PARALLEL_K = 1`: L = 2 + log2 K + log4 N.

Results are at least K clocks apart (sequential-K), or at least BW clocks
apart (parallel-K, limited by the pixel input).

## Parameters

| parameter | default | notes |
|-----------|---------|-------|
| `N` | 256 | codebook size, a power of four; the value of the paper's main design |
| `BH`, `BW` | 2, 2 | block rows and columns; K = BH x BW = 4 as in the paper |
| `IMG_W`, `IMG_H` | 256, 256 | image size; the paper does not fix it. Must be multiples of BW and BH |
| `PARALLEL_K` | 0 | 0: parallel in N only; 1: parallel in N and K (K a power of two) |
| `K`, `DW`, `IW`, `KW` | derived | leave at their defaults |

`vq_pkg` holds the pixel width (8) and the width functions.

## What follows the paper and what is this design's own

Taken from the paper:

- the overall structure: N parallel distortion units, then VQ1 selection;
- both distortion architectures: subtract, square and accumulate along K, or
  subtract and square in parallel followed by a pairwise adder tree;
- the A1/A2/A3 comparator, mux, LUT and decoder of the VQ1 stage;
- N = 256, K = 4 and 8-bit pixels.

This design's own choices:

- the streaming interfaces and handshake;
- the block size 2x2 (the paper gives only K = 4) and the image size;
- the loadable register-file codebook;
- the position of every pipeline register;
- the upper levels of the winner tree, which the paper only calls "parallel
  reuse of VQ1";
- the LUT contents, which the paper takes from earlier work and which are
  derived here from the flag definitions;
- tie resolution;
- reset behaviour.

Left out:

- The paper mentions "prior computation of known values" without explaining
  it. No precomputation is done here: every distortion is computed in full.
- The paper states that pipelining yields a winner index every clock. Here
  that holds for the parallel-K architecture. The default parallel-in-N
  architecture handles one dimension per clock, so it yields one index per K
  clocks.
- The paper's distortion is a mean square error. The 1/(block size) scale is
  dropped, since it does not change which codevector wins.
- The image store (on or off chip) is outside the design. The pixel stream
  ports are where it connects.
- The paper's ASIC and FPGA results (area, power, delay charts) are properties
  of an implementation and are not reproduced. The paper's ASIC configuration
  N = 16, K = 2 corresponds to `N=16, BH=1, BW=2`.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
against values computed independently in the testbench and ends with a
`TB_RESULT checks=... failures=...` line.

| testbench | covers |
|-----------|--------|
| `tb_vq_comparator`, `tb_vq_a3_mux`, `tb_vq_index_lut`, `tb_vq_decoder`, `tb_vq1_select` | the VQ1 stage, exhaustively or with random values and forced ties |
| `tb_vq_dist_seq`, `tb_vq_dist_par` | distortion values and exact latency, K = 4 and 16, extremes 0/255 |
| `tb_vq_winner_tree` | N = 4, 16, 256 against a linear minimum search, ties, latency |
| `tb_vq_codebook`, `tb_image_vectorizer` | storage views; block assembly for 2x2 and 4x4, gaps, back-pressure |
| `tb_vq_encoder_top` | both architectures end to end: N = 16 with 2x2 and N = 64 with 4x4 blocks for three frames each, N = 256 with 2x2 blocks (parallel-K) for two frames, with codebook reloads between frames |
| `tb_vq_workloads` | N = 4 with K = 2, 4, 8, 16 in both architectures, and N = 16 with K = 2; prints latency and result spacing |
| `tb_vq_encoder_full` | one full 256x256 frame at the default parameters (16384 blocks, N = 256) |

The end-to-end tests use the shared harness `tb/vq_enc_harness.sv`. It builds
images from codevectors plus noise, with duplicated codevectors so that ties
occur. It also counts input stalls, ties, back-to-back results, frames and
reloads; the end-to-end tests fail if one of these never happens.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/vq_pkg.sv tb/tb_vq_encoder_top.sv --top-module tb_vq_encoder_top
./obj_dir/Vtb_vq_encoder_top
```

The full-size frame simulates in well under a minute. To lint a module:
`verilator --lint-only -Wall -y rtl rtl/vq_pkg.sv rtl/vq_encoder_top.sv`.

At the defaults, coarse synthesis gives about 5,800 word-level cells and
11,000 flip-flop bits. Another 10,000 bits are held as memory arrays: the
8,192-bit codebook and the 2,048-bit line buffer. Most of the logic is the
256 distortion units.
