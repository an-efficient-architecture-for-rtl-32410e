# Level-by-level 2-D discrete wavelet transform engine

This is synthesizable SystemVerilog for a multi-level, separable 2-D discrete
wavelet transform (DWT) of an N x N image. It follows the architecture
published as "An Efficient Architecture for Two-Dimensional Discrete Wavelet
Transform". One transform module does every level. Level 1 reads the image.
Each later level reads back the LL band of the level before it from a small RAM.

Many 2-D DWT architectures interleave the work of later levels into the gaps
of level 1. That makes the control complicated and still leaves filters idle.
This design runs the levels one after another, and each level is a plain
raster scan of a smaller image. Two choices inside the transform module keep
every multiplier busy on every clock. The horizontal filters (stage 1) use
**polyphase decomposition**: they take one sample per clock and produce
results at half rate. The vertical filters (stage 2) use **coefficient
folding**: two taps share one multiply-accumulate unit, which halves their
hardware to match the halved data rate. The whole transform takes

    sum_{L=1..J} N^2 / 4^(L-1)  =  (4/3)(1 - 4^-J) N^2   clocks

at one pixel per clock. Measured against the half-rate internal clock, this is
(2/3)(1 - 4^-J) N^2 cycles. That is 0.5 N^2 for one level and tends to
0.667 N^2 for many levels.

## Block diagram

```
             +-----------+    +--------------- transform_module ----------------+
 pix_in ---->|           |    | stage 1 (horizontal)     stage 2 (vertical)     |
             |  src_mux  |--->| poly_dec_filter --L--+-> fold_vdec_filter(a) --> LL --+--> out_ll
 RAM data -->|           |    |   (a, b share regs)  +-> fold_vdec_filter(b) --> LH    |   out_lh
   ^         +-----------+    |                 --H--+-> fold_vdec_filter(a) --> HL    |   out_hl
   |              ^           |                      +-> fold_vdec_filter(b) --> HH    |   out_hh
   |              |           +--------------------------------------------------------+  |
 dwt_ram <--------+-------------------------------------- LL written back --------------+
 (N/2 x N/2)   sel_ram
   ^  ^
 addr_gen      dwt_ctrl: level / row / column counters, switch phases, level select
```

`dwt2d_top` wires these together. Each `fold_vdec_filter` holds K/2
`line_delay` instances.

## Schedule of one transform (N = 8, J = 3)

| clocks | source | level input | outputs per band |
|---|---|---|---|
| 0-63 | pixel input | 8 x 8 image | 4 x 4 (LH, HL, HH; LL to RAM) |
| 64-79 | RAM | 4 x 4 LL band | 2 x 2 |
| 80-83 | RAM | 2 x 2 LLLL band | 1 x 1 |

The controller does not stop between levels. Level 2 can start on the clock
after the last pixel. By then the first LL words it needs are long written,
because an LL output depends only on rows above the current one. Each new LL
band is written **in place** over the start of the same RAM while the previous
band is read out. This is safe because LL(k, n) goes to address
k*(W/2)+n, and the level has already read the word at that address
(input sample (2k+1, 2n+1) sits at the later address (2k+1)*W+2n+1).

## Stage 1: polyphase horizontal filters (`poly_dec_filter`)

A decimating filter that computes every output and throws half away wastes
half its multipliers. Instead, the K taps are split into the even-ordered part
(a0, a2, ...) and the odd-ordered part (a1, a3, ...):

    L(n) = sum_j a(2j) * x(2n+1-2j)  +  a(2j+1) * x(2n-2j)

An even-indexed sample x(2n) is parked in the odd part's register. On the next
clock x(2n+1) arrives and goes straight to the even part. Both parts are then
summed and one output is produced. The low-pass and high-pass filters read the
same delay registers (direct form), so stage 1 has K-1 sample registers and
2K multipliers for both filters. It accepts a sample on every clock and
delivers an (L, H) pair on every second clock. That half rate is the
transform module's internal clock, implemented here as a clock enable.

## Stage 2: coefficient-folded vertical filters (`fold_vdec_filter`)

Stage 2 has four filters: L through low-pass gives LL, L through high-pass
gives LH, and H likewise gives HL and HH. Each filter sees only half the
sample rate, so two taps can share one processing element (PE), which is a
multiplier, an adder and a storage element. A K-tap filter has K/2 PEs. The
switch SW follows the row parity:

| row | PE p (p < K/2-1) | last PE | output |
|---|---|---|---|
| even 2k (SW=0) | R_p <= c(2p+1)*x + R_(p+1) | R <= c(K-1)*x + 0 | none |
| odd 2k+1 (SW=1) | R_p <= c(2p)*x + R_p | same | y = c(0)*x + R_0 |

After an odd row, PE0 has gathered
y(k) = sum_i c(i) * x*(2k+1-i), where x*(r) is row r. Every two input rows
give one output row.

The data arrive in raster order. The value a PE must combine with is
therefore the same column of the previous row, not the previous sample. So
each storage element is a **line delay** of one word per column: N/2 words in
level 1. Every line delay shifts on every stage-2 input. Its read side always
shows the partial sum written one row earlier in the same column. The partial
sums are kept at full precision. Only the output is rescaled.

At the first row of each level, the chained input R_(p+1) is forced to zero.
This gives the rows above the image the value zero. It also discards whatever
the line delays still hold from the previous level, so they need no clearing.

## Variable-length line delay (`line_delay`)

Level L has rows of N/2^(L-1) samples, so after stage 1 its line delays must
be N/2^L long. Each line delay is a chain of J storage blocks of
N/2^J, N/2^J, N/2^(J-1), ..., N/8, N/4 words. The chain length after block i
is N/2^(J-i), and N/2 after the last block. A one-hot select signal per level
taps the output behind the block that gives the needed length. A 1-to-2
demultiplexer behind each block sends its data either to the output or on to
the next block. Blocks behind the tap receive nothing and hold still. The
level number travels with the data through the pipeline. At a level boundary,
the tail of one level and the head of the next therefore each use their own
length.

## Interface of `dwt2d_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock at the pixel rate; asynchronous active-low reset |
| start | in | 1 | starts a transform; ignored while busy |
| busy, done | out | 1 | busy during a transform; done pulses one clock after the last output |
| pix_req | out | 1 | high on each of the N^2 level-1 clocks |
| pix_in | in | PIX_W | next pixel in raster order, valid on the clock pix_req is high |
| out_valid | out | 1 | one sample of each band |
| out_level | out | clog2(J+1) | level 1..J of that sample |
| out_row, out_col | out | clog2(N/2) | position in the band, raster order |
| out_ll, out_lh, out_hl, out_hh | out | DATA_W | the four subband samples |

The pixel source gets no back-pressure: it must deliver one pixel on every
clock that pix_req is high. A band sample appears 3 clocks after the request
of the last input it depends on: 1 clock for the RAM/pixel alignment register
in `src_mux`, 1 for the stage-1 register and 1 for the stage-2 register.
`out_ll` is valid at every level, but only level J's LL band is a final
result. The earlier LL bands are also stored for the next level.

## Parameters

| parameter | default | meaning |
|---|---|---|
| N | 8 | image side. It must be a multiple of 2^J, and the last level needs an input of at least 2 x 2 |
| J | 3 | number of levels |
| K | 4 | filter taps, any even number up to 16 |
| PIX_W | 8 | unsigned input pixel width |
| DATA_W | 16 | signed sample width between stages and in the RAM |
| LO, HI | D4 | low-pass / high-pass taps, signed 12-bit with 8 fractional bits |

The defaults N = 8, J = 3, K = 4 are the worked example of the published
architecture: an 8 x 8 block reduced to 1 x 1 bands in three levels. Larger
images only need a larger N, which sizes the RAM and the line delays. The test
suite runs N = 256 with up to 8 levels and N = 512 with 3 levels.

Storage at the defaults:
- RAM: N^2/4 = 16 words.
- Line delays: 4 filters x K/2 PEs x N/2 words = K*N = 32 words of partial sums.
- Stage 1: K-1 = 3 sample registers. The live odd sample takes the place of
  a K-th register.

This is within the N^2/4 + KN + K storage the architecture is stated to need.
There are 4K = 16 multipliers: 2K in stage 1, and K/2 in each of the four
stage-2 filters.
With the default taps each level roughly doubles the LL values, so DATA_W must
grow with J. 16 bits is enough for 3 levels of 8-bit pixels, and 20 bits for 8
levels.

## Arithmetic and edge handling (choices of this implementation)

The architecture leaves the filter taps, word lengths and image borders open.
This implementation fixes them as follows:
- **Taps.** The defaults are the 4-tap Daubechies (D4) pair in Q.8:
  a = {124, 214, 57, -33} and b(i) = (-1)^i a(K-1-i) = {-33, -57, 214, -124}.
  They are parameters, so any even-length pair can be used.
- **Filter form.** Filters are causal, y(n) = sum_i c(i) x(n-i). The decimated
  outputs are taken on the odd samples.
- **Borders.** Zero extension at the left and top border: stage 1 clears its
  history at every row start, and stage 2 zeroes the chain on the first row.
  The transform is non-expansive (N/2 outputs from N inputs). It does **not**
  use the symmetric extension of JPEG 2000, so results differ from a JPEG 2000
  codec near the borders.
- **Rescaling.** Each filter pass ends with an arithmetic shift right by 8
  (floor) and truncation to DATA_W bits. There is no saturation.
- **Clocking.** There is one clock at the pixel rate. The half-rate and
  quarter-rate points of the architecture are clock enables.
- **Control and handshake.** The controller FSM, the counters in the address
  generator, the start/busy/done handshake and the pipeline registers are this
  design's own. The architecture describes only their function.

## Departures and limits

- The published data-flow table shows outputs in the same clock as their last
  input. Here they follow 3 clocks later, but the schedule keeps its length of
  (4/3)(1-4^-J)N^2 clocks with no gaps.
- In the published architecture the transform module runs on its own clock
  at half the pixel clock. Here the pixel clock is the only clock, and the
  half rate is a clock enable.
- The RAM is a simple array with one synchronous read port and one synchronous
  write port. A system that already has frame memory could use that instead.
- Both stages use the same filter length K. The architecture would also allow
  different lengths per stage.
- Border handling, taps and word lengths are listed above. Results do not
  match a JPEG 2000 5/3 or 9/7 lifting transform.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The reference model
`tb/dwt_ref_pkg.sv` works directly from the filter equations: row and column
convolutions with zero extension, shift and wrap.

| testbench | what it checks |
|---|---|
| tb_dwt2d_top | Three 8 x 8 images through the default engine. Checks every band of every level and the labels. Checks the 84-clock gap-free schedule (64 pixel requests and 20 RAM reads). Requires each mechanism to occur: mux switch to the RAM, all three line-delay lengths, row-start clearing, first-row zeroing and LL write-back. |
| tb_dwt2d_levels | N = 256 with J = 1..8, N = 512 with J = 3 (a full-size photograph), and 64 x 64 runs with a 2-tap Haar and a 6-tap D6 filter pair. Checks every output and that the request count is (4/3)(1-4^-J)N^2. Prints the computing time in units of N^2 internal clocks (0.5000 to 0.6667). Uses the helper `tb/dwt_run_checker.sv`. Takes about 2 minutes. |
| tb_transform_module | One module fed 8x8, 4x4 and 2x2 images back to back. Checks all outputs and that each appears exactly 2 clocks after its last input. |
| tb_poly_dec_filter | Rows with idle gaps. Checks L and H against direct convolution and the half-rate output timing. |
| tb_fold_vdec_filter | Blocks for each level, including a return to level 1, with gaps. Checks against column convolution so that no stale line-delay data can leak in. |
| tb_line_delay | Delay length N/2^level for every level, and switching between levels. |
| tb_dwt_ram, tb_addr_gen, tb_src_mux, tb_dwt_ctrl | Storage, address sequences, mux select and alignment, controller schedule and done timing. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv rtl/*.sv tb/tb_dwt2d_top.sv \
  --top-module tb_dwt2d_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Add `tb/dwt_run_checker.sv` for `tb_dwt2d_levels`. Storage (the RAM and the
line delays) is not reset. The tests run with random initial values so that
nothing depends on it.

## Files

`rtl/dwt_pkg.sv` holds the shared types, default taps and width helpers. The
rest of `rtl/` has one module per file: `dwt2d_top`, `dwt_ctrl`, `addr_gen`,
`dwt_ram`, `src_mux`, `transform_module`, `poly_dec_filter`,
`fold_vdec_filter` and `line_delay`. `tb/` holds the testbenches, the reference
package and the run checker.
