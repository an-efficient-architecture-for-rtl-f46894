# One-level 3-D discrete wavelet transform processor (2-D + t, lifting 9/7)

A video of frames of N x ROWS pixels (256 x 256 by default) arrives as a raster scan, two pixels per clock, and leaves as a
one-level three-dimensional wavelet transform, two coefficients per clock. Each frame is
first transformed in two dimensions (rows, then columns). Every coefficient position is
then transformed along time. All three directions use the Daubechies (9,7) filter in
flipped lifting form. There is no group-of-pictures limit: the sequence may be as long as
you like, and the temporal transform runs across it with no restart.

The obstacle is data dependence. A row transform sees its samples in order and can simply
be pipelined. A column transform gets its next sample only one row later. A temporal
transform gets its next sample one frame later. This design splits the lifting
signal-flow graph into **slices**. A slice is the smallest step that can be finished with
the samples that have arrived so far. Column and temporal processing then proceed slice
by slice, keeping only the minimum state between slices:

- two rows plus three rows of intermediates for the columns (per band);
- two frames plus three frames of intermediates for time.

In total the design stores 5N^2 + 5N words for N x N frames. The latency is four rows plus four frames
plus the pipeline depth.

```
 pixels ──► rpe ──► rmem ──► cpe ──► smem ──► tp ──► temporal L/H
 2/clk      row     4 line   column  2 frame  temporal
            lifting buffers  lifting buffers  lifting
                             ▲   │            ▲  │
                             cmem┘            tmem┘
                             6 line buffers   3 frame buffers
            └────────── sp (2-D) ──────────┘
```

## Number format and the lifting steps

Every coefficient is a 17-bit two's-complement word with 2 fractional bits. A pixel `p`
enters as `p*4`. The lifting constants have 11 fractional bits. A constant product is
`(x*K) >>> 11`, which truncates towards minus infinity. Every sum wraps to 17 bits.

The flipped lifting scheme keeps the sums of neighbours free of multipliers. Each step
multiplies only the sample being updated. For one sequence x with pairs
`s0[i] = x[2i]` and `d0[i] = x[2i+1]`:

```
d1[i] = A*d0[i] + (s0[i]   + s0[i+1])
s1[i] = B*s0[i] + (d1[i-1] + d1[i]  ) >>> 4
d2[i] = C*d1[i] + (s1[i]   + s1[i+1]) >>> 1
s2[i] = D*s1[i] + (d2[i-1] + d2[i]  ) >>> 1
low[i] = K0*s2[i]     high[i] = K1*d2[i]
```

| constant | value  | 11-bit integer |
|----------|--------|----------------|
| A        | -0.630463 | -1291 |
| B        |  0.743750 |  1523 |
| C        | -0.668067 | -1368 |
| D        |  0.638443 |  1308 |
| K0       |  2.590697 |  5306 |
| K1       |  1.929981 |  3953 |

Every multiplier is a fixed shift-and-add tree (`const_mult`) followed by one register. No
general multiplier is used.

The ends of every sequence use whole-sample symmetric extension: x[-1] = x[1] and
x[L] = x[L-2]. In lifting terms this is:

- `s0[n] = s0[n-1]` and `s1[n] = s1[n-1]` at the right end, with n = L/2;
- `d1[-1] = d1[0]` and `d2[-1] = d2[0]` at the left end.

The same rule applies to rows, to columns and to the frame sequence. A constant input
x gives low ≈ 1.513·x (1.230174 squared) and high = 0. The outputs are not normalised to unit gain.

## Slices

Slice i of the signal-flow graph takes three new inputs, `x[2i]`, `x[2i+1]` and
`x[2i+2]`. It also needs three values kept from slice i-1: `d1[i-1]`, `s1[i-1]` and
`d2[i-2]`. It works in two halves:

- first half (P1, U1): `d1[i]` and `s1[i]`;
- second half (P2, U2): `d2[i-1]` and `s2[i-1]`, which produce output pair i-1.

`lift_slice` is this computation as a 9-clock pipeline. Its four P/U modules and the output
scalers each take two register stages. The first, P1, starts at clock 0, the next at clock 2,
and so on; the scalers start at clock 8; the result is out at clock 9. It takes one slice
per clock.

The kept values either live in registers inside the slice (row processor) or come in with
the slice and leave again on write-back outputs (column and temporal processors). Which
one is set by the parameter `LOCAL_STATE`.

For a column slice the three "samples" are whole rows of N/2 coefficients. For a temporal
slice they are whole frames of N^2 coefficients. Every one of the N/2 (or N^2) positions
runs through the same pipeline one clock after the other. The kept values are then
buffers of the same length: CMEM for columns and TMEM for time.

### One schedule for rows, frames and sequences

The two halves of a slice may belong to different sequences. The first slice of a new
row, frame or video can therefore run at the same time as the closing work of the previous
one. This is why a new row, frame or video never costs an idle clock. `slice_sched` is the
one table all three processors share. It decodes the position j of the slice within the
sequence:

| j | first half (P1, U1) | second half (P2, U2) |
|---|---|---|
| 0 | closes the previous sequence: its last slice, with `x[2n] := x[2n-2]` | idle |
| 1 | opens the current sequence: slice 0, with `d1[-1] := d1[0]` | flushes the previous sequence: its last output, with `s1[n] := s1[n-1]` |
| 2 | slice 1 | first output of the current sequence, with `d2[-1] := d2[0]` |
| ≥3 | slice j-1 | output j-2 |

Each processor keeps a counter of its position and feeds the result to `slice_sched`. The
row processor counts pixel pairs in a row. The column processor counts rows in a frame.
The temporal processor counts frame pairs in the video.

A sequence of only two pairs (four frames) is a special case. It is the shortest sequence
allowed, and there d2[-1] and the flush fall on the same slice. `slice_sched` handles it
through its `prev_n_is2` input.

After the last input (`in_last`), each processor runs the closing positions on its own:

- the row processor runs two extra beats;
- the column processor runs four rows (two closing rows for each band);
- the temporal processor runs two phases.

`busy` is high during this time, and the processor takes no input.

## Spatial processor (`sp`)

### Row processor (`rpe`) and row memory (`rmem`)

The row processor is a plain pipeline. Pair k of a row, `(pix_e, pix_o)`, becomes
`x[2k], x[2k+1]`. The previous pair is held in one register, so each clock forms the slice
`(x[2k-2], x[2k-1], x[2k])`. The kept values are local registers. One low/high row
coefficient pair leaves per clock. The pair for k leaves 11 clocks after pair k+1 entered.

The row memory has four buffers of N/2 words each (R1..R4). Together they hold the l and
h halves of the last two row-transformed rows. Four role pointers name the buffer holding
each of the four halves. Every word is read in the same clock in which it is overwritten.

| row arriving | read at column c | freed words, taken by the arriving l and h |
|---|---|---|
| even row 2k | l of rows 2k-2 and 2k-1 | the two words just read |
| odd row 2k+1 | h of rows 2k-2 and 2k-1, and h of row 2k | the two h words of rows 2k-2 and 2k-1 |

After each odd row, two of the role pointers swap. This reproduces the refresh order of
the published design:

| row | buffers refreshed |
|---|---|
| 2 | R1, R3 |
| 3 | R2, R4 |
| 4 | R1, R2 |
| 5 | R3, R4 |
| 6 | R1, R3 |

The order repeats every four rows.

### Column processor (`cpe`) and column memory (`cmem`)

The column processor runs one column slice per row pair and alternates between the two
bands:

- During even row 2k+2 it processes the l band. Each clock handles column c, with
  `x[2k] = l(2k, c)` and `x[2k+1] = l(2k+1, c)` from the row memory and
  `x[2k+2] = l(2k+2, c)` arriving from the row processor in that same clock.
- During odd row 2k+3 it processes the h band. Here all three inputs, h(2k), h(2k+1) and
  h(2k+2), come from the row memory. The arriving row 2k+3 belongs to the next slice.

The kept values `d1`, `s1`, `d2` of each band and column sit in the column memory. It has
six buffers of N/2 words, read when a slice enters and written when it leaves the pipeline
9 clocks later. The same word is read again two rows (N clocks) later, so N must be at
least 10.

Output rows follow the schedule above. The l band gives pairs (LL, LH): low and high along
the columns of the row-low band. The h band then gives pairs (HL, HH). Frames follow each
other with no idle row, because the first two rows of a frame close the previous frame.

From the first pixel pair, the first 2-D pair takes 2N + 20 clocks:

- 2N clocks for four rows;
- 11 clocks in the row processor;
- 9 clocks in the column processor.

## Temporal processor (`tp`) and the spatial memory (`smem`)

The temporal processor works in **phases** of N^2 clocks, each lasting as long as one
frame pair takes to arrive. In phase k, clock t handles coefficient position t. It needs
three inputs:

- position t of frame 2k-2 (E) and of frame 2k-1 (O): the two frames stored at the start
  of the phase;
- position t of frame 2k (E'): a frame that is arriving in this very phase, at two
  positions per clock during its first half.

It also uses the kept `d1`, `s1`, `d2` of position t from the temporal memory (`tmem`):
three frame buffers, addressed simply by t.

The spatial memory has only two frame buffers, yet it must hold E and O while E' and then
O' (frame 2k+1) arrive. It does this with two dual-port banks:

- **Port A** of each bank reads one pixel of E or O at clock t. In the same clock it
  writes one of the two arriving pixels into the word it has just read.
- **Port B** reads E'[t] a second time. E' was written at twice the rate at which the
  temporal processor consumes it, so E'[t] has always already been stored. The one
  exception is t = 0, which is written in the same clock; it is taken directly from the
  input.

### Decimated addressing

Each arriving pixel takes the word just freed by an old one. The layout of a frame pair
in memory therefore changes from phase to phase: pixel q of a new frame lands wherever
pixel q/2 of an old frame was. The result is a growing "decimation" of the natural order,
much like in-place FFT addressing. The design generates it with counters and adders only.

Let M = N·ROWS be the number of pixels in a frame. Pixel p of frame F of the stored pair
(F = 0 for E, 1 for O) is in bank `F xor p[0]`. At clock t:

- E[t] and O[t] are in opposite banks, so one port-A read per bank fetches both;
- bank b receives the arriving pixel `2t' + (b xor F')`, where F' = (t ≥ M/2) says which
  new frame is arriving and t' = t - F'·M/2;
- the bank rule `F xor p[0]` holds again for the new pair, so the bank of a pixel never
  changes. Within a bank a pixel is simply known by its index p.

Writing new pixel q into the word of old pixel t gives a fixed permutation per bank:

```
bank 0:  q     = 2t     mod (M-1)        (pixel M-1 stays at M-1)
bank 1:  q + 1 = 2(t+1) mod (M+1)
```

This is the perfect shuffle, so after k phases the word address is a multiplication by a
constant:

```
bank 0:  address(p) = p·c0 mod (M-1)         c0 = 2^-k mod (M-1)
bank 1:  address(p) = (p+1)·c1 mod (M+1) - 1  c1 = 2^-k mod (M+1)
```

Both moduli are odd, so 2 has an inverse and these are permutations. In hardware:

- at the end of each phase each constant is halved modulo its modulus:
  `c/2`, or `(c + P)/2` when c is odd;
- along a phase, port A's addresses are two accumulators that add c0 or c1 modulo M-1 or
  M+1 on every beat;
- port B reads E'[t], which is being stored in the next phase's layout. It uses the next
  constants, with accumulators that step by 2c once every two beats. E'[t] is in bank
  `t[0]`.

Nothing depends on M being a power of two, which is what allows frame formats such as
CIF. For M = 2^m the bank-0 pattern repeats after m = log2(M) phases and the bank-1
pattern after 2m: 16 and 32 phases for 256 x 256 frames. At the start of a new video the
constants return to 1.

Example for frames of 8 pixels (entries are `bank:address`, by pixel 0..7):

| layout | frame E | frame O |
|---|---|---|
| frames 0, 1 | 0:0 1:0 0:1 1:1 0:2 1:2 0:3 1:3 | 1:4 0:4 1:5 0:5 1:6 0:6 1:7 0:7 |
| frames 2, 3 | 0:0 1:4 0:4 1:0 0:1 1:5 0:5 1:1 | 1:6 0:2 1:2 0:6 1:7 0:3 1:3 0:7 |
| frames 4, 5 | 0:0 1:6 0:2 1:4 0:4 1:2 0:6 1:0 | 1:7 0:1 1:5 0:3 1:3 0:5 1:1 0:7 |

Frames 0 and 1 arrive two pixels per clock at address t, a natural order. Each later pair
is a further shuffle of it. Because every pixel must land in the word just read, this
layout sequence is the only one possible once the bank rule is fixed. The modular
formulas are simply a cheap way to generate it.

### Temporal slices

Phase 0 only fills the spatial memory. From phase 1 onwards, the temporal processor runs
its slice pipeline on `(E[t], O[t], E'[t])` and the temporal memory, with the position j
in `slice_sched` being the phase number. Its results are the temporal low and high
coefficients of frame pair j-2, at position t, one pair per clock.

At the end of the video:

- the phase after the last frame runs the closing slice (frame 2n := frame 2n-2, where
  2n is the number of frames);
- one more phase flushes the last output pair;
- the address constants then return to their reset value.

## Interface and timing (`dwt3d_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` | in | 1 | `pix_e`/`pix_o` carry a pixel pair |
| `in_last` | in | 1 | with `in_valid`: last pair of the last frame |
| `pix_e`, `pix_o` | in | `PIX_W` (8) | pixels 2k and 2k+1 of the current row, unsigned |
| `busy` | out | 1 | closing a video; hold `in_valid` low |
| `out_valid` | out | 1 | `out_l`/`out_h` valid |
| `out_last` | out | 1 | last result of the video |
| `out_idx` | out | log2(N^2) | position of the coefficient in the 2-D order below |
| `out_l`, `out_h` | out | 17 | temporal low and high coefficient (2 fractional bits) |

Parameters:

- `N = 256`: pixels per row, even, at least 10;
- `ROWS = N`: rows per frame, even, at least 6;
- `PIX_W = 8`: pixel width.

Any such size works, including QCIF (176 x 144) and CIF (352 x 288). In the formulas
below, N^2 stands for N·ROWS when frames are not square.

Frames are sent row by row with no separator. `in_valid` may drop at any clock. A gap
simply stalls the stream; the pipelines finish what they hold. A video must have an even
number of frames, at least 4, and `in_last` must mark its final pair. While `busy` is high
no input is accepted. A new video may start once `busy` falls.

The results come out frame pair by frame pair: for frames 2j and 2j+1, the low frame and
the high frame, position by position. The position `p` of a coefficient within a 2-D frame
follows the column processor's output order:

```
row i   = p / (2N)                 (0 .. N/2-1)
q       = p mod 2N
q <  N  : column q/2 of LL (q even) or LH (q odd)
q >= N  : column (q-N)/2 of HL (q even) or HH (q odd)
```

Here the first letter is the row filter and the second the column filter.

**Latency**: with a gap-free input, the first result leaves 2N^2 + 2N + 29 clocks after the
first pixel pair:

- 2N^2 for four frames;
- 2N for four rows;
- 11 clocks in the row pipeline, 9 in the column pipeline and 9 in the temporal pipeline.

Results then follow at two per clock with no gap. A video of P frames is done
2N^2 + 2N + 29 + (P/2)·N^2 clocks after it starts. At N = 256 this needs only about
0.98 M clocks per second for 30 frames per second.

**Storage**:

| memory | size |
|---|---|
| smem | 2 × N^2 |
| tmem | 3 × N^2 |
| rmem | 4 × N/2 |
| cmem | 6 × N/2 |

All words are 17-bit, 5N^2 + 5N words in total (329,000 at N = 256). All memories are
arrays with one clocked write per port and an asynchronous read.

## Departures from the published architecture

- **Memory read timing.** The published design uses FPGA block RAM in read-before-write
  mode. Here every memory is an array read asynchronously and written at the clock edge.
  This gives the same read-before-write behaviour within a clock, but a synthesis tool will
  map it to distributed RAM or flip-flops. Moving to block RAM means registering the read
  address one clock early: adding a stage in front of each `lift_slice` and in the
  addressing.
- **Latency.** The published latency is 2N^2 + 2N + 47. This design needs
  2N^2 + 2N + 29 because its pipelines are shallower. The 2N^2 + 2N part is the same. With
  two register stages per lifting step, the longest path is the shift-and-add tree of one
  constant rather than a single adder.
- **Port B.** The published port B changes address at half speed and reads two pixels at
  once, then multiplexes them. Here port B reads one pixel per clock from the bank that
  holds it, at its own address: with this layout, the two pixels of a pair are not always
  at the same word of both banks.
- **Address pattern.** The published address generator is not described in detail; the
  modular generator here is this design's own. For power-of-two frames its first bank
  repeats after log2(N^2) phases, as published, and its second bank after twice that.
- **Frame shape.** Frames must have an even number of rows and an even number of
  pixels per row, which covers the usual formats. The published idle-row schedule for
  frames with an odd number of rows is not built. Frame size is fixed at synthesis through
  the parameters, not programmed at run time.
- **Even frame count.** The temporal processor works on frame pairs, so the number of
  frames must be even and at least 4.
- **Output scaling.** K0 and K1 take the published numeric values 2.590697 and 1.929981.
  Both are rounded to 11 fractional bits.
- **Rounding.** Rounding is plain truncation. Pixels are not level-shifted.
- **Multi-level extensions.** Multi-level transforms (cascading this processor on the
  LLL band), the time-first t + 2-D order, and motion-compensated temporal filtering are
  extensions of the same blocks. None of them is built here.

## Files

| file | content |
|---|---|
| `rtl/dwt_pkg.sv` | word format, constants, slice control record |
| `rtl/const_mult.sv` | shift-and-add constant multiplier |
| `rtl/lift_pu.sv` | one predict/update step |
| `rtl/lift_slice.sv` | one slice: P1, U1, P2, U2, scaling |
| `rtl/slice_sched.sv` | the shared slice schedule |
| `rtl/rpe.sv`, `rtl/rmem.sv` | row processor, row memory |
| `rtl/cpe.sv`, `rtl/cmem.sv` | column processor, column memory |
| `rtl/sp.sv` | spatial (2-D) processor |
| `rtl/smem.sv`, `rtl/tmem.sv` | spatial memory (decimated frame buffers), temporal memory |
| `rtl/tp.sv` | temporal processor |
| `rtl/dwt3d_top.sv` | the whole processor |

Each file opens with a description of its block, interface and timing.

## Verification and simulation

Every block has a self-checking testbench in `tb/`. The expected values come from
`tb/tb_ref_pkg.sv`, a plain array-based model of the same arithmetic. It applies whole-row,
whole-column and whole-sequence 1-D transforms, with no slices and no memories. The
testbenches compare bit for bit and also check:

- latency, and two results per clock;
- row, frame and video changeovers;
- input gaps;
- closing runs, and restarting after a video.

| testbench | what it runs |
|---|---|
| `tb_dwt3d_top` | N = 16 with videos of 6, 4 (with random input gaps) and 36 frames. It counts each mechanism at least once: row and frame changeovers, each processor's closing run, the port-B bypass, and more than 2·log2(N^2) address layouts in one video. |
| `tb_dwt3d_full` | the default 256 x 256 size, one video of four frames, all 131,072 results (about half a second of simulation). |
| `tb_dwt3d_rect` | QCIF frames, 176 x 144 (`N = 176`, `ROWS = 144`): not square, and 25,344 pixels, not a power of two. One gap-free video of 6 frames with latency and rate checks, then 8 frames with random input gaps; 177,412 checks. |
| `tb_smem` | the spatial memory alone, at 16 and 24 pixels per frame, for longer than a full address period of each. |

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dwt_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_dwt3d_top.sv \
  --top-module tb_dwt3d_top -Mdir obj_top
./obj_top/Vtb_dwt3d_top +verilator+rand+reset+2
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>`.

Lint with `-Wall` reports only unused signals and parameters:

- control-record bits that a given processor never uses;
- the write-back outputs of the row processor's slice, whose state stays local;
- the shared package constants.
