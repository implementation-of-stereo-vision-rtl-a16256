# Streaming stereo-vision pipeline

This is the programmable-logic part of an embedded stereo-vision system. The
input is a raw Bayer stream from a multi-camera head. The output is a stream
of per-pixel disparities (the horizontal offset between matching left and
right image points), each marked valid or invalid by a left-right
consistency check.

Every stage is fully pipelined. Once the buffers have filled, the design takes
one pixel per camera per clock and delivers one disparity per clock. At a
100 MHz clock that is 100 Mpixel/s, enough for 1.4-megapixel frames at 70
frames per second.

The design follows a published FPGA-SoC demonstrator built around a Bumblebee
stereo camera. The RTL here is a new implementation. Where it departs from
that design or fills in details the design leaves open, this is said below
and in each file's opening comment.

```
 24-bit stream (3 interleaved cameras)
   │
 deinterleave ──► camera 2 (brought out unchanged)
   │ camera 0 (left)                     │ camera 1 (right)
 demosaic  (Bayer → gray)              demosaic
 spatial_transform ◄─ homography ◄─┐   spatial_transform (same structure)
   │   requests ─► barrel_correction ┘
 stream_fifo                            stream_fifo
   └──────────────── join (lockstep) ──────┘
 feature_extractor (L)          feature_extractor (R)
   └──────────── correspondence (D = 128) ───┘
                      lr_check
                         │
           disparity, column, valid flag
```

## Stream conventions

All blocks use valid/ready streams. A transfer happens on a clock edge where
both valid and ready are high. Every pipelined block uses one global advance
signal, `ce = !out_valid || out_ready`, and reports `in_ready = ce`. So a
stalled output freezes the whole block and nothing is dropped. Reset is
asynchronous and active low, and only clears control state: valid bits and
counters. Data registers and memories are not reset.

Windowed stages (demosaic 3x3, feature extraction 5x5) produce one output per
input pixel. The window belongs to the pixel K/2 rows and K/2 columns behind
the newest one. Their `out_x`/`out_y` give that centre position, wrapped
inside the frame.

## Camera stream and demosaicing

`deinterleave` splits each 24-bit word into three byte streams:
- Byte [23:16] goes to camera 0, [15:8] to camera 1 and [7:0] to camera 2.
- The input is accepted only when all three consumers are ready. Each
  consumer sees valid only for accepted words.

`demosaic` interpolates a GRBG Bayer mosaic (even rows G R, odd rows B G)
bilinearly from a 3x3 window:
- A four-state pattern selector feeds two four-input adders. Two-neighbour
  cases feed each neighbour twice, so one shift by 2 serves both cases.
- The gray output is the lightness `(max(R,G,B) + min(R,G,B)) / 2`.
- Latency is 5 cycles. Only the gray value is used further down.

## Spatial transformation engine

`spatial_transform` is the most involved part. It runs once per camera and
applies a general inverse-mapped geometric transform to a streamed image
without storing the whole frame.

**Coordinate flow.** An output coordinate counter emits every output
position in raster order. These coordinates leave the block on the `oc`
stream, pass through an external mapping chain, and return on the `rq` stream
as input-image positions with 4 fraction bits. In the top the chain is:
- `homography`: rectification, `x' = (h0 x + h1 y + h2)/w` with
  `w = h6 x + h7 y + h8`. The division is a Goldschmidt reciprocal
  (`goldschmidt_div`: leading-one normalisation, then four `F = 2 − D`
  iterations).
- `barrel_correction`: radial lens distortion,
  `X = dx·(1 + K1 r + K2 r²) + Xc` with `r = (dx/ax)² + (dy/ay)²`. It is a
  9-stage pipeline.

Keeping the mapping outside the block lets any chain of mappings be used.

**Control rule.** An input coordinate counter tracks how far the input
image has been written. A request is accepted only once the bottom-right
pixel of the window it needs has arrived. Until then the request chain is
stalled, and an `ev_wait` strobe counts each such cycle.

When the request lies fully outside the frame (integer part outside
0..W−2, 0..H−2), it is answered at once with a black pixel and counted on
`ev_outside`.

The input side is held back (`ev_full`) when a write would overwrite the
block row holding the oldest row still needed. That row is the first row of
the latest request's window, minus `back_rows`. `back_rows` is a
configuration input. It covers transforms whose rows bow upward, where later
requests reach above earlier ones.

**Memory matrix and parallel access.** Reconstruction needs an NY×NX
(4×4) neighbourhood in a single cycle. The frame buffer is therefore split
into NY·NX memories (`memory_matrix`):
- Pixel (x, y) lives in memory `(y mod NY, x mod NX)` at word
  `(y / NY)·C2 + x / NX` (mod DEPTH), where `C2 = W / NX`.
- Writes go through a demultiplexer on the low coordinate bits.

For a request at integer position (xi, yi), the window covers columns
`xi − NX/2 + 1 … xi + NX/2` and the rows likewise. Each memory then needs one
of only three word offsets per axis: the block row or column above, the same
one, or the one below.

- `offset_vector` selects, from a fixed vector
  `[+1 (N/2 times), 0 (N times), −1 (N/2 − 1 times)]`, the N-entry slice that
  starts at `N − 1 − rl`. Here `rl` is the low bits of the request.
  Memory m gets offset `V[m − rl + N − 1]`.
- `read_access_gen` computes the base word once. It adds the nine constant
  combinations `{−C2, 0, +C2} + {−1, 0, +1}` and routes one of them to each
  memory according to the two offset vectors. This takes two register
  stages.
- `data_rearrange` rotates the NY×NX read data back into window order:
  `win[j][k] = mem[(yl − NY/2 + 1 + j) mod NY][(xl − NX/2 + 1 + k) mod NX]`.
  For N = 4 and rl = 0 the window columns come from memories 3, 0, 1, 2.

**Reconstruction.** `recon_mode` selects nearest neighbour (rounded on the
fraction's top bit) or bilinear interpolation over the central 2×2 with
4-bit weights, `(Σ p·w + 128) >> 8`. A request is answered 4 cycles after
it is accepted.

**Buffer sizing.** The rows from the kept one down to the lowest needed one
must fit in the ring:

```
(ceil((NY − 1 + back_rows + jump) / NY) + 1) · W/NX  ≤  DEPTH
```

Here `jump` is the largest downward step between consecutive requests.
Otherwise input and requests wait for each other for ever. The defaults
(W = 1280, DEPTH = 8192, about 100 rows) allow `back_rows` up to 93.

**Frames.** After W·H input pixels the input waits until all W·H output
pixels have left. Then all counters restart. This costs a few rows of idle
input per frame.

## Features and matching

`feature_extractor` turns each gray pixel into a descriptor
(`stereo_pkg::descriptor_t`) from a 5x5 window:
- the centre intensity;
- horizontal Sobel responses for the left and right neighbours of the centre
  (differences of 3-pixel `[1 2 1]` column sums);
- a vertical Sobel response at the centre;
- a 24-bit census transform: bit i is set when neighbour i, in raster order
  skipping the centre, is darker than the centre.

Latency is 3 cycles.

`feature_comparator` gives the matching energy of two descriptors: the sum
of the absolute differences of the four numeric features plus the Hamming
distance of the census words.

`correspondence` holds the last D = 128 descriptors of each image in
serial-in/parallel-out shift registers. It evaluates 2·D comparators each
cycle:
- **Left to right:** the newest left pixel x against right pixels x − d,
  for d = 0…D−1.
- **Right to left:** the right pixel D − 1 positions back against left
  pixels x + d. All its candidates are present at that point.

Candidates from a different image row are given the maximum energy,
detected by comparing stored column numbers. Two `corr_search` trees (one
register per level, lower disparity wins ties) return the least-energy
disparity for each direction. Latency is 2 + log2 D cycles.

`lr_check` delays the left results by D − 1 pixels. It keeps the last D
right results in a shift register and accepts the left disparity dL at
column x when `|dR(x − dL) − dL| ≤ THRESH` (THRESH = 1). The `lr_enable`
input turns the filter off, and every disparity is then marked valid.

The top joins the two camera streams after the output FIFOs, so both feature
extractors and the matcher see the same column in the same cycle. Two
assertions check this lockstep.

## Top-level interface (`stereo_top`)

| Port group | Meaning |
|---|---|
| `in_data[23:0]`, `in_valid`, `in_ready` | interleaved raw stream of three cameras |
| `cam2_pix`, `cam2_valid`, `cam2_ready` | third camera, passed through |
| `disp`, `disp_x`, `disp_ok`, `disp_valid`, `disp_ready` | disparity of the left pixel at column `disp_x`, valid flag from the consistency check |
| `h_left[9]`, `h_right[9]` | rectification matrices, signed, 20 fraction bits |
| `xc_*`, `yc_*`, `inv_ax_*`, `inv_ay_*`, `k1_*`, `k2_*` | lens centre (coordinate format), 1/αx and 1/αy (20 fraction bits), K1 and K2 (16 fraction bits) |
| `recon_mode`, `back_rows`, `lr_enable` | reconstruction method, extra buffered rows, consistency filter on/off |
| `ev_wait[1:0]`, `ev_full[1:0]`, `ev_outside[1:0]` | per-cycle status strobes of the left [0] and right [1] transform |

Coordinates are `coord_t`: signed 16 bits with 4 fraction bits. Parameters
(defaults): `IMG_W` 1280, `IMG_H` 960, `D` 128, `NX`/`NY` 4, `DEPTH` 8192
words per memory, `FIFO_DEPTH` 16, `H_W` 32, `H_FRAC` 20, `K_W` 24.

**Alignment and frame edges.** Each windowed stage shifts image content by
its half window: one pixel in demosaic, two in feature extraction. A
homography offset can absorb the first shift. Windows at the left, right,
top and bottom borders wrap into neighbouring rows, so their features are
not meaningful.

Because matching looks D − 1 pixels back, the last results of a frame leave
only as the next frame's pixels push them through. To flush them, feed a
further frame or padding.

The first D − 1 outputs after reset come from the filling delay line. They
are marked invalid while the consistency filter is on.

## Where this design departs from or adds to the original

- **Frame size.** The original states only "1.4 MP". 1280×960 is this
  design's default.
- **Stall rule.** The original describes it as stalling when the required
  coordinates are *smaller* than the input coordinates. This design stalls
  while the required pixels are not yet written, which is what its
  explanation intends.
- **Overwrite protection.** The `back_rows` rule, the sizing rule and the
  frame-boundary handling are this design's own.
- **Reconstruction.** The original demonstrator reconstructed by nearest
  neighbour. The bilinear mode is added because the 4×4 parallel access
  exists for multi-sample reconstruction.
- **Row constant.** The address constant is `C2 = W / NX`, following the
  text's "one-fourth of the width" for four memories.
- **Free details.** All number formats, the Bayer phase, the census bit
  order, equal weights in the energy sum, the consistency rule and its
  threshold, tie-breaking, and the pipeline cut points outside the
  distortion block are this design's choices.
- **Not included.**
  - The DMA engines that move frames between DDR memory and the pipeline.
  - The stream width adapter.
  - The processor-side software (drivers, acquisition threads, double
    buffering).
  - The separate HLS-generated neural-network accelerator of the same work.

  The stream ports of the top stand where the DMA engines connect.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. Each one compares against reference
values computed in the testbench, checks latencies where they are fixed, and
has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/stereo_pkg.sv tb/tb_stereo_top.sv --top-module tb_stereo_top
./obj_dir/Vtb_stereo_top
```

The two end-to-end testbenches share `tb/stereo_top_tb_body.svh`.

- Both cameras receive the same random raw frames.
- The right rectification matrix translates by 3 pixels, so every interior
  pixel must come out with disparity 3 and pass the consistency check.
- The testbenches count request stalls, full-buffer holds, outside requests,
  output stalls, mode switches, consistency rejections and filter-off
  outputs. They fail if any of these never happens.

The two configurations:
- `tb_stereo_top` runs three 32×24 frames with D = 8 and a 16-row buffer.
- `tb_stereo_top_full` runs the default 1280×960, D = 128 configuration over
  two frames. That is about 2.3 million disparities, in roughly 1.5 minutes
  with Verilator.

**Synthesis note.** `correspondence` at D = 128 holds 256 descriptor
comparators. It dominates area and synthesis run time.
