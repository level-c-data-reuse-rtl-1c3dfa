# Level C+ search-window reuse for block-matching motion estimation

Full-search motion estimation compares every N x N macroblock (MB) of the current
frame with every candidate position in a search range of SR_H x SR_V pixels in
one or more reference frames. Its external-memory traffic comes from loading
reference pixels. Most hardware uses "Level C" reuse: neighbouring MBs in a row
share all but N columns of their search windows, so each MB loads only one new
N-pixel-wide column strip. That strip is SR_V + N - 1 pixels tall. Each reference
pixel therefore still comes in from memory about 1 + SR_V/N times. With a
[-128,128) range and 16x16 MBs that is about 17 times.

**Level C+** also shares vertically. It stitches n MB rows into one *stripe* and
loads each column strip only once for the whole stripe, SR_V + nN - 1 pixels tall,
so all n rows' search ranges are covered. Traffic falls to about 1 + SR_V/(nN)
fetches per pixel: roughly 1/n of Level C when SR_V is much larger than nN. The
on-chip buffer grows only a little.

The catch is the coding order. Walking a stripe column by column (the "stripe
scan") codes an MB before its top-right neighbour. That breaks MV prediction and
mode decision, which need the left, top and top-right neighbours' results, often
a few pipeline stages after the MB started. The **n-stitched zigzag scan HFmVn**
fixes this. The top row of the stripe codes m MBs before the row below starts.
After that, the n rows take turns. Each row trails the row above by m-1 MBs.

This RTL is the reference-data side of such an encoder:

- the HFmVn coding-order generator;
- the loader that fetches Level C+ column strips;
- the on-chip search-window buffer;
- a controller that offers each MB to a motion-estimation (ME) engine once its
  windows are in the buffer, and translates the engine's window reads.

The ME engine itself and the rest of the encoder are not included.

Defaults are the main configuration: HF2V2, 16x16 MBs, search range [-128,128) in
both directions, 1280x720 frames and two reference frames. In that configuration
the design fetches **20,215,950 pixels per frame**, which is 578 MB/s at 30 fps.
Level C needs 37,438,650 for the same frame, so this is **54.0%**. The buffer holds 2 x 287 x 287 = 164,738
pixels. Level C needs 2 x 271 x 271 = 146,882, so this is **112%**.

## The coding order (`hfmvn_scan`)

A frame is cut into stripes of `NSTITCH` (= n) MB rows. Inside a stripe the MBs
are grouped into *steps*. In step t, stripe row k holds the MB at column

    x = t - k*(M-1)

A step emits its MBs that exist, from the top row down. Each stripe has
`W_MB + (rows-1)*(M-1)` steps. Below, the numbers show the coding order of a
6-MB-wide stripe.

HF2V2 (M=2, n=2), for a two-stage MPEG-4 pipeline (ME, then block engine):

    row 0:   1  2  4  6  8 10
    row 1:   3  5  7  9 11 12

HF3V2 (M=3, n=2), for a four-stage H.264 pipeline:

    row 0:   1  2  3  5  7  9
    row 1:   4  6  8 10 11 12

In HF2V2, an MB's top-right neighbour is always coded before it. In HF3V2 there
is always at least one other MB between the top-right neighbour and the MB. This
covers side information that only appears after the third pipeline stage. An
H.264 encoder that uses the top-left MB's side information in place of the
top-right one's can use HF2V2 instead, with its smaller buffer. M=2 with
n=3 or n=4 gives HF2V3 and HF2V4. M=1 is the plain stripe scan, and M=1, n=1 is
raster order.

If the MB-row count is not a multiple of n, the last stripe is scanned with the
rows that remain. This happens at 720p with n=2: 45 MB rows give 22 full stripes
and one single-row stripe. Such a short stripe of r rows loads columns only
SR_V + r*N - 1 tall.

The generator has a valid/ready output and produces one MB per clock. With each
MB it reports:

- the stripe;
- the step and the row within the stripe;
- flags for first-in-stripe, first-in-step, last-in-step and last-in-frame.

The controller uses the flags to decide when to load.

## What is loaded, and where it goes (`sw_loader`, `sw_buffer`)

The MBs of one step cover `span = (n-1)*(M-1) + 1` adjacent MB columns. HF2V2 and
HF2V3 cover 2 and 3 columns. The buffer therefore holds, for each reference frame:

    BUF_W = SR_H + span*N - 1   columns      (287 for HF2V2 at the defaults)
    BUF_H = SR_V + n*N - 1      rows         (287)

For the four scans compared below (HF2V2, HF3V2, HF2V3, HF2V4), span equals
m+n-2. Buffer column slots form a ring. Slot 0 is frame column -SR_H/2 of
the current stripe. The window of MB column x therefore starts at slot
`(x*N) mod BUF_W`.

Loads, per stripe:

| when | frame columns loaded | count |
|---|---|---|
| first MB of the stripe | -SR_H/2 ... N+SR_H/2-2 | SR_H+N-1 |
| first MB of step t, 0 < t < W_MB | t*N+SR_H/2-1 ... t*N+N+SR_H/2-2 | N, overwriting the oldest N slots |
| steps t >= W_MB (lower rows finishing) | none | 0 |

Each column is BUF_H pixels tall, or SR_V + r*N - 1 in a short last stripe of r
rows. It starts at frame row `stripe_y*N - SR_V/2` and is loaded for every
reference frame. Per stripe this adds up to
(FRAME_W + SR_H - 1) x column height x NUM_REF fetches.

Pixels outside the frame are fetched from the nearest edge pixel, because the
loader clamps the coordinates. They still count as fetches, which keeps the
traffic equal to the padded-frame figures above.

The loader issues one-pixel read requests with a valid/ready handshake. The order
is column, then reference frame, then row, at up to one request per clock. Any
number of requests may be outstanding. Responses must return in order, and each
one is written into the buffer as it arrives. The buffer is a simple dual-port
array with one pixel per word and a one-clock read latency.

## Sequencing and the ME port (`levelcp_top`)

For each MB from the scan generator, the controller does four things in turn:

1. It loads the columns the MB's step needs, if this MB opens a step (see the
   table above).
2. It offers the MB on `me_mb_valid` / `me_mb_ready`, with `me_mb_x` and
   `me_mb_y`.
3. While the engine owns the MB, the engine reads pixels with `me_rd_en`,
   `me_rd_ref`, `me_rd_dx` and `me_rd_dy`:
   - `dx` and `dy` are positions inside the MB's own (SR_H+N-1) x (SR_V+N-1)
     window.
   - The window's top-left pixel is frame pixel
     `(mbx*N - SR_H/2, mby*N - SR_V/2)`.
   - The controller adds the window's ring slot and the row offset `k*N`.
   - `me_rd_data` follows one clock later.
4. The engine pulses `me_done`, and the controller takes the next MB.

Loading and ME never overlap. The buffer is exactly as large as one step's MBs
need, so the next N columns can only overwrite the oldest N once those MBs are
done. Two assertions check the engine side: reads and `me_done` are only allowed
while the engine owns an MB. `start` begins a frame. `frame_done` pulses after the
last MB.

At the defaults a full frame takes 20.35 M clocks with an ideal one-clock memory.
Almost all of those clocks are fetches, plus whatever the ME engine spends on its
3600 MBs.

## Parameters

`levelcp_top` parameters (defaults in brackets):

- `N` [16]: MB size.
- `SR_H`, `SR_V` [256]: search range; the range is [-SR/2, SR/2).
- `M`, `NSTITCH` [2, 2]: select the HFmVn scan.
- `FRAME_W`, `FRAME_H` [1280, 720]: frame size; each must be a multiple of N.
- `NUM_REF` [2]: number of reference frames.
- `PIX_W` [8]: pixel width.

All sizes above are derived from these. MB coordinates are 8 bits wide
(`levelcp_pkg`), so frames can be up to 255 MBs on a side.

Sizes for the configurations this scheme is usually compared on. One pixel is one
byte, and fetches are per frame.

| configuration | buffer (pixels) | fetches / frame | vs Level C |
|---|---|---|---|
| 720p, SR 256, 2 ref, HF2V2 (default) | 287x287x2 = 164,738 | (22x287+271)x1535x2 = 20,215,950 | 54% |
| 720p, HF3V2 (`M=3`) | 303x287x2 = 173,922 | same as HF2V2 | 54% |
| 720p, HF2V3 (`NSTITCH=3`) | 303x303x2 = 183,618 | 15x1535x303x2 | ~37% |
| 720p, HF2V4 (`NSTITCH=4`) | 319x319x2 = 203,522 | (11x319+271)x1535x2 | ~31% |
| D1 720x480, SR 128, 5 ref, HF2V2 | 159x159x5 = 126,405 | 15x847x159x5 = 10,100,475 | ~56% |
| D1, HF3V2 | 175x159x5 = 139,125 | same as HF2V2 | ~56% |
| D1, HF2V3 | 175x175x5 = 153,125 | 10x847x175x5 | ~41% |
| D1, HF2V4 | 191x191x5 = 182,405 | (7x191+159)x847x5 | ~35% |

Only the default row runs without changing parameters. The others need the
parameters shown, which are set at elaboration.

## Choices made in this implementation

The scheme defines the coding order, the sizes and what is fetched. The following
are choices of this implementation:

- How frame edges are handled (clamping).
- How a short last stripe is scanned. Its shorter columns follow the published
  bandwidth figures, which only add up that way.
- Strictly alternating load and ME phases.
- All handshakes.
- A single-pixel buffer port. A real systolic ME array reads a row or column of
  pixels per clock, and would need the buffer banked or widened to match.

Motion compensation reusing the buffer after ME is not modelled. Also note that
the controller evicts columns as soon as the next step starts, so an MC stage
that runs one MB behind ME would need N more columns.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=... failures=...`.

- `hfmvn_scan_tb`: scan orders HF2V2, HF3V2, HF2V3, HF2V4 and the stripe scan on
  small frames with short last stripes, plus HF2V2 at 80x45 MBs. Checks:
  - every MB appears once, sorted by (stripe, step, row);
  - left, top and top-right neighbours come first, the top-right one at least
    M-1 MBs earlier;
  - all flags are correct;
  - the rate is one MB per clock.
- `sw_loader_tb`: a scripted command sequence of two full stripes and a short one,
  with ring wrap and edges on all sides. The memory is slow and stalls at random in one pass and is ideal
  in the other. Every buffer write is checked against the frame content. Also
  checks each pixel is written once, the request counts, and one clock per pixel.
- `sw_buffer_tb`: random reads and writes against a shadow copy, including
  same-clock read and write. Also spot checks at the default size.
- `levelcp_top_tb`: five reduced configurations (HF2V2 over two frames, HF3V2,
  HF2V4, HF2V3 with SR_H > SR_V, and the plain two-row stripe scan, M=1).
  External memory and ME engine stall at random. Checks:
  - every pixel of every window read is correct;
  - the coding order is correct;
  - the fetches before each MB match its scan position;
  - the total fetch count equals the Level C+ formula, short stripes included.

  It also counts each mechanism of the design and fails if one never happens:
  stripe-opening loads, step loads, steps that load nothing, short stripes,
  clamped pixels, ring wrap, and memory and ME stalls.
- `levelcp_full_tb`: one full 1280x720 frame with all defaults. It samples 16
  pixels per window and reference frame, and checks the order and the exact fetch
  count against Level C (54.0%). It runs in about 20 s.

- `levelcp_workloads_tb`: the eight configurations in the table above, each for
  one full frame at its real size. It
  converts each fetch count to MB/s at 30 fps and compares it with the published
  figures for the scheme: D1 288.95 / 288.95 / 212.04 / 181.26 and 720p
  578.38 / 578.38 / 399.20 / 332.00. All eight agree within 0.03 MB/s. The test
  runs in about 45 s.

The testbenches use these models from `tb/`:

- `ext_mem_model`: external memory with synthetic frame content, random stalls
  and in-order latency.
- `me_model`: a behavioural ME engine that reads and checks window pixels.
- `hfmvn_scan_chk`, `levelcp_top_chk`: per-configuration harnesses.
- `levelcp_tb_pkg`: the frame-content function.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/levelcp_pkg.sv tb/levelcp_tb_pkg.sv tb/levelcp_top_tb.sv \
        --top-module levelcp_top_tb -o sim
    ./obj_dir/sim

Replace the testbench file and top module to run any of the others. Verilator
options such as `--assert` keep the RTL assertions active.

## Files

- `rtl/levelcp_pkg.sv`: MB-coordinate types and the scan record.
- `rtl/hfmvn_scan.sv`: HFmVn coding-order generator.
- `rtl/sw_loader.sv`: Level C+ column loader.
- `rtl/sw_buffer.sv`: search-window buffer.
- `rtl/levelcp_top.sv`: top level.
- `tb/`: the testbenches and models listed above.
