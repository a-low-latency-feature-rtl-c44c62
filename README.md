# ORB feature extraction accelerator with an off-chip image pyramid

This is synthesizable SystemVerilog for a streaming ORB (oriented FAST and
rotated BRIEF) feature extractor. It follows the architecture of "A Low Latency
Feature Extraction Accelerator with Reduced Internal Memory". Pixels come
straight from a camera sensor, with no frame buffer. Keypoints are found at
pixel rate in a three-scale image pyramid. Each keypoint gets a 256-bit
rotated-BRIEF descriptor.

Internal memory is kept small in two ways:

* **Hybrid pipeline.** Keypoint detection is a pixel-level pipeline that works
  on a few image rows per scale. Descriptor generation works one keypoint at a
  time (task level) and runs behind the detectors.
* **Pyramid in external memory.** The smoothed image of every scale goes to
  external DRAM, not to on-chip memory. The descriptor stage reads back only
  the patch around each keypoint. When two keypoints in the same row are close
  together, their patches overlap. Only the new columns are then read, and the
  rest is kept in a circular patch buffer.

## Data flow

```
 sensor ──► scale_detector[0] ──ds──► scale_detector[1] ──ds──► scale_detector[2]
 (1 px/cycle)   │  │                      │  │                      │  │
                │  └─ keypoint FIFO ──┐   │  └─ keypoint FIFO ──┐   │  └─ keypoint FIFO ─┐
                └─ Gaussian buf ─►    │   └─ Gaussian buf ─►    │   └─ Gaussian buf ─►   │
                         external memory (write ports)          │                        │
                                   ▲                            ▼                        ▼
                                   │  burst reads      descriptor_engine ◄───────────────┘
                                   └───────────────── patch_fetch → patch_buffer → rbrief
                                                                      │
                                                             descriptor FIFO ──► desc_*
```

Each `scale_detector` contains this chain:

`row_bank_buffer` → `window_regfile` (7x7) → {`binomial_smoother` →
`gaussian_buffer`, `bilinear_downsampler`, `ofast` → `nms3x3` → keypoint `sync_fifo`}

The scales are 1920x1080, 1280x720 and 853x480 (scale factor 2/3).

## Detection at pixel rate

### Row banks and the window

Each scale keeps six full image rows in six banks, one bank per row. For each
incoming pixel at (x, y), all banks are read at column x and the pixel is
written into bank `y mod 6`. The read happens before the write, so the bank
being overwritten still returns row y-6. The six stored pixels and the live
pixel form a 7-pixel column. That column is shifted into a 7x7 register file:
`win[r][c]` is the pixel at row y-r, column x-c. Everything downstream works
on the window centre (x-3, y-3).

### oFAST: FAST-9 by string searching (`ofast.sv`)

The ring holds 16 pixels at radius 3. Index 0 is straight above the centre,
and the indices run clockwise. Two 16-bit test strings are formed:

* `dark[i] = ring[i] > centre + TH`
* `bright[i] = ring[i] + TH < centre`

A pixel is a candidate if either string has 9 cyclically contiguous ones.
Instead of testing all 16 start positions, the search looks only at the top
nine bits of the string, the test domain:

1. If the domain is all ones, the pixel is a keypoint.
2. Otherwise, find the rightmost (lowest) zero in the domain. Rotate the string
   left so that the bit just below that zero becomes the new top bit.

A zero rules out every window that covers it, so skipping to just below it
loses nothing. Each step moves the start at least past the ones already known
to follow the zero. Four steps therefore cover all 16 start positions: after
the first step, every two further steps advance by at least 10 bits.
`tb_ofast` checks this for all 65536 strings.

There is one step per pipeline stage, and the dark and bright paths run in
parallel, so the result comes out exactly four cycles after the window.

* **Orientation.** This is the ring index of the middle pixel of the run of
  ones that was found. The run is extended in both directions from the
  detected domain. For an even run length, the upper of the two middle indices
  is used (in ring order). An all-ones ring gives 0.
* **Score.** This is the sum of absolute differences (SAD) between the ring
  and the centre. An adder tree runs alongside the same four stages. Every
  pixel gets a score, candidate or not.

### Two-stage 3x3 non-maximum suppression (`nms3x3.sv`)

A keypoint must be a candidate whose score is strictly higher than the scores
of all eight neighbours. The oFAST stream, every pixel in raster order, moves
through three registers: B1 (newest), B2 and B3.

* **NMS I.** B2 survives if it is a candidate and beats B1 and B3.
* **Candidate buffer.** B2 goes into a one-row buffer with these fields:
  survive flag, score, orientation, and max(B1, B2, B3), the maximum of its
  row neighbourhood.
* **NMS II.** In the same cycle, the entry one row up in the same column is
  read into RegA. A becomes a keypoint if its flag is set and its score beats
  the current max(B1, B2, B3), which are its three lower neighbours. In the
  same comparison, B2's flag is cleared unless B2 beats the row maximum stored
  with A, which covers its three upper neighbours.

Storing the row maximum with each entry lets the two-row structure cover all
eight neighbours. Ties suppress both pixels.

Keypoints closer than 25 pixels to the image border are dropped, so that the
rotated sampling patch always lies inside the smoothed image.

## The pyramid in external memory

* **`binomial_smoother`.** A 5x5 kernel, the outer product of [1 4 6 4 1] with
  itself (sum 256). It uses only shifts and adds: 6a = 4a + 2a. Symmetric
  pixels are summed first, down the columns and then across. The result is
  rounded and divided by 256. Smoothed pixels exist for centres 3..W-4 x
  3..H-4.
* **`gaussian_buffer`.** The smoother cannot stall, but the memory may refuse
  writes for a while. Each scale's smoothed pixels therefore queue in a FIFO
  of `GB_DEPTH` = 3840 pixels (two 1920-pixel rows; 3 x 3840 x 8 bits =
  92.16 kbit, the original design's Gaussian image buffer size). They leave
  through a valid/ready write port, one pixel per accepted cycle. If a pixel
  arrives while the FIFO is full it is lost and the sticky `sm_overflow[s]`
  is set.
* **Memory writes.** The buffer generates the address on its output side:
  `scale_base(W, H, s) + y*W_s + x`, following the raster order of the
  interior. The scales are stored back to back, row-major, one byte per
  pixel. `sm_rows` counts the smoothed rows of the current frame that have
  been completely written to memory, so the descriptor stage never reads a
  row that is still in the buffer.
* **`bilinear_downsampler`.** Every 3x3 block becomes 2x2. The outputs are p00,
  (p01+p02)/2, (p10+p20)/2 and (p11+p12+p21+p22)/4, rounded to nearest. The
  first output row of a block is emitted while input row 3k+1 streams in, and
  the second while row 3k+2 streams in. There is at most one output pixel per
  input pixel, so the next scale's detector (identical hardware) keeps up. An
  input of n columns gives `(n+2)/3 + n/3` output columns, and n rows give
  `(n+1)/3 + n/3` output rows.

## Descriptor generation with patch reuse

### Fetching the patch (`patch_fetch.sv`)

The patch of keypoint (x, y) is 45 x 45 pixels (radius R = 22) of the smoothed
image of its scale. This is enough for a radius-15 sampling pattern rotated by
any angle.

If the previous keypoint (x0) had the same scale and row, and
0 < d = x - x0 < 45, only the d new columns x0+R+1 .. x+R are read. That is a
d x 45 region instead of 45 x 45.

The patch buffer's columns are circular, and `ptr` is the physical column of
the patch's left edge:

* The new columns overwrite the d physical columns that start at the old
  pointer, wrapping at column 44.
* The new pointer is `ptr0 + d`, minus 45 if that passes the edge.
* A pixel at logical column c is at physical column `(ptr + c) mod 45`.
* Any other keypoint reads the full patch and sets `ptr = 0`.

Before reading, the controller waits until smoothed row y+R of that scale has
been written (`sm_rows[s] > y+R`). It then issues 45 burst reads, one per
patch row, each d or 45 bytes long. Memory answers in beats of four pixels
(`MEM_BEAT` in `orb_pkg`), one beat per cycle. All valid pixels of a beat
are written into the patch buffer in the cycle the beat arrives.

### The banked patch buffer (`patch_buffer.sv`)

The buffer must accept four pixels per cycle from memory and deliver four
pixels per cycle to rBRIEF. It is built from small single-port banks in two
dimensions:

* **Write side: five column banks.** Physical column c is stored in bank
  `c mod 5`, at word `row * 9 + c / 5`. A beat covers four consecutive
  physical columns. Because the columns wrap modulo 45, and 45 is a multiple
  of 5, those four columns always fall into four different banks, even
  across the wrap from column 44 to column 0. An assertion checks this.
* **Read side: four copies.** Every write goes to all four copies of the
  five column banks. Read port k uses copy k. The column bank of the read is
  registered with the address, and it selects the bank output one cycle
  later.

The total is 4 x 45 x 45 bytes = 64.8 kbit.

### rBRIEF (`rbrief.sv`)

Each sampling pair ((x1,y1),(x2,y2)) is rotated by theta = orientation x
22.5 degrees:

```
xr = (x*cos - y*sin + 64) >>> 7
yr = (x*sin + y*cos + 64) >>> 7
```

cos and sin come from a 16-entry Q7 table (`orb_pkg::cos_q7`). Descriptor bit
i is 1 when the smoothed pixel at rotated point 1 is darker than the one at
rotated point 2. The four read ports of the patch buffer deliver four
pixels (two pairs) per cycle. One descriptor takes
128 read cycles and is done 130 cycles after start.

The sampling pattern is a fixed pseudo-random set of 256 pairs inside a
radius-15 disc, defined by `orb_pkg::pat_coord`. To match a software ORB
implementation exactly, replace it with the learned ORB pattern.

### Sequencing (`descriptor_engine.sv`)

* **Arbitration.** The arbiter stays on the scale of the previous keypoint
  while that scale's keypoint FIFO has entries. Consecutive keypoints of one
  row are what allow reuse. Otherwise it takes the lowest non-empty scale.
* **One keypoint at a time.** Each keypoint goes through fetch, then rBRIEF,
  then a push into the 64-entry descriptor FIFO.
* **No loss here.** A keypoint is only taken when the descriptor FIFO has
  room, so no descriptor is lost in this stage.

## Top-level interface (`orb_top`)

| port | dir | meaning |
|---|---|---|
| `pix_valid`, `pix[7:0]` | in | sensor pixels, raster order, at most one per cycle; W x H per frame, no blanking needed |
| `sm_valid[s]`/`sm_ready[s]`, `sm_addr[s]`, `sm_pix[s]` | out/in | smoothed-image byte writes, one port per scale, with back-pressure |
| `sm_overflow[s]` | out | sticky: a smoothed pixel was lost because the Gaussian image buffer was full |
| `req_valid`/`req_ready`, `req_addr`, `req_len` | out/in | burst read request (byte address, 1..45 bytes) |
| `rsp_valid`, `rsp_data[3:0][7:0]` | in | read data in request order, one 4-pixel beat per cycle; beat i of a burst holds bytes addr+4i .. addr+4i+3, and lanes past the burst end are ignored |
| `desc_valid`/`desc_ready`, `desc_data` | out/in | `desc_t`: scale, x, y, orientation, 256 descriptor bits |
| `cand_count[s]`, `kp_count[s]`, `kp_overflow[s]` | out | FAST candidates, stored keypoints, keypoint FIFO overflow |
| `fetched`, `reuse_count`, `full_count`, `desc_count` | out | bytes read from memory, reuse and full fetches, descriptors |

Timing and protocol:

* **Reset.** `rst_n` is an asynchronous, active-low reset. Frame position
  counters restart after H rows.
* **Detector latency.** A keypoint leaves NMS about one image row plus a few
  cycles after its own pixel.
* **No stall in detection.** The detector never stalls the sensor. If a
  keypoint FIFO is full, further keypoints are dropped and `kp_overflow` is
  set.
* **Cost per keypoint.** A descriptor takes the wait for rows, plus
  45 x ceil(d/4) or 45 x 12 memory beats, plus about 131 cycles. That is
  about 670 cycles for a full fetch with no memory stalls.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `W`, `H` | 1920, 1080 | scale-0 frame size |
| `NS` | 3 | number of scales |
| `TH` | 20 | FAST threshold |
| `KP_DEPTH` | 512 | keypoint FIFO depth per scale |
| `GB_DEPTH` | 3840 | Gaussian image buffer depth per scale, in pixels |
| `R` | 22 | patch radius (45 x 45 patch) |
| `DESC_DEPTH` | 64 | descriptor FIFO depth |

Memory per scale:

* 6 x W_s bytes of row banks
* W_s x 29 bits of candidate buffer
* `GB_DEPTH` bytes of Gaussian image buffer

Shared memory: 4 x 45 x 45 bytes of patch buffer. Keypoint FIFO entries are 26
bits. Descriptor FIFO entries are 284 bits.

At the defaults this is about 527 kbit of memory in total.

## Where this RTL departs from the original design, or fills gaps

The following follow the original design:

* three scales with factor 2/3, and bilinear down sampling
* row-bank buffer plus 2-D register file
* 5x5 binomial smoothing with shift-add arithmetic
* string-searching FAST-9 in a four-cycle pipeline
* middle-of-arc orientation and SAD score
* the two-comparator NMS with a candidate buffer
* the pyramid in external memory
* patch reuse with the `ptr0 + d` circular pointer
* LUT-based rBRIEF

The rest is this design's own choice:

* **Threshold and widths.** The FAST threshold (20), all widths and encodings,
  and the tie rules.
* **Eight-neighbour coverage in NMS.** The row maximum stored in the candidate
  buffer. The original text describes the second stage as comparing with the
  next row only, while also requiring the candidate to beat all eight
  neighbours. This RTL meets the eight-neighbour rule.
* **Sampling pattern.** A pseudo-random pattern, not the learned ORB pattern.
* **External memory.** The interface, the layout and the 4-pixel (32-bit)
  read beat. The original design gives no DRAM width. At one beat per cycle
  a full patch takes 540 cycles, so about 3100 full-fetch descriptors fit in
  the time of one 1080p frame, and more when columns are reused. The
  original design claims 4000 features per frame. `MEM_BEAT` can be raised
  up to 5 with the five column banks. Beyond that, `NCB` must be a larger
  divisor of 45, such as 9.
* **Frame rate.** One pixel per cycle gives about 48 fps at 1080p and 100 MHz.
  The original design reports 81 fps at 100 MHz.
* **Gaussian image buffer.** The original design gives only its size. Here
  it is one pixel FIFO per scale of two rows each, with the write addresses
  generated at its output.
* **Keypoint buffering.** One keypoint FIFO per scale, 512 deep, which drops on
  overflow.
* **Border rules.** No smoothing within 3 pixels of the border, and no
  keypoints within 25.
* **Sequential descriptor stage.** Each keypoint is fetched and described
  before the next is taken.
* **Frame boundaries.** `sm_rows` restarts at each frame. Keypoints of one
  frame should be drained before the next frame's rows are needed. Frames that
  follow back to back are not managed beyond that.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_row_bank_buffer` | every output column against the streamed image, random gaps |
| `tb_window_regfile` | window contents after every shift |
| `tb_binomial_smoother` | direct 5x5 convolution, extremes, latency |
| `tb_bilinear_downsampler` | full output image for sizes not divisible by 3 |
| `tb_ofast` | all 65536 dark strings, bright strings, random windows; flag, orientation, score, four-cycle latency |
| `tb_nms3x3` | brute-force 8-neighbour maxima on random score maps with ties |
| `tb_sync_fifo` | queue model, full/empty, overflow |
| `tb_gaussian_buffer` | write data and addresses over two frames with random and long write stalls, row count and its restart, overflow |
| `tb_patch_buffer` | 4-pixel beat writes, including across the column wrap, and four random reads per cycle against a model |
| `tb_patch_fetch` | patch contents at the circular addresses, pixels and beats per reuse/full fetch, no request before rows are ready |
| `tb_rbrief` | descriptors for all 16 orientations and several pointers against a floating-point-derived reference, 130-cycle timing |
| `tb_scale_detector` | smoothed writes, down-sampled stream, keypoints and counts against a software model of one scale |
| `tb_descriptor_engine` | descriptors against the reference from memory contents, fetch volume, three scales, back-pressure, arbitration order |
| `tb_orb_top` | whole design on a 192x144 frame (see below) |
| `tb_orb_top_full` | the same at the default 1920x1080 size |

The end-to-end harness (`tb/orb_top_harness.sv`) works as follows:

* It builds the pyramid, the smoothed images, the keypoints and the
  descriptors in SystemVerilog from the input frame alone.
* It checks the smoothed images in the memory model, the per-scale candidate
  and keypoint counts, and every descriptor.
* It requires each mechanism to have occurred at least once: NMS suppression,
  reuse and full fetches, waiting for smoothed rows, descriptor back-pressure,
  switching between scales, and stalled smoothed-image writes (with no
  Gaussian image buffer overflow).

On the 1920x1080 synthetic frame:

* 363 keypoints were found (out of 2560 candidates).
* 38 patches were fetched with reuse.
* 687 k bytes were read instead of 735 k.
* Smoothed-image writes were refused for 640, 312 and 194 cycles (scales 0,
  1, 2) while pixels were waiting, and no Gaussian image buffer overflowed.

Run a testbench with plain Verilator (5.x) from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/orb_pkg.sv tb/tb_orb_top.sv --top tb_orb_top
./obj_dir/Vtb_orb_top
```

The full-size test runs in well under a minute. `tb/ext_mem_model.sv` is a
behavioural DRAM model (random request back-pressure and response gaps) used
by the testbenches. `tb/orb_ref_pkg.sv` holds the reference descriptor
function.
