# Reversi board detection with a streaming Hough transform

A camera looks down at a reversi (Othello) board. To find the stones, software first has to
know where the board is: the four sides of the green playing area. This RTL does the part of
that job that costs the most time on an embedded processor:

- it marks the green pixels of a colour picture;
- it closes the holes that stones leave in the green region;
- it takes the boundary of that region;
- it runs a Hough line transform over the boundary.

It returns up to 32 straight lines as (rho, theta) pairs. Software then groups the lines by angle
and picks the largest rectangle. That step, stone recognition and drawing the result are not
part of this RTL.

The accelerator is built for an FPGA SoC, a processor and FPGA fabric on one chip sharing DRAM:

- The processor leaves the picture in DRAM and writes a few arguments over AXI-Lite.
- The accelerator reads the picture over its own AXI4 port, one pixel per clock cycle.
- It writes two float32 arrays, rho and theta, back to DRAM.

Next to it sits a small video overlay subsystem for a live demonstrator:

- The processor draws a 480 × 270 picture into a block RAM.
- An overlay controller mixes that picture into a 1920 × 1080 HDMI output stream.
- The overlay runs on the video clock, so the output video keeps moving while a slow detection
  runs.

```
            AXI-Lite            AXI4 read          AXI4 write ×2
 processor ───────────┐        ┌─────────┐        ┌────────────┐
                  axil_ctrl    │ image   │        │ rho, theta │
                      │        │ reader  │        │ writers    │
                      ▼        └────┬────┘        └─────▲──────┘
               board_detect_accel   │ BGR pixels        │ float32
                                    ▼                   │
   blur 3×3 → BGR→HSV → inRange ×2 → OR → dilate 7×7 → erode 7×7
        → (dilate 3×3 XOR erode 3×3) → dilate 3×3 → hough_lines

 processor ── AXI-Lite ── axil_bram_if ── overlay_bram ── overlay_ctrl ── HDMI out
                                (clk)         (clk | vid_clk)     (vid_clk)
```

`board_detect_system` is the top. It holds the accelerator and the overlay subsystem. The
processor, the DRAM and the HDMI input/output pipelines are outside the RTL. Their buses are
ports of the top.

## The pixel pipeline

### Streams

Every stage between the image reader and the Hough block uses the same plain stream: a `valid`
bit and a data word, one pixel per cycle, in raster order. There is no `ready`. A stage cannot
stall the one before it, and every stage always accepts a pixel. Gaps in the stream come only
from the AXI read channel. When memory is slow the reader simply sends no pixel that cycle, and
every stage downstream treats that gap as "no pixel".

Where a result feeds two stages, the wire fans out. The closed mask, for example, feeds both
the 3×3 dilate and the 3×3 erode. The two branches have the same latency, so their outputs
arrive in the same cycle and can be XORed directly. `stream_bitwise` asserts this.

Colour stages carry `bd_pkg::bgr_t` or `hsv_t` (three bytes). Mask stages carry one bit per
pixel.

### Windows: `sliding_window`

The blur, dilate and erode stages are built on `sliding_window`. Its parts:

- **Line buffers.** K−1 memories, each indexed by column. A pixel arriving at column x is written
  into every buffer at x, after the older rows have been read out. This is the usual shift
  through the rows, done with one read and one write per buffer per pixel.
- **Shift window.** A K×K register array that shifts one column per pixel.
- **Window centre.** It lags the input by R·W + R pixel slots, where R = (K−1)/2 and W is the
  run-time image width.
- **Border.** Window elements that fall outside the image are replaced by the parameter
  `BORDER`. It is 0 for the blur and dilate, and 1 for erode. So a region that touches the image
  edge is not worn away by erosion.
- **Flush.** The last R rows and R columns have no later input to push them out. After the last
  input pixel, the window generates its own flush ticks, one per cycle, until the last centre has
  been produced. `done` then rises.

The maximum width `MAXW` (1024) sets the depth of the line buffers. The run-time width and height
(`cfg_w`, `cfg_h`) may be anything from 1 up to the maximum.

| Stage | Latency from input pixel (x, y) to output pixel (x, y) |
|---|---|
| 3×3 window + blur register | W + 2 … W + 4 cycles (depends on input gaps) |
| 7×7 window | 3W + 4 … 3W + 6 cycles |
| bgr2hsv, inRange, bitwise | 1 cycle each |

### Stages

- **`gaussian_blur`**: a 3×3 Gaussian filter, applied as a vertical pass then a horizontal pass
  with the same 1-D weights (`ws`, `wc`, `ws`), each a Q0.16 fraction.
  - The weights are run-time inputs, so the filter's sigma can change between frames. The host
    computes them: for sigma σ, `wc = 65536/(1+2e^(−1/(2σ²)))` and `ws = (65536−wc)/2`.
  - The register reset values give the sigma-free kernel 1/4, 1/2, 1/4.
  - The result is rounded to nearest and saturated at 255.
- **`bgr2hsv`**: converts to 8-bit HSV with OpenCV's ranges: H 0–179, S and V 0–255.
  - V is the maximum channel and S = 255·(V−min)/V.
  - H comes from the usual six-sector formula.
  - Both divisions use reciprocal tables in Q12: 255·4096/i and 30·4096/i. The tables are
    computed when the design is elaborated.
  - Results can differ from exact rounding by one count.
- **`in_range`**: an inclusive per-channel range test, giving 1 bit.
  - It is used twice. A pixel is green if 45 ≤ H ≤ 90 and it is in one of two boxes: (S ≥ 89 and
    V ≥ 30), or (S ≥ 64 and V ≥ 89).
  - The bounds are in `bd_pkg`.
- **`stream_bitwise`**: OR of the two green masks; XOR of dilate and erode.
- **`dilate` / `erode`**: binary morphology with a K×K square. The 7×7 pair is a closing: it
  fills the holes stones leave in the green region, so that their outlines do not produce lines.
  The 3×3 pair forms the edge detector.

### Edge detection without a Laplacian

The classic approach is a Laplacian filter on the mask followed by the Hough transform. This
design produces the boundary with morphology instead:

- `dilate3(mask) XOR erode3(mask)` is 1 exactly on the pixels that touch the region boundary,
  whether inside or outside it.
- A further 3×3 dilation thickens that band to about four pixels. This makes the votes for a
  straight side land reliably in a 3-pixel rho bin, even when the side is not perfectly straight
  after quantisation.

The stage count matches a pipeline of twelve OpenCV-style functions: blur, colour conversion,
two range tests, OR, dilate, erode, dilate, erode, XOR, dilate and the Hough transform.

## The Hough transform (`hough_lines`, `hough_accum`)

This is the largest and least obvious part of the design. It takes one mask bit per cycle and
has to vote in all 60 angles in that same cycle.

### Geometry

A line is written ρ = (x − W/2)·cos θ + (y − H/2)·sin θ, with the origin at the image centre.

| Quantity | Values |
|---|---|
| θ | t·3°, for t = 0 … 59 (`NTHETA` = 60) |
| ρ step | 3 pixels (`RHO` = 3) |
| ρ range | [−d/2, d/2), where d = ⌈√(MAXW² + MAXH²)⌉ |
| Bins | NRHO = 2·⌈d/(2·RHO)⌉, which is 484 for 1024 × 1024 |

The range is sized for the largest image, not for the current one, so the accumulators never
overflow their address range.

### Voting: 60 accumulators and running rho

Each angle has its own accumulator, `hough_accum`: an NRHO × 16-bit RAM, small enough for one
18 Kbit block RAM. Every cycle that carries a pixel, all 60 angles work out their bin and, if the
pixel is set, add one vote.

No angle multiplies x by cos θ per pixel. Each angle keeps a **running rho** instead:

- It is kept in units of bins, as a signed fixed-point number with `FRAC` = 24 fraction bits
  (40 bits in all).
- Moving one pixel to the right adds cos θ / RHO.
- At the end of a row the value restarts from that row's start value, and the row start then
  advances by sin θ / RHO.
- The bin index is the integer part plus NRHO/2.

The constants cos θ/RHO and sin θ/RHO are rounded to 24 fraction bits, so a pixel whose exact ρ
falls on a bin edge could land on either side. To avoid that, a bias of 2⁻¹² bin is added once.
It outweighs the rounding error accumulated over 2048 steps, but is far below any real distance
between a point and a bin edge. An exact-edge ρ therefore always lands in the upper bin, which is
what floor() of the exact value gives. `tb_hough_lines` checks the bins against a reference in
`real` arithmetic.

**Initialisation.** The starting value for each angle is the ρ of the top-left pixel,
−(W/2)·cos θ − (H/2)·sin θ, converted to bins. Only one multiplier computes it, one angle per
cycle, while the accumulators are being cleared. This INIT phase takes max(NRHO, NTHETA) = 484
cycles. The accelerator does not start reading the image until `vote_ready` rises.

**Read-modify-write and forwarding.** A vote takes two cycles: read the count, then write count
+ 1. The same bin can be voted for again in the very next cycle, for example by a horizontal run
of pixels at θ = 90°. The RAM would then return the stale count. `hough_accum` remembers the
address and value it just wrote, and uses that value when the new read is to the same address.
`fwd_hit` shows when this happens, and the testbenches count it. Counts saturate at 65535.

### Scan: local maxima and the top 32

When the last pixel has voted, three drain cycles let the final writes finish. The scan then
walks the rho rows:

1. **SCAN_RD / SCAN_LD.** Read bin r of all 60 accumulators in parallel into a row register.
   The previous and next rows are kept too, so every bin can see its four neighbours.
2. **SCAN_EV.** Examine the 60 angles of row r, one per cycle. A bin is a line when:
   - its count is greater than `threshold` (500 by default, set at run time through the
     register map);
   - it is greater than its neighbours at ρ−1 and θ−1;
   - it is at least its neighbours at ρ+1 and θ+1.

   Neighbours outside the table count as 0. Angles do not wrap around. The asymmetric rule
   keeps one bin out of a plateau of equal counts.
3. **Insert.** Each line found goes into a list of `LINESMAX` = 32 entries, sorted by votes.
   Ties go to the smaller θ, then the smaller ρ. Each entry compares itself with the new line
   and either keeps its place, takes the new line, or takes its upper neighbour, all in one
   cycle. Lines that do not make the top 32 are dropped. `nfound` counts every maximum;
   `nlines` counts the ones kept.

The scan takes (NRHO+1)·2 + NRHO·NTHETA cycles: 29,010 at the default size.

### Results as float32

`rho_idx` and `theta_idx` are two independent, combinational read ports of the sorted list.
They return IEEE-754 single-precision values:

- ρ at the centre of its bin: (2(r − NRHO/2) + 1)·RHO/2;
- θ in radians: t·π/60.

Both come from fixed-point values with an exact conversion to float (leading-one detection and a
shift), so no floating-point unit is needed. Entries past `nlines` repeat the last line found.
If no line was found, they are 0.0.

## Memory interfaces and control

### `axi_image_reader`

An AXI4 read manager with 32-bit data and INCR bursts of 16 beats.

- The image is packed OpenCV-style: 3 bytes per pixel in B, G, R order, rows back to back.
- An 8-byte realignment buffer turns 4-byte beats into 3-byte pixels.
- Bursts are requested ahead as long as words remain. `rready` is withdrawn while the buffer has
  no room for another word; this is the only backpressure inside the accelerator. `arvalid` and
  its address stay stable until accepted (asserted).
- The base address must be aligned to 64 bytes.

### `axi_array_writer` (two instances)

Each writes `N` = 32 32-bit words in a single INCR burst: one for the rho array, one for the
theta array.

- It fetches word i through a combinational index port (`data_idx` → `data`), which the Hough
  block's read ports serve directly.
- `err` is set if the write response is not OKAY.

### `axil_ctrl`: register map (byte offsets, 32-bit registers)

| Offset | Name | Meaning |
|---|---|---|
| 0x00 | CTRL | write bit 0 = start; read bit 0 busy, bit 1 done, bit 2 idle |
| 0x10 | IMG | image base address |
| 0x18 | RHO | rho array base address |
| 0x20 | THETA | theta array base address |
| 0x28 | ROWS | image height (1 … 1024) |
| 0x30 | COLS | image width (1 … 1024) |
| 0x38 | THRESH | vote threshold, reset 500 |
| 0x40 | WC | Gaussian centre weight, Q0.16, reset 32768 |
| 0x44 | WS | Gaussian side weight, Q0.16, reset 16384 |
| 0x48 | NLINES | lines kept in the last run (read only) |

Notes on the register interface:

- A start written while a run is busy is ignored.
- `done` stays set until the next start.
- The top also brings out `acc_irq`, a one-cycle pulse at the end of a run.
- Byte strobes are ignored.

### Sequencing (`board_detect_accel`)

The accelerator steps through these states: IDLE → HINIT → RUN → WRITE → FIN.

| State | What happens |
|---|---|
| HINIT | The Hough block clears and initialises its accumulators. |
| RUN | The image is read and streamed through the pipeline. |
| WRITE | Both arrays are written, in parallel. |
| FIN | Done is set and the interrupt pulse is raised. |

All window stages are restarted with the frame size at the beginning of RUN.

## Video overlay

- **`overlay_bram`**: 480 × 270 bytes (129,600), stored as 32,400 words of 32 bits. It has two
  ports on two clocks:
  - Port A is word-wide with byte enables, on `clk`, for the processor.
  - Port B reads single pixels, on `vid_clk`, for the controller.
- **`axil_bram_if`**: an AXI4-Lite subordinate that maps port A into the processor's address
  space. It honours byte strobes and has a single outstanding access.
- **`overlay_ctrl`**: sits in an AXI4-Stream video path. `tuser` marks start of frame, `tlast`
  marks end of line, and `tdata` holds 24-bit {R, G, B}.
  - Output pixel (x, y) uses overlay pixel (x/4, y/4).
  - An overlay byte is {opaque, R[1:0], G[2:0], B[1:0]}. With bit 7 clear the video pixel passes
    through. Otherwise the 2-3-2 colour, widened by bit repetition, replaces it.
  - It has one register stage with a full valid/ready handshake, so the video sink can stall it.

## Performance

| Phase | Cycles |
|---|---|
| INIT | 484 |
| VOTE | about one cycle per pixel, plus gaps caused by memory latency |
| SCAN | 29,010 |
| WRITE | about 70 |

The Hough block is the only block that needs time beyond streaming. In simulation, a 1024 × 683
picture with a memory model that inserts random wait states took 812,819 cycles from start to
done. That is 1.16 cycles per pixel; 699,392 of the cycles are pixels. The cycle budget does not
depend on what the picture contains. A full 1024 × 1024 frame took 1,198,064 cycles under the same conditions.

## Where this design departs from, or goes beyond, the description it follows

These points follow the reference design as described:

- The pipeline order and the twelve functions.
- The green ranges.
- The 3×3 default filter size and the 7×7 closing.
- The Hough transform with 3-pixel and 3° steps, 60 parallel voting units with one block RAM
  each, and a running ρ incremented by cos θ.
- Starting ρ computed sequentially at initialisation.
- Threshold 500, LINESMAX 32, and the last line repeated to fill the arrays.
- Float results.
- Images up to 1024 × 1024.
- One AXI manager per array, with arguments passed over AXI-Lite.
- A 480 × 270 × 8-bit overlay with a transparency bit, in block RAM, with an AXI interface,
  drawn by a controller in the HDMI output path.

These are this design's own choices:

- **Streams.** Push streams without backpressure; masks of 1 bit rather than 8.
- **Edge step.** The XOR of dilate and erode, followed by a dilate, stands in for the Laplacian.
- **Borders.** Zero padding for the blur and dilate, one padding for erode.
- **Bus details.** All AXI widths, the burst lengths, the pixel byte order and the register map.
- **Gaussian weights.** Given as weights rather than computed from σ in hardware.
- **Hough fixed point.** The fixed-point format and bias of the running ρ.
- **Local-maximum and ordering rules.** These follow the usual OpenCV convention.
- **Thresholding.** A strictly-greater comparison.
- **Accumulator clearing.** The accumulators are cleared at every start.
- **Zeros when no line is found.** The arrays then hold zeros.
- **Overlay encoding.** The colour encoding of overlay bytes (RGB 2-3-2) and the 4× scale.

No clock frequency is assumed anywhere.

These parts are outside the RTL:

- the processor and DRAM (a behavioural AXI memory model, `tb/axi_mem_model.sv`, plays them in
  the tests);
- the HDMI input/output pipelines;
- the software that picks the board sides from the lines and recognises stones.

## Verification

Every block has a self-checking testbench in `tb/` that compares the block against a model
written independently in the testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_bgr2hsv`, `tb_in_range`, `tb_stream_bitwise` | random and corner-case pixels |
| `tb_gaussian_blur`, `tb_dilate`, `tb_erode` | random images with random input gaps, against a reference filter with the same border rule; latency ranges (K = 3 and K = 7) |
| `tb_hough_accum` | random votes, back-to-back votes to one bin (forwarding), clears, saturation |
| `tb_hough_lines` | synthetic lines plus noise at 64 × 64, against a `real`-arithmetic Hough model with the same rules; maxima count, LINESMAX overflow, repetition and zero fill; INIT and SCAN cycle counts |
| `tb_axi_image_reader`, `tb_axi_array_writer` | random wait states on every channel; byte order, burst rules, `wlast` |
| `tb_axil_ctrl`, `tb_axil_bram_if`, `tb_overlay_bram` | register and memory access, address and data in both orders, byte strobes, reset values, refused start |
| `tb_overlay_ctrl` | random overlay content and output backpressure |
| `tb_board_detect_accel` | the accelerator alone at 64 × 64 maximum: three runs with different picture sizes and thresholds; board sides, CTRL bits, completion pulse, bus address ranges, LINESMAX overflow |
| `tb_board_detect_system` | the whole design on a 60 × 44 synthetic board photo (green board, stones, noise), built for 64 × 64 maximum size |
| `tb_full_system` | the same test with every parameter at its default: two runs on a 1024 × 683 picture, then one on a 1024 × 1024 frame |

The two end-to-end tests must find the four board sides, within one and a half bins. They also
count each mechanism at least once:

- AXI read backpressure;
- accumulator forwarding;
- lines dropped beyond 32;
- last-line repetition;
- a refused start;
- opaque and transparent overlay pixels;
- video backpressure.

To simulate with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/bd_pkg.sv tb/tb_full_system.sv \
          --top-module tb_full_system -o sim && ./obj_dir/sim
```

`-Wno-fatal` keeps Verilator's lint warnings (unused signal bits, index widths) from stopping the build. Replace the file and top name to run any other testbench. All testbenches initialise or reset
everything they read, so they also pass with `+verilator+rand+reset+2`. The full-size test takes
about 10 seconds of simulation time on a desktop machine.

### Limits worth knowing

- **Hardware.** Only simulation and synthesis checks have been done. No timing closure or
  hardware test exists.
- **Scan critical path.** The insertion into the line list compares all 32 entries in one cycle.
  At high clock rates this may need pipelining.
- **Hue rounding.** Hue at sector boundaries can differ from a floating-point conversion by one
  count, which can move a pixel across the inRange limits.
- **Bin edges.** Lines whose ρ is close to a bin edge may split their votes between two bins.
  With threshold 500 a short side may then be missed. This is a property of the Hough transform,
  not of this implementation.
- **Image read.** The reader relies on OKAY responses and does not check `rresp`.
