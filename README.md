# Stereo depth map from two OV7670 cameras: block-wise SSD matching in block RAM

This is synthesizable SystemVerilog for a low-cost depth camera on a small FPGA.
Two OV7670 camera modules look at the same scene from slightly different
positions. Each frame pair is stored in on-chip block RAM. For every pixel of the
left image, a matcher finds how far the same patch has moved in the right image.
That shift, the disparity, is larger for near objects and smaller for far ones.
It is written out as an 8-bit grey-level depth image.

The design targets an Artix-7 class part, for example a Basys 3 board with 50
block RAMs of 36 Kbit. It is sized for 320 x 240 frames:

* Frames are stored as 4-bit pixels.
* The depth image has 256 grey levels.
* The matching cost is the sum of squared differences (SSD) over a 5 x 5 window.

The structure follows a published FPGA depth-map pipeline: its five stages, frame
size, pixel widths, memory budget, SSD cost and block-wise caching. Every interface,
the sequencing, and all sizes not listed above are this implementation's own
choices. The section "What is taken over and what is chosen here" lists each one.

## Pipeline

| Stage | Module(s) | Clock | What it does |
|---|---|---|---|
| Image acquisition | `i2c_camera_controller` (uses `sccb_master`) | `clk_cfg` | Writes the camera register settings over the SCCB (I2C-like) bus |
| | `camera_capture` (x2) | each camera's `pclk` | Receives one frame on request; keeps the luminance byte of each pixel |
| Image rectification | `exposure_correction` (x2) | `pclk` | Adds a signed brightness offset, clamps, and keeps the top 4 bits |
| | `vertical_offset_correction` (x2) | `pclk` | Moves the image by whole rows through the write address |
| Stereo buffer | `stereo_buffer` (uses `dual_clock_ram`) | write: `pclk`, read: `clk_disp` | Left and right RAMs of 320 x 240 x 4 bit |
| Disparity generator | `disparity_generator` (uses `ssd_unit`) | `clk_disp` | Block-wise cached SSD search over disparities 0..31 |
| | `average_image` | `clk_disp` / `clk_rd` | Debug image: floor((L+R)/2), 320 x 240 x 4 bit |
| Output buffer | `output_buffer` | `clk_disp` / `clk_rd` | Builds up the 320 x 240 x 8 bit depth image |
| Control | `frame_sequencer`, `sync_2ff`, `reset_sync` | `clk_disp` | Alternates capture and matching; handles clock-domain crossings |

`stereo_depth_top` wires all of this together. Shared constants are in
`stereo_pkg`: widths, the default sizes, the camera's SCCB ID and the register-write
struct. Clocks come from outside, for example from an MMCM:

* `clk_cfg` at 50 MHz;
* a disparity clock `clk_disp`;
* a read clock `clk_rd` for the image read ports;
* the cameras' own pixel clocks. The cameras are assumed to be fed a 25 MHz XCLK.

## The matcher: block-wise caching and the SSD search

This is the core of the design, and the part that needs the most explanation.

**Cost.** Take a left pixel (x, y) and a candidate disparity d. The cost is

    SSD(x, y, d) = sum over i, j in -2..2 of (L[y+j][x+i] - R[y+j][x+i-d])^2

The right camera sits to the right of the left one, so a scene point appears
further left in the right image. That is why the right window is taken d columns
to the left. `ssd_unit` evaluates one whole 5 x 5 window pair per clock, with no
clock inside it: 25 absolute differences, 25 squares, and a sum of up to 13 bits.

**Caches.** The frames stay in the stereo block RAMs. The matcher keeps two row
caches, one for the left image and one for the right. Each cache holds a band of
5 image rows, WIN x IMG_W pixels, which is 6,400 bits per image at the default size.
The rows are used circularly: row r lives in slot r mod 5.

Before output row y is computed, row y+2 is loaded if it exists. A load reads one
address per clock from both RAMs at once, and the RAMs answer one clock later. Each
image row is therefore read from block RAM exactly once per frame, in raster order.
Because those loads are a clean raster stream of (L, R) pixel pairs, they also feed
`average_image` through the `tap_*` outputs. The debug image costs no extra RAM
reads.

**Search.** For each output pixel, one candidate d is tried per clock, starting at
d = 0. The running minimum is kept, and a strictly smaller SSD replaces it, so on a
tie the smaller disparity wins. The search ends after d = 31, or at the last d for
which the right window still lies inside the image (x - d - 2 >= 0). The result is
written as `d * 256 / MAX_DISP`, which is d x 8 at the defaults, so 0..248.

Pixels within 2 of any image edge have no full window. They are given 0 in a single
clock. Pixels near the left edge get a shortened search and may report a wrong
(smaller) disparity when the true one is out of reach. This is the usual blind
band of a left-referenced matcher.

**Timing.** Every cycle is accounted for:

    cycles/frame = 2*IMG_H                      (row set-up states)
                 + IMG_W*IMG_H                  (cache loads)
                 + border pixels * 1
                 + sum over inner pixels of min(MAX_DISP, x-1)

At 320 x 240 with a 5 x 5 window and 32 disparities, this is **2,348,880 clocks**.
The end-to-end testbench checks this exact count. At 50 MHz that is 47 ms, or
21.3 frames per second. Matching at 25 frames per second needs
`clk_disp` >= 58.8 MHz. The full-size testbench runs `clk_disp` at 62.5 MHz.

**Cost of the caches.** The window gather reads 25 left and 25 right pixels at
arbitrary columns of the caches every clock. That takes wide multiplexers, which make up most
of the matcher's roughly 700 word-level cells in coarse synthesis. Keeping only five rows is what makes this fit
in LUT RAM and registers rather than a whole frame.

## Frame sequencing and clock domains

The memory budget holds exactly one left, one right, one average and one depth
frame. `frame_sequencer`, in the `clk_disp` domain, therefore never lets capture
and matching touch the stereo RAMs at the same time:

1. It waits for `cfg_done` from the configuration controller, synchronised.
2. It raises `capture_req` to both `camera_capture` blocks.
3. Each capture block synchronises the request and waits for the next VSYNC pulse.
   It then stores exactly one frame and raises `capture_ack`.
4. When both acks are seen, the sequencer drops the request. Each capture block
   then drops its ack, completing a four-phase handshake.
5. It pulses `start` to the matcher and waits for `done`. Then it goes back to
   step 2.

Every crossing between clock domains is one of these:

* a level passed through a two-flop synchroniser, for a handshake or `cfg_done`;
* a block RAM with independent write and read clocks, which is safe because of the
  handshake.

The correction settings (`exp_off_*`, `voff_*`) are used directly in the pixel-clock
domains. Treat them as static, and change them only between frames. Each domain has
its own reset synchroniser. The reset is asynchronous and active low.

Note on rate: a full cycle is a camera frame of capture, plus up to one frame of
waiting for VSYNC, plus the matching. That gives roughly 10-14 depth frames per
second. Reaching 25 would need capture of the next pair to overlap matching of the
current one, and so a second set of stereo buffers, which the block RAM budget does
not leave room for.

## Camera interface and configuration

`camera_capture` expects QVGA YUV 4:2:2 in byte order Y U Y V, and works as follows:

* Bus signals are sampled on the rising PCLK edge.
* A frame begins when VSYNC falls after its pulse.
* A line is the time HREF is high.
* Even bytes of a line are luminance; odd bytes are chroma and are discarded.
* Output is a stream of (luminance, column, row), one PCLK after the byte.

`i2c_camera_controller` makes the camera produce that format by writing six
registers after reset. Each is a three-phase SCCB write to ID 0x42:

| Register | Value | Meaning |
|---|---|---|
| COM7 | 0x80 | soft reset, followed by a 1 ms wait |
| COM7 | 0x10 | QVGA, YUV |
| CLKRC | 0x01 | internal clock = input / 2 |
| TSLB | 0x04 | Y U Y V order |
| COM13 | 0x88 | Y U Y V order |
| COM15 | 0xC0 | output range 0..255 |

The SIO_C clock is 100 kHz from 50 MHz (`QDIV` = 125 clocks per quarter period).
SIO_D is driven through `cam_siod_o` / `cam_siod_oe` and released in each ninth
("don't care") bit slot. The top drives the same bus lines to both cameras.

This register list is a minimal one. It does not set exposure, white balance,
PCLK scaling or frame rate. On real hardware, extend the table in
`i2c_camera_controller` (function `cfg_table`, parameter `NREG`) as needed.

## Rectification

**Exposure correction.** `out = clamp(Y + offset, 0, 255) >> 4`. The offset is a
signed 9-bit input per camera, and `out_sat` flags clamped samples. The two cameras'
brightness must match closely for SSD to work, because SSD compares raw intensities.

**Vertical offset correction.** A pixel from camera row r is written to buffer row
r + `voff` (signed). Rows pushed outside the frame are dropped. Rows uncovered at the
other edge keep what they held before, so in practice depths near that edge are
invalid. Only whole-row shifts are supported: there is no sub-pixel, rotation or
lens-distortion correction.

## Memory

| Buffer | Size | Bits |
|---|---|---|
| left, right, average | 3 x 320 x 240 x 4 bit | 921,600 (115,200 bytes) |
| depth | 320 x 240 x 8 bit | 614,400 (76,800 bytes) |
| total block RAM | | 192,000 bytes, 85% of 225,000 |
| row caches (LUT RAM / registers) | 2 x 5 x 320 x 4 bit | 12,800 |

All RAMs are inferred from arrays by `dual_clock_ram`. It is a simple dual-port RAM
with a registered read, one clock of latency, and uninitialised contents. The
average image exists only for debugging and can be removed from the top without
affecting the depth output.

## What is taken over and what is chosen here

Taken from the published design:

* the five-stage pipeline and the names of its sub-units;
* 320 x 240 frames, 4-bit stored pixels and an 8-bit depth image;
* the three-frame plus depth-frame memory budget;
* SSD as the matching cost;
* matching block-wise so as to use little LUT RAM;
* I2C camera configuration and the 8-bit parallel camera bus;
* a 25 MHz camera clock, a 50 MHz clock for housekeeping and a separate, adjustable
  disparity clock;
* 25 frames per second as the target rate.

Chosen here, because the published description does not fix them:

* window 5 x 5 and 32 disparities;
* the row-band reading of "block-wise", one candidate per clock, tie-break towards
  the smaller d, zero at the borders, and d x 8 grey-level scaling;
* YUV capture with luminance only;
* the additive exposure correction and the whole-row vertical correction;
* the camera register list;
* all handshakes, the stream interfaces and the read ports;
* the disparity clock also clocking the block RAM read side;
* one shared SCCB bus for both cameras.

Departures and limits:

* The 25 fps target is not reached end to end; see "Frame sequencing".
* There is no display or host output. The depth and average images are exposed as
  read ports (`depth_raddr`/`depth_rdata` and `avg_raddr`/`avg_rdata`, one `clk_rd`
  of latency).
* The clock generator (MMCM) and the cameras themselves are outside this RTL.

## Simulating

Everything runs with plain Verilator 5. From the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/stereo_pkg.sv tb/stereo_tb_pkg.sv tb/tb_stereo_depth_top.sv \
        --top-module tb_stereo_depth_top -o sim
    obj_dir/sim

Replace the testbench name to run another one. Each testbench is self-checking. It
ends with a line `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_stereo_depth_top` | 48 x 24 frames, 16 disparities, two depth frames |
| `tb_stereo_depth_top_full` | All defaults (320 x 240, 32 disparities, real SCCB timing), one frame; runs in about 10 s |
| `tb_disparity_generator` | Every output pixel against a brute-force SSD search, the tap stream, the exact clock count |
| `tb_ssd_unit` | Random and extreme windows against a reference sum |
| `tb_camera_capture` | Capture only on request, pixel values and positions, handshake |
| `tb_i2c_camera_controller` | Decodes the SCCB bus: ID, register/value list, released ack slots, reset wait, restart |
| `tb_exposure_correction`, `tb_vertical_offset_correction` | Random samples against reference arithmetic, clamping and dropping |
| `tb_stereo_buffer`, `tb_average_image`, `tb_output_buffer` | Write and read-back across independent clocks; restart of a frame |

**End-to-end testbenches.** Both use `stereo_env`, which contains two `ov7670_model`
camera models looking at one pseudo-random scene. The right view is shifted by a
known disparity, moved down a few rows and brightened by 48. The environment sets
the rectification inputs to undo the last two, and then checks:

* every border pixel of the depth image is 0;
* every inner pixel that can see the true shift shows it;
* the average image is correct;
* a frame takes the clock count given by the formula above;
* each mechanism occurred: SCCB writes, capture handshakes, exposure correction,
  dropped rows, cache loads, SSD evaluations, shortened searches and frame
  completion.

## Changing it

Top-level parameters:

* `IMG_W`, `IMG_H`: frame size;
* `WIN`: odd window edge;
* `MAX_DISP`: number of disparities searched, best a power of two up to 256 so that
  the grey-level scaling is exact;
* `SCCB_QDIV`, `CFG_GAP`, `RESET_WAIT`: configuration bus timing, in `clk_cfg`
  clocks.

Effects of changing them:

* Larger `WIN` grows `ssd_unit` and the cache multiplexers quadratically.
* Larger `MAX_DISP` grows the frame time linearly.
* A faster matcher would evaluate several candidates per clock: instantiate several
  `ssd_unit`s on shifted right windows and take the minimum.
