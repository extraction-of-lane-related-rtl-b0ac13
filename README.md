# Sobel edge-feature front end for real-time lane detection

Lane marks on a road are brighter than the asphalt, they change direction
slowly, and the left and right marks are roughly mirror images of each other
about the lane centre. So if you take every strong edge pixel in the lower
part of a road image and add its edge strength into a histogram indexed by
its edge *orientation*, you get two clear peaks, one for each lane
boundary. That histogram is the **edge distribution function (EDF)**:

    F(d) = sum of w * |grad f(x,y)| over all pixels whose orientation is d,   d = 0..179 degrees

Finding its two local maxima gives the orientation of both lane boundaries
without any camera calibration.

The hard part is computing the per-pixel inputs (a 3x3 Sobel gradient, its
magnitude and its arctangent) for a whole frame fast enough. This RTL is
the hardware front end that does it. It captures interlaced video fields
from a video decoder, rebuilds the frame, and streams out intensity, edge
magnitude, edge orientation and gradient signs for every pixel at one pixel
per clock. A processor (a DSP in the original system) then builds the EDF,
finds its peaks, fits lines and draws the result. The processor writes that
result into a double-buffered output memory that feeds the video encoder.

The default size is a 320 x 240 frame of 8-bit pixels, captured as two
320 x 120 fields.

## Data flow

```
 video decoder          capture_ctrl        field_fifo (even) ──┐
 (ROI pixels,    ──────►  grab / field  ───►                    ├─► field_mux ──► raw frame to DSP
  field start)            steering          field_fifo (odd)  ──┘   line-interleave      │
                             │ read_irq (60th odd line)              and read pacing     ▼
                             ▼                                                    preproc_unit
                            DSP ── proc_start ──────────────────────────────►  line_buffer x2
                             │                                                sobel_edge_detector
                             │                                                  staging_register
                             │                                                  gradient_calc
                             │                                                  magnitude_calc
                             │                                                orient_lut (1M x 8 ROM)
                             │                                                       │
                             │◄────────────────── edge records ──────────────────────┘
                             │
                             ├── result image ──► output_bank_buffer (A/B) ──► video encoder
                             └── register writes ─► i2c_master ──► decoder / encoder set-up
```

Everything is in `lane_onboard_top`. The decoder, DSP, video encoder and
on-screen-display chip are external parts. Their signals are the top
module's ports.

## Capturing a frame while it is still arriving

Most of the timing subtlety of this design is here. `capture_ctrl`,
`field_fifo` and `field_mux` handle it.

An interlaced camera sends all even lines of a frame (one field), then all
odd lines. Each field goes into its own FIFO. To process the frame in
raster order, the read side must alternate between the FIFOs: line 0 from
the even FIFO, line 1 from the odd FIFO, line 2 from the even FIFO, and so
on.

A grab works like this:

1. The DSP pulses `grab`. Both FIFOs are cleared, and capture waits for the
   next even field start (`dec_vs` with `dec_odd` low). A grab issued in
   mid-field therefore waits.
2. The even field is written to the even FIFO. The odd field that follows
   is written to the odd FIFO. Capture then stops: later fields are ignored
   until the next grab. `even_done` and `odd_done` rise once W*H/2 pixels of
   each field are stored.
3. Once `READ_LINE` (60) lines of the odd field are stored, `read_irq`
   pulses. The DSP answers with `proc_start`. Processing therefore overlaps
   the second half of the odd field instead of waiting for it.
4. `field_mux` now reads the frame. The even lines are all there already.
   The odd lines are still being written, and a dual-port FIFO must not
   read the location being written. So a FIFO is only read while it holds
   **more than `MIN_GAP` (600) pixels**, or once its field is complete.
   When the reader catches up with the writer, it stalls: `read_stall` is
   high, and no pixel is output that clock.

With the defaults and a decoder delivering one pixel every four clocks, the
end-to-end test reads the frame in 80,306 clocks. 3,500 of them are
stalls; the ideal is 76,800, one per pixel.

The field FIFOs are single-clock, first-word-fall-through FIFOs of
2^16 entries each. One field needs 38,400. In the original system they are
separate dual-port FIFO chips whose read and write sides run on their own
clocks; here everything runs on one clock.

## The Sobel pipeline

`preproc_unit` turns the raster stream into edge records.

**Line buffers.** The incoming line is N. `line_buffer` is a W-entry
circular memory that returns the pixel of the same column one line
earlier. Two of them in series provide lines N-1 and N-2. The detector is
only fed from the third line of a frame on.

**Staging register** (9 registers, 1 clock). Each clock one column of three
pixels enters: line N into Z1, N-1 into Z4, N-2 into Z7. The older columns
shift right (Z1→Z2→Z3 and so on). So Z1/Z4/Z7 is the newest column and
Z3/Z6/Z9 the oldest:

```
  Z1 Z2 Z3     line N      (newest column on the left of this picture)
  Z4 Z5 Z6     line N-1
  Z7 Z8 Z9     line N-2
```

Its output enable `oe` rises with the third pixel of each line, because
the first two columns do not yet form a full window.

**Gradient calculator** (3 clocks). The gradients are

    Gx = (Z3 + 2*Z6 + Z9) - (Z1 + 2*Z4 + Z7)
    Gy = (Z7 + 2*Z8 + Z9) - (Z1 + 2*Z2 + Z3)

They are built as an adder tree with a register after each level:

* 8 pair sums of 9 bits;
* 4 weighted sums of 10 bits, each Za + 2*Zb + Zc built as (Za+Zb) + (Zb+Zc);
* 2 differences of 11 bits signed.

The full range is -1020..1020.

Because Z1 is the *newest* pixel of the *newest* line, Gx is positive
when the image gets brighter towards the left, and Gy is positive when it
gets brighter upwards. Both are negated compared with the usual image
convention. This has no effect on the magnitude or on atan(Gx/Gy). It
only matters if you use the sign bits `gx_neg` and `gy_neg`.

**Magnitude calculator** (1 clock). `|Gx| + |Gy|` stands in for the
Euclidean norm. It is a 16-bit output; the largest value is 2040.

**Orientation ROM** (same clock as the magnitude). `orient_lut` is
described in the next section.

Timing: a column that enters the staging register at clock n produces its
gradients at n+3. At n+4 the magnitude is registered and the ROM output is
registered. `sobel_edge_detector` shows the ROM-side gradients
(`lut_gx`, `lut_gy`) one clock ahead of its aligned outputs for this
reason. `preproc_unit` adds one input register. Counted from the pixel that
completes a window, the record appears **6 clocks** later.

Each frame gives (W-2) x (H-2) records in raster order. There are none for
the border pixels. Each record (`lane_pkg::edge_feat_t`) holds:

* the centre intensity Z5;
* the magnitude;
* the orientation in degrees;
* the two gradient signs.

Its coordinates come out on `edge_x` and `edge_y`.

## The orientation ROM

An arctangent does not fit in one clock, so the orientation is read from a
1M x 8 ROM, the size of the 8-Mbit EPROM used in the original design. The
address is built by `lane_pkg::lut_addr`:

| bits  | 19      | 18:10     | 9       | 8:0       |
|-------|---------|-----------|---------|-----------|
| field | Gy sign | \|Gy\| / 2 | Gx sign | \|Gx\| / 2 |

Halving folds the gradient range ±1020 into ±510, so nine magnitude bits
are enough. Each entry is `round(atan(Gx/Gy))` in whole degrees, from -90
to 90, in two's complement. atan(x/0) is ±90 and atan(0/0) is 0.

The contents are computed at elaboration, with integer arithmetic only, so
no data file is needed.

* For each magnitude pair (ax, ay), the angle is the number of rounding
  boundaries b_k = k + 0.5 degrees (k = 0..89) with
  `ax * cos(b_k) > ay * sin(b_k)`.
* The cos/sin pairs come from rotating (cos 0.5°, sin 0.5°) by 1° at a
  time in Q30 fixed point. The four constants are round(2^30 × cos/sin of
  1° and of 0.5°).
* The sign is the product of the two gradient signs.

Filling the ROM takes about 262,000 loop iterations at start-up.

To get the EDF bin d in 0..179 from the orientation a, use d = a for a ≥ 0
and d = a + 180 otherwise (+90 and -90 both map to 90). This is what the
end-to-end testbench does.

## Output memory

`output_bank_buffer` holds two W x H image memories, A and B.

* The DSP writes by raster address into the bank that is *not* on display.
* The encoder side pulses `disp_sof` at each display frame start. It then
  reads pixels in raster order with `disp_rd`; the data follows one clock
  later.
* A `swap` request is held (`swap_pending`) until the next `disp_sof`, and
  the banks exchange at that moment. The monitor never shows a half-written
  image, and the writer never waits.

## I2C master

`i2c_master` writes one register per command: START, 7-bit device address
with the write bit, register address, data, STOP. After each byte it
releases SDA for the acknowledge bit and samples it. A missing acknowledge
sets `ack_err`. SCL and SDA outputs mean "pull low" when 0 (open drain).
Each bit takes 4 × `DIV` clocks, which is about 100 kHz at 33 MHz with
`DIV = 83`. The DSP uses it to set the decoder's crop window and to set up
the other video chips.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `W`, `H` | 320, 240 | top, most blocks | frame size |
| `FIFO_AW` | 16 | top (`AW` in `field_fifo`/`field_mux`) | log2 of field FIFO depth |
| `READ_LINE` | 60 | top, `capture_ctrl` | odd line at which `read_irq` fires |
| `MIN_GAP` | 600 | top, `field_mux` | minimum read-behind-write distance in pixels |
| `I2C_DIV` | 83 | top (`DIV` in `i2c_master`) | clocks per quarter SCL bit |
| `LUT_AW` | 20 | `lane_pkg` | ROM address bits (fixed by the address map) |

The ROM address map assumes 9-bit gradient magnitudes, so `LUT_AW` should
stay 20. `FIFO_AW` must be large enough for W*H/2 pixels.

## How far to trust it, and where it departs from the original

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

* The Sobel blocks are compared with the equations, evaluated in the
  testbench.
* The ROM is compared with floating-point `atan` over about 27,000
  addresses.
* `tb_lane_onboard_top` runs the whole design at the default size. It uses:
  * a camera model that draws a synthetic road with two lane marks;
  * an I2C slave model;
  * a DSP model that grabs, answers the interrupt, and checks all 76,800
    raw pixels and all 76,152 edge records against a reference Sobel;
  * an encoder model.

  The DSP model also builds the EDF (pixels with magnitude of at least 200,
  unweighted). It takes the largest bin on each side of 90°, and checks
  that both lie within 2° of the lane-mark orientations computed from the
  drawing geometry. Here they are 65° and 115°, and both are found exactly.
  The test also counts each mechanism and fails if one never happens: the
  grab waiting for an even field, the interrupt, read stalls, bank swaps,
  and acknowledged I2C writes.
* `tb_lane_sequence` grabs four frames in a row at the default size. The
  lane geometry changes from frame to frame. The last two frames are
  "rainy": ±12 and ±16 grey levels of per-pixel noise, lower mark
  contrast, and bright round reflections. Every record is checked, and the
  EDF peaks must match the lane orientations in each frame. Stronger
  independent pixel noise (±30 and above) defeats this plain fixed-threshold
  EDF. The original algorithm adds an adaptive threshold and extra weight
  for likely lane-boundary pixels on the processor; neither is modelled
  here.

The design follows the original in its structure, its pipeline (1 + 3 + 1
clocks), the Z numbering and equations, the ROM address map and size, the
line-60 start and the 600-pixel gap. The following are this design's
choices:

* **Single clock.** The decoder interface (`dec_vs`, `dec_odd`,
  `dec_valid`, `dec_pix`), the FIFOs and the DSP side share one clock. The
  original has separate decoder and FPGA clocks decoupled by the FIFO
  chips. No clock frequency is fixed here.
* **Gradient width.** Gradients are 11 bits signed, enough for ±1020. The
  original drawing labels them 10 bits.
* **Orientation units.** The ROM holds whole degrees, rounded to nearest.
  The original only says the arctangent is stored "as an integer".
* **No back-pressure towards the DSP.** Raw pixels and edge records are
  plain valid-qualified streams at up to one per clock. In the original
  they reach the DSP through its DMA; a design that needs flow control must
  add output FIFOs.
* **Output memory.** Its size, its addressing and the moment of the swap
  are chosen here.
* **I2C.** Writes only; the bus speed is chosen here.
* **Not built:**
  * the EDF, edge thresholding, peak search and line fitting, which are
    processor software;
  * the camera sync generator and the DSP address decoder, for which no
    details exist;
  * the three-camera extension the original mentions.

## Simulating

Any testbench runs with plain Verilator 5 from the repository root, for
example:

```
verilator --binary --timing --top-module tb_lane_onboard_top \
  -Irtl -y rtl -y tb +libext+.sv rtl/lane_pkg.sv tb/tb_lane_onboard_top.sv
./obj_dir/Vtb_lane_onboard_top
```

Replace the top-module name and the testbench file to run another block's
test. The full-size end-to-end test takes a few seconds. Block testbenches
use reduced sizes through their parameters. Every control register is
reset. The only memory read before it is written is the line buffers during
a frame's first two lines, and those values are discarded.
