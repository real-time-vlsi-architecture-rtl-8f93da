# Wronskian change detector for interlaced video

This is a streaming hardware detector of moving objects. It compares every
analysed video frame with the frame analysed before it and marks each pixel
as changed or unchanged. The decision uses the Wronskian change detector (WCD).
Around each pixel it takes the 3x3 neighbourhood. For each neighbour it forms
the ratio r = x/y of the current luminance x to the previous luminance y, and
it computes

    W = (1/9) * sum over the 3x3 neighbourhood of r(r - 1)

A change is flagged when W exceeds a threshold (typically 0.6 to 0.7). W
reacts to changes in dark zones. The conjugate W* uses y/x in place of x/y and
reacts to changes in bright zones. Computing both makes the result robust to
global illumination changes. The output is a black-and-white change map,
shown on a VGA monitor.

The architecture processes pixels on the fly. The current frame is never
stored. Only the reference frame and the change map are kept in memory, and
partial results are kept in two line queues. All arithmetic is 8-bit unsigned
and saturating.

```
 decoder ──pixels──┬──────────────────────────┐
 (board part)      │                          ▼
                   ▼                  ┌──────────────┐
            ┌─────────────┐  y        │  2 x PE      │ D(x,y), D(y,x)
            │ frame buffer├──────────▶│  (pipelined) ├──┬──────────────┐
            │ 512K x 16   │           └──────────────┘  ▼              │
            └─────────────┘                       Queue 1 ─▶ Queue 2   │
                                                     │         │       │
                                                     ▼         ▼       ▼
                                               ┌──────────────────────────┐
                                               │ 2 adder trees (3x3 sums) │
                                               │ + comparator/threshold   │
                                               └────────────┬─────────────┘
 main controller: idle / process / display                  │ change bits
                                                            ▼
 VGA ◀── encoder ◀──────────────────────────────── output buffer 512K x 16
```

## Number formats: how r(r-1) fits in 8 bits

This part is the hardest to follow, and every other block depends on it.

* **Ratio.** r is an 8-bit unsigned 3.5 fixed-point number, `q = floor(32*x/y)`.
  So 32 means 1.0 and the largest value is 255, about 7.97. Any quotient that
  needs more than 8 bits is saturated to 255. That happens when x >= 8y, and
  also when y = 0.
* **r - 1.** In this format r - 1 is `q - 32`. It saturates at 0, so a ratio
  at or below 1 gives D = 0 and D is never negative.
* **D.** `D = (q * (q - 32)) >> 5`, saturated at 255. The product is
  2^10 r(r-1). Dropping 5 bits leaves one LSB = 1/32, so D = 32 r(r-1).
* **Sum and threshold.** The 3x3 sum S of nine D values is 32*9*W = 288 W.
  S saturates at 255 and is compared with an 8-bit threshold T. A change
  means S > T. T = 173 is W = 0.6. T = 254 is W = 0.88, the largest usable
  threshold, because 255 is the saturation value.

| x   | y   | q = 32x/y | D            | meaning                         |
|-----|-----|-----------|--------------|---------------------------------|
| 100 | 100 | 32        | 0            | no change                       |
| 200 | 100 | 64        | 64           | r(r-1) = 2                      |
| 120 | 100 | 38        | 7            | r = 1.19 (truncated)            |
| 235 | 20  | 255 (sat) | 255 (sat)    | strong brightening              |
| 50  | 100 | 16        | 0            | darkening: seen only by the conjugate |

The conjugate path is the same processing element with x and y swapped.

## Processing element (`wcd_pe`)

The processing element has five register rows and four logic stages, and it
accepts one pixel pair per clock:

1. Input latch.
2. Restoring division, quotient bits 7..4: four conditional subtractors. The
   starting remainder is x[7:3]. The overflow test `x[7:3] >= y` decides
   saturation.
3. Quotient bits 3..0 (four more subtractors), then r - 1 with saturation at 0.
4. Radix-4 Booth multiplication q × (q - 32): five partial products are
   formed, and the first three are added.
5. The last two partial products are added. The result is shifted right by 5,
   saturated, and written to the output latch.

`d` appears five clocks after `x` and `y` are presented. A tag (the field
flags) travels with the data. `en` freezes the whole pipeline. This is how the
controller deactivates the element, and in single-Wronskian modes the unused
element stays frozen.

## Windows over interlaced fields (`proc_unit`, `line_queue`, `adder_tree`)

Each frame arrives as two fields. Neighbourhoods are taken inside a field, so
a field of `IMG_W` x `FIELD_H` pixels (640 x 240) is processed as an image of
its own.

* **Queues.** Queue 1 delays the PE results by exactly one line. Queue 2
  delays Queue 1's output by one more line. Both Wronskians of a pixel share
  one 16-bit queue word.
* **Steps.** Each PE result is one step of the adder trees. At input column c
  of field line r, a tree adds the three lines of column c (its column
  partial sum) to the partial sums of the two previous steps. That sum is the
  window centred on (r-1, c-1).
* **Padding.** All four borders are zero-padded by grounding inputs:
  - top: Queue 2 is grounded while line 1 is input;
  - left: the partial sum from two steps back is disabled (the "vertical
    padding control");
  - right: one extra step after each line grounds the current column;
  - bottom: after the field's last line, one extra *flush line* of
    `IMG_W + 1` steps runs at one step per clock with the new line grounded.
* **Combinational trees.** The adder trees and the comparator have no
  registers of their own; their result is registered once at the output of
  `proc_unit`.
* **Comparator.** `change_cmp` picks W, W*, or the larger of the two (mode
  `MODE_W`, `MODE_WC`, `MODE_BOTH`). It then flags a change when the picked
  value exceeds the threshold.

Results leave in raster order with their field, line and column. The result
for a pixel comes out one line and one column of input after that pixel,
plus the five PE clocks and one output register. `field_done` pulses
`5 + 1 + IMG_W + 1 + 1` clocks after the field's last pixel.

The extra steps need pauses in the input stream:

* at least one idle clock between lines;
* at least `IMG_W + 2` idle clocks after a field.

An assertion in `proc_unit` checks both. Real video blanking is far longer.

## Memories (`frame_buffer`, `output_buffer`, `sram_sp`)

Each buffer is one single-port bank of 2^19 words of 16 bits, the size of one
bank of the board SRAM.

* **Word contents.** A word holds two horizontally adjacent pixels: the even
  column in bits 7:0 and the odd column in bits 15:8.
* **Address.** `{field, line within field [8:0], word within line [8:0]}`.
  A 640 x 480 frame uses 153,600 words. Nine line bits also leave room for
  288-line PAL fields.
* **Frame buffer schedule.** On the even pixel of a pair, the old pair is
  read. On the odd pixel, the new pair is written to the same word. One access
  per clock is therefore enough even at one pixel per clock. Each pixel
  leaves one clock later together with its reference pixel.
* **Reference frame.** The buffer is only accessed while a frame is
  processed, so the reference is always the previously *analysed* frame.
  Before the first analysed frame the buffer holds no reference, so the first
  change map is not meaningful.
* **Size.** A frame of 640 x 480 bytes is 300 KB, which is what each buffer
  must hold. The full 2^19-word bank is addressed because the field, line and
  word fields are kept separate in the address rather than packed.
* **Output buffer.** It stores the change map as luminance: 255 for a change,
  0 for no change. It is written during processing and read by the encoder
  during display. Each memory is modelled as a synchronous-read array.

## Controller phases and frame-rate selection (`main_ctrl`)

The controller has three states:

* **IDLE.** Nothing is active. The next selected frame start moves the
  controller to PROCESS. A frame start is the first pixel of field 0. The
  first pixel is accepted in the same clock.
* **PROCESS.** The frame buffer and the PEs are active from the frame start.
  The adder trees and the output-buffer writes are switched on once the first
  line of each field is in, which the processing unit reports on
  `line_ready`. The PEs are switched off during the flush of each field's last
  line, while the trees run one more line. Only the units of the selected
  Wronskian run: `w_on` and `wc_on` come from the mode, and in `MODE_W` or
  `MODE_WC` the other PE stays frozen. `mode` and `threshold` are sampled at
  the frame start. When the second field's flush ends, the controller
  restarts the encoder and enters DISPLAY.
* **DISPLAY.** The encoder reads the output buffer for `DISPLAY_FRAMES` VGA
  frames, and the controller then returns to IDLE.

Input frames are numbered 0..`FRAMES_PER_SEC`-1, which is 0..29 for NTSC.
Frame k is analysed when k is even and k/2 < `rate`:

* `rate = 15` analyses every other frame. This is the maximum of 15 frames
  per second, because each analysed frame is followed by its display.
* Lower rates leave the rest of the second idle.
* A selected frame that starts while the detector is still busy is skipped,
  and `frame_skipped` pulses.

## VGA output (`vga_encoder`)

The encoder produces standard 640x480 timing at 60 Hz: 800 x 525 clocks per
frame with active-low syncs, using the 25 MHz system clock in place of
25.175 MHz.

* The counters run continuously, so the monitor stays synchronised.
* Pixels are shown only in the display phase, and the picture is black
  otherwise.
* Frame line v is field v%2, field line v/2.
* The outputs (`hsync_n`, `vsync_n`, `de`, `rgb`) are registered and run two
  clocks behind the counters.

## Top level (`wcd_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | 25 MHz clock, asynchronous active-low reset |
| `px_valid`, `px_sof`, `px_field`, `px_luma[7:0]` | in | decoder stream: one luminance sample, first sample of a field, field index, value (16..235) |
| `rate[3:0]` | in | analysed frames per second, 1..15 |
| `mode_sel` | in | `MODE_W`, `MODE_WC` or `MODE_BOTH` (`wcd_pkg::wcd_mode_t`) |
| `th_sel[7:0]` | in | threshold T = 288 * TH |
| `hsync_n`, `vsync_n`, `de`, `rgb[23:0]` | out | VGA signals towards the video DAC |
| `state`, `frame_skipped` | out | controller state, skipped-frame pulse |

| parameter | default | meaning |
|-----------|---------|---------|
| `IMG_W` | 640 | pixels per line |
| `FIELD_H` | 240 | lines per field (480-line frames) |
| `LINE_BITS`, `WORD_BITS` | 9, 9 | memory address fields (19-bit address with the field bit) |
| `FRAMES_PER_SEC` | 30 | input frames per second (frame numbering for rate selection) |
| `DISPLAY_FRAMES` | 1 | VGA frames shown per analysed frame |
| `H_FP`, `H_SYNC`, `H_BP`, `V_FP`, `V_SYNC`, `V_BP` | 16, 96, 48, 10, 2, 33 | VGA porches and sync widths |

The input stream may carry one pixel per clock. The design assumes that the
decoder samples are already in the 25 MHz clock domain.

Capacity and rate at the default parameters:

* A 640x480 frame fits both buffers: it needs 153,600 of 524,288 words.
* The queues hold one 640-pixel line each.
* Processing takes the frame's own 1/30 s. The display takes 420,000 clocks,
  which is 16.8 ms.
* An analysed frame therefore occupies two of the 30 frame slots per second,
  giving 15 frames per second.
* PAL fields of 288 lines need `FIELD_H = 288`. The address layout allows
  that value, but the VGA raster would then not be a standard mode.

## How far this follows the original design, and what was filled in

**Taken from the published architecture:**

* the block structure: decoder, frame buffer, pipelined processing element,
  Queue 1/2, two adder trees, comparator, output buffer, encoder, and a
  three-state controller;
* the 3x3 region of support;
* the 3.5 ratio format, the >>5 scaling of D, 8-bit saturation and the
  8-bit threshold (173 = 0.6);
* the stage split of the processing element: restoring division with eight
  conditional subtractors and a Booth multiplier, each in two stages;
* zero padding by grounding, and the extra flush line at the end of a field;
* processing within one field;
* 19-bit addresses with two pixels per 16-bit word, and single-port memories;
* the process/display/idle phases, the rate selection up to 15 fps, and the
  W / W* / both modes.

**Choices made here, where the description is silent:**

* r - 1 saturates at zero, so D is never negative;
* the window sum saturates at 255;
* in both-mode the larger of W and W* is used;
* the radix-4 Booth recoding and the split of partial products over the two
  stages;
* the address field split, the pixel order inside a word, and a synchronous
  memory port in place of the board's asynchronous SRAM;
* the line-queue structure (circular buffers) and one shared 16-bit queue
  pair for both Wronskians;
* two processing elements, one per Wronskian;
* the frame numbering used by the rate selection, the length of the display
  phase, and skipping a selected frame while busy;
* VGA timing numbers, the field-to-line mapping, and black output outside
  the display phase;
* the pixel-stream interface and its blanking requirements;
* asynchronous active-low reset throughout;
* sampling of mode and threshold at frame start.

**Not included:**

* the analog NTSC/PAL decoder and the video DAC, which are board parts;
* region sizes other than 3x3;
* overlaying the change map on the current frame, which the description only
  mentions as a possible extension.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. The
testbenches share `tb/wcd_ref_pkg.sv`, which holds the reference D(x,y) in
plain integer arithmetic.

| testbench | what it checks |
|-----------|----------------|
| `tb_wcd_pe` | all 65,536 (x, y) pairs against the reference, latency, clock-enable freeze |
| `tb_line_queue` | one-line delay, clear with push |
| `tb_adder_tree` | column and window sums, padding controls, enable, saturation |
| `tb_change_cmp` | three modes, threshold boundary |
| `tb_proc_unit` | every 3x3 result of 12 random fields, in all modes, with border padding, result count and `field_done` timing |
| `tb_frame_buffer` | pairing with the previous frame, one-clock latency, no writes while disabled |
| `tb_output_buffer` | black/white packing, read latency, writes gated by `wr_en` |
| `tb_main_ctrl` | state sequence, activation per phase, rate selection, busy skip, encoder restart |
| `tb_vga_encoder` | sync timing, picture from the right word and half, black when disabled, `frame_done` |
| `tb_wcd_top` | 16x10 frames end to end: rate selection, all modes, and every displayed pixel against a reference change map |
| `tb_wcd_top_full` | default parameters (640x480, standard VGA): two analysed frames, the second displayed and checked pixel by pixel (307,200 pixels) |
| `tb_wcd_realtime` | default parameters, one second of NTSC-like timing (30 frames of 525 x 1587 clocks, a pixel every other clock) at rate 15 and at rate 5: 15 and 5 frames analysed and displayed, none lost, every displayed pixel checked |

For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/wcd_pkg.sv tb/wcd_ref_pkg.sv tb/tb_wcd_top.sv --top-module tb_wcd_top
./obj_dir/Vtb_wcd_top
```

The full-size testbench runs about 2.3 million clocks, which takes a few
seconds. The real-time testbench simulates 50 million clocks, which takes
about half a minute. It measured 1,218,602 clocks from the start of
processing to the end of display, against a budget of two frame periods
(1,666,350 clocks).

Stimulus is synthetic. It consists of a random background with noise, a
moving bright or dark block, and one frame with a global 25% illumination
drop. The indoor and outdoor test scenes that the architecture was
demonstrated on are not reproduced.
