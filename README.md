# Anglerfish swim pacer in SystemVerilog

Anglerfish helps a swimmer hold a target pace. A light runs along an
underwater LED strip at the set speed, and the swimmer follows it. The same
board also does three other jobs:

- It takes stereo images of the lane with two cameras and works out a
  disparity (depth) map by block matching.
- It records lap times, which a second board at the far wall signals over an
  infrared link.
- It shows those lap times on a seven-segment display.

This repository is RTL for the whole digital part of that system. It covers:

- the stereo pipeline: camera capture, frame buffers, the SSD block matcher
  and the disparity memory;
- a UART dump of the disparity memory to a computer;
- the WS2811 LED driver with its moving target;
- the lap timer and the seven-segment display;
- the far-wall "motion gate" that sends the IR lap signal.

Everything runs on one 100 MHz clock with a synchronous, active-high reset.
Parameter defaults are the sizes of the original prototype: 320 × 240 frames,
6 × 6 blocks and offsets up to 240.

## Block overview

```
 central unit (near end)                                   peripheral unit (far wall)
 cam0 --camera_capture--> bram_dual_port (left)  \         camera --camera_capture (stream)
 cam1 --camera_capture--> bram_dual_port (right)  > stereo_matcher           |
                                                 /   |  temp_buffer_fetch   motion_gate
                            bram_single_port <--+    |  ssd_block_unit        | lap pulse
                            (disparity map)          |   6 x smac_engine    ir_burst_tx --> IR LED
                                  |                                              :
                         bram_uart_readout -> uart_tx -> PC                (IR light, receiver)
                                                                                 :
 led_pacer -> ws2811_strip_driver -> ws2811_bit_encoder -> LED strip      ir_rx  v
 lap_timer (ir_rx) -> seven_seg_driver -> display   <------------------------------
 sw_cam_sel -> view_* pixel stream (for an external HDMI encoder)
```

`anglerfish_top` holds both units side by side. The two boards are connected
only through external parts: the IR LED, the light path and an IR
receiver/demodulator module. So `p_ir_led` and `ir_rx` are separate ports, and
a testbench (or the board) closes the loop between them.

## Frame storage: six pixels per word

The matcher's speed comes from how frames are stored, so that comes first.

- **Frame buffers.** Each camera frame is 8-bit grey pixels, stored as 320
  lines of 240 pixels.
  - One memory word holds 6 neighbouring pixels of a line, so a line is 40
    words and a frame is 12800 words × 48 bits.
  - Pixel `k` of a word is in bits `[8k+7:8k]`.
  - The word address is `line*40 + column/6`.
  - These two memories are `bram_dual_port`: the camera writes on port A and
    the matcher reads on port B.
- **Disparity map.** This is a separate single-port memory, `bram_single_port`,
  of 76800 × 8 bits at address `line*240 + column`.
- **Read latency.** Every memory has a two-cycle read latency: an address in
  cycle t gives data in cycle t+2. All the logic around the memories is timed
  to that.
- **Total size.** The three memories hold 1,843,200 bits.

## The SSD block matcher

`stereo_matcher` works out a disparity for every pixel (x, y):

- It compares the 6 × 6 left block whose top-left corner is (x, y) with the
  right blocks at (x−d, y), for every offset d = 0 … min(x, MAX_DISP−1).
- It keeps the offset with the smallest sum of squared differences (SSD).
- A later offset wins only with a strictly smaller SSD, so a tie keeps the
  smaller offset.
- Pixels that fall past the right or bottom edge of the frame count as 0 in
  both images.
- For a full frame this is 320 × (1 + 2 + … + 240) = 9,254,400 block
  comparisons.

### Datapath

- **`smac_engine`** takes two 48-bit words (6 left and 6 right pixels). It
  subtracts each pair, squares the differences, adds the six squares and
  accumulates the sum in a register. It has two pipeline stages.
- **`ssd_block_unit`** puts six engines side by side, one per block row, and
  adds their accumulators in a third stage. A whole block pair goes in during
  one cycle and its SSD comes out three cycles later, one result per cycle.
- **`temp_buffer_fetch`** holds four buffers of six words: left/right ×
  back/front.
  - A 6-pixel block starting at column x usually spans two stored words. The
    "back" word holds column x and the "front" word holds the next six pixels.
  - Row r of the block is cut out of `{front[r], back[r]} >> 8*(x mod 6)`.
  - Each refill reads all 12 words (6 back, then 6 front) from both frame
    buffers in parallel. Words past the frame edge are loaded as zero instead
    of being read.
  - A refill takes 15 cycles from `start` to `done` (2N+3).

### Controller

The state machine has seven states:

| state | what it does |
|---|---|
| IDLE | waits for `start` |
| NEW_FRAME | clears the position and offset counters |
| UPDATE_CENTERS | steps to the next offset, or to the next pixel after SAVE, or ends the frame |
| UPDATE_BUFFERS | refills the temporary buffers for (x, x−d, y) |
| CALCULATE | sends the block pair through the SSD unit |
| UPDATE_DISPARITY | keeps d if its SSD is the smallest so far; goes to UPDATE_CENTERS for the next offset, or to SAVE |
| SAVE | writes the best offset to the disparity memory |

### Timing

- Each offset costs 22 cycles: 1 in UPDATE_CENTERS, 16 refilling buffers,
  4 in CALCULATE and 1 in UPDATE_DISPARITY. In general this is 2N+10.
- Each pixel adds one SAVE cycle.
- A frame takes `3 + Σ(22·offsets(x) + 1)` cycles, counted from the `start`
  pulse to the `done` pulse. For 320 × 240 with MAX_DISP = 240 this is
  203,673,603 cycles, about 2.04 s at 100 MHz.

The buffer refill dominates. It was kept simple on purpose: both buffers are
always reloaded, although the back buffer could be copied from the front one.
If you need more speed, there are two places to start:

- refill only the right front buffer when just d changes;
- split the frame buffers into six interleaved memories, so a whole block
  column is read in one cycle.

### Parameters

`N`, `ROWS`, `COLS` and `MAX_DISP` can be changed in the matcher and in the
top. `COLS` must be a multiple of `N`. The disparity width is 8 bits, which
covers offsets up to 255.

## Camera capture and the view switch

`camera_capture` handles the OV7670-style video output:

- It samples `pclk`, `href`, `vsync` and the data byte with the system clock,
  through two flip-flops, and acts on rising edges of `pclk`. So `pclk` must
  run at no more than a quarter of `clk`. The top gives both cameras a shared
  25 MHz `cam_xclk`.
- A falling `vsync` starts a frame and a rising `vsync` ends it. During `href`
  every byte is one pixel.
- After `arm`, the next complete frame is packed six pixels per word and
  written to the frame buffer, and `frame_done` pulses.
- Every frame also comes out as a pixel stream: `pix_valid`, `pix`, `pix_x`,
  `pix_y`, `frame_start` and `frame_end`.

The camera's register set-up over SCCB is not part of this design.

In the top:

- `capture_start` arms both cameras.
- The matcher starts by itself once both frames are stored.
- `sw_cam_sel` selects which camera's stream appears on the `view_*` ports.
  These are meant for a display encoder outside this design.

## Disparity readout over UART

`bram_uart_readout` copies a whole memory to a computer:

- **IDLE** waits for `en` and checks that the memory has not already been sent.
- **INIT** asks for word 0 and waits out the two-cycle memory latency.
- **SET_DATA** latches the word and asks for the next one.
- **SEND_DATA** sends the byte through `uart_tx` and waits for its `done`.

After the last byte the block goes to IDLE with `sent_all` set. A new dump
needs `en` to go low and then high again.

The UART is 8N1. `CLKS_PER_BIT = 868` gives 115200 baud, so a full 76800-byte
map takes about 6.7 s.

In the top, the single port of the disparity memory belongs to the matcher
while it runs and to the readout otherwise.

## LED strip and the pacing target

WS2811 ICs take 24-bit packets, R7…R0 G7…G0 B7…B0, MSB first. Each IC keeps the
first packet it sees and passes the rest down the strip. A low period of at
least 50 µs makes all ICs show their colours.

- **`ws2811_bit_encoder`** (the minor FSM: IDLE, RECEIVED_INPUT, TRANSMIT_0,
  TRANSMIT_1) loads the packet, looks at the MSB and shifts left once per bit.
  - A 0 bit is 50 cycles high and 200 cycles low.
  - A 1 bit is 120 cycles high and 130 cycles low.
  - These are 500/2000 ns and 1200/1300 ns at 100 MHz.
  - A packet is 6000 cycles, and `done` comes 6002 cycles after `rgb_valid`.
- **`ws2811_strip_driver`** (the major FSM: IDLE, START_BLOCK, IN_BLOCK,
  END_BLOCK) sends one packet per IC, IC 0 first.
  - It asks for each IC's colour on `px_index` and reads it back on `px_rgb`
    in the same cycle.
  - A refresh of `NUM_ICS` ICs takes `NUM_ICS·6004 + 1` cycles. The line
    stays low for 30 ns between packets, well within the WS2811 tolerance.
- **`led_pacer`** (IDLE, FORWARD, REVERSE, LATCH, TRANSMIT) lights one IC, the
  target, and leaves all others off.
  - After each refresh it holds the line low for the latch time, then moves
    the target one IC.
  - At the last IC it turns into REVERSE, and at IC 0 back into FORWARD.
  - The latch time sets the speed. It is clamped to at least `LATCH_MIN`
    = 5000 cycles (50 µs).
  - One step takes `NUM_ICS·6004 + latch + 3` cycles.
  - In the top, the latch time is `LATCH_MIN + sw_speed·LATCH_STEP`, where
    `sw_speed` is switches 3–0 and `LATCH_STEP` is 5 ms.
  - With 100 ICs on a 5 m strip, the target moves 5 cm per step, at 0.6 to
    8.3 m/s.

## Lap timing over infrared

The swimmer's turns are detected at the far wall by the peripheral unit.

- **`motion_gate`** works on the live pixel stream of the peripheral camera,
  which is never stored.
  - While switch 0 is off, each frame is written to a background memory
    (`learn`).
  - Once switch 0 is on, a pixel counts as "changed" when it differs from the
    background by more than `THRESH` (40).
  - The block adds up the columns of the changed pixels and counts them. At
    the end of the frame a small restoring divider gives the centre of mass.
    A frame with fewer than `MIN_PIXELS` changed pixels gives no centre.
  - A move of more than `MIN_STEP` columns sets the direction, towards higher
    or lower columns.
  - When the direction reverses, `lap` pulses.
- **`ir_burst_tx`** then drives the IR LED with a 38 kHz carrier (half period
  1316 cycles) for 20 ms. A new lap during a burst restarts it.
- **`lap_timer`**, on the central unit, watches the demodulated receiver
  output (active low).
  - A burst counts as a new lap only after 0.1 s without signal.
    `GAP_CYCLES` sets this, and it also bridges drop-outs inside a burst.
  - The timer counts hundredths of a second as an 8-digit decimal BCD number
    (up to 999999.99 s). At each lap it
    copies the running time to `lap_bcd`, increments `lap_count` and restarts.
- **`seven_seg_driver`** multiplexes the eight BCD digits onto the active-low
  display, 1 ms per digit. The decimal point is on digit 2.

## Where this design departs from, or fills in, its source

- **Bit times.** The typical values of the WS2811 timing table are used for
  all four bit times; the table also allows roughly ±150 ns around them.
- **Latch time.** The table lists 6 µs for the latch and the pacer text says
  at least 50 µs. The 50 µs minimum is used, which satisfies both.
- **Assumed values.** The source does not give these, so they are this
  design's choices:
  - the UART baud rate;
  - the number of ICs on the strip;
  - the latch step per switch value;
  - the IR burst length and gap filter;
  - the motion-gate threshold and minimum pixel count;
  - the display refresh;
  - the camera clock divider;
  - the target colour (white).
- **Readout end.** After the last word the readout returns to IDLE with
  `sent_all` set. The source says it returns to INIT, which would only restart
  the dump.
- **Controller transitions.** The order of states in the matcher is this
  design's reading of the state descriptions, with one loop per offset.
- **Block anchoring.** Blocks are anchored at their top-left pixel, and pixels
  outside the frame are zero. The source does not say either.
- **Motion gate.** It follows the source's description, although the original
  prototype set the far-wall unit aside. Only the horizontal (along-the-lane)
  centre is tracked.
- **Not built:** the HDMI encoder, the camera register set-up, the cameras,
  the LED ICs and the IR receiver. They are external parts or were only named.
  The testbench models `ov7670_model`, `ws2811_line_monitor` and
  `ir_receiver_model` stand in for them.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog. The tests compare against
models written in the testbench, and they also check latencies and cycle
counts where the design promises them:

- the SSD per block and its 3-cycle latency;
- the exact frame cycle count of the matcher, and its tie rule;
- UART bit timing;
- every WS2811 high and low time;
- the pacer's bounce sequence;
- lap times;
- display scanning;
- the IR carrier and burst length.

There are two end-to-end tests of `anglerfish_top`:

- **`tb_anglerfish_top`** runs at reduced sizes: 12 × 24 frames, 4 ICs, fast
  UART and fast timers.
  - Camera models send a textured stereo pair, and the disparity map is
    checked against an SSD model and read back over the UART.
  - The pacer runs with target turns, and the peripheral unit sees a
    "swimmer" turn twice, which must give two IR bursts and two recorded laps.
  - It counts every mechanism (captures, matcher runs, buffer refills of
    blocks that straddle words and of edge blocks, UART bytes, strip
    refreshes, turns, both camera views, laps, display scans). A mechanism
    that never happened is a failure.
- **`tb_anglerfish_full`** uses every parameter at its default: 320 × 240, 100
  ICs, 115200 baud.
  - It checks all 76,800 disparities of a full frame (about 204 million
    cycles) and the first UART bytes.
  - It runs the pacer and the lap path.
  - It takes about 7 minutes in Verilator.

To run a testbench with plain Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_stereo_matcher \
    -Irtl -Itb rtl/anglerfish_pkg.sv tb/tb_stereo_matcher.sv -o sim
./obj_dir/sim
```

Change the testbench name to run another test. The `-I` paths let Verilator
find each module in the file of the same name. To lint a design module, use
`verilator --lint-only -Wall -Irtl rtl/anglerfish_pkg.sv rtl/<module>.sv`.
