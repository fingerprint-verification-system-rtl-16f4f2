# Fingerprint feature extractor on an FPGA

This design takes a 256x256 black-and-white fingerprint and reduces it to eight numbers: how many
short diagonal ridge segments run "/" and how many run "\" in each quarter of the print. These eight
counts form a coarse feature vector. Two prints of the same finger should give similar counts. The
whole computation is done by small state machines around five on-chip memories. Every
intermediate image can be viewed on a 640x480 VGA monitor. Buttons and switches on the board start
a run, set the edge threshold, choose the picture and choose which count appears on eight LEDs.

A run has three passes over the image, one after another:

1. **Edges.** A binary Sobel filter finds vertical and horizontal edges. It writes two edge images,
   one bit per pixel.
2. **Directions.** For each pixel, a 5x5 window of each edge image is checked for a straight line of
   five edge pixels through the centre. The result is a direction code per pixel, four bits each.
   There are two such maps, one for each edge image.
3. **Counting.** The vertical-edge direction map is scanned out to the screen for one frame. The
   "/" and "\" codes under the raster are counted separately in each screen quadrant.

None of this needs a processor, multipliers or wide arithmetic. Each pass is a small FSM that
reads a neighbourhood one pixel at a time from block RAM.

Beside the pipeline sits a camera acquisition path. It turns video decoder bytes into frame-memory
writes, and it copies one frame from that memory through a two-clock FIFO into an on-chip print
memory. See "Image acquisition" below.

## Data formats

Pixels are numbered in raster order, `index = row * N + col` (M rows, N columns, both 256).

| Memory | Contents | Packing | Size (256x256) |
|---|---|---|---|
| image | fingerprint, 1 = ridge | 8 pixels per byte, leftmost pixel in bit 7 | 8192 x 8 |
| vedge, hedge | vertical / horizontal edges | as image, but **stored inverted**: an edge is 0 | 2 x 8192 x 8 |
| vdir, hdir | direction code per pixel | 2 pixels per byte, even pixel in bits 7:4 | 2 x 32768 x 8 |

The edges are stored inverted so that the edge images show black lines on white. The
direction filter inverts them back when it reads them.

Direction codes (`fp_pkg::dir_t`):

| Code | Meaning | Colour on screen |
|---|---|---|
| 1 | "\" diagonal, top-left to bottom-right | red |
| 2 | "/" diagonal, bottom-left to top-right | green |
| 3 | horizontal line | blue |
| 4 | vertical line | blue |
| 5 | no line | white |
| 0, 6..15 | never written | black |

`byte_bit` and `byte_nibble` hold the index-to-address split. Both return the byte address and a
one-hot select of the pixel's bit or half-byte. Everything else addresses memory through them or
through the viewers' counters.

## The edge pass (`sobel`)

The two 3x3 masks are applied to one-bit pixels. Neighbours are numbered

```
0 1 2
3 . 4
5 6 7
```

The vertical mask compares `w0 + 2*w3 + w5` (left column) with `w2 + 2*w4 + w7` (right column).
The horizontal mask compares `w0 + 2*w1 + w2` (top row) with `w5 + 2*w6 + w7` (bottom row). Only
the positive response counts. A pixel is a vertical edge when the left sum exceeds the right sum by
more than the threshold: a ridge ending on its left. It is a horizontal edge when the top sum
exceeds the bottom sum by more than the threshold. The threshold is 0..3 and comes from
`switch[1:0]`, sampled when the pass starts. The whole test is `fp_pkg::sobel_eval`.

The pass visits every pixel. For each of the 8 neighbours, `read_loc` computes the neighbour's
raster index, registered. `byte_bit` turns it into a byte address and bit mask, the image memory
is read, and the bit is captured. That takes 3 cycles per neighbour. Next come one evaluate cycle,
a write cycle when the eighth pixel of a byte is done, and one advance cycle. Both edge bytes are
written at the same address in the same cycle, so the two edge memories share one write enable.

**Pass length:** `26*M*N + M*N/8` clocks. That is 1,712,128 clocks, or about 54 ms at 31.5 MHz.

## The direction pass (`dir_copy`, `dir_filt`)

`read_loc5x5` gives the raster index of window cell k (0..24, raster order, 12 = centre) as
`pixel + (k/5 - 2)*N + (k%5 - 2)`. Both edge memories are read at that address in the same cycle.
The 25-bit windows are built one cell every 3 cycles. `dir_filt` then classifies them
combinationally:

```
 0  1  2  3  4        "\"  = cells 0, 6, 12, 18, 24
 5  6  7  8  9        "/"  = cells 20, 16, 12, 8, 4
10 11 12 13 14        "|"  = cells 2, 7, 12, 17, 22   (vertical-edge window only)
15 16 17 18 19        "-"  = cells 10..14             (horizontal-edge window only)
20 21 22 23 24
```

A direction needs all five of its cells to be edges. The order of the tests is a priority: "\"
first, then "/", then the straight line; otherwise the code is 5. Bit 3 of a code is therefore
always 0. The even pixel's codes are held. The odd pixel's codes complete the byte, and both
direction bytes are written together.

**Pass length:** `77*M*N + M*N/2` clocks. That is 5,079,040 clocks, or about 161 ms at 31.5 MHz.

**Image borders.** Neighbour indices are computed modulo `M*N` with no edge handling. A pixel in
column 0 therefore sees the last column of the row above as its left neighbour. The top rows see
the bottom rows in the same way. Border pixels get a wrapped neighbourhood. This is how the
addressing was specified, and it has been kept.

## Display and the counting pass

`vga_pulse` produces standard 640x480 timing:

- Horizontal: 640 active, 16 front porch, 96 sync, 48 back porch (800 clocks).
- Vertical: 480 active, 11 front porch, 2 sync, 32 back porch (525 lines).
- Both syncs are active low.

The raster position reads (0,0) throughout blanking, and the viewers rely on this. The image sits
1:1 in the centre of the screen, at columns 192..447 and rows 112..367, on a dark red
(`24'h5f1f1f`) background.

The five viewers (`imgdisp` x3, `imgdisp_dir` x2 in `gen_imgdisp`) run all the time. They do not
compute addresses from the raster. Each walks its memory with a byte counter and a bit counter
(a nibble toggle for the direction maps), and advances only while the raster is inside the image.
The memory is always addressed one byte ahead, so the next byte has arrived when the current
one ends. While the raster sits at (0,0) the counters are cleared and byte 0 is preloaded.
`color_out` picks a viewer with `switch[3:0]`:

- 0 = image
- 1 = vertical edges
- 2 = horizontal edges
- 3 = vertical directions
- 4 = horizontal directions

Other values give a green screen. The screen is blue while a filter pass runs, because the filter
then owns the memories.

**Counting** (`match`) does not read memory itself. It listens to the code that the vertical
direction viewer puts on the screen, so it needs the display to run. It splits the screen at
(320, 240): quadrant 0 is top-left, 1 top-right, 2 bottom-left and 3 bottom-right. Each quadrant
holds one 128x128 quarter of the image. After its start pulse, `match` clears the eight counters
and waits for the raster to reach (0,0). It then counts for one frame, until the position just
past the image's bottom-right corner (line 368, pixel 448).

The counters are 12 bits wide and wrap. A quarter image has 16,384 pixels, so a print with
long, clean diagonals can overflow a count. The LEDs show the low 8 bits of the count chosen by
`switch[7:4]`, inverted for active-low LEDs:

- 0/1 = up/down of quadrant 0
- 2/3 = quadrant 1
- 4/5 = quadrant 2
- 6/7 = quadrant 3

The full 12-bit counts are also brought out as ports (`up_cnt`, `down_cnt`).

## Control and memory sharing (`fp_control`)

```
RESET -> DISP --enter--> EDGE -> WAIT_FILT -> START_DIR -> WAIT_DIR -> RUN_MATCH -> WAIT_MATCH -> DISP
```

EDGE, START_DIR and RUN_MATCH each last one cycle and pulse a start. The WAIT states follow the
pass's `busy`. `enter` is a level, so holding it starts another run as soon as one ends. The
memories have a single port each, and the bus is multiplexed:

- Under `en_filt`, sobel drives the image address and the edge memories' address, data and write
  enable.
- Under `en_dir`, dir_copy drives the edge memories' address and the direction memories' address,
  data and write enable.
- Otherwise the viewers drive all read addresses and both write enables are held high.

Two assertions check that a write enable is active only while its filter owns the bus. A whole run
takes about 0.25 s.

## Board top (`fingerprint_top`)

- **Buttons.** Both buttons go through `debounce`. A level must be stable for 270,000 clocks
  (8.6 ms at 31.5 MHz) before it is passed on. `button0` is the reset (low while pressed, giving an
  active-low `rst_n` inside). `button_enter` starts a run.
- **Syncs and DAC.** The syncs are delayed two clocks (`sync_delay`) to line up with the colour
  path. `vga_blank_n` is `h_active & v_active`. The DAC clock is the inverted pixel clock.
  `vga_sync_n` is held at 1.
- **Clock.** `clk` is the 31.5 MHz pixel clock. On the board it is made from 27 MHz by a vendor
  clock manager, which is not part of this RTL.
- **Image load.** The image memory can be loaded through the `ld_we/ld_addr/ld_data` port, one
  byte per clock, pixel 0 in bit 7. It can also be filled at start of simulation from a hex file
  named by the `INIT_FILE` parameter. No fingerprint image is supplied.

## Image acquisition (`image_capture`, `ntsc_to_zbt`)

The board top also carries the camera side of the design, with its own ports. It runs on a
second clock, `sys_clk`. The fingerprint pipeline does not read from it: as in the original, the
pipeline keeps reading its own image memory.

- **Camera to frame memory (`ntsc_to_zbt`).** It takes the video decoder's luminance bytes
  (`ntsc_vclk`, `ntsc_fvh`, `ntsc_dv`, `ntsc_din`) and keeps a column and a row counter.
  - The column counter starts at 30 on each horizontal sync and stops at 1024.
  - The row counter starts at 30 on each vertical sync and stops at 768.
  - Every signal crosses to `sys_clk` through two flip-flops.
  - Bytes are packed four to a 32-bit word.
  - One write (`ntsc_addr`, `ntsc_data`, `ntsc_we`) is issued per four columns, at address
    `{0, row[8:0], even/odd field, column[9:2]}`.
  - The alternate mode (`ntsc_sw`) writes every byte, repeated four times, at
    `{0, row[8:0], field, column[7:0]}`.
  - The address and data registers load only while the capture flag is high.
  - The external frame memory itself is not part of this RTL.
- **Capture flag (`onoffhigh`).** `cap_reset` sets it. The debounced `cap_on_off_n` button clears
  it and freezes the last frame.
- **Frame memory to print memory.**
  - `writefifomemory` pushes the frame-memory bytes, presented as a stream on `vram_read_data`,
    into a two-clock FIFO, one per clock.
  - `vram_taken` says that the byte offered one clock earlier was taken.
  - When the FIFO is full it raises `done`.
  - The FIFO (`cdc_fifo`) holds 65,536 bytes and uses Gray-code pointers.
  - A flag carried to the pixel clock starts `readfifomemory`. It drains M*N bytes and numbers
    them.
  - `writetoprintram` writes each byte into the 64 KB print memory.
  - `print_done` rises when the image is complete. The print memory can then be read through
    `print_rd_addr`/`print_rd_data`, one clock latency.
  - One image is taken per `cap_reset`.
- **XGA timing (`xvga`).** A 1024x768, 60 Hz timing generator, 1344 clocks per line and 806
  lines per frame. hsync is low for columns 1048..1183, vsync is low for lines 777..782, and
  blank is high outside the visible area. It runs on `sys_clk` and its outputs are brought out
  (`xvga_*`). Nothing else uses it, as in the original.

## Where this RTL departs from the original design, or fills gaps

- **Image source.** The original reads a fixed ROM. The load port and `INIT_FILE` are additions,
  because the image itself is not part of the design.
- **Viewer start of frame.** The original addresses the memory one byte ahead by adding 1 to the
  address. That leaves the first byte of every frame one byte stale. Here the counters and
  address are held at byte 0 while the raster is at (0,0), so the first byte is correct. The
  counting pass therefore sees the true first byte.
- **Pass schedules.** The filters' state sequences are new: 3 cycles per neighbour, giving the
  pass lengths above. The original gives no rate. Its masks, window, tests, packing and
  inversion are kept.
- **Address helpers.** `byte_bit` and `byte_nibble` return one-hot selects (bit mask, high/low
  half) rather than a bit or nibble number. The address split is unchanged.
- **Enter debouncer.** The enter button uses the same `debounce` as reset, as the only debouncer
  the design defines.
- **VGA timing.** `vga_pulse` uses two counters rather than two state machines, with identical
  timing.
- **RAM write behaviour.** The RAMs return the old word on a write cycle (read-before-write). The
  pipeline never depends on it.
- **Extra outputs and checks.** The counts and a `running` flag are extra outputs, and the
  assertions are additions.
- **Kept as specified.** Border wrap-around and the 12-bit counter wrap follow the specification,
  though they may not be what one would choose.
- **Acquisition path.** The original's FIFO writer reads an SRAM address that nothing drives,
  and its print-memory writer never finishes. Here the frame memory is taken as a byte stream.
  The reader asks the FIFO only when it is not empty. Each byte is written once, at its own
  address. A done flag, the read port and a clean clock crossing of the "FIFO filled" signal are
  added. The video decoder, its set-up, the external frame memory and the hex display driver are
  board parts and are not included.

## Files

| File | What it is |
|---|---|
| `rtl/fingerprint_top.sv` | board top: debouncers, VGA timing, sync delay, controller, acquisition path |
| `rtl/fp_control.sv` | run sequencer, bus multiplexing, LED select |
| `rtl/sobel.sv`, `rtl/read_loc.sv` | edge pass and its 3x3 neighbour addressing |
| `rtl/dir_copy.sv`, `rtl/read_loc5x5.sv`, `rtl/dir_filt.sv` | direction pass, 5x5 addressing, classifier |
| `rtl/match.sv` | per-quadrant diagonal counters |
| `rtl/gen_imgdisp.sv`, `rtl/imgdisp.sv`, `rtl/imgdisp_dir.sv`, `rtl/color_out.sv` | viewers and display select |
| `rtl/fp_mems.sv`, `rtl/image_rom.sv`, `rtl/sp_ram.sv` | the five memories |
| `rtl/byte_bit.sv`, `rtl/byte_nibble.sv` | pixel index to byte address and bit/nibble select |
| `rtl/vga_pulse.sv`, `rtl/sync_delay.sv`, `rtl/debounce.sv` | VGA timing, sync delay, button debouncer |
| `rtl/image_capture.sv` | acquisition path: capture flag, FIFO writer, FIFO, reader, print memory |
| `rtl/onoffhigh.sv`, `rtl/writefifomemory.sv`, `rtl/cdc_fifo.sv`, `rtl/readfifomemory.sv`, `rtl/writetoprintram.sv` | its parts |
| `rtl/ntsc_to_zbt.sv` | camera bytes to 32-bit frame-memory writes |
| `rtl/xvga.sv` | 1024x768 timing generator |
| `rtl/fp_pkg.sv` | shared types (direction codes, display selects), colours, `sobel_eval` |
| `tb/tb_ref_pkg.sv` | reference models: edges, directions, packing, a synthetic print generator |
| `tb/tb_raster.sv` | raster generator used by the viewer testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<n>` and stops, and a
watchdog ends it with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fp_pkg.sv tb/tb_ref_pkg.sv tb/tb_sobel.sv --top-module tb_sobel
./obj_dir/Vtb_sobel
```

Replace `tb_sobel` with any other testbench. The block testbenches compare against independent
models in `tb_ref_pkg`, and they check:

- cycle counts of both passes
- aborting a pass
- every display selection
- exact sync timing
- debouncer latency
- the LED mapping

The filter and controller testbenches use a 16x16 or 32x32 image to stay fast.

`tb_fingerprint_top` runs the complete design at its default size (256x256, full debounce delay)
in about 8 million clocks, about 20 seconds of simulation. It:

1. presses reset
2. loads a synthetic print: diagonal ridges with period 6, sloping one way in the top half and
   the other way in the bottom half, plus noise
3. presses enter and waits for the run to finish
4. checks both edge images, both direction maps, all eight counts and the LEDs against the
   reference models

It also checks that every mechanism happened at least once: reset, enter, the edge pass, the
direction pass, the counting frame, the blue screen, both sync pulses and the image on screen.
At the same time it runs the acquisition path at full size:

- It feeds a random frame-memory stream and compares all 65,536 bytes of the print memory with
  the bytes taken.
- It presses on/off.
- It sends one camera line through `ntsc_to_zbt` and checks the writes.
- It checks the `xvga` line length and blanking on every clock.

To run the real design on your own image, build a hex file of 8192 bytes (row-major, leftmost
pixel in bit 7) and pass it as `INIT_FILE`, or drive the load port.
