# Loss-less image DMA controller: SDRAM to VGA over Avalon MM

This controller moves RGB565 images from SDRAM to a 640x480, 60 Hz VGA display
without dropping any pixels. The display needs a new pixel every 40 ns, and the
processor should not have to supply them. So the controller is a bus master of
its own: it reads each image row from the SDRAM controller with Avalon MM burst
reads and buffers the row in a FIFO. A VGA timing generator then takes the
pixels out. There are two FIFO paths, used in turn line by line: one is being
shown while the other is filled with the next row. A host CPU, or a JTAG-to-
Avalon bridge, sets the controller up through an Avalon MM slave port and
starts it. A push-button input can start it as well.

The RTL follows a published design: a DMA controller built on an Altera
FPGA with the Avalon fabric and later made as a 0.35 um chip running at 50 MHz.
That description gives the block structure, the bus behaviour, the FIFO sizes
and the VGA timing. It does not give the register layout, the flow control
between the blocks or the start and stop rules, so this implementation chose
them. The section "What is fixed and what was chosen" lists them.

## Block structure

```
             +------------------- dma_ctrl --------------------+
 Avalon  --> | ctrl_reg   (slave registers, start/stop)        |
 slave       | addr_gen   (row/frame addresses, flow control)  |
             | read_ctrl  (read/burstcount/waitrequest)  <-----+--> Avalon read master
             | data_xfer  (readdatavalid -> FIFO set 0 or 1)   |
             +-------------------------+-----------------------+
                                       | source_stream (32 bit + set select)
             +--------------- fifo_ctrl v----------------------+
             |  set 0: sync_fifo 512x32 -> splitter -> sync_fifo 1024x16
             |  set 1: sync_fifo 512x32 -> splitter -> sync_fifo 1024x16
             +-------------------------+-----------------------+
                                       | pixel of the current line's set
             +--------------- vga_ctrl v----------------------+
             |  pixel strobe (clk/2), vga_timing, RGB565 out   | --> red/green/blue,
             +-------------------------------------------------+     h_sync_out, v_sync_out
```

`dma_controller` is the top. Its sub-blocks are `dma_ctrl`, `fifo_ctrl` and
`vga_ctrl`. One FIFO set is a `fifo_set`: a 32-bit FIFO, a splitter and a
16-bit FIFO. `dma_pkg` holds the shared constants, the register map and the
configuration struct.

## How a row gets to the screen

This is the part that takes the most care. Three agents each count rows on
their own, and every one of them must assign row *r* to set *r* mod 2:

* **`addr_gen`** fetches the rows. Before it starts a row, two things must be
  true. The read path must be quiet: no command waiting and no data beat still
  owed by the slave. And the 32-bit FIFO of the row's set must have room for
  the whole row (320 words of its 512). Once started, the row goes out as 80
  back-to-back commands of 4 words each, with the address rising by 16 bytes
  per burst. Because space is reserved before any request goes out, read data
  can never meet a full FIFO. That is why the controller has no data-loss path
  on the bus side.
* **`data_xfer`** counts the words that arrive with `readdatavalid`. After each
  320 words it switches to the other 32-bit FIFO. Avalon returns read data in
  request order, and the address generator only ever requests whole rows. So
  this count agrees with the address generator's row-to-set assignment without
  any tag travelling with the data.
* **`vga_ctrl`** switches to the other 16-bit FIFO after the last visible
  pixel of each line.

Each set's splitter moves one pixel per clock from the 32-bit FIFO into the
16-bit FIFO, the low half of each word first and then the high half. The
splitter runs at 50 Mpixel/s, twice the display rate, so the 16-bit FIFO fills
well ahead of the display. The 32-bit FIFO then drains, and the address
generator can start fetching the next row for that set. In steady state each
set holds about three rows, so there is plenty of slack against SDRAM refresh
and bus contention. With a slave that never stalls, a row takes about 320
clocks to fetch. A line on screen lasts 1600 clocks.

All three counters are reset by the start pulse, which also empties all four
FIFOs.

## Run control

* **Start.** Write 1 to CTRL bit 0, or pulse `ext_start`. A start is ignored
  while `busy` is high. After a start, the VGA side waits in a priming state
  with its timing held and the syncs inactive. Once set 0's 16-bit FIFO holds a
  whole line, the timing starts at the top-left pixel. Until then the
  controller may still be waiting out the SDRAM controller's initialisation,
  during which `waitrequest` stays high.
* **Frames.** NUM_FRAMES images of IMG_SIZE bytes each lie back to back from
  BASE. The address generator steps through them in order. With CTRL.loop set,
  it then wraps to BASE and carries on. With loop clear, the run ends after the
  last image.
* **Stop.** Writing CTRL bit 2 makes the address generator finish the frame it
  is fetching and then stop.
* **End of run.** At each frame end the VGA side checks whether any image data
  is still requested, in flight or buffered. If none is, it goes idle. A run
  therefore always ends on a complete frame.
* **Underflow.** A visible pixel slot that finds its FIFO empty shows black and
  pulses `underflow`. That means the bus did not keep up. The event also sets a
  sticky flag, CTRL bit 3, which is cleared by writing 1 to it. It should never
  happen with a working SDRAM path. The testbench forces it by throttling the
  bus.

## Register map (Avalon MM slave, 32-bit, word offsets)

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0 | CTRL | W | bit0 start, bit1 loop, bit2 stop at end of frame, bit3 write 1 to clear underflow |
| 0 | CTRL | R | bit0 busy, bit1 loop, bit2 stop pending, bit3 underflow seen |
| 1 | BASE | RW | byte address of the first image (bits 1:0 read as 0) |
| 2 | IMG_SIZE | RW | bytes per image. Reset value 614400 (640x480x2). Must be a multiple of 1280 |
| 3 | NUM_FRAMES | RW | images stored back to back (16 bits; 0 reads as 1). Reset value 1 |
| 4 | BURST | RW | Avalon burst count 1, 2 or 4. Other values round down to one of these. Reset value 4 |
| 5 | FRAMES_OUT | R | frames shown since the last start |

The slave has a read latency of one clock and never stalls. The loop bit resets
to 1, so a button press alone gives a steady picture. Change the configuration
only while the controller is idle.

## Bus interfaces

**Read master (`m_read_*`).** Addresses are byte addresses. `read`,
`address` and `burstcount` are registered, and they are held while
`waitrequest` is high. A command is accepted in a cycle where `read` is high
and `waitrequest` is low, and the next command can be presented in that same
cycle. So against an SDRAM controller that drops `waitrequest` for the last
beat of each burst, `read` stays high, and the address steps by 16 every four
clocks. `read_ctrl` asserts that a stalled command stays stable and that no
unrequested data arrives.

**VGA output.** `red[4:0]`, `green[5:0]` and `blue[4:0]` carry the RGB565
fields of the pixel. They are 0 outside the visible area. `h_sync_out` and
`v_sync_out` are active low. `video_on` marks the visible area. All of these
change on the clock edge that carries `pix_en`, one pixel slot after the
internal counters. A board with an 8-bit-per-channel DAC needs the fields
widened. The DAC clock is `pix_en` or a 25 MHz clock in phase with it.

## VGA timing

The line and frame lengths come from the 60 Hz 640x480 mode, at 40 ns per
pixel:

| | visible | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal (pixels) | 640 (25.6 us) | 16 | 96 (3.8 us) | 48 (1.9 us) | 800 (32 us; 31.8 us at 25.175 MHz) |
| vertical (lines) | 480 (15.25 ms) | 10 (0.32 ms) | 2 (0.06 ms) | 33 | 525 (16.8 ms; 16.67 ms at 25.175 MHz) |

The whole controller runs on one 50 MHz clock. The pixel rate is a clock
enable at every second clock (`CLKS_PER_PIXEL = 2`), so the frame is exactly
840,000 clocks, or 16.8 ms (59.5 Hz). The 16.67 ms figure in the table
assumes the standard 25.175 MHz pixel clock. To reach it exactly, run the
controller from a clock that is a multiple of 25.175 MHz.

## Parameters of `dma_controller`

| Parameter | Default | Meaning |
|---|---|---|
| H_ACTIVE, H_FP, H_SYNC, H_BP | 640, 16, 96, 48 | horizontal timing in pixels. The row size is 2*H_ACTIVE bytes |
| V_ACTIVE, V_FP, V_SYNC, V_BP | 480, 10, 2, 33 | vertical timing in lines |
| CLKS_PER_PIXEL | 2 | clocks per pixel slot |
| DEPTH32 | 512 | words per 32-bit FIFO (2048 bytes) |
| DEPTH16 | 1024 | pixels per 16-bit FIFO (2048 bytes) |

The sizes must satisfy these rules:

* A row must be a whole number of 16-byte bursts.
* A row must fit in a 32-bit FIFO (`H_ACTIVE/2 <= DEPTH32`).
* A line must fit in a 16-bit FIFO (`H_ACTIVE <= DEPTH16`).
* FIFO depths must be powers of two.

Elaboration-time checks report a violation of these rules.

## What is fixed and what was chosen

These come from the published design:

* the three modules and their sub-units;
* the Avalon MM master and slave roles;
* byte addressing, with bursts of up to four words (16 bytes per request);
* `read` and `waitrequest` active high, with `read` held while `waitrequest`
  is high;
* the data transfer gated by `readdatavalid` into one of two 32-bit FIFOs;
* the two FIFO sets, each a 32-bit FIFO feeding a 16-bit FIFO, low half first,
  with every FIFO 2048 bytes;
* RGB565, 640x480 at 60 Hz, 1280-byte rows;
* lines alternating between the two 16-bit FIFOs;
* the active-low horizontal sync;
* the 50 MHz operating clock;
* control-register contents: start, number of frames, burst count and image
  size.

This implementation's own choices are:

* the register map and reset values, and the base-address, loop, stop,
  underflow and frame-counter features;
* the single clock domain with a pixel enable;
* row-at-a-time flow control against FIFO space;
* choosing the FIFO by counting words in `data_xfer`;
* the priming and end-of-run rules;
* black output on underflow;
* the active-low vertical sync;
* 5/6/5-bit colour outputs;
* the order of front porch, sync and back porch. Only their durations are
  given; the order follows the VGA standard.

Not included: the SDRAM controller, the SDRAM, the Avalon fabric, the host and
its bridge. The top's ports stand in for them. The chip's pad ring and layout
are not included either.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each one has a cycle watchdog. To run one with Verilator, for
example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dma_pkg.sv tb/tb_pkg.sv tb/sdram_model.sv tb/vga_monitor.sv \
  tb/tb_dma_controller.sv --top-module tb_dma_controller
./obj_dir/Vtb_dma_controller
```

| Testbench | What it shows |
|---|---|
| `tb_dma_controller_full` | Default sizes. Two full 640x480 frames from SDRAM: all 614,400 pixels compared, line and frame timing checked, a frame period of 840,000 clocks, and no pixel lost. Every read must be a 4-word burst at the next 16-byte address: 80 bursts per row. Runs in a few seconds. |
| `tb_dma_controller` | A reduced screen (32x6) and small FIFOs. Four runs cover burst counts 4, 2 and 1, button start, looping with a wrap to BASE, stop at a frame end, and forced underflow. It also checks that the SDRAM initialisation wait, waitrequest stalls, row holds for FIFO space and set switches each occur. |
| `tb_dma_ctrl` | The bus side against the SDRAM model: address sequence, stream order, FIFO select, no command during SDRAM initialisation. |
| `tb_addr_gen`, `tb_read_ctrl`, `tb_data_xfer`, `tb_ctrl_reg` | The DMA units on their own. Includes the 4-clocks-per-burst throughput with a non-stalling slave. |
| `tb_sync_fifo`, `tb_fifo_set`, `tb_fifo_ctrl` | The FIFOs, the half-word order and the row alternation. |
| `tb_vga_timing`, `tb_vga_ctrl` | Full-size 800x525 timing, and pixel output, priming, stop and underflow. |

Testbench helpers:

* `tb/sdram_model.sv` is a behavioural Avalon slave. It holds `waitrequest`
  high during initialisation and while a burst is returned, except for the last
  beat. It can add random stalls and data gaps.
* Memory contents are computed, not stored. The word at a byte address is the
  fixed scramble `tb_pkg::pattern()` of the word address, so a checker can
  predict any pixel from its screen position.
* `tb/vga_monitor.sv` checks the VGA output against that prediction.
