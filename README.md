# Live NTSC camera to SVGA monitor

An NTSC camera feeds a video decoder chip that delivers interlaced video
as an ITU-R BT.656 stream: 10-bit words at 27 MHz, luma and chroma
interleaved (Cb Y Cr Y ...), with no separate sync wires, because line
and field timing are coded into the data stream. An SVGA monitor wants
something else entirely: progressive RGB, one pixel per clock, with
separate horizontal and vertical sync pulses. This RTL connects the two.
It finds the timing codes in the stream and turns 4:2:2 YCbCr into 4:4:4
RGB. It shows each incoming camera line twice (line doubling), so one
interlaced field fills one progressive 720x480 display frame at about
60 Hz. The monitor's timing is locked to the camera by restarting the
display counters at every field boundary.

Two smaller designs sit next to the video path in the same top level:

- a 640x480 @ 60 Hz test-pattern generator that shows one constant
  colour and is used to bring up the monitor and DAC;
- a small I²C master plus sequencer that loads the decoder's registers
  for composite-video input after reset.

```
 ycrcb_in ─► extract_hvf ─► c422_444 ─► ycrcb2rgb ─► buffer_control ─┬► line_buffer 0 ─┐
 (27 MHz)    find EAV/SAV   Cb Y Cr Y    YCbCr→RGB    write side      └► line_buffer 1 ─┤
             F, V, H        → Y,Cb,Cr    limit/sat    swap on H↑                        │
                │                                     read side  ◄──────────────────────┘
                │ F                                        │ RGB (one clock late)
                ▼                                          ▼
          neg_edge_detect ─► reset ─► svga_timing ─► pipe_line_delay ─► h/v sync, blank ─► DAC
                                       pixel_count ─► read address
          oddr_clock_out: LLC ─► pixel_clock pin
```

All of the video path runs on the decoder's 27 MHz line-locked clock
(LLC). The 13.5 MHz pixel rate of the 4:4:4 data is a one-in-two clock
enable (`pix_en`), not a second clock. Every register has an
asynchronous, active-low reset.

## Files

| File | Role |
|---|---|
| `rtl/lab5_pkg.sv` | sample width, both SVGA timing tables, shared structs |
| `rtl/lab5_top.sv` | top: test generator, video path and decoder configuration side by side |
| `rtl/video_capture.sv` | the whole live-video path |
| `rtl/extract_hvf.sv` | timing-reference detector and F/V/H decoder |
| `rtl/c422_444.sv` | 4:2:2 to 4:4:4 demultiplexer |
| `rtl/ycrcb2rgb.sv` | colour-space converter |
| `rtl/line_buffer.sv` | one line of RGB, block-RAM style |
| `rtl/buffer_control.sv` | ping-pong control of the two line buffers |
| `rtl/neg_edge_detect.sv` | field-edge one-shot |
| `rtl/svga_timing.sv` | pixel and line counters, sync and blank generation |
| `rtl/pipe_line_delay.sv` | delay stage that aligns sync with buffer read data |
| `rtl/oddr_clock_out.sv` | behavioural model of a DDR output flop (pixel clock forwarding) |
| `rtl/svga_constant_color.sv` | 640x480 constant-colour test generator |
| `rtl/i2c_master.sv` | write-only I²C master |
| `rtl/decoder_config.sv` | writes the decoder's register table through the master |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_lab5_top` |
| `tb/tb_video_pkg.sv`, `tb/bt656_source.sv`, `tb/video_out_checker.sv`, `tb/i2c_slave_model.sv` | test infrastructure |

## The BT.656 stream and timing extraction (`extract_hvf`)

A camera line is 1716 words at 27 MHz:

1. the four-word end-of-active-video code (EAV);
2. 268 words of horizontal blanking;
3. the four-word start-of-active-video code (SAV);
4. 1440 words of active video: 720 pixels as Cb Y Cr Y.

Each code is `3FF 000 000 XY` (in 8-bit terms, `FF 00 00 XY`). In the top
eight bits of XY, bit 6 is F (field), bit 5 is V (field blanking) and
bit 4 is H (1 in EAV, 0 in SAV). The protection bits are ignored.

`extract_hvf` keeps a three-word history, recognises the preamble and
latches F, V and H from the following word. The data, and the H flag, are
delayed by five clocks. As a result, `h_out` falls in the same clock that
the first Cb of the line leaves on `ycrcb_out`. F and V are not delayed;
they change only during blanking, so their alignment does not matter.

In NTSC 525-line numbering, F is 0 on lines 4–265 and 1 elsewhere. V is 1 on
lines 1–19 and 264–282. The testbench source (`tb/bt656_source.sv`)
produces exactly that pattern.

**Sample width.** The stream is treated as 10 bits (`YC_W` in the
package), and the converter's offsets (64, 512) and legal ranges (64–940,
64–960) are 10-bit values. The preamble is matched on the eight most
significant bits only, so an 8-bit decoder can be connected to the top
8 bits with the low two bits tied to 0 (its FF word then arrives as 3FC);
`tb_extract_hvf` runs part of its frame that way.

## 4:2:2 to 4:4:4 (`c422_444`)

A modulo-4 word counter, restarted at SAV, marks each word as Cb, Y0, Cr
or Y1. Each component is captured in a hold register. Three short shift
registers then delay Cb by 4 clocks, Y by 3 and Cr by 2. On every Y word
the delayed values are registered together as one output pixel. Pixel n
therefore leaves in the clock after Y(n+2) arrives, as the pairing
(Cb01, Y0, Cr01), (Cb01, Y1, Cr01), (Cb23, Y2, Cr23), ...
Each chroma pair is used for two pixels.

`pix_en` is high for one LLC clock per pixel, which is every other clock.
`clk_out` is the same signal inverted, as a 13.5 MHz square wave, for
anyone who wants to see it on a pin. The F/H/V flags are delayed by 4
clocks to stay with the data.

## Colour conversion (`ycrcb2rgb`)

```
R = K1(Y-64) + K2(Cr-512)
G = K1(Y-64) - K3(Cr-512) - K4(Cb-512)
B = K1(Y-64) + K5(Cb-512)
```

The constants are the ITU-R BT.601 factors (1.164, 1.596, 0.813, 0.392,
2.017) divided by 4, because input is 10-bit and output is 8-bit. They
are scaled by 2^12: K1..K5 = 1192, 1634, 832, 401, 2066.

The datapath has two stages:

1. clamp Y to 64..940 and Cb/Cr to 64..960, remove the offsets and form
   the five products;
2. sum the products, round and saturate each result to 0..255.

Both registers advance on the pixel enable, so a pixel appears on `rgb`
at the next enable after it entered. A small sideband bus (`sb_in` /
`sb_out`) carries the F/V/H flags through the same stages, so they stay
aligned with the pixels. The testbench compares every output with a
floating-point reference and allows ±1 LSB.

## Line doubling: the two line buffers and their control

This part decides whether the picture is stable, and it is the least
obvious.

**Write side.** Pixels arrive at 13.5 MHz, one camera line per 1716 LLC
clocks. `buffer_control` writes them into one of two `line_buffer`s
(1024 x 24 bits each). On the rising edge of the converted H flag (start
of horizontal blanking) it swaps buffers and resets the write address to 0.
From there the address counts every pixel slot: first the ~134 blanking
slots, then the 720 active pixels. The address saturates at 1023.

**Read side.** The display runs at 27 MHz with 858 clocks per line, so it
shows exactly two display lines in the time of one camera line. The read
address is the display's `pixel_count` plus `RD_OFFSET` = 137. That
offset is the number of write slots between the H edge and the first active
pixel in this pipeline. It was measured in simulation so that display pixel
0 is camera pixel 0. A different front end, or different pipeline depths,
need a different offset. `tb_buffer_control` and `tb_lab5_top` fail if the
picture is shifted.

**When the read side changes buffers.** The camera's H edge does not fall
at a fixed point of the display line. The read side therefore does not
follow the write swap at once. It takes the new select at the start of
the display's next horizontal blanking (`pixel_count == 720`), so every
displayed line comes from one buffer. Without this, the left part of every
other display line showed the previous camera line. Between two write swaps
there are two display blanking starts, so each buffer is read for two
whole display lines: line doubling.

The buffers have a registered read, so RGB appears one clock after the
address. `pipe_line_delay` delays the four sync/blank signals by one clock
to match.

## Locking the display to the camera (`neg_edge_detect`, `svga_timing`)

The display counters free-run on LLC with 858 x 525 clocks per frame. One
camera frame (525 lines x 1716 words = 900900 clocks) is exactly two
display frames, so the display's phase against the camera stays fixed.
That phase is set at every falling edge of F, which starts the top field.
`neg_edge_detect` makes a one-clock pulse there. That pulse, combined with
the system reset, resets `svga_timing`.

On reset, `svga_timing` sets `line_count = V_TOTAL - 33` (492 of 525) and
`vertical_blank = 1`. All other state is cleared, so the display starts
inside vertical blanking and reaches active line 0 thirty-three lines
later.

The sync and blank flags are registers that are set and cleared at region
boundaries. They are not decoded from the counters, so a flag cleared by
reset stays low until its next start.

**Known effect.** With the 720x480 table, vertical sync covers lines
491–494. The restart lands on line 492, so in the frame where a restart
happens the vertical sync pulse is one line long instead of four. Restarts
happen once per camera frame, which is every other display frame. Only
the first restart moves the display; after that the counters are already
at the reset position when a restart arrives, because one camera frame
is exactly two display frames. A monitor that needs a full
vsync in every frame would need the reset line moved out of the sync
region. This design keeps the specified value.

## SVGA timing tables

| | active | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| 640x480 horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| 640x480 vertical (lines) | 480 | 9 | 2 | 29 | 520 |
| 720x480 horizontal (pixels) | 720 | 7 | 62 | 69 | 858 |
| 720x480 vertical (lines) | 487 | 4 | 4 | 30 | 525 |

`svga_timing` takes these as parameters; its defaults are the 720x480
row. `blank` is the OR of horizontal and vertical blanking.
`comp_sync` is held at 0. The counters start at 0 with the first active
pixel or line. Inside a line the order is active, front porch, sync, back
porch. At the pins, sync and blank are active low (`*_z`).

The 720x480 table has 487 active lines. Lines 480–486 therefore read
whatever the buffers hold at that point, which are the first lines of the
field's blanking. They are normally black.

## Pixel clock to the DAC (`oddr_clock_out`)

The DAC needs a clock in step with the data. It is produced by a DDR
output flop fed with D0=0 and D1=1, which gives LLC inverted. The DAC
samples in the middle of each data period, and the clock leaves the chip
through the same kind of I/O register as the data. `oddr_clock_out` is a
behavioural model of such a flop, with the usual C0/C1/CE/D0/D1/R/S/Q
ports. Replace it with the FPGA vendor's primitive for a real build.

## Test generator (`svga_constant_color`)

A two-bit counter divides the 100 MHz system clock by four. Its
terminal-count state is the 25 MHz pixel enable and its MSB is the pixel
clock pin. The generator drives `svga_timing` with the 640x480 table and
outputs the `COLOR` parameter (default R=0, G=128, B=255) during the active
region, and black elsewhere. Frame rate: 100e6 / 4 / (800 x 520) = 60.1 Hz.

## Decoder configuration (`decoder_config`, `i2c_master`)

After reset (or a pulse on `cfg_go`), `decoder_config` writes 19 register
values, which set the decoder up for composite NTSC input. Each write is
one I²C transfer: START, 7-bit device address + W, register address,
value, STOP.

The device address is a parameter (`DEV_ADDR`, default 7'h20, which suits
an ADV7183B whose ALSB pin is low). If any byte is not acknowledged, the
master sends STOP and reports `ack_error`. The sequencer then stops with
`cfg_error` and gives the failing entry in `cfg_err_index`.

The master drives open-drain outputs (`scl_low`, `sda_low`: 1 pulls the
line low) and reads SDA through `sda_in`. Each SCL period has four phases
of `QUARTER` system clocks (default 250: 100 kHz at 100 MHz). SDA changes
only while SCL is low, apart from START and STOP. It does not support
clock stretching or multi-master arbitration.

## Departures and choices to know about

- The configuration is done in hardware, not by software on an embedded
  processor through a vendor I²C core.
- The line-buffer read address (`pixel_count + RD_OFFSET`) and the
  read-side swap at display blanking are this design's choices.
- The 13.5 MHz domain is a clock enable, not a clock.
- The colour constants, device address, bus rate, sample width and buffer
  depth are chosen values, as described above.
- The shortened vertical sync in restart frames is left as it is.
- The test generator and the video path have separate output pins (`a_*`
  and `v_*`). On a board they would share one connector and be built one
  at a time.

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values come
from independent models in the testbench: a floating-point colour
converter, counter-based timing references, and a bus-level I²C slave.

`tb_lab5_top` runs the whole design at its default sizes. In one run:

- the BT.656 source sends a little over two camera frames with a known
  pixel pattern;
- `video_out_checker` checks the video output: the position of each
  display line, line doubling (each camera line on two consecutive display
  lines, in the right order for each field), pixel values against the
  reference converter, sync widths and blank timing;
- the test generator's line period (3200 system clocks) and frame period
  (520 lines) are checked;
- the I²C slave model checks all 19 register writes and their order;
- a second run with the slave refusing one byte checks that the
  configuration stops at the right entry.

It also counts the mechanisms and fails if any never happened: field
restarts, buffer swaps, input limiting, output saturation and shortened
vertical syncs. It takes a few seconds.

Simulating with plain Verilator (5.x), from the repository root:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/lab5_pkg.sv tb/tb_video_pkg.sv tb/tb_lab5_top.sv --top-module tb_lab5_top
./obj_dir/Vtb_lab5_top
```

Replace `tb_lab5_top` with any other `tb_<module>` to run a unit test.
The testbenches read no files.

Synthesis with Yosys (slang front end) of `lab5_top` gives about 390
cells, 417 flip-flop bits and 49,664 memory bits (the two 1024x24 line
buffers).
