# Smart vision subsystem for FireWire cameras

A service robot carries several IEEE 1394 (FireWire) cameras: a stereo pair
(640 x 480 at 30 frames/s) and an omnidirectional camera (1280 x 960 at
7.5 frames/s), both sending YUV 4:2:2. Even simple image processing on these
streams is too much for the robot's PC. This RTL moves the pixel-rate work into
an FPGA board that sits on the same FireWire bus. The board listens to a
camera's isochronous stream and does three jobs:

* **Automatic focus.** It measures the sharpness of every frame as the sum of
  a Laplace-filtered image over the central region. Software on an embedded
  processor turns that number into focus commands. The board sends them to the
  camera as asynchronous FireWire register writes.
* **Programmable 3x3 filter.** It filters the frame in fixed point and sends
  the result to the host as a new isochronous stream.
* **Omnidirectional-to-panoramic conversion.** It stores the frame in external
  SRAM, unwraps the ring image into a rectangular panorama and sends that.

Hardware and software are split the usual way. Everything that touches every
pixel is hardware. Decisions made once per frame, such as the focus search,
are software on the embedded processor. The processor is a vendor soft core
and is not part of this RTL: its bus port, and the ports to the link chip and
the SRAM, are brought out of the top module `vision_top`.

The design is built from the system described in the paper *System Design
for an Autonomous Smart Vision System*. That paper describes the units and
how they fit together, but gives few internal details. Every width, register
map, packet layout and control sequence below is this implementation's own
choice unless it is said to come from the paper. The section *Relation to the
original system* lists those choices.

## Data flow

```
 link chip (TSB12LV01-class, 1394 link layer)
   ^ |  memory-mapped host bus, 30 MHz, pins on the falling edge
   | v
 link_if  ---- fixed-priority bus master: 0 iso_rx, 1 iso_tx, 2 async_tx, 3 cpu_regs
   |
 iso_rx   ---- poll receive FIFO, parse packets, sync on sy=1, YUV422 -> luma
   |
 input FIFO (sync_fifo)
   |---------------------------+-------------------------------+
 window3x3 (2 line buffers)    |                               |
   |---------------+           |                               |
 laplace3x3   prog_filter3x3   pano_conv (writer -> SRAM banks, converter,
   |               |                      pano_addr + bilinear_interp)
 focus_sum         | mode 0                | mode 1
   |               +---------> output FIFO <+
 cpu_regs (irq)                  |
   |                           iso_tx ---- packets to the link's transmit FIFO
 async_tx <--- processor writes a camera command
```

All units run from one clock: the 30 MHz board clock, which the link chip also
uses. Pixel streams carry a `pix_t` record: luma, column, row, and
first/last-of-frame flags. So no unit has to count pixels on its own.

## The link-chip bus (`link_if`)

The 1394 PHY and link layer are commercial chips on a separate board. The
FPGA sees only the link chip's host interface: a strobe `l_cs_n`, a write flag,
an 8-bit byte address, 32-bit data split into in, out and enable, and an
acknowledge `l_ca_n`. Both boards share one clock, and the chip must answer
within one clock. To make that work, `link_if` launches the strobe, address
and data on the **falling** edge and samples acknowledge and read data on the
falling edge too. The link chip, clocked on the rising edge, then sees stable
inputs in the middle of the clock, and its answer is back half a clock later.
The state machine itself runs on the rising edge.

A bus cycle looks like this:

| rising edge | state | falling edge after it |
|---|---|---|
| n   | IDLE -> STROBE (request taken, `ready[i]`) | `l_cs_n` low |
| n+1 | STROBE -> WAIT; link chip samples the strobe, drives `l_ca_n` low | acknowledge captured |
| n+2 | WAIT: `done[i]`, `rdata`; the next request can be taken here | |

Back-to-back accesses from different clients cost **two clocks each**, which
is 15 M accesses/s or 60 MB/s at 30 MHz. A client holds `req` until `ready`,
then waits for `done`. Client 0 has priority. A client only asks again after
its own `done`, so the others always get a turn. If no acknowledge comes
within `TIMEOUT` clocks, the access ends with `err`, which the processor sees
as a sticky status bit.

The link chip's register map is not reproduced here. The offsets used are
collected in `sv_pkg`: receive FIFO count and data, async transmit FIFO
first/continue/last, and iso transmit FIFO first/continue/last. Change them
there to match a real part.

## Receiving frames (`iso_rx`)

`iso_rx` reads the receive FIFO's fill count, then that many quadlets. Each
packet starts with a header quadlet:
`{data_length[31:16], tag, channel[13:8], tcode[7:4], sy[3:0]}`.
Packets with another channel or transaction code are skipped and counted.
A packet with `sy = 1` starts a frame: the pixel counters restart and the unit
is *in sync*. Payload that arrives out of sync, for example in the middle of
a frame after enabling, is dropped. Each payload quadlet holds `U Y0 V Y1`.
The two luma bytes leave one per clock. Chroma is not used by any unit.

Frame size comes from the `IMG` register. After the last pixel the unit waits
for the next `sy`. If the input FIFO is full, `iso_rx` stops reading, and the
link chip's own FIFO holds the burst. After an empty poll, `iso_rx` waits
`POLL_GAP` clocks so that it does not take over the bus.

## Focus measure (`window3x3`, `laplace3x3`, `focus_sum`)

* `window3x3` keeps the two previous lines in two `MAX_W`-deep on-chip delay
  lines, addressed by column, so any width up to 1280 works. Each new pixel
  shifts a column into a 3x3 register window. The window is centred one
  column left and one line above the newest pixel. `interior` marks windows
  whose nine taps all lie inside the frame. Latency is 2 clocks, and gaps in
  the input are allowed.
* `laplace3x3` computes `|N + S + W + E - 4C|` with a two-level adder tree
  and a shift. Latency is 1 clock, range 0..1020.
* `focus_sum` adds the magnitudes of interior windows whose centre lies in
  the region `ROI_XY`/`ROI_WH`. At the frame's last window it latches the sum
  and pulses `sum_valid`. `cpu_regs` stores the value and raises the
  interrupt. Reading `FOCUS` clears it.

The focus search itself is software: a coarse interval search, then local
tracking, with a threshold deciding when to switch. It writes the camera's
focus register with `ADEST/AOFF/ADATA`. For an IIDC camera that register is
at offset `0xFFFF_F0F0_0828`. The reset region is 128 x 128 in the centre of
a 640 x 480 frame.

## Programmable filter (`prog_filter3x3`)

The filter has nine signed 8-bit coefficients (`COEF0..8`, row-major) and a
shift (`FSHIFT`). It computes
`pix = clip(sum(k[r][c] * w[r][c]) >>> shift, 0, 255)`, with an arithmetic
shift standing in for division. The pipeline has three clocks: products, row
sums, then total, shift and clip. The reset setting is the identity filter.
Only interior windows are sent, so a W x H frame gives a (W-2) x (H-2) image.

## Panoramic conversion (`pano_conv`, `pano_addr`, `bilinear_interp`)

This is the most involved part. A 1280 x 960 frame does not fit on chip, so
the **input buffer is in external SRAM**. The SRAM is synchronous and single
port, with read data one clock after the address. Three machines share it:

1. **Frame writer.** In panorama mode every input pixel is written at byte
   address `{bank, row[9:0], col[10:0]}`, which needs 22 address bits. At the
   end of a frame, the bank is handed to the converter if the converter is
   idle, and the writer switches to the other bank. If the converter is still
   busy, the frame is *dropped*: it is counted and its bank is overwritten by
   the next frame. The writer never touches the bank being read.
2. **Converter.** It walks the panorama row by row (`PANO_H` rows of `PANO_W`
   columns). Column `a` is the angle `2*pi*a/PANO_W`. Row `j` is the radius
   `rmin + j` around the mirror centre (`PANO_C`, `PANO_R`). For every output
   pixel it:
   * asks `pano_addr` for the source position (2 clocks);
   * reads the four pixels around it;
   * lets `bilinear_interp` blend them (2 clocks);
   * hands the result to the output FIFO.

   Positions whose 2x2 neighbourhood leaves the frame give black.
3. **Port sharing.** The writer has priority. The converter issues its reads
   in the clocks the writer leaves free, so a new frame can be stored while
   the previous one is converted.

`pano_addr` holds a table of cos/sin for every column, in Q1.14. The table is
built after `CTRL[4]` is written (`init`) by an iterative CORDIC: 16
rotations per angle, one per clock. Angles are in 2^-20 turn and the working
values have 16 fraction bits. Angles beyond +-90 degrees are folded by a
180-degree turn and a sign change. Set-up takes about 17 clocks per column,
17 k clocks for 1024 columns. Per pixel it forms `cx + r*cos` and
`cy + r*sin` with 8 fraction bits. Its error stays below 1/8 pixel for radii
up to 500. `bilinear_interp` computes
`(top*(256-fy) + bot*fy + 2^15) >> 16`, where `top` and `bot` are the two
horizontal blends.

A pixel takes 13 clocks while the receive path is idle: four SRAM reads at
two clocks each plus pipeline and output hand-off. A 1024 x 240 panorama
took 3,194,880 clocks in simulation, within the 4 M clocks a 7.5 frames/s
camera leaves at 30 MHz. Only luma is converted.

## Sending (`iso_tx`, `async_tx`)

* `iso_tx` packs output pixels four to a quadlet, first pixel in the top
  byte (8-bit monochrome). It collects up to `PKT_Q` quadlets in an on-chip
  packet buffer. A packet closes when it is full or at the frame's last
  pixel, and a partly filled last quadlet is zero-padded. The packet then
  goes to the link's transmit FIFO: a header
  `{length, tag=1, channel, tcode=0xA, sy}` with `sy = 1` on a frame's first
  packet, then the payload, with the last quadlet sent to the "send"
  address.
* `async_tx` writes a write-quadlet request as four FIFO words:
  `{spd, tlabel, rt=1, tcode=0, pri=0}`, `{dest_ID, offset[47:32]}`,
  `offset[31:0]`, data. The transaction label counts up with each request.

## Flow control and rates

* The input FIFO is popped only while the output FIFO has at least 8 free
  entries, enough for the pixels still in the window and filter pipeline
  (mode 0). In mode 1 it is popped at once, because the SRAM writer never
  waits.
* While `iso_tx` writes a packet it takes no pixels. The 512-entry output
  FIFO covers that.
* Stereo camera: 18.4 MB/s in (4.6 M reads/s) plus 9.2 MB/s out (2.3 M
  writes/s) against 15 M accesses/s on the link bus. A full 640 x 480 frame
  simulates in 0.77 M clocks, under the 1 M clocks of a 30 frames/s frame
  time.
* Omnidirectional camera: the same 18.4 MB/s in. The SRAM needs 2 x 2 MB of
  address space at the default packing.

## Processor registers (`cpu_regs`)

Word-addressed slave with 32-bit data, writes in one clock, and read data one
clock after `read`.

| addr | name | bits |
|---|---|---|
| 0x00 | CTRL | [0] rx_en [1] tx_en [2] mode (0 filter, 1 panorama) [3] irq_en; write [4]=1 builds the angle table |
| 0x01 | STATUS | [0] focus ready [1] async busy [2] link access busy [3] rx in sync [4] panorama busy [5] link timeout (sticky) |
| 0x02 | FOCUS | last focus sum; reading clears "focus ready" and the interrupt |
| 0x03 | CHAN | [5:0] receive channel, [13:8] transmit channel |
| 0x04 | IMG | [10:0] width, [25:16] height (reset 640 x 480) |
| 0x05/06 | ROI_XY / ROI_WH | focus region (reset 256,176 / 128 x 128) |
| 0x07 | FSHIFT | [3:0] |
| 0x08-0x10 | COEF0..8 | [7:0] signed, row-major |
| 0x11-0x14 | ADEST, AOFF_HI, AOFF_LO, ADATA | writing ADATA sends the camera command |
| 0x15-0x17 | LCMD, LWDATA, LRDATA | direct link-chip access: LCMD [7:0] address, [8] write |
| 0x18/19 | PANO_C / PANO_R | mirror centre, inner radius |
| 0x1A-0x1C | CNT0..2 | frames received / packets sent, packets skipped / async requests, panoramas / dropped frames |

## Parameters of `vision_top`

| parameter | default | meaning |
|---|---|---|
| MAX_W | 1280 | longest line, which sets the delay-line depth (omnidirectional camera width) |
| IN_DEPTH | 64 | input FIFO entries |
| OUT_DEPTH | 512 | output FIFO entries |
| PKT_Q | 160 | payload quadlets per transmitted packet |
| PANO_W, PANO_H | 1024, 240 | panorama size |
| SRAM_AW | 22 | SRAM byte-address width |

## Relation to the original system

From the paper:

* the split into FireWire interface, FIFOs, hardware pipelines and an
  embedded processor;
* the falling-edge link interface answered within one 30 MHz clock;
* synchronisation to the isochronous stream;
* the focus pipeline: on-chip delay lines for the 3x3 neighbourhood, a
  Laplace adder tree, and the sum over the central region;
* asynchronous commands to the camera;
* a 3x3 programmable filter with division by shift;
* isochronous output to the host;
* a panoramic conversion with an SRAM input buffer, address and
  interpolation datapaths, and control FSMs;
* the camera formats and rates.

This implementation's own choices:

* the link-chip signal names and register offsets;
* polling the receive count register;
* `sy = 1` as the frame mark, the IIDC camera convention;
* luma-only processing;
* the 4-neighbour Laplace kernel and its absolute value;
* the focus region's reset values;
* 8-bit signed coefficients and clipping;
* flagging border windows instead of padding them;
* packet size, monochrome output format and header fields;
* the processor register map;
* the polar unwrap, CORDIC table, bilinear weighting and two-bank SRAM
  scheme;
* sending the panorama straight to the output FIFO. The paper also keeps the
  output image in SRAM.

The focus algorithm itself is software and is not in the RTL. So are the
processor, the PHY and link chips, the SRAM and flash, and the PLLs. One
clock drives all logic. The paper's board allows faster processing clocks,
but the rate figures above show that 30 MHz is enough.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. The
testbenches print `TB_RESULT checks=N failures=M` and stop themselves after a
fixed number of clocks if something hangs. `tb/link_chip_model.sv` and
`tb/sram_model.sv` are behavioural models of the link chip's host interface
and of the SRAM. With plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/sv_pkg.sv tb/tb_vision_top.sv \
          --top-module tb_vision_top -o sim && ./obj_dir/sim
```

* `tb_vision_top` runs the whole system end to end at reduced sizes: 24 x 12
  frames, a 16 x 4 panorama and 8-quadlet packets. It stalls the receive
  path, checks the focus value and interrupt, every filtered byte, an
  asynchronous command, a direct link access and a timeout. It then switches
  to panorama mode and checks the panorama against the ramp image it sent,
  with a second frame arriving during conversion so that the SRAM is shared.
* `tb_vision_full` uses every default parameter. It sends one 640 x 480
  frame and checks the focus sum, all 304,964 returned pixels in 477 packets,
  and that the frame is done within 1 M clocks. It then sends one 1280 x 960
  frame in panorama mode and checks all 245,760 pixels of the 1024 x 240
  panorama against a floating-point bilinear sample of the pattern (within
  1.5 grey levels), and that the conversion ends within 4 M clocks. It runs
  in about 12 seconds.

The panorama run does not overlap a second incoming frame at full size; SRAM
sharing between writer and converter is only exercised at the reduced sizes
of `tb_vision_top`.
