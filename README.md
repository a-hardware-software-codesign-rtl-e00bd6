# FPGA front end for a video vehicle detector

A camera looks down at a road. Eight rectangular zones are drawn across the lanes, and a
zone counts as occupied when enough of its pixels differ from the empty road. The work splits
into two parts:

- **Every pixel of every field** goes to the FPGA. It stores the field, keeps a picture of
  the empty road (the *background*) up to date, and mixes on-screen graphics into the monitor
  output.
- **A few hundred pixels per field** go to an ARM7 CPU. It reads only the zones, from the
  stored field and from the background, and decides which zones are occupied.

This RTL is the FPGA part. The CPU, the NTSC video decoder and encoder, and the boot flash are
outside it. Their signals are the ports of the top module, `vd_fpga_top`.

```
 NTSC decoder ──► video_capture ──► dual_image_memory (bank 0 / bank 1, ping-pong)
  (byte, valid,        │                    │ previous field, same pixel
   VRESET)             │                    ▼
                       ├──────────► background_updater (background memory)
                       │
                       └──────────► osd_unit (OSD memory + adder) ──► NTSC encoder

 ARM7 CPU bus ◄──► cpu_bus_interface ◄──► bank 0, bank 1, background, OSD, registers
                   field_irq ──► CPU
```

The picture is 320 × 240 pixels with one byte (luminance) per pixel, at 60 fields per second.
That is 76 800 bytes per field and about 4.6 Mbyte/s. The whole FPGA runs on the decoder's
pixel clock and takes one pixel per clock, so any clock of 4.6 MHz or more keeps up.

## A field's journey

1. **Capture** (`video_capture`). A rising edge on the decoder's VRESET starts a field:
   - the write address goes back to 0;
   - the write moves to the other image bank;
   - the field that just ended is reported with `field_irq`.

   Each cycle with `dec_valid` high writes one byte and moves the address up by one. Bytes
   past 76 800 are dropped and set the overflow status bit. Bytes before the first VRESET
   after reset are ignored.
2. **Store and compare** (`dual_image_memory`, `background_updater`). In the same clock as a
   pixel's write, the other bank is read at the same address, which gives the same pixel of
   the previous field. The background is read there too. One clock later the background
   updater has the current, previous and background bytes of that pixel. If this field is
   a background field, it writes the new background byte.
3. **Display** (`osd_unit`). The pixel's OSD byte is read at the same address and added to the
   video byte, clipped at 255. The result goes to the encoder two clocks after it came from
   the decoder, with VRESET and valid delayed to match.
4. **CPU** (`cpu_bus_interface`). After `field_irq`, the CPU reads the bank that was just
   completed: status bit 0 gives the bank being written, and the CPU reads the other one. It
   also reads the background, runs its zone test, and may write OSD graphics and registers.
   It has one full field time (about 16.7 ms at 60 fields/s) before that bank is overwritten.

## The two image banks

The two banks alternate, so one holds the odd fields and the other the even fields. The
capture owns one bank for a whole field and the CPU owns the other. The roles swap at every
VRESET. This is what lets the CPU take a field's time to process it without losing pixels.

On the board, bus buffers connect each bank to either the FPGA's frame bus or the CPU bus.
Here that switch is bank-select logic. The CPU sees the two banks as separate address windows.
A CPU read of the bank currently being written is refused: it returns 0, and the register
`REG_CONFLICTS` counts it (the count stops at 255). Reads before the first VRESET are never
refused.

The background updater needs the previous field while the current one is written. So each
bank in this RTL has two read ports: one follows the write address (previous field), and one
serves the CPU. A board with single-port SRAMs would have to share one port in time. That
scheme is not modelled.

## Background learning

The background memory holds the road as it looks without vehicles. At each field start,
`background_updater` chooses one of three modes for the whole field:

| mode        | when                                                            | per pixel |
|-------------|-----------------------------------------------------------------|-----------|
| `BG_INIT`   | first field after reset; field after a reload request           | background ← current |
| `BG_UPDATE` | every `period`-th field (see below); field after a force request | if \|current − previous\| ≤ `still_th`: background ← background + ((current − background) >>> `shift`); otherwise count the pixel as moving |
| `BG_IDLE`   | all other fields                                                | nothing |

The idea is that anything moving differs between two consecutive fields, so it never leaks
into the background. Still pixels pull the background toward them by a fraction of the
difference: 1/4 with the default shift of 2. This follows slow changes of light and shadow.

Details of the update rule:

- `>>>` is an arithmetic shift. A dark pixel can therefore pull the background down by a
  step of 1 even when the difference is small.
- A small positive difference can round to a step of 0, so brightening stops 2^shift − 1
  levels short of the pixel value.

Counting and timing of the modes:

- **Period.** The update period counts fields since the last init or update. It is 72 000
  fields after reset, which is 20 minutes at 60 fields/s.
- **Force and reload.** These requests come from the CPU (control register bits 1 and 2) and
  take effect at the next field start. A force is kept until it is used. An update also needs
  a stored previous field.
- **Ordering.** The mode is decided at the field start, so a request written during field n
  acts on field n+1.
- **Moving-pixel count.** The number of moving pixels in the last update field can be read in
  `REG_MOVING_*`. It is latched one clock after the following field starts.
- **`bg_valid`** (status bit 3) rises at the start of the field after an init field. The
  background is then complete.

A CPU that reads the background while an update or init field is being captured sees a
mixture of old and new bytes. Status bits [6:5] give the mode of the field in progress, so
software can tell.

## On-screen display

The OSD memory has one byte per monitor pixel. The CPU writes marks at pixel addresses (row ×
320 + column). The FPGA adds the byte to the video and clips the sum at 255. An OSD byte of
0 leaves the pixel unchanged. Mixing is off after reset (control bit 0), because reset does not
clear the OSD memory: software clears it, then turns mixing on. Only the monitor output is
affected. The stored fields stay the decoder's raw bytes.

## CPU view

The bus is a one-clock strobe interface, synchronous to the pixel clock:

- `cpu_cs` starts an access, with `cpu_we`, `cpu_addr` and `cpu_wdata` valid in the same clock.
- A write takes effect at that clock edge.
- A read returns `cpu_rdata` with `cpu_rvalid` one clock later.

The address is `{region[2:0], offset[16:0]}`:

| region | contents | access |
|--------|----------|--------|
| 0 | image bank 0, offset = row × 320 + column | read |
| 1 | image bank 1 | read |
| 2 | background | read |
| 3 | OSD memory | read/write |
| 4 | registers | see below |

Offsets of 76 800 or more, and regions 5 to 7, read as 0 and ignore writes.

| offset | register | meaning |
|--------|----------|---------|
| 0x00 | STATUS (r) | [0] bank being written, [1] a field is stored, [2] last field overflowed, [3] background valid, [4] last field had exactly 76 800 bytes, [6:5] background mode of the current field (0 idle, 1 init, 2 update) |
| 0x01 | CTRL (r/w) | [0] OSD enable; writing 1 to [1] forces an update field, writing 1 to [2] reloads the background (both self-clearing, read as 0) |
| 0x02 | STILL_TH (r/w) | still-pixel threshold, reset 12 |
| 0x03 | BG_SHIFT (r/w) | update shift, reset 2 |
| 0x04/0x05 | FIELDS (r) | stored fields, 16 bits, low byte first |
| 0x06–0x08 | PERIOD (r/w) | update period in fields, 24 bits, low byte first, reset 72 000 |
| 0x09 | CONFLICTS (r) | refused reads of the bank being written, stops at 255 |
| 0x0A | UPDATES (r) | init and update fields so far, wraps |
| 0x0B–0x0D | MOVING (r) | moving pixels in the last update field, 17 bits |

`field_irq` pulses for one clock when a field has been stored. It comes together with the
VRESET edge that starts the next field.

## The detection software the FPGA serves

The zone test runs on the CPU, not in this RTL. The end-to-end testbench contains a model of
it, which shows how the FPGA is meant to be used:

1. Reduce each zone to 32 samples.
2. Count the samples whose image byte lies outside background ± 25.
3. Call the zone occupied when more than 25 % of the samples (more than 8 of 32) are outside.

Having both a lower and an upper limit catches both dark and bright vehicles.

## What follows the source system and what is this design's own

These come from the original system description:

- the FPGA/CPU split;
- the 320 × 240 byte frame at 60 fields/s;
- address reset and bank switch on VRESET;
- one byte stored per clock;
- one bank per field parity, written in ping-pong with the CPU reading the other;
- the background derived by subtracting consecutive fields;
- a background update every 20 minutes;
- the CPU-written OSD memory added to the video;
- the zone algorithm above (32 samples, 25 %).

These are this design's own choices, because the description leaves them open:

- the single clock;
- the `dec_valid` qualifier;
- the VRESET polarity;
- the CPU bus protocol, address map and all registers;
- the second read port per memory;
- the refusal of CPU reads of the bank being written;
- the exact background rule. The description names only a "neural network" smoothing; the
  single-weight running average used here, with a still threshold, is the simplest such
  learning rule;
- the first-field initialisation and the force/reload requests;
- clipping of the OSD sum;
- `field_irq`;
- all memories on chip.

On the original board the CPU bus reaches each image SRAM directly through bus buffers, and
the FPGA drives only the buffer enables and its own frame-memory bus. Here the CPU reaches every
memory through the FPGA's bus interface. The description also mentions the CPU reading the
decoder's data directly; that path is not described further and is not built.

The original board keeps the image banks in two external 128 K × 8 SRAMs. To move them off
chip, replace the two `frame_ram` instances in `dual_image_memory` with an SRAM controller that
shares each chip's single port in time. The description does not say where the background and
OSD memories are.

These parts of the system are not in this RTL:

- the CPU and its software;
- the NTSC decoder and encoder;
- the boot loader and flash layout;
- FPGA configuration;
- the RS-232 and PS/2 operator interfaces. The description only names them, and does not
  say which chip serves them.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `vd_fpga_top` | `IMG_W`, `IMG_H` | 320, 240 | frame size; all memories are `IMG_W*IMG_H` bytes |
| `vd_fpga_top` | `BG_PERIOD_FIELDS` | 72 000 | reset value of the update period |
| `frame_ram` and the memory blocks | `DEPTH` | 76 800 | bytes per memory |

The CPU address offsets are 17 bits wide, so a frame may hold up to 131 072 bytes.

## Files and simulation

Source files:

- `rtl/vd_pkg.sv`: constants, the region, register and mode enums.
- `rtl/frame_ram.sv`, `rtl/video_capture.sv`, `rtl/dual_image_memory.sv`,
  `rtl/background_updater.sv`, `rtl/osd_unit.sv`, `rtl/cpu_bus_interface.sv`: the blocks.
- `rtl/vd_fpga_top.sv`: the top.

Each `tb/tb_<block>.sv` is a self-checking testbench. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if the test hangs.

`tb/tb_vd_fpga_top.sv` runs the full-size design, with default parameters, for ten fields.
The decoder model sends a textured road with bright and dark vehicles covering 0, 10, 40 or 64
pixels of each zone. The CPU model answers every interrupt with the zone test. The testbench:

- checks every encoder byte, sampled image bytes, the background, and the mode of each field
  against reference models;
- requires each mechanism above to happen at least once: both banks, a refused read, init,
  periodic update, forced update, reload, overflow, OSD add and clip, occupied and free zones,
  and a field with a pixel on every clock.

It takes a few seconds.

To run the top testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/vd_pkg.sv tb/tb_vd_fpga_top.sv \
          --top-module tb_vd_fpga_top -Mdir obj_top
obj_top/Vtb_vd_fpga_top
```

`-Wno-fatal` is needed because the testbenches mix integer widths freely; the RTL itself
lints clean of width warnings. The block testbenches run the same way, with their `tb_*`
module as the top. They use small
frames (8 × 4 or 16 pixels) through parameter overrides.
