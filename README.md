# Bright-spot position sensing for blinking infrared tags

People and objects wear small active tags whose infrared LED blinks a unique
identifier, one bit per camera frame. Ceiling-mounted sensing units, each a
cheap CMOS camera (352 x 288, 8-bit grey, up to 60 frames/s, behind an
infrared band-pass filter), an FPGA and an embedded processor board, see the
tags as bright spots. The FPGA finds the spots in every frame *while the pixels
arrive*, without storing the frame, and hands the processor a short list of
32-bit spot records. The processor groups the records into spots, throws out
implausible ones, follows each spot over successive frames to read its blink
pattern, and sends 2-D tag positions over Ethernet to a host, which combines
several cameras into 3-D positions.

This repository holds the SystemVerilog of the FPGA side of a sensing unit and
of the tag's blink modulator. Grouping, filtering, blink decoding and the 3-D
solve are processor and host software and are not here; the RTL ends at the
processor's register bus.

```
 camera pins ──► camera_if ──► bsd ──► spot_fifo ──► cpu_mmio ◄──► processor bus
 (PCLK, HREF,   (sync, pixel  (bright   (1024 x 32)   (registers)
  VSYNC, D[7:0]) strobes)      spot det.)                 │
                                                          ▼
 camera I2C pins ◄──────────────────────────────── i2c_master

 tag_encoder (separate device, own clock) ──► infrared LED
```

`remoteeyes_top` instantiates all of the above; the tag modulator sits beside
the sensing unit with its own ports, since the only link between them is light.

## The bright spot detector (`bsd`)

This is the part that matters and the one to read first.

**Edges and runs.** Each scanline is examined pixel by pixel against the
pixel before it. A rise larger than `threshold` is an *up-edge* and opens a
run at the current pixel; a fall larger than `threshold` is a *down-edge* and
closes it, the run being the pixels from the up-edge up to the one before the
down-edge. An infrared LED through a band-pass filter gives a small, sharp
blob, so two rules reject what cannot be a tag:

* no down-edge within `max_width` pixels of the up-edge: the run is too wide
  (a lamp, a window, a tag too close to the lens). It is dropped and the search
  starts again for a new up-edge from the next pixel;
* a run still open when the line ends is dropped too.

A run is accepted with 1 to `max_width` pixels. The first pixel of a line has
no predecessor and is never an edge. Both knobs are processor registers
(reset values 40 and 32).

**Group numbers (BPGIN).** Every accepted run gets a *bright pixel group
identification number*, so that the processor can put the runs of one blob back
together. A run that has at least one pixel directly below a pixel of an
accepted run of the previous row takes that run's number (the leftmost one if
it touches several); any other run gets the next free number. Numbers restart
at 1 with each frame and stop at 255; if a frame needs more, every further new
group is numbered 255 and `label_ovf` (status bit 25, sticky) is raised.

One blob can still end up with two numbers, for example a V shape whose
arms meet only at the bottom, or an LED seen as two separate patches. That is
expected. Merging runs by distance is the processor's grouping step, which
also merges numbers.

**Run lists instead of a label line.** To find the run above, the detector
does not keep a label per pixel of the previous row. It keeps the previous
row's accepted runs as a list of (first column, last column, number) and
writes the current row's runs into a second list; the lists swap at each line
end. Runs of one row are separated by at least one pixel, so a pointer that
steps through the previous list as the column advances needs at most one step
per pixel and one comparison tells whether the pixel above is bright. Each list
has `IMG_W/2` = 176 entries, the most runs one row can hold.

**Spot records.** One 32-bit record leaves per accepted run. They leave at the
end of their row: at `line_end` the row's run list is read out, one record per
clock, while the next row streams in. That list has become the "row above" list
and is only read, and a row of `IMG_W` pixels takes at least `IMG_W` clocks, so
the read-out of its at most `IMG_W/2` runs always ends in time:

| bits  | 31:26 | 25:18 | 17:9 | 8:0 |
|-------|-------|-------|------|-----|
| field | size (pixels in the run) | group number | row | column of the run's centre, floor((first+last)/2) |

The field order (size, group, row, column from the top) is that of the
original record. The original draws every field 8 bits wide, which cannot
hold 352 columns or 288 rows, so here row and column have 9 bits each and the
size field shrinks to 6 bits, enough since `max_width` is at most 63.

After the records of the last row of a frame (`IMG_H` line ends after the
frame start) the detector emits an **end-of-frame record**: size 0, the frame number (mod 256)
in bits 8:0. A real run never has size 0. `frame_done` pulses with it.

**Timing.** One pixel per `pix_valid`, at most one per clock, any number of
idle clocks between. `frame_start` resets row, lists and numbering;
`enable` is sampled there, so enabling or disabling takes effect at the next
frame. A row's records come on consecutive clocks from the second clock after
its `line_end`. The vertical blanking must give the last row's read-out
(`IMG_W/2 + 1` clocks at most) time to finish before the next `frame_start`;
an assertion checks this.

## Camera front end (`camera_if`)

The camera's PCLK, HREF, VSYNC and data pass through two flip-flops each
into the FPGA clock domain. A rising PCLK edge with HREF high gives one
`pix_valid` with the byte present at that edge; HREF falling gives
`line_end`, VSYNC rising gives `frame_start`. These events never share a clock,
which the detector asserts. The FPGA clock must be at least three times PCLK;
the data is assumed to change on the falling PCLK edge. Latency is 3 to 4 FPGA
clocks.

## Record buffer and processor registers (`spot_fifo`, `cpu_mmio`)

Records wait in a 1024-word FIFO (first-word fall-through, 32 kbit) until
the processor reads them. The processor sees 32-bit registers on a simple
synchronous bus: a write acts at the clock edge with `bus_cs && bus_we`; a
read returns data one clock later with `bus_rvalid`.

| address | register | access |
|---------|----------|--------|
| 0x00 | ID, reads 0x42534431 | R |
| 0x04 | CTRL: bit 0 detector enable; writing bit 1 = 1 clears the sticky flags | R/W |
| 0x08 | STATUS: 15:0 records waiting, 23:16 complete frames waiting, 24 FIFO overflow, 25 group-number overflow, 26 I2C busy, 27 I2C no-acknowledge | R |
| 0x0C | SPOT: oldest record; the read removes it. Reads 0 and removes nothing when empty | R |
| 0x10 | THRESH: edge threshold, 8 bits (reset 40) | R/W |
| 0x14 | MAXW: widest accepted run, 6 bits (reset 32) | R/W |
| 0x18 | FRAMES: frames finished since reset | R |
| 0x1C | I2C: write {dev[22:16], reg[15:8], data[7:0]} starts a camera register write (ignored while busy); read: bit 0 busy, bit 1 no-acknowledge | R/W |

The intended driver loop: wait until STATUS[23:16] is non-zero, then read
SPOT until a record of size 0 appears; those are one frame's runs. A push into
a full FIFO is dropped and sets STATUS[24]; frames in the FIFO are then
incomplete.

## Camera configuration (`i2c_master`)

The camera is set up over I2C. `i2c_master` performs one register write per
command (START, address + write bit, register, data, STOP), checks the three
acknowledges and drives both lines open-drain (`*_oe` high pulls low). The
default `QUARTER = 250` gives 100 kHz from a 100 MHz clock. It does not support
reads or clock stretching.

## Tag blink protocol (`tag_encoder`)

A tag repeats: a 5-bit start code, then its 8-bit identifier, most significant
bit first, LED on for 1, one bit per camera frame (60 bit/s). This is 13 bits,
about 217 ms per broadcast, for 256 identifiers. Tag and camera run from
independent clocks, so the tag marks its start code: one *off* slot of the
start code is shorter than a bit (here the last one, by 1/8 bit). A receiver
that is in step sees the start code correctly, one that samples near the
bit edges does not. After each broadcast the tag stays dark for a short pause
(here 1/4 bit). The phase between tag and camera therefore moves a little every
broadcast, and a tag that was out of step is lost for only one broadcast.
The start code value `10101`, which slot is shortened, by how much, and the
pause length are this design's choices; the original uses a microcontroller
and does not give them. `CLK_HZ` is the tag's clock (default 1 MHz).

## How far it follows the original design, and where it departs

Taken from the original: the pixel-by-pixel up-/down-edge search against a
threshold, the rejection of runs with no down-edge within a set width, group
numbers shared by adjacent bright pixels, one record per run carrying size,
group number, row and column centre, handed on at the end of each row,
processing on the fly with no frame buffer, memory-mapped access from the processor, I2C camera configuration,
and the tag's 5 + 8 bit, 60 bit/s pattern with a shortened start-code slot and
a pause after each broadcast.

This design's own choices, not found in the original:

* **One group number per run.** The original numbers pixel by pixel, so one
  run can carry several numbers; its record has one number per run, and this
  design follows the record.
* **Record field widths** 6/8/9/9 instead of 8/8/8/8 (see above).
* **End-of-frame record**, the FIFO, the register map, the bus protocol, the
  reset values of threshold (40) and width (32), the group-number saturation,
  the rejection of runs still open at the line end.
* **Clocking:** the detector runs on an FPGA clock that oversamples the camera
  clock, rather than on the camera clock itself.
* **Where the I2C master lives** (the FPGA, under processor control) and its
  write-only protocol.
* **The tag as logic.** The original tag runs its pattern from a small
  microcontroller; here it is a counter and a shift register, with the start
  code value, the shortened slot and the pause chosen as described above.

Not in this RTL: merging runs into spots and merging close spots weighted by
size, removal of spots that are too small or too large or look like stripes,
blink decoding with the start-code check and loss-of-sight counting, and the
3-D solve. The original runs these in software on the processor and host.
The camera, the processor board and its Ethernet are bought parts, and the
FPGA is loaded by the processor through the FPGA's own configuration port, so
none of them has RTL here.

## Size

At the default parameters a coarse synthesis gives about 475 word-level
cells, 407 flip-flops and 41,920 memory bits (32,768 FIFO + 2 x 176 x 26 run
lists), well inside the roughly 200 kbit of RAM of a low-cost FPGA of the
Cyclone EP1C12 class. One pixel per clock means a 100 MHz clock handles the
6.1 Mpixel/s of 352 x 288 at 60 frames/s many times over; the limit is the
3:1 oversampling of PCLK.

## Files

| file | content |
|------|---------|
| `rtl/remoteeyes_pkg.sv` | camera size, record type `spot_t`, register addresses |
| `rtl/camera_if.sv` | camera bus synchroniser |
| `rtl/bsd.sv` | bright spot detector |
| `rtl/spot_fifo.sv` | record FIFO |
| `rtl/cpu_mmio.sv` | processor registers |
| `rtl/i2c_master.sv` | camera I2C write master |
| `rtl/tag_encoder.sv` | tag blink modulator |
| `rtl/remoteeyes_top.sv` | sensing unit plus tag |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the two top-level ones |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops; a watchdog
ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
          rtl/remoteeyes_pkg.sv tb/tb_remoteeyes_top.sv --top-module tb_remoteeyes_top
./obj_dir/Vtb_remoteeyes_top +verilator+rand+reset+2
```

Replace the testbench name for the others. Delays in the testbenches are in
nanoseconds (10 ns FPGA clock). The testbenches initialise what
they read, so they also pass with random initial values.

* `tb_bsd`: synthetic 40 x 16 frames (spots, touching spots, over-wide bars,
  runs cut by the line end, glints) with random pixel gaps, checked record by
  record against a reference model that labels with a per-pixel label line,
  an independent method, including the clock on which each record leaves.
  Also threshold and width changes between frames, a frame of staggered dots
  that runs out of group numbers, and a disabled frame.
* `tb_remoteeyes_top`: the whole unit at 48 x 16 with a 64-word FIFO. A camera
  model shows the tag's LED as a spot in each frame where the LED is on; the tag
  clock is set so one bit lasts one frame. A processor model configures the
  camera over I2C (checked by an I2C slave model), drains every frame,
  compares each record with the reference model, rebuilds the blink sequence
  and decodes the tag identifier from it. It then stops reading to force a FIFO
  overflow. Every mechanism (accepted run, width rejection, line-end rejection,
  inherited group number, tag on and off, identifier decoded, overflow, I2C
  write) must occur at least once.
* `tb_remoteeyes_full`: the top at its default parameters (352 x 288, 1024
  records, 100 kHz I2C, 1 MHz tag clock), three frames with spots beyond column
  and row 255. Runs in about a second.
* `tb_workload_tag60`: the operating point of the original system at default
  size: 352 x 288 frames at 60 frames/s, a tag at its default 1 MHz clock
  (60 bit/s), 16 frames. The processor model decodes the identifier and the
  testbench measures the time from the start of the tag's broadcast to the
  decode: 13 bits at 60 bit/s is 216.7 ms; it measures about 229 ms, the extra
  being the phase between tag and camera and the last frame's read-out. Runs in
  under a minute.
* The block testbenches for `camera_if`, `spot_fifo`, `cpu_mmio`, `i2c_master`
  and `tag_encoder` check the timing details given in each file's header.

What is not verified: operation against a real OV6130 (its exact HREF/VSYNC
polarity and data-edge timing are assumed), the processor's real bus timing,
and the software stages that consume the records.
