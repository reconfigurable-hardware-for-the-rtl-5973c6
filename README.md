# Memory Manager and H.264 encoder wrapper for an 8k video card

A video card for 8k (8192x4320 at 60 frames/s) receives uncompressed video
from four 12G-SDI links merged into one 256-bit stream at 300 MHz. It must
hold frames in external DDR memory and play them back. It must also hand
the same frames to a hardware H.264 encoder, so that a compressed copy is
stored next to the raw one. This RTL is the part of the card between the
merged video stream, the memory controller and the encoder core:

* **Memory Manager**: a VDMA-like core. It writes incoming frames into
  a circular region of memory and streams complete frames back out. It
  writes the encoded stream into a second circular region. It also
  detects and survives badly formed or congested input.
* **H.264 encoder wrapper**: converts the 10-bit YUYV 4:2:2 stream to
  8-bit 4:2:0, reorders raster lines into 16x16 macroblocks for an
  external intra-only H.264 core, and prefixes each encoded frame with an
  SPS/PPS header that carries the frame size.
* **`video_card_top`**: joins the two. The raw read stream goes both to the
  card's video output and to the encoder. The encoder's byte stream comes
  back to the Memory Manager.

The SDI receivers, the DDR4 controller, the H.264 core itself, the
processor and the PCIe/HDMI parts of the card are outside this RTL. Their
connections are ports of the top.

```
 s_axis_video (256b) ──► memory_manager ──AXI4 s2mm──► DDR
                          │   raw write ◄─AXI4 mm2s──── DDR
                          │   raw read ───► m_axis_video (256b) ─► card output
                          │                  └─► h264_encoder ─► core_* (external core)
                          │   enc write ◄─ 8-bit stream ──┘
                          └──AXI4 enc──► DDR
```

Everything except the encoder's data delivery runs on one clock, `clk`
(300 MHz at 8k). Delivery to the core runs on `clk2`, at twice that rate,
with its rising edges aligned to `clk`'s. Reset `rst_n` is active low and
synchronous.

## Video format and rates

One 256-bit beat carries eight pixels in YUYV order: Y0 U Y1 V per pixel
pair, each sample a 10-bit value in a 16-bit container. A line of `W`
pixels is therefore `W*4` bytes, and an 8k frame is 141,557,760 bytes. At
8 pixels per beat, 8k60 needs 265.4 M beats/s, which fits in one beat per
cycle at 300 MHz. TUSER marks the first beat of a frame and TLAST the last
beat of each line (AXI4-Stream Video).

## Memory Manager (`memory_manager`)

Three datapaths share one register file:

| Subsystem | Module | Memory port |
|---|---|---|
| raw write | `mm_raw_write` + `mm_burst_writer` | `m_axi_s2mm_*` (write) |
| raw read | `mm_raw_read` | `m_axi_mm2s_*` (read) |
| encoded write | `mm_enc_write` + `mm_burst_writer` | `m_axi_enc_*` (write) |

### Registers (`mm_config`, AXI4-Lite, 64-bit)

| Offset | Register | Notes |
|---|---|---|
| 0x00 | raw control | bit0 restart (self-clearing), bit1 write enable, bit2 read enable, bit3 halt on error |
| 0x08 | raw region start | byte address |
| 0x10 | raw region size | bytes |
| 0x18 | line length | bytes (`W*4`) |
| 0x20 | lines per frame | |
| 0x28 | raw status | bit0 halted, bit1 EOL early, bit2 EOL late, bit3 SOF error, bit4 unwritten data |
| 0x30 | encoded control | bit0 restart, bit1 enable |
| 0x38 | encoded region start | |
| 0x40 | encoded region size | |
| 0x48 | encoded status | bit0 unwritten data |
| 0x50 | last encoded frame | start address of the newest complete encoded frame |

Sizes are shadow registers. They take effect on the next restart, so a
datapath never sees a half-updated configuration while video keeps flowing.
Status bits are sticky until a restart.

### Double buffering and congestion (`mm_burst_writer`)

This is the subtle part of the design. Video cannot be paused, so the write
path never drives TREADY low. Words are gathered into one of two buffers of
`BURST_LEN` words. Each buffer becomes one AXI4 INCR burst.

A buffer is committed (handed to the AXI side) in three cases:

* it is full;
* it holds the last word of a frame;
* a new frame starts while it is partly filled. The partial buffer is
  committed first, so every frame begins on a burst boundary.

On a commit the filler switches to the other buffer. If that buffer is
still being sent to memory, the full buffer is *held*: the filler stays on
it. If another word arrives while a buffer is held, memory is too slow. The
new word overwrites the held buffer from its start, the held data is lost,
and the "unwritten data" status bit is set. The filler never writes into a
buffer the AXI side is reading. A buffer is released to the AXI side as
soon as its last W beat has been accepted, without waiting for the write
response.

The dispatch state machine is RESET → IDLE → READ_BUFFER →
READ_BUFFER_DONE → IDLE, plus ERROR for halt-on-error. It issues AW and W
together, keeps one burst in flight, and advances a running address by one
burst per AW.

### Frame placement, rotation and rectification (`mm_raw_write`)

Frame *k* after a restart starts at `start + k*frame_bytes`. When a whole
frame would no longer fit before `start + size`, the next frame goes back
to `start`, so a frame is never split across the wrap. For example, with
640x480 frames (1,228,800 bytes) and a region of three frames, the fourth
frame reuses the region start, 0x384000 bytes after the first.

The write path checks the line and frame structure against the configured
sizes:

* **EOL early**: TLAST before the expected last beat of a line.
* **EOL late**: the expected last beat arrives without TLAST.
* **SOF error**: TUSER arrives when the number of completed lines is not
  the configured frame height.

After any of these, the next frame is written at its expected address
anyway, and the `o_rectified` pulse records that the running burst address
was corrected. With halt-on-error set, the first error instead stops the
subsystem and sets "halted" until a restart. The first TUSER after a restart
synchronises the tracker; words before it are dropped.

### Reading frames back (`mm_raw_read`)

A counter holds the number of frames written but not yet streamed. Writing
a frame's last burst increments it; streaming a frame's last beat
decrements it. A frame is read only when the counter is at least
`FRAMES_DELAY` (default 1), so the frame being written is never read.
Reads use bursts of up to `BURST_LEN` with one burst outstanding. Read data
goes straight to the output stream (RREADY = TREADY). TUSER is generated on
the first beat and TLAST at every line end. Addresses rotate exactly as on
the write side.

### Encoded write (`mm_enc_write`)

The encoder's 8-bit stream (TLAST at the end of a frame) is packed
little-endian into 256-bit words. The last word of a frame carries byte
strobes. Words are written through a second `mm_burst_writer`. Each encoded
frame gets a slot of one sixteenth of the raw frame size. Slots follow each
other from the region start and rotate when the next slot would pass the
end. Register 0x50 returns the start of the newest complete encoded frame.

## H.264 encoder wrapper (`h264_encoder`)

### Registers (`enc_config`, AXI4-Lite, 64-bit)

| Offset | Register |
|---|---|
| 0x00 | control: bit0 restart, bit1 enable |
| 0x08 | width in pixels |
| 0x10 | height in lines |
| 0x18 | frames per second (stored, not used by the logic) |

Width and height must be multiples of 16. 1920x1080 must therefore be sent
as 1920x1088, or as 1920x1072 with the last lines dropped.

### Conversion and band buffers (`enc_acquisition`)

Each sample keeps bits [9:2]. Every luma sample is kept. Chroma is kept
only on lines 0, 2, 4… counted from zero, which gives 4:2:0. Y, U and V go
to separate buffers of 32-bit words, each holding four 8-bit samples. Each
buffer has two halves. A half holds one band: 16 luma lines, or 8 chroma
lines, of up to `MAX_W` = 8192 pixels. While the core reads one band, the
next band is written into the other half. If both halves are full, TREADY
drops. This is the only back-pressure in the card, and it stalls the raw
read stream (and with it the video output).

The Y buffer is split into two banks and each chroma buffer into one, so a
whole 256-bit beat is stored in one cycle.

### Macroblock addressing (`enc_mb_addr`)

The core wants a macroblock at a time: 64 luma words (16 rows of 4
words), then 16 U and 16 V words (8 rows of 2 words). With `c` the word
count within a band and frame widths in words (`y_fw = W/4`,
`uv_fw = W/8`):

```
y_addr  = c % 4 + ((c % 64) / 4) * y_fw  + (c / 64) * 4
uv_addr = c % 2 + ((c % 16) / 2) * uv_fw + (c / 16) * 2
```

### Three state machines on two clocks

* **Main machine (`clk`)**, in sequence:
  * PREPARE_NEXT_FRAME: pulses NEWSLICE once the first band is buffered.
  * PREPARE_NEW_LINE: waits for `xbuffer_DONE` and a full band, then
    pulses NEWLINE.
  * ENCODE_LINE: the band is delivered.
  * ALIGN_ENCODER: after the last band, pulses `align_VALID` and waits for
    `tobytes_DONE`.
* **Y machine and UV machine (`clk2`)**: deliver one macroblock each, then
  meet in WAIT_SYNC, so luma and chroma stay on the same macroblock. A word
  is read from the buffer when the core's ready input is high, and strobed
  one `clk2` cycle later.
* **Hand-over**: when the Y machine has delivered the whole band and the UV
  machine is waiting, the half is released and the main machine moves on.

Because `clk2` is exactly twice `clk` with aligned edges, pulses are
handed between the domains without synchronisers. This is a design
constraint, not a general clock-domain crossing.

### Stream header (`enc_header_tx`, `exp_golomb`)

Every encoded frame starts with a 22-byte Annex B header:

```
00 00 00 01 | SPS (10 bytes) | 00 00 00 01 | 68 CE 3C 80 (PPS)
```

The SPS has these fields:

* profile_idc 66 (baseline), level_idc 60;
* all ue(0) fields;
* `pic_width_in_mbs_minus1` and `pic_height_in_map_units_minus1` as
  Exp-Golomb codes (`exp_golomb`: `v+1` in binary, led by
  floor(log2(v+1)) zeros);
* frame_mbs_only 1, direct_8x8 1, no cropping, no VUI, stop bit;
* zero padding to 80 bits.

For 64x32, the SPS is `67 42 00 3C F8 8B 20 00 00 00`. The core's bytes
follow through a 64-entry FIFO. The last byte of the frame, marked by
`tobytes_DONE`, carries TLAST. A frame start that arrives while the
previous frame is still draining is remembered.

## Top level (`video_card_top`)

The read stream is broadcast. A beat moves only when the video output is
ready and, while the encoder is enabled, when the encoder is ready too.
Switching the encoder off at run time lets video keep flowing. Ports:

* AXI4-Lite: `mm_axil_*`, `enc_axil_*`.
* Video stream: `s_axis_video_*` in, `m_axis_video_*` out.
* Memory (AXI4, 256-bit data, 64-bit address): `m_axi_s2mm_*`,
  `m_axi_mm2s_*`, `m_axi_enc_*`.
* Encoder core: `core_*`.
* Observation: status, event pulses and state outputs.

Defaults: `DATA_W=256`, `ADDR_W=64`, `BURST_LEN=256`, `FRAMES_DELAY=1`,
`MAX_W=8192`.

## Where this RTL departs from the original design or fills gaps

* **Burst size and 4 KiB:** A 256-beat burst of 32-byte words spans 8 KiB
  and breaks the AXI rule against crossing 4 KiB boundaries. The memory
  controller must accept this, or `BURST_LEN` must be set to 128.
* **Sustained input rate:** each burst costs a few cycles of AXI overhead,
  so input on every single cycle eventually overflows the two buffers. The
  8k60 rate uses 88.5% of the cycles at 300 MHz, which the double buffer
  absorbs. This holds as long as memory keeps up on average.
* **TUSER:** TUSER is the start-of-frame flag on both the input and the
  output stream (standard AXI4-Stream Video).
* **Chroma lines:** chroma comes from the first line of each pair of lines.
* **Dropped bits:** 10-bit samples are truncated to 8 bits, not rounded.
* **QP:** fixed by a parameter (28), because the register map has no QP
  register.
* **SPS:** level_idc is 60 and there is no VUI, so the frame-rate register
  is not used.
* **Encoded frame size:** an encoded frame larger than its slot (raw size /
  16) is not detected.
* **Register map:** offsets, control bits and status bits follow the
  original core. Sizes written while video flows take effect only on a
  restart, as in the original.
* **Frame sizes:** not adjusted automatically. Widths and heights that are
  not multiples of 16 are the user's responsibility.
* **Block RAM:** the Memory Manager's two double buffers come to 8 BRAM36,
  matching the original implementation. The encoder band buffers need about
  86-96 BRAM36 depending on banking, against 89 reported for the original
  wrapper.

## Simulation

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The behavioural models
in `tb/` stand in for the external parts:

* `axi_mem_model`: AXI4 memory with random stalls;
* `h264_core_model`: an encoder core with random ready, recording the
  words it receives and producing bytes.

Each module is found by file name, so one command per testbench works with
plain Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vc_pkg.sv tb/tb_video_card_top.sv --top-module tb_video_card_top -Mdir obj
./obj/Vtb_video_card_top +verilator+seed+1 +verilator+rand+reset+2
```

Replace `tb_video_card_top` by any other testbench:

| Testbench | What it checks |
|---|---|
| `tb_exp_golomb` | code words and lengths across the 16-bit range |
| `tb_enc_mb_addr` | macroblock order for several widths, up to 8192 |
| `tb_mm_config`, `tb_enc_config` | register access, restart pulses, shadowed configuration |
| `tb_mm_burst_writer` | commits, frame flush, held buffer and overflow, halt, burst timing |
| `tb_mm_raw_write` | frame placement, rotation, each error, rectification, halt |
| `tb_mm_raw_read` | frame delay, TUSER/TLAST, data, throughput |
| `tb_mm_enc_write` | byte packing, slots, rotation, last-frame address |
| `tb_enc_acquisition` | 4:2:0 conversion and macroblock order at 64x32, `clk2` cycle count |
| `tb_enc_header_tx` | headers from 640x480 to 8192x4320, TLAST, overflow |
| `tb_memory_manager`, `tb_h264_encoder` | the two cores end to end |
| `tb_video_card_top` | the whole card at its default parameters |

The block testbenches use smaller widths and bursts where that keeps them
short. `tb_video_card_top` runs the top with every default (256-bit data,
256-beat bursts, 8192-pixel encoder buffers), streaming 128x32 frames. It
covers normal streaming and encoding, input at the 8k60 duty cycle (read
out at one beat per cycle, checked by cycle count), back-pressure from the output and
from the encoder, the encoder switched off, every frame error,
rectification, memory congestion, halt and restart. It fails if any of
these never happened. The largest frame simulated end to end is 128x32.
Full 8k frames are covered only by the arithmetic above and by the header
and addressing tests at 8192x4320.
