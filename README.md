# FPGA Virtual Lightboard

A lightboard lets a presenter write on a glass pane in front of the camera. This
design removes the glass. The presenter wears a glove with a bright pink
fingertip and palm and "writes" in the air. A camera board finds the fingertip in
every video frame and leaves coloured ink where it has been. It keeps that ink
from frame to frame until the presenter wipes it away with the palm. The
annotated greyscale video and a microphone signal are streamed over a 100 Mb/s
Ethernet cable to a second board, which shows the video on its own monitor and
plays the sound.

Everything is plain synthesizable SystemVerilog for two Artix-7 class FPGA
boards:

* **Transmitter** (`fpga1_top`): an OV7670 camera, a local 1024x768 monitor and
  an Ethernet transmitter.
* **Receiver** (`fpga2_top`): an Ethernet receiver, a 1024x768 monitor and an
  audio output.

`lightboard_top` joins the two boards with a direct wire in place of the PHYs
and cable.

## Data flow

```
 TRANSMITTER (65 MHz video clock | 50 MHz Ethernet/audio clock)

 OV7670 ─► camera ─► recover ─► rgb_to_ycrcb ─► threshold ─► center_of_mass
                      (x,y)        Y, Cr          mask            │ (x,y) once per frame
                        └──────────────┬──────────────┘           ▼
                                       └──────────────────────► compare ◄── sw[2:0]
                                                                  │ write pixel
                                   ┌──────────────────────────────┴──────────┐
                                   ▼                                         ▼
                          frame buffer (VGA)                     frame buffer (Ethernet)
                        port A: read/modify/write                port A: write (65 MHz)
                        port B: display                          port B: read (50 MHz)
                                   │                                         │
            vga ─► mirror ─► (RAM) ─► scale ─► vga_mux ─► monitor 1           ▼
                                                          mic ─► reverse_bit_order ─► eth_packer ─► RMII

 RECEIVER
 RMII ─► ether_rx ─┬─► fcs_check (status)
                   └─► bitorder ─► firewall ─► image_audio_split ─┬─► frame_packaging ─► frame buffer
                                                                  └─► audio_pwm ─► speaker
            vga ─► mirror ─► (RAM) ─► scale ─► vga_mux ─► monitor 2
```

Both boards use a 65 MHz clock for the camera and display. They use a 50 MHz clock
for Ethernet (one RMII dibit per clock, so 100 Mb/s) and for audio. The frame
buffers are the only place where the two clock domains meet. Each buffer is a
dual-clock block RAM.

## Stored pixel format

The frame is 320x240 pixels of 8 bits: 76,800 words, with 17-bit addresses. The
two upper bits say what a pixel is. This lets one byte carry either ink or a
greyscale value that remembers why it was written:

| Pixel      | Meaning                                   | Transmitter monitor | Receiver monitor |
|------------|-------------------------------------------|---------------------|------------------|
| `11000000` | yellow ink                                | yellow              | yellow           |
| `11010000` | pink ink                                  | pink                | pink             |
| `11100000` | green ink                                 | green               | green            |
| `11110000` | red ink                                   | red                 | red              |
| `00yyyyyy` | grey, `y` = Y[9:4]                        | grey                | grey             |
| `10yyyyyy` | grey; the glove colour was seen here      | pink                | grey             |
| `01yyyyyy` | grey; on the crosshair through the centre | green               | grey             |

The transmitter monitor shows the two tags in colour. The presenter can then see
where the camera thinks the glove is. The receiver shows them as plain grey. The
constants and the two enums live in `lb_pkg`.

## Finding the fingertip

* **`camera`** generates the camera clock (clk/4 = 16.25 MHz). It samples the
  camera bus through synchronisers and pairs two bytes into one RGB565 pixel. A
  pixel therefore arrives every 8 cycles of the 65 MHz clock. A rising vsync
  gives `frame_done`.
* **`recover`** counts pixels into a column (0..319) and a row (0..239). It
  restarts at `frame_done`.
* **`rgb_to_ycrcb`** widens the 5/6/5-bit fields to 10 bits and converts them
  with BT.601 coefficients in 8-bit fixed point. Its latency is three cycles.
* **`threshold`** sets `mask` when Cr[9:6] lies in a range given on two 4-bit
  inputs. The pink glove gives Cr[9:6] ≈ 14; grey gives ≈ 8. The tops in the
  testbenches use the range A..F.
* **`center_of_mass`** adds up x, y and a count for every masked pixel. At the
  frame end it divides with two serial 25-bit dividers (`divider`). One cycle
  later it pulses `valid_out` with the mean position, 27 cycles after the frame
  end. A frame without any masked pixel gives no result.

In `fpga1_top` the position and valid signals are delayed by four cycles, so
that they meet the Y value and the mask of the same pixel.

## The pixel manager (`compare`)

This stage makes ink persistent. It is where the design's behaviour is decided.
For every camera pixel it reads the value already stored at that position and
then decides what to write back. It has 8 cycles per pixel and uses them as a
fixed cycle:

| cycle | action |
|-------|--------|
| 0     | `data_valid` seen: latch Y[9:4], mask and position; put the read address `row*320+col` on `pixel_addr` (`pixel_valid` low) |
| 1, 2  | the frame buffer's port A reads; its latency is two cycles |
| 3     | `current_pixel` is valid; decide |
| 4     | `pixel_valid` high for one cycle, same address, new `pixel` |
| 5–7   | idle; back to 0 |

The decision, in priority order:

1. **Erase mode** (`sw[0]=1`) and the glove is seen here: write the
   threshold-tagged grey pixel. This is the only rule that overwrites ink.
2. **Stored pixel is ink** (upper bits `11`): write nothing. Ink survives.
3. **Write mode**, and the pixel lies within ±1 of the last centre of mass (a
   3x3 brush): write ink in the colour selected by `sw[2:1]` (0 yellow,
   1 pink, 2 green, 3 red).
4. The pixel is on the row or column of the centre: crosshair-tagged grey.
5. Mask set: threshold-tagged grey.
6. Otherwise: plain grey.

The centre of mass used for a frame is the one computed at the end of the
previous frame. The ink therefore lags the fingertip by one frame.

Both frame buffers receive the same writes, so they always hold identical
pictures. The VGA copy also provides `current_pixel`.

## Frame buffers and display

`pixel_bram` is a true dual-port RAM with one clock per port and a two-cycle read
latency on both ports. Port A reads the old value before a write. The RAM starts
cleared. It is used three times: two copies on the transmitter and one on the
receiver.

The display chain is the same on both boards (`display_path`):

* **`vga`** generates VESA 1024x768 at 60 Hz timing from 65 MHz: 1344 clocks
  per line and 806 lines, with active-low syncs.
* **`mirror`** maps the screen position to a frame position with factor 5/16.
  The 1024x768 screen covers the 320x240 frame exactly. `mirror` also flips the
  image left to right, so the presenter sees themselves as in a mirror:
  `addr = (v*5>>4)*320 + 319 - (h*5>>4)`.
* **`scale`** passes the pixel inside the 1024x768 window and sends black
  outside it.
* **`vga_mux`** converts the pixel to 12-bit RGB, with the tag colours enabled
  by `SHOW_TAGS`.

The syncs and the blanking are delayed 4 cycles so that they leave together
with the colour. The colour appears 5 cycles after the `vga` counters.

## The Ethernet link

By default one frame line (320 pixels) travels in each packet. The parameter
`PIXELS_PER_PACKET` on the tops sets another size. All packets go to the
broadcast address, so the receiver needs no configuration. Each packet also
carries the frame address of its first pixel, so a lost packet costs only its
own pixels and never shifts the picture.

Packet as sent, in bytes:

```
IPG 12 | preamble 7 | SFD 1 | dest FF:FF:FF:FF:FF:FF 6 | source 6 | length 2 (=324)
       | first-pixel address 3 | 320 pixels | 1 audio byte | FCS 4
```

* With the IPG, a packet is 362 byte times, or 1,448 clocks at 50 MHz. That
  gives 34,530 packets/s.
* At 240 packets per frame, that is 143.9 frames/s, well above the camera's
  30 frames/s.
* 41 of the 362 bytes are overhead: everything except the pixels and the audio
  byte.

The packet size trades frame rate against audio rate. With *P* pixels per
packet, a packet takes 4(*P*+42) clocks and a frame takes 76800/*P* packets.
*P* must divide 76800, and the packet must stay within Ethernet's 64 to 1518
bytes:

| Pixels per packet | Clocks per packet | User data | Frames/s | Audio samples/s |
|------------------:|------------------:|----------:|---------:|----------------:|
| 80   | 488   | 66.4 % | 106.7 | 102,459 |
| 160  | 808   | 79.7 % | 128.9 | 61,881  |
| 320  | 1,448 | 88.7 % | 143.9 | 34,530  |
| 640  | 2,728 | 94.0 % | 152.7 | 18,328  |
| 1280 | 5,288 | 96.9 % | 157.6 | 9,455   |

Bytes go out in order. The address is sent most significant byte first. Within
a byte the least significant dibit goes first, as Ethernet requires.

* **`reverse_bit_order`** is the payload source. It steps through the Ethernet
  copy of the frame, `PIXELS_PER_PACKET` pixels at a time. It always points the RAM at the byte after the
  one being sent. The two-cycle read is then ready when the current byte's
  fourth dibit leaves. It appends the microphone byte after the packet's last pixel. It
  only advances while `stall` is low.
* **`eth_packer`** runs the packet sequence. It holds `stall` high during every
  part of the packet that is not payload. It inserts the address latched from
  `reverse_bit_order`. The CRC-32 runs from the destination address through
  the payload. The FCS is the inverted register, sent bit 31 first.
* **`crc32_dibit`** is a non-reflected CRC-32 register (polynomial 04C11DB7,
  preset to all ones). It takes the bits in wire order, two per clock. Used this
  way it yields the standard Ethernet FCS. The transmitter and the receiver both
  use it.

On the receiver:

* **`ether_rx`** drops the preamble and the SFD.
* **`fcs_check`** runs the same CRC over the whole frame. At the end of the
  frame it compares the register with the CRC-32 residue `C704DD7B` and reports
  `fcs_done`/`fcs_ok`.
* **`bitorder`** turns each byte's dibits into most-significant-first order.
* **`firewall`** accepts the broadcast address or its own address (`MY_MAC`)
  and strips the 14-byte header.
* **`image_audio_split`** counts bytes into address, pixels and audio.
* **`frame_packaging`** writes pixel *n* of a packet to address + *n*.

The FCS result is a status output only. By the time it is known, the pixels of
the packet are already in the frame buffer.

## Audio

The transmitter appends the current 8-bit microphone sample to each packet:
34,530 samples/s, with no buffering. The receiver holds the latest sample. It
plays the sample as 256-clock pulse-width modulation, a 195 kHz carrier, for
the board's filtered audio jack.

## Parameters

| Module | Parameter | Default | Note |
|--------|-----------|---------|------|
| `lightboard_top`, `fpga1_top`, `fpga2_top`, `recover`, `reverse_bit_order` | `FRAME_W`, `FRAME_H` | 320, 240 | smaller values are used for quick tests; addresses stay 17 bits, so no larger |
| `compare` | `FRAME_W` | 320 | row stride of the address |
| `pixel_bram` | `DEPTH`, `WIDTH` | 76800, 8 | |
| `lightboard_top`, `fpga1_top`, `fpga2_top`, `reverse_bit_order` | `PIXELS_PER_PACKET` | `FRAME_W` | must divide `FRAME_W*FRAME_H`; 42 to 1496 |
| `image_audio_split` | `PIXELS` | 320 | `fpga2_top` passes `PIXELS_PER_PACKET` |
| `eth_packer` | `PAYLOAD_BYTES`, `IPG_BYTES`, `SRC_MAC` | 321, 12, 02:00:00:00:00:01 | `fpga1_top` sets `PAYLOAD_BYTES = PIXELS_PER_PACKET+1` |
| `firewall` | `MY_MAC` | 02:00:00:00:00:02 | broadcast is always accepted |
| `vga_mux` | `SHOW_TAGS` | 1 | 0 on the receiver |
| `vga` | porches and sync widths | VESA 1024x768@60 | |

The display side (`vga`, `mirror`, `scale`) is fixed to a 1024x768 screen and a
320-wide frame.

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps --assert -Irtl -y rtl +libext+.sv \
          --top-module tb_lightboard_top rtl/lb_pkg.sv tb/tb_lightboard_top.sv -o sim
obj_dir/sim
```

`tb_lightboard_top` runs the whole system at its full size, with no parameter
overrides:

* A camera model streams five 320x240 frames: the fingertip is found, inked,
  moved, inked again and wiped in erase mode.
* The link then carries the complete frame. The receiver's frame buffer must
  equal the transmitter's, with every packet passing its FCS.
* The test runs a full monitor frame on both boards. Red ink must show on both
  monitors, and the pink tag only on the transmitter.
* It counts every mechanism and fails if one never occurred: centre-of-mass
  results, ink writes, ink kept, erase wipes, crosshair and threshold tags,
  stall cycles, packets, firewall passes, audio samples and monitor frames.

It takes about 5 seconds.

`tb_fpga1_top` decodes the transmitter's packets at a 32x24 frame. It checks
size, period (296 clocks), FCS, address, line content and audio byte.
`tb_fpga2_top` feeds hand-built frames into the receiver: broadcast ones, one
for its own address, one corrupted and one for another station. It compares
every pixel of the frame buffer with a model and measures the PWM duty cycle.

`tb_packet_sizes` runs five full-size systems side by side, with 80, 160, 320,
640 and 1280 pixels per packet. Each sends a test frame across the link. The
receiver's copy must match, and the measured packet period must reproduce the
table above. It takes about 12 seconds.

## Choices made in this design, and limits

The overall structure, the pixel encoding, the 8-cycle pixel manager and its
rules, the 5/16 mirrored display, the packet layout and timing, and the one
audio byte per packet are the system's specification. The following are
choices made here:

* **Threshold range.** It is supplied on input pins; no fixed range is defined.
* **Inputs of `compare`.** It has two inputs beyond the basic list: the mask,
  needed for the threshold tag and for erasing, and a per-pixel `data_valid`.
* **Crosshair and priorities.** The crosshair shape (centre row and column) and
  the priority between tags are choices made here.
* **Switches.** Switch 0 = write; the colour order is yellow, pink, green, red.
* **Colour values.** The RGB values of the four inks and the two tag colours
  are choices made here.
* **Address width.** Frame addresses are 17 bits wide, because 320x240 does not
  fit in 16.
* **Packet fields.** The length field holds 324 and the source MAC is a
  locally administered placeholder.
* **Receiver and FCS.** The receiver stores packets before their FCS is known,
  and uses the check only as a status signal.
* **Audio output.** It is PWM.
* **Reset and clocks.** There is a single synchronous active-high reset, held
  for several cycles of both clocks. In `lightboard_top` both boards share
  their clocks.
* **Outside the RTL.** Clock generation (a PLL from 100 MHz), the
  microphone's analog-to-digital conversion, the Ethernet PHYs and the camera
  sensor are not part of the RTL. The tops take 65 MHz and 50 MHz clocks and an
  8-bit microphone sample as inputs, and the RMII signals as ports.
* **Alternatives not built.** These were considered for the system but not
  built: 12-bit colour pixels, higher resolutions, a single
  shared transmitter frame buffer, address-only checksums and an audio FIR
  filter.
