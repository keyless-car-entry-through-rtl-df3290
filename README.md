# Keyless car entry by face recognition: RTL

A camera watches the driver's door against a plain black background. Anything
that is not black is something in front of the camera. Pixels whose colour
lies in a skin-tone window are taken as the face. The design saves the face
pixels of one video frame to an external SRAM and compares them, pixel by
pixel, with a face enrolled earlier. If they are the same, a GPIO pin goes
to 1 and the lock motor's driver opens the car.

There is no feature extraction and no classifier. Recognition is a direct
pixel comparison, so it only works when the person shows the same pose and
lighting as at enrolment. The hardware is a video pipeline from an NTSC
camera to a VGA monitor. A detector sits in the RGB stream just before the
VGA output, and a small state machine uses the SRAM as its database.

The system follows the article "Keyless Car Entry through Face Recognition
Using FPGA" (M. Amani, K. Mangarao, N.S.N. Subrahmanyam, International
Journal of Advanced Research, 2014). That article gives the architecture and
the colour thresholds. The section "Choices this design makes" lists what
was filled in here.

## Data path

```
 TV decoder chip (ITU-R 656 bytes, 27 MHz)          VGA clock domain (25 MHz)
   │                                              ┌──────────────────────────────┐
   ▼                                              │ vga_timing ─► raster x,y     │
 itu656_decoder ─► downsampler_720_640 ─► frame_buffer ─► yuv422_to_444 ─► ycbcr2rgb
                                          (640x480x16,       │                   │
 i2c_av_config ─► decoder set-up           two clocks)       │                   ▼
                                                              │             face_detect ─► VGA DAC
                                                              │                   │ (face pixels white)
                                                              │                   ▼
                                                              │           face_recognizer ─► lock_gpio
                                                              │                   │
                                                              │               sram_ctrl ─► SRAM pins
```

| module | what it does | latency |
|---|---|---|
| `itu656_decoder` | finds `FF 00 00 XY` timing codes and emits `{Y, Cb or Cr}` words with column, line in field and field bit | 1 clock, one word every 2 clocks |
| `downsampler_720_640` | keeps 8 of every 9 Cb/Cr pairs: 720 → 640 samples per line | 1 clock |
| `frame_buffer` | dual-clock RAM that weaves the two fields into a 640 × 480 frame (field line *l* of field *f* goes to row 2*l*+*f*) | read data 1 clock after `rd_en` |
| `yuv422_to_444` | gives each pixel of a pair the pair's Cb and Cr (chroma is repeated, not interpolated) | 2 clocks |
| `ycbcr2rgb` | BT.601 to 10-bit RGB in fixed point | 2 clocks |
| `face_detect` | classifies background and face pixels, masks the face white, reports the first face pixel and whether the frame had a face | 1 clock |
| `vga_timing` | 640 × 480 at 60 Hz raster, active-low syncs | combinational from the counters |
| `face_recognizer` | capture, compare and lock state machine | see below |
| `sram_ctrl` | one asynchronous-SRAM access per clock | read data 2 clocks after the request |
| `i2c_av_config` | sends a register table to the decoder chip over I2C after reset | about 30 SCL periods per register |
| `face_lock_top` | wires everything together; delays the syncs by the 6-clock display pipeline | |

Shared types are in `face_pkg`: `yc422_t` (the 4:2:2 word), `ycbcr_t`,
`rgb10_t`, and `pack565()`, which turns a 10-bit RGB pixel into the 16-bit
word stored in SRAM.

## Colour thresholds

The thresholds were measured on the prototype, not derived, and they are
parameters of `face_detect`:

* **Background:** all three 10-bit channels below `BG_MAX` = 200. This is
  black measured at up to 50 in 8-bit units, times 4 for the 10-bit path.
* **Face:** all three channels strictly between `FACE_LO` = 300 and
  `FACE_HI` = 450, in 10-bit units.

A pixel that is neither is counted as neither: it disturbs the background
but is not stored. `face_detect` reports per frame whether any pixel was
not background (`disturbed`, brought out as `scene_disturbed`). Only a
face-range pixel starts a capture. The limits are applied to each channel separately. This
is one reading of the measurements, which give a single "RGB" range. A
scene with a different camera or lighting needs new limits.

`ycbcr2rgb` computes

```
R = 1.164 (Y-16) + 1.596 (Cr-128)
G = 1.164 (Y-16) - 0.813 (Cr-128) - 0.392 (Cb-128)
B = 1.164 (Y-16) + 2.017 (Cb-128)
```

with coefficients ×256 (298, 409, 208, 100, 516). It divides by 64 with
rounding, so the result is the 8-bit value ×4, and clips to 0..1023. Within
rounding, a neutral gray with Y = 96 comes out as 373 on every channel,
inside the face window. Y = 16 comes out as 0.

## The recognizer (`face_recognizer`)

This is the least obvious part. The 256K × 16 SRAM is split into two
regions of `REGION` = 131,072 words:

* The **database** at `DB_BASE` = 0 holds the enrolled face. A host writes
  it through `host_we / host_addr / host_data` and gives its pixel count on
  `db_count`. Host writes are accepted only while `host_ready` is high
  (states WATCH and UNLOCKED).
* The **capture** region at `CAP_BASE` = 131,072 receives the live face.

One word is one face pixel in RGB 5-6-5. Pixels are stored one per address
in scan order: row by row, left to right. Only face pixels are stored, so
the *i*-th word is the *i*-th face pixel met in the raster.

States:

1. **WATCH.** A frame ends (`frame_end`) in which at least one face pixel
   appeared (`face_seen`).
2. **CAPTURE.** For the whole next frame, every face pixel is written to
   `CAP_BASE + n`, one write per pixel clock. Beyond `REGION` pixels,
   `overflow` is set and writing stops.
3. **CHECK.** The capture is rejected at once if it overflowed, is empty, or
   its count differs from `db_count`.
4. **Compare** (RD_CAP, RD_DB, WAIT, CMP). For each *i*, the block reads
   the captured word and the enrolled word and counts a mismatch if any
   channel differs by more than `TOL`. This takes 4 clocks per pixel.
5. **Result.** `result_valid` pulses with `match`, `cap_count` and
   `mismatches`. On a match (at most `MAX_MISMATCH` differences), the state
   goes to UNLOCKED and `lock_gpio` = 1. Otherwise it goes back to WATCH, and
   the next frame with a face starts another attempt.
6. **UNLOCKED.** `lock_gpio` stays 1 until `relock`.

The defaults `TOL` = 0 and `MAX_MISMATCH` = 0 implement "the same" literally.
With real video, enrolment and recognition must then give identical
pixels. Raising the two parameters is the obvious knob.

Timing: the compare time is 4·*n* + 2 clocks for *n* face pixels. At the
largest region (131,072 pixels) this is about 1.25 VGA frames. Frames that
arrive while the block compares are ignored.

## Clocks, reset and the frame buffer

The decoder side runs on the decoder's 27 MHz clock and the display side on
the VGA pixel clock. They share only `frame_buffer`, whose write and read
ports have their own clocks. There is no handshake between the two sides:
the display reads whatever the buffer holds. A change in the scene can
therefore show up as one torn frame. The recognizer then rejects that
frame and tries again on the next one.

`rst_n` is an active-low asynchronous reset for both domains. Synchronise
its release to each clock on a real board.

The frame buffer is 640 × 480 × 16 bits, about 4.9 Mbit. That is more than
the on-chip RAM of the Cyclone II 2C35 that the original system used, so on
that device the buffer belongs in the board SDRAM behind an SDRAM
controller. Here it is an inferred RAM with the same role and ports.

## Decoder set-up (`i2c_av_config`)

The decoder chip needs register set-up after power-up. `i2c_av_config`
walks a table of `{device, register, value}` entries (the parameter `REGS`).
It sends each entry as an I2C write with START, three bytes each followed
by an acknowledge clock, and STOP. An entry that is not acknowledged is sent
again. SCL is push-pull; SDA is open drain (`sda_oe` = 1 pulls it low).

The default table (device 0x40, registers 0x00, 0x15, 0x17) is only a
placeholder. Replace it with the set-up list your decoder needs.

## What is not here

* **The bought chips:** the video decoder, the VGA DAC, the SRAM and the
  SDRAM. The top's ports are the FPGA side of their pins. The testbenches
  use a behavioural SRAM (`tb/sram_model.sv`) and a behavioural ITU-R 656
  source (`tb/itu656_source.sv`).
* **The lock motor and its 12 V drive** (boost converter or H-bridge):
  `lock_gpio` is the logic signal that drives them.
* **How the enrolled face reaches the SRAM.** On the original board a PC
  tool converted a photo to raw pixel data and loaded it. Here the host port
  of the recognizer takes that role. The stored format must match
  `pack565()` of the pipeline's own RGB values.
* **The example core's line buffer and line doubler.** The frame buffer's
  field weaving does that job.
* **Mirroring and gray-scale conversion.** The detector needs colour, so
  the image is neither mirrored nor converted to gray.

## Choices this design makes

Beyond the thresholds, the pixel-by-pixel comparison, scan-order storage,
white masking and the GPIO output, these are this design's choices:

* the 8-of-9 pair drop in the downsampler;
* field weaving in the frame buffer;
* chroma repetition in the 4:2:2 to 4:4:4 step;
* BT.601 fixed-point coefficients;
* standard VGA porches and syncs;
* the 5-6-5 storage word;
* the two-region SRAM layout;
* capturing the frame *after* the face first appears;
* the pixel-count check;
* overflow handling;
* the tolerance parameters;
* `relock`;
* the I2C retry.

## Simulating

Every file in `rtl/` is one module or package. Each block has a
self-checking testbench in `tb/`, named `tb_<module>`. Each prints
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_face_lock_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/face_pkg.sv tb/tb_face_lock_top.sv
./obj_dir/Vtb_face_lock_top
```

Use the same command with another `tb_*` name for a single block.
`tb_face_lock_top` runs the whole design at its default sizes. It simulates
about 0.33 s of video (roughly 10 frames) in under ten seconds. It:

1. enrols a gray rectangle (5,600 face pixels after downsampling);
2. shows a brighter rectangle, which is rejected with every pixel different;
3. shows the enrolled one, which opens the lock;
4. checks one whole VGA frame: exactly the face pixels are white and in the
   right place, so the sync delay matches the pipeline;
5. shows a larger face, rejected on its pixel count;
6. shows a face filling the picture, which overflows the capture region;
7. ends with a black scene.

It counts each of these mechanisms and fails if any never happened.

`tb_face_recognizer_tol` runs the recognizer with the tolerances opened
(`TOL` = 1, `MAX_MISMATCH` = 1).

Block testbenches use small sizes where the block has size parameters (for
example an 8 × 4 picture for `face_detect` and 16-word regions for
`face_recognizer`). `tb_vga_timing` and `tb_downsampler_720_640` run at full
size.
