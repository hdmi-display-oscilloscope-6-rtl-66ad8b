# HDMI display oscilloscope: FPGA logic

A two-channel digital oscilloscope that samples at 100 MS/s and draws its screen on a
1366x768 HDMI monitor or projector instead of a small built-in panel. This repository holds
the synthesizable SystemVerilog of its FPGA side: edge triggering and sample capture, the
front-panel settings, a renderer that draws graticule, setting readout and traces, and the
arbiter that double-buffers the picture in external DDR2 memory and streams it to an HDMI
transmitter.

The central idea is in the frame buffer. Every 16-bit memory word is one pixel of the
*whole* video frame, blanking included, and carries its own HSYNC and VSYNC bits plus a
MARKER (valid) bit. The display side just streams words out; it needs no video timing
generator. After it has read a word it writes it back with MARKER cleared, so by the time a
buffer has been shown it is empty, and the renderer only has to write the pixels that are
lit. There is no separate "clear the buffer" pass, which the single external memory could
not afford.

## Block structure

```
                 +----------------------- capture and storage ------------------------+
 adc0_data ----->| adc_fifo --adc0_in--+                                               |
   |   (compare) |                      +--> trigger_module <--> sample_bram (16x128K) |
 adc1_data ----->| adc_fifo --adc1_in--+        ^ trig_en holdoff access rd_addr       |
                 +------------------------------|---------------------|--------------+
                                                |  done, rd_data      |
 user_data ---> display_setting_fsm --settings--> pixel_calc ---------+
 user_sel  ---->     |  trig_lvl/chan/slope ---> trigger_module
 user_pos  ---->     +--> dac_data, load_dac_n, atten_en, ac_couple (analog front end)
                                                  | wr_valid/addr/data   ^ new_frame, wr_ready
                                                  v                      |
                                         memory_coordinator <--> DDR2 controller (external)
                                                  |
                                                  +--> R,G,B (4 bits), HSYNC, VSYNC, pix_ce
                                                       to the HDMI serializer (external)
```

| Module | Role |
|---|---|
| `scope_pkg` | frame-buffer word type `fb_word_t`, colours, default video timing, range / timebase tables, 3x5 hex font |
| `adc_fifo` | per-channel sample delay line of `DEPTH` samples |
| `trigger_module` | edge detector, record writer, owner of the sample memory port |
| `sample_bram` | 131072 x 16-bit record memory, `{ch1, ch0}` per word |
| `display_setting_fsm` | front-panel settings, attenuator and reference-DAC control |
| `pixel_calc` | draws a frame into the back buffer; paces the trigger |
| `memory_coordinator` | time-slots the frame-buffer memory, swaps buffers, produces video |
| `scope_top` | wires the above together |

## The frame buffer and the memory coordinator

**Word format** (`scope_pkg::fb_word_t`):

| bits | 15:12 | 11:8 | 7:4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|
| field | R | G | B | HSYNC | VSYNC | MARKER | unused |

MARKER = 1 means the colour is valid for the frame being shown; with MARKER = 0 the pixel
is shown black. The sync bits are always used, whatever MARKER says.

**Memory map.** The 22-bit address space holds two buffers. Bit 21 selects the buffer, and
inside a buffer word `y*H_TOTAL + x` is pixel (x, y) of the full 1792 x 798 frame (1366 x
768 active). The render pointer reads buffer `render_buf`; the renderer's 21-bit addresses
are always sent to the other buffer, `~render_buf`. When the render pointer reaches the
end of its buffer the two swap and `new_frame` pulses: the buffer just shown, now empty,
becomes the drawing buffer, and the one just drawn is shown.

**Slot schedule.** The memory can do only one thing at a time, so every pixel period is
`SLOTS` = 4 clocks of the memory port:

| slot | access |
|---|---|
| 0 | read the word under the render pointer |
| 1 | write back the word shown in the previous period, with colour and MARKER cleared |
| 2, 3 | one renderer write each, if one is waiting (`wr_ready` is high in these slots) |

Read data must return within `RD_LAT` clocks (1..SLOTS-2; default 2). At the last slot
the word is registered onto the video outputs and `pix_ce` pulses. So the pixel rate is
`clk / SLOTS`; with a 342 MT/s memory port (a DDR2 interface clocked at 171 MHz, twice
the 85.5 MHz pixel clock of the 1366x768 mode) that is the required 85.5 MHz.

**Start-up.** Memory contents are undefined at power-up, but the sync bits have to be in
memory before any video can be shown. After reset the coordinator therefore first writes
every word of both buffers once (one word per clock, 2 x 1,430,016 clocks at full size)
with the sync bits the timing puts there and MARKER clear. Only then does refresh start
and `new_frame` pulse for the first time.

**Timing of `new_frame`.** It rises the clock after the read of the last word of a
buffer is issued. The last word's own invalidation happens one pixel period later, which
is harmless because that word lies in vertical blanking and the renderer never draws there.

## Trigger and capture

Each ADC channel feeds an `adc_fifo`, which always holds the last `DEPTH` samples. The
trigger compares the newest sample of the selected channel (the FIFO input) with the
oldest (the FIFO output). A rising edge is `oldest < level <= newest`; a falling edge is
`newest < level <= oldest`. Because the two samples are `DEPTH` sample periods apart,
noise riding on a slow signal near the level does not trigger twice in a row, which keeps
the display from jittering.

`trigger_module` has four states:

| state | meaning | `done` |
|---|---|---|
| IDLE | not armed (`trig_en` low) | 1 once any record has been completed |
| ARMED | waiting for an edge | 0 |
| CAPTURE | writing the record | 0 |
| FULL | record complete, still armed | 1 |

An edge seen in ARMED with `holdoff` and `access` low starts a record. The FIFO outputs
`{adc1_in, adc0_in}` are written to addresses 0 .. `REC_LEN`-1, one per clock, starting
in the trigger clock itself. So sample `DEPTH` of the record is the trigger point, and the
record includes `DEPTH` samples from before it. A capture always runs to the end, even if
`trig_en` drops. `done` therefore means "the memory holds a whole record and no capture
can start": that is the condition for the reader to raise `access`, after which the
memory address is `rd_addr` and `rd_data` follows one clock later. Raising `access` during
CAPTURE is a protocol error, and an assertion in `trigger_module` checks for it.

## Drawing a frame and pacing the trigger

`pixel_calc` waits for `new_frame`, then:

1. draws the graticule: 11 vertical and 9 horizontal lines bounding 10 x 8 divisions of
   `DIV_W` x `DIV_H` = 128 x 64 pixels, top-left corner (`X0`, `Y0`) = (43, 160);
2. draws three hex digits at (`TEXT_X`, `TEXT_Y`): the V/div, T/div and holdoff indexes,
   in a 3x5 font magnified `TEXT_SCALE` = 4 times;
3. if a record is available, raises `access` and, for each of the 1280 plot columns x,
   reads record word `min(x * decimation, REC_LEN-1)`. It maps each channel's sample s to
   row `Y0 + (255-s)*PLOT_H/256` (255 at the top). That row is moved up by the channel's
   display offset times `DIV_H/2` rows and clipped to the plot area. It then draws a
   vertical run from the previous column's row to this one, so steep edges stay joined.
   Channel 0 is yellow and channel 1 cyan.

Only lit pixels are written; everything else shows black because the buffer was
invalidated while it was last displayed. Writes go out through a valid/ready port, one
word per accepted transfer, and wait while the coordinator is in its read and write-back
slots.

Trigger pacing makes sure that at most one capture is used per displayed frame:

* **Run mode.** At `new_frame`, `trig_en` drops. The renderer waits (up to
  `REC_LEN`+16 clocks) for `done`, which lets a running capture finish. It then draws the
  traces (or none, if no record has ever been taken), raises `trig_en` again and holds
  `holdoff` high for `t_holdoff * HOLDOFF_UNIT` clocks (1024 clocks = 10.24 us per step
  at 100 MHz). While `holdoff` is high, edges are ignored. Between two frames the trigger
  therefore takes at most one record, and the waveform shown is the latest one.
* **Single mode.** Entering single mode disarms the trigger and arms it once. The first
  frame that finds that capture complete draws it and leaves `trig_en` low. Later frames
  redraw the same record until single mode is left and entered again.

## Front panel and analog control

`display_setting_fsm` takes `user_data[9:0]`:

| bit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| function | trig up | trig down | holdoff up | holdoff down | V/div up | V/div down | T/div up | T/div down | AC/DC switch (level, 1 = AC) | single shot |

Buttons act on rising edges and must already be debounced. `user_sel` = {slope (1 =
falling), channel} selects the trigger source. `user_pos[3:0]` holds four more buttons
for the channel display offsets: channel 0 up/down (bits 0/1) and channel 1 up/down
(bits 2/3). Settings saturate at the ends of their ranges:

* trigger level: 0..255 in steps of 4, reset value 128;
* holdoff index: 0..15;
* timebase index 0..6, meaning 1, 2, 5, 10, 20, 50, 100 samples per column. At 100 MS/s
  and 128 columns per division that is 1.28 us to 128 us per division;
* full-scale range index 0..9: 0.1, 0.2, 0.5, 1, 2, 5, 10, 20, 50, 100 V (reset: 1 V);
* display offset per channel: -8..+7 steps of half a division (32 rows), reset 0.

The probe divides by 10 and the preamplifier gains 10, so the ADC sees the input at unit
gain, or divided by 50 when the attenuator is in. The FSM switches the attenuator in
(`atten_en`) for ranges of 5 V and up. It sets the reference DAC so that the ADC span
equals the range (or range/50): `dac_data = round(255 * span / 2.0 V)`. One DAC drives
both the ADC reference and, through a -0.5 scaler, the offset that centres the signal in
the ADC range, so one code sets both. After reset and after every range change the FSM
passes through its LOAD state, holding `load_dac_n` low for `LOAD_CYCLES` clocks with
`dac_data` stable. V/div presses during LOAD are ignored.

Because the analog side does the vertical scaling, an ADC code always maps to the same
screen row. V/div only changes the readout and the analog settings.

## Outside this RTL

* **Analog front end**: probe, input filter, AC/DC relay, JFET buffer, 1:1/1:50
  attenuator, x10 preamplifier, anti-aliasing filter, offset generator, two 100 MS/s 8-bit
  ADCs, precision DAC with current buffer and reference scalers. Its digital lines are
  ports of `scope_top`.
* **ADC clock generation and forwarding** (a 100 MHz clock out to the ADCs and back).
* **DDR2 memory controller** core. `scope_top` has a simple user port instead: one access
  per clock (`mem_en`, `mem_we`, `mem_addr`, `mem_wdata`) with read data on `mem_rdata`
  exactly `MEM_RD_LAT` clocks later. A real controller has variable latency and would
  need a small read FIFO and request back-pressure in `memory_coordinator`.
* **HDMI serializer** core. It takes `vid_r/g/b`, `vid_hsync`, `vid_vsync` and the pixel
  strobe `pix_ce`.

## Departures and design choices

* **One clock.** The intended hardware has a 100 MHz ADC clock, an 85.5 MHz pixel clock
  and a 171 MHz memory clock. Here everything runs on `clk`, and the ADC is expected to
  deliver one sample per `clk`. A board build needs clock-domain crossings: around the
  sample memory (or a dual-clock memory), on `trig_en`/`holdoff`/`done`/`access`, and
  between the memory-side coordinator and the pixel-clock video.
* Trigger channel and slope come in on `user_sel`, and the display-offset buttons on
  `user_pos`. Both are outside the 10-bit front-panel word, which has no lines for them.
* The FIFO depth (16), the record length (the whole memory), the frame layout on screen,
  the readout format, the range and timebase tables, the DAC scaling, the holdoff unit,
  the slot schedule, the start-up initialisation and the renderer's valid/ready write port
  are choices of this implementation.
* The video timing around 1366x768 (front porch / sync / back porch 70/143/213 and
  3/3/24, positive syncs, 85.5 MHz) is the usual one for this mode.

## Parameters

Defaults are the full-size design. The testbenches shrink the screen and the record to
keep simulation short.

| `scope_top` parameter | default | meaning |
|---|---|---|
| `H_ACTIVE, H_FP, H_SYNC, H_BP` | 1366, 70, 143, 213 | horizontal timing (pixels) |
| `V_ACTIVE, V_FP, V_SYNC, V_BP` | 768, 3, 3, 24 | vertical timing (lines) |
| `X0, Y0, DIV_W, DIV_H` | 43, 160, 128, 64 | plot-area origin and division size |
| `TEXT_X, TEXT_Y, TEXT_SCALE` | 43, 40, 4 | readout position and magnification |
| `FIFO_DEPTH` | 16 | trigger comparison span in samples |
| `SAMPLE_AW, REC_LEN` | 17, 131072 | record memory address width and length |
| `HOLDOFF_UNIT` | 1024 | clocks per holdoff step |
| `LOAD_CYCLES` | 4 | length of the DAC load strobe |
| `FB_AW` | 22 | frame-buffer address width (bit FB_AW-1 picks the buffer) |
| `SLOTS, MEM_RD_LAT` | 4, 2 | memory clocks per pixel, memory read latency |

A smaller screen needs `2 * H_TOTAL * V_TOTAL <= 2^FB_AW`, and the plot area and readout
must fit inside the active area. `REC_LEN` must be at least `DIV_W*10` for the fastest
timebase to fill the screen.

## Sizing at the default parameters

* **Frame buffers.** Two full frames take 2 x 1792 x 798 = 2,860,032 words of the
  2^22 = 4,194,304-word address space.
* **Memory bandwidth.** Each pixel needs one refresh read, one write-back and at most two
  drawing writes: four accesses, which is the two transfers per clock of a DDR2 port at
  twice the pixel clock.
* **Drawing time.** A frame has 1,430,016 pixel periods, so 2,860,032 write slots and
  5,720,064 clocks. The graticule takes about 18,900 writes and the readout 720; the
  traces take one or more per column and channel over 1280 columns. The worst-case wait
  for a running capture is `REC_LEN`+16 = 131,088 clocks. All of this fits in one frame
  with a wide margin.
* **Record length.** 131,072 samples at 100 MS/s is 1.31 ms. The slowest timebase reads
  1280 x 100 = 128,000 samples, which is within the record.
* **Input ranges.** The ten ranges from 0.1 V to 100 V need ADC spans of 0.1 V to 2 V
  (range, or range/50 with the attenuator). That gives DAC codes from 13 to 255.

## Simulation

All files are plain SystemVerilog-2017. `rtl/scope_pkg.sv` must be read first. For
example, with Verilator 5:

```
verilator --binary --timing --assert --top-module scope_top_tb \
    -y rtl -y tb +libext+.sv rtl/scope_pkg.sv tb/scope_top_tb.sv
./obj_dir/Vscope_top_tb
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each also has a watchdog
that counts a failure if the simulation hangs.

| testbench | what it checks |
|---|---|
| `adc_fifo_tb` | random samples come out exactly `DEPTH` clocks later |
| `sample_bram_tb` | random writes and read-back over the full 131072 words; read-first |
| `trigger_module_tb` | no trigger when disarmed, held off or during access; first crossing after release on both slopes and channels; record contents; `done` exactly `REC_LEN` clocks after the trigger; a capture finishes after disarm |
| `display_setting_fsm_tb` | every setting against its range, saturation, DAC code and attenuator for all ten ranges, `load_dac_n` pulse length, coupling, single-shot toggle, display offsets with saturation |
| `pixel_calc_tb` | whole drawn image against a reference image for several timebases (including the clamp at the end of the record), holdoff length, access use, the no-record timeout, the single-shot sequence, display offsets with clipping at both edges, under random write back-pressure |
| `memory_coordinator_tb` | initialisation contents, pixel period, sync positions, pixels drawn in frame j shown in frame j+1 only, a shown buffer coming back black |
| `scope_top_tb` | end to end at reduced size: video captured frame by frame. Every trace column is checked against the testbench's own samples at the observed trigger time. Each mechanism is counted and must occur: no-record timeout, rising/ch0 and falling/ch1 triggers, holdoff, access hand-over, buffer swaps, invalidation, back-pressure, DAC loads, attenuator switching, frames with display offsets, single-shot hold |
| `scope_top_full_tb` | the default-size top (1366x768, 131072-sample records) through initialisation, capture and display of one record. About 20 million clocks, roughly 20 s in Verilator |

`tb/ddr2_model.sv` is a behavioural memory with the same one-access-per-clock,
fixed-latency port as `scope_top`.

## How far to trust it

Every module has been linted with Verilator `-Wall` and elaborated with a second
SystemVerilog front end. Every testbench above passes, and for each module a deliberately
broken copy was confirmed to fail its testbench. What has not been exercised: real DDR2
timing, real ADC data, timing closure at 171 MHz, and anything involving more than one
clock.
