# Dual-frequency structured-light scanner on one FPGA

This design measures 3-D shape with phase-measuring profilometry. A video
projector lights the object with eight phase-shifted patterns. Each pattern
is the sum of two cosines along the vertical axis:

- one period over the whole screen (the *unit* frequency);
- sixteen periods over the screen (the *high* frequency).

A camera takes one frame per pattern. For every camera pixel the eight
samples go through a reduced 8-point DFT:

- bin 1 gives the coarse but unambiguous unit-frequency phase;
- bin 2 gives the fine high-frequency phase, which wraps 16 times.

Unwrapping the fine phase with the coarse one gives a precise absolute phase.
That phase tells which projector row lit the pixel, and from that the depth
follows by triangulation. The bin-1 magnitude measures how much pattern
contrast the pixel saw. Pixels below a threshold (shadows, dark surfaces) are
set to 0.0. The design stores two floats per pixel, the phase and the
magnitude.

Everything between the video DAC, the image sensor, the SDRAM and the PC
link is here as synthesizable SystemVerilog:

- pattern generation and the camera trigger;
- sensor configuration and capture;
- page transfers to and from the SDRAM;
- the phase calculation, which runs two pixels per clock at 100 MHz.

The SDRAM command controller, the USB interface, the clock manager and the
external chips are outside the design. Their signals are top-level ports.

```
 vga_clk (40 MHz)          cam_pclk                 clk (100 MHz)                     host_clk
 ┌─────────────┐        ┌────────────┐   ┌──────────────────────────────────┐
 │ vga_pattern │──sync─▶│ cam_capture│──▶│ async_fifo ─▶ sdram_xfer_ctrl ◀─▶ SDRAM page port
 │  vga_sync   │trigger │            │   │ acq_ctrl        ▲   │    ▲       │
 │  sine_rom   │──────▶ sensor ──────┘   │ cam_config ─ two-wire ─▶ sensor │
 │  gamma_lut  │                         │                 │   ▼    │       │
 └─────────────┘                         │ phase_ctrl: frame_fifo_bank      │
                                         │   2 × phase_pipeline ─▶ result_fifo
                                         │ async_fifo (PC in / PC out) ◀────┼──▶ PC
                                         └──────────────────────────────────┘
```

## Operation

1. The host loads a gamma table, if it needs one. After reset the sensor
   registers are written over the two-wire bus (`cam_cfg_done`).
2. `cmd_capture` pulses. Capture waits until the projector starts pattern 0,
   then stores `NFRAMES` = 8 camera frames from row `frame_base_row` on.
   Each frame starts on a fresh page (see *Camera path*). `capture_done`
   pulses at the end.
3. `cmd_phase` pulses. The phase calculation reads the eight frames page by
   page and writes two IEEE-754 singles per pixel (phase and magnitude) from
   row `result_base_row` on. `phase_done` pulses at the end.
4. The host reads result pages through the PC-output FIFO (`hout_req`). It
   may write pages of its own through the PC-input FIFO at any time.

## Phase calculation (the hard part)

`phase_ctrl` handles one SDRAM page position `p` at a time. It:

- reads page `p` of each of the eight frames into the eight 512x16
  buffers of `frame_fifo_bank`;
- waits until `result_fifo` has room for a page of results;
- reads all eight buffers together.

Every 16-bit word holds two 8-bit pixels, so two identical
`phase_pipeline` lanes run side by side. Lane 0 takes the low byte, which is
the first pixel in the row.

Each lane has a total latency of **51 clocks**, made up of these stages:

| stage | block | clocks | what it does |
|---|---|---|---|
| DFT | `fft8` | 6 | radix-2 butterflies for bins 1 and 2 only. The twiddle is cos(π/4) = 0x5A82 (Q15), with products kept to 6 fraction bits, so bin 1 is Q10.6 and bin 2 is an integer. |
| arctangent | 2 × `cordic_atan` | 35 | unrolled vectoring CORDIC: 32 micro-rotations with 24 guard bits, after a coarse quadrant rotation. Output in Q3.29 radians, range [−π, π]. |
| unwrap | `phase_unwrap` | 4 | see below |
| float | `fix2float` | 6 | unsigned Q3.29 to IEEE single, rounded to nearest even |

Next to the arctangent, `mag_threshold` estimates |X(1)| as
max(|Re|,|Im|) + min(|Re|,|Im|)/2. It compares the estimate with `threshold`,
which is in units of 1/64, like X(1). The keep/zero flag waits in a
first-word-fall-through FIFO (`fwft_fifo`) until the matching phase comes
out of the unwrap stage. If the flag says zero, the phase is forced to 0
before the float conversion.

**Unwrapping without division.** Both phases are first moved into
[0, 2π). The period number is

    k = round((FH·φu − φh) / 2π)

This is found without a divider:

1. FH·φu comes from a shift (FH = 16).
2. The difference is compared against a table of odd multiples of π.
3. A value at or above (2j+1)π rounds up to period j+1, so ties round up.

The result is (φh + 2πk)/FH. k is taken modulo FH so that the result stays
in [0, 2π).

**Sign convention.** The design computes atan2(Im X, Re X). The projector
shows I_n(y) = A + B·cos(2πy/H − 2πn/N) + C·cos(2π·16y/H − 4πn/N). For
projector row y the result is therefore 2π − 2πy/H (0 for y = 0). The
end-to-end test checks this geometry on every pixel, and the full-size run
matches it within 0.002 rad. The textbook formula for the phase is written
with the opposite sign. Only the direction of the phase axis differs.

**Timing per page.** One page takes PAGE + 52 = 564 clocks from the first
buffer read to the last result: one clock of buffer read latency, then 511
more words, then the 51-clock pipeline. A budget of 512 + 51 = 563 counts
the pipeline alone. A whole phase image also needs the eight page reads and
the eight result-page writes for each page, since each input word yields
four 32-bit results. With all transfers included, a full 353-page image
takes 2.97 million clocks, about 8400 per page or 29.7 ms at 100 MHz.
Capturing the eight frames takes 133 ms.

**Result layout.** Input page `p` (512 words, 1024 pixels) gives eight
result pages, from row `result_base_row + 8p` on. Within them, the phase of
pixel `j` starts at word `8·(j/2) + 4·(j%2)`, low half first, and its
magnitude follows in the next two words. `result_fifo` takes both lanes'
four floats (128 bits) per clock and hands them out as 16-bit words.

**Magnitude.** The bin-1 estimate max + min/2 is stored as a float in units
of the 8-bit samples (a pure pattern of amplitude B gives about 4B). It is
stored for every pixel, including those whose phase is zeroed. It rides in
the same FIFO entry as the keep flag, and a second float converter turns it
into a float in step with the phase.

**Float edge case.** A phase a few LSBs below 2π can round up to the single
value 2π (0x40C90FDB). It then means the same row as 0.

## Projector path (`vga_clk`)

`vga_sync` produces 800x600 at 60 Hz from a 40 MHz clock:

- horizontal 800/40/128/88 (active, front porch, sync, back porch);
- vertical 600/1/4/23;
- active-high syncs.

Reset puts the counters in the vertical front porch, so a full VSYNC comes
before the first frame.

`vga_pattern` reads one cosine period, stored in `sine_rom` as
600 × round(64 + 60·cos(2πi/600)), through two pointers:

- the unit pointer advances by 1 per line;
- the high pointer advances by 16 per line;
- both wrap at 600.

For pattern n the pointers start at offsets 600 − 600n/8 and
600 − 2·600n/8. The second offset shifts the high cosine by 2n/8 of its own
period. This is the 4πn/N term above. The two table values are added
(at most 248) and sent through the writable `gamma_lut`, which starts as the
identity. The result goes out as grey on all three colours.

The pattern advances each frame. The pointers reload at the end of the last
visible line, which gives the four-stage colour pipeline time to start the
next frame cleanly.

`proj_sync` is high while pattern `SYNC_PATTERN` (0) is on screen.
`cam_trigger` is a pulse `TRIG_WIDTH` = 64 clocks wide that starts
`TRIG_DELAY` = 4000 pixel clocks after VSYNC. The delay is a setting to tune
for each projector and camera pair. The default is a choice, not a measured
value.

## Camera path

- **`cam_config`** writes four registers to the MT9V034 (two-wire address
  0x48) through `i2c_write_master` at 100 kHz:

  | register | value | setting |
  |---|---|---|
  | 0x07 | 0x0388 | chip control |
  | 0x0B | 480 | shutter width |
  | 0x35 | 16 | analog gain |
  | 0xAF | 0 | automatic exposure and gain off |

  Each write sends a start, the address byte, an 8-bit register number and
  two data bytes, each followed by an acknowledge, then a stop. These
  register values come from the sensor's data sheet conventions and should
  be checked against the camera in use.
- **`cam_capture`** runs on the pixel clock. It starts only at the rising
  edge of FRAME_VALID, keeps pixel bits [9:2] and packs two pixels per
  16-bit word, the first in the low byte. Its frame toggle tells the system
  clock domain that a frame ended.
- **`acq_ctrl`** arms capture at the rising edge of the synchronised
  `proj_sync`, so frame 0 is always pattern 0. It counts `NFRAMES` frames.
  After each frame it asks the transfer controller to *flush*: the partial
  last page is written padded with zeros, so each frame starts on a page
  boundary. A 752x480 frame is 352.5 pages, so it takes 353.

## SDRAM page transfers (`sdram_xfer_ctrl`)

All SDRAM traffic goes in whole pages of 512 16-bit words. The port towards
the SDRAM controller works as follows:

- `mem_req`, `mem_we` and `mem_row` are held until `mem_ack`;
- a write then sends 512 consecutive `mem_wr_valid` words;
- a read returns 512 `mem_rd_valid` words, after the controller's CAS delay.

A source is served when it has a full page. The priority order is:

1. camera FIFO (it cannot wait);
2. camera flush;
3. result FIFO;
4. PC input;
5. phase-calculation page reads;
6. PC output.

Each source has its own row counter, which advances one page per access.
The three dual-clock FIFOs (`async_fifo`) are 1024x16 with Gray-coded
pointers.

## Parameters (defaults)

| parameter | default | meaning |
|---|---|---|
| `NFRAMES` | 8 | patterns / frames |
| `FH` | 16 | high-frequency periods per screen |
| `PAGES` | 353 | pages per camera frame (752x480 8-bit pixels) |
| `H_*`, `V_*` | 800/40/128/88, 600/1/4/23 | projector timing |
| `TRIG_DELAY` | 4000 | camera trigger delay, pixel clocks after VSYNC |
| `I2C_DIV` | 250 | system clocks per quarter bit of the two-wire bus |

The memory needs 8 × 353 frame pages plus 8 × 353 result pages, 5648
pages in all. The 15-bit row address reaches 32768 pages.

## Testbenches and simulation

Each block has a self-checking testbench `tb/tb_<block>.sv` that compares
against independently computed values. `tb/tb_ref_pkg.sv` holds a
floating-point reference of the phase calculation. Each testbench prints
`TB_RESULT checks=N failures=M`.

The behavioural models in `tb/` stand in for the outside parts:

- **SDRAM page model:** serves whole pages through the page port.
- **Two-wire slave:** records the register writes it receives.
- **MT9V034 model:** watches the projector outputs. On a trigger it exposes
  a frame that records which pattern and which projector line each camera
  row saw. It then reads the frame out with FRAME_VALID/LINE_VALID timing.
  Some columns are dark, as if in shadow.

The end-to-end bench `tb/sli_top_bench.sv` is used at two sizes:

- **`tb_sli_top`:** a reduced screen, a 64x24 camera and 2 pages per frame.
  Runs in seconds.
- **`tb_sli_top_full`:** the top at its default parameters, with a
  752x480 camera and 800x600 projector. Runs in about 80 s.

Both benches:

- configure the sensor;
- capture eight frames while the host pushes pages, so the camera and the
  PC compete for the memory;
- compare every stored byte, padding included;
- run the phase calculation and check every pixel, for the threshold
  decision, the exact phase, the magnitude and the geometry;
- read the results back through the PC FIFO.

Each bench also fails if a mechanism it expects never happened. The
mechanisms are the sync wait, the flushes, zero padding, memory contention,
zeroed and kept pixels, and the triggers.

To simulate with Verilator 5 (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/sli_pkg.sv tb/tb_ref_pkg.sv tb/tb_fft8.sv --top-module tb_fft8
./obj_dir/Vtb_fft8
```

For another testbench, replace `tb_fft8` with its name, for example
`tb_sli_top_full`. Verilator finds the modules through `-y`.

## Departures and limits

- **Page timing:** PAGE + 52 clocks instead of a pipeline-only 563.
- **Whole-image time:** 29.7 ms for a full phase image, all transfers
  included. A budget of 16.5 ms (frame reads plus pipeline) leaves out
  writing the results back, which takes another 2824 pages.
- **Magnitude format:** the magnitude is stored as the max + min/2
  estimate, as a float. Its scale is this design's choice.
- **Sign and range:** the phase uses the atan2(Im, Re) sign, and its range
  is [0, 2π].
- **Outside parts:** the SDRAM controller, USB link, clocking and the
  sensor are not included.
- **Camera FIFO width:** the two pixels are packed into a 16-bit word
  before the camera FIFO, rather than by an 8-to-16-bit FIFO. The stored
  data are the same.
- **Own choices:** the page port protocol, the host command ports, the
  sensor register values, `TRIG_DELAY`, the sync pattern and the result
  layout.
- **Vendor-core replacements:** the CORDIC, the float conversion and the
  constant multiplier are written out in RTL. They do the same function,
  but their latencies were chosen to give the 51-clock total.
