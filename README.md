# 640 × 480 SWIR camera: sensor-to-NTSC acquisition logic

This is the FPGA logic of a short-wave infrared (0.9–1.7 µm) camera. A
640 × 512 InGaAs focal plane array (FPA) is read out through a 12-bit ADC.
The image is buffered in a single SDR SDRAM and shown on an ordinary NTSC
monitor: the FPGA produces a 525-line BT.656 (CCIR656) byte stream, and an
ADV7391 video encoder chip turns that stream into analog video. The design
follows the system described in *Design and realization of a high resolution
(640 × 480) SWIR image acquisition system*. Where that description is silent,
this RTL makes its own choices, and the sections below say which parts are
which.

The central problem is that the sensor and the video output run at unrelated
pixel rates but share one SDRAM. If reads for the display and writes from the
sensor could happen at any time, they would collide. The original fix was a
read-ahead stage, and writes that lost out left old rows on screen, which
showed as motion blur. This design removes the collision by construction. The
video side starts every sensor row, so each sensor row lasts exactly one video
line. The row is then read in the first part of the line and written in the
last part.

## Clocks and data path

| domain | clock | logic |
|---|---|---|
| pixel | 11.25 MHz | `timing_generator`, `input_buffer_ctrl`, write side of the input FIFO |
| SDRAM | 108 MHz | `sdram_ctrl`, read side of the input FIFO, write side of the output FIFO |
| video | 27 MHz | `output_buffer_ctrl`, `ccir656_encoder`, `adv7391_i2c_config`, read side of the output FIFO |

The three clocks come from the board PLL and enter `swir_top` as inputs.

A pixel travels this path:

1. The ADC delivers 12-bit samples. `input_buffer_ctrl` keeps the upper 8
   bits and packs two neighbouring columns into one 16-bit word, even column
   in the low byte. A 640-pixel row becomes 320 words in the input FIFO.
2. At the 646th pixel of the row, `input_buffer_ctrl` asks the SDRAM
   controller to store the row. The controller writes the 320 words into one
   SDRAM row in a single full-page burst.
3. At the start of each active video line, `output_buffer_ctrl` asks for the
   sensor row that line shows. The controller reads it in one burst into the
   output FIFO, which takes about 3 µs.
4. `ccir656_encoder` builds the line. When it needs a luminance byte, it asks
   `output_buffer_ctrl`, which takes the byte from the head word of the
   output FIFO.

All crossings between clock domains use standard structures:

* Data crosses in `async_fifo`, a dual-clock FIFO with Gray-coded pointers.
  It is 512 words deep, so it holds a whole row.
* Single-cycle requests cross in `pulse_sync`, a toggle synchroniser.
* The SDRAM-ready flag crosses in `bit_sync`.
* Each domain's reset is released synchronously by `reset_sync`.
* A row number travels next to its request pulse. It is stable for a whole
  line before it is sampled.

## Locking sensor rows to video lines

This mechanism is the least obvious part of the design.

* The sensor has no row period of its own. `timing_generator` starts a new
  row (pulses LSYNC and clears the pixel counter) whenever `line_req` arrives.
* `output_buffer_ctrl` sends `line_req` (called oSDRAM_read in the original
  description) one clock after byte 0 of **every** video line, blanking lines
  included.
* A video line is 1716 bytes at 27 MHz, which is 63.56 µs. At 11.25 MHz that
  is 715 sensor pixels, so a sensor row is 715 pixel clocks long. That leaves
  room for the 640 pixels plus overhead, and keeps the sensor below its
  12.6 MHz limit.
* A request that arrives while LSYNC is still high (the first
  `LSYNC_WIDTH` pixels of a row) is ignored. Accepting it would merge two
  LSYNC pulses into one, the sensor would count one row fewer than the
  logic, and every later row would land one row off in the frame buffer.
  This can happen when the first request after reset meets a free-running
  row that has just started.
* Until the video clock runs, rows end on their own after `LSYNC_MAX` (768)
  pixels. This is the original free-running behaviour. Once requests arrive,
  each request cuts the running row short.
* A sensor frame is 521 rows: 512 with pixels, then 9 blank rows. A video
  frame is 525 lines. The two frames therefore slide past each other, and the
  sensor frame rate (30.2/s) is slightly above the video rate (29.97/s).
  Nothing depends on their alignment: the SDRAM always holds the latest copy
  of each row.

Timing within one line, measured from the line start:

| time | event |
|---|---|
| 0 – 0.3 µs | request crosses into the SDRAM and pixel domains |
| ~0.3 – 3.5 µs | SDRAM read of the row for this line (active lines only) |
| 10.2 µs | active video begins (byte 276) |
| ~0.3 + 57.4 µs | sensor pixel 646 reached: write request |
| ~58 – 61 µs | SDRAM write burst of the row just captured |
| 63.56 µs | next line |

A refresh every 7.4 µs costs 8 clocks and fits anywhere. The end-to-end
testbench checks that no read request ever waits behind a write burst.

## The BT.656 frame

* **Line layout.** Each line is 1716 bytes:
  * EAV: `FF 00 00 XY`
  * 268 bytes of blanking fill: `80 10 80 10 …`
  * SAV: `FF 00 00 XY`
  * 1440 bytes of video: Cb Y Cr Y … for 720 pixels
* **Status word.** `XY = {1, F, V, H, V^H, F^H, F^V, F^V^H}`. H is 1 in EAV
  and 0 in SAV.
* **Fields.** F = 0 on lines 4–265 (field 1) and 1 on all other lines.
* **Blanking.** V = 0 only on the active lines, 22–261 and 285–524: 240 per
  field, 480 in total. Blanked lines carry the fill in their video part too.
* **Colour.** The image is grey, so Cb and Cr are fixed at 80h.
* **Reserved values.** Luminance 00h and FFh are reserved for timing codes,
  so the design limits them to 01h and FEh.

Mapping sensor rows to video lines (0-based sensor rows):

* Each field shows 240 of the sensor field's 256 rows. The first 16 rows of
  each field are dropped.
* Field 1, line 22 + k, shows sensor row 32 + 2k (even rows 32…510).
* Field 2, line 285 + k, shows sensor row 33 + 2k (odd rows 33…511).
* The visible picture is therefore sensor rows 32–511: 640 × 480.
* The 640 columns sit in the middle of the 720-pixel line, with 40 black
  (10h) pixels on each side.

## SDRAM frame buffer and controller

The target part is a 16M × 16 SDR SDRAM of the IS42S16160B type: 4 banks,
8192 rows, 512 columns.

* **Address map.** Sensor row r is stored in bank 0, row `ROW_BASE + r`,
  columns 0–319. One frame uses 2.6 Mbit.
* **Initialisation** (`sdram_ctrl`):
  1. Wait 100 µs (10 800 clocks).
  2. PRECHARGE ALL.
  3. Eight AUTO REFRESH commands.
  4. LOAD MODE REGISTER: full-page burst, sequential, CAS latency 3.
  5. Raise `ready`.
* **Transfers.** Each is one row. ACTIVE is followed by WRITE or READ at
  column 0. Then comes a 320-word burst, BURST TERMINATE, and PRECHARGE.
* **Write burst.** Words come straight out of the show-ahead input FIFO. A
  write waits until the FIFO holds a whole row.
* **Read burst.** Read data is taken `CAS_LAT + 1` clocks after the READ
  command was registered. A read waits until the output FIFO has room for a
  row.
* **Refresh.** Auto-refresh every 800 clocks (7.4 µs).
* **Priority.** Refresh first, then read, then write. Because of the line
  locking, a read and a write are never pending at the same time.
* **Timing defaults.** tRCD = tRP = 3, tRFC = 8, tWR = 2 clocks, chosen for
  108 MHz. Change the parameters for another part or clock.
* **Data bus.** DQ is split into `sd_dq_o`, `sd_dq_oe` and `sd_dq_i`. The
  tristate pad belongs in the FPGA I/O ring.

## Encoder set-up

`adv7391_i2c_config` is an open-drain I2C write master at about 100 kHz. One
millisecond after reset it writes a register table to device address 54h,
one START/address/register/value/STOP transfer per entry. The defaults come
from the encoder's data sheet for 8-bit SD input and NTSC composite output:

| register | value | purpose |
|---|---|---|
| 17h | 02h | software reset |
| 00h | 1Ch | DACs and PLL on |
| 01h | 00h | SD input |
| 80h | 10h | NTSC, luma filter |
| 82h | CBh | SD mode |

The original description only says that I2C is used and that SCL and SDA have
pull-ups. Edit `REG_TABLE` to change the set-up. A missing acknowledge sets
the sticky `nack` output, and the sequence then carries on.

## Files

`rtl/`:

| file | role |
|---|---|
| `swir_pkg.sv` | BT.656 geometry, status-word and field/blank functions, SDRAM command enum |
| `swir_top.sv` | top level, three clock domains |
| `timing_generator.sv` | LSYNC/FSYNC, row and pixel counters, row truncation |
| `input_buffer_ctrl.sv` | ADC capture, pixel packing, write request at pixel 646 |
| `async_fifo.sv` | dual-clock FIFO (input and output buffers) |
| `sdram_ctrl.sv` | SDRAM init, refresh, row write and row read |
| `output_buffer_ctrl.sv` | per-line request, line-to-row mapping, luminance feed |
| `ccir656_encoder.sv` | BT.656 byte stream |
| `adv7391_i2c_config.sv` | encoder register set-up |
| `pulse_sync.sv`, `bit_sync.sv`, `reset_sync.sv` | clock-domain helpers |

`tb/`:

* Each module has a self-checking testbench, `tb_<module>.sv`.
* Simulation-only models:
  * `sdram_model.sv`: SDRAM with protocol checks.
  * `fpa_adc_model.sv`: sensor and ADC producing a test pattern, fixed or
    shifted by `STEP` grey levels per frame.
  * `i2c_slave_model.sv`: I2C slave that acknowledges.
* `tb_swir_top.sv` runs the whole chain with every parameter at its default.
  It simulates two full video frames (about 67 ms of simulated time, a few
  seconds of run time) and compares every output byte with a reference.
* `tb_swir_motion.sv` runs the same chain with a scene that changes every
  sensor frame (`fpa_adc_model` with `STEP` = 16). It follows which sensor
  frame was last written to each row and checks every luminance byte of two
  video frames against that frame, so a row written to the wrong place, or
  a read that overtakes a write, shows up as a failure.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/swir_pkg.sv tb/tb_swir_top.sv --top-module tb_swir_top
./obj_dir/Vtb_swir_top
```

Replace `tb_swir_top` with any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and stops on its own. A watchdog ends it with
a failure if it hangs. The testbenches only use two-state logic and
`$urandom`.

The end-to-end test makes each of these happen at least once and fails if
one never does:

* rows cut short by line requests
* free-running rows before the video clock starts
* SDRAM writes, reads and refreshes
* sensor and video frame wraps
* field and blanking changes
* the luminance clamp
* the I2C set-up

## How far to trust it, and where it departs from the source

Taken from the source description:

* the block structure
* the clock rates and the 715-pixel, 521-row sensor timing
* LSYNC truncation by the read request
* the write trigger at pixel 646
* the 8 MSBs of the ADC
* the BT.656 line and field layout
* the EAV/SAV protection bits
* the fixed chroma
* the 16-line skip per field

Choices made here, where the description gives no detail:

* LSYNC width and the existence of a frame sync: the sensor's own interface
  is not specified.
* A line request that arrives while LSYNC is high is ignored, so two LSYNC
  pulses never merge.
* The delay from LSYNC to the first valid ADC sample: `DATA_START` = 4. Set
  this to match the real sensor and ADC.
* Blank sensor rows placed after the 512 data rows.
* Which sensor rows form each field, and the horizontal centring.
* The luminance clamp.
* FIFO depths.
* The SDRAM address map, burst mode and timing values.
* The encoder register table.
* Reset and clock-domain-crossing structure.

Points the source states inconsistently, and the reading taken here:

* **Active lines.** One statement puts vertical blanking on lines 1–22 and
  263–286. Another puts active video on 22–261 and 285–524, and the frame is
  said to have 480 active and 45 blanking lines. This design uses 22–261 and
  285–524, the only version that gives 480/45.
* **Fill order.** The fill between EAV and SAV is described as 80h, 10h but
  drawn as 10h, 80h. This design sends 80h first, as BT.656 does.
* **Rows per field.** The rows shown per field are given as the 17th to
  252nd (236 rows) but also as 240 lines. This design uses 17th–256th.
* **SDRAM size.** The memory is called both a 32 Mb SDRAM and the 256 Mb
  IS42S16160B. The frame buffer needs 2.6 Mbit, so either works.
* **Pixel clock.** It is given as 10 MHz in one place and 11.25 MHz as the
  final setting. This design uses 11.25 MHz.

Not part of this RTL:

* The sensor, ADC, SDRAM chip, video encoder chip and PLL: analog or vendor
  parts. Models of the first three exist for simulation only.
* The board: regulators, bias trimmers, transceiver, connectors.
* The frame-grabber card.
* Bad-pixel removal and non-uniformity correction. These were only planned
  as later additions, and their algorithms are not given.
* The earlier read-ahead SDRAM state machine. The line-locked scheme replaced
  it.

With one frame buffer, a video frame can show the upper rows of one sensor
frame and the lower rows of the next, because the sensor frame is slightly
shorter than the video frame. Each row is always whole and never older than
one sensor frame.

Verification covers what the testbenches check, against behavioural models.
Nothing has been run on hardware. In particular, the SDRAM model checks
command order and a few timing rules but not every data-sheet parameter.
