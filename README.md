# Real-time line combination for multi-strip satellite image sensors

A push-broom satellite camera builds a 2-D image one line at a time as the
satellite moves. A single CMOS line sensor 11,200 pixels wide is hard to make
with good yield. This design uses sixteen small **strip sensors** (704 pixels
each) mounted in two interlaced rows instead, and joins their outputs in real
time into one continuous line:

```
   top row (mounted reversed):      [ CIS2 ]      [ CIS4 ]   ...
   bottom row:                [ CIS1 ]      [ CIS3 ]      ...
                                    <-> overlap   ^ vertical gap (lines)
```

This layout causes three problems, and the hardware handles each one:

| problem | cause | handled by |
|---|---|---|
| neighbouring strips see the same ground columns | dies overlap horizontally by 0..8 pixels | ICAI drops the overlap pixels while acquiring |
| top-row strips deliver their pixels right-to-left | they are mounted rotated by 180° | ICAI stores them in a stack, which reads the last pixel first |
| top and bottom rows see different ground lines | the rows are 0..64 lines apart | write engine offsets each strip's SDRAM write address by whole lines |

The RTL follows the system of Chen et al., "High Definition Image
Pre-Processing System for Multi-Stripe Satellites' Image Sensors". That system
has sixteen strips, four ICAIs (image combiner and acquisition interfaces),
one I2C controller, and processors that write the image into SDRAM. The ICAI,
the overlap rule and the SDRAM address formulas come from that work. The
processors, the system bus and the SDRAM controller are not included. The
processor's per-line task, storing pixels at gap-corrected addresses, is built
here as a small hardware engine. All other details (handshakes, clock
crossing, widths, I2C register map) are this design's own choices. They are
listed under [Departures and choices](#departures-and-choices).

## Block structure

```
                 hdipp_top (system model)
 ┌──────────────────────────────────────────────────────────────────────┐
 │ cis_strip x16 ──pixels──► icai x4 ──stream──► gap_calib_writer ──► mem_* (SDRAM port)
 │   └ cis_reg_bank ◄─I2C── i2c_controller ◄── i2c_cmd_* (host)
 │                                                                      │
 │ icai:  isc_logic ─push─► icai_mem_block #0 ┐                          │
 │        (strobe, overlap  icai_mem_block #1 ┴─► icai_combiner ─► stream │
 │         removal)          (FIFO, stack, FIFO, stack; each 704 B)       │
 └──────────────────────────────────────────────────────────────────────┘
```

| file | role |
|---|---|
| `hdipp_pkg.sv` | constants (704 pixels, 10-bit ADC, 8-bit stored pixel), `icai_beat_t`, the overlap rule `calib_index` / `kept_pixels` |
| `hdipp_top.sv` | sixteen strip models, four ICAIs, I2C controller, write engine |
| `icai.sv` | one ICAI: control logic, two memory blocks, combiner, clock crossing |
| `isc_logic.sv` | strobe timing, per-strip pixel counting, overlap removal, block selection |
| `icai_mem_block.sv` | FIFO, stack, FIFO, stack for strips 1..4 |
| `pixel_fifo.sv`, `pixel_stack.sv` | 704-byte dual-clock line FIFO and line stack |
| `dc_line_ram.sv` | write-on-pixel-clock / read-on-host-clock RAM used by both |
| `icai_combiner.sv` | reads a full block in strip order and streams it out |
| `gap_calib_writer.sv` | SDRAM address generation for vertical-gap calibration |
| `i2c_controller.sv` | write-only I2C master for the strips' power-on configuration |
| `cis_reg_bank.sv` | I2C slave register bank inside each strip |
| `cis_strip.sv` | **behavioural model** of a strip sensor (array, PGA, ADC are analog) |
| `sync_2ff.sv` | two-flop synchronizer |

## Overlap removal and strip order (the ICAI)

Each strip numbers its pixels 1..704 in read-out order. For strip K
(1-based) with overlap OV_K to the next strip, the calibration point is

```
C_K = 704 - OV_K    if K is odd  (bottom row, read left to right)
C_K = OV_K          if K is even (top row, read right to left)
```

An odd strip keeps pixels 1..C_K. An even strip keeps pixels C_K..704, which
arrive last but belong on the left. The two rules are not symmetric. An odd
strip drops OV_K pixels. An even strip drops OV_K − 1, so OV = 1 means "drop
nothing" for a top strip. In the reference assembly the last strip always has
OV = 1. For an even strip with OV = 0 the formula would give pixel 0, which
does not exist, so such a strip keeps all 704 pixels. `kept_pixels()` in the
package is the single definition of this rule. The ICAI, the write engine and
the testbenches all depend on it.

All strips output their pixels at the same time, one per pixel clock. Each has
its own 1-based counter in `isc_logic`. A pixel is pushed only if the rule
keeps it. Odd strips feed a FIFO. Even strips feed a stack, so reading the
stack from the top gives pixel 704 first. No address arithmetic is needed to
reverse the data. The combiner then reads FIFO 1, stack 2, FIFO 3, stack 4
back to back. Its output is already the line in ground order:

```
1 … C1 | 704 … C2 | 1 … C3 | 704 … C4
```

Only the upper 8 bits of each 10-bit ADC code are stored (the memories are
704 bytes deep, 8 bits per pixel).

## Double buffering and the two clocks

Each ICAI has two memory blocks. Line N is written into one block at the
sensor pixel rate (`wclk`). Meanwhile line N−1 is read from the other block
at the host rate (`rclk`). Timeline for one time stage (1000 pixel clocks =
250 µs at 4 MHz in the reference timing):

```
wclk  stage N start: strobe rises (held 4 clocks)
                     block holding line N-1 handed over: done_bank := it, done_tgl flips
                     (only if every strip delivered all 704 pixels of line N-1)
                     the other block becomes the write block and is cleared
      +3 clocks:     704 pixels per strip, kept ones pushed
rclk  ~2 clocks after the stage start: line_ready pulse; the combiner rewinds
                     the block, and line N-1 streams out about 5 host clocks
                     after the stage boundary
```

Only a toggle crosses the clock boundary, through `sync_2ff`. The block number
and the four pixel counts are held stable by the writing side for a full time
stage, so the reading side samples them only after the toggle arrives. This
works only if the host finishes each line within one time stage. Nothing
checks for a late host: a reader that falls a whole stage behind gets the
block being overwritten.

Combiner throughput: one pixel per `rclk` cycle, plus one idle cycle per strip
and a one-cycle rewind. 2,816 pixels take about 2,821 cycles.

Stream beat (`icai_beat_t`): `pix[7:0]`, `cis[1:0]` (strip within the ICAI),
`first` (first kept pixel of that strip), `last` (last pixel of the combined
line). Valid/ready handshake. The data holds while `out_ready` is low.

## Vertical-gap calibration (write engine)

The image in SDRAM is row-major. One row holds `Comb_Pixels` bytes, the sum of
the pixels all sixteen strips keep (11,200..11,264). Strip K's data for
scanned line N (N = 1, 2, …) is written starting at

```
WPtr(K,N)    = Init_WPtr(K) + (N-1) · Comb_Pixels
Init_WPtr(K) = (pixels kept by strips 1..K-1) + GP_K · Comb_Pixels
```

Within a segment the addresses just count up by one. GP_K is the number of
lines by which strip K's data must be delayed. A strip that sees a ground
line GP_K lines earlier than the reference row is pushed GP_K rows down. After
that, one SDRAM row holds one ground line across all strips. Rows below the
largest GP are complete.

The engine computes `Init_WPtr` for all sixteen strips once after `cfg_load`,
one strip per clock with one multiplier, then raises `init_done`. After that
it forwards pixels straight from the ICAI streams to the SDRAM port. Each
line is taken from ICAI 0, 1, 2, 3 in turn. The table is looked up on every
`first` beat, and the previous address plus one is used otherwise. Throughput
is one byte per clock when the SDRAM side is ready. The image starts at
`cfg_base`. Addresses wrap at 2^26 (64 MB).

## Strip configuration over I2C

Each strip contains an I2C slave register bank (`cis_reg_bank`, 8 registers,
auto-incrementing pointer, write-only, reset to 0). The slaves sit on one bus
with addresses `0x30 + strip index`. SCL has one driver. SDA is a wired-AND of
the master and all slaves. `i2c_controller` performs one register write per
command (START, address+W, register, data, STOP) at f_clk/(4·DIV), which is
100 kHz by default from a 100 MHz clock. It reports `ack_err` if any byte was
not acknowledged.

The strip model uses register 0 as the PGA gain (16 = unity) and bit 0 of
register 1 as read-out enable. Both reset to 0, so the strips stay silent
until the host configures them.

## Using the top level

`hdipp_top` ports, grouped:

* clocks and resets: `wclk`/`wrst` (pixel clock), `rclk`/`rrst` (system clock),
  synchronous active-high resets;
* configuration (hold stable while acquiring): `cfg_line_period` (time stage
  in pixel clocks), `cfg_ov[16]`, `cfg_gp[16]`, `cfg_base`, `cfg_load` pulse
  followed by waiting for `init_done`, then `cfg_enable`;
* I2C commands: `i2c_cmd_valid/ready/dev/reg/data`, `i2c_done`, `i2c_ack_err`;
* SDRAM write port: `mem_valid`, `mem_ready`, `mem_addr[25:0]`, `mem_data[7:0]`;
* status: `strobe`, `line_ready[4]`, `line_done`, `lines`.

Start-up order: release resets. Write the gain and enable of every strip over
I2C. Pulse `cfg_load` and wait for `init_done`. Set `cfg_enable`.

Parameters: `NICAI` (4; 1 gives the four-strip prototype), `PIXELS` (704),
`I2C_DIV` (250), and `ASM_OV`/`ASM_GP`. The last two describe where the strip
models are mounted. They are model parameters: the chip itself learns the
same values only through `cfg_ov`/`cfg_gp`. The defaults repeat one measured
four-strip assembly for every ICAI: overlaps 0, 2, 1, 1 and gaps 42, 0, 40, 0
lines. That gives 11,256 pixels per line.

### The strip model

`cis_strip` is behavioural. It has the real part's digital pins. The optical
side is a synthetic scene `scene_pixel(row, col)`. Line n of a strip sees
scene row n + `ROW_AHEAD`. Its pixel p sees column `X_OFF + p − 1`, or
`X_OFF + 704 − p` when `REVERSED`. Pixels start 3 clocks after the strobe edge
and come one per clock. The ADC code is min(1023, scene · gain / 4). Because of
this scene, a correctly calibrated image is easy to check: row R, column c of
the SDRAM image must equal `scene_pixel(R, c)`.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/hdipp_pkg.sv tb/tb_hdipp_top.sv --top-module tb_hdipp_top
./obj_dir/Vtb_hdipp_top
```

| testbench | what it shows |
|---|---|
| `tb_hdipp_top` | full default system (16 strips, 1000-clock stages, 4 MHz / 100 MHz), 60 lines. Checks I2C configuration and a refused write, then every aligned image row 42..59 pixel-for-pixel against the scene. Also checks write count, no double writes, 16 segments per line, SDRAM back-pressure, and that each line is stored within its stage (about 130 µs of 250 µs). About 2 s. |
| `tb_prototype` | the four-strip prototype (`NICAI = 1`), 4000 lines/s, 2,814 pixels per line, rows 42..59 checked |
| `tb_calib_range` | one ICAI assembled at the limits of the calibration range (overlaps 0 and 8 pixels, gaps 0 and 64 lines), 100 lines, rows 64..99 checked |
| `tb_final_rate` | default system at 8000 lines/s (125 µs stage: 8 MHz pixel clock, 200 MHz system clock) |
| `tb_icai` | one ICAI with 1000-clock stages: line order, overlaps, reversal, flags, one notification per line |
| `tb_isc_logic` | strobe period and width, block alternation, exactly the pixels the overlap rule keeps |
| `tb_icai_combiner` | strip order, tags, flags, 1 pixel/clock without back-pressure |
| `tb_icai_mem_block`, `tb_pixel_fifo`, `tb_pixel_stack` | order, counts, overflow, data hold |
| `tb_gap_calib_writer` | every address against an independent evaluation of the pointer formulas, random OV 0..8 and GP 0..64 |
| `tb_i2c_controller`, `tb_cis_reg_bank`, `tb_cis_strip` | bus framing, acknowledge/NACK, bursts, strip read-out timing and values |

All testbenches pass with all state randomised at start-up
(`+verilator+rand+reset+2`).

## Departures and choices

* **No processors or bus.** The original system has two 32-bit processors on
  a shared bus. One stores lines into SDRAM, the other compresses blocks. Here
  the line-storing work is the `gap_calib_writer` hardware, fed directly by
  the ICAI streams. Block processing, the SRAM/SDRAM controllers and the
  downlink are outside this RTL. The top level exposes a byte write port
  instead of 32-bit bus words.
* **ICAI clocking.** The reference ICAI runs at 32 MHz and is described as
  collecting the four strips by time-division multiplexing. Here each strip
  has its own FIFO/stack written in parallel on the pixel clock. The results
  are the same; there is no separate 32 MHz domain.
* **Pointer formula.** The column term of `Init_WPtr` is the number of pixels
  kept by the strips to the left of strip K. GP_K is the delay of strip K
  itself, not a gap between neighbours.
* **Overlap rule** exactly as stated above, including its odd/even asymmetry
  and the clamp for an even strip with OV = 0.
* **Own choices:** strobe width (4 clocks), strip read-out latency, valid
  signals from the strips, the valid/ready streams, the toggle handshake
  between clocks, no overrun detection, the I2C register map and rate, 8 of
  10 ADC bits stored, address wrap at 64 MB.
* **Strip sensor** exists only as a behavioural model. The photodiode array,
  PGA and cyclic ADC are analog. The real timing unit is described only as
  "reads the array out serially".
