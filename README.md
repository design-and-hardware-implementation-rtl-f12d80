# Colour-coded raster display for radar video

A conventional radar screen shows echo strength only as brightness, which makes weak
weather returns, noise and strong targets hard to tell apart. This design takes the
video of a radar receiver, stores one picture of it, and shows it on an ordinary
colour television monitor with the amplitude of every point coded as one of sixteen
colours. Low levels get dark colours (black, violet, blues). High levels get bright
ones (orange, red, purple, white).

The picture is a rectangle, not a circle. Each line of the raster is one azimuth
segment, and each point along the line is one range sample:

- **Capture.** An azimuth sampling pulse (the radar's trigger divided down) opens a
  window of 512 range samples. 256 such segments make one picture: 131 072 samples
  of 4 bits each.
- **Storage.** The samples are packed four to a 16-bit word and written to a
  32 768-word memory.
- **Display.** When the picture is complete the system switches by itself to
  reading. It reads the memory out in step with an interlaced raster. Each stored
  segment becomes one line of both fields.

Everything here is synchronous RTL on one 25 MHz master clock. The analog parts
stay outside the design: the comparator ladder of the flash ADC, the three
video DACs and the monitor. The design takes comparator outputs in and gives 2-bit
DAC codes out.

## Data path

```
 comparators D1..D15 --> adc_encoder --+
 external 4-bit data ------------------+--> adc_mem_if --> frame_memory --> mem_encoder_if --> color_encoder --> rgb
 test_card (from address bits) --------+   (pack 4:1)     32768 x 16       (unpack 1:4)       (16-colour ROM)
                                            ^                  ^   ^              ^
                      addr_timing: modes, sampling clock, address counter, RP/BCL, resets
                      sync_generator: composite sync, line starts, vertical reset, system sync pulses
 color_test_gen: stand-alone 27-colour bar pattern on ctg_rgb (shares the sync)
```

| Module | Role |
|---|---|
| `color_display_top` | Wires the whole system. `src_sel` chooses the ADC, the external digital input or the test card. |
| `sync_generator` | Composite sync with equalising and serrated vertical pulses, 2:1 interlace, line-start strobe `hpulse`, vertical reset `vreset`, and system sync pulses (clk/3). |
| `addr_timing` | STOP/WRITE/READ mode control, the sampling-clock divider gated by azimuth pulses, 512- and 256-counters, the 16-bit address counter, memory cycle pulse `rp`, `bcl`, and the general resets `grp`/`mgr`. |
| `adc_encoder` | Sum-of-products encoder from the 15 thermometer outputs to 4 bits, latched per sampling pulse. |
| `test_card` | Replaces the ADC: the code is 1111 where address bits 3 and 11 are both set, otherwise 0000. |
| `adc_mem_if` | Collects four samples. It then presents the word together with a write-count pulse `wc` and a write-cycle pulse `rpw`. |
| `frame_memory` | Word-wide RAM with the timing of the memory system the display was built for: 7-clock access, 12-clock cycle, busy flag, and general reset. |
| `mem_encoder_if` | The read window: 512 system sync pulses per line. It splits each word back into four samples and issues the read-count pulse `rc` and read-cycle pulse `rpr`. |
| `color_encoder` | Colour ROM behind inverting address gates. Can show 16 colour-code bars instead of data. |
| `color_test_gen` | ROM of the 27 colours that 0 / ½ / full drive per gun can make, shown as 8-line bands. |
| `radar_display_pkg` | Mode and source enums, the RGB struct, the ROM-to-DAC mapping. |

### Sample packing

The first sample of a word goes to bits 3:0 and the fourth to bits 15:12. Reading
unpacks them in the same order. Word *w* therefore holds samples 4w .. 4w+3 of the
write sequence, and the displayed pixel *p* of a field (counted from the first line
start after the vertical reset) is write sample *p*.

## Modes of operation

The operating switch `op_switch` is low to run and high to stop.

- **STOP → WRITE.** The switch goes low. `addr_timing` issues a general reset of
  8 clocks. The reset clears the address counter, the word packer and the memory
  timing. The segment counter starts at 0.
- **Writing.** Each rising azimuth pulse opens the sampling clock for exactly 512
  pulses. The 512-counter closes it and the 256-counter counts the segment. An
  azimuth pulse that arrives while a segment is being sampled is ignored.
- **WRITE → READ.** This happens automatically after 256 segments, once three
  things are true:
  - the last word's write cycle has been started;
  - the address counter has reached 32 768;
  - the memory is no longer busy.

  A second general reset then clears the address counter. `bcl` goes high, which
  selects read cycles, `rc` as the counting pulse, and `rpr` as `rp`.
- **Reading.** The general reset is repeated at every vertical reset, so every field
  restarts at word 0. The same 256 × 512 picture is shown in both interlaced fields.
- **Stopping.** Setting the switch high stops the system from any mode. Setting it
  low again stores a fresh picture.

`mgr` is the general reset as the memory sees it. It is only the mode-switch reset,
and only while the memory is idle and no cycle is being started.

## Timing — the part to read carefully

All figures below are in 40 ns master clocks.

**Raster.**
- A half-line is 800 clocks, and a field is 545 half-lines, so a line is 1600 clocks
  (64 µs).
- The odd number of half-lines gives the interlace. The field rate comes out at
  57.3 Hz, not 60 Hz, because the half-line divider chain is followed exactly.
- Each field begins with 6 equalising, 6 serrated vertical and 6 equalising
  half-lines.
- The vertical reset covers half-lines 0 to 31.5. It deliberately ends in the
  middle of a half-line, in either field parity.
- Line-start pulses are given in the 512 half-lines that follow. That is exactly
  256 per field, and the last half-line of a field has none.

**Read window.**
- `hpulse` arms the window. It opens at the next system sync pulse (every 3 clocks)
  and lasts 512 of them: 1536 clocks, or 61.44 µs.
- At the phase-0 pulse of every four, the word waiting on the memory outputs moves
  to the output register, and `rc` steps the address.
- One clock later `rpr` starts the read of the next word. Its data is ready 7 clocks
  after that, well before the next phase 0, which comes 12 clocks later.
- The very first read of a field is started by the trailing edge of the general
  reset. This is why the vertical reset must not end on a line start: the read it
  starts would otherwise collide with the first `rc`/`rpr` of line 0.
- This is also why line starts stop one half-line early: the last 61.44 µs window
  must end before the next vertical reset stops it.

**Memory rate.**
- The memory cycle is 12 clocks. `mb` is high for 11 of them, so cycles can follow
  every 12 clocks.
- Reading uses one cycle per 4 system sync pulses, which is exactly 12 clocks.
- Writing at the fastest sampling clock (divider 3, 8.33 MHz) also uses one cycle
  per 12 clocks. This is why `samp_div` is clamped to at least 3.
- A cycle requested while busy sets the sticky `mem_error` output and fires an
  immediate assertion. So does a general reset during a cycle.

**Sampling.**
- `samp_div` (3..255) sets the sampling period in master clocks. For example,
  25 gives 1 MHz, which is 41 nautical miles of range over 512 samples.
- With `src_sel = SRC_DIGITAL` the external one-clock strobe `dig_strobe` is used
  instead. It is gated by the same window, and must come no faster than every
  3 clocks.

**Latency.** `rgb` is registered. It follows the sample by one clock, and `pix_stb`
marks each new value.

## Colour code

Each gun is driven at 0, half (v) or full (2v) video. The 2-bit DAC code is
`00` = 0, `01` = v, `10` = 2v. The ROM stores the complement of that code,
because inverters sit between ROM and DACs. The ROM is addressed through inverting
gates, so amplitude *a* reads ROM word 15−*a*. When the window is closed, the gates
give address 15, which is black.

| Amplitude | Colour | Blue | Green | Red |
|---:|---|:-:|:-:|:-:|
| 0 | black | 0 | 0 | 0 |
| 1 | violet | full | 0 | half |
| 2 | dark blue | full | 0 | 0 |
| 3 | blue | full | half | 0 |
| 4 | white-blue | full | full | 0 |
| 5 | white-green | half | full | 0 |
| 6 | blue-violet | full | half | half |
| 7 | brown | 0 | half | half |
| 8 | dark green | 0 | half | 0 |
| 9 | green | 0 | full | 0 |
| 10 | yellow | 0 | full | full |
| 11 | orange | 0 | half | full |
| 12 | red | 0 | 0 | full |
| 13 | yellowish purple | half | half | full |
| 14 | purple | full | 0 | full |
| 15 | white | full | full | full |

With `color_test_sw` high, the encoder shows the code itself instead of the data.
A counter of line starts, preset by the vertical reset, steps every 16 lines. The
field then shows 16 bars, black at the top and white at the bottom. This works in
both modes, inside the normal video window.

`color_test_gen` is an independent pattern generator. It shows all 27 gun
combinations as bands of 8 lines per field, chopped by a 3-clock-on / 3-clock-off
gate. It is black below the last band.

## Where this RTL departs from the original hardware

- **One clock domain.** The free-running RC sampling oscillator is replaced by a
  divider of the master clock with a run-time divisor. Monostable pulse shapers are
  replaced by counters. Asynchronous inputs (`op_switch`, `az_pulse`) pass through
  3-flop synchronisers.
- **Durations are rounded to whole 40 ns clocks:**

  | Quantity | Original | Built |
  |---|---|---|
  | Horizontal sync | 5.5 µs | 138 clocks |
  | Vertical pulses | 27 µs | 675 clocks |
  | Memory access | 275 ns | 7 clocks |
  | Memory cycle | 450 ns | 12 clocks |
  | Colour-test gate half-period | 100 ns | 120 ns |

- **System sync rate** is clk/3 = 8.33 MHz, or 120 ns per sample. The original
  quotes a sample every 112 ns and also the divide by three; the divide was built.
  With 120 ns the 512-sample window is 61.44 µs from the line start. Its first
  samples therefore fall in the sync and back-porch time that the monitor blanks.
  Start the window later, or read faster, if the full line must be visible.
- **Field rate** is 57.3 Hz (545 half-lines of 32 µs), not 60 Hz.
- **Vertical reset placement and width** (half-lines 0–31.5) and the missing line
  start in the last half-line are this design's choices. They give 256 lines per
  field in both parities.
- **Switch to reading** waits for the last write cycle to be accepted and the
  memory to go idle.
- **Reset width.** The general reset lasts 8 clocks.
- **Input source.** The test card and the external digital input are selected by
  `src_sel` instead of by swapping boards.
- **Colour test generator.** It shares the display's sync and video window instead
  of being a separate instrument.
- **Memory.** The memory's split read-modify-write cycle is not built. Its `da`
  flag exists but is left unused, because reads are timed by the cycle.
- **Not built:**
  - the comparator ladder of the ADC;
  - the video DACs;
  - the monitor;
  - the circuit that derives azimuth sampling pulses from the radar's trigger and
    antenna pulses (divide the PRF by a selectable integer). Feed `az_pulse`
    directly.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_sync_generator` | Line/field periods, sync tip widths and counts, 256 lines per field, the interlace offset, system sync period |
| `tb_adc_encoder` | Every thermometer level reads back as its level; hold between pulses; `valid` one clock after a pulse |
| `tb_adc_mem_if` | Packing order, `wc`/`rpw` per fourth sample, reset of the packer |
| `tb_frame_memory` | Random words at random addresses of the full 32 768-word array, back-to-back cycles, read back; access and cycle clocks; general reset keeps the contents |
| `tb_addr_timing` | All mode transitions, 512 pulses per segment, ignored azimuth pulses, address counting, resets (at 4 × 16 to stay short) |
| `tb_mem_encoder_if` | 512 samples per line in packed order, 1536-clock window, 128 `rc` per line, `rpr` count, nothing outside reading |
| `tb_color_encoder` | Every amplitude against the colour table above, blanking, the 16 test bars |
| `tb_color_test_gen` | All 27 bands, gate period, black outside the window and past the last band |
| `tb_color_display_top` | See below |

`tb_color_display_top` runs the whole system at its default size: 256 × 512 picture
and 32 768-word memory. It covers these scenarios:

- **ADC input.** A write is aborted by the switch after 20 segments and restarted.
  After the automatic switch to reading, two full fields are compared pixel by
  pixel with the written amplitudes.
- **Colour test bars** while reading and while writing.
- **STOP.** The output is black while stopped.
- **Digital input.** A frame is written at the external strobe and read back.
- **Test card.** A frame is written with a sampling divider below the minimum
  (clamped) and azimuth pulses too fast (half ignored), then read back.

It also checks the colour test generator bands and the memory error flag
throughout, and counts each of these mechanisms. It runs in well under a minute.

To simulate with Verilator 5, for example the full system:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl +libext+.sv --top-module tb_color_display_top \
  rtl/radar_display_pkg.sv tb/tb_color_display_top.sv -o sim
./obj_dir/sim
```

Replace the testbench name for any other block. The package must come first on the
command line, and the other modules are found through `-y rtl`. The design is
fully synchronous with an active-low synchronous reset `rst_n`.

## Changing it

- **Picture size.** `SAMPLES_PER_LINE`, `AZIMUTH_LINES` and `MEM_DEPTH` on the top
  set the picture. Keep `SAMPLES_PER_LINE × AZIMUTH_LINES / 4 ≤ MEM_DEPTH`.
- **Lines per field.** Keep the number of lines per field equal to `AZIMUTH_LINES`
  through `sync_generator`'s `ACTIVE_LINES` and `VRESET_HALF_LINES`.
- **Colour code.** It is the `color_rom` function in `color_encoder.sv`: 16 words
  of `{2'b00, B, G, R}`, each field the inverted DAC code.
- **Test colours.** They are `test_rom` in `color_test_gen.sv`.
- **Memory timing.** `MEM_ACCESS_CLKS` and `MEM_CYCLE_CLKS` must satisfy
  `CYCLE ≤ 12` for the read-out to keep up (4 system sync pulses per word), and
  `ACCESS < 11` so that data arrives before the next word is needed.
