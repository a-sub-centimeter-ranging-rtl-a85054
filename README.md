# Multi-channel ILO-TDC LIDAR readout

This is a direct-time-of-flight LIDAR receiver chip. It has 31 pixel columns and 32 time-to-digital
converter (TDC) columns. Each conversion measures the time from a laser START to the first photon
return on each column and gives a 14-bit code. The least significant bit is about 52 ps, and the
full range is about 853 ns. That is roughly 7.8 mm of distance per code and 124 m of range.

A fine LSB of 52 ps normally means sending a fast multi-phase clock to every column. That costs
power and skew. This design avoids it:

- One global 1.2 GHz clock (f_REF) drives a single 10-bit Gray-code coarse counter.
- Eight small injection-locked ring oscillators (ILOs) sit next to the columns. Each is locked to
  f_REF and gives 16 phases, 52 ps apart.
- Each ILO serves four neighbouring columns.
- A column samples the coarse count and its local ILO phases at the event. The fine phase refines
  the coarse count by 4 bits.

Only f_REF and the two coarse counts travel across the chip. The 52 ps timing stays local.

## Code format and the double counter

A column's code is `{coarse[9:0], fine[3:0]}`. The coarse count is stored in Gray code inside the
columns. It is converted to binary once, at the readout.

The coarse counter and the sampling of the ILO phases are separate circuits. Their transitions are
not perfectly aligned. If an event falls just where the counter changes, the counter register can
catch the old or the new value, while the fine code says something else. The code would then jump
by a whole coarse step (16 LSB).

The fix is two copies of the count:

- `cnt0` changes on the rising edge of f_REF.
- `cnt1` is the same count delayed by half a period.

Every column captures both on its event. The top bit of the fine code picks one:

- `fine[3] = 0` (phases 0–7) takes `cnt0`.
- `fine[3] = 1` (phases 8–15) takes `cnt1`.

In this model `cnt0` changes at fine position 12 and `cnt1` at position 4. The register picked is
therefore always at least four fine steps away from its own transition. The scheme tolerates
counter-to-ILO misalignment of up to about ±4 LSB.

The resulting code is a free-running timestamp: one coarse step equals 16 fine steps. The code
wraps every 1024 coarse periods. Column 0 records START and columns 1–31 record STOP. The time of
flight is

    tof = (code[column] - code[0]) mod 2^14    (LSB = T_ref / 16 ≈ 52.08 ps)

This subtraction is left to whatever reads `dout`. Because START and STOP fall at unrelated phases
of the ILO, the quantisation error is spread over all fine codes (a sliding-scale effect).

Files: `ctdc_gray_counter` (binary register → Gray XOR → output register, plus the half-period
`cnt1` register) and `tdc_column` (the two capture registers, the selection, and a 14-bit output
register loaded by DATA_LATCH).

## Fine code: the phase-edge detector

`ftdc_edge_detector` turns 16 ILO phases into 4 bits:

1. **Sampling.** Eight sense amplifiers compare phase k with phase k+8, which is its complement.
   On the STOP edge, each one latches both a bit and its inverse. This gives a 16-bit ring
   "thermometer": eight ones followed by eight zeros, rotated by the event's position in the
   period.
2. **Bubble filter.** Metastable or mismatched samplers can flip isolated bits. A majority vote
   over five neighbouring ring bits removes such bubbles, up to two bits wide.
3. **Edge detection.** An XOR of each bit with its neighbour finds the high-to-low edge.
4. **Encoding.** A priority encoder gives the edge position as the fine code.

`edge_ok` is low when no edge is found (fine = 0).

## Frame timing (TCON)

`tcon` runs on the 18.75 MHz readout clock, which is f_REF / 64. A frame is 50 clock cycles, so the
conversion rate is 375 kHz.

| cycle | action |
|---|---|
| 0 | `bl_rst`: clears the bit-line buffers |
| 1–2 | `start`: fires the laser and column 0 |
| 1–17 | conversion window: from START to DATA_LATCH, at least 16 cycles ≈ 853 ns, the TDC range |
| 18 | `data_latch`: copies all 32 column codes into the output registers |
| 19–49, 0 | 32 readout cycles, one column per cycle (`rd_sel`, `rd_valid`); the last falls in the next frame |

The readout overlaps the next frame, which is why the output registers exist. Conversion k+1 runs
while the words of conversion k are being shifted out. `lidar_soc` registers the selected word with
its Gray part decoded. `dout`, `dout_col` and `dout_valid` appear one cycle after `rd_sel`.

## Front end and bit lines

Each pixel column has two receivers that drive one shared open-drain bit line (modelled as OR):

- Row 1 takes an external photodiode current. In the reference floor plan, photodiodes sit at
  columns 3, 7, …, 31.
- Row 2 takes an on-chip photodiode emulator, `pdem_model`. It injects a programmable 5 ns current
  pulse.

A receiver (`rx_model`) fires while its current is at or above 15 µA.

The bit line clocks `bl_buffer`. This is a flip-flop with D = 1, cleared again by its own output
through a 5 ns delay cell. Any bit-line edge therefore becomes a clean 5 ns STOP pulse. A second
flop (`hit`, also on `col_hit`) records that the column saw an event since the last `bl_rst`.

With `ovf_mode` set, `hit` blocks every later pulse, so only the first event of a frame reaches the
TDC. With `ovf_mode` clear, every event passes. The column then keeps the last event before
DATA_LATCH.

## Configuration and test modes

`scan_chain` is a 75-bit shift register, `lidar_pkg::cfg_t`:

- `scan_en` shifts it, most significant bit first.
- `scan_upd` copies it into the live configuration.
- `scan_out` allows daisy-chaining.

Reset loads `CFG_DEFAULT`.

| field | meaning |
|---|---|
| `ilo_tune[8]` | 5-bit current trim per ILO |
| `pdem_amp_na` | emulator pulse amplitude in nA (default 43 µA) |
| `pdem_dark_na` | emulator dark current between pulses, in nA (default 0) |
| `ext_start` | column 0 takes the `ext_start_in` pin instead of the TCON START |
| `ext_stop` | all 31 STOP columns take the `ext_stop_in` pin |
| `ovf_mode` | first-event-only mode of the bit-line buffers |

With both `ext_*` bits set, the TDC array can be characterised without optics. Examples are
single-shot precision at a fixed interval, channel uniformity, and code-density linearity.

## Behavioural models

These parts are analog on a real chip. They are written as timed models that lint and elaborate,
but they are not synthesizable:

- `pll_model`: f_REF = 64 × the 18.75 MHz reference, with a small fixed phase offset. It also
  outputs the nine ring bias currents (see below).
- `ilo_model`: 16 phases, re-aligned on every f_REF edge while the ring is within its lock range.
  A trim offset is available to study mismatch. Pulling and jitter are not modelled.
- `rx_model`: threshold with a short delay.
- `pdem_model`: pulse current source.
- `bl_delay_cell`: transport delay.

The ILO and PLL models use integer femtosecond delays, under `timescale 1fs/1fs`, so that their
periods (833.333 ps) stay exact enough over many cycles.

Not modelled at all: the clock-distribution buffer trees (plain nets here), the level shifters at
the ILO outputs, and the off-chip photodiode array. Row-1 photocurrents are top-level inputs.

## PVT calibration of the oscillators

An injection-locked ring only locks if its own free-running frequency is already close to the
injected one. Process, supply and temperature shift the rings' speed by more than that. The PLL
contains a ring of the same design. Its loop moves that ring's bias current until the ring runs at
1.2 GHz. The same current is copied to the eight ILOs, which share the same PVT error, so they are
pulled into their lock range together.

In the models:

- Bias is an integer in thousandths of the nominal current (`IREF_NOM` = 1000).
- A ring's frequency is proportional to its bias, times (1 + `PVT_PM`/1000).
- An ILO locks when it is within ±2 % (`LOCK_RANGE_PM` = 20) of f_REF. Otherwise it runs free at
  its own period, and `ilo_locked` stays low.
- While the PLL acquires, every bias is nominal. At lock they become
  1000 · 1000 / (1000 + `PVT_PM`).

The top's `PVT_PM` parameter chooses the corner. Its default of 50 (rings 5 % fast, about the spread
expected of free-running rings) is outside the lock range, so the ILOs only lock once the PLL has
calibrated them. The top-level test checks this.

## Files

| module | role |
|---|---|
| `lidar_pkg` | widths, `cfg_t`, defaults |
| `lidar_soc` | top level: PLL, 8 ILOs, scan chain, pixel array, 31 BL buffers, TDC core, TCON, Gray decoder |
| `tdc_core` | 32 columns, Gray counter, ILO fan-out, `column_mux` |
| `tdc_column`, `ctdc_gray_counter`, `ftdc_edge_detector`, `gray2bin`, `column_mux` | TDC datapath |
| `tcon`, `scan_chain`, `bl_buffer` | control and front-end logic |
| `pll_model`, `ilo_model`, `rx_model`, `pdem_model`, `pixel_array`, `bl_delay_cell` | behavioural models |

## Simulating

Every testbench in `tb/` checks itself and ends with a `TB_RESULT checks=… failures=…` line. For
example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/lidar_pkg.sv $(ls rtl/*.sv | grep -v lidar_pkg) \
        tb/tb_lidar_soc.sv --top-module tb_lidar_soc -o sim && ./obj_dir/sim

The package must be compiled first. Swap the testbench file and top module name to run another
test. The full top-level run takes on the order of ten seconds.

`tb_lidar_soc` runs the full top with default parameters. It runs six test frames:

- APD events;
- emulator events;
- a sub-threshold pulse that must be ignored;
- several events per column, with and without first-event-only mode;
- external START/STOP.

It compares every read-out word with the code expected from the event time. It also counts how
often coarse wrap, `cnt0`/`cnt1` selection and pipelined readout occurred, and fails if any of them
never occurred. Before the frames it checks the PVT calibration: the ILOs must be unlocked while
the PLL acquires, and locked with the scaled bias afterwards. Throughout, it checks the frame
rate: a laser trigger every 50 cycles (375 kHz) and 32 words per readout.

`tb_tdc_workloads` runs the TDC core through the standard characterisation measurements:

- **Single-shot precision and channel uniformity.** A fixed interval of 151, 502 or 703 ns is
  applied 24 times to all 31 columns, with START at a random phase. The test checks every code
  exactly, then the per-column rms and mean and the spread between columns.
- **Linearity ramp.** The interval rises in 71 ps steps from 0 to 830 ns (11 691 points). A
  code is checked exactly unless its STOP falls within 2 ps of a code boundary, where it may
  resolve either way and must be within one code. The largest deviation from the ideal must be
  under 1 LSB.

The models are ideal, so the only error they show is quantisation. The single-shot rms is at most
LSB/2 and the columns agree exactly. Jitter, mismatch and nonlinearity of the real circuits are
not modelled.

The unit testbenches of the TDC core and the ILO use an 832 ps period, so that event times fall on
the simulator's picosecond grid.

## Where this design makes its own choices

- **L2 stage.** The output register is edge-triggered (loaded on DATA_LATCH's rising edge), not a
  level-sensitive latch.
- **`cnt1`.** It is `cnt0` re-registered on the falling edge of f_REF, not a second counter.
- **Alignment.** The alignment of counter and ILO (transition at fine position 12) is chosen so
  that the ±4 LSB margin is symmetric.
- **Bubble filter.** It is a 5-input majority vote. Any filter that removes 2-bit bubbles would
  serve.
- **TCON schedule.** The cycle positions, the 50-cycle frame and the single-clock architecture
  (PLL reference = readout clock) are this design's choices.
- **Scan chain.** The register layout and the shift/update protocol are this design's own.
- **First-event-only mode.** This mode of the bit-line buffer is an interpretation of its
  overflow-detection flop. Also, the frame reset clears the pulse flop as well.
- **PVT model.** The linear bias-to-frequency law of the rings and the ±2 % lock range are model
  choices, not measured properties.
- **Time of flight.** No on-chip subtraction is done; raw column codes are output.
- **Pixel array.** It is the 31 × 2 test configuration. A full 31 × 32 imaging array would need
  more rows on the same bit lines. The TDC rate (375 k conversions/s) would cover 32 rows at
  10 000 frames/s, but those rows are not built.
