# Sub-10 ps 2D Vernier TDC in 28 nm CMOS, with its FPGA readout

This is a time-to-digital converter (TDC) for 4D particle trackers. Each channel
measures two intervals against one common START:

- **Time over threshold (TOT).** START to STOP1, with 50 ps bins.
- **Time of arrival (TOA).** START to STOP2, with 6.25 ps bins.

Both use a 25 ns measurement window. The fine bin comes from a Vernier: two ring
oscillators whose cell delays differ by 6.25 ps (50 ps and 56.25 ps). To improve
linearity, every measurement starts the rings from random phases and subtracts
those phases from the result (the *sliding scale*).

The ASIC has four channels. They share START and STOP1, and each has its own STOP2.
An FPGA readout controls the ASIC over AXI-Lite and does three things:

- it sets the cell control voltages through a DAC and measures two reference
  oscillators;
- it finds the zero of the START–STOP delay;
- it sweeps a calibration scan in 5 ps steps and streams one AXI-Stream frame per
  point.

The delay cells and rings are analog. Here they are **behavioural models** with real
delays. Everything that is logic is synthesizable SystemVerilog: the decoders, the
counters, the sliding scale, the channel controller and the whole FPGA side.

## How a channel converts

### Rings and phases

A ring has `N_CELLS` = 8 differential delay cells, with the last output fed back
crossed (`ring_osc`, `vcdc`). Its outputs step through 16 Johnson states per
revolution, one state per cell delay. `johnson_decoder` turns a sampled state into a
phase 0..15 and flags an illegal state.

Each cell has set/reset inputs. While the channel is being prepared they force the
ring into any of the 16 states, which is how the starting phase is loaded.

### 50 ps section (`coarse_tdc`)

1. START releases a 50 ps ring. A 6-bit counter counts its revolutions.
2. STOP1 samples the ring state and the counter.
3. The code is `TOT = 16·rev + phase − p0`, where `p0` is the starting phase. This
   equals floor(T / 50 ps).

### 6.25 ps section (`vernier_fine_tdc`)

1. START releases the slow ring (56.25 ps).
2. STOP2 samples the slow ring's phase and revolution count. This gives `C`, the
   number of whole slow cell delays since START minus the slow starting phase. The
   remainder `r` (0 ≤ r < 56.25 ps) is still unknown.
3. STOP2 also releases the fast ring (50 ps). Each fast transition closes 6.25 ps of
   the remaining gap to the next slow transition.
4. Every fast-ring edge clocks a bank that samples the slow ring. There are 16 banks,
   one per fast phase. The fast starting phase only changes which bank step `j`
   lands in.
5. The first fast step `j` whose sample shows the slow ring *not* yet advanced gives
   `f = j − 1 = floor(r / 6.25 ps)`.
6. The code is `TOA = 9·C + f`, which equals floor(T / 6.25 ps).

After 9 fast steps (450 ps) the section is done and both rings are stopped. Stopping
them saves power, since a ring only runs for the length of the interval.

### Result word

The result is `tdc_result_t = {toa_ovf, toa[12:0], tot_ovf, tot[9:0]}`, 25 bits.

### Overflow

A section sets its overflow bit in two cases:

- its revolution counter would wrap;
- its STOP arrived before START. The STOP is then ignored.

Overflow is ignored once the STOP has been captured. A ring transition still in
flight at capture time therefore cannot corrupt a valid result.

### Range

The starting phase takes up part of a ring's range, so each counter is sized for the
worst case:

| Section | Counter | Range over all starting phases |
|---|---|---|
| TOA | 5 bits | (512 − p) × 56.25 ps = 27.96 … 28.8 ns |
| TOT | 6 bits | (1024 − p) × 50 ps = 50.4 … 51.2 ns |

Both cover the 25 ns window from any starting phase. With a 5-bit TOT counter, a
starting phase of 15 would leave only 24.85 ns.

### Sliding scale (`sliding_scale_gen`)

Each channel has its own random source: a 32-bit Galois LFSR (taps `0x80200003`,
seeded per channel). It advances once per measurement and supplies three 4-bit
starting phases:

| LFSR bits | Ring |
|---|---|
| [3:0] | 50 ps coarse ring |
| [11:8] | slow ring |
| [19:16] | fast ring |

The same interval therefore falls on different cells from shot to shot. Cell
mismatch turns into noise instead of a fixed non-linearity. With the sliding scale
off (CTRL bit 8 = 0), all phases are 0.

### Channel cycle (`tdc_channel`)

The channel controller runs in the clk domain:

1. An `arm` pulse draws new phases.
2. It clears both sections and holds the rings in their starting states for
   `PRESET_CYC` = 2 cycles.
3. `armed` rises (3 cycles after `arm`).
4. When both sections are done, their done flags pass a two-flop synchronizer and
   the result is registered.
5. `valid` rises 3–4 clk cycles after the later conversion ends, and stays high until
   the next `arm`.

### The ASIC (`tdc_asic`)

- Four channels with common START and STOP1 and a separate STOP2 each.
- A `state_err` flag per channel.
- Two free-running reference oscillators (`ref_osc`): one with fast cells and one
  with slow cells, each divided by 64. The FPGA counts them to see how the cells
  respond to the control voltage and trim.

### Cell model (`vcdc`)

The cell delay in the model is

    d = T_NOM + MISMATCH − 0.005 ps·(vctrl − 2048) − 0.5 ps·(trim − 8)

where `vctrl` is the 12-bit DAC code of the control voltage and `trim` is a 4-bit
code. At mid-scale the delays are exactly 50 ps and 56.25 ps.

`ring_osc` can give cell k an offset of `MISMATCH_PS·((k mod 3) − 1)` to study
mismatch with and without the sliding scale.

## The FPGA readout (`readout_fpga`)

Everything runs on one 200 MHz clock (5 ns period). The board is assumed to have:

- a PLL that supplies START and a constant-phase image of it to the FPGA;
- a programmable delay chip, 5 ps per code, on the STOP path;
- a two-channel DAC for the fast and slow control voltages.

These board parts are ports of the top.

### Blocks

| Block | What it does |
|---|---|
| `axil_regs` | AXI-Lite register file. Handles one write and one read at a time and always answers OKAY. |
| `dac_spi` | Sends the 16-bit word `{3'b011, channel, code[11:0]}`, SPI mode 0, SCLK = clk/8. |
| `freq_counter` | Counts rising edges of a divided oscillator over GATE clk cycles, after a synchronizer. |
| `stop_pulse_gen` | Raises STOP 3 + `shift` clock edges after a rising edge of the START image. The pulse is 4 cycles wide. |
| `meas_seq` | One measurement: wait for a START edge → arm → wait for `armed` → fire STOP on a following START → wait until every channel is valid. Gives up after 4096 cycles. |
| `start_finder` | Coarse pass: raises `shift` one clock period at a time until the chosen channel's TOA is no longer an overflow (STOP before START) at `k0`. Fine pass: goes back to `k0 − 1` and raises the delay code in 5 ps steps until the overflow clears again. That (shift, code) pair is position 0. |
| `scan_readout` | From position 0, measures `n_points` positions `step` codes apart. A position past 1000 codes (one clock period) carries into the coarse shift. |

While the finder is busy it owns the shared sequencer and STOP generator.

### Register map (byte addresses)

| Addr | Name | Contents |
|---|---|---|
| 0x00 | CTRL | W1 pulses: bit0 finder go, bit1 scan go, bit2 frequency go. R/W: [5:4] channel for the finder and LAST, bit8 sliding scale on (reset 1), bit9 reference oscillators on |
| 0x04 | TRIM | [3:0] fast-cell trim, [7:4] slow-cell trim (reset 8) |
| 0x08 | DAC | write: [11:0] code, bit16 channel (0 fast, 1 slow); starts an SPI transfer |
| 0x0C | KMAX | [7:0] largest coarse shift the finder tries (reset 40) |
| 0x10 | SCAN | [15:0] number of points (reset 16), [25:16] step in 5 ps codes (reset 1) |
| 0x14 | GATE | [23:0] frequency gate in clk cycles (reset 1000) |
| 0x18 | STATUS | bit0 finder busy, 1 found, 2 fail, 3 scan busy, 4 frequency busy, 5 DAC busy, 6 a measurement timed out since the last finder/scan go |
| 0x1C | ZERO | [7:0] coarse shift and [25:16] delay code of position 0 |
| 0x20 / 0x24 | FFAST / FSLOW | divided fast / slow oscillator edges in the last gate |
| 0x28 | LAST | last result of the selected channel (`tdc_result_t`) |

### Scan frame (AXI-Stream, 32-bit)

Each scan point is one frame of 5 beats:

| Beat | Contents |
|---|---|
| 0 | position relative to zero, in 5 ps codes |
| 1–4 | `{channel[1:0], 5'b0, tdc_result_t}` for channels 0–3 |

`tlast` is set on beat 4. The scan holds while `tready` is low.

### Typical session

1. Write the DAC codes.
2. Pulse frequency go and read FFAST / FSLOW.
3. Pulse finder go and poll STATUS until found.
4. Write SCAN and pulse scan go.
5. Receive the frames.

## What is modelled and what departs from the original ASIC

**Taken from the original design:**

- the 2D Vernier of 50 ps and 56.25 ps rings, with its 6.25 ps step;
- 50 ps TOT and 6.25 ps TOA from one START and two STOPs;
- starting phases loaded through the cells' set/reset and subtracted from the result;
- four channels with shared START and STOP1 and separate STOP2;
- the fast and slow reference oscillators;
- the 25 ns window;
- AXI-Lite control;
- the DAC and frequency readback;
- the first-non-overflow search with clock-period shifts and 5 ps zeroing;
- the 5 ps scan streamed as AXI-Stream frames of position and TDC output.

**Choices made here, not in the original:**

- 8 cells per ring.
- The coarse section uses its own 50 ps ring.
- The one-dimensional 16-bank sampling used for the Vernier search.
- The counter widths.
- The LFSR used as the random source.
- The channel controller and its timing.
- The result format.
- The register map.
- The frame layout.
- The DAC word.
- The 200 MHz clock.
- The /64 divider.
- The sequencer timeout.

**Departures and gaps:**

- **STOP versus START shift.** In this readout the PLL's START runs free and the FPGA
  shifts the STOP. The original board description says instead that a fast clock
  shifts the start signal. The two are equivalent for the measured interval.
- **Analog parts are behavioural.**
  - The delay cells are current-starved DCVSL cells with trim, set/reset and an
    output buffer, plus leakage-reduction sizing. Here they are a simple delay
    formula. The model has no jitter, leakage or power.
  - The low-jitter input receivers are ideal wires.
  - The PLL, delay chip, DAC chip and serial link to the host are not part of the
    RTL. Test benches model the first three.
- **ASIC interface.** The ASIC's real configuration and readout interface is not
  known. Here configuration and results are parallel ports between the ASIC and the
  FPGA.

`tdc_channel`, `tdc_asic` and the top instantiate the ring models, so they simulate
but cannot be synthesized as a whole. Their digital parts (`coarse_tdc`,
`vernier_fine_tdc`, `johnson_decoder`, `sliding_scale_gen`) synthesize on their own.

## Files

`rtl/` holds one module or package per file:

- **Packages:** `tdc_pkg` (ASIC constants, config and result types) and `readout_pkg`
  (readout constants, register map, settings and status structs). Compile these
  first.
- **ASIC side:** `vcdc`, `ring_osc`, `ref_osc`, `johnson_decoder`,
  `sliding_scale_gen`, `coarse_tdc`, `vernier_fine_tdc`, `tdc_channel`, `tdc_asic`.
- **FPGA side:** `sync2`, `axil_regs`, `dac_spi`, `freq_counter`, `stop_pulse_gen`,
  `meas_seq`, `start_finder`, `scan_readout`, `readout_fpga`.
- **Top:** `tdc_system_top` (ASIC + readout).

`tb/` holds one self-checking test bench per block (`<block>_tb`), plus two helpers:

- `board_model`: PLL START and image, delay chip with its code, board skews, DAC
  receiver;
- `axil_bfm`: AXI-Lite master.

Every test bench prints `TB_RESULT checks=N failures=M` and has a watchdog.

The end-to-end tests are:

- **`tdc_system_top_tb`.** Runs the top at its default parameters, through a board
  model:
  1. DAC writes and frequency readback;
  2. zero search;
  3. a 58-point scan from 0 to about 23.7 ns (415 ps steps) under random
     AXI-Stream back-pressure;
  4. a scan with the sliding scale off.

  Every frame is compared with floor(T/6.25 ps) and floor(T/50 ps), with T worked out
  from the board delays. The test counts each mechanism: overflows, coarse and fine
  search steps, delay carries, starting-phase changes, stream stalls and DAC writes.
  It fails if any of them never happens.
- **`readout_fpga_tb`.** Repeats the flow with different board delays and a
  different finder channel. It also checks that a point beyond the TOA range
  overflows.

- **`sliding_scale_linearity_tb`.** A code-density test of one channel with
  mismatched cells (±2.5 ps pattern), next to a matched channel. It sweeps
  START–STOP2 over 80 TOA codes with 400 hits per code, once with the sliding scale
  off and once on:

  | Sliding scale | DNL rms | DNL peak |
  |---|---|---|
  | off | 0.52 LSB | 1.20 LSB |
  | on | 0.25 LSB | 0.78 LSB |

  The matched channel's DNL is exactly 0 both times. The sliding scale cannot remove
  a mismatch that changes the mean fast/slow delay ratio itself; such a mismatch
  leaves every ninth bin short whatever the starting phase.

## Simulating

Verilator 5 with timing support is needed. Use a 1 ps (or finer) time precision,
because the cell delays are fractions of a picosecond:

    verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
      -Irtl -y rtl -y tb rtl/tdc_pkg.sv rtl/readout_pkg.sv \
      tb/tdc_system_top_tb.sv --top-module tdc_system_top_tb -Mdir obj -o sim
    ./obj/sim

The same command works for any `<block>_tb`. Run times on a desktop machine:

- the end-to-end test: about 15 s (150 µs simulated);
- `readout_fpga_tb`: about 10 s;
- every other test: a few seconds.

## Changing the design

- **Ring size.** `N_CELLS` in `tdc_pkg` sets the ring size. The phase width, code
  widths and Johnson decoding follow from it.
- **Range.** `REV_BITS` and `TOT_REV_BITS` set the ranges. Keep `TOT_REV_BITS` large
  enough that (2^bits·16 − 15)·50 ps still covers the window.
- **Cell delays.** `T_FAST_PS` / `T_SLOW_PS` on `tdc_channel` set the cell delays.
  `FINE_STEPS` must stay equal to T_slow / (T_slow − T_fast).
- **Readout clock.** `FINE_PER_CLK` in `readout_pkg` is the number of delay-chip
  codes per readout clock period. Change it together with the clock.
