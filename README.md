# 16-QAM Alamouti encoder for a two-antenna FPGA transmitter

This is the baseband of a 2x1 transmit-diversity link. The same pair of 16-QAM
symbols is sent twice from two antennas. The second time the antennas swap
symbols, and the symbols are conjugated and one of them is negated (the
Alamouti space-time block code). A single-antenna receiver that knows the two
channel gains can then combine the two time slots into the diversity gain of
two receive antennas.

The encoder drives two 16-bit DAC/RF cards directly. It sends no complex
numbers. Each 16-QAM symbol is a short **sampled sinusoid** on the I rail and
another on the Q rail. The DAC card uses these sample values to modulate the
carrier. A symbol's amplitude class and phase are set by which waveform table
the sample values come from. The data source is an internal 8-bit counter, so
the transmitter runs stand-alone on a test bed. It starts each run with a few
known blocks that a receiver can use for timing synchronisation and channel
estimation.

```
                 +----------------+ ch1_busy   +------------+  ch1_dac.i/q, ch1_tx_on
                 |                |<-----------| TxCORE CH1 |-------------------------> DAC/RF card 1
                 |  TxController  |-enable---->|  (Tx0)     |
                 |  8-bit counter |-data-+---->+------------+
                 |  + handshake   |      |
                 |                |-enable---->+------------+  ch2_dac.i/q, ch2_tx_on
                 |                |<-----------| TxCORE CH2 |-------------------------> DAC/RF card 2
                 +----------------+ ch2_busy   |  (Tx1)     |
                                               +------------+
```

## The code each antenna sends

The controller supplies one data word per Alamouti block. TxCORE latches it into
two 4-bit symbols: `BUFF1 = data[7:4]` is X2 and `BUFF0 = data[3:0]` is X1. It
then plays two time slots of `N_POINTS` (32) clocks each:

| antenna        | time slot 1 (samples 0..31) | time slot 2 (samples 32..63) |
|----------------|-----------------------------|------------------------------|
| CH1 / Tx0      | X1 =  I1 + jQ1              | -X2* = -I2 + jQ2             |
| CH2 / Tx1      | X2 =  I2 + jQ2              |  X1* =  I1 - jQ1             |

Both cores get the same clock, reset, enable and data word, so they change time
slots on the same edge. The top asserts that their `tx_on` flags never differ.

## Waveform tables: how a symbol becomes DAC samples

This part is the least obvious. `qam16_rom` holds, for each of the 16 symbols,
a table of `N_POINTS` I samples and a table of `N_POINTS` Q samples. All values
are unsigned offset-binary DAC codes:

```
I[n] = round( a * 65535/2 * (1 + sin(2*pi*(n + p)/N_POINTS)) )
Q[n] = round( a * 65535/2 * (1 + sin(2*pi*(n + p - N_POINTS/4)/N_POINTS)) )
```

- `a` is the amplitude class of the point: 25 %, 75 % or 100 %. The inner
  points are 25 %, the corner points 100 %, and the eight edge points 75 %. At
  100 % the waveform spans the whole 0..65535 range.
- `p` is the point's phase, in table steps of 360/`N_POINTS` degrees (11.25°
  at 32 points). The inner and corner points sit at 45° + k·90°. The edge
  points sit at 22.5° or 67.5° in each quadrant: the true angles of 18.4° and
  71.6° are rounded to the grid.
- Q has the same sinusoid as I, 90° behind.

Examples: `0000` gives I = (25 %, 45°) and Q = (25 %, 315°). `0001` gives
I = (75 %, 22.5°) and Q = (75 %, 292.5°).

The tables are computed at elaboration from this formula, with `$sin` in a
constant function. No numbers are stored in the source. Changing `N_POINTS` (or
`DAC_BITS` in the package) regenerates them. `N_POINTS` must be a power of two of at least 16.

**Negating a rail is an address offset.** The waveform is a sinusoid around the
mid-level of its amplitude class. Its negative is the same sinusoid shifted by
180°, which is the entry `N_POINTS/2` further on. So `-I2` reads the I table of
X2 at `n + 16`, and `-Q1` reads the Q table of X1 at `n + 16`. For this reason
the ROM has separate I and Q read addresses. No subtractor is needed.

**Bit mapping.** Only the two points above are fixed by the source design. The
rest is this design's Gray-coded rectangular grid. `data[1]` and `data[0]` are
the sign and magnitude (1 or 3) of the in-phase level. `data[3]` and `data[2]`
are the same for the quadrature level. Amplitude depends only on the two
magnitude bits. The quadrant depends only on the two sign bits. To use another
mapping, change `qam16_amp_pct` and `qam16_phase_steps` in `alamouti_pkg`.

## Handshake and timing

The controller and the cores are two small state machines that talk over
`busy` and `enable`.

**TxController** (`tx_controller`):

- `WAIT_READY`: wait until neither core is busy. Then send a registered
  one-clock `enable` pulse to both cores.
- `WAIT_BUSY`: wait until both cores are busy. Then either count one
  known-symbol session (while `CNTR < KNOWN_SESSIONS`) or increment `data`.
  Return to `WAIT_READY`.

**TxCORE** (`tx_core`):

- `RESET`, then `INIT`: a 64-clock RF warm-up. `tx_on` stays low and `busy`
  stays high. The known symbol 0 is already played to the DACs.
- `READY`: `busy` is low. On `enable`, latch the buffers and go to `BUSY`.
- `BUSY`: `SYMBOL_INDEX` counts 0..31 in slot 1 and again in slot 2.
  `busy` drops one clock before the last sample, at slot 2 index 30. That
  lets the controller's registered enable land in the clock when the core is
  back in `READY`.

Cycle by cycle, from the enable pulse:

```
clock          e      e+1    e+2 .. e+64   e+65   e+66   e+67
enable         1      0      0             1      0      0
core state     READY  BUSY   BUSY          READY  BUSY   BUSY
busy           0      1      1 (0 at e+64) 0      1      1
tx_on          0      0      1             1      0      1
sample out     -      -      0 .. 62       63     -      0 of next block
```

The DAC outputs come from the ROM's output register, and `tx_on` is delayed to
match. So samples and `tx_on` are aligned, starting two clocks after the
enable. Each block has 64 clocks with `tx_on` high and one idle clock, so
blocks start every 65 clocks. After reset the first `tx_on` comes
`INIT_CYCLES + 4` clocks after reset is released.

`tx_core` asserts that `enable` only arrives in `READY`. An enable in any other
state would be lost. The controller's timing guarantees it never happens.

## Start-up sequence and data stream

1. The cores warm up for 64 clocks with the RF triggers off.
2. Four known-symbol blocks carry data `0x00`. They are counted by the
   controller's `CNTR`.
3. The counter itself starts at 0, so a fifth block also carries `0x00`. After
   that come `0x01`, `0x02`, and so on, wrapping from `0xFF` to `0x00`.

This follows the controller's state machine literally: it increments the data
only after the fourth counted session. If exactly four zero blocks are wanted,
set `KNOWN_SESSIONS` to 3.

## Interfaces

`alamouti_encoder_top`:

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | common clock |
| `rst`       | in  | 1     | synchronous reset, active high |
| `ch1_dac`   | out | 32    | `iq_t` struct: `.i`, `.q`, 16-bit unsigned DAC codes for antenna 1 |
| `ch1_tx_on` | out | 1     | RF trigger of antenna 1 |
| `ch2_dac`   | out | 32    | the same for antenna 2 |
| `ch2_tx_on` | out | 1     | RF trigger of antenna 2 |
| `data`      | out | 8     | controller's current data word (for observation) |

Parameters, with their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `N_POINTS` | 32 | samples per symbol per time slot; 64 or 128 give finer waveforms and 128- or 256-clock blocks |
| `INIT_CYCLES` | 64 | RF warm-up after reset |
| `KNOWN_SESSIONS` | 4 | known-symbol blocks counted before the data counter runs |

`tx_controller` also has `RESET_DATA`, the first data word. `tx_core` has
`CHANNEL`, either `CH1` or `CH2`, which selects that antenna's column of the
code.

## Files

- `rtl/alamouti_pkg.sv`: widths, the `iq_t` struct, the `channel_e` enum, and
  the constellation functions (amplitude class and phase of a symbol).
- `rtl/qam16_rom.sv`: the waveform tables, with synchronous read.
- `rtl/tx_core.sv`: TxCORE, one per antenna.
- `rtl/tx_controller.sv`: the data counter and handshake.
- `rtl/alamouti_encoder_top.sv`: the top.
- `tb/alamouti_tb_pkg.sv`: the reference model. It places each symbol on the
  ±1/±3 grid, takes the amplitude class from the point's distance and the
  phase from `atan2`, and computes the sinusoid. It does not use the RTL's
  tables.
- `tb/tb_qam16_rom.sv`, `tb/tb_tx_core.sv`, `tb/tb_tx_controller.sv`: unit
  testbenches.
- `tb/tb_alamouti_encoder_top.sv`: end-to-end test at default parameters.
- `tb/tb_alamouti_points.sv`: the encoder at 64 and 128 points per symbol,
  using `tb/alamouti_stream_checker.sv`.

## Verification

Every testbench checks itself. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

- `tb_qam16_rom` reads every table entry (16 symbols × 32 points × I/Q) and
  compares it with the geometric model, allowing 1 LSB for rounding. It also
  checks the two example symbols, the full 0..65535 swing at 100 %, the
  half-period negation, and the one-clock read latency.
- `tb_tx_core` runs both antenna variants through the warm-up and 40 random
  back-to-back blocks. It checks every sample against the Alamouti table
  above, plus the enable-to-`tx_on` latency, the 64-sample blocks, the early
  `busy` drop and the 65-clock period.
- `tb_tx_controller` replaces the cores with stand-ins whose `busy` rises and
  falls at random, independent times. It checks the enable rules and the data
  sequence over 271 blocks, including the wrap. Both kinds of waiting for a
  lagging channel must occur.
- `tb_alamouti_encoder_top` runs the whole design at its defaults for 265
  blocks, about 17,300 clocks and about 52,000 checks: warm-up, known
  sessions, all 256 data values and the wrap. It checks every sample of both
  antennas and counts each mechanism (warm-up, known session, increment, wrap,
  slot-2 conjugation). A mechanism that never occurs counts as a failure.
- `tb_alamouti_points` runs the same stream checks at 64 and 128 points.

Each unit test was also run against a copy of its module with one deliberate
bug. The bugs were: Q table without the 90° lag; CH2 conjugating the wrong
rail; controller starting when only one channel is free; both cores built as
CH1. Every copy failed its testbench.

To run a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv \
    rtl/alamouti_pkg.sv tb/alamouti_tb_pkg.sv tb/tb_alamouti_encoder_top.sv \
    --top-module tb_alamouti_encoder_top -o sim
./obj_dir/sim
```

## Where this design makes its own choices

These points are not fixed by the design it follows. They are decided here:

- **Waveform formula.** The offset-binary sinusoid, with mid-scale at
  a·32767.5, was inferred from the published simulation waveforms and example
  phases. The original tables were not available.
- **Bit-to-point mapping.** Only `0000` and `0001` are fixed. The rest is the
  grid described above.
- **75 % points.** All eight 75 % points have exactly the same amplitude. The
  original hardware showed three slightly different 75 % circles in its
  constellation capture. That is not reproduced, and its cause is unknown.
- **Negation by half-period table offset.** How the original negates a rail is
  not known.
- **Register timing.** Synchronous ROM read, registered enable pulse,
  synchronous active-high reset, and the single idle clock between blocks
  (65-clock period for a 64-clock code block).
- **State machine details.** In TxCORE, the early `busy` drop keeps counting
  the sample index, and the index restarts at 0 with every block. The source
  state chart leaves both points open.
- **Warm-up and known blocks.** The 64-clock warm-up is placed in TxCORE's
  `INIT` state. The known-symbol blocks are counted by the controller, as in
  its state chart. One description instead puts the known symbols in TxCORE's
  `INIT`.
- **Observation port.** The `data` output exists only for observation.

Not included: the DAC/RF cards, which are analog and outside the FPGA, and a
receiver or decoder. The decoder is only proposed for future work. Its
combining would use the received-signal model
`Y1 = h1·X1 + h2·X2 + n1`, `Y2 = -h1·X2* + h2·X1* + n2`.
