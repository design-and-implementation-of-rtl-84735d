# DSSS transmitter with a DDFS-BPSK output stage

This is a direct-sequence spread-spectrum (DSSS) transmitter for a small FPGA.
A slow data stream is made wideband by splitting each data bit into many short
pseudo-random "chips". The resulting chip stream then phase-modulates (BPSK) a
sine carrier that a direct digital frequency synthesiser (DDFS) builds. A PC
sets three things over a serial line: the carrier frequency, the spreading
factor (how many chips make up one data bit) and a reset that stops the
spreading.

Everything runs from one 50 MHz clock. At the default sizes:

| quantity | value |
|---|---|
| data rate | 1 kbit/s, a fixed 1010... square-wave pattern |
| chip rate | 50, 100, 500 or 1000 kchip/s, chosen by command |
| spreading factor K_SS = chips per data bit | 50, 100, 500, 1000 |
| PN code | 10-bit shift register, period 2^10 - 1 = 1023 chips |
| carrier | F_OUT = 50 MHz * L / 2^24, L a 24-bit tuning word; 2.98 Hz steps; 3 Hz to 10 MHz is the intended range |
| sine table | 8192 x 8 bit, phase step 360/8192 = 0.044 degrees |
| output | 8-bit unsigned DAC code, 128 = zero |

## Signal chain

```
            +-----------+ data
 50 MHz --->| data_gen  |---------------------+
   |        |  (:N0)    |                     |     +-----------+
   |        +-----------+                   (XOR)-->| ddfs_bpsk |--> bpsk_out (8 bit)
   |        +----------------+ chip_tick +------+  ^ |           |--> sin_out  (8 bit)
   +------->| chip_clock_sel |---------->| pncg |--+ +-----------+
   |        | :N1..:N4 + mux |           |q[9]  | chip     ^ code_f (L)
   |        +----------------+           +------+          |
   |               ^ factor_ss              ^ pn_reset     |
   |        +------------+----------------------------------+
 uart_rxd ->| pc_control (uart_rx + 7-byte frame decoder)   |
            +-----------------------------------------------+
```

1. **Data** (`data_gen`). A divider by N0 = 100000 gives a square wave with a
   2 ms period. Each half period is one data bit, so the data rate is
   2 * 50 MHz / N0 = 1 kbit/s and each bit lasts N0/2 = 50000 clocks. The data
   pattern is fixed. There is no data input port.
2. **Chip rate** (`chip_clock_sel`). Four dividers by N1..N4 = 1000, 500, 100
   and 50 run all the time. A 4-to-1 multiplexer, steered by `factor_ss`
   (0..3), picks one of them. Its one-clock pulse steps the PN generator.
3. **PN code** (`pncg`). This is a 10-bit left-shifting register. It is
   described below.
4. **Spreading** (`spreader`). The modulating bit is `data XOR chip`.
5. **BPSK** (`ddfs_bpsk`). The modulating bit selects a phase offset: 0 when it
   is 1, and 180 degrees when it is 0. That offset is added to the DDFS phase
   before the sine look-up.

### Why the chip count per bit is always exact

Spreading works only if every data bit holds a whole number of chips, and
always the same number. Two things guarantee that here:

- each chip divider divides the bit length: 50000 / {1000, 500, 100, 50} =
  {50, 100, 500, 1000};
- all dividers leave reset together and never stop.

A chip boundary therefore falls on every data-bit boundary, whatever factor is
selected. If the factor changes in the middle of a bit, that one bit is
irregular. The next bit is exact again, because the dividers never lost their
alignment. `dsss_top` checks the divisibility at elaboration.

The divided signals are not used as clocks. Each divider produces a one-clock
`tick` in the cycle where its count is 0, which is the rising edge of its
square wave. The PN register uses that tick as a clock enable. The square
waves are still brought out (`data`, `chip_clk`) for observation on a scope.

## The PN code generator

```
  q[9] q[8] ... q[3] q[2] q[1] q[0]   <- shifts left on each chip enable
   |               |                ^
   +-----XOR-------+-->NOT----------+   new q[0] = ~(q[9] ^ q[2])
   |
   +--> chip
```

The feedback is the XNOR of bits 9 and 2, i.e. the polynomial x^10 + x^3 + 1,
which is primitive. The period is therefore the maximum, 1023 chips. At
1 Mchip/s that is 1.023 ms; at 50 kchip/s it is 20.46 ms.

With XNOR feedback (not XOR), the all-zero state is a member of the 1023-state
cycle. The state that locks up is all ones. This is why reset can clear the
register to zero and still start a maximal sequence. The first states after
zero are 001, 003, 007, 00E, 01C, 038, 071 (hex). Over one period the chip
(`q[9]`) is 1 on 511 chips and 0 on 512. An assertion in `pncg` flags the
all-ones state.

While the PC's reset bit is set, `pn_reset` holds the register at zero. The
chip is then constantly 0, and the output is the plain, unspread BPSK of the
data. When the bit is cleared, the code restarts from zero at the next chip
enable.

## DDFS-BPSK modulator

```
 code_f (L) -> [ accumulator, 24 bit ] --AC--+-------------------> [sine ROM] -> sin_out
                                             |
 mod ? 0 : 2^23 ---------------------------(+)--ACUM[23:11]------> [sine ROM] -> bpsk_out
```

- The accumulator adds L every clock, modulo 2^24. Output frequency
  F_OUT = F_CLK * L / 2^24, and the tuning word for a wanted frequency is
  L = 2^24 * F_OUT / F_CLK. Examples at 50 MHz: 1 MHz -> 335544,
  50 kHz -> 16777, 10 MHz -> 3355443, L = 1 -> 2.98 Hz.
- The phase code for phase phi is 2^24 * phi / (2 pi). That gives 0 for 0
  degrees and 8388608 = 2^23 for 180 degrees. Adding 2^23 only flips the top
  bit of the phase, so the modulated ROM address is the carrier address plus
  half a table.
- The top 13 bits of each phase address an 8192 x 8 sine table. There are two
  tables. One is read at the modulated phase (`bpsk_out`). The other is read at
  the bare accumulator phase (`sin_out`), an unmodulated reference carrier.
- Table word k = 128 + round(127 * sin(2 pi k / 8192)): offset binary from 1 to
  255, with mid-scale 128. Because of the symmetry of this table, a 180-degree
  shift gives exactly `256 - sin_out`.
- `sine_rom` computes the table at elaboration using integer arithmetic only:
  quarter-wave folding plus a Taylor series in 30-bit fixed point. No data
  file is needed, and synthesis tools that do not evaluate `real` can still
  build it. Each table is 64 kbit and should map to block RAM.

**Latency.** The accumulator register and the ROM output register each take one
clock. `bpsk_out` therefore reflects the modulating bit two clocks after that
bit changes.

The 8-bit codes drive an external DAC, followed by a reconstruction low-pass
filter. Neither is part of this RTL.

## Command interface

The PC sends one 7-byte command. The meaning of the payload bytes is fixed by
the system: a 24-bit frequency code, a spreading-factor byte, a reset byte, and
two bytes for framing. The order and the framing values are this
implementation's choice:

| byte | content |
|---|---|
| 0 | header 0xA5 |
| 1, 2, 3 | tuning word L, most significant byte first |
| 4 | spreading factor select in bits [1:0]: 0 = 50, 1 = 100, 2 = 500, 3 = 1000 |
| 5 | bit 0 = 1 holds the PN generator cleared (spreading off) |
| 6 | tail 0x5A |

Bytes arrive as 8N1 serial frames, 115200 baud by default (`CLKS_PER_BIT` =
434 clocks at 50 MHz), for example from a USB-to-serial adapter. How the
receiver and decoder behave:

- `uart_rx` samples each bit in its middle. It rejects start-bit glitches and
  reports a low stop bit as an error.
- `pc_control` ignores bytes while it waits for a header.
- It applies all three settings together, in the clock after a correct tail
  byte, and pulses `frame_ok`.
- A wrong tail byte, or a byte error inside a frame, throws the whole frame
  away and pulses `frame_err`.
- After reset the settings are L = 335544 (1 MHz), factor 50 and spreading on.

The PC converts a frequency in hertz into L before sending. The FPGA receives
L directly.

## Files

| file | content |
|---|---|
| `rtl/dsss_pkg.sv` | constants (divider ratios, widths, frame markers) and the `ss_factor_e` enum |
| `rtl/dsss_top.sv` | top level, wiring as in the diagram above |
| `rtl/clk_divider.sv` | modulo-N counter with square-wave output and tick |
| `rtl/data_gen.sv` | divider N0 as the data source, plus a bit-start pulse |
| `rtl/chip_clock_sel.sv` | four chip dividers and the factor multiplexer |
| `rtl/pncg.sv` | 10-bit XNOR PN generator |
| `rtl/spreader.sv` | the XOR |
| `rtl/phase_accumulator.sv` | 24-bit DDFS accumulator |
| `rtl/sine_rom.sv` | registered 8192 x 8 sine table computed at elaboration |
| `rtl/ddfs_bpsk.sv` | accumulator, phase-code mux, phase adder, two sine ROMs |
| `rtl/uart_rx.sv` | serial receiver |
| `rtl/pc_control.sv` | 7-byte command decoder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/dsss_monitor.sv` | cycle-by-cycle reference model used by both top-level testbenches |
| `tb/tb_dsss_top.sv` | end-to-end test at reduced sizes |
| `tb/tb_dsss_full.sv` | end-to-end test at the default sizes |

`dsss_top` parameters: `N0`, `N1`..`N4` (divider ratios) and `CLKS_PER_BIT`.
Widths (10-bit PN, 24-bit accumulator, 13-bit ROM address, 8-bit samples) are
in `dsss_pkg`. To add a larger spreading factor, for example 5000 chips per
bit, set `N4 = 10`. That replaces the factor-1000 setting, because the
multiplexer has four inputs.

Synthesised size of the top (coarse, technology independent): about 180
flip-flops, about 150 word-level cells and 2 x 64 kbit of ROM.

## Simulation

Every testbench prints one `TB_RESULT checks=N failures=M` line and ends with
`$finish`. It also has a watchdog that fails the run if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/dsss_pkg.sv \
          tb/tb_dsss_full.sv --top-module tb_dsss_full -Mdir obj_full
./obj_full/Vtb_dsss_full
```

Replace `tb_dsss_full` with any other testbench name to run that one. Each
testbench finishes in seconds. The full-size one simulates about 500,000
clocks, 10 ms of operation.

What the testbenches establish:

- **Dividers, data, chip selection.** Exact tick positions and duty cycles
  against a cycle count, for all four factors, including switching the factor
  while running.
- **PN generator.**
  - The first states after clear are checked against values worked out by hand.
  - The period is exactly 1023, with no repeated state.
  - The all-ones state never occurs.
  - Exactly 511 ones occur per period.
  - The register holds when the enable is low, and clear overrides it.
- **DDFS.**
  - The accumulator is compared with a 64-bit model, including random tuning
    words.
  - All 8192 table words are compared with `$sin`.
  - The modulator output matches a real-valued model every clock, with the
    two-clock latency.
  - L = 335544 gives about 100 carrier periods in 5000 clocks (1 MHz).
- **Serial path.**
  - 200 random bytes are received intact.
  - A stop-bit error is reported and a glitch is ignored.
  - Commands are checked: good frames, stray bytes, a wrong tail and a byte
    error inside a frame.
- **End to end** (`dsss_monitor`). Every output of `dsss_top` is compared every
  clock with an independent model. That includes the PN register, the spread
  bit and both DAC codes. The monitor also counts chips per data bit.
  - `tb_dsss_top` uses reduced sizes: N0 = 200 and dividers 20/10/4/2, so the
    factors are 5/10/25/50.
  - `tb_dsss_full` uses the default sizes. It sends real 115200-baud commands
    for factor 50 at 50 kHz, factor 100 at 1 MHz, factor 500 at 500 kHz and
    factor 1000 at 10 MHz, then holds the PN generator cleared. Each run must
    show:
    - complete bits measured at every factor;
    - at least one full 1023-chip PN period;
    - a PN clear;
    - tuning-word changes;
    - accepted frames, plus (at reduced sizes only) a rejected frame.

## Design choices and departures

- **Single clock with enables.** The original scheme clocks the PN register
  from the multiplexed output of the chip dividers. Here it is clocked by the
  50 MHz clock and enabled by the divider ticks. The chip timing is identical,
  and the design avoids a gated, multiplexed clock.
- **Reset.** The system reset `rst_n` is asynchronous and active low. The PC's
  reset command is a synchronous clear of the PN register. The original has a
  single asynchronous clear on the register.
- **Zero start state.** The PN register starts from zero, as the asynchronous
  clear of the original does. Under XNOR feedback this is a regular state, not
  a lock-up.
- **Own choices where nothing was specified:**
  - the divider duty cycle (high for the first N/2 counts);
  - a first data bit of 1;
  - the ROM contents and format (offset-binary sine, 127 amplitude);
  - the serial format, baud rate, byte order and framing bytes;
  - the reset values of the settings.
- **Spreading factors.** The four factors are 50, 100, 500 and 1000, the values
  the dividers produce. The operator interface of the original lists its choices
  as 100, 500, 1000 and 5000. Factor 5000 needs a divider of 10 (see above).
- **Not implemented:**
  - the 50 MHz oscillator, the DAC and the output low-pass filter, which are
    analog or off-chip;
  - the PC control program and the USB link. The testbenches model the PC as a
    serial line driver.
  - a receiver (despreader). This is a transmitter only.
