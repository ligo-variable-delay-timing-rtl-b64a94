# Variable delay timing board

A data-acquisition crate samples its ADCs and updates its DACs in step with GPS
time. A GPS receiver supplies a 2^22 Hz (4 194 304 Hz) clock that is phase-locked
to a 1 pulse-per-second (PPS) signal. This board turns those two signals into what
the converters and the front-end software need:

* **ADC clocks**: the 2^22 Hz clock itself, with a 50 % duty cycle, on six outputs.
* **DAC clocks**: on four outputs, once per sample period (16384 Hz or 2048 Hz), a
  burst of 1 to 4 short pulses. The burst starts a programmable delay after the
  nominal sample instant, and one nominal instant coincides with the PPS edge. The
  DACs have a three-stage pipeline, so several pulses per sample push a new value
  all the way to the analog output within the same sample period.
* **ADC polling bit or interrupt**: after a second programmable delay, the board
  sets a status bit and counts how many samples have gone by since software last
  looked. In interrupt mode it raises a VMEbus interrupt instead. Software then
  reads the ADCs only after conversion has finished, because reading or polling
  them during conversion raises their noise.
* **Clock integrity**: a sticky error bit is set when a second does not hold
  exactly 2^22 clock cycles. A second bit reports whether the clock and PPS
  inputs are connected and running.
* **Resynchronisation**: a register write stops every delay and DAC clock and
  empties the poll counter. The delays and DAC clocks restart in step with the
  next PPS edge.

Everything is controlled from the VMEbus through a short-I/O (A16), 16-bit slave
interface.

## The time base: phase within the second

All timing hangs on one counter, the phase, in `pps_phase_counter`. It counts
2^22 Hz cycles from the last PPS edge and wraps every 2^22 cycles. Each PPS edge
sets it back to zero. The GPS receiver locks the clock and PPS, so PPS is simply
sampled by two flops on the 2^22 Hz clock. The edge is seen three clock edges
after PPS rises.

Both sample rates divide the second exactly: 16384 Hz is 2^8 clock cycles and
2048 Hz is 2^11 clock cycles. So the nominal sample instants are just the
phases whose low 8 (or 11) bits are zero. No separate sample counter is needed,
and every sample instant is tied to the PPS edge by construction.

After reset, and after a resynchronise command, `running` is low and the phase
holds at zero. Nothing downstream produces ticks until the next PPS edge starts
the count.

## Delays and the DAC pulse burst

`delay_tick_gen` compares the low phase bits with an 8-bit delay register and
emits one registered tick per sample period:

| rate      | period (cycles) | step (cycles) | tick when                          |
|-----------|-----------------|---------------|------------------------------------|
| 16384 Hz  | 256             | 1             | `phase[7:0]  == delay`             |
| 2048 Hz   | 2048            | 8             | `phase[10:0] == {delay, 3'b000}`   |

At either rate, the 256 delay values span the whole period. Two instances are
used: one for the DAC clock and one for the ADC poll/interrupt. Each has its own
delay register and rate bit.

`dac_pulse_train` turns each DAC tick into `npulse_m1 + 1` pulses. Each pulse is
4 cycles high (0.95 µs) and 4 cycles low, so a 4-pulse burst lasts 7.6 µs. A
burst started during another one restarts it.

**Latency is built out.** The PPS edge is only seen on the third clock edge
after the PPS rise. At that point the phase counter is loaded with 2 instead of
0, so phase 0 is the cycle that starts at the first clock edge after the rise:
the nominal sample instant. The DAC tick, pulse and output registers add three
more cycles. The DAC `delay_tick_gen` therefore compares against
`delay × step − 3` (modulo the period). The net effect is that the first DAC
pulse of a burst rises exactly `delay × step` clock edges after the nominal
instant. With delay 0 it rises on the first clock edge after the PPS rise.

The catch comes after a resynchronise. Bursts due in the first three cycles
after the PPS that restarts the board are skipped, because the board cannot
know about that PPS yet. Every later burst is on time.

## Polling, missed samples and interrupts

The ADC tick crosses into the bus clock domain and drives `adc_poll_irq`:

* **Polling mode.** Each tick sets STATUS bit 0 and increments STATUS[15:8].
  Reading STATUS clears both. Software that polls STATUS until bit 0 is set, and
  keeps up, always reads a count of 1. A count above 1 means samples were
  missed. The count saturates at 255. A resynchronise command also empties the
  count, the poll bit and any pending interrupt request.
* **Interrupt mode.** Each tick raises a request on the programmed level
  IRQ1*–IRQ7*. The interrupt acknowledge cycle releases it (release on
  acknowledge). The counter does not run in this mode.

## Clock integrity

`clock_error_detector` restarts a 23-bit counter at every PPS edge. At the next
edge the counter must read 2^22 − 1, meaning the two edges were exactly 2^22
cycles apart. Any other value sets `clk_err`. If no PPS arrives within 1024
cycles after the expected instant, `pps_present` drops and `clk_err` is also
set. The first edge after a loss only starts a new measurement. The error stays
set until software writes CTRL bit 14.

The timing domain cannot report that its own clock has stopped, so
`clock_activity_monitor` works in the bus domain. A bit of a 3-bit counter on
the input clock changes every 4 cycles (about 1 µs). The bus domain restarts a 64-cycle timer on
every change it sees; at 16 MHz that is 4 µs. STATUS bit 2 ("clocks active")
is high when that toggle is alive and PPS is present.

## Clock domains

| domain | clock | blocks |
|--------|-------|--------|
| timing | 2^22 Hz input (`clk_in`) | `pps_phase_counter`, `clock_error_detector`, 2 × `delay_tick_gen`, `dac_pulse_train`, `clock_outputs` |
| bus    | board oscillator (`bus_clk`, 16 MHz assumed) | `vme_slave`, `vme_regs`, `adc_poll_irq`, the timer of `clock_activity_monitor` |

The bus side has its own oscillator so that the VMEbus interface, and the
clock-active bit in particular, keep working with no input clock. Signals cross
between the domains as follows:

* **Configuration** (rates, pulse count, both delays) goes into the timing domain
  through `cdc_bus_sync`. Each bit passes a two-flop synchroniser, and the word
  is loaded only once it has been stable for two cycles. A new setting takes
  effect about 5 input clocks after the write.
* **Resynchronise and clear-error pulses** (bus to timing), and **the ADC tick**
  (timing to bus), pass through toggle synchronisers (`cdc_pulse_sync`).
* **Status levels** (clock error, running) pass through two-flop synchronisers
  (`cdc_sync`).
* **Reset.** `rst_sync` asserts the VMEbus SYSRESET* asynchronously in each
  domain and releases it synchronously.

## VMEbus interface

* **Addressing.** The board answers address modifiers 0x29 (non-privileged
  short I/O) and 0x2D (supervisory short I/O) when A15..A10 match the six
  base-address switches. A3..A1 select a register. A9..A4 are not decoded, so
  the 8-word block repeats within the board's 1 KiB window. All accesses are
  16-bit words.
* **Handshake.** AS*, DS0*, DS1* and IACKIN* are synchronised to the bus clock.
  DTACK* falls about 4–5 bus clocks after the strobes and is held until both
  data strobes are released.
* **Interrupt acknowledge.** The board answers with its vector only if it has a
  request pending at the level on A3..A1. Otherwise it passes IACKIN* on as
  IACKOUT*.

Register map (offsets from the base address):

| offset | name      | access | contents |
|--------|-----------|--------|----------|
| 0x00   | CTRL      | rw     | [0] DAC rate (0 = 16384 Hz, 1 = 2048 Hz); [1] ADC poll rate; [3:2] DAC pulses per period − 1; [4] interrupt mode; write-1 pulses: [14] clear clock error, [15] resynchronise (both read 0) |
| 0x02   | DAC_DELAY | rw     | [7:0] delay in steps |
| 0x04   | ADC_DELAY | rw     | [7:0] delay in steps |
| 0x06   | STATUS    | ro     | [0] poll bit; [1] clock error; [2] clocks active; [3] aligned to PPS; [4] interrupt pending; [15:8] polling ticks since last read. A read clears [0] and [15:8] |
| 0x08   | JUMPERS   | ro     | [0] ADC polarity jumper; [4:1] DAC polarity jumpers; [15:10] base-address switches |
| 0x0A   | IRQ_CFG   | rw     | [2:0] interrupt level (0 = off); [15:8] vector |

All registers reset to 0: 16384 Hz, one pulse, polling mode, zero delays,
interrupts off.

## Outputs

`clock_outputs` drives each output as a differential pair (`_p` and `_n`) for
an external differential TTL driver:

* **ADC outputs** are the input clock passed through an XOR with the single ADC
  polarity jumper. They are a clock path, not registered data.
* **DAC outputs** are the pulse train retimed by one flop, each XORed with its
  own polarity jumper.

## Parameters of `vdt_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `N_ADC`, `N_DAC` | 6, 4 | number of ADC and DAC clock outputs |
| `CLK_LOG2` | 22 | input clock cycles per PPS = 2^CLK_LOG2 |
| `FAST_LOG2`, `SLOW_LOG2` | 8, 11 | sample periods in input cycles (16384 Hz, 2048 Hz) |
| `PULSE_HI`, `PULSE_LO` | 4, 4 | DAC pulse high and low time in input cycles |
| `ACT_TIMEOUT` | 64 | bus cycles without input clock activity before "clocks active" drops; must exceed 4·f_bus/2^22 + 4 |
| `PPS_MARGIN` | 1024 | input cycles past the expected PPS before a PPS is declared missing |

The delay registers are `FAST_LOG2` bits wide, and `SLOW_LOG2 − FAST_LOG2` sets
the slow-rate step. With a real 2^22 Hz clock, `CLK_LOG2` must stay 22.
Smaller values only shorten the "second" for simulation.

## How far this follows its specification

The functions listed at the top all come from the board's requirements, along
with:

* the sample rates and delay step sizes;
* the 1/2/4 pulse selection and the roughly 1 µs pulse width;
* the output counts and polarity jumpers;
* the A16 addressing with switches on A15..A10;
* the IRQ1–7 level and 0–255 vector.

The requirements fix neither a register map nor an implementation, so the
following are this design's own choices:

* the register map and bit positions;
* the 4-cycle pulse low time and the fourth pulse-count code. The code
  selecting 3 pulses matches the three-pulse illustration in the requirements;
* the separate rate select and delay for the ADC poll;
* the poll count that clears on read;
* release-on-acknowledge interrupts;
* interrupt level and vector as registers rather than jumpers;
* the two clock domains and the crossings between them;
* how clock activity and a missing PPS are detected;
* waiting for the next PPS after a resynchronise;
* D16-only access with partial address decoding.

The requirements leave pulse width, pulse frequency, clock skew and jitter as
"to be determined". The values above are placeholders; jitter and skew depend
on the output drivers and board layout, not on this logic.

The following are not part of the RTL:

* the ECL input receivers;
* the differential TTL output drivers;
* the LEMO connectors and mechanics;
* the GPS equipment upstream;
* the ADC and DAC modules.

The requirements list six ADC and four DAC outputs; a crate drawing in the same
specification shows five of each. The counts are parameters.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_vdt_top` runs the whole board with a shortened second (2^12 cycles), and
  so covers many seconds. It checks:
  * DAC burst positions and pulse counts at both rates;
  * polling, with and without missed samples;
  * ticks per second at both rates;
  * interrupts and their vectors;
  * resynchronisation;
  * an injected missing clock pulse and its clear;
  * a stopped input clock;
  * jumper readback and polarity.

  It fails if any of these never happened.
* `tb_vdt_top_full` runs the board with every parameter at its default
  (2^22 cycles per second) for about 2.3 simulated seconds. It covers locking
  to PPS, DAC bursts at both rates, polling, interrupts, and a clean clock check
  over a whole second. It takes under a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/vdt_pkg.sv tb/tb_vdt_top.sv --top-module tb_vdt_top
./obj_dir/Vtb_vdt_top
```

Replace `tb_vdt_top` with the name of any other testbench. The lint command is
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/vdt_pkg.sv rtl/vdt_top.sv`.

## Files

* `rtl/vdt_pkg.sv`: address modifiers, register indices, bit positions, configuration struct.
* `rtl/vdt_top.sv`: the board.
* Timing domain:
  * `rtl/pps_phase_counter.sv`
  * `rtl/clock_error_detector.sv`
  * `rtl/delay_tick_gen.sv`
  * `rtl/dac_pulse_train.sv`
  * `rtl/clock_outputs.sv`
* Bus domain:
  * `rtl/vme_slave.sv`
  * `rtl/vme_regs.sv`
  * `rtl/adc_poll_irq.sv`
  * `rtl/clock_activity_monitor.sv`
* Crossings and reset:
  * `rtl/cdc_sync.sv`
  * `rtl/cdc_pulse_sync.sv`
  * `rtl/cdc_bus_sync.sv`
  * `rtl/rst_sync.sv`
* `tb/tb_<module>.sv`: one testbench per block, plus `tb/tb_vdt_top_full.sv`.
