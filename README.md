# Four-input, eight-channel photon coincidence counter

Quantum-optics experiments often need to know how often two, three or four
single-photon detectors fire at the same moment. This design counts such
coincidences. Four TTL detector inputs (A, B, C, D) feed eight independent
counting channels. Each channel counts one chosen combination of the inputs:
a single input, or any 2-, 3- or 4-fold coincidence. The counts are collected
over a fixed interval of 20 µs to 1 s and then sent to a PC through a USB FIFO
chip.

The design follows a published low-cost coincidence-counting module. That
module uses discrete TTL gates for the pulse shaping and the coincidence
gates, and a small FPGA for the counters. This repository contains:

* synthesizable SystemVerilog for the FPGA part: counters, interval timer,
  USB FIFO writer and clock-output divider;
* synthesizable SystemVerilog for the coincidence gates;
* a behavioural (simulation-only) model of the gate-delay pulse shaper;
* a board-level top that wires all of these together the way the module does.

## How a coincidence is detected

Each detector pulse is first shortened by a **pulse shaper** (`pulse_shaper`).
The shaper ANDs the pulse with a delayed, inverted copy of itself, so every
rising edge becomes a pulse exactly as long as the delay. Two toggle switches
pick one of three delays, or bypass the shaper:

| `shape_sel` | shaped width                        | coincidence time τc = 2w |
|-------------|-------------------------------------|--------------------------|
| `00`        | 7.5 ns                              | 15 ns                    |
| `01`        | 9.0 ns                              | 18 ns                    |
| `10`        | 11.5 ns                             | 23 ns                    |
| `11`        | bypass: input pulse + 10 ns         | depends on the input     |

The widths are the measured widths of the original module. The real delays
are gate propagation delays, so the model uses transport delays and cannot be
synthesized.

The shaped pulses go to the **coincidence gates** (`coinc_logic`). Each
channel ORs every input with an *exclude* bit and ANDs the four results:

    coinc[ch] = &(shaped | exclude[ch])

A channel's output is high only while all of its included inputs are high.
Two pulses are therefore counted as coincident when their leading edges are
less than one shaped width apart. For independent random streams this gives
an accidental-coincidence rate of R_AB = τc · R_A · R_B, with τc = 2w.

In the original module the exclude bits come from a 4 × 8 grid of latching
pushbuttons: a row for each input and a column for each channel. A pressed
button includes the input, and a released one holds the OR input high, which
excludes it. The gate outputs also drive TTL outputs (`ttl_out`). These can
feed the inputs of further modules: two modules' 4-fold outputs fed into a
third module give 8-fold coincidences.

Timing details to keep in mind:

* The gate outputs are asynchronous pulses. They are not synchronised to the
  FPGA clock, and they can come faster than it does.
* The model has no propagation delay, so a shaped pulse starts exactly at its
  input's rising edge.
* A pulse that follows the previous one on the same input by less than the
  selected delay is partly masked by the delayed copy of the previous one.
  The shaped pulse then starts late and lasts only as long as the gap, which
  is also how the gate circuit behaves.
* If a channel has all four inputs excluded, its output is stuck high and it
  counts nothing.

## Counting, and the blind cycle

This is the part that needs the most care.

### Counting registers

Each channel has a **counting register** (`count_channel`) that is clocked by
the coincidence pulse itself. It advances on every leading edge, so it can
count at rates well above the 50 MHz master clock. The original module counts
periodic pulses up to 84 MHz.

### Interval timer and the blind cycle

The **interval timer** (`interval_timer`) runs on the 50 MHz master clock. It
counts `period_cycles` cycles, which is 50e6 / R for an acquisition rate R
between 1 Hz and 50 kHz. It then raises `blind` for exactly one cycle (20 ns).
During that cycle:

1. the counting registers ignore their inputs, so their values are stable;
2. at the clock edge that ends the cycle, every count is copied into its
   channel's **storage register** (`counts`), and the counting registers
   restart from zero;
3. one cycle later `counts_valid` pulses. The FIFO writer then takes the
   stored values while the counting registers are already counting the next
   interval.

Pulses whose leading edge falls in the blind cycle are lost. The active
fraction of each interval is therefore

    T_active = T · (1 − R / 50 MHz)

For example, at R = 50 kHz that is 999 of every 1000 cycles.

### How many pulses the blind cycle loses

A periodic pulse train loses the edges that land in the 20 ns window:

| input rate        | edges lost per interval                        |
|-------------------|------------------------------------------------|
| below 50 MHz      | none or one, depending on phase                |
| 50 to 100 MHz     | one or two                                     |
| above 100 MHz     | at least two                                   |

A train locked to the master clock can be given a phase that never hits the
window. Locked trains at 10, 25 and 40 MHz then count exactly rate × T. The
original module showed the same effect at somewhat lower rates: losses began
above 37 MHz, and two counts per interval were lost above 74 MHz. Its window
is wider in practice because of gate and routing delays, which this
zero-delay RTL does not model.

### Restarting a counter that runs on another clock

A counting register cannot be cleared directly from the master-clock domain:
it is clocked by the pulse. Instead, every channel keeps an **epoch bit** on
the master-clock side, and the counting register remembers the epoch of its
last pulse:

* **Counting.** If the bits differ, the first pulse of the new interval loads
  1 instead of incrementing, and the register copies the epoch.
* **At a transfer, if the bits are equal.** Pulses arrived in this interval,
  so the count is stored and the epoch bit toggles. That marks the count as
  stale.
* **At a transfer, if the bits differ.** The interval was silent, so 0 is
  stored and the epoch bit is left alone.

Because a silent interval does not toggle the epoch, a stale count can never
look current again, however many silent intervals follow. The epoch bit and
the count are only read while the counting register is frozen by `blind`.

### Counter width

A count that exceeds 2^CNT_W − 1 within one interval wraps around. With
16-bit registers, one interval holds at most 65,535 counts. At 84 MHz this
means R ≥ 1282 Hz; at 10 MHz it means R ≥ 153 Hz. The host adds intervals
together for longer integration times.

## Getting the counts out: the FIFO writer

`fifo_writer` sends every interval's storage values to a USB FIFO chip with
an FT245-style asynchronous write port. The chip holds `txe_n` low while it
has room, and it latches `data` on the falling edge of the active-high `wr`.

### Frame format

Each interval produces one set: channel 0 first, each value least significant
byte first, in ceil(CNT_W/8) bytes. At the default sizes that is 16 bytes per
interval. There is no header: the host finds set boundaries by counting bytes
from reset.

### Timing of each byte

For every byte the writer:

1. waits until `txe_n`, passed through a two-flop synchroniser, is low;
2. drives the byte and holds `wr` high for 3 cycles (60 ns);
3. holds the data one more cycle after `wr` falls;
4. waits 4 more cycles before looking at `txe_n` again, so that the chip's
   response to this write has passed the synchroniser.

That is 9 cycles (180 ns) per byte when the chip has room, or 2.9 µs per set.
This fits well inside the shortest interval of 20 µs.

### When the host stops reading

If a new set arrives while the previous one is still being sent, the new set
is dropped and the sticky `overrun` flag is set. Only reset clears it. The
host then sees one interval missing from the stream.

## Clock output

`clk_out_divider` divides the master clock into a TTL clock output of 10 MHz,
1 MHz, … down to 1 Hz. `clkout_sel` selects the rate: 0 gives 10 MHz and 7
gives 1 Hz.

The divider is a divide-by-5 prescaler followed by seven divide-by-10
stages. All of them run on the master clock with enables. The output is
registered.

* At 10 MHz the output is high for 2 of every 5 cycles (40 % duty).
* The lower rates have 50 % duty.

Because the output comes from the same oscillator, it can be fed back into an
input as a self-test: it gives exactly 200 counts per 20 µs interval. It can
also be used to phase-lock external pulse generators or other equipment.

## Files and hierarchy

    ccm_top                 board level: 4 x pulse_shaper -> coinc_logic -> ccm_fpga
      pulse_shaper          behavioural model, one per input
      coinc_logic           8 OR/AND gates
      ccm_fpga              synthesizable FPGA contents
        interval_timer      counting interval, blind cycle
        count_channel x 8   counting + storage register
        fifo_writer         storage values -> USB FIFO chip
        clk_out_divider     10 MHz .. 1 Hz clock output
    ccm_pkg                 shared constants and enums (shape_sel_e, clkout_sel_e)

Each file opens with a comment that describes its ports and timing.

* **`ccm_fpga`** is the unit to synthesize for an FPGA. Its coincidence inputs
  are used as clocks, so the FPGA tools must accept them as clocks.
* **`ccm_top`** is for simulation, because of the shaper model.

Some parts of the module have no logic function, so they appear only as ports
of `ccm_top`:

| part                                  | port                  |
|---------------------------------------|-----------------------|
| input termination                     | `det_in`              |
| TTL line drivers                      | `ttl_out`             |
| pushbuttons and their LEDs            | `exclude`             |
| 50 MHz oscillator                     | `clk`                 |
| USB FIFO chip                         | `ft_*`                |
| host software                         | not modelled          |

### Parameters

All parameters default to the original module's sizes:

| parameter              | default   | meaning                                  |
|------------------------|-----------|------------------------------------------|
| `NUM_IN`               | 4         | detector inputs                          |
| `NUM_CH`               | 8         | channels                                 |
| `CNT_W`                | 16        | counter width                            |
| `MIN_PERIOD`           | 1000      | shortest interval, in cycles (20 µs)     |
| `MAX_PERIOD`           | 5·10^7    | longest interval, in cycles (1 s)        |
| `PERIOD_W`             | 26        | width of the interval input              |
| `W_SHORT` … `BYPASS_EXTRA` | see the shaper table | shaper widths, in `pulse_shaper` |

`period_cycles` values outside the MIN/MAX range are clamped. The original
module could also be built with six 20-bit channels: set `NUM_CH = 6` and
`CNT_W = 20`. Each value is then sent as 3 bytes.

## Simulating

Every testbench in `tb/` checks its own results. Each one prints
`TB_RESULT checks=N failures=M` and stops. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ccm_top \
        -y rtl -y tb +libext+.sv rtl/ccm_pkg.sv tb/tb_ccm_top.sv
    ./obj_dir/Vtb_ccm_top

`--timing` is required: the testbenches and the shaper model use delays.

Each test uses simulated time in nanoseconds and a 50 MHz clock. The block
testbenches are:

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_coinc_logic`      | every include mask against every input pattern |
| `tb_pulse_shaper`     | the shaped widths for each setting, short inputs, and pulses closer than the delay |
| `tb_clk_out_divider`  | period and high time at all eight rates, 10 MHz … 1 Hz (about a minute: it simulates 2.3 s) |
| `tb_interval_timer`   | blind-cycle spacing and length, period change, clamping |
| `tb_count_channel`    | random trains up to about 100 MHz, pulses in the blind cycle, silent intervals, 4-bit wrap |
| `tb_fifo_writer`      | byte order, 9-cycle byte rate, host stalls, overrun, handshake assertion |
| `tb_ccm_fpga`         | FPGA part with random trains and the clock output looped back; storage values and FIFO bytes checked against a reference |
| `tb_six_channel`      | the 6 × 20-bit build next to the default 8 × 16-bit build over 1 ms intervals with an 80 MHz train: exact 20-bit counts, 3-byte values, 16-bit wrap |

The whole module is run at its default sizes by these testbenches:

| testbench             | what it does |
|-----------------------|--------------|
| `tb_ccm_top`          | end to end: random multi-input events, window hits and misses for every shaper setting, two pushbutton configurations, coincidences in the blind cycle, a dropped set, two clock-output rates |
| `tb_periodic_rates`   | periodic trains at 10, 37, 50, 74 and 84 MHz, free-running and phase-locked |
| `tb_cascade`          | three modules counting 8-fold coincidences at 30 MHz, with a skewed input that must suppress them |
| `tb_random_rates`     | two independent random streams; checks singles exactly and τc = R_AB / (R_A R_B) against 2w for settings 00, 01, 10 |

`tb/ft_fifo_model.sv` is a behavioural model of the USB FIFO chip's write
side. It accepts bytes with a random recovery time, can be held full, and
flags protocol errors.

Apart from `tb_clk_out_divider`, every test simulates at most 5 ms of module time and finishes in seconds.

## How far to trust it, and where it departs from the original

What follows the original module:

* the gate structure;
* the shaper principle and its measured widths;
* eight 16-bit pulse-clocked counters with storage registers;
* one 20 ns blind cycle per interval;
* a 20 µs to 1 s counting interval;
* the decade clock output.

The following are this design's own choices:

* **The epoch hand-over** between the pulse-clocked counters and the
  master-clock side.
* **Wrap-around** of a full counter.
* **The FIFO byte format and handshake.** Byte order, no header, and the wr
  and txe_n timing all follow the usual FT245-style write timing.
* **Dropping a set on overrun**, with the sticky flag.
* **Clamping** of the interval length.
* **The clock divider structure** and its 40 % duty at 10 MHz.
* **Control inputs as plain ports.** The counting interval and the
  clock-output rate arrive as inputs. In the original both are chosen by the
  user, but how the choice reaches the FPGA is not specified.

Known differences in behaviour:

* **Coincidence time.** The shaper model counts any overlap as a coincidence,
  so τc = 2w exactly (15, 18 and 23 ns). Real gates need a minimum overlap,
  and the original module measured τc of about 12.0, 14.6 and 20.4 ns with
  random pulse sources. To match those numbers, reduce `W_SHORT`,
  `W_MEDIUM` and `W_LONG` to about τc/2.
* **Effective blind window.** It is exactly 20 ns here. In the real module,
  delays widen it, so losses on periodic trains start at lower rates.
* **No propagation delay, no rise and fall times.** The model has no upper
  limit on the counting rate. The real module's counts start to fluctuate
  above about 84 MHz, and its coincidences drop to zero near 150 MHz.
* **Clock-domain crossing.** The counters sample `blind` asynchronously. The
  freeze relies on `blind` being stable well before a transfer; any single
  edge arriving within a setup window of the blind cycle's start or end may
  or may not be counted. An FPGA implementation needs timing constraints on
  the `blind` and epoch paths.
* **No higher-level protocol.** The USB protocol, the chip's block transfers
  to the PC, and the host software are outside this RTL.
