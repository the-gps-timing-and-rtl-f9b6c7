# GPS Timing and Control (GTC) firmware

This design timestamps the data of a large particle detector array. The
array's front end is a set of edge-sensitive TDCs (time-to-digital
converters) that record photomultiplier pulses in a window around each
trigger. A GPS receiver provides absolute time. Two FPGA cards turn it into
two things the TDC crate can use:

* **Clock card.** It keeps a microsecond BCD clock locked to GPS time.
  Every 10 us (or 20 us) it sends that time to one TDC as a burst of 32
  pulses. The TDC records the burst like any photomultiplier pulse. So
  every trigger window of that TDC contains an absolute timestamp, good to
  the minute, and it is read out with the physics data.
* **Control card.** It drives the TDC control bus: the periodic trigger
  (TRG, 40 kHz in normal running), clear (CLR) and counter reset (CRST).
  It also drives the signals a scaler system needs to measure dead time:
  a 10 MHz reference, "pause" pulses, "busy" pulses and a 100 Hz Load Next
  Event clock.

Both cards run from one 40 MHz clock. It comes from a PLL fed by the GPS
receiver's 10 MHz output. A control computer programs both cards over VME
(A24 addressing, 16-bit data).

```
             RS232 (NMEA)   1PPS   10 MHz                       VME A24D16
 GPS rx  ──────────┬──────────┬───────┬──────────────────────────────┬───────────────┐
                   │          │       │ (PLL, off-chip) ─► clk_40m   │               │
            ┌──────▼─────┐    │       │                      ┌───────▼──────┐ ┌──────▼────────┐
            │ nmea_s2p   │    │  ┌────▼────────┐             │ VME slave +  │ │ VME slave +   │
            │ time, fix, │    │  │phase_monitor│             │ clock regs   │ │ control regs  │
            │ sats, TDOP │    │  └─────────────┘             └──────────────┘ └──────┬────────┘
            └──────┬─────┘    │                                                      │
            ┌──────▼──────────▼──┐   ┌────────────────────┐  trigger_module ─► TRG   │
            │ internal_clock     ├──►│ timestamp_encoder  ├─► ts_out[31:0]          │
            │ ss.mmmuuu BCD, err │   └────────────────────┘  tdc_cmd_pulse x2 ─► CLR, CRST
            └──────┬─────────────┘                           lne_gen ─► LNE (100 Hz)
                   └─► health FIFOs (once per second)        ref10_gen ─► 10 MHz ref
            gps_config_tx ─► RS232 to the receiver           pause / busy pulse gens
                                                             sbc_readout_gen
       ─────────── Clock card (hclock_clock_fw) ───────     ── Control card (hclock_control_fw) ──
```

`gtc_top` puts both card firmwares side by side on one clock and one VME bus.

## The timestamp word and its pulse code

The clock has eight BCD digits: tens of seconds, seconds, then 100 ms,
10 ms, 1 ms, 100 us, 10 us and 1 us. It wraps from 59.999999 to
00.000000, so the timestamp gives the position within the current minute.
The minute and everything above it are rebuilt downstream from the data
acquisition computers' NTP-synchronized system time.

A timestamp is sent whenever the 1 us digit becomes 0. With the 20 us
interval selected, the 10 us digit must also be even. The word has 32
bits:

| `ts_out` bits | content |
|---|---|
| 31:28 | tens of seconds |
| 27:24 | seconds |
| 23:20, 19:16, 15:12 | 100 ms, 10 ms, 1 ms |
| 11:8, 7:4 | 100 us, 10 us |
| 3 | error 4: a bad NMEA sentence arrived during the last second |
| 2 | error 3: the receiver has no 2D/3D fix |
| 1 | error 2: communication with the receiver lost |
| 0 | error 1: the clock disagreed with GPS time at the last 1PPS |

Each bit has its own output line. The TDCs see only edges, not levels, so
a static word would be invisible to them. Instead all 32 lines rise
together at the start of the burst:

* a line carrying a 0 falls after 1 us (40 clocks)
* a line carrying a 1 falls after 2 us (80 clocks)

The decoder reads each channel's pulse width. As an example, time
12.34567 s with no errors is the word `0x12345670`.

A burst lasts 2 us. A new burst starts 10 us after the previous one, so a
25 us trigger window always holds at least two complete bursts.

`timestamp_encoder` latches the word on the first clock of the new
microsecond, raises all lines, and clears the 0-lines after `CLK_PER_US`
clocks and the rest after `2*CLK_PER_US`. `ts_word` and `ts_sent` show the
word on the chip for monitoring.

## Keeping the clock on GPS time

The receiver sends three NMEA 0183 sentences each second, followed by the
1PPS pulse whose rising edge starts the next second:

* `$POLYT`: UTC time
* `$GPGSA`: fix mode and satellites used
* `$POLYP`: timing dilution of precision, TDOP

`nmea_s2p` parses them from the RS232 stream (4800 baud, 8N1):

* It XORs every character between `$` and `*` and compares the result with
  the two hex digits after `*`. Only a sentence whose checksum matches
  updates the outputs.
* A mismatch, a bad hex digit, a `$` in the middle of a sentence or a UART
  framing error raises the NMEA error.
* Field positions: POLYT field 1 is `hhmmss.ss`; GPGSA field 2 is the fix
  and fields 3 to 14 are the satellites, counted when non-empty; POLYP
  field 16 is TDOP, kept as BCD `dd.dd`.

`internal_clock` is the part to read closely.

**Running the clock.** A prescaler counts `CLK_PER_US` = 40 clocks per
microsecond and advances the BCD digits with a ripple carry.

**Which second the 1PPS marks.** The POLYT time read during a second is
the time of that second. The next 1PPS therefore starts POLYT seconds + 1
(`SECOND_OFFSET`).

**Compare at each 1PPS.** At every synchronized 1PPS rising edge the clock
is compared with `ss.000000`:

* The clock value used is the one it would take on that edge, rounded to
  the nearest microsecond.
* The rounding matters. The 1PPS and the 10 MHz of this receiver type are
  not phase locked, so the 1PPS can land a few 25 ns clocks either side of
  the microsecond boundary. Without rounding every such 1PPS would count
  as a mismatch.
* The receiver counts as healthy when all of these hold:
  * a good POLYT arrived since the last 1PPS
  * the fix is 2 or 3
  * no NMEA error was seen in the last second
* On a mismatch with a healthy receiver, the clock is overwritten with
  `ss.000000` and the prescaler restarts.
* The first lock after power-up is the same overwrite.

**Error code.** The four error bits are recomputed at each 1PPS and held
for the whole second:

* Error 1 is set when a fresh time was available and did not match.
* Error 2 is set when no good POLYT came in the last second, or when no
  1PPS arrived for 1.5 s (`PPS_TIMEOUT`).
* Error 3 follows the GPGSA fix directly.

## Health monitoring

`phase_monitor` watches two things:

* **1PPS phase.** A counter runs modulo one microsecond (25 ns steps). The
  first 1PPS after power-up or after an overwrite sets the reference
  phase. A later 1PPS more than 2 clocks (50 ns) off sets the "1PPS-10MHz
  phase lock" flag. The signed deviation is readable, so software can
  average it.
* **10 MHz against 40 MHz.** The digitized 10 MHz must show a rising edge
  exactly every 4 clocks. Any other spacing during a second sets the
  "40MHz-10MHz phase lock" flag at the next 1PPS.

  A 40 MHz sampler cannot resolve the 5 ns phase error the original
  monitor is specified for. This check catches only slips of one clock
  (25 ns) or more.

One clock after each 1PPS, two 256-word FIFOs (`health_fifo`) receive:

* the status word:
  `{synced, 40/10 MHz lock error, 1PPS phase error, fix[1:0], satellites[3:0], 3'b0, error[3:0]}`
* the TDOP, BCD

They hold about four minutes of history for the control computer.

`gps_config_tx` holds up to 128 bytes of configuration text written over
VME. It sends the text to the receiver on command.

## Control card

`trigger_module` has three modes:

* **pause:** no triggers. This mode drives the pause pulses.
* **periodic:** one 4-clock TRG pulse every `period` clocks. The default
  is 1000 clocks, i.e. 40 kHz.
* **external:** one TRG pulse per rising edge of the synchronized
  external input.

The remaining Control-card blocks:

* `tdc_cmd_pulse`, two instances: a 4-clock CLR or CRST pulse for each
  VME command.
* `lne_gen`: 100 Hz square wave. It runs only while both the register
  enable and the scaler's LNE Enable input are high.
* `ref10_gen`: 40 MHz divided by 4, two clocks high and two low.
* `pause_pulse_gen` and `busy_pulse_gen`: a multiplexer between logic low
  and the 10 MHz wave. Pause selects the wave while the trigger is paused.
  Busy selects it while the OR of the `N_AF` = 24 synchronized TDC Almost
  Full inputs is high.
  * Both outputs are registered from `ref10_next`, the next value of the
    reference. They are therefore cycle-aligned with `ref10_out`, and a
    scaler can divide their counts by the reference count to get the dead
    time.
* `sbc_readout_gen`: a read-out request pulse to the DAQ computers. It
  fires on command or, if enabled, when the busy condition starts.

## VME registers

Both cards share `vme_a24d16_slave`:

* It accepts A24 address modifiers 0x39, 0x3A, 0x3D and 0x3E.
* It decodes a 256-byte window at the card's base address.
* It synchronizes AS* and DS*. DTACK* follows the data strobe after 4
  clocks for a write and 6 for a read.
* It releases the bus when both data strobes return high.
* D16 single cycles only.

Default base addresses: Clock card 0x100000, Control card 0x200000.

Clock card (byte offset = 2 x word index):

| word | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | RW | [0] timestamps enabled (1 after reset), [1] 20 us interval |
| 0x01 | STATUS | R | status word as in the FIFO |
| 0x02 | TIME_HI | R | s10 s1 ms100 ms10. Reading it latches TIME_LO |
| 0x03 | TIME_LO | R | ms1 us100 us10 us1 |
| 0x04 | GPS_HHMM | R | GPS hours and minutes, BCD |
| 0x05 | GPS_SS | R | GPS seconds (BCD), fix, satellites |
| 0x06 | TDOP | R | TDOP, BCD dd.dd |
| 0x07 | PHASE | R | [15:8] 1PPS deviation, [7:0] 1PPS phase (25 ns units) |
| 0x08 / 0x0A | FIFO0 / FIFO1 | R | pop status / TDOP FIFO |
| 0x09 / 0x0B | FIFOn_CNT | R | [15] overflow [14] full [13] empty [12:0] count |
| 0x10 | CFG_DATA | W | append a byte to the configuration text |
| 0x11 | CFG_SEND | W/R | write N: send N bytes; read: [15] busy, [7:0] bytes stored |

Control card:

| word | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | RW | [1:0] mode (0 pause, 1 periodic, 2 external), [4] LNE enable, [5] automatic read-out request |
| 0x01 / 0x02 | PERIOD_LO / HI | RW | trigger period in 40 MHz clocks (default 1000) |
| 0x03 | CMD | W | [0] CLR, [1] CRST, [2] read-out request |
| 0x04 | STATUS | R | [0] paused, [1] busy, [2] LNE Enable input |
| 0x05 / 0x06 | AF_LO / AF_HI | R | synchronized Almost Full inputs |

After reset, the trigger is paused with the 40 kHz period loaded and LNE
is enabled.

## Parameters

All defaults are the real-system values at 40 MHz.

| parameter (top) | default | meaning |
|---|---|---|
| `CLK_PER_US` | 40 | clocks per microsecond |
| `CLKS_PER_BIT` | 8333 | RS232 bit time (4800 baud) |
| `PPS_TIMEOUT` | 60,000,000 | clocks without 1PPS before "communication lost" |
| `FIFO_DEPTH` | 256 | health FIFO words |
| `TRIG_PERIOD` | 1000 | reset value of the trigger period (40 kHz) |
| `LNE_HALF` | 200,000 | half period of LNE (100 Hz) |
| `N_AF` | 24 | Almost Full inputs (24 TDCs) |
| `CLOCK_BASE`, `CONTROL_BASE` | 0x100000, 0x200000 | VME base addresses |

The testbenches lower the rate parameters to simulate seconds of operation
quickly. The logic is the same at any scale.

## Files

* `rtl/gtc_pkg.sv`: shared types (BCD time, error code, VME bundles) and
  register maps. Compile it first.
* `rtl/gtc_top.sv`: top level.
* `rtl/hclock_clock_fw.sv` and `rtl/hclock_control_fw.sv`: the two cards.
* Leaf modules as named above.
* Helpers `sync2`, `uart_rx` and `uart_tx`.
* `tb/`: one self-checking testbench `tb_<module>.sv` per module. Each
  prints `TB_RESULT checks=N failures=M`. Shared pieces:
  * `gps_receiver_model.sv`: 1PPS, NMEA sentences, 10 MHz, with fault
    injection.
  * `nmea_tb_pkg.sv`: builds NMEA sentences.
  * `ts_checker.sv`: decodes the timestamp channels by pulse width.
  * `vme_master_tasks.svh`: VME read and write tasks.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/gtc_pkg.sv tb/nmea_tb_pkg.sv \
  tb/tb_gtc_top.sv --top-module tb_gtc_top
./obj_dir/Vtb_gtc_top
```

Replace `tb_gtc_top` with any other testbench name.

* **`tb_gtc_top`**: the whole system at 2 clocks per microsecond (about 6
  simulated seconds, 15 s of run time). It:
  * locks to GPS
  * runs periodic and external triggers
  * issues CLR/CRST and a receiver configuration string
  * raises Almost Full, corrupts a sentence and switches to 20 us
  * reads the health FIFO

  It counts every mechanism and fails if one never occurred.
* **`tb_gtc_top_full`**: the top at its default parameters. It simulates
  4 s at 40 MHz with 4800-baud sentences, about 2.5 minutes of run time:
  * lock at the second 1PPS
  * ±2-clock (50 ns) 1PPS jitter after lock, with no overwrite or phase
    flag
  * more than 20,000 decoded timestamps compared against the receiver
    model's time
  * 400 triggers in 10 ms, each with a burst start within the 10 us before
    it
  * LNE, and the pause and busy pulses
* **Card testbenches.** These also cover:
  * 1PPS jitter tolerance
  * the minute rollover
  * FIFO overflow
  * a 10 MHz slip
  * the VME address-modifier and base-address filters

## Own choices and limits

These points are not fixed by the system description. Check them before
connecting real hardware:

* The RS232 rate, the NMEA field positions and the BCD TDOP format.
* The rule that a POLYT names the second before the next 1PPS.
* The ±0.5 us rounding window and the exact "healthy receiver" condition.
* The order of the four error bits.
* The register maps, base addresses, reset defaults and pulse widths
  (4 clocks).
* The 256-word FIFO depth and the status word layout.
* The 40/10 MHz phase check resolves 25 ns, not 5 ns.
* Almost Full inputs: the Control card is described as accepting up to 64
  inputs, while its firmware diagram shows 24. The default here is 24.
  `N_AF` can be raised, but the AF_LO/AF_HI readback shows only the first
  32.
* The external trigger and the read-out request are implemented but
  untested against real hardware. The original system does not use them
  in normal running either.
* Outside the logic and not modelled here:
  * the 10 to 40 MHz PLL
  * the LVDS/ECL level shifting
  * the six-fold fan-out cards
  * the TDCs and the DAQ computers

  The receiver appears only as a testbench model.
