# Programmable Multi-Timer (PRMT) in SystemVerilog

The Programmable Multi-Timer is a laboratory timing unit built for
transuranic-waste assay by active photon interrogation. After each
accelerator pulse the experiment must open two counting windows, one for
prompt and one for delayed photofission neutrons, at programmable delays
and widths. The timer does that. It also keeps the time of day, opens
gates at set wall-clock times up to three days ahead, and provides
reference pulse trains. Every setting is entered on a front panel as a
two-digit function address and four decimal digits, and is kept in a small
RAM that can be read back on the display or printed.

This repository is a synthesizable RTL model of that instrument. It runs on
a single 10 MHz clock, like the original oscillator. The original was built
from discrete low-power Schottky TTL; this model keeps its block structure
and its programming model. Where the instrument's description says what a
block does but not how, the choice made here is stated below and in each
file's header.

## The two counters and the time formats

Everything is timed by two decade counters running from the 10 MHz clock:

* **RTC counter** (`rtc_counter`), free-running. A divide-by-ten prescaler
  makes 1 us. Seven decade stages follow, so `tick[N]` is a one-clock pulse
  every 10^N us, for N = 0..7 (1 us to 10 s). These rates drive the
  internal trigger, the two reference frequencies and, through `tick[6]`,
  the one-second tick of the time-of-day clock.
* **Triggered counter** (`trig_counter`), eight decade stages cleared by
  every trigger. Its `tick[N]` comes every 10^N us *after the trigger*,
  exactly aligned to it.

A trigger-relative time is written `M2 M1 M0 N` and means M2M1M0 x 10^N us,
with M from 000 to 999 and N from 0 to 7. The longest time is therefore
999 x 10^7 us, about 2.8 hours. Each programmed time has its own
`time_match` unit. N selects decade N of the triggered counter, and a
three-digit BCD counter counts those ticks until it equals M2M1M0. Four such
units (T1 start and stop, T2 start and stop) run in parallel every 100 ns
clock. This parallelism is why the original was built in hardware and not
around a microprocessor.

The match pulse comes exactly `M x 10^(N+1)` clocks after the clock edge
that takes the trigger. M = 000 matches on that edge itself. N = 8 or 9
never matches.

## Triggered gates T1 and T2

Each `t_channel` has four registered outputs, all one clock after the
matches, so their relative timing is exact:

| output    | behaviour                                        |
|-----------|--------------------------------------------------|
| `t_dly`   | high from the trigger to the start time          |
| `t_start` | one-clock (100 ns) pulse at the start time       |
| `t_gate`  | high from the start time to the stop time        |
| `t_stop`  | one-clock pulse at the stop time                 |

Start and stop times are both measured from the trigger. The stop time is
not measured from the start. A new trigger ends any open gate and starts
over. If the stop time is not later than the start time, the stop pulse
still appears but the gate stays closed until the start time. This is a
choice made here.

**Trigger selection** (`trigger_select`). Digit A of address 07 selects the
source: 0 means the internal trigger, any other value means the EXT TRIG
input (the instrument defines 1). Digit D sets the internal period,
10^D us. The internal trigger is always available on `int_trig_out`,
whichever source is selected. EXT TRIG is synchronized by two flip-flops and
acts on its rising edge, so a trigger reaches the counters three clocks
(300 ns) after the edge. The TRIGGER DELAY input (`trig_inhibit`, high =
disable) blocks new triggers and leaves a running cycle alone.
`trig_enable` shows the result.

Resetting clears all latches to zero. After reset the timer therefore runs
on the internal trigger at 1 us, with every time set to zero, until it is
programmed.

**Coincidence gate** (`coinc_gate`). This gate enables a pulse height
analyzer during T1. If a data pulse (`lld`) is already present when T1
rises, the gate stays closed until that pulse has ended. This keeps the
analyzer from starting on a truncated pulse. Pulses that arrive later, while
the gate is open, do not affect it. `lld_neg` selects active-low data
pulses. `coinc` follows T1 one clock later. After a hold-off it opens three
clocks after the data pulse ends.

## Time of day and the RTC gates

`tod_clock` is a 24-hour BCD clock (HH:MM:SS). A STORE to address 05 sets
hours and minutes from the data switches and clears the seconds. At each new
minute it pulses `minute_pulse`.

The two wall-clock gates, RTC1 and RTC2, are the least obvious part of the
design. Their start and stop times (HHMM) are **not** latched. They stay in
RAM at addresses 12-15 and are only compared once a minute:

1. `minute_pulse` starts the memory controller's update sequence. A small
   counter steps through five RAM addresses on five consecutive clocks.
2. First it writes the current HHMM into address 05, so the RAM copy of the
   time of day (and the print-out) stays current.
3. It then reads addresses 12, 13, 14 and 15. `rtc_compare` compares each
   word with the clock's HHMM. The decoded address turns an equal word into
   a start or stop pulse for RTC1 or RTC2.
4. `rtc_gate` opens or closes its gate and emits one-clock `rtc_start` and
   `rtc_stop` pulses.

**Day delays.** A STORE to address 07 also loads digits B (start) and C
(stop) into the delay counters of the RTC gate selected by the
`rtc_delay_sel` toggle (0 = RTC1). The digit codes 1, 2, 4 and 8 mean 0, 1,
2 and 3 days. A delay of d days lets the first d matches of that time pass,
one per day, and the next match acts. After the delay has run out the gate
repeats every day. The instrument specifies the code. How a delay counts
down and the daily repetition are this model's reading. Digits other than
the four codes use their highest set bit, and 0 means no delay.

Because RAM resets to zero, every RTC time reads 00:00 until programmed. At
midnight an unprogrammed gate therefore gives start and stop pulses, but its
gate stays closed, because stop wins over a simultaneous start.

## Programming model

| address | data     | display   | meaning                                               |
|---------|----------|-----------|-------------------------------------------------------|
| 00-04   | XXXX     | XXXX 0Y   | free channels (date, run number, ...)                 |
| 05      | HHMM     | HHMMSS    | time of day (presets the clock; display runs live)    |
| 06      | --N2N1   | ...  06   | reference frequency periods 10^N1, 10^N2 us           |
| 07      | ABCD     | ...  07   | A trigger select, B/C RTC day delays, D internal rate |
| 08-11   | M2M1M0N  | ...  0811 | T1 start, T1 stop, T2 start, T2 stop                  |
| 12-15   | HHMM     | ...  12-15| RTC1 start, RTC1 stop, RTC2 start, RTC2 stop          |

Digits are BCD, and the leftmost digit is in bits [15:12].
`func_addr_decode` converts the two BCD address digits to binary. Settings
above 15, or with a non-decimal digit, are ignored. The decoder also routes
the store strobe to the data latch of addresses 05-11.

`memory_control` owns the single RAM port:

* **STORE**: writes the switches in one clock (pulsing `store_wr`), then
  reads the word back into the display in the next clock.
* **DISPLAY**: reads the selected word into the display.
* **Minute update**: the five-clock sequence described above.

Requests wait until served. The minute update goes first, then STORE, then
DISPLAY. During a print cycle the pushbuttons are ignored.

`display` shows six BCD digits (`disp_digits[5]` is leftmost): four data
digits and the decimal address. For address 05 it shows the running clock
instead.

## Print interface

`print_control` sends the sixteen RAM words, 0 to 15, to an external
printing loop, one word at a time. The original connects to an ORTEC
printing loop and a Model 777A printer. That loop's electrical protocol is
not reproduced here. In its place is a plain handshake:

* a rising edge on `print_start` hands control to the timer;
* for each word, the timer raises `prn_strobe` with `prn_data` and
  `prn_addr` valid, and waits for `prn_ack` to go high, then low;
* after word 15, `print_done` pulses for one clock to pass the loop on.

The printer reads the RAM only when the memory controller is idle. A minute
update therefore delays a word by a few clocks but never corrupts it. A
real ORTEC loop needs an adapter around this block.

## Reference frequencies

`ref_freq_gates` gives two pulse trains, each a 100 ns pulse every
10^N1 us or 10^N2 us, taken from the RTC counter (address 06). A digit of 8
or 9 turns that output off.

## Files

| file | contents |
|------|----------|
| `rtl/prmt_pkg.sv` | BCD types, time structs, address constants, BCD helpers |
| `rtl/decade_chain.sv` | chain of synchronous decade counters (helper) |
| `rtl/rtc_counter.sv`, `rtl/trig_counter.sv` | the two counters |
| `rtl/trigger_select.sv`, `rtl/time_match.sv`, `rtl/t_channel.sv`, `rtl/coinc_gate.sv` | triggered side |
| `rtl/func_addr_decode.sv`, `rtl/param_latches.sv`, `rtl/prmt_ram.sv`, `rtl/memory_control.sv`, `rtl/display.sv`, `rtl/print_control.sv` | programming, memory, display, print |
| `rtl/tod_clock.sv`, `rtl/rtc_compare.sv`, `rtl/rtc_gate.sv`, `rtl/ref_freq_gates.sv` | time-of-day side |
| `rtl/prmt_top.sv` | the whole timer |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_prmt_top.sv` | end-to-end test, time of day accelerated |
| `tb/tb_prmt_full.sv` | one full operation at the real rates |
| `tb/tb_time_range.sv` | longest programmable time, 999 x 10^7 us, with the decade ticks driven directly |

Top-level parameter: `SEC_RATE` (default 6) is the RTC decade used as the
one-second tick. Testbenches set it to 0 so that a day lasts 864,000 clocks.
All other sizes are the instrument's: 16 x 16 RAM, seven RTC decades, eight
triggered-counter decades, three-digit times.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. A
watchdog ends it if it hangs. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/prmt_pkg.sv tb/tb_prmt_top.sv \
          --top-module tb_prmt_top -Mdir obj_top
./obj_top/Vtb_prmt_top
```

Replace `tb_prmt_top` with any other testbench name. The packages must be
listed first; `-y rtl` finds the modules.

`tb_prmt_top` covers about two simulated days of time of day (a little
under 900,000 clocks) and finishes in about a second. It programs
everything through the front panel and checks:

* T1/T2 edge timing to the clock;
* the coincidence hold-off;
* TRIGGER DELAY;
* the internal trigger;
* both reference periods;
* store, read-back, display and invalid-address handling;
* the live clock display and two midnights;
* the RAM copy of the time of day;
* all RTC1/RTC2 events, including a one-day RTC2 delay;
* a full print cycle with the buttons locked out.

It counts each of these mechanisms and fails any that never happened.
`tb_prmt_full` runs the unmodified top at real rates: T1 = 5-15 us and
T2 = 1-2 ms after an external trigger, one real second of the clock
(10 million cycles, a few seconds of simulation), and a print-out.

## Where this model departs from, or adds to, the instrument

* Synchronous single-clock design. Counter decade outputs are enable pulses,
  not divided clocks. All asynchronous inputs get two-flop synchronizers.
  The external trigger therefore has a fixed 300 ns latency.
* The RTC counter has a 1 us prescaler ahead of its seven decades. Seven
  decades alone, counting from 10 MHz, would not reach the 10^7 us rate that
  the internal trigger and reference outputs allow.
* Pulse widths: all start/stop/reference pulses are one clock (100 ns). The
  instrument only calls them short.
* The memory controller's five update addresses (05, 12, 13, 14, 15), its
  priorities, and the one-clock RAM timing are choices made here.
* The printing-loop protocol is a generic handshake (see above).
* Not modelled: the crystal oscillator (it is the `clk` input), the
  front-panel switches, LED drivers, BNC connectors and NIM packaging (they
  are ports), and the external printer.
* The instrument also lists "rate information" from all counter decades as
  programmable outputs, without saying how. The model exposes the
  triggered counter's count (`elapsed_bcd`) and the RTC rates only through
  the functions above.
