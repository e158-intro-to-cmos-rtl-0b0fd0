# Alarm clock core with two-phase latch registers

This is a small alarm-clock chip core. It keeps 12-hour time with an a.m./p.m. flag and lets the
user set the clock time and an alarm time with hour and minute buttons. It sounds an alarm for the
minute in which the clock matches the stored alarm. The time or the alarm time it is being set to
is shown on four seven-segment digits. The clock is a 1 Hz two-phase clock: one cycle is one
second, and each cycle that a button is held counts as one press.

The design is split the way the original custom chip was:

- a **datapath** of regular cells that holds all time state and compares clock and alarm time;
- a **clock controller**, pure combinational logic, that decides every cycle which counters step
  and which clear;
- an **LED decoder** that turns the displayed time into segment patterns.

## Pins

| Pin | Dir | Meaning |
|---|---|---|
| `ph1`, `ph2` | in | two non-overlapping phases of the 1 Hz clock |
| `reset` | in | synchronous clear of all state (time becomes 12:00:00 a.m., alarm 12:00 a.m.) |
| `cset` | in | set-clock mode: seconds held at 0; `setmin`/`sethr` step the clock |
| `aset` | in | set-alarm mode: `setmin`/`sethr` step the alarm; display shows the alarm |
| `apower` | in | alarm on/off |
| `sethr`, `setmin` | in | hour / minute button, one step per cycle while high |
| `buzz` | out | alarm sounding |
| `ampm` | out | 1 = p.m. for the displayed time |
| `LED0`..`LED3` | out, 7 bits each | minute ones, minute tens, hour ones, hour tens |

The segment outputs are active high with bit 6 = segment a down to bit 0 = segment g. The hour
tens digit is blank for 1 to 9 o'clock.

## How time is kept

Every digit is a 6-bit binary counter (`counter6`): seconds 0..59, minute ones 0..9, minute tens
0..5, hour 0..11. Hour 0 is displayed as 12. Each counter can only do three things in a cycle:
increment, clear or hold. Counters never wrap on their own. The controller asserts a counter's
reset in the cycle it steps past its terminal count. Reset beats enable.

When the clock is running (`cset` low), the controller builds the carry chain from comparisons
against the terminal counts 59, 9, 5 and 11:

```
sec.en      = 1                       sec.rst      = sec==59 | reset
min_ones.en = sec==59                 min_ones.rst = min_ones.en & min_ones==9 | reset
min_tens.en = min_ones.en & m1==9     min_tens.rst = min_tens.en & m10==5     | reset
hr.en       = min_tens.en & m10==5    hr.rst       = hr.en & hr==11           | reset
ampm toggle = hr.en & hr==11
```

So the display goes 11:59:59 a.m. -> 12:00:00 p.m., and 11:59:59 p.m. -> 12:00:00 a.m.

The a.m./p.m. flags live in the **ampm cell**. It holds two one-bit registers, one for the clock
and one for the alarm. Each register toggles by loading its own inverted output.

## Setting the clock and the alarm

With `cset` high, the seconds counter is held at 0 and the running carries are off. `setmin`
steps the minute. The ones digit carries into the tens digit, but 59 wraps to 00 without
touching the hour. `sethr` steps the hour, and going from 11 to 12 toggles a.m./p.m.

With `aset` high, the same buttons step a separate set of alarm counters, with the same wrap
rules. The clock keeps running at the same time. `cset` and `aset` may be high together: then
each button press steps both.

Each of the three **alarm cells** (minute ones, minute tens, hour) contains:

- the clock counter for that digit;
- the alarm counter for that digit;
- a display multiplexer that shows the alarm digit while `aset` is high;
- a register that stores the alarm digit.

The stored register is the one the alarm comparison uses. It loads on every cycle that `aset` is
high, and it samples the alarm counter *before* that cycle's increment. So the stored alarm
trails the last button press by one cycle. Keep `aset` high for one more cycle after the last
press, or the alarm is stored one step short. The a.m./p.m. flag of the alarm is compared
directly, without such a copy.

## The alarm

The **buzzer** cell uses three 6-bit equality comparators (one XNOR per bit into a 6-input AND).
It compares clock minute ones, minute tens and hour with the stored alarm digits, and XNORs the two
a.m./p.m. flags. `buzz` is the AND of these matches and `apower`. It is combinational from state,
so:

- the alarm sounds for exactly the 60 cycles of the matching minute;
- it stops by itself when the minute changes;
- it can be silenced within the minute by dropping `apower`.

After reset, clock and stored alarm are both 12:00 a.m., so `buzz` follows `apower` until one of
them is changed.

## Two-phase clocking

All state is held in `flopenr`, a master-slave register built from two level-sensitive latches:

- the master is transparent while `ph2` is high;
- the slave is transparent while `ph1` is high.

In front of the master, a select stage picks zero (reset), `d` (enable) or the register's own
output (hold). The value present at the end of the `ph2` pulse appears on `q` when `ph1` rises.
A cycle therefore looks like this:

```
ph2 high  : controller outputs and buttons are sampled into the master latches
ph2 low   : (gap, both phases low)
ph1 high  : slaves open, new state appears, combinational outputs settle
ph1 low   : (gap)
```

Change the inputs while `ph1` is high or in a gap, and keep them steady while `ph2` is high.

The scheme needs `ph1` and `ph2` never to be high together. While both are high, master and
slave would be transparent at once, and a counter's incrementer feedback would run freely. Lint
and synthesis tools report each register's feedback path as a combinational loop for the same
reason. These warnings are expected: with non-overlapping phases one latch of every pair is
always closed.

The counters' incrementer is a ripple chain of half adders. The first stage's second input is
tied high, so the chain adds one. Each half adder is an XOR gate plus an AND gate.

## Module map

```
alarmclock            top: the core, chip pins as ports
 ├─ datapath
 │   ├─ counter6       seconds
 │   │   ├─ halfadder x6 ── xor2
 │   │   └─ flopenr ── latch x2
 │   ├─ ampm_cell      2 x flopenr(1 bit) + display mux
 │   ├─ alarm_cell x3  2 x counter6 + display mux + flopenr (stored alarm)
 │   └─ buzzer         3 x comparator6 + a.m./p.m. XNOR + AND
 ├─ clockController    enables and resets
 └─ LEDdecoder
     ├─ sevenseg x2    minute digits
     └─ sevenseg_hr    both hour digits from 0..11
```

`alarmclock_pkg` holds:

- the digit width (6) and the terminal counts;
- the segment constants and the digit-to-segment function;
- two structs: `ctrl_t`, the 22 enable/reset wires from controller to datapath, and `counts_t`,
  the seven counter values fed back to the controller.

## Simulating

Each testbench in `tb/` is self-checking. It prints `TB_RESULT checks=N failures=M` and stops by
itself; each has a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/alarmclock_pkg.sv tb/tb_util_pkg.sv tb/tb_alarmclock.sv --top-module tb_alarmclock
./obj_dir/Vtb_alarmclock
```

Replace `alarmclock` with any module name to run its unit test. `-Wno-fatal` is needed. Verilator
reports every latch pair as circular logic (`UNOPTFLAT`, see above), and without the flag it
stops on those warnings. The simulation itself is correct: Verilator settles the latch network
on every phase edge.

`tb_alarmclock` is the end-to-end test, at the design's only size. It runs about 176,000 cycles
and takes well under a second:

- a reference model keeps the time as plain integers and is stepped in lock-step with the design;
- every output is compared after every cycle;
- it starts with 3,000 cycles of random button activity, including resets and both set modes at
  once;
- it then sets the clock to 11:58 a.m. and the alarm to 12:01 p.m. and runs two full days, the
  alarm on the first day and off the second.

It checks that the alarm sounds exactly once, for exactly 60 cycles. It also counts each
mechanism and fails if one never happens:

- the seconds, minute and hour carries;
- the a.m./p.m. toggles;
- each kind of set, with its wrap;
- alarm display and storing;
- alarm on, alarm muted by `apower`, and alarm ending at the minute change;
- reset.

The unit tests cover each cell:

- the gates, the half adder, the comparator and the decoders are tested exhaustively;
- the register is tested at random, including the phase timing within a cycle;
- the counter, alarm cell, ampm cell and datapath are tested at random against integer models;
- the controller is tested over random counter states biased towards terminal counts.

## What is the original design and what is added here

Taken from the original design:

- the partition into datapath, controller and decoder;
- the cells inside the datapath (counter, ampm, three alarm cells, buzzer) and their wiring;
- the controller's enable/reset equations and terminal counts;
- the latch-pair register with reset priority;
- the half-adder incrementer and XNOR/AND comparator;
- the segment patterns, and the 12-for-0 hour display;
- the pin names and the LED digit order.

Choices made here:

- **Pads.** The original chip wraps the core in a 40-pin frame of library pad cells. They are not
  included: the top module is the core, and its ports are the chip's logical pins. There are no
  supply pins.
- **Clock phases.** `ph1`/`ph2` are assumed non-overlapping (see above).
- **Reset.** Reset is synchronous and clears everything, including the alarm, to 12:00 a.m.
- **Polarities.** The a.m./p.m. polarity (1 = p.m.) and the segment polarity (1 = lit, bit 6 =
  segment a) are choices made here.
- **Out-of-range values.** Digit values outside 0..9 (hour outside 0..11) blank the display.
  They cannot occur after reset.
- **Gate level.** Gates are written as logic expressions, not transistor networks. The XOR, for
  example, was a hand-drawn static CMOS gate in the original.
- **Structs.** The controller-to-datapath wires are grouped into structs. The terminal counts are
  package constants.

Known behaviours kept on purpose, because the original logic has them:

- the one-cycle lag of the stored alarm;
- minute setting does not carry into the hour;
- buttons are not debounced (one step per cycle held).
