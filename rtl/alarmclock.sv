// Alarm clock core: a 12-hour clock with a settable alarm, driven by a 1 Hz two-phase clock.
//
// Three blocks: the datapath holds the clock, alarm and a.m./p.m. state and compares clock and
// alarm time; the clock controller derives every counter enable and reset from the user inputs
// and the counters' terminal counts; the LED decoder turns the displayed time into four
// seven-segment patterns.
//
// Clocking: ph1 and ph2 are two non-overlapping phases of the same clock, one cycle per second.
// Registers sample at the end of ph2 and update when ph1 rises; inputs should be stable around
// the ph2 pulse. reset is synchronous and must be held for at least one cycle.
// Use: hold cset and pulse setmin/sethr to set the clock (one step per cycle, seconds held at 0);
// hold aset and pulse setmin/sethr to set the alarm, keeping aset high for one cycle after the
// last press so the alarm is stored. While aset is high the display shows the alarm time. With
// apower high, buzz is high during the minute in which clock and stored alarm time (including
// a.m./p.m.) agree.
// Outputs: LED0..LED3 = minute ones, minute tens, hour ones, hour tens; bit 6 = segment a,
// bit 0 = segment g, active high. ampm = 1 for p.m.
// All state sits in latch pairs (see flopenr); the combinational-loop warnings tools give for
// this design are the master-slave feedback paths described there and are expected.
module alarmclock
  import alarmclock_pkg::*;
(
  input  logic ph1,
  input  logic ph2,
  input  logic reset,
  input  logic cset,
  input  logic aset,
  input  logic apower,
  input  logic sethr,
  input  logic setmin,
  output logic buzz,
  output logic ampm,
  output seg_t LED0,
  output seg_t LED1,
  output seg_t LED2,
  output seg_t LED3
);

  ctrl_t   ctrl;
  counts_t counts;
  digit_t  hr, min_ones, min_tens;

  datapath dp (
    .ph1(ph1), .ph2(ph2), .reset(reset), .aset(aset), .apower(apower),
    .ctrl(ctrl), .buzz(buzz), .ampm(ampm), .counts(counts),
    .hr(hr), .min_ones(min_ones), .min_tens(min_tens)
  );

  clockController controller (
    .reset(reset), .cset(cset), .aset(aset), .setmin(setmin), .sethr(sethr),
    .counts(counts), .ctrl(ctrl)
  );

  LEDdecoder leds (
    .hr(hr), .min_ones(min_ones), .min_tens(min_tens),
    .hr_ones_segs(LED2), .hr_tens_segs(LED3), .min_ones_segs(LED0), .min_tens_segs(LED1)
  );

endmodule
