// Clock controller: turns the user inputs and the counters' terminal counts into the enable and
// reset of every counter in the datapath.
//
// Running (cset low): the seconds counter is enabled every cycle and clears after 59; the
// minute ones digit steps when seconds wrap, the minute tens when minute ones wrap from 9, the
// hour when minute tens wrap from 5, and the clock a.m./p.m. bit toggles when the hour wraps
// from 11 to 0. One clock cycle is one second.
// Setting the clock (cset high): seconds are held at 0, setmin steps the minute (the tens digit
// carries from the ones digit, but minutes wrap from 59 to 0 without touching the hour) and
// sethr steps the hour (toggling a.m./p.m. on the 11 -> 0 wrap), one step per cycle.
// Setting the alarm (aset high): setmin and sethr step the alarm counters the same way.
// Every counter clears when it steps past its terminal count and when reset is high.
// Purely combinational; the ctrl bundle is sampled by the datapath registers at the end of ph2.
module clockController
  import alarmclock_pkg::*;
(
  input  logic    reset,
  input  logic    cset,
  input  logic    aset,
  input  logic    setmin,
  input  logic    sethr,
  input  counts_t counts,
  output ctrl_t   ctrl
);

  logic sec_end, min_ones_end, min_tens_end, hr_end;
  logic alarm_min_ones_end, alarm_min_tens_end, alarm_hr_end;
  logic running;

  assign sec_end            = counts.curr_sec       == MAX_SEC;
  assign min_ones_end       = counts.curr_min_ones  == MAX_MIN_ONES;
  assign min_tens_end       = counts.curr_min_tens  == MAX_MIN_TENS;
  assign hr_end             = counts.curr_hr        == MAX_HR;
  assign alarm_min_ones_end = counts.alarm_min_ones == MAX_MIN_ONES;
  assign alarm_min_tens_end = counts.alarm_min_tens == MAX_MIN_TENS;
  assign alarm_hr_end       = counts.alarm_hr       == MAX_HR;

  assign running = ~cset;

  always_comb begin
    // clock time
    ctrl.sec.en       = running;
    ctrl.min_ones.en  = (running & sec_end) | (cset & setmin);
    ctrl.min_tens.en  = min_ones_end & ctrl.min_ones.en;
    ctrl.hr.en        = (running & min_tens_end & ctrl.min_tens.en) | (cset & sethr);
    ctrl.curr_ampm_en = (running & hr_end & ctrl.hr.en) | (cset & sethr & hr_end);

    ctrl.sec.rst      = (sec_end & ctrl.sec.en) | cset | reset;
    ctrl.min_ones.rst = (min_ones_end & ctrl.min_ones.en) | reset;
    ctrl.min_tens.rst = (min_tens_end & ctrl.min_tens.en) | reset;
    ctrl.hr.rst       = (hr_end & ctrl.hr.en) | reset;

    // alarm time
    ctrl.alarm_min_ones.en  = aset & setmin;
    ctrl.alarm_min_tens.en  = aset & alarm_min_ones_end & ctrl.alarm_min_ones.en;
    ctrl.alarm_hr.en        = aset & sethr;
    ctrl.alarm_ampm_en      = aset & sethr & alarm_hr_end;

    ctrl.alarm_min_ones.rst = (alarm_min_ones_end & ctrl.alarm_min_ones.en) | reset;
    ctrl.alarm_min_tens.rst = (alarm_min_tens_end & ctrl.alarm_min_tens.en) | reset;
    ctrl.alarm_hr.rst       = (alarm_hr_end & ctrl.alarm_hr.en) | reset;
  end

endmodule
