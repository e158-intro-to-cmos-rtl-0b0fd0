// Datapath of the alarm clock: all time state and the alarm comparison.
//
// Stacked from a seconds counter (counter6), the a.m./p.m. cell, three alarm cells (minute ones,
// minute tens, hour; each with a clock counter, an alarm counter, a display mux and a stored
// alarm register) and the buzzer. It makes no decisions of its own: every counter enable and
// reset arrives in the ctrl bundle from the clock controller, and every counter value goes back
// in the counts bundle. The display outputs carry the alarm time while aset is high and the
// clock time otherwise. State changes when ph1 rises; buzz and the display outputs are
// combinational from state, aset and apower.
// Tools report the feedback through its latch-based registers as a combinational loop; with
// non-overlapping clock phases it never conducts (see flopenr).
module datapath
  import alarmclock_pkg::*;
(
  input  logic    ph1,
  input  logic    ph2,
  input  logic    reset,
  input  logic    aset,
  input  logic    apower,
  input  ctrl_t   ctrl,
  output logic    buzz,
  output logic    ampm,
  output counts_t counts,
  output digit_t  hr,          // displayed hour, 0..11
  output digit_t  min_ones,    // displayed minute ones
  output digit_t  min_tens     // displayed minute tens
);

  logic   curr_ampm, alarm_ampm;
  digit_t set_alarm_min_ones, set_alarm_min_tens, set_alarm_hr;

  counter6 #(.W(DIGIT_W)) sec_cnt (
    .ph1(ph1), .ph2(ph2), .en(ctrl.sec.en), .reset(ctrl.sec.rst), .y(counts.curr_sec)
  );

  ampm_cell ampm_c (
    .ph1(ph1), .ph2(ph2), .reset(reset), .aset(aset),
    .curr_ampm_en(ctrl.curr_ampm_en), .alarm_ampm_en(ctrl.alarm_ampm_en),
    .curr_ampm(curr_ampm), .alarm_ampm(alarm_ampm), .ampm(ampm)
  );

  alarm_cell min_ones_c (
    .ph1(ph1), .ph2(ph2), .reset(reset), .aset(aset),
    .time_en(ctrl.min_ones.en), .time_reset(ctrl.min_ones.rst),
    .alarm_en(ctrl.alarm_min_ones.en), .alarm_reset(ctrl.alarm_min_ones.rst),
    .curr_time(counts.curr_min_ones), .alarm(counts.alarm_min_ones),
    .set_alarm(set_alarm_min_ones), .time_disp(min_ones)
  );

  alarm_cell min_tens_c (
    .ph1(ph1), .ph2(ph2), .reset(reset), .aset(aset),
    .time_en(ctrl.min_tens.en), .time_reset(ctrl.min_tens.rst),
    .alarm_en(ctrl.alarm_min_tens.en), .alarm_reset(ctrl.alarm_min_tens.rst),
    .curr_time(counts.curr_min_tens), .alarm(counts.alarm_min_tens),
    .set_alarm(set_alarm_min_tens), .time_disp(min_tens)
  );

  alarm_cell hr_c (
    .ph1(ph1), .ph2(ph2), .reset(reset), .aset(aset),
    .time_en(ctrl.hr.en), .time_reset(ctrl.hr.rst),
    .alarm_en(ctrl.alarm_hr.en), .alarm_reset(ctrl.alarm_hr.rst),
    .curr_time(counts.curr_hr), .alarm(counts.alarm_hr),
    .set_alarm(set_alarm_hr), .time_disp(hr)
  );

  buzzer buzz_c (
    .curr_min_ones(counts.curr_min_ones), .curr_min_tens(counts.curr_min_tens),
    .curr_hr(counts.curr_hr),
    .set_alarm_min_ones(set_alarm_min_ones), .set_alarm_min_tens(set_alarm_min_tens),
    .set_alarm_hr(set_alarm_hr),
    .curr_ampm(curr_ampm), .alarm_ampm(alarm_ampm), .apower(apower), .buzz(buzz)
  );

endmodule
