// Alarm match logic (the buzzer cell).
//
// Three equality comparators check the clock's minute ones, minute tens and hour against the
// stored alarm time; an XNOR checks that the clock and alarm a.m./p.m. bits agree. buzz is the
// AND of the three digit matches, the a.m./p.m. match and apower. It is purely combinational, so
// the alarm sounds for the whole minute in which the times match and stops as soon as the clock
// minute changes or apower goes low.
module buzzer
  import alarmclock_pkg::*;
(
  input  digit_t curr_min_ones,
  input  digit_t curr_min_tens,
  input  digit_t curr_hr,
  input  digit_t set_alarm_min_ones,
  input  digit_t set_alarm_min_tens,
  input  digit_t set_alarm_hr,
  input  logic   curr_ampm,
  input  logic   alarm_ampm,
  input  logic   apower,
  output logic   buzz
);

  logic min_ones_equal, min_tens_equal, hr_equal, time_equal, ampm_equal;

  comparator6 #(.W(DIGIT_W)) cmp_min_ones (.a(curr_min_ones), .b(set_alarm_min_ones), .y(min_ones_equal));
  comparator6 #(.W(DIGIT_W)) cmp_min_tens (.a(curr_min_tens), .b(set_alarm_min_tens), .y(min_tens_equal));
  comparator6 #(.W(DIGIT_W)) cmp_hr       (.a(curr_hr),       .b(set_alarm_hr),       .y(hr_equal));

  assign time_equal = min_ones_equal & min_tens_equal & hr_equal;
  assign ampm_equal = curr_ampm ~^ alarm_ampm;
  assign buzz       = time_equal & ampm_equal & apower;

endmodule
