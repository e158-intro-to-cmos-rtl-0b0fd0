// Seven-segment decoder for one decimal digit (minute ones or minute tens).
// Values 0..9 light the usual segments; any other value blanks the display. Output bit 6 is
// segment a and bit 0 is segment g, active high. Purely combinational.
module sevenseg
  import alarmclock_pkg::*;
(
  input  digit_t data,
  output seg_t   segments
);

  assign segments = digit_segments(data);

endmodule
