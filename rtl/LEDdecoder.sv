// Display decoder: drives the four seven-segment digits from the displayed time.
// LED0 shows the minute ones digit, LED1 the minute tens, LED2 the hour ones and LED3 the hour
// tens (blank for hours 1..9). Purely combinational.
module LEDdecoder
  import alarmclock_pkg::*;
(
  input  digit_t hr,
  input  digit_t min_ones,
  input  digit_t min_tens,
  output seg_t   hr_ones_segs,
  output seg_t   hr_tens_segs,
  output seg_t   min_ones_segs,
  output seg_t   min_tens_segs
);

  sevenseg    min_ones_dec (.data(min_ones), .segments(min_ones_segs));
  sevenseg    min_tens_dec (.data(min_tens), .segments(min_tens_segs));
  sevenseg_hr hr_dec       (.data(hr), .segments_ones(hr_ones_segs), .segments_tens(hr_tens_segs));

endmodule
