// Seven-segment decoder for the hour, producing both hour digits.
// The hour counter holds 0..11 and the display shows 12, 1, 2, ..., 11: 0 is shown as 12, the
// tens digit is blank for 1..9 and shows 1 for 0, 10 and 11. Values above 11 blank both digits.
// Segment order as in sevenseg. Purely combinational. The tens digit only ever shows 1 or blank,
// so its segments a, d, e, f and g are constant 0.
module sevenseg_hr
  import alarmclock_pkg::*;
(
  input  digit_t data,
  output seg_t   segments_ones,
  output seg_t   segments_tens
);

  digit_t shown;   // hour as displayed, 1..12

  always_comb begin
    shown = (data == '0) ? digit_t'(12) : data;
    if (data > MAX_HR) begin
      segments_ones = SEG_BLANK;
      segments_tens = SEG_BLANK;
    end else if (shown >= digit_t'(10)) begin
      segments_ones = digit_segments(shown - digit_t'(10));
      segments_tens = digit_segments(digit_t'(1));
    end else begin
      segments_ones = digit_segments(shown);
      segments_tens = SEG_BLANK;
    end
  end

endmodule
