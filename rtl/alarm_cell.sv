// One time digit of the datapath (the "alarm" cell): used for minute ones, minute tens and hour.
//
// It holds two counters, one for the running clock digit (curr_time) and one for the alarm digit
// being set (alarm). A multiplexer puts the alarm digit on the display output when aset is high
// and the clock digit otherwise. A register copies the alarm counter into set_alarm on every
// cycle with aset high; that stored copy is what the buzzer compares against. Because it samples
// the counter's value before that cycle's increment, the stored copy lags the last press by one
// cycle, so aset must stay high for one cycle after the last press. All enables and resets come
// from the clock controller; outputs change when ph1 rises (display output also when aset
// changes).
// Tools report the feedback through its latch-based registers as a combinational loop; with
// non-overlapping clock phases it never conducts (see flopenr).
module alarm_cell
  import alarmclock_pkg::*;
(
  input  logic   ph1,
  input  logic   ph2,
  input  logic   reset,        // clears the stored alarm copy
  input  logic   aset,
  input  logic   time_en,
  input  logic   time_reset,
  input  logic   alarm_en,
  input  logic   alarm_reset,
  output digit_t curr_time,    // running clock digit
  output digit_t alarm,        // alarm digit being set
  output digit_t set_alarm,    // stored alarm digit
  output digit_t time_disp     // digit to display
);

  counter6 #(.W(DIGIT_W)) time_cnt (
    .ph1(ph1), .ph2(ph2), .en(time_en), .reset(time_reset), .y(curr_time)
  );

  counter6 #(.W(DIGIT_W)) alarm_cnt (
    .ph1(ph1), .ph2(ph2), .en(alarm_en), .reset(alarm_reset), .y(alarm)
  );

  assign time_disp = aset ? alarm : curr_time;

  flopenr #(.W(DIGIT_W)) alarm_store (
    .ph1(ph1), .ph2(ph2), .reset(reset), .en(aset), .d(alarm), .q(set_alarm)
  );

endmodule
