// a.m./p.m. cell of the datapath.
//
// Two one-bit flopenr registers each feed their inverted output back to their input, so each
// toggles on a cycle where its enable is high: curr_ampm for the clock, alarm_ampm for the alarm
// time. The controller raises the enable when the matching hour counter wraps from 11 to 0.
// reset clears both to 0 (a.m.). ampm, the displayed indicator, is alarm_ampm while aset is high
// and curr_ampm otherwise. Outputs change when ph1 rises (ampm also when aset changes).
// Tools report the feedback through its latch-based registers as a combinational loop; with
// non-overlapping clock phases it never conducts (see flopenr).
module ampm_cell (
  input  logic ph1,
  input  logic ph2,
  input  logic reset,
  input  logic aset,
  input  logic curr_ampm_en,
  input  logic alarm_ampm_en,
  output logic curr_ampm,
  output logic alarm_ampm,
  output logic ampm
);

  flopenr #(.W(1)) curr_flop (
    .ph1(ph1), .ph2(ph2), .reset(reset), .en(curr_ampm_en), .d(~curr_ampm), .q(curr_ampm)
  );

  flopenr #(.W(1)) alarm_flop (
    .ph1(ph1), .ph2(ph2), .reset(reset), .en(alarm_ampm_en), .d(~alarm_ampm), .q(alarm_ampm)
  );

  assign ampm = aset ? alarm_ampm : curr_ampm;

endmodule
