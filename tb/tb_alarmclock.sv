// End-to-end test of the alarm clock core at its only (full) size.
//
// A behavioural reference model keeps the time as plain integers (seconds 0..59, minutes 0..59,
// hour 0..11 plus a p.m. flag, the alarm the same way, and the stored alarm copy) and is stepped
// once per clock cycle with the same inputs as the design. After every cycle all outputs are
// compared: the four seven-segment digits (expected patterns come from a segment-letter table
// here, not from the design's package), ampm and buzz.
// Phases: reset; 3000 cycles of random button activity (including resets and simultaneous
// clock/alarm setting); then a directed scenario that sets the clock to 11:58 a.m. and the alarm
// to 12:01 p.m. and runs two full days, alarm on during the first and off during the second.
// The run checks that the alarm sounds for exactly 60 cycles (one minute at 1 Hz), once, and
// counts each mechanism of the design: seconds/minute/hour carries, a.m./p.m. toggles, clock and
// alarm setting with their wraps, alarm display, buzz on, buzz muted by apower, buzz ending at the
// minute change, and reset. A mechanism that never happened counts as a failure.
module tb_alarmclock;
  import tb_util_pkg::*;

  logic ph1 = 1'b0, ph2 = 1'b0;
  logic reset, cset, aset, apower, sethr, setmin;
  logic buzz, ampm;
  logic [6:0] LED0, LED1, LED2, LED3;

  alarmclock dut (.*);

  int checks = 0, failures = 0;

  // reference model state
  int sec, mn, hr, pm, amn, ahr, apm, s_m1, s_m10, s_hr;
  bit prev_buzz_exp = 0;
  int buzz_run = 0, buzz_runs_60 = 0;

  // mechanism counters
  typedef enum int {
    M_SEC_WRAP, M_TENS_CARRY, M_HR_CARRY, M_PM_TOGGLE, M_SET_MIN, M_SET_MIN_WRAP, M_SET_HR,
    M_SET_HR_WRAP, M_ALARM_MIN, M_ALARM_MIN_WRAP, M_ALARM_HR, M_ALARM_PM, M_ALARM_DISP,
    M_ALARM_STORE, M_BUZZ_ON, M_BUZZ_MUTED, M_BUZZ_END, M_RESET, M_NUM
  } mech_e;
  int mech[M_NUM];


  task automatic tick();
    ph2 = 1'b1; #4; ph2 = 1'b0; #1;
    ph1 = 1'b1; #4; ph1 = 1'b0; #1;
  endtask

  function automatic bit match_now();
    return (mn % 10 == s_m1) && (mn / 10 == s_m10) && (hr == s_hr) && (pm == apm);
  endfunction

  // advance the model by one cycle with the current inputs
  task automatic model_step();
    if (reset) begin
      sec = 0; mn = 0; hr = 0; pm = 0; amn = 0; ahr = 0; apm = 0; s_m1 = 0; s_m10 = 0; s_hr = 0;
      mech[M_RESET]++;
      return;
    end
    if (aset) begin
      s_m1 = amn % 10; s_m10 = amn / 10; s_hr = ahr;
      mech[M_ALARM_STORE]++;
    end
    if (cset) begin
      sec = 0;
      if (setmin) begin
        mech[M_SET_MIN]++;
        mn++;
        if (mn % 10 == 0) mech[M_TENS_CARRY]++;
        if (mn == 60) begin mn = 0; mech[M_SET_MIN_WRAP]++; end
      end
      if (sethr) begin
        mech[M_SET_HR]++;
        hr++;
        if (hr == 12) begin hr = 0; pm ^= 1; mech[M_SET_HR_WRAP]++; mech[M_PM_TOGGLE]++; end
      end
    end else begin
      sec++;
      if (sec == 60) begin
        sec = 0; mn++; mech[M_SEC_WRAP]++;
        if (mn % 10 == 0) mech[M_TENS_CARRY]++;
        if (mn == 60) begin
          mn = 0; hr++; mech[M_HR_CARRY]++;
          if (hr == 12) begin hr = 0; pm ^= 1; mech[M_PM_TOGGLE]++; end
        end
      end
    end
    if (aset) begin
      if (setmin) begin
        mech[M_ALARM_MIN]++;
        amn++;
        if (amn == 60) begin amn = 0; mech[M_ALARM_MIN_WRAP]++; end
      end
      if (sethr) begin
        mech[M_ALARM_HR]++;
        ahr++;
        if (ahr == 12) begin ahr = 0; apm ^= 1; mech[M_ALARM_PM]++; end
      end
    end
  endtask

  task automatic check_outputs();
    int dm, dh, dp, shown;
    bit exp_buzz;
    logic [6:0] e0, e1, e2, e3;
    dm = aset ? amn : mn;
    dh = aset ? ahr : hr;
    dp = aset ? apm : pm;
    if (aset) mech[M_ALARM_DISP]++;
    shown = (dh == 0) ? 12 : dh;
    e0 = ref_segs(dm % 10);
    e1 = ref_segs(dm / 10);
    e2 = ref_segs(shown % 10);
    e3 = (shown >= 10) ? ref_segs(1) : 7'b0;
    exp_buzz = apower && match_now();
    if (!apower && match_now()) mech[M_BUZZ_MUTED]++;
    if (exp_buzz && !prev_buzz_exp) mech[M_BUZZ_ON]++;
    if (!exp_buzz && prev_buzz_exp && apower) mech[M_BUZZ_END]++;
    // length of each alarm that ends because the minute changed
    if (exp_buzz) buzz_run++;
    else begin
      if (prev_buzz_exp && apower && !reset && !aset && !cset) begin
        checks++;
        if (buzz_run != 60) begin
          failures++;
          $display("FAIL: alarm sounded for %0d cycles, expected 60", buzz_run);
        end else buzz_runs_60++;
      end
      buzz_run = 0;
    end
    prev_buzz_exp = exp_buzz;
    checks++;
    if ({LED0, LED1, LED2, LED3, ampm, buzz} !== {e0, e1, e2, e3, dp[0], exp_buzz}) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t: LED0..3=%b %b %b %b ampm=%b buzz=%b, expected %b %b %b %b %b %b",
                 $time, LED0, LED1, LED2, LED3, ampm, buzz, e0, e1, e2, e3, dp[0], exp_buzz);
    end
  endtask

  task automatic step();
    model_step();
    tick();
    check_outputs();
  endtask

  task automatic drive(bit r, bit c, bit a, bit p, bit h, bit m);
    reset = r; cset = c; aset = a; apower = p; sethr = h; setmin = m;
  endtask

  initial begin
    #(10 * 400000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mech[i]) mech[i] = 0;
    drive(1, 0, 0, 0, 0, 0);
    step(); step();

    // random button activity
    for (int n = 0; n < 3000; n++) begin
      drive(($urandom % 500) == 0, ($urandom % 3) == 0, ($urandom % 3) == 0,
            (n / 700) % 2 == 0, ($urandom % 2) == 0, ($urandom % 2) == 0);
      step();
    end

    // directed: clock to 11:58 a.m., alarm to 12:01 p.m.
    drive(1, 0, 0, 1, 0, 0); step();
    drive(0, 1, 0, 1, 0, 0); step();
    repeat (11) begin drive(0, 1, 0, 1, 1, 0); step(); drive(0, 1, 0, 1, 0, 0); step(); end
    repeat (58) begin drive(0, 1, 0, 1, 0, 1); step(); end
    drive(0, 0, 1, 1, 0, 0); step();
    repeat (12) begin drive(0, 0, 1, 1, 1, 0); step(); end
    drive(0, 0, 1, 1, 0, 1); step();
    drive(0, 0, 1, 1, 0, 0); step();   // one more aset cycle stores the last press
    drive(0, 0, 0, 1, 0, 0);
    checks++;
    if (!(s_hr == 0 && s_m10 == 0 && s_m1 == 1 && apm == 1 && hr == 11 && mn == 58 && pm == 0)) begin
      failures++;
      $display("FAIL: directed setup did not reach the intended times");
    end

    // day 1 with the alarm on, day 2 with it off
    repeat (86400) step();
    apower = 1'b0;
    repeat (86400) step();

    checks++;
    if (buzz_runs_60 != 1) begin
      failures++;
      $display("FAIL: expected exactly one full-minute alarm, saw %0d", buzz_runs_60);
    end

    for (int i = 0; i < M_NUM; i++) begin
      mech_e m;
      m = mech_e'(i);
      checks++;
      $display("mechanism %-18s happened %0d times", m.name(), mech[i]);
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL: mechanism %s never happened", m.name());
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
