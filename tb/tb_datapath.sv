// Test of the datapath with the controller replaced by random stimulus: every counter enable
// and reset in the ctrl bundle, the a.m./p.m. toggles, reset, aset and apower are random each
// cycle, and an integer model tracks all seven counters (modulo 64), both a.m./p.m. bits and the
// three stored alarm digits. After every cycle the counts bundle, the display outputs, ampm and
// buzz are compared. Periodic full resets bring clock and stored alarm to the same value so that
// the alarm match happens; matches with apower high and low are counted and must occur.
module tb_datapath;
  import alarmclock_pkg::*;
  logic ph1 = 1'b0, ph2 = 1'b0, reset, aset, apower;
  ctrl_t ctrl;
  logic buzz, ampm;
  counts_t counts;
  digit_t hr, min_ones, min_tens;
  int cnt[7];          // sec, m1, m10, hr, a1, a10, ahr
  int st[3];           // stored alarm m1, m10, hr
  bit cp, ap;
  int checks = 0, failures = 0, n_buzz = 0, n_muted = 0;

  datapath dut (.*);

  task automatic tick();
    ph2 = 1'b1; #4; ph2 = 1'b0; #1; ph1 = 1'b1; #4; ph1 = 1'b0; #1;
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] en, rst;
    foreach (cnt[i]) cnt[i] = 0;
    foreach (st[i]) st[i] = 0;
    cp = 0; ap = 0;
    reset = 1'b1; aset = 1'b0; apower = 1'b0;
    ctrl = '{sec: '{1'b0, 1'b1}, min_ones: '{1'b0, 1'b1}, min_tens: '{1'b0, 1'b1},
             hr: '{1'b0, 1'b1}, alarm_min_ones: '{1'b0, 1'b1}, alarm_min_tens: '{1'b0, 1'b1},
             alarm_hr: '{1'b0, 1'b1}, curr_ampm_en: 1'b0, alarm_ampm_en: 1'b0};
    tick();
    for (int n = 0; n < 4000; n++) begin
      bit full_reset, match;
      full_reset = (n % 100) == 0;
      reset  = full_reset;
      aset   = ($urandom % 4) == 0;
      apower = 1'($urandom);
      en  = 7'($urandom) & 7'($urandom);
      rst = full_reset ? 7'h7f : (7'($urandom) & 7'($urandom) & 7'($urandom) & 7'($urandom));
      ctrl.sec            = '{en[0], rst[0]};
      ctrl.min_ones       = '{en[1], rst[1]};
      ctrl.min_tens       = '{en[2], rst[2]};
      ctrl.hr             = '{en[3], rst[3]};
      ctrl.alarm_min_ones = '{en[4], rst[4]};
      ctrl.alarm_min_tens = '{en[5], rst[5]};
      ctrl.alarm_hr       = '{en[6], rst[6]};
      ctrl.curr_ampm_en   = ($urandom % 8) == 0;
      ctrl.alarm_ampm_en  = ($urandom % 8) == 0;
      // model
      if (reset) begin st[0] = 0; st[1] = 0; st[2] = 0; cp = 0; ap = 0; end
      else begin
        if (aset) begin st[0] = cnt[4]; st[1] = cnt[5]; st[2] = cnt[6]; end
        if (ctrl.curr_ampm_en) cp = !cp;
        if (ctrl.alarm_ampm_en) ap = !ap;
      end
      for (int i = 0; i < 7; i++)
        if (rst[i]) cnt[i] = 0; else if (en[i]) cnt[i] = (cnt[i] + 1) % 64;
      tick();
      match = cnt[1] == st[0] && cnt[2] == st[1] && cnt[3] == st[2] && cp == ap;
      if (match && apower) n_buzz++;
      if (match && !apower) n_muted++;
      checks++;
      if (counts !== '{digit_t'(cnt[0]), digit_t'(cnt[1]), digit_t'(cnt[2]), digit_t'(cnt[3]),
                       digit_t'(cnt[4]), digit_t'(cnt[5]), digit_t'(cnt[6])}) begin
        failures++;
        if (failures < 10) $display("FAIL: counts bundle mismatch at cycle %0d", n);
      end
      checks++;
      if ({min_ones, min_tens, hr, ampm} !==
          (aset ? {digit_t'(cnt[4]), digit_t'(cnt[5]), digit_t'(cnt[6]), ap}
                : {digit_t'(cnt[1]), digit_t'(cnt[2]), digit_t'(cnt[3]), cp})) begin
        failures++;
        if (failures < 10) $display("FAIL: display outputs mismatch at cycle %0d", n);
      end
      checks++;
      if (buzz !== (match && apower)) begin
        failures++;
        if (failures < 10) $display("FAIL: buzz=%b expected %b at cycle %0d", buzz, match && apower, n);
      end
    end
    checks++;
    if (n_buzz == 0 || n_muted == 0) begin
      failures++;
      $display("FAIL: alarm match never seen (on %0d, muted %0d)", n_buzz, n_muted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
