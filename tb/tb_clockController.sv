// Test of the clock controller, which is combinational: 20000 random cases in which every
// counter value is either at its terminal count or a random legal value, with random user
// inputs. Expected enables and resets are written from the rules of a 12-hour clock (running:
// carry on 59 s, 9, 5, 11; setting: one step per press, seconds held; alarm: steps while aset)
// rather than from the gate structure. Carry, set and wrap cases are counted and must occur.
module tb_clockController;
  import alarmclock_pkg::*;
  logic reset, cset, aset, setmin, sethr;
  counts_t counts;
  ctrl_t ctrl;
  int checks = 0, failures = 0, n_hr_carry = 0, n_set_hr_wrap = 0, n_alarm_wrap = 0;

  clockController dut (.*);

  function automatic int pick(int last);
    return ($urandom % 2) ? last : int'($urandom % (last + 1));
  endfunction

  task automatic expect_bit(string what, logic got, bit want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL: %s = %b, expected %b", what, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int s, m1, m10, h, a1, a10, ah;
      bit e_m1, e_m10, e_hr, e_a1, e_a10, e_ah;
      s = pick(59); m1 = pick(9); m10 = pick(5); h = pick(11);
      a1 = pick(9); a10 = pick(5); ah = pick(11);
      counts = '{digit_t'(s), digit_t'(m1), digit_t'(m10), digit_t'(h),
                 digit_t'(a1), digit_t'(a10), digit_t'(ah)};
      reset = ($urandom % 10) == 0;
      cset = 1'($urandom); aset = 1'($urandom); setmin = 1'($urandom); sethr = 1'($urandom);
      #1;
      e_m1  = cset ? setmin : (s == 59);
      e_m10 = e_m1 && m1 == 9;
      e_hr  = cset ? sethr : (s == 59 && m1 == 9 && m10 == 5);
      e_a1  = aset && setmin;
      e_a10 = e_a1 && a1 == 9;
      e_ah  = aset && sethr;
      if (!cset && e_hr && h == 11) n_hr_carry++;
      if (cset && e_hr && h == 11) n_set_hr_wrap++;
      if (e_ah && ah == 11) n_alarm_wrap++;
      expect_bit("sec.en",        ctrl.sec.en, !cset);
      expect_bit("sec.rst",       ctrl.sec.rst, reset || cset || s == 59);
      expect_bit("min_ones.en",   ctrl.min_ones.en, e_m1);
      expect_bit("min_ones.rst",  ctrl.min_ones.rst, reset || (e_m1 && m1 == 9));
      expect_bit("min_tens.en",   ctrl.min_tens.en, e_m10);
      expect_bit("min_tens.rst",  ctrl.min_tens.rst, reset || (e_m10 && m10 == 5));
      expect_bit("hr.en",         ctrl.hr.en, e_hr);
      expect_bit("hr.rst",        ctrl.hr.rst, reset || (e_hr && h == 11));
      expect_bit("curr_ampm_en",  ctrl.curr_ampm_en, e_hr && h == 11);
      expect_bit("a_min_ones.en", ctrl.alarm_min_ones.en, e_a1);
      expect_bit("a_min_ones.rst",ctrl.alarm_min_ones.rst, reset || (e_a1 && a1 == 9));
      expect_bit("a_min_tens.en", ctrl.alarm_min_tens.en, e_a10);
      expect_bit("a_min_tens.rst",ctrl.alarm_min_tens.rst, reset || (e_a10 && a10 == 5));
      expect_bit("a_hr.en",       ctrl.alarm_hr.en, e_ah);
      expect_bit("a_hr.rst",      ctrl.alarm_hr.rst, reset || (e_ah && ah == 11));
      expect_bit("alarm_ampm_en", ctrl.alarm_ampm_en, e_ah && ah == 11);
    end
    checks++;
    if (n_hr_carry == 0 || n_set_hr_wrap == 0 || n_alarm_wrap == 0) begin
      failures++;
      $display("FAIL: a wrap case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
