// Test of one datapath digit cell: 3000 cycles of random counter enables and resets and random
// aset against an integer model of the two counters, the stored alarm copy (which takes the
// alarm counter's value from before the cycle's increment whenever aset is high) and the display
// multiplexer. All four outputs are checked after every cycle, and the display output is also
// checked with aset flipped between cycles, since the multiplexer is combinational.
module tb_alarm_cell;
  logic ph1 = 1'b0, ph2 = 1'b0, reset, aset, time_en, time_reset, alarm_en, alarm_reset;
  logic [5:0] curr_time, alarm, set_alarm, time_disp;
  int m_time = 0, m_alarm = 0, m_set = 0;
  int checks = 0, failures = 0, n_store = 0;

  alarm_cell dut (.*);

  task automatic tick();
    ph2 = 1'b1; #4; ph2 = 1'b0; #1; ph1 = 1'b1; #4; ph1 = 1'b0; #1;
  endtask

  task automatic check();
    checks++;
    if ({curr_time, alarm, set_alarm, time_disp} !==
        {6'(m_time), 6'(m_alarm), 6'(m_set), aset ? 6'(m_alarm) : 6'(m_time)}) begin
      failures++;
      if (failures < 10)
        $display("FAIL: time=%0d alarm=%0d set=%0d disp=%0d aset=%b expected %0d %0d %0d",
                 curr_time, alarm, set_alarm, time_disp, aset, m_time, m_alarm, m_set);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; aset = 1'b0; time_en = 1'b0; alarm_en = 1'b0;
    time_reset = 1'b1; alarm_reset = 1'b1;
    tick();
    for (int n = 0; n < 3000; n++) begin
      reset       = ($urandom % 300) == 0;
      aset        = ($urandom % 2) == 0;
      time_en     = ($urandom % 2) == 0;
      time_reset  = ($urandom % 40) == 0;
      alarm_en    = ($urandom % 2) == 0;
      alarm_reset = ($urandom % 40) == 0;
      if (reset) m_set = 0;
      else if (aset) begin m_set = m_alarm; n_store++; end
      if (time_reset) m_time = 0; else if (time_en) m_time = (m_time + 1) % 64;
      if (alarm_reset) m_alarm = 0; else if (alarm_en) m_alarm = (m_alarm + 1) % 64;
      tick();
      check();
      aset = ~aset; #1;
      check();
    end
    checks++;
    if (n_store == 0) begin failures++; $display("FAIL: alarm never stored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
