// Test of the a.m./p.m. cell: 2000 cycles of random toggle enables, resets and aset against a
// two-bit model; checks both flops and the displayed bit after every cycle and again with aset
// flipped.
module tb_ampm_cell;
  logic ph1 = 1'b0, ph2 = 1'b0, reset, aset, curr_ampm_en, alarm_ampm_en;
  logic curr_ampm, alarm_ampm, ampm;
  bit m_curr = 0, m_alarm = 0;
  int checks = 0, failures = 0, toggles = 0;

  ampm_cell dut (.*);

  task automatic tick();
    ph2 = 1'b1; #4; ph2 = 1'b0; #1; ph1 = 1'b1; #4; ph1 = 1'b0; #1;
  endtask

  task automatic check();
    checks++;
    if ({curr_ampm, alarm_ampm, ampm} !== {m_curr, m_alarm, aset ? m_alarm : m_curr}) begin
      failures++;
      if (failures < 10)
        $display("FAIL: curr=%b alarm=%b ampm=%b aset=%b expected %b %b", curr_ampm, alarm_ampm,
                 ampm, aset, m_curr, m_alarm);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; aset = 1'b0; curr_ampm_en = 1'b0; alarm_ampm_en = 1'b0;
    tick(); check();
    for (int n = 0; n < 2000; n++) begin
      reset         = ($urandom % 50) == 0;
      aset          = 1'($urandom);
      curr_ampm_en  = ($urandom % 3) == 0;
      alarm_ampm_en = ($urandom % 3) == 0;
      if (reset) begin m_curr = 0; m_alarm = 0; end
      else begin
        if (curr_ampm_en) begin m_curr = !m_curr; toggles++; end
        if (alarm_ampm_en) m_alarm = !m_alarm;
      end
      tick();
      check();
      aset = ~aset; #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
