// Test of the 6-bit counter: reset, then 3000 cycles of random enable and occasional reset
// against an integer model that counts modulo 64 (so the natural wrap is exercised), checked
// after every cycle. Also checks that a run of 64 enabled cycles returns the count to its start.
module tb_counter6;
  logic ph1 = 1'b0, ph2 = 1'b0, en, reset;
  logic [5:0] y;
  int model = 0;
  int checks = 0, failures = 0, wraps = 0;

  counter6 dut (.ph1(ph1), .ph2(ph2), .en(en), .reset(reset), .y(y));

  task automatic tick();
    ph2 = 1'b1; #4; ph2 = 1'b0; #1; ph1 = 1'b1; #4; ph1 = 1'b0; #1;
  endtask

  task automatic check();
    checks++;
    if (y !== 6'(model)) begin
      failures++;
      if (failures < 10) $display("FAIL: y=%0d expected %0d", y, model);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; en = 1'b0; tick(); model = 0; check();
    for (int n = 0; n < 3000; n++) begin
      reset = ($urandom % 200) == 0;
      en    = ($urandom % 4) != 0;
      if (reset) model = 0;
      else if (en) begin
        model = (model + 1) % 64;
        if (model == 0) wraps++;
      end
      tick();
      check();
    end
    reset = 1'b0; en = 1'b1;
    begin
      int start = model;
      repeat (64) tick();
      checks++;
      if (y !== 6'(start)) begin
        failures++;
        $display("FAIL: 64 increments gave %0d, expected %0d", y, start);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL: counter never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
