// Test of the two-phase register with enable and reset.
// Random d, en and reset over 2000 cycles against a one-line model (reset wins, then enable,
// else hold). Within every cycle it also checks the two-phase timing: while ph2 is high the
// output still shows the old value, and the new value appears once ph1 has risen.
module tb_flopenr;
  logic ph1 = 1'b0, ph2 = 1'b0, reset, en;
  logic [5:0] d, q;
  logic [5:0] model;
  int checks = 0, failures = 0;

  flopenr dut (.ph1(ph1), .ph2(ph2), .reset(reset), .en(en), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; en = 1'b0; d = '0; model = '0;
    ph2 = 1'b1; #4; ph2 = 1'b0; #1; ph1 = 1'b1; #4; ph1 = 1'b0; #1;
    for (int n = 0; n < 2000; n++) begin
      logic [5:0] old;
      reset = ($urandom % 8) == 0;
      en    = ($urandom % 2) == 0;
      d     = 6'($urandom);
      old   = model;
      if (reset)   model = '0;
      else if (en) model = d;
      ph2 = 1'b1; #4;
      checks++;
      if (q !== old) begin
        failures++;
        if (failures < 10) $display("FAIL: output changed during ph2 (%0d, expected %0d)", q, old);
      end
      ph2 = 1'b0; #1; ph1 = 1'b1; #4;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL: q=%0d expected %0d", q, model);
      end
      ph1 = 1'b0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
