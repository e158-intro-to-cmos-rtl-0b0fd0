// Exhaustive test of the two-input XOR gate against the truth table.
module tb_xor2;
  logic a, b, y;
  int checks = 0, failures = 0;

  xor2 dut (.a(a), .b(b), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== (a != b)) begin
        failures++;
        $display("FAIL: a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
