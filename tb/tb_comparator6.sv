// Exhaustive test of the 6-bit equality comparator over all 4096 input pairs.
module tb_comparator6;
  logic [5:0] a, b;
  logic y;
  int checks = 0, failures = 0;

  comparator6 dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a = 6'(i); b = 6'(j);
        #1;
        checks++;
        if (y !== (i == j)) begin
          failures++;
          if (failures < 10) $display("FAIL: a=%0d b=%0d y=%b", i, j, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
