// Exhaustive test of the digit decoder: all 64 input values against segment-letter references;
// 0..9 must show the digit, everything else must be blank.
module tb_sevenseg;
  import tb_util_pkg::*;
  logic [5:0] data;
  logic [6:0] segments;
  int checks = 0, failures = 0;

  sevenseg dut (.data(data), .segments(segments));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      data = 6'(v);
      #1;
      checks++;
      if (segments !== ref_segs(v)) begin
        failures++;
        $display("FAIL: %0d -> %b expected %b", v, segments, ref_segs(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
