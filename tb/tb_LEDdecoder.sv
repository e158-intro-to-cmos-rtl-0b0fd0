// Test of the display decoder: every hour 0..15 with every minute 0..63 split into its decimal
// digits (values that are not digits included), checking that each digit lands on the right
// output: minute ones, minute tens, hour ones, hour tens.
module tb_LEDdecoder;
  import tb_util_pkg::*;
  logic [5:0] hr, min_ones, min_tens;
  logic [6:0] hr_ones_segs, hr_tens_segs, min_ones_segs, min_tens_segs;
  int checks = 0, failures = 0;

  LEDdecoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 16; h++)
      for (int m = 0; m < 64; m++) begin
        int shown;
        logic [6:0] e_ho, e_ht;
        shown = (h == 0) ? 12 : h;
        e_ho = (h < 12) ? ref_segs(shown % 10) : 7'b0;
        e_ht = (h < 12 && shown >= 10) ? ref_segs(1) : 7'b0;
        hr = 6'(h); min_ones = 6'(m % 16); min_tens = 6'(m / 16 + 4 * (m % 2));
        #1;
        checks++;
        if ({min_ones_segs, min_tens_segs, hr_ones_segs, hr_tens_segs} !==
            {ref_segs(m % 16), ref_segs(m / 16 + 4 * (m % 2)), e_ho, e_ht}) begin
          failures++;
          if (failures < 10) $display("FAIL: hr=%0d m1=%0d m10=%0d", hr, min_ones, min_tens);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
