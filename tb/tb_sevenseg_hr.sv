// Exhaustive test of the hour decoder: 0 must read "12", 1..9 a blank tens digit and the hour,
// 10 and 11 "10" and "11", and every value above 11 two blank digits.
module tb_sevenseg_hr;
  import tb_util_pkg::*;
  logic [5:0] data;
  logic [6:0] segments_ones, segments_tens;
  int checks = 0, failures = 0;

  sevenseg_hr dut (.data(data), .segments_ones(segments_ones), .segments_tens(segments_tens));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic [6:0] e_ones, e_tens;
      if (v == 0)       begin e_tens = ref_segs(1); e_ones = ref_segs(2); end
      else if (v < 10)  begin e_tens = 7'b0;        e_ones = ref_segs(v); end
      else if (v < 12)  begin e_tens = ref_segs(1); e_ones = ref_segs(v - 10); end
      else              begin e_tens = 7'b0;        e_ones = 7'b0; end
      data = 6'(v);
      #1;
      checks++;
      if ({segments_tens, segments_ones} !== {e_tens, e_ones}) begin
        failures++;
        $display("FAIL: %0d -> %b %b expected %b %b", v, segments_tens, segments_ones, e_tens, e_ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
