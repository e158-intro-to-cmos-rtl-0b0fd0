// Test of the alarm match logic: 4000 random cases, about half of them forced to match in all
// digits, each with random a.m./p.m. bits and apower. buzz must be high exactly when all three
// digits and the a.m./p.m. bits agree and apower is high. Each way of missing (one digit off,
// a.m./p.m. off, apower low) is counted and must have occurred.
module tb_buzzer;
  logic [5:0] c1, c10, ch, a1, a10, ah;
  logic cp, ap, apower, buzz;
  int checks = 0, failures = 0, n_on = 0, n_digit_off = 0, n_ampm_off = 0, n_power_off = 0;

  buzzer dut (
    .curr_min_ones(c1), .curr_min_tens(c10), .curr_hr(ch),
    .set_alarm_min_ones(a1), .set_alarm_min_tens(a10), .set_alarm_hr(ah),
    .curr_ampm(cp), .alarm_ampm(ap), .apower(apower), .buzz(buzz)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      bit expected, digits_equal;
      c1 = 6'($urandom % 10); c10 = 6'($urandom % 6); ch = 6'($urandom % 12);
      if ($urandom % 2) begin
        a1 = c1; a10 = c10; ah = ch;
        case ($urandom % 4)
          0: a1  = 6'($urandom);
          1: a10 = 6'($urandom);
          2: ah  = 6'($urandom);
          default: ;
        endcase
      end else begin
        a1 = 6'($urandom % 10); a10 = 6'($urandom % 6); ah = 6'($urandom % 12);
      end
      cp = 1'($urandom); ap = 1'($urandom); apower = ($urandom % 4) != 0;
      #1;
      digits_equal = (int'(c1) == int'(a1)) && (int'(c10) == int'(a10)) && (int'(ch) == int'(ah));
      expected = digits_equal && (cp == ap) && apower;
      if (expected) n_on++;
      else if (!digits_equal) n_digit_off++;
      else if (cp != ap) n_ampm_off++;
      else n_power_off++;
      checks++;
      if (buzz !== expected) begin
        failures++;
        if (failures < 10) $display("FAIL: case %0d buzz=%b expected %b", n, buzz, expected);
      end
    end
    checks++;
    if (n_on == 0 || n_digit_off == 0 || n_ampm_off == 0 || n_power_off == 0) begin
      failures++;
      $display("FAIL: a case class never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
