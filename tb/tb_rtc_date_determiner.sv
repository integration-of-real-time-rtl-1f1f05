// tb_rtc_date_determiner: checks month lengths and the leap-year rule for
// every month of every year that the 16-bit year register can hold,
// against a table of month lengths and the Gregorian rule.
module tb_rtc_date_determiner;
  logic [7:0]  mon;
  logic [15:0] year;
  logic [7:0]  days_in_month;
  logic        leap;
  int checks = 0, failures = 0;

  rtc_date_determiner dut (.*);

  function automatic bit ref_leap(input int y);
    if (y % 400 == 0) return 1'b1;
    if (y % 100 == 0) return 1'b0;
    return (y % 4 == 0);
  endfunction

  function automatic int ref_days(input int m, input int y);
    int len[13] = '{31, 31, 28, 31, 30, 31, 30, 31, 31, 30, 31, 30, 31};
    if (m < 1 || m > 12) return 31;
    if (m == 2 && ref_leap(y)) return 29;
    return len[m];
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int leaps = 0;
    for (int y = 0; y < 65536; y++) begin
      for (int m = 0; m <= 13; m++) begin
        year = 16'(y); mon = 8'(m);
        #1;
        checks++;
        if (days_in_month != 8'(ref_days(m, y)) || leap != ref_leap(y)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: %0d/%0d gave %0d days leap=%0b", m, y, days_in_month, leap);
        end
      end
      if (ref_leap(y)) leaps++;
    end
    // 2000 is a leap year, 1900 and 2100 are not
    year = 16'd2000; mon = 8'd2; #1;
    checks++; if (days_in_month != 8'd29) failures++;
    year = 16'd1900; #1;
    checks++; if (days_in_month != 8'd28) failures++;
    year = 16'd2004; #1;
    checks++; if (days_in_month != 8'd29) failures++;
    year = 16'd2100; #1;
    checks++; if (days_in_month != 8'd28) failures++;
    $display("leap years in 0..65535: %0d", leaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
