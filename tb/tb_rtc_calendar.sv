// tb_rtc_calendar: checks the cascaded calendar registers against a
// reference calendar.
//
// Random dates, most of them a few seconds before the end of a minute, hour,
// day, month or year, are loaded through the reload strobes and advanced by
// one-second pulses; after every pulse all six registers are compared with
// the reference. Fixed cases cover 31 Dec 2003 -> 1 Jan 2004, 28/29 February
// in 1900, 2000 and 2004, the year wrap at 65535, a reload that coincides
// with a pulse, and CLR.
module tb_rtc_calendar;
  import rtc_pkg::*;
  import tb_rtc_model_pkg::*;

  logic clk = 1'b0;
  logic rst, clr, sec_tick;
  rtc_wr_t wr;
  logic [7:0] wdata;
  rtc_time_t tm;
  logic leap;
  logic [7:0] days_in_month;
  logic ovmon;
  int checks = 0, failures = 0;
  int years_rolled = 0;

  rtc_calendar dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic load(input rtc_time_t t);
    logic [7:0] v[8];
    v[REG_SEC] = t.sec; v[REG_MIN] = t.min; v[REG_HOUR] = t.hour;
    v[REG_DAY] = t.day; v[REG_MON] = t.mon;
    v[REG_YEARL] = t.year[7:0]; v[REG_YEARH] = t.year[15:8];
    for (int r = REG_SEC; r <= REG_YEARH; r++) begin
      @(negedge clk);
      wr = '0; wr[r] = 1'b1; wdata = v[r];
    end
    @(negedge clk);
    wr = '0;
    check(tm == t, $sformatf("load %s gave %s", fmt(t), fmt(tm)));
  endtask

  task automatic run(input rtc_time_t start, input int seconds);
    rtc_time_t expect_t = start;
    load(start);
    repeat (seconds) begin
      sec_tick = 1'b1;
      #1;
      if (ovmon) years_rolled++;
      @(negedge clk);
      sec_tick = 1'b0;
      expect_t = step(expect_t);
      check(tm == expect_t, $sformatf("from %s: got %s, expected %s",
                                      fmt(start), fmt(tm), fmt(expect_t)));
      @(negedge clk);  // idle cycle: nothing moves
      check(tm == expect_t, "calendar moved without a pulse");
    end
  endtask

  function automatic rtc_time_t mk(int y, int mo, int d, int h, int mi, int s);
    rtc_time_t r;
    r.year = 16'(y); r.mon = 8'(mo); r.day = 8'(d);
    r.hour = 8'(h); r.min = 8'(mi); r.sec = 8'(s);
    return r;
  endfunction

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clr = 1'b0; sec_tick = 1'b0; wr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(tm == mk(0, 1, 1, 0, 0, 0), $sformatf("reset value %s", fmt(tm)));

    run(mk(2003, 12, 31, 23, 59, 59), 2);
    check(tm == mk(2004, 1, 1, 0, 0, 1), "new year 2004");
    run(mk(2004, 2, 28, 23, 59, 59), 1);
    check(tm.day == 8'd29 && tm.mon == 8'd2 && leap, "29 Feb 2004");
    run(mk(2004, 2, 29, 23, 59, 59), 1);
    check(tm.day == 8'd1 && tm.mon == 8'd3, "1 Mar 2004");
    run(mk(1900, 2, 28, 23, 59, 59), 1);
    check(tm.day == 8'd1 && tm.mon == 8'd3 && !leap, "1900 not leap");
    run(mk(2000, 2, 28, 23, 59, 59), 1);
    check(tm.day == 8'd29 && tm.mon == 8'd2, "2000 leap");
    run(mk(2003, 4, 30, 23, 59, 59), 1);
    check(tm.day == 8'd1 && tm.mon == 8'd5, "30-day month");
    run(mk(65535, 12, 31, 23, 59, 59), 1);
    check(tm == mk(0, 1, 1, 0, 0, 0), "year wrap");

    for (int i = 0; i < 300; i++) run(near_edge(), 4);
    for (int i = 0; i < 50; i++) run(random_time(), 3);

    // a reload in the same cycle as a pulse: the reloaded register takes
    // the written value, the carry still reaches the register above
    load(mk(2010, 6, 15, 10, 59, 59));
    @(negedge clk);
    sec_tick = 1'b1; wr = '0; wr[REG_SEC] = 1'b1; wdata = 8'd30;
    @(negedge clk);
    sec_tick = 1'b0; wr = '0;
    check(tm == mk(2010, 6, 15, 11, 0, 30), $sformatf("reload against pulse: %s", fmt(tm)));

    // CLR sets the defaults and holds them
    clr = 1'b1;
    @(negedge clk);
    sec_tick = 1'b1;
    repeat (3) @(negedge clk);
    sec_tick = 1'b0;
    check(tm == mk(0, 1, 1, 0, 0, 0), $sformatf("CLR gave %s", fmt(tm)));
    clr = 1'b0;

    check(years_rolled > 10, $sformatf("only %0d year carries", years_rolled));
    $display("year carries: %0d", years_rolled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
