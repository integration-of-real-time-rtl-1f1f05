// tb_rtc_unit_full: the RTC unit at its full size (10^6 microseconds per
// second), driven through the SFR bus.
//
// 1. New year at 10 MHz: RTCON = 0010_0001 (10 MHz, EN), calendar loaded
//    with 23:59:59 on 31 December 2003 and MC with 999996. MC must step
//    999996, 999997, 999998, 999999 once every 10 clocks, and on the pulse
//    that would take it past 999999 it returns to 0 while every calendar
//    register rolls over at once, to 00:00:00 on 1 January 2004 (a leap
//    year, 31-day month).
// 2. For each of the six crystal selections, one whole second from MC = 0
//    must last exactly crystal-MHz x 10^6 clocks.
module tb_rtc_unit_full;
  import rtc_pkg::*;
  import tb_rtc_model_pkg::*;

  localparam logic [7:0] BASE = 8'hC0;

  logic clk = 1'b0;
  logic rst;
  logic [7:0] sfr_addr, sfr_wdata, sfr_rdata;
  logic sfr_we, sfr_hit;
  rtc_time_t tm;
  logic [31:0] mc;
  logic leap, us_tick, sec_tick, year_carry;
  logic [7:0] days_in_month;
  logic [5:0] div_count;
  int checks = 0, failures = 0;

  rtc_unit dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic sfr_write(input rtc_reg_e r, input logic [7:0] v);
    @(negedge clk);
    sfr_addr = BASE + 8'(r); sfr_we = 1'b1; sfr_wdata = v;
    @(negedge clk);
    sfr_we = 1'b0;
  endtask

  function automatic rtc_time_t mk(int y, int mo, int d, int h, int mi, int s);
    rtc_time_t r;
    r.year = 16'(y); r.mon = 8'(mo); r.day = 8'(d);
    r.hour = 8'(h); r.min = 8'(mi); r.sec = 8'(s);
    return r;
  endfunction

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mhz[6] = '{6, 10, 12, 20, 24, 48};
    longint unsigned n;
    logic [31:0] prev;
    int unsigned run_len;
    rst = 1'b1; sfr_addr = '0; sfr_we = 1'b0; sfr_wdata = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // 1. new year 2003 -> 2004 at 10 MHz
    sfr_write(REG_SEC, 8'd59);
    sfr_write(REG_MIN, 8'd59);
    sfr_write(REG_HOUR, 8'd23);
    sfr_write(REG_DAY, 8'd31);
    sfr_write(REG_MON, 8'd12);
    sfr_write(REG_YEARL, 8'(2003));
    sfr_write(REG_YEARH, 8'(2003 >> 8));
    sfr_write(REG_MCLL, 8'(999_996));
    sfr_write(REG_MCLH, 8'(999_996 >> 8));
    sfr_write(REG_MCHL, 8'(999_996 >> 16));
    sfr_write(REG_MCHH, 8'(999_996 >> 24));
    check(tm == mk(2003, 12, 31, 23, 59, 59) && mc == 999_996 && days_in_month == 31 && !leap,
          $sformatf("loaded %s MC=%0d", fmt(tm), mc));
    sfr_write(REG_RTCON, 8'b0010_0001);
    prev = mc; run_len = 0;
    n = 0;
    while (n < 1000) begin
      @(negedge clk);
      n++;
      run_len++;
      if (mc != prev) begin
        if (mc == 0) break;
        check(mc == prev + 1, $sformatf("MC went %0d -> %0d", prev, mc));
        check(run_len == 10 || prev == 999_996, $sformatf("MC %0d held %0d clocks", prev, run_len));
        check(tm == mk(2003, 12, 31, 23, 59, 59), "calendar moved before MC wrapped");
        prev = mc; run_len = 0;
      end
    end
    check(prev == 999_999 && run_len == 10, $sformatf("last MC %0d held %0d clocks", prev, run_len));
    check(mc == 0, $sformatf("MC=%0d at the new year", mc));
    check(tm == mk(2004, 1, 1, 0, 0, 0), $sformatf("new year gave %s", fmt(tm)));
    check(leap && days_in_month == 31, "2004 not seen as a leap year");
    $display("new year reached after %0d clocks: %s", n, fmt(tm));

    // 2. one full second for every crystal selection
    for (int o = 0; o < 6; o++) begin
      sfr_write(REG_RTCON, {3'(o), 5'b00010});  // CLR, stopped
      sfr_write(REG_RTCON, {3'(o), 5'b00001});  // run
      n = 0;
      while (!sec_tick && n < 60_000_000) begin
        @(negedge clk);
        n++;
      end
      @(negedge clk);
      // EN is registered on the edge that ends the write cycle
      check(n + 1 == longint'(mhz[o]) * 1_000_000,
            $sformatf("%0d MHz: first second after %0d clocks", mhz[o], n + 1));
      check(tm == mk(0, 1, 1, 0, 0, 1) && mc == 0,
            $sformatf("%0d MHz: after one second %s MC=%0d", mhz[o], fmt(tm), mc));
      $display("%0d MHz: one second = %0d clocks", mhz[o], n + 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
