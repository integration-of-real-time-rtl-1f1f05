// tb_rtc_unit: end-to-end test of the RTC unit through its SFR bus, with a
// short second (TICKS_PER_SEC = 25 microsecond pulses) to keep it fast.
//
// For every crystal selection, dates near the end of a minute, hour, day,
// month or year are written through the SFR bus with the clock stopped,
// read back, and then the clock is run for a few seconds. A reference
// calendar follows every second; the seconds must come exactly
// crystal-MHz x TICKS_PER_SEC clocks apart. Stopping with EN, clearing with
// CLR and reading MC over the bus are covered too. Each mechanism is
// counted and one that never happened counts as a failure.
module tb_rtc_unit;
  import rtc_pkg::*;
  import tb_rtc_model_pkg::*;

  localparam int unsigned TPS = 25;
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

  rtc_unit #(.TICKS_PER_SEC(TPS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- reference calendar, advanced on every second while tracking ----
  rtc_time_t model;
  bit tracking = 1'b0;
  longint unsigned cyc = 0, last_sec = 0;
  int unsigned expect_period = 0;
  int n_us = 0, n_sec = 0, n_min = 0, n_hour = 0, n_day = 0, n_mon = 0, n_year = 0;
  int n_leapday = 0, n_period_ok = 0, n_stop = 0, n_clr = 0, n_reload = 0, n_mcread = 0;
  int n_osc[6] = '{default: 0};

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (us_tick) n_us <= n_us + 1;
    if (tracking && sec_tick) begin
      n_sec <= n_sec + 1;
      if (model.sec == 59) n_min <= n_min + 1;
      if (model.sec == 59 && model.min == 59) n_hour <= n_hour + 1;
      if (model.sec == 59 && model.min == 59 && model.hour == 23) begin
        n_day <= n_day + 1;
        if (model.day == 8'(month_len(model.mon, model.year))) n_mon <= n_mon + 1;
        if (model.mon == 2 && model.day == 28 && is_leap(model.year)) n_leapday <= n_leapday + 1;
      end
      if (year_carry) n_year <= n_year + 1;
      if (last_sec != 0) begin
        checks++;
        if (cyc - last_sec != longint'(expect_period)) begin
          failures++;
          $display("FAIL: second lasted %0d clocks, expected %0d", cyc - last_sec, expect_period);
        end else n_period_ok <= n_period_ok + 1;
      end
      last_sec <= cyc;
      model <= step(model);
    end
  end

  always @(negedge clk) begin
    if (tracking) begin
      checks++;
      if (tm != model) begin
        failures++;
        if (failures < 20) $display("FAIL: calendar %s, expected %s", fmt(tm), fmt(model));
      end
    end
  end

  // ---- SFR bus ----
  task automatic sfr_write(input rtc_reg_e r, input logic [7:0] v);
    @(negedge clk);
    sfr_addr = BASE + 8'(r); sfr_we = 1'b1; sfr_wdata = v;
    @(negedge clk);
    sfr_we = 1'b0;
  endtask

  task automatic sfr_read(input rtc_reg_e r, output logic [7:0] v);
    @(negedge clk);
    sfr_addr = BASE + 8'(r);
    #1;
    checks++;
    if (!sfr_hit) begin
      failures++;
      $display("FAIL: no hit for register %0d", r);
    end
    v = sfr_rdata;
  endtask

  task automatic read_time(output rtc_time_t t);
    logic [7:0] lo, hi;
    sfr_read(REG_SEC, t.sec);
    sfr_read(REG_MIN, t.min);
    sfr_read(REG_HOUR, t.hour);
    sfr_read(REG_DAY, t.day);
    sfr_read(REG_MON, t.mon);
    sfr_read(REG_YEARL, lo);
    sfr_read(REG_YEARH, hi);
    t.year = {hi, lo};
  endtask

  task automatic read_mc(output logic [31:0] v);
    sfr_read(REG_MCLL, v[7:0]);
    sfr_read(REG_MCLH, v[15:8]);
    sfr_read(REG_MCHL, v[23:16]);
    sfr_read(REG_MCHH, v[31:24]);
  endtask

  task automatic write_time(input rtc_time_t t);
    sfr_write(REG_SEC, t.sec);
    sfr_write(REG_MIN, t.min);
    sfr_write(REG_HOUR, t.hour);
    sfr_write(REG_DAY, t.day);
    sfr_write(REG_MON, t.mon);
    sfr_write(REG_YEARL, t.year[7:0]);
    sfr_write(REG_YEARH, t.year[15:8]);
  endtask

  task automatic write_mc(input logic [31:0] v);
    sfr_write(REG_MCLL, v[7:0]);
    sfr_write(REG_MCLH, v[15:8]);
    sfr_write(REG_MCHL, v[23:16]);
    sfr_write(REG_MCHH, v[31:24]);
  endtask

  task automatic wait_seconds(input int n);
    int start = n_sec;
    while (n_sec < start + n) @(negedge clk);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mhz[6] = '{6, 10, 12, 20, 24, 48};
    rtc_time_t t, rb;
    logic [31:0] m;
    logic [7:0] r;
    rst = 1'b1; sfr_addr = '0; sfr_we = 1'b0; sfr_wdata = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    for (int o = 0; o < 6; o++) begin
      for (int k = 0; k < 6; k++) begin
        // clock stopped, crystal selected
        sfr_write(REG_RTCON, {3'(o), 5'b00000});
        if (k == 0) t = random_time();
        else if (k == 1) t = '{year: 16'(4 * $urandom_range(16383)), mon: 8'd2, day: 8'd28,
                               hour: 8'd23, min: 8'd59, sec: 8'd58};
        else t = near_edge();
        write_time(t);
        read_time(rb);
        check(rb == t, $sformatf("read back %s after writing %s", fmt(rb), fmt(t)));
        n_reload++;
        m = 32'($urandom_range(TPS - 1));
        write_mc(m);
        read_mc(rb[31:0]);
        check(rb[31:0] == m, $sformatf("MC read back %0d after writing %0d", rb[31:0], m));
        n_mcread++;
        // run
        model = t;
        last_sec = 0;
        expect_period = mhz[o] * TPS;
        tracking = 1'b1;
        sfr_write(REG_RTCON, {3'(o), 5'b00001});
        wait_seconds(4);
        n_osc[o]++;
        // stop: nothing may change while EN is low
        sfr_write(REG_RTCON, {3'(o), 5'b00000});
        repeat (3) @(negedge clk);
        t = tm; m = mc;
        repeat (2 * mhz[o] * TPS) @(negedge clk);
        check(tm == t && mc == m && n_sec >= 0, "RTC moved while EN was low");
        n_stop++;
        tracking = 1'b0;
        read_time(rb);
        check(rb == model, $sformatf("bus read %s, expected %s", fmt(rb), fmt(model)));
      end
    end

    // CLR: every register to its default, and held there while set
    sfr_write(REG_RTCON, 8'b0010_0011);
    repeat (20 * TPS) @(negedge clk);
    read_time(rb);
    read_mc(m);
    check(rb.sec == 0 && rb.min == 0 && rb.hour == 0 && rb.day == 1 && rb.mon == 1 &&
          rb.year == 0 && m == 0, $sformatf("after CLR: %s MC=%0d", fmt(rb), m));
    sfr_read(REG_RTCON, r);
    check(r == 8'b0010_0011, $sformatf("RTCON read %b", r));
    n_clr++;
    // and running again from the defaults after CLR is released
    model = rb;
    last_sec = 0;
    expect_period = 10 * TPS;
    tracking = 1'b1;
    sfr_write(REG_RTCON, 8'b0010_0001);
    wait_seconds(2);
    tracking = 1'b0;

    $display("us pulses %0d, seconds %0d, minute/hour/day/month/year carries %0d/%0d/%0d/%0d/%0d",
             n_us, n_sec, n_min, n_hour, n_day, n_mon, n_year);
    $display("29 Feb entered %0d, exact seconds %0d, EN stops %0d, CLR %0d, reloads %0d, MC reads %0d",
             n_leapday, n_period_ok, n_stop, n_clr, n_reload, n_mcread);
    check(n_us > 0, "no microsecond pulse");
    check(n_sec > 0, "no second");
    check(n_min > 0, "no minute carry");
    check(n_hour > 0, "no hour carry");
    check(n_day > 0, "no day carry");
    check(n_mon > 0, "no month carry");
    check(n_year > 0, "no year carry");
    check(n_leapday > 0, "never entered 29 February");
    check(n_period_ok > 0, "no second timed");
    check(n_stop > 0 && n_clr > 0 && n_reload > 0 && n_mcread > 0, "bus mechanism missing");
    foreach (n_osc[i]) check(n_osc[i] > 0, $sformatf("crystal selection %0d never run", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
