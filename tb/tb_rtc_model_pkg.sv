// tb_rtc_model_pkg: reference calendar used by the RTC testbenches.
//
// step() advances a date by one second the way a wall calendar does
// (Gregorian leap years, days and months counted from 1, 16-bit year that
// wraps to 0), written from a table of month lengths rather than from the
// RTL's cascade of carries.
package tb_rtc_model_pkg;
  import rtc_pkg::*;

  function automatic bit is_leap(input int y);
    if (y % 400 == 0) return 1'b1;
    if (y % 100 == 0) return 1'b0;
    return (y % 4 == 0);
  endfunction

  function automatic int month_len(input int m, input int y);
    int len[13] = '{31, 31, 28, 31, 30, 31, 30, 31, 31, 30, 31, 30, 31};
    if (m < 1 || m > 12) return 31;
    if (m == 2 && is_leap(y)) return 29;
    return len[m];
  endfunction

  // one second later; only for in-range dates
  function automatic rtc_time_t step(input rtc_time_t t);
    int s, mi, h, d, mo, y;
    rtc_time_t r;
    s = t.sec; mi = t.min; h = t.hour; d = t.day; mo = t.mon; y = t.year;
    s++;
    if (s == 60) begin s = 0; mi++; end
    if (mi == 60) begin mi = 0; h++; end
    if (h == 24) begin h = 0; d++; end
    if (d > month_len(mo, y)) begin d = 1; mo++; end
    if (mo == 13) begin mo = 1; y++; end
    if (y == 65536) y = 0;
    r.sec = 8'(s); r.min = 8'(mi); r.hour = 8'(h);
    r.day = 8'(d); r.mon = 8'(mo); r.year = 16'(y);
    return r;
  endfunction

  function automatic rtc_time_t random_time();
    rtc_time_t r;
    r.year = 16'($urandom_range(65535));
    r.mon  = 8'($urandom_range(12, 1));
    r.day  = 8'($urandom_range(month_len(r.mon, r.year), 1));
    r.hour = 8'($urandom_range(23));
    r.min  = 8'($urandom_range(59));
    r.sec  = 8'($urandom_range(59));
    return r;
  endfunction

  // a random date a few seconds before the end of a minute, hour, day,
  // month or year, so that carries are taken often
  function automatic rtc_time_t near_edge();
    rtc_time_t r = random_time();
    int k = $urandom_range(4);
    r.sec = 8'($urandom_range(59, 57));
    if (k >= 1) r.min = 8'd59;
    if (k >= 2) r.hour = 8'd23;
    if (k >= 3) r.day = 8'(month_len(r.mon, r.year));
    if (k >= 4) r.mon = 8'd12;
    if (k >= 3 && $urandom_range(3) == 0) begin
      r.mon = 8'd2; r.day = 8'(month_len(2, r.year));
    end
    return r;
  endfunction

  function automatic string fmt(input rtc_time_t t);
    return $sformatf("%0d-%0d-%0d %0d:%0d:%0d", t.year, t.mon, t.day, t.hour, t.min, t.sec);
  endfunction
endpackage
