// rtc_calendar: cascaded second, minute, hour, day, month and year registers.
//
// Each one-second pulse from the master counter advances SEC. A register
// that passes its last value returns to its first and carries into the next
// one, all within the same clock edge, so that 23:59:59 on 31 December 2003
// becomes 00:00:00 on 1 January 2004 in one step:
//   SEC  0..59   -> carry ovsec  into MIN
//   MIN  0..59   -> carry ovmin  into HOUR
//   HOUR 0..23   -> carry ovhour into DAY
//   DAY  1..days_in_month (from rtc_date_determiner) -> carry ovday into MON
//   MON  1..12   -> carry ovmon  into YEAR
//   YEAR 16 bits, returns to 0 after 65535
// The cascade, the limits 60/60/24/12, the register widths and the leap-year
// aware month length are from the original design. Days and months
// counting from 1, binary (not BCD) registers, the year wrapping at its
// 16-bit limit and the ">=" tests, which bring a register loaded with an
// out-of-range value back into range at its next step, are this design's.
//
// Every register can be reloaded a byte at a time (YEAR through YEARL and
// YEARH); a reload wins over counting in the same cycle and does not stop
// the carry into the registers above it. CLR (level) and rst (synchronous,
// active high) set the defaults of rtc_pkg (00:00:00, day 1, month 1,
// year 0).
module rtc_calendar
  import rtc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      clr,
  input  logic      sec_tick,   // one pulse per second from the master counter
  input  rtc_wr_t   wr,         // reload strobes, indexed by rtc_reg_e
  input  logic [7:0] wdata,
  output rtc_time_t tm,
  output logic      leap,       // current year is a leap year
  output logic [7:0] days_in_month,
  output logic      ovmon       // year carry, for observation
);

  logic ovsec, ovmin, ovhour, ovday;

  rtc_date_determiner u_date (
    .mon           (tm.mon),
    .year          (tm.year),
    .days_in_month (days_in_month),
    .leap          (leap)
  );

  always_comb begin
    ovsec  = sec_tick && (tm.sec  >= 8'd59);
    ovmin  = ovsec    && (tm.min  >= 8'd59);
    ovhour = ovmin    && (tm.hour >= 8'd23);
    ovday  = ovhour   && (tm.day  >= days_in_month);
    ovmon  = ovday    && (tm.mon  >= 8'd12);
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      tm.sec  <= DEF_SEC;
      tm.min  <= DEF_MIN;
      tm.hour <= DEF_HOUR;
      tm.day  <= DEF_DAY;
      tm.mon  <= DEF_MON;
      tm.year <= DEF_YEAR;
    end else begin
      if (wr[REG_SEC])       tm.sec <= wdata;
      else if (sec_tick)     tm.sec <= ovsec ? 8'd0 : tm.sec + 8'd1;

      if (wr[REG_MIN])       tm.min <= wdata;
      else if (ovsec)        tm.min <= ovmin ? 8'd0 : tm.min + 8'd1;

      if (wr[REG_HOUR])      tm.hour <= wdata;
      else if (ovmin)        tm.hour <= ovhour ? 8'd0 : tm.hour + 8'd1;

      if (wr[REG_DAY])       tm.day <= wdata;
      else if (ovhour)       tm.day <= ovday ? 8'd1 : tm.day + 8'd1;

      if (wr[REG_MON])       tm.mon <= wdata;
      else if (ovday)        tm.mon <= ovmon ? 8'd1 : tm.mon + 8'd1;

      if (wr[REG_YEARL] || wr[REG_YEARH]) begin
        if (wr[REG_YEARL])   tm.year[7:0]  <= wdata;
        if (wr[REG_YEARH])   tm.year[15:8] <= wdata;
      end else if (ovmon)    tm.year <= tm.year + 16'd1;  // 65535 -> 0
    end
  end

endmodule
