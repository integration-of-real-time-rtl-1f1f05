// rtc_date_determiner: length of the current month for the calendar.
//
// From the month (1..12) and the year it gives the number of days of the
// month and whether the year is a leap year, so that the DAY register wraps
// after 28, 29, 30 or 31. The original design asks for a calendar that takes leap
// years into account; the rule used here is the Gregorian one (divisible by
// 4, but not by 100 unless also by 400), which is this design's choice, as
// is treating a month value outside 1..12 as a 31-day month.
//
// Purely combinational; the year is read as a plain binary number.
module rtc_date_determiner (
  input  logic [7:0]  mon,
  input  logic [15:0] year,
  output logic [7:0]  days_in_month,
  output logic        leap
);

  always_comb begin
    leap = (year % 16'd4 == 16'd0) &&
           ((year % 16'd100 != 16'd0) || (year % 16'd400 == 16'd0));
    case (mon)
      8'd2:                      days_in_month = leap ? 8'd29 : 8'd28;
      8'd4, 8'd6, 8'd9, 8'd11:   days_in_month = 8'd30;
      default:                   days_in_month = 8'd31;
    endcase
  end

endmodule
