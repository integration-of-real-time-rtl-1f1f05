// rtc_unit: real-time clock unit of the 8051 core (top of this design).
//
// The crystal clock is divided down to one pulse per microsecond according
// to the crystal frequency set in RTCON; the 32-bit master counter MC counts
// these pulses and, every 10^6 of them, advances the calendar: seconds,
// minutes, hours, days (month length and leap years included), months and
// the 16-bit year, all cascaded within one clock edge. RTCON.EN runs and
// stops the whole chain, RTCON.CLR holds every register at its default, and
// the CPU reads and reloads every register through the SFR bus.
//
//   clk --> rtc_clk_divider --us_tick--> rtc_master_counter --sec_tick-->
//           rtc_calendar (with rtc_date_determiner)
//   SFR bus <--> rtc_sfr (RTCON, address decode, read-back, reload strobes)
//
// The structure follows the original design. The rest of the 8051 core
// (CPU, timers, serial port, interrupt unit, ports, memories) is not part of
// this RTL: the SFR bus by which the CPU reaches the RTC is brought out as
// ports. The bus is sfr_addr/sfr_we/sfr_wdata in, sfr_rdata/sfr_hit out,
// written at the rising edge of clk and read combinationally (see rtc_sfr).
// rst is synchronous and active high, like the 8051 RESET pin. The
// calendar, MC, the divider state, the length of the current month and the
// microsecond, second and year carries are also brought out for observation.
module rtc_unit
  import rtc_pkg::*;
#(
  parameter logic [7:0]  SFR_BASE      = 8'hC0,
  parameter int unsigned TICKS_PER_SEC = 1_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  sfr_addr,
  input  logic        sfr_we,
  input  logic [7:0]  sfr_wdata,
  output logic [7:0]  sfr_rdata,
  output logic        sfr_hit,
  output rtc_time_t   tm,
  output logic [31:0] mc,
  output logic        leap,
  output logic [7:0]  days_in_month,
  output logic [5:0]  div_count,
  output logic        us_tick,
  output logic        sec_tick,
  output logic        year_carry
);

  logic       en, clr;
  osc_sel_e   osc_sel;
  rtc_wr_t    wr;
  logic [7:0] wdata;

  rtc_sfr #(.SFR_BASE(SFR_BASE)) u_sfr (
    .clk, .rst,
    .sfr_addr, .sfr_we, .sfr_wdata, .sfr_rdata, .sfr_hit,
    .en, .clr, .osc_sel,
    .wr, .wdata,
    .tm, .mc
  );

  rtc_clk_divider u_div (
    .clk, .rst, .en, .clr, .osc_sel,
    .us_tick, .count(div_count)
  );

  rtc_master_counter #(.TICKS_PER_SEC(TICKS_PER_SEC)) u_mc (
    .clk, .rst, .clr, .us_tick,
    .wr_byte (wr[REG_MCHH:REG_MCLL]),
    .wdata, .mc, .sec_tick
  );

  rtc_calendar u_cal (
    .clk, .rst, .clr, .sec_tick,
    .wr, .wdata,
    .tm, .leap, .days_in_month, .ovmon(year_carry)
  );

endmodule
