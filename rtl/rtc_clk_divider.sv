// rtc_clk_divider: microsecond pulse generator of the real-time clock.
//
// The crystal clock (clk) is divided by the crystal frequency in MHz chosen
// with OSC2..OSC0 of RTCON (6, 10, 12, 20, 24 or 48 MHz), giving a pulse
// us_tick that is high for one clk cycle once every microsecond. The
// divisor table and the 1 us pulse are from the original design; the
// implementation (a 6-bit up-counter that wraps at
// divisor-1) is this design's.
//
// EN plays the part of the switch on the crystal clock: while it is low the
// counter holds and no pulses come out. It is used as a clock enable, not
// to gate the clock. CLR (level) and rst (synchronous, active high) return
// the counter to 0. The two unused OSC codes stop the divider.
//
// Timing: us_tick is decoded from the counter register, so it is high in the
// cycle in which the counter holds divisor-1; the first pulse after enable
// comes divisor cycles after EN is set.
module rtc_clk_divider
  import rtc_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     en,       // RTCON.EN
  input  logic     clr,      // RTCON.CLR
  input  osc_sel_e osc_sel,  // RTCON.OSC2..OSC0
  output logic     us_tick,  // one clk cycle every microsecond
  output logic [5:0] count   // divider state, for observation
);

  logic [5:0] div;

  always_comb begin
    div     = osc_div(osc_sel);
    // >= so that a change to a smaller divisor cannot strand the counter
    us_tick = en && (div != 6'd0) && (count >= div - 6'd1);
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      count <= '0;
    end else if (en && div != 6'd0) begin
      count <= us_tick ? 6'd0 : count + 6'd1;
    end
  end

endmodule
