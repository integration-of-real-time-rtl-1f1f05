// rtc_pkg: types and constants shared by the real-time clock unit of the 8051 core.
//
// The RTC keeps a 32-bit microsecond master counter (MC) and a calendar of
// second, minute, hour, day, month (8 bits each) and year (16 bits). It is
// controlled by the RTCON special function register:
//   bit 0     EN   - run (1) / stop (0) the real-time counter
//   bit 1     CLR  - hold every RTC register at its default value
//   bits 4..2      - reserved, read as 0
//   bits 7..5 OSC2..OSC0 - crystal frequency selection (table below)
// The bit layout and the crystal table follow the original design; the
// register encoding (rtc_reg_e), the SFR addresses and the default (cleared)
// calendar values are choices of this design.
package rtc_pkg;

  // RTCON bit positions
  localparam int unsigned RTCON_EN  = 0;
  localparam int unsigned RTCON_CLR = 1;
  localparam int unsigned RTCON_OSC = 5;  // OSC0 at bit 5, OSC2 at bit 7

  // Crystal frequency selection, OSC2..OSC0
  typedef enum logic [2:0] {
    OSC_6MHZ  = 3'b000,
    OSC_10MHZ = 3'b001,
    OSC_12MHZ = 3'b010,
    OSC_20MHZ = 3'b011,
    OSC_24MHZ = 3'b100,
    OSC_48MHZ = 3'b101,
    OSC_RSV6  = 3'b110,
    OSC_RSV7  = 3'b111
  } osc_sel_e;

  // Crystal clocks per microsecond for each selection; 0 marks the two
  // unused codes, for which the divider produces no pulses.
  function automatic logic [5:0] osc_div(input osc_sel_e sel);
    case (sel)
      OSC_6MHZ:  return 6'd6;
      OSC_10MHZ: return 6'd10;
      OSC_12MHZ: return 6'd12;
      OSC_20MHZ: return 6'd20;
      OSC_24MHZ: return 6'd24;
      OSC_48MHZ: return 6'd48;
      default:   return 6'd0;
    endcase
  endfunction

  // Calendar state
  typedef struct packed {
    logic [15:0] year;
    logic [7:0]  mon;
    logic [7:0]  day;
    logic [7:0]  hour;
    logic [7:0]  min;
    logic [7:0]  sec;
  } rtc_time_t;

  // Values the registers take on reset and while CLR is set
  localparam logic [7:0]  DEF_SEC  = 8'd0;
  localparam logic [7:0]  DEF_MIN  = 8'd0;
  localparam logic [7:0]  DEF_HOUR = 8'd0;
  localparam logic [7:0]  DEF_DAY  = 8'd1;
  localparam logic [7:0]  DEF_MON  = 8'd1;
  localparam logic [15:0] DEF_YEAR = 16'd0;

  // The twelve byte-wide RTC registers. The value is the offset of the
  // register from the RTC's SFR base address: the RTCON row first, then
  // the MC row, as in the register map.
  typedef enum logic [3:0] {
    REG_RTCON = 4'd0,
    REG_SEC   = 4'd1,
    REG_MIN   = 4'd2,
    REG_HOUR  = 4'd3,
    REG_DAY   = 4'd4,
    REG_MON   = 4'd5,
    REG_YEARL = 4'd6,
    REG_YEARH = 4'd7,
    REG_MCLL  = 4'd8,
    REG_MCLH  = 4'd9,
    REG_MCHL  = 4'd10,
    REG_MCHH  = 4'd11
  } rtc_reg_e;

  localparam int unsigned RTC_NREGS = 12;

  // One write strobe per register, indexed by rtc_reg_e
  typedef logic [RTC_NREGS-1:0] rtc_wr_t;

endpackage
