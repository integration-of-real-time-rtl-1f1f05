// rtc_sfr: special function register interface of the real-time clock.
//
// Holds RTCON and maps the twelve RTC registers into the 8051 SFR space:
//   SFR_BASE + 0..7  : RTCON, SEC, MIN, HOUR, DAY, MON, YEARL, YEARH
//   SFR_BASE + 8..11 : MCLL, MCLH, MCHL, MCHH  (MC bits 7..0 .. 31..24)
// The register set and its two rows, and the RTCON bit layout (EN bit 0,
// CLR bit 1, OSC0..OSC2 bits 5..7, bits 2..4 reserved) follow the original
// description. The addresses (base 0xC0 by default, a row of the SFR map
// that a two-timer 8051 leaves free), the bus below and the reserved bits
// reading as 0 are this design's choices.
//
// Bus: sfr_addr selects a register; sfr_we writes sfr_wdata at the rising
// clock edge. sfr_rdata is a combinational read of the addressed register
// and sfr_hit marks an address that belongs to the RTC, for the core's SFR
// read multiplexer. A write to a register other than RTCON is passed on as a
// one-cycle strobe in wr (indexed by rtc_reg_e) with the byte in wdata; the
// counters load it at the same edge as RTCON would be written.
module rtc_sfr
  import rtc_pkg::*;
#(
  parameter logic [7:0] SFR_BASE = 8'hC0
) (
  input  logic       clk,
  input  logic       rst,
  // SFR bus from the CPU
  input  logic [7:0] sfr_addr,
  input  logic       sfr_we,
  input  logic [7:0] sfr_wdata,
  output logic [7:0] sfr_rdata,
  output logic       sfr_hit,
  // RTCON fields
  output logic       en,
  output logic       clr,
  output osc_sel_e   osc_sel,
  // register reload
  output rtc_wr_t    wr,
  output logic [7:0] wdata,
  // register values for read-back
  input  rtc_time_t  tm,
  input  logic [31:0] mc
);

  logic [7:0] rtcon;
  logic [7:0] offset;
  rtc_reg_e   sel;

  always_comb begin
    offset  = sfr_addr - SFR_BASE;
    sfr_hit = (sfr_addr >= SFR_BASE) && (offset < 8'(RTC_NREGS));
    sel     = rtc_reg_e'(offset[3:0]);
  end

  // RTCON; reserved bits are not stored
  always_ff @(posedge clk) begin
    if (rst)
      rtcon <= 8'h00;
    else if (sfr_we && sfr_hit && sel == REG_RTCON)
      rtcon <= sfr_wdata & 8'hE3;
  end

  assign en      = rtcon[RTCON_EN];
  assign clr     = rtcon[RTCON_CLR];
  assign osc_sel = osc_sel_e'(rtcon[RTCON_OSC +: 3]);

  always_comb begin
    wr = '0;
    if (sfr_we && sfr_hit && sel != REG_RTCON) wr[sel] = 1'b1;
  end
  assign wdata = sfr_wdata;

  always_comb begin
    sfr_rdata = 8'h00;
    if (sfr_hit) begin
      case (sel)
        REG_RTCON: sfr_rdata = rtcon;
        REG_SEC:   sfr_rdata = tm.sec;
        REG_MIN:   sfr_rdata = tm.min;
        REG_HOUR:  sfr_rdata = tm.hour;
        REG_DAY:   sfr_rdata = tm.day;
        REG_MON:   sfr_rdata = tm.mon;
        REG_YEARL: sfr_rdata = tm.year[7:0];
        REG_YEARH: sfr_rdata = tm.year[15:8];
        REG_MCLL:  sfr_rdata = mc[7:0];
        REG_MCLH:  sfr_rdata = mc[15:8];
        REG_MCHL:  sfr_rdata = mc[23:16];
        REG_MCHH:  sfr_rdata = mc[31:24];
        default:   sfr_rdata = 8'h00;
      endcase
    end
  end

  // At most one register is written per cycle
  a_wr_onehot: assert property (@(posedge clk) $onehot0(wr));

endmodule
