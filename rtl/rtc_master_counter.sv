// rtc_master_counter: the 32-bit master counter (MC) of the real-time clock.
//
// MC counts the microsecond pulses of the clock divider. When a pulse
// arrives while MC holds TICKS_PER_SEC-1 (999999 by default), MC returns to
// 0 and sec_tick is raised for that cycle: one second has passed and the
// SEC register is advanced in the same clock edge. Counting to 10^6 and the
// 32-bit width are from the original design.
//
// The four bytes of MC can be written from the SFR bus (MCLL = bits 7..0,
// MCLH = 15..8, MCHL = 23..16, MCHH = 31..24); a write takes precedence over
// counting, and a pulse that arrives with a write is dropped (no count, no
// carry). A value written above TICKS_PER_SEC-1 wraps to
// 0 on the next pulse. CLR (level) and rst (synchronous, active high) clear
// MC. Write access and these precedences are this design's choices.
//
// Timing: sec_tick is combinational from us_tick, the write strobes and MC
// (no added latency).
module rtc_master_counter #(
  parameter int unsigned TICKS_PER_SEC = 1_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        us_tick,   // from the clock divider
  input  logic [3:0]  wr_byte,   // write strobes: bit i writes MC[8i+7:8i]
  input  logic [7:0]  wdata,
  output logic [31:0] mc,
  output logic        sec_tick   // MC wrapped: advance SEC
);

  localparam logic [31:0] LAST = 32'(TICKS_PER_SEC - 1);

  assign sec_tick = us_tick && !(|wr_byte) && (mc >= LAST);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      mc <= '0;
    end else if (|wr_byte) begin
      for (int i = 0; i < 4; i++)
        if (wr_byte[i]) mc[8*i +: 8] <= wdata;
    end else if (us_tick) begin
      mc <= sec_tick ? 32'd0 : mc + 32'd1;
    end
  end

endmodule
