// tb_rtc_sfr: checks the RTC's SFR interface.
//
// RTCON writes must reach EN, CLR and OSC2..OSC0 with the reserved bits
// reading as 0; a write to each other register must give exactly one reload
// strobe, the right one, with the byte; every register must read back the
// value presented on tm/mc; addresses outside the RTC's twelve must neither
// hit nor write.
module tb_rtc_sfr;
  import rtc_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [7:0] sfr_addr, sfr_wdata, sfr_rdata, wdata;
  logic sfr_we, sfr_hit, en, clr;
  osc_sel_e osc_sel;
  rtc_wr_t wr;
  rtc_time_t tm;
  logic [31:0] mc;
  int checks = 0, failures = 0;

  localparam logic [7:0] BASE = 8'hC0;

  rtc_sfr dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, expect_r;
    rst = 1'b1; sfr_addr = '0; sfr_we = 1'b0; sfr_wdata = '0;
    tm = '0; mc = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    sfr_addr = BASE;
    #1;
    check(sfr_hit && sfr_rdata == 8'h00 && !en && !clr, "RTCON after reset");

    // RTCON: the value used in the 10 MHz example, then random ones
    for (int i = 0; i < 40; i++) begin
      v = (i == 0) ? 8'b0010_0001 : 8'($urandom);
      @(negedge clk);
      sfr_addr = BASE; sfr_we = 1'b1; sfr_wdata = v;
      #1;
      check(wr == '0, "RTCON write gave a reload strobe");
      @(negedge clk);
      sfr_we = 1'b0;
      #1;
      check(en == v[0] && clr == v[1] && osc_sel == osc_sel_e'(v[7:5]),
            $sformatf("RTCON=%b: en=%b clr=%b osc=%0d", v, en, clr, osc_sel));
      check(sfr_rdata == (v & 8'hE3), $sformatf("RTCON read %b after %b", sfr_rdata, v));
    end

    // reload strobes
    for (int r = REG_SEC; r <= REG_MCHH; r++) begin
      v = 8'($urandom);
      @(negedge clk);
      sfr_addr = BASE + 8'(r); sfr_we = 1'b1; sfr_wdata = v;
      #1;
      check(wr == rtc_wr_t'(1) << r && wdata == v,
            $sformatf("write to register %0d gave strobes %b", r, wr));
    end
    @(negedge clk);
    sfr_we = 1'b0;

    // read-back
    for (int i = 0; i < 20; i++) begin
      tm = rtc_time_t'({$urandom, $urandom});
      mc = $urandom;
      for (int r = 0; r < 12; r++) begin
        sfr_addr = BASE + 8'(r);
        #1;
        case (r)
          1: expect_r = tm.sec;   2: expect_r = tm.min;   3: expect_r = tm.hour;
          4: expect_r = tm.day;   5: expect_r = tm.mon;
          6: expect_r = tm.year[7:0];  7: expect_r = tm.year[15:8];
          8: expect_r = mc[7:0];  9: expect_r = mc[15:8];
          10: expect_r = mc[23:16]; 11: expect_r = mc[31:24];
          default: expect_r = sfr_rdata;
        endcase
        check(sfr_hit && sfr_rdata == expect_r,
              $sformatf("read of register %0d gave %h, expected %h", r, sfr_rdata, expect_r));
      end
    end

    // other addresses
    for (int a = 0; a < 256; a++) begin
      if (a >= BASE && a < BASE + 12) continue;
      @(negedge clk);
      sfr_addr = 8'(a); sfr_we = 1'b1; sfr_wdata = 8'hFF;
      #1;
      check(!sfr_hit && wr == '0 && sfr_rdata == 8'h00,
            $sformatf("address %h hit=%b wr=%b", a, sfr_hit, wr));
    end
    @(negedge clk);
    sfr_we = 1'b0;
    sfr_addr = BASE;
    #1;
    check(sfr_rdata != 8'hE3 || v == 8'hE3, "RTCON written from a foreign address");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
