// tb_rtc_master_counter: checks the 32-bit microsecond master counter at its
// full size (10^6 counts per second).
//
// With a pulse on us_tick every clock, sec_tick must come exactly once per
// 10^6 pulses, in the cycle in which MC holds 999999, and MC must return to
// 0. Byte writes must load MC and win over counting; CLR must clear it; no
// pulse, no count.
module tb_rtc_master_counter;
  logic clk = 1'b0;
  logic rst, clr, us_tick;
  logic [3:0]  wr_byte;
  logic [7:0]  wdata;
  logic [31:0] mc;
  logic        sec_tick;
  int checks = 0, failures = 0;

  rtc_master_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_mc(input logic [31:0] v);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      wr_byte = 4'b1 << i;
      wdata = v[8*i +: 8];
    end
    @(negedge clk);
    wr_byte = '0;
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n, ticks, at;
    rst = 1'b1; clr = 1'b0; us_tick = 1'b0; wr_byte = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(mc == 0, "MC not 0 after reset");

    // no pulse, no count
    repeat (10) @(negedge clk);
    check(mc == 0, "MC counted without pulses");

    // one full second from 0: exactly 10^6 pulses to the carry
    us_tick = 1'b1;
    n = 0; ticks = 0; at = 0;
    repeat (1_000_000) begin
      n++;
      if (sec_tick) begin
        ticks++;
        at = n;
        check(mc == 999_999, $sformatf("sec_tick with MC=%0d", mc));
      end
      check(mc == n - 1, "MC does not follow the pulse count");
      @(negedge clk);
    end
    check(ticks == 1 && at == 1_000_000,
          $sformatf("%0d carries, last at pulse %0d", ticks, at));
    check(mc == 0, $sformatf("MC=%0d after 10^6 pulses", mc));

    // pulses that arrive every third clock
    us_tick = 1'b0;
    write_mc(32'd999_997);
    check(mc == 999_997, $sformatf("byte writes gave MC=%0d", mc));
    n = 0; ticks = 0;
    repeat (12) begin
      @(negedge clk);
      n++;
      us_tick = (n % 3 == 0);
      #1;
      if (sec_tick) ticks++;
    end
    us_tick = 1'b0;
    @(negedge clk);
    check(ticks == 1, $sformatf("%0d carries around the wrap", ticks));
    check(mc == 0, $sformatf("MC=%0d after 3 slow pulses from 999997", mc));

    // a write wins over a pulse in the same cycle; that pulse is not counted
    @(negedge clk);
    us_tick = 1'b1; wr_byte = 4'b1000; wdata = 8'h12;
    @(negedge clk);
    us_tick = 1'b0; wr_byte = '0;
    check(mc == 32'h1200_0000, $sformatf("write against pulse gave %h", mc));

    // an out-of-range value wraps at the next pulse, with a carry
    write_mc(32'hFFFF_FFF0);
    us_tick = 1'b1;
    #1;
    check(sec_tick, "no carry from an out-of-range MC");
    @(negedge clk);
    check(mc == 0, "out-of-range MC did not wrap");

    // CLR clears and holds
    repeat (5) @(negedge clk);
    clr = 1'b1;
    repeat (3) @(negedge clk);
    check(mc == 0, "CLR did not clear MC");
    clr = 1'b0; us_tick = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
