// tb_rtc_clk_divider: checks the microsecond pulse generator.
//
// For each crystal selection the distance between successive us_tick pulses
// must equal the crystal frequency in MHz (6, 10, 12, 20, 24, 48 clocks), and
// the first pulse must come that many clocks after the divider is released.
// The two unused codes, EN low and CLR high must produce no pulses; EN low
// must hold the divider state and CLR must clear it.
module tb_rtc_clk_divider;
  import rtc_pkg::*;

  logic clk = 1'b0;
  logic rst, en, clr;
  osc_sel_e osc_sel;
  logic us_tick;
  logic [5:0] count;
  int checks = 0, failures = 0;

  rtc_clk_divider dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Count the clocks from release to each of the next n pulses
  task automatic measure(input osc_sel_e sel, input int unsigned mhz);
    int unsigned cyc, last, pulses;
    @(negedge clk);
    rst = 1'b1; en = 1'b0; osc_sel = sel;
    @(negedge clk);
    rst = 1'b0; en = 1'b1;
    cyc = 0; last = 0; pulses = 0;
    repeat (5 * 48 + 10) begin
      cyc++;
      if (us_tick) begin
        pulses++;
        check(cyc - last == mhz,
              $sformatf("osc %0d: pulse spacing %0d, expected %0d", sel, cyc - last, mhz));
        last = cyc;
      end
      @(negedge clk);
    end
    if (mhz != 0)
      check(pulses == (5 * 48 + 10) / mhz,
            $sformatf("osc %0d: %0d pulses, expected %0d", sel, pulses, (5 * 48 + 10) / mhz));
    else
      check(pulses == 0, $sformatf("unused osc %0d gave %0d pulses", sel, pulses));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] held;
    int unsigned n;
    rst = 1'b1; en = 1'b0; clr = 1'b0; osc_sel = OSC_10MHZ;
    measure(OSC_6MHZ, 6);
    measure(OSC_10MHZ, 10);
    measure(OSC_12MHZ, 12);
    measure(OSC_20MHZ, 20);
    measure(OSC_24MHZ, 24);
    measure(OSC_48MHZ, 48);
    measure(OSC_RSV6, 0);
    measure(OSC_RSV7, 0);

    // EN low holds the count and gives no pulse
    osc_sel = OSC_48MHZ;
    repeat (7) @(negedge clk);
    en = 1'b0;
    held = count;
    n = 0;
    repeat (100) begin
      @(negedge clk);
      if (us_tick) n++;
    end
    check(n == 0, "pulses while EN low");
    check(count == held, "divider state changed while EN low");
    // after EN returns, the next pulse comes 48 - held - 1 clocks later
    en = 1'b1;
    n = 0;
    while (!us_tick && n < 100) begin
      @(negedge clk);
      n++;
    end
    check(n == 48 - 1 - int'(held), $sformatf("resume after EN: %0d clocks", n));

    // CLR clears the state and suppresses pulses
    repeat (5) @(negedge clk);
    clr = 1'b1;
    n = 0;
    repeat (100) begin
      @(negedge clk);
      if (us_tick) n++;
    end
    check(n == 0, "pulses while CLR high");
    check(count == 0, "CLR did not clear the divider");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
