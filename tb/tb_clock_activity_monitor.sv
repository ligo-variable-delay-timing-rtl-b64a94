// tb_clock_activity_monitor: checks the clock-active status bit.
//
// A 2^22 Hz clock (238 ns period) and a 16 MHz bus clock. The 2^22 Hz clock
// is started, stopped and restarted, and pps_present is toggled; clk_running
// must follow the clock within the timeout (64 bus cycles = 4 us), and
// clk_active must be clk_running AND pps_present.
module tb_clock_activity_monitor;
  timeunit 1ns; timeprecision 1ps;
  logic tclk = 0, clk = 0, trst_n = 0, rst_n = 0, pps_present = 0;
  logic clk_running, clk_active;
  bit   tclk_on = 1;
  int checks = 0, failures = 0;

  clock_activity_monitor #(.ACT_TIMEOUT(64)) dut (.*);

  always #31.25 clk = ~clk;
  always #119.2 if (tclk_on) tclk = ~tclk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #500 trst_n = 1; rst_n = 1;
    #3000;
    check(clk_running && !clk_active, "clock seen, no PPS");
    pps_present = 1;
    #1000;
    check(clk_running && clk_active, "clock and PPS active");
    // stop the 2^22 Hz clock: within 64 bus cycles plus one divider period
    tclk_on = 0;
    #2000;
    check(clk_running, "not yet timed out 2 us after stop");
    #4000;
    check(!clk_running && !clk_active, "stopped clock detected");
    #20000;
    check(!clk_running, "stays inactive");
    tclk_on = 1;
    #3000;
    check(clk_running && clk_active, "restart detected");
    pps_present = 0;
    #500;
    check(clk_running && !clk_active, "PPS loss clears clk_active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
