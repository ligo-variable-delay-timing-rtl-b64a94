// tb_clock_error_detector: checks the exact-2^N-cycles-per-PPS rule.
//
// A 256-cycle second (CLK_LOG2 = 8) and a 16-cycle margin. pps_edge pulses
// are driven directly with chosen spacings: exact seconds must leave the error
// flag clear; a second one cycle short or long must set it; clear must reset
// it; a missing PPS must drop pps_present and set the error after 256+16
// cycles.
module tb_clock_error_detector;
  timeunit 1ns; timeprecision 1ps;
  localparam int L = 8, M = 16;
  logic clk = 0, rst_n = 0, pps_edge = 0, clear = 0;
  logic clk_err, pps_present;
  int checks = 0, failures = 0;

  clock_error_detector #(.CLK_LOG2(L), .PPS_MARGIN(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one pps_edge cycle, then wait so the next edge is `gap` cycles later
  task automatic edge_then(int gap);
    @(negedge clk); pps_edge = 1;
    @(negedge clk); pps_edge = 0;
    repeat (gap - 2) @(negedge clk);
  endtask

  // like edge_then, with a clear pulse two cycles after the edge
  task automatic edge_clear(int gap);
    fork
      edge_then(gap);
      begin
        repeat (2) @(negedge clk); clear = 1;
        @(negedge clk); clear = 0;
      end
    join
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    check(!pps_present && !clk_err, "after reset");
    edge_then(256); edge_then(256); edge_then(256); edge_then(256);
    check(!clk_err && pps_present, "exact seconds give no error");
    edge_then(255);                         // this second is one cycle short
    edge_then(256);
    check(clk_err, "short second flagged");
    edge_clear(256);
    check(!clk_err, "clear works");
    edge_then(256);
    check(!clk_err, "clear works and exact second after it");
    edge_then(257);                         // one cycle long
    edge_then(256);
    check(clk_err, "long second flagged");
    edge_clear(256);
    edge_then(256);
    check(!clk_err && pps_present, "clean again");
    // PPS stops: error after 256 + 16 cycles, not before
    @(negedge clk); pps_edge = 1; @(negedge clk); pps_edge = 0;
    repeat (256 + M - 6) @(negedge clk);
    check(pps_present && !clk_err, "not yet timed out");
    repeat (10) @(negedge clk);
    check(!pps_present && clk_err, "missing PPS detected");
    edge_clear(256);
    check(pps_present && !clk_err, "first edge after loss only starts a measurement");
    edge_then(256);
    check(!clk_err, "exact second after recovery");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
