// tb_pps_phase_counter: self-checking test of the PPS-aligned phase counter.
//
// Uses a 256-cycle "second" (CLK_LOG2 = 8). PPS is raised after a clock edge
// every 256 cycles; the expected phase is computed from the number of clock
// edges since the PPS rise. Also checks that
// a resync request stops the count until the next PPS, and that every PPS
// gives exactly one pps_edge. Phase counts from the first clock edge after the
// PPS rise: after the k-th edge following the rise it must be k-1.
module tb_pps_phase_counter;
  timeunit 1ns; timeprecision 1ps;
  localparam int L = 8;
  logic clk = 0, rst_n = 0, pps_in = 0, resync = 0;
  logic pps_edge, running;
  logic [L-1:0] phase;
  int checks = 0, failures = 0;
  int edges_since_pps = -1;  // clock edges since the PPS rise, -1 before the first
  int n_edges = 0, n_pps = 0;
  bit expect_run = 0;

  pps_phase_counter #(.CLK_LOG2(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (edges_since_pps >= 0) edges_since_pps++;
  end
  always @(negedge clk) if (pps_edge) n_edges++;

  // check on the falling edge, after the flops have settled
  always @(negedge clk) if (rst_n) begin
    if (edges_since_pps >= 3 && expect_run) begin
      check(running, "running");
      check(phase == L'(edges_since_pps - 1), $sformatf("phase %0d exp %0d", phase, (edges_since_pps-1) % 256));
    end
  end

  task automatic pps_pulse();
    @(negedge clk); pps_in = 1; edges_since_pps = 0; n_pps++;
    repeat (3) @(negedge clk); pps_in = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(!running && phase == 0, "idle before first PPS");
    expect_run = 1;
    pps_pulse();
    repeat (3) begin
      repeat (256 - 4) @(negedge clk);
      pps_pulse();
    end
    repeat (100) @(negedge clk);
    // resync: count stops until the next PPS
    resync = 1; @(negedge clk); resync = 0; expect_run = 0; edges_since_pps = -1;
    repeat (2) @(negedge clk);
    check(!running && phase == 0, "stopped after resync");
    repeat (50) @(negedge clk);
    check(!running && phase == 0, "still waiting for PPS");
    expect_run = 1;
    pps_pulse();
    repeat (300) @(negedge clk);
    check(n_edges == n_pps, $sformatf("pps edges %0d vs %0d", n_edges, n_pps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
