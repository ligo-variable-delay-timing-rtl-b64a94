// tb_delay_tick_gen: checks the tick position at both sample rates.
//
// Default sizes (16384 Hz = 256-cycle and 2048 Hz = 2048-cycle periods);
// the phase input is driven by a free-running counter in the testbench. For
// each rate and a set of delays the test records the phase at which each tick
// comes out and compares it with delay*step - LEAD + 1 modulo the period (the
// DAC setting, LEAD = 3, is used), and checks
// that there is exactly one tick per period.
module tb_delay_tick_gen;
  timeunit 1ns; timeprecision 1ps;
  localparam int L = 22, F = 8, S = 11;
  logic clk = 0, rst_n = 0, running = 0, rate_slow = 0;
  logic [L-1:0] phase = '0;
  logic [F-1:0] delay = '0;
  logic tick;
  int checks = 0, failures = 0;

  localparam int LEAD = 3;
  delay_tick_gen #(.CLK_LOG2(L), .FAST_LOG2(F), .SLOW_LOG2(S), .LEAD(LEAD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (running) phase <= phase + 1'b1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_case(bit slow, int d);
    int per, step, expect_pos, nticks;
    per  = slow ? (1 << S) : (1 << F);
    step = slow ? (1 << (S - F)) : 1;
    expect_pos = (d * step - LEAD + 1 + per) % per;
    @(negedge clk); rate_slow = slow; delay = F'(d);
    repeat (per) @(negedge clk);          // let the new setting settle
    nticks = 0;
    repeat (3 * per) begin
      @(negedge clk);
      if (tick) begin
        nticks++;
        check(int'(phase) % per == expect_pos,
              $sformatf("rate %0d delay %0d tick at %0d exp %0d", slow, d, int'(phase) % per, expect_pos));
      end
    end
    check(nticks == 3, $sformatf("rate %0d delay %0d: %0d ticks in 3 periods", slow, d, nticks));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    check(!tick, "no tick while not running");
    running = 1;
    run_case(0, 0);  run_case(0, 1);  run_case(0, 100); run_case(0, 255);
    run_case(1, 0);  run_case(1, 1);  run_case(1, 77);  run_case(1, 255);
    for (int i = 0; i < 4; i++) run_case(1'($urandom_range(1)), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
