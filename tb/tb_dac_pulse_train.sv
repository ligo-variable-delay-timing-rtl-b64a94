// tb_dac_pulse_train: checks number, width and spacing of the DAC pulses.
//
// For each pulse-count setting (1 to 4) a start tick is given and the output
// is sampled every cycle for 64 cycles; the recorded waveform must be exactly
// n pulses of PULSE_HI cycles separated by PULSE_LO cycles, starting on the
// first cycle after start. Also checks that clear aborts a burst.
module tb_dac_pulse_train;
  timeunit 1ns; timeprecision 1ps;
  localparam int HI = 4, LO = 4;
  logic clk = 0, rst_n = 0, clear = 0, start = 0;
  logic [1:0] npulse_m1 = '0;
  logic pulse, busy;
  int checks = 0, failures = 0;

  dac_pulse_train #(.PULSE_HI(HI), .PULSE_LO(LO)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic burst(int n);
    bit got, exp;
    @(negedge clk); npulse_m1 = 2'(n - 1); start = 1;
    @(negedge clk); start = 0;
    for (int c = 0; c < 64; c++) begin
      exp = (c < n * (HI + LO)) && ((c % (HI + LO)) < HI);
      got = pulse;
      check(got == exp, $sformatf("n=%0d cycle %0d pulse %0b exp %0b", n, c, got, exp));
      @(negedge clk);
    end
    check(!busy, "idle after burst");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    check(!pulse && !busy, "idle after reset");
    burst(1); burst(2); burst(3); burst(4);
    // clear aborts
    @(negedge clk); npulse_m1 = 2'd3; start = 1;
    @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    check(!pulse && !busy, "clear aborts a burst");
    repeat (40) begin @(negedge clk); check(!pulse, "stays low after clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
