// delay_tick_gen: programmable delay from the nominal sample instant.
//
// The sample period is 2^FAST_LOG2 clock cycles (16384 Hz with a 2^22 Hz
// clock) or 2^SLOW_LOG2 cycles (2048 Hz), chosen by `rate_slow`. The nominal
// sample instants are the cycles whose phase within the second is a multiple
// of the period, so one of them coincides with the 1 PPS edge. `tick` pulses
// once per period, `delay` steps after the nominal instant. One step is one
// clock cycle at 16384 Hz and 2^(SLOW_LOG2-FAST_LOG2) = 8 cycles at 2048 Hz,
// so the FAST_LOG2-bit `delay` covers the whole period at either rate; these
// step sizes are the ones the requirements give. The same block delays the
// DAC clock and the ADC polling bit / interrupt.
//
// Timing: `tick` is registered. The compare is moved LEAD cycles earlier so
// that a consumer with LEAD cycles of further pipeline acts exactly at the
// delayed instant: `tick` is high in the cycle after `phase` equals
// (delay*step - LEAD) modulo the period. No ticks are made while `running` is
// low. The lead is this design's way of keeping its own pipeline out of the
// delay that software programs.
module delay_tick_gen #(
  parameter int unsigned CLK_LOG2  = 22,
  parameter int unsigned FAST_LOG2 = 8,    // 2^22 / 16384
  parameter int unsigned SLOW_LOG2 = 11,   // 2^22 / 2048
  parameter int unsigned LEAD      = 0     // cycles of pipeline after this block
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 running,
  input  logic [CLK_LOG2-1:0]  phase,
  input  logic                 rate_slow,  // 0: 2^FAST_LOG2 period, 1: 2^SLOW_LOG2
  input  logic [FAST_LOG2-1:0] delay,
  output logic                 tick
);
  localparam int unsigned STEP_LOG2 = SLOW_LOG2 - FAST_LOG2;

  logic                 match;
  logic [SLOW_LOG2-1:0] target_slow;
  logic [FAST_LOG2-1:0] target_fast;

  always_comb begin
    target_slow = {delay, {STEP_LOG2{1'b0}}} - SLOW_LOG2'(LEAD);
    target_fast = delay - FAST_LOG2'(LEAD);
    if (rate_slow)
      match = phase[SLOW_LOG2-1:0] == target_slow;
    else
      match = phase[FAST_LOG2-1:0] == target_fast;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tick <= 1'b0;
    else        tick <= running & match;
  end
endmodule
