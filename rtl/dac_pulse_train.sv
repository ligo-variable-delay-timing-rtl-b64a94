// dac_pulse_train: burst of short DAC clock pulses after each DAC delay.
//
// The DAC modules clocked by the board need several clock pulses per sample
// to push a sample through their pipeline, so each `start` tick launches a
// burst of npulse_m1+1 pulses (1 to 4; the requirements ask for 1, 2 or 4,
// and show 3 in their illustration). Each pulse is high for PULSE_HI and low
// for PULSE_LO clock cycles; PULSE_HI = 4 cycles of 2^22 Hz is about 0.95 us,
// the "about 1 us" the requirements name. The low time is this design's own.
// A new `start` during a burst restarts it. `clear` aborts a burst.
//
// Timing: `pulse` rises on the clock edge that samples `start` and is a
// registered output; the burst lasts (npulse_m1+1)*(PULSE_HI+PULSE_LO) cycles.
module dac_pulse_train #(
  parameter int unsigned PULSE_HI = 4,
  parameter int unsigned PULSE_LO = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       start,
  input  logic [1:0] npulse_m1,   // pulses per burst minus one
  output logic       pulse,
  output logic       busy
);
  localparam int unsigned PER = PULSE_HI + PULSE_LO;
  localparam int unsigned TW  = $clog2(PER);

  logic [TW-1:0] t;      // position within the current pulse period
  logic [1:0]    left;   // pulses still to start after the current one

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      t     <= '0;
      left  <= '0;
      pulse <= 1'b0;
    end else if (clear) begin
      busy  <= 1'b0;
      t     <= '0;
      pulse <= 1'b0;
    end else if (start) begin
      busy  <= 1'b1;
      t     <= '0;
      left  <= npulse_m1;
      pulse <= 1'b1;
    end else if (busy) begin
      if (t == TW'(PER - 1)) begin
        t <= '0;
        if (left == '0) begin
          busy  <= 1'b0;
          pulse <= 1'b0;
        end else begin
          left  <= left - 1'b1;
          pulse <= 1'b1;
        end
      end else begin
        t     <= t + 1'b1;
        pulse <= (t + 1'b1) < TW'(PULSE_HI);
      end
    end
  end
endmodule
