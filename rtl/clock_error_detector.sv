// clock_error_detector: checks that exactly 2^22 clock cycles make one second.
//
// A counter runs on the 2^22 Hz clock and restarts at every PPS edge. When
// the next edge arrives the counter must read 2^CLK_LOG2 - 1, i.e. the two
// edges are exactly 2^CLK_LOG2 clock cycles apart; any other value sets the
// sticky `clk_err` flag. The first edge after reset, after a clear or after a
// lost PPS only starts a measurement. If no edge arrives within PPS_MARGIN
// cycles after the expected one, `pps_present` drops and `clk_err` is set.
// `clear` (from the VMEbus) clears `clk_err`; the measurement in progress
// continues. The 1 PPS reference and the exact-count rule follow the
// requirements; the missing-PPS timeout and the clear are this design's own.
module clock_error_detector #(
  parameter int unsigned CLK_LOG2   = 22,
  parameter int unsigned PPS_MARGIN = 1024  // must be below 2^CLK_LOG2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pps_edge,     // from pps_phase_counter
  input  logic clear,        // one-cycle clear of clk_err
  output logic clk_err,      // sticky: a second did not hold 2^CLK_LOG2 cycles
  output logic pps_present   // a PPS edge arrived within the last second + margin
);
  localparam logic [CLK_LOG2:0] EXPECT  = (CLK_LOG2+1)'((64'd1 << CLK_LOG2) - 1);
  localparam logic [CLK_LOG2:0] TIMEOUT = EXPECT + (CLK_LOG2+1)'(PPS_MARGIN);

  logic [CLK_LOG2:0] cnt;
  logic              valid;   // cnt measures from a real PPS edge

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      valid       <= 1'b0;
      clk_err     <= 1'b0;
      pps_present <= 1'b0;
    end else begin
      if (pps_edge) begin
        cnt         <= '0;
        valid       <= 1'b1;
        pps_present <= 1'b1;
        if (valid && cnt != EXPECT) clk_err <= 1'b1;
      end else begin
        if (cnt != TIMEOUT) cnt <= cnt + 1'b1;
        if (valid && cnt == TIMEOUT - 1'b1) begin
          valid       <= 1'b0;
          pps_present <= 1'b0;
          clk_err     <= 1'b1;
        end
      end
      if (clear && !(pps_edge && valid && cnt != EXPECT)) clk_err <= 1'b0;
    end
  end
endmodule
