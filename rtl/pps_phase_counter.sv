// pps_phase_counter: position within the GPS second, aligned to 1 PPS.
//
// The 1 PPS input is sampled by two flops on the 2^22 Hz clock (the GPS
// receiver locks the two, so the PPS edge has a fixed relation to the clock)
// and its rising edge is detected. `phase` counts 2^22 Hz cycles from the
// nominal instant, the first clock edge after the PPS rise: it is 0 in the
// cycle that follows that edge, and wraps every 2^CLK_LOG2 cycles. The edge
// is only seen three clock edges after the PPS rise, so the count is loaded
// with SYNC_LAT = 2 at that point instead of 0. Each PPS edge re-aligns the
// count, so all delays of the board are measured from the nominal sample
// instant that coincides with the PPS edge, as the requirements ask.
//
// A `resync` pulse (from the VMEbus) clears the count and drops `running`;
// counting restarts at the next PPS edge, so every delay and DAC clock derived
// from `phase` starts again in step with 1 PPS. After reset the board is in
// the same waiting state. The wait-for-PPS behaviour is this design's reading
// of "all delays and clocks will be re-synchronized with the 1 PPS signal".
//
// Timing: pps_edge is high in the cycle before the third clock edge after
// the PPS input rises; on that edge phase is loaded with 2.
module pps_phase_counter #(
  parameter int unsigned CLK_LOG2 = 22   // 2^22 clock cycles per second
) (
  input  logic                clk,       // 2^22 Hz clock
  input  logic                rst_n,
  input  logic                pps_in,    // 1 PPS from the input connector
  input  logic                resync,    // one-cycle resynchronise request
  output logic                pps_edge,  // one cycle per PPS rising edge
  output logic                running,   // phase is aligned to 1 PPS
  output logic [CLK_LOG2-1:0] phase      // cycles since the last PPS edge
);
  localparam logic [CLK_LOG2-1:0] SYNC_LAT = CLK_LOG2'(2);

  logic pps_s, pps_d;

  cdc_sync #(.W(1)) u_pps_sync (.clk(clk), .rst_n(rst_n), .d(pps_in), .q(pps_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pps_d <= 1'b0;
    else        pps_d <= pps_s;
  end

  assign pps_edge = pps_s & ~pps_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      phase   <= '0;
    end else if (resync) begin
      running <= 1'b0;
      phase   <= '0;
    end else if (pps_edge) begin
      running <= 1'b1;
      phase   <= SYNC_LAT;
    end else if (running) begin
      phase   <= phase + 1'b1;
    end
  end
endmodule
