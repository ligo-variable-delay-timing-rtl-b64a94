// clock_activity_monitor: "input clocks connected and active" status bit.
//
// A 3-bit free-running divider on the 2^22 Hz clock makes a bit that changes
// every 4 cycles (about 1 us). The bus domain, clocked by the board's own oscillator, synchronises
// that toggle and restarts a timer on every change of it; if ACT_TIMEOUT bus
// clock cycles pass without a change, the 2^22 Hz clock is declared stopped.
// `clk_active` is high when the clock toggles and the timing domain reports a
// PPS edge within the last second (`pps_present`, synchronised here). The
// requirement is only that such a bit exist; how it is detected is this
// design's choice. With a 16 MHz bus clock the default timeout is 4 us.
module clock_activity_monitor #(
  parameter int unsigned ACT_TIMEOUT = 64   // bus clock cycles, must exceed 4*f_bus/2^22 + 4
) (
  input  logic tclk,          // 2^22 Hz clock
  input  logic trst_n,
  input  logic pps_present,   // timing domain
  input  logic clk,           // bus clock
  input  logic rst_n,         // bus domain reset
  output logic clk_running,   // bus domain: the 2^22 Hz clock is toggling
  output logic clk_active     // bus domain: clock toggling and PPS present
);
  localparam int unsigned TW = $clog2(ACT_TIMEOUT + 1);

  logic [2:0]    div;
  logic          tog_s, tog_d, pps_s;
  logic [TW-1:0] timer;

  always_ff @(posedge tclk or negedge trst_n) begin
    if (!trst_n) div <= '0;
    else         div <= div + 1'b1;
  end

  cdc_sync #(.W(2)) u_sync (.clk(clk), .rst_n(rst_n), .d({div[2], pps_present}), .q({tog_s, pps_s}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tog_d       <= 1'b0;
      timer       <= '0;
      clk_running <= 1'b0;
    end else begin
      tog_d <= tog_s;
      if (tog_s != tog_d) begin
        timer       <= '0;
        clk_running <= 1'b1;
      end else if (timer == TW'(ACT_TIMEOUT - 1)) begin
        clk_running <= 1'b0;
      end else begin
        timer <= timer + 1'b1;
      end
    end
  end

  assign clk_active = clk_running & pps_s;
endmodule
