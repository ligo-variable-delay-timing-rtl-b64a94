// cdc_pulse_sync: carries single-cycle pulses from one clock domain to another.
//
// A pulse on `src_pulse` flips a toggle flop in the source domain; the toggle
// is synchronised by two flops in the destination domain and every change of
// it produces one `dst_pulse` cycle, three to four destination clock edges
// after the source pulse. Pulses must be spaced by at least three destination
// clock periods plus one source period, which holds for VMEbus writes and for
// the once-per-sample timing ticks that cross with it.
module cdc_pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic src_tog;
  logic dst_tog_s, dst_tog_d;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     src_tog <= 1'b0;
    else if (src_pulse) src_tog <= ~src_tog;
  end

  cdc_sync #(.W(1)) u_sync (
    .clk(dst_clk), .rst_n(dst_rst_n), .d(src_tog), .q(dst_tog_s)
  );

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      dst_tog_d <= 1'b0;
      dst_pulse <= 1'b0;
    end else begin
      dst_tog_d <= dst_tog_s;
      dst_pulse <= dst_tog_s ^ dst_tog_d;
    end
  end
endmodule
