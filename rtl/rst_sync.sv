// rst_sync: reset synchroniser, asynchronous assertion and synchronous release.
//
// `rst_n_out` goes low as soon as `rst_n_in` does and returns high on the
// second rising edge of `clk` after `rst_n_in` is released, so every flop of
// the domain leaves reset on the same edge. One instance serves each clock
// domain of the board (the VMEbus SYSRESET* is the source).
module rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      meta      <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_n_out <= meta;
    end
  end
endmodule
