// cdc_sync: two-flop synchroniser for level signals entering a clock domain.
//
// Each bit of `d` is sampled by two flip-flops clocked by `clk`; `q` follows
// `d` two to three clock edges later. Bits are synchronised independently,
// so only use it for single bits or for values whose bits change one at a
// time. Asynchronous active-low reset clears both stages to RESET_VAL.
module cdc_sync #(
  parameter int unsigned W = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
