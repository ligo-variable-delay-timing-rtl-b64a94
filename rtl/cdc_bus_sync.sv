// cdc_bus_sync: carries a quasi-static multi-bit value into another clock domain.
//
// Every bit passes a two-flop synchroniser; the output register only loads
// the synchronised word after it has been identical on two consecutive
// destination clock edges, so a word caught while its bits were changing is
// never passed on. Suited to configuration registers written rarely from the
// VMEbus. Latency is four to five destination clock edges.
module cdc_bus_sync #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] s, s_d;

  cdc_sync #(.W(W)) u_sync (.clk(clk), .rst_n(rst_n), .d(d), .q(s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_d <= '0;
      q   <= '0;
    end else begin
      s_d <= s;
      if (s == s_d) q <= s_d;
    end
  end
endmodule
