// adc_poll_irq: ADC polling bit, sample counter and interrupt request.
//
// Runs in the bus clock domain on `tick`, the delayed ADC polling tick
// carried over from the timing domain. In polling mode (`irq_mode` low) a
// tick sets `poll` and increments `count`, the number of ticks since the
// status register was last read (saturating at all ones); `status_read`
// clears both, so software that keeps up always reads a count of 1 and a
// larger count means samples were missed. In interrupt mode a tick instead
// sets `irq_req`, which the VMEbus interrupt acknowledge (`iack_done`)
// releases; the bus keeps track of further interrupts. Polling and interrupt
// modes, the delayed bit and the count follow the requirements; the
// read-to-clear rule and the counter width are this design's own.
// A tick and a read in the same cycle leave the tick's effect. `clear`, the
// board's resynchronise command, empties the count, the poll bit and a pending
// request, following the requirement that resync reset all counters.
module adc_poll_irq #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             tick,
  input  logic             irq_mode,
  input  logic             status_read,
  input  logic             iack_done,
  output logic             poll,
  output logic [CNT_W-1:0] count,
  output logic             irq_req
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poll    <= 1'b0;
      count   <= '0;
      irq_req <= 1'b0;
    end else if (clear) begin
      poll    <= 1'b0;
      count   <= '0;
      irq_req <= 1'b0;
    end else begin
      if (tick && !irq_mode) begin
        poll <= 1'b1;
        if (status_read)       count <= CNT_W'(1);
        else if (count != '1)  count <= count + 1'b1;
      end else if (status_read) begin
        poll  <= 1'b0;
        count <= '0;
      end

      if (tick && irq_mode) irq_req <= 1'b1;
      else if (iack_done)   irq_req <= 1'b0;
    end
  end
endmodule
