// tb_adc_poll_irq: checks the polling bit, missed-sample count and IRQ request.
//
// Random sequences of ticks, status reads and interrupt acknowledges are
// applied in both modes; a reference model in the testbench (count of ticks
// since the last read, saturating at 255; request set by a tick in interrupt
// mode and released by an acknowledge, everything emptied by clear) is
// compared with the outputs every cycle.
module tb_adc_poll_irq;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, clear = 0, tick = 0, irq_mode = 0, status_read = 0, iack_done = 0;
  logic poll, irq_req;
  logic [7:0] count;
  int checks = 0, failures = 0;
  int m_count = 0; bit m_poll = 0, m_irq = 0;
  int n_sat = 0;

  adc_poll_irq #(.CNT_W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // model, updated on the same edges as the block
  always @(posedge clk) if (rst_n) begin
    if (clear) begin
      m_poll <= 0; m_count <= 0; m_irq <= 0;
    end else begin
    if (tick && !irq_mode) begin
      m_poll <= 1;
      m_count <= status_read ? 1 : (m_count == 255 ? 255 : m_count + 1);
    end else if (status_read) begin
      m_poll <= 0; m_count <= 0;
    end
    if (tick && irq_mode) m_irq <= 1;
    else if (iack_done)   m_irq <= 0;
    end
  end

  always @(negedge clk) if (rst_n) begin
    check(poll == m_poll && count == 8'(m_count) && irq_req == m_irq,
          $sformatf("poll %0b/%0b count %0d/%0d irq %0b/%0b", poll, m_poll, count, m_count, irq_req, m_irq));
    if (count == 8'd255) n_sat++;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // polling mode, software keeps up: count is 1 at every read
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); tick = 1; @(negedge clk); tick = 0;
      repeat (3) @(negedge clk);
      check(count == 1 && poll, "one tick between reads");
      status_read = 1; @(negedge clk); status_read = 0;
    end
    // software falls behind: count of missed samples, saturating
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); tick = 1; @(negedge clk); tick = 0;
    end
    check(count == 255, "saturates");
    // random mix in both modes
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      tick        = ($urandom_range(3) == 0);
      status_read = ($urandom_range(7) == 0);
      iack_done   = ($urandom_range(7) == 0);
      if ($urandom_range(99) == 0) irq_mode = ~irq_mode;
      clear       = ($urandom_range(63) == 0);
    end
    @(negedge clk); tick = 0; status_read = 0; iack_done = 0; clear = 0;
    irq_mode = 1; @(negedge clk);
    tick = 1; @(negedge clk); tick = 0; @(negedge clk);
    check(irq_req, "interrupt mode raises request");
    iack_done = 1; @(negedge clk); iack_done = 0; @(negedge clk);
    check(!irq_req, "acknowledge releases request");
    check(n_sat > 0, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
