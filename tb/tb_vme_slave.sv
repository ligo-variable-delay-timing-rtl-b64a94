// tb_vme_slave: VMEbus handshake, address decode and interrupt acknowledge.
//
// A VMEbus master written as testbench tasks runs asynchronous cycles against
// the slave (16 MHz bus clock). A simple register array stands in for the
// register file. Checks: writes and reads with both short I/O address
// modifiers reach the right register and return its data with DTACK*; cycles
// with another address modifier or another base address get no DTACK* and
// cause no register access; an interrupt acknowledge at the board's level
// returns the vector and releases the request (release on acknowledge), one
// at another level is passed on through IACKOUT*; IRQ lines follow the level.
module tb_vme_slave;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic as_n = 1, write_n = 1, iack_n = 1, iackin_n = 1;
  logic [1:0] ds_n = 2'b11;
  logic [5:0] am = '0;
  logic [15:1] addr = '0;
  logic [15:0] d_in = '0, d_out;
  logic d_oe, dtack_n, iackout_n;
  logic [7:1] irq_n;
  logic [5:0] base_sw = 6'b101100;
  logic [2:0] irq_level = 3'd3;
  logic [7:0] irq_vector = 8'hA5;
  logic irq_req = 0, iack_done;
  logic reg_wr, reg_rd;
  logic [2:0] reg_addr;
  logic [15:0] reg_wdata, reg_rdata;
  logic [15:0] regs [8];
  int checks = 0, failures = 0, n_access = 0;

  vme_slave dut (.*);

  always #31.25 clk = ~clk;

  assign reg_rdata = regs[reg_addr];
  always @(posedge clk) begin
    if (reg_wr) regs[reg_addr] <= reg_wdata;
    if (reg_wr || reg_rd) n_access++;
    if (iack_done) irq_req <= 0;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one data transfer cycle; ok = DTACK* seen within 2 us
  task automatic cycle(bit wr, logic [5:0] m, logic [15:0] a, logic [15:0] wd,
                       output logic [15:0] rdv, output bit ok);
    am = m; addr = a[15:1]; write_n = !wr; d_in = wd; iack_n = 1;
    #40 as_n = 0;
    #20 ds_n = 2'b00;
    fork : wait_ack
      wait (dtack_n == 0);
      #2000;
    join_any
    disable wait_ack;
    ok = (dtack_n == 0);
    rdv = d_out;
    if (ok && !wr) check(d_oe, "data driven during read");
    #30 ds_n = 2'b11; as_n = 1;
    if (ok) begin
      fork : wait_rel
        wait (dtack_n == 1);
        #2000 begin failures++; $display("FAIL DTACK stuck"); end
      join_any
      disable wait_rel;
      check(!d_oe, "data released");
    end
    #100;
  endtask

  // interrupt acknowledge cycle for `lvl`; ok = DTACK*, passed = IACKOUT*
  task automatic iack(int lvl, output logic [7:0] vec, output bit ok, output bit passed);
    am = 6'h29; addr = '0; addr[3:1] = 3'(lvl); write_n = 1; iack_n = 0;
    #40 as_n = 0;
    #20 ds_n = 2'b10; iackin_n = 0;
    fork : wait_iack
      wait (dtack_n == 0);
      wait (iackout_n == 0);
      #2000;
    join_any
    disable wait_iack;
    ok = (dtack_n == 0); passed = (iackout_n == 0);
    vec = d_out[7:0];
    #30 ds_n = 2'b11; as_n = 1; iackin_n = 1;
    #400;
    check(dtack_n && iackout_n, "IACK cycle ended cleanly");
    iack_n = 1;
    #100;
  endtask

  initial begin
    logic [15:0] r; bit ok, passed; logic [7:0] vec;
    int n_before;
    foreach (regs[i]) regs[i] = '0;
    #200 rst_n = 1;
    #200;
    for (int i = 0; i < 16; i++) begin
      logic [15:0] v = 16'($urandom);
      int a = $urandom_range(7);
      logic [5:0] m = (i % 2) ? 6'h2D : 6'h29;
      cycle(1, m, {base_sw, 6'b0, 3'(a), 1'b0}, v, r, ok);
      check(ok, "write acknowledged");
      check(regs[a] == v, $sformatf("write reached reg %0d", a));
      cycle(0, m, {base_sw, 6'b0, 3'(a), 1'b0}, 16'h0, r, ok);
      check(ok && r == v, $sformatf("read back %h exp %h", r, v));
    end
    n_before = n_access;
    cycle(1, 6'h39, {base_sw, 10'h002}, 16'h1234, r, ok);   // A24 modifier
    check(!ok, "other address modifier ignored");
    cycle(1, 6'h29, {~base_sw, 10'h002}, 16'h1234, r, ok);  // other board
    check(!ok, "other base address ignored");
    cycle(0, 6'h2D, {base_sw ^ 6'b000001, 10'h002}, 16'h0, r, ok);
    check(!ok, "one address bit off ignored");
    check(n_access == n_before, "no register access for foreign cycles");
    // interrupts
    #200;
    check(irq_n == 7'h7F, "no IRQ when idle");
    irq_req = 1; #300;
    check(irq_n == ~7'(1 << (3 - 1)), $sformatf("IRQ3 asserted %b", irq_n));
    iack(5, vec, ok, passed);
    check(!ok && passed, "IACK at another level passed down the chain");
    check(irq_req, "request still pending");
    iack(3, vec, ok, passed);
    check(ok && !passed && vec == 8'hA5, $sformatf("vector %h", vec));
    #300;
    check(!irq_req && irq_n == 7'h7F, "released on acknowledge");
    iack(3, vec, ok, passed);
    check(!ok && passed, "no pending request: passed on");
    irq_level = 3'd7; irq_vector = 8'h3C; irq_req = 1; #300;
    check(irq_n == 7'b0111111, "IRQ7 asserted");
    iack(7, vec, ok, passed);
    check(ok && vec == 8'h3C, "vector at IRQ7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
