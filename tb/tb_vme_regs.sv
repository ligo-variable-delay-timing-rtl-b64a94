// tb_vme_regs: checks the register map.
//
// Writes every read/write register with random values and reads them back
// against the expected masks, checks that the configuration outputs follow,
// that the CTRL write-one bits give single-cycle pulses, that STATUS and
// JUMPERS show their inputs at the documented bit positions and that a
// STATUS read pulses status_read.
module tb_vme_regs;
  timeunit 1ns; timeprecision 1ps;
  import vdt_pkg::*;
  localparam int ND = 4;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0;
  logic [2:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic poll = 0, irq_req = 0, clk_err = 0, clk_active = 0, running = 0, adc_pol = 0;
  logic [7:0] count = '0;
  logic [ND-1:0] dac_pol = '0;
  logic [5:0] base_sw = '0;
  timing_cfg_t cfg;
  logic irq_mode, resync, clr_err, status_read;
  logic [2:0] irq_level;
  logic [7:0] irq_vector;
  int checks = 0, failures = 0;
  int n_resync = 0, n_clr = 0, n_sr = 0;

  vme_regs #(.N_DAC(ND)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) begin
    if (resync) n_resync++;
    if (clr_err) n_clr++;
    if (status_read) n_sr++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write(int a, logic [15:0] d);
    @(negedge clk); addr = 3'(a); wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic read(int a, output logic [15:0] d);
    @(negedge clk); addr = 3'(a); rd = 1; #1 d = rdata;
    @(negedge clk); rd = 0;
  endtask

  initial begin
    logic [15:0] v, r;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 8; a++) begin
      read(a, r);
      if (a != 3 && a != 4) check(r == 0, $sformatf("reset value of reg %0d", a));
    end
    for (int i = 0; i < 30; i++) begin
      v = 16'($urandom) & 16'h3FFF;      // no pulse bits
      write(0, v); read(0, r);
      check(r == (v & 16'h001F), "CTRL readback");
      check(cfg.dac_slow == v[0] && cfg.adc_slow == v[1] && cfg.npulse_m1 == v[3:2] && irq_mode == v[4], "CTRL fields");
      v = 16'($urandom);
      write(1, v); read(1, r);
      check(r == {8'h0, v[7:0]} && cfg.dac_delay == v[7:0], "DAC_DELAY");
      v = 16'($urandom);
      write(2, v); read(2, r);
      check(r == {8'h0, v[7:0]} && cfg.adc_delay == v[7:0], "ADC_DELAY");
      v = 16'($urandom);
      write(5, v); read(5, r);
      check(r == (v & 16'hFF07) && irq_level == v[2:0] && irq_vector == v[15:8], "IRQ_CFG");
      write(3, 16'hFFFF); write(4, 16'hFFFF); write(6, 16'hFFFF);
      read(6, r); check(r == 0, "unused offset reads 0");
      {poll, irq_req, clk_err, clk_active, running} = 5'($urandom);
      count = 8'($urandom);
      read(3, r);
      check(r == {count, 3'b0, irq_req, running, clk_active, clk_err, poll}, $sformatf("STATUS %h", r));
      {adc_pol, dac_pol, base_sw} = 11'($urandom);
      read(4, r);
      check(r == {base_sw, 5'b0, dac_pol, adc_pol}, $sformatf("JUMPERS %h", r));
    end
    check(n_resync == 0 && n_clr == 0, "no pulses without write-one bits");
    write(0, 16'h8000);
    write(0, 16'h4000);
    write(0, 16'hC000);
    read(0, r);
    check(r == 0, "pulse bits read as 0");
    check(n_resync == 2 && n_clr == 2, $sformatf("pulses resync %0d clr %0d", n_resync, n_clr));
    check(n_sr == 31, $sformatf("status reads %0d", n_sr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
