// tb_vdt_top_full: the timing board at its real size, one complete operation.
//
// Every parameter of the board keeps its default: 2^22 input clock cycles
// per second, 16384 Hz and 2048 Hz sample periods, 6 ADC and 4 DAC outputs.
// The 2^22 Hz input is modelled with a 238 ns period and the 1 PPS source
// runs on its own time base of 2^22 such periods; the bus clock is 16 MHz.
// After reset the board must lock to the second PPS edge with no clock error
// and report its clocks active. Software then programs a DAC delay with a
// three-pulse burst at 16384 Hz and one at 2048 Hz, and the burst positions
// are checked against sample instant + delay * step input clock edges;
// it polls for a series of ADC samples (each read must show exactly one new
// sample), takes a few interrupts, and checks that the full second that
// follows still holds exactly 2^22 clock cycles.
module tb_vdt_top_full;
  timeunit 1ns; timeprecision 1ps;
  localparam int L = 22;                  // cycles per second = 2^L, as built
  localparam int ND = 4, NA = 6;
  localparam realtime TP = 238.0;         // input clock period
  localparam realtime SEC = TP * (1 << L);
  localparam int LAT = 1;                 // edge 1 = nominal instant
  localparam logic [5:0] BASE = 6'b101010;

  logic clk_in = 0, pps_in = 0, bus_clk = 0, sysreset_n = 1;
  initial #1 sysreset_n = 0;             // power-on reset pulse
  logic vme_as_n = 1, vme_write_n = 1, vme_iack_n = 1, vme_iackin_n = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [5:0] vme_am = 6'h29;
  logic [15:1] vme_addr = '0;
  logic [15:0] vme_d_in = '0, vme_d_out;
  logic vme_d_oe, vme_dtack_n, vme_iackout_n;
  logic [7:1] vme_irq_n;
  logic [5:0] base_sw = BASE;
  logic adc_pol = 0;
  logic [ND-1:0] dac_pol = 4'b0000;
  logic [NA-1:0] adc_clk_p, adc_clk_n;
  logic [ND-1:0] dac_clk_p, dac_clk_n;

  vdt_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- clocks and PPS ----------------
  bit clk_on = 1;
  int skip_pulses = 0;
  always #31.25 bus_clk = ~bus_clk;
  initial forever begin
    #(TP/2);
    if (clk_on && skip_pulses == 0) clk_in = 1;
    else if (skip_pulses > 0) skip_pulses--;
    #(TP/2) clk_in = 0;
  end
  initial begin
    #(TP * 20.25);                        // PPS rises between input clock edges
    forever begin
      pps_in = 1; #(TP * 5); pps_in = 0; #(SEC - TP * 5);
    end
  end

  // ---------------- DAC output monitor ----------------
  int edges = 0;                          // input clock edges since PPS rise
  bit pps_d = 0;
  always @(posedge clk_in) begin
    edges <= (pps_in && !pps_d) ? 1 : edges + 1;
    pps_d <= pps_in;
  end

  int dac_period = 256, dac_step = 1, dac_delay = 0, npulse = 1;
  bit mon_pos = 0;                        // check burst positions
  int last_rise = -1000, cur_pulses = 0, bursts = 0, bad_bursts = 0, pulse_errs = 0;
  int n_fast = 0, n_slow = 0;
  int n_np[5] = '{default: 0};
  bit dac_prev = 0;
  logic [31:0] rise_t = 0;
  int tnow = 0;
  always @(posedge clk_in) tnow <= tnow + 1;
  always @(negedge clk_in) begin
    bit d;
    d = dac_clk_p[0];
    if (d && !dac_prev) begin
      if (tnow - last_rise > 64) begin
        // burst start: previous burst complete?
        if (cur_pulses != 0 && mon_pos && cur_pulses != npulse) pulse_errs++;
        cur_pulses = 1; bursts++;
        if (mon_pos) begin
          if ((edges - LAT - dac_delay * dac_step) % dac_period != 0) begin
            bad_bursts++;
            $display("burst at edge %0d, expected offset %0d mod %0d", edges, dac_delay * dac_step + LAT, dac_period);
          end
          if (dac_period == 256) n_fast++; else n_slow++;
        end
      end else begin
        cur_pulses++;
      end
      last_rise = tnow;
    end
    if (mon_pos && cur_pulses > 0 && tnow - last_rise == 40) begin
      if (cur_pulses == npulse) n_np[npulse]++;
      else begin pulse_errs++; $display("burst of %0d pulses, expected %0d", cur_pulses, npulse); end
      cur_pulses = 0;
    end
    dac_prev = d;
  end

  // ---------------- VMEbus master ----------------
  task automatic vme_cycle(bit wr, logic [5:0] a, logic [15:0] wd, output logic [15:0] rdv);
    vme_am = 6'h2D; vme_addr = {BASE, 4'b0, a[5:1]}; vme_write_n = !wr; vme_d_in = wd; vme_iack_n = 1;
    #40 vme_as_n = 0;
    #20 vme_ds_n = 2'b00;
    fork : w
      wait (vme_dtack_n == 0);
      #3000;
    join_any
    disable w;
    check(vme_dtack_n == 0, "DTACK on register access");
    rdv = vme_d_out;
    #30 vme_ds_n = 2'b11; vme_as_n = 1;
    wait (vme_dtack_n == 1);
    #60;
  endtask
  task automatic wr(logic [5:0] a, logic [15:0] d);
    logic [15:0] dummy;
    vme_cycle(1, a, d, dummy);
  endtask
  task automatic rd(logic [5:0] a, output logic [15:0] d);
    vme_cycle(0, a, 16'h0, d);
  endtask
  task automatic iack(int lvl, output logic [7:0] vec, output bit ok);
    vme_am = 6'h29; vme_addr = '0; vme_addr[3:1] = 3'(lvl); vme_write_n = 1; vme_iack_n = 0;
    #40 vme_as_n = 0;
    #20 vme_ds_n = 2'b10; vme_iackin_n = 0;
    fork : w
      wait (vme_dtack_n == 0);
      wait (vme_iackout_n == 0);
      #3000;
    join_any
    disable w;
    ok = (vme_dtack_n == 0);
    vec = vme_d_out[7:0];
    #30 vme_ds_n = 2'b11; vme_as_n = 1; vme_iackin_n = 1;
    #400 vme_iack_n = 1;
  endtask

  localparam logic [5:0] A_CTRL = 6'h00, A_DAC = 6'h02, A_ADC = 6'h04, A_ST = 6'h06,
                         A_JMP = 6'h08, A_IRQ = 6'h0A;

  task automatic wait_pps();
    @(posedge pps_in);
  endtask

  // set DAC rate / delay / pulses, then watch one full second
  task automatic dac_case(bit slow, int d, int np);
    int b0, f0, s0;
    mon_pos = 0;
    wr(A_DAC, 16'(d));
    wr(A_CTRL, {11'b0, 1'b0, 2'(np - 1), 1'b0, slow});
    dac_period = slow ? 2048 : 256; dac_step = slow ? 8 : 1; dac_delay = d; npulse = np;
    wait_pps(); #(TP * 20);
    mon_pos = 1; b0 = n_fast; s0 = n_slow;
    #(SEC - TP * 40);
    mon_pos = 0;
    f0 = slow ? n_slow - s0 : n_fast - b0;
    // one second minus 40 cycles around the PPS: all bursts but possibly one
    check(f0 >= (1 << L) / dac_period - 1 && f0 <= (1 << L) / dac_period,
          $sformatf("bursts per second %0d (rate %0d)", f0, slow));
  endtask

  int n_poll = 0, n_irq = 0;

  initial begin
    logic [15:0] r; logic [7:0] vec; bit ok;
    #1000 sysreset_n = 1;
    wait_pps(); wait_pps(); #(TP * 50);
    rd(A_ST, r);
    check(r[3] && r[2] && !r[1], $sformatf("after 2 PPS: running, active, no error (%h)", r));
    rd(A_JMP, r);
    check(r == {BASE, 5'b0, dac_pol, adc_pol}, $sformatf("jumper readback %h", r));

    // DAC clock at 16384 Hz: delay 200 steps, 3 pulses, watched for 300 periods
    wr(A_DAC, 16'd200);
    wr(A_CTRL, 16'h0008);
    dac_period = 256; dac_step = 1; dac_delay = 200; npulse = 3;
    #(TP * 600);
    mon_pos = 1;
    #(TP * 256 * 300);
    mon_pos = 0;
    #(TP * 100);
    check(n_fast >= 299 && n_fast <= 301, $sformatf("fast bursts %0d", n_fast));
    // DAC clock at 2048 Hz: delay 255 steps of 8 cycles, 1 pulse, 40 periods
    wr(A_DAC, 16'd255);
    wr(A_CTRL, 16'h0001);
    dac_period = 2048; dac_step = 8; dac_delay = 255; npulse = 1;
    #(TP * 4200);
    mon_pos = 1;
    #(TP * 2048 * 40);
    mon_pos = 0;
    #(TP * 100);
    check(n_slow >= 39 && n_slow <= 41, $sformatf("slow bursts %0d", n_slow));
    check(bad_bursts == 0, $sformatf("%0d bursts at wrong position", bad_bursts));
    check(pulse_errs == 0, $sformatf("%0d bursts with wrong pulse count", pulse_errs));
    check(n_np[3] > 0 && n_np[1] > 0, "3-pulse and 1-pulse bursts seen");

    // ADC polling at 16384 Hz, delay 64
    wr(A_CTRL, 16'h0000);
    wr(A_ADC, 16'd64);
    rd(A_ST, r);
    do rd(A_ST, r); while (!r[0]);
    for (int i = 0; i < 40; i++) begin
      do rd(A_ST, r); while (!r[0]);
      check(r[15:8] == 8'd1, $sformatf("keeping up: count %0d", r[15:8]));
      n_poll++;
    end

    // interrupts at IRQ4, vector 0x99
    wr(A_IRQ, 16'h9904);
    wr(A_CTRL, 16'h0010);
    for (int i = 0; i < 10; i++) begin
      fork : w
        wait (vme_irq_n[4] == 0);
        #(TP * 600);
      join_any
      disable w;
      check(vme_irq_n[4] == 0, "IRQ4 asserted");
      iack(4, vec, ok);
      check(ok && vec == 8'h99, $sformatf("IACK vector %h", vec));
      if (ok) n_irq++;
    end
    wr(A_CTRL, 16'h0000);

    // the next full second still holds exactly 2^22 cycles
    wait_pps(); wait_pps(); #(TP * 50);
    rd(A_ST, r);
    check(!r[1] && r[2] && r[3], $sformatf("one more second, no clock error (%h)", r));
    check(n_poll == 40 && n_irq == 10, "polling and interrupts completed");
    $display("fast bursts %0d slow bursts %0d polls %0d interrupts %0d", n_fast, n_slow, n_poll, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(SEC * 6);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
