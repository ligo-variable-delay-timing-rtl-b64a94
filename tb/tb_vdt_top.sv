// tb_vdt_top: end-to-end test of the timing board.
//
// Clocks: the 2^22 Hz input is modelled with a 238 ns period, the bus clock
// at 16 MHz. The "second" is shortened to 2^12 input clock cycles
// (CLK_LOG2 = 12) so that many seconds can be simulated; the sample periods
// keep their real lengths of 256 and 2048 input cycles. The 1 PPS source
// runs on its own time base (2^12 x 238 ns), so dropping input clock pulses
// shows up as a clock error, as it would with a real GPS receiver.
// A VMEbus master made of testbench tasks programs the board exactly as
// software would. Each mechanism of the board is exercised and counted:
// DAC bursts at both rates, every pulse count, polling with and without
// missed samples, interrupts with acknowledge, resynchronisation, clock error
// and its clear, a stopped input clock, jumper readback and output polarity.
// DAC burst positions are checked against sample instant + delay * step,
// where the sample instant is the first input clock edge after a PPS rise
// (or a whole number of sample periods later).
module tb_vdt_top;
  timeunit 1ns; timeprecision 1ps;
  localparam int L = 12;                  // cycles per second = 2^L
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

  vdt_top #(.CLK_LOG2(L)) dut (.*);

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

  int n_poll = 0, n_missed = 0, n_irq = 0, n_resync = 0, n_err = 0, n_inactive = 0;

  initial begin
    logic [15:0] r; logic [7:0] vec; bit ok;
    int cnt, t0;
    #1000 sysreset_n = 1;
    wait_pps(); wait_pps(); #(TP * 50);
    rd(A_ST, r);
    check(r[3] && r[2] && !r[1], $sformatf("after 2 PPS: running, active, no error (%h)", r));
    rd(A_JMP, r);
    check(r == {BASE, 5'b0, dac_pol, adc_pol}, $sformatf("jumper readback %h", r));
    // ADC clock outputs follow the input clock
    @(posedge clk_in); #1 check(adc_clk_p == '1 && adc_clk_n == '0, "ADC clock high");
    @(negedge clk_in); #1 check(adc_clk_p == '0, "ADC clock low");

    // -------- DAC clock: rates, delays, pulse counts --------
    dac_case(0, 37, 1);
    dac_case(0, 0, 2);
    dac_case(0, 255, 3);
    dac_case(0, 128, 4);
    dac_case(1, 100, 3);
    dac_case(1, 255, 1);
    check(bad_bursts == 0, $sformatf("%0d bursts at wrong position", bad_bursts));
    check(pulse_errs == 0, $sformatf("%0d bursts with wrong pulse count", pulse_errs));

    // -------- polling mode --------
    wr(A_CTRL, 16'h0000);                 // fast DAC, poll mode, fast ADC
    wr(A_ADC, 16'd20);
    rd(A_ST, r);
    for (int i = 0; i < 12; i++) begin
      do rd(A_ST, r); while (!r[0]);
      check(r[15:8] == 8'd1, $sformatf("keeping up: count %0d", r[15:8]));
      n_poll++;
    end
    // software sleeps for 5 sample periods: 5 samples counted
    rd(A_ST, r);
    do rd(A_ST, r); while (!r[0]);
    #(TP * 256 * 5);
    rd(A_ST, r);
    check(r[15:8] == 8'd5 && r[0], $sformatf("missed samples: count %0d", r[15:8]));
    if (r[15:8] > 1) n_missed++;
    // rate: ticks in one second, at both rates
    wait_pps(); #(TP * 100); rd(A_ST, r);
    #(SEC); rd(A_ST, r);
    check(r[15:8] == 8'((1 << L) / 256), $sformatf("fast ticks per second %0d", r[15:8]));
    wr(A_CTRL, 16'h0002);                 // slow ADC rate
    wr(A_ADC, 16'd50);
    #(SEC); rd(A_ST, r);
    #(SEC); rd(A_ST, r);
    check(r[15:8] == 8'((1 << L) / 2048), $sformatf("slow ticks per second %0d", r[15:8]));

    // -------- interrupt mode --------
    wr(A_IRQ, 16'h4202);                  // IRQ2, vector 0x42
    wr(A_CTRL, 16'h0010);                 // interrupt mode, fast rates
    rd(A_ST, r);
    cnt = 0;
    for (int i = 0; i < 8; i++) begin
      fork : w
        wait (vme_irq_n[2] == 0);
        #(TP * 600);
      join_any
      disable w;
      check(vme_irq_n[2] == 0, "IRQ2 asserted");
      iack(2, vec, ok);
      check(ok && vec == 8'h42, $sformatf("IACK vector %h", vec));
      if (ok) n_irq++;
      #500;
      check(vme_irq_n == 7'h7F, "IRQ released after acknowledge");
    end
    rd(A_ST, r);
    check(r[15:8] == 0 && !r[0], "no polling count in interrupt mode");
    wr(A_IRQ, 16'h0000);
    wr(A_CTRL, 16'h0000);

    // -------- resynchronisation --------
    wait_pps(); #(SEC / 3);
    rd(A_ST, r);
    check(r[15:8] > 1, "poll count has built up");
    wr(A_CTRL, 16'h8000);
    #2000;
    rd(A_ST, r);
    check(!r[3], "not running after resync");
    check(r[15:8] == 0 && !r[0], "resync empties the poll count");
    t0 = bursts;
    #(SEC / 3);
    check(bursts == t0, "no DAC bursts while waiting for PPS");
    wait_pps(); #(TP * 100);
    rd(A_ST, r);
    check(r[3], "running again after PPS");
    if (r[3]) n_resync++;
    dac_case(0, 10, 2);                   // positions still aligned
    check(bad_bursts == 0, "aligned after resync");

    // -------- clock error --------
    wait_pps(); #(SEC / 2);
    skip_pulses = 1;                      // one 2^22 Hz pulse goes missing
    wait_pps(); #(TP * 50);
    rd(A_ST, r);
    check(r[1], "missing clock pulse flagged");
    if (r[1]) n_err++;
    wr(A_CTRL, 16'h4000);                 // clear the error
    wait_pps(); wait_pps(); #(TP * 50);
    rd(A_ST, r);
    check(!r[1], "error cleared and not set again");

    // -------- input clock stopped --------
    #(SEC / 4);
    clk_on = 0;
    #20000;
    rd(A_ST, r);
    check(!r[2], "stopped clock: not active");
    if (!r[2]) n_inactive++;
    clk_on = 1;
    #5000;
    rd(A_ST, r);
    check(r[2], "clock restarted: active");
    wr(A_CTRL, 16'h4000);
    wait_pps(); wait_pps(); #(TP * 50);
    wr(A_CTRL, 16'h4000);
    wait_pps(); #(TP * 50);
    rd(A_ST, r);
    check(!r[1] && r[2] && r[3], $sformatf("healthy again %h", r));

    // -------- polarity jumpers --------
    wr(A_DAC, 16'd5);
    dac_pol = 4'b0010; adc_pol = 1;
    #(TP * 10);
    @(posedge clk_in); #1 check(adc_clk_p == '0, "ADC polarity inverted");
    check(dac_clk_p[1] != dac_clk_p[0] && dac_clk_n[1] == dac_clk_p[0], "DAC1 inverted");
    rd(A_JMP, r);
    check(r == {BASE, 5'b0, 4'b0010, 1'b1}, "jumper readback after change");

    // -------- every mechanism happened --------
    check(n_fast > 0, "fast-rate DAC bursts");
    check(n_slow > 0, "slow-rate DAC bursts");
    for (int k = 1; k <= 4; k++) check(n_np[k] > 0, $sformatf("bursts of %0d pulses", k));
    check(n_poll > 0, "polling reads");
    check(n_missed > 0, "missed samples counted");
    check(n_irq > 0, "interrupts acknowledged");
    check(n_resync > 0, "resynchronisation");
    check(n_err > 0, "clock error");
    check(n_inactive > 0, "inactive clock detected");
    $display("mechanisms: fast %0d slow %0d np1 %0d np2 %0d np3 %0d np4 %0d poll %0d missed %0d irq %0d resync %0d err %0d inactive %0d",
             n_fast, n_slow, n_np[1], n_np[2], n_np[3], n_np[4], n_poll, n_missed, n_irq, n_resync, n_err, n_inactive);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(SEC * 40);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
