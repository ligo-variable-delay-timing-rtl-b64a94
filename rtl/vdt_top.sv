// vdt_top: variable delay timing board for GPS-synchronised ADC/DAC sampling.
//
// The board receives a 2^22 Hz clock and a 1 PPS pulse, both locked to GPS,
// and from them serves a crate of ADC and DAC modules:
//  * ADC clock outputs carry the 2^22 Hz clock (one polarity jumper);
//  * DAC clock outputs carry, once per sample period (16384 Hz or 2048 Hz),
//    a burst of 1-4 short pulses that starts a programmable delay after the
//    nominal sample instant aligned with 1 PPS (one polarity jumper each);
//  * a second programmable delay, at its own rate, sets a polling bit and a
//    missed-sample counter, or raises a VMEbus interrupt, so software can
//    read the ADCs without polling them while they convert;
//  * the status register reports a clock error (a second without exactly
//    2^22 clock cycles) and whether the input clocks are active;
//  * a VMEbus write resynchronises all delays and DAC clocks to the next PPS.
//
// Structure. The timing domain (clock `clk_in`) holds pps_phase_counter,
// clock_error_detector, two delay_tick_gen instances, dac_pulse_train and
// clock_outputs. The bus domain (clock `bus_clk`, the board's own oscillator,
// so the VMEbus side works with no input clock) holds vme_slave, vme_regs,
// adc_poll_irq and the clock activity timer. Configuration crosses to the
// timing domain through cdc_bus_sync, single-cycle events cross both ways
// through cdc_pulse_sync, status levels through cdc_sync. `sysreset_n` is the
// VMEbus SYSRESET*; each domain releases it synchronously.
//
// Timing: the phase counter starts from the first clock edge after the PPS
// rise, and the DAC delay compare runs DAC_LEAD = 3 cycles early to cover the
// tick, pulse and output registers. So the first DAC pulse of a burst rises
// on the clock edge that is exactly delay*step cycles after the nominal
// instant (delay 0: the first clock edge after the PPS rise). The ADC
// polling tick reaches the bus domain 2 input cycles plus 3-4 bus clocks
// after its instant. After a resync the board waits for the next PPS edge;
// DAC bursts that would fall within the first 3 cycles after that PPS are
// skipped, because the edge is only seen 3 cycles after it happens.
// Defaults are the requirements' numbers: 6 ADC and 4 DAC outputs, 2^22
// cycles per second, 16384 Hz = 2^(22-8) and 2048 Hz = 2^(22-11) sample rates.
module vdt_top
  import vdt_pkg::*;
#(
  parameter int unsigned N_ADC       = 6,
  parameter int unsigned N_DAC       = 4,
  parameter int unsigned CLK_LOG2    = 22,
  parameter int unsigned FAST_LOG2   = 8,
  parameter int unsigned SLOW_LOG2   = 11,
  parameter int unsigned PULSE_HI    = 4,
  parameter int unsigned PULSE_LO    = 4,
  parameter int unsigned ACT_TIMEOUT = 64,
  parameter int unsigned PPS_MARGIN  = 1024
) (
  // GPS timing inputs (after the ECL receivers)
  input  logic             clk_in,       // 2^22 Hz
  input  logic             pps_in,       // 1 PPS
  // board oscillator and VMEbus SYSRESET*
  input  logic             bus_clk,
  input  logic             sysreset_n,
  // VMEbus slave
  input  logic             vme_as_n,
  input  logic [1:0]       vme_ds_n,
  input  logic             vme_write_n,
  input  logic             vme_iack_n,
  input  logic             vme_iackin_n,
  input  logic [5:0]       vme_am,
  input  logic [15:1]      vme_addr,
  input  logic [15:0]      vme_d_in,
  output logic [15:0]      vme_d_out,
  output logic             vme_d_oe,
  output logic             vme_dtack_n,
  output logic             vme_iackout_n,
  output logic [7:1]       vme_irq_n,
  // jumpers and switches
  input  logic [5:0]       base_sw,      // A15..A10
  input  logic             adc_pol,
  input  logic [N_DAC-1:0] dac_pol,
  // clock outputs (to the differential TTL drivers)
  output logic [N_ADC-1:0] adc_clk_p,
  output logic [N_ADC-1:0] adc_clk_n,
  output logic [N_DAC-1:0] dac_clk_p,
  output logic [N_DAC-1:0] dac_clk_n
);
  // ---------------- resets ----------------
  logic trst_n, brst_n;
  rst_sync u_trst (.clk(clk_in),  .rst_n_in(sysreset_n), .rst_n_out(trst_n));
  rst_sync u_brst (.clk(bus_clk), .rst_n_in(sysreset_n), .rst_n_out(brst_n));

  // ---------------- bus domain ----------------
  timing_cfg_t cfg_b, cfg_t;
  logic        irq_mode, irq_req, iack_done;
  logic [2:0]  irq_level;
  logic [7:0]  irq_vector;
  logic        resync_b, clr_err_b, status_read;
  logic        reg_wr, reg_rd;
  logic [2:0]  reg_addr;
  logic [15:0] reg_wdata, reg_rdata;
  logic        poll;
  logic [7:0]  count;
  logic        adc_tick_b;
  logic        clk_err_b, running_b, clk_active;

  vme_slave u_vme (
    .clk(bus_clk), .rst_n(brst_n),
    .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n), .iack_n(vme_iack_n),
    .iackin_n(vme_iackin_n), .am(vme_am), .addr(vme_addr), .d_in(vme_d_in),
    .d_out(vme_d_out), .d_oe(vme_d_oe), .dtack_n(vme_dtack_n),
    .iackout_n(vme_iackout_n), .irq_n(vme_irq_n),
    .base_sw(base_sw), .irq_level(irq_level), .irq_vector(irq_vector),
    .irq_req(irq_req), .iack_done(iack_done),
    .reg_wr(reg_wr), .reg_rd(reg_rd), .reg_addr(reg_addr),
    .reg_wdata(reg_wdata), .reg_rdata(reg_rdata)
  );

  vme_regs #(.N_DAC(N_DAC)) u_regs (
    .clk(bus_clk), .rst_n(brst_n),
    .wr(reg_wr), .rd(reg_rd), .addr(reg_addr), .wdata(reg_wdata), .rdata(reg_rdata),
    .poll(poll), .count(count), .irq_req(irq_req),
    .clk_err(clk_err_b), .clk_active(clk_active), .running(running_b),
    .adc_pol(adc_pol), .dac_pol(dac_pol), .base_sw(base_sw),
    .cfg(cfg_b), .irq_mode(irq_mode), .irq_level(irq_level), .irq_vector(irq_vector),
    .resync(resync_b), .clr_err(clr_err_b), .status_read(status_read)
  );

  adc_poll_irq #(.CNT_W(8)) u_poll (
    .clk(bus_clk), .rst_n(brst_n), .clear(resync_b), .tick(adc_tick_b), .irq_mode(irq_mode),
    .status_read(status_read), .iack_done(iack_done),
    .poll(poll), .count(count), .irq_req(irq_req)
  );

  // ---------------- timing domain ----------------
  logic                 resync_t, clr_err_t;
  logic                 pps_edge, running, clk_err, pps_present;
  logic [CLK_LOG2-1:0]  phase;
  logic                 dac_tick, adc_tick, dac_pulse;

  cdc_bus_sync #(.W($bits(timing_cfg_t))) u_cfg_sync (
    .clk(clk_in), .rst_n(trst_n), .d(cfg_b), .q(cfg_t)
  );

  cdc_pulse_sync u_resync_sync (
    .src_clk(bus_clk), .src_rst_n(brst_n), .src_pulse(resync_b),
    .dst_clk(clk_in), .dst_rst_n(trst_n), .dst_pulse(resync_t)
  );

  cdc_pulse_sync u_clr_sync (
    .src_clk(bus_clk), .src_rst_n(brst_n), .src_pulse(clr_err_b),
    .dst_clk(clk_in), .dst_rst_n(trst_n), .dst_pulse(clr_err_t)
  );

  pps_phase_counter #(.CLK_LOG2(CLK_LOG2)) u_phase (
    .clk(clk_in), .rst_n(trst_n), .pps_in(pps_in), .resync(resync_t),
    .pps_edge(pps_edge), .running(running), .phase(phase)
  );

  clock_error_detector #(.CLK_LOG2(CLK_LOG2), .PPS_MARGIN(PPS_MARGIN)) u_err (
    .clk(clk_in), .rst_n(trst_n), .pps_edge(pps_edge), .clear(clr_err_t),
    .clk_err(clk_err), .pps_present(pps_present)
  );

  localparam int unsigned DAC_LEAD = 3;

  delay_tick_gen #(.CLK_LOG2(CLK_LOG2), .FAST_LOG2(FAST_LOG2), .SLOW_LOG2(SLOW_LOG2), .LEAD(DAC_LEAD)) u_dac_delay (
    .clk(clk_in), .rst_n(trst_n), .running(running), .phase(phase),
    .rate_slow(cfg_t.dac_slow), .delay(cfg_t.dac_delay), .tick(dac_tick)
  );

  delay_tick_gen #(.CLK_LOG2(CLK_LOG2), .FAST_LOG2(FAST_LOG2), .SLOW_LOG2(SLOW_LOG2), .LEAD(0)) u_adc_delay (
    .clk(clk_in), .rst_n(trst_n), .running(running), .phase(phase),
    .rate_slow(cfg_t.adc_slow), .delay(cfg_t.adc_delay), .tick(adc_tick)
  );

  dac_pulse_train #(.PULSE_HI(PULSE_HI), .PULSE_LO(PULSE_LO)) u_train (
    .clk(clk_in), .rst_n(trst_n), .clear(resync_t), .start(dac_tick),
    .npulse_m1(cfg_t.npulse_m1), .pulse(dac_pulse), .busy()
  );

  clock_outputs #(.N_ADC(N_ADC), .N_DAC(N_DAC)) u_out (
    .clk(clk_in), .rst_n(trst_n), .dac_pulse(dac_pulse),
    .adc_pol(adc_pol), .dac_pol(dac_pol),
    .adc_clk_p(adc_clk_p), .adc_clk_n(adc_clk_n),
    .dac_clk_p(dac_clk_p), .dac_clk_n(dac_clk_n)
  );

  // ---------------- timing -> bus ----------------
  cdc_pulse_sync u_tick_sync (
    .src_clk(clk_in), .src_rst_n(trst_n), .src_pulse(adc_tick),
    .dst_clk(bus_clk), .dst_rst_n(brst_n), .dst_pulse(adc_tick_b)
  );

  cdc_sync #(.W(2)) u_status_sync (
    .clk(bus_clk), .rst_n(brst_n), .d({clk_err, running}), .q({clk_err_b, running_b})
  );

  clock_activity_monitor #(.ACT_TIMEOUT(ACT_TIMEOUT)) u_act (
    .tclk(clk_in), .trst_n(trst_n), .pps_present(pps_present),
    .clk(bus_clk), .rst_n(brst_n), .clk_running(), .clk_active(clk_active)
  );
endmodule
