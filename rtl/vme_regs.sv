// vme_regs: the board's register file, seen from the VMEbus.
//
// Sixteen-bit registers, selected by VME address bits A3..A1 (see vdt_pkg):
//   0x00 CTRL      rw  [0] DAC rate (0 16384 Hz, 1 2048 Hz), [1] ADC poll
//                      rate, [3:2] DAC pulses per period minus one, [4]
//                      interrupt mode; write-one pulses [14] clear clock
//                      error, [15] resynchronise to 1 PPS (read as 0)
//   0x02 DAC_DELAY rw  [7:0] DAC clock delay in steps
//   0x04 ADC_DELAY rw  [7:0] ADC polling / interrupt delay in steps
//   0x06 STATUS    ro  [0] poll bit, [1] clock error, [2] clocks active,
//                      [3] aligned to 1 PPS, [4] interrupt pending,
//                      [15:8] polling ticks since the last STATUS read;
//                      a read clears [0] and [15:8]
//   0x08 JUMPERS   ro  [0] ADC polarity, [N_DAC:1] DAC polarities,
//                      [15:10] base-address switches A15..A10
//   0x0A IRQ_CFG   rw  [2:0] interrupt level 1-7 (0 disables), [15:8] vector
// Unused offsets read 0. The requirements list the functions (delays, rates,
// pulse count, mode, resync, error bit, clock-active bit, jumper readback,
// selectable IRQ level and vector); the map, the bit positions and making
// the level and vector registers rather than jumpers are this design's own.
//
// Timing: `rdata` is combinational from `addr` and is sampled by the bus
// interface on the cycle `rd` is high; writes take effect on the `wr` edge.
// All registers reset to 0.
module vme_regs
  import vdt_pkg::*;
#(
  parameter int unsigned N_DAC = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // register access from vme_slave
  input  logic             wr,
  input  logic             rd,
  input  logic [2:0]       addr,
  input  logic [15:0]      wdata,
  output logic [15:0]      rdata,
  // status sources (bus domain)
  input  logic             poll,
  input  logic [7:0]       count,
  input  logic             irq_req,
  input  logic             clk_err,
  input  logic             clk_active,
  input  logic             running,
  // jumpers and switches
  input  logic             adc_pol,
  input  logic [N_DAC-1:0] dac_pol,
  input  logic [5:0]       base_sw,
  // outputs
  output timing_cfg_t      cfg,
  output logic             irq_mode,
  output logic [2:0]       irq_level,
  output logic [7:0]       irq_vector,
  output logic             resync,       // one-cycle pulses
  output logic             clr_err,
  output logic             status_read
);
  reg_idx_e idx;
  assign idx = reg_idx_e'(addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg        <= '0;
      irq_mode   <= 1'b0;
      irq_level  <= '0;
      irq_vector <= '0;
      resync     <= 1'b0;
      clr_err    <= 1'b0;
    end else begin
      resync  <= 1'b0;
      clr_err <= 1'b0;
      if (wr) begin
        case (idx)
          REG_CTRL: begin
            cfg.dac_slow  <= wdata[CTRL_DAC_SLOW];
            cfg.adc_slow  <= wdata[CTRL_ADC_SLOW];
            cfg.npulse_m1 <= wdata[CTRL_NPULSE_LO +: 2];
            irq_mode      <= wdata[CTRL_IRQ_MODE];
            resync        <= wdata[CTRL_RESYNC];
            clr_err       <= wdata[CTRL_CLR_ERR];
          end
          REG_DAC_DELAY: cfg.dac_delay <= wdata[7:0];
          REG_ADC_DELAY: cfg.adc_delay <= wdata[7:0];
          REG_IRQ_CFG: begin
            irq_level  <= wdata[2:0];
            irq_vector <= wdata[15:8];
          end
          default: ;
        endcase
      end
    end
  end

  assign status_read = rd && idx == REG_STATUS;

  always_comb begin
    rdata = '0;
    case (idx)
      REG_CTRL: begin
        rdata[CTRL_DAC_SLOW]           = cfg.dac_slow;
        rdata[CTRL_ADC_SLOW]           = cfg.adc_slow;
        rdata[CTRL_NPULSE_LO +: 2]     = cfg.npulse_m1;
        rdata[CTRL_IRQ_MODE]           = irq_mode;
      end
      REG_DAC_DELAY: rdata[7:0] = cfg.dac_delay;
      REG_ADC_DELAY: rdata[7:0] = cfg.adc_delay;
      REG_STATUS: begin
        rdata[ST_POLL]            = poll;
        rdata[ST_CLK_ERR]         = clk_err;
        rdata[ST_CLK_ACT]         = clk_active;
        rdata[ST_RUNNING]         = running;
        rdata[ST_IRQ_PEND]        = irq_req;
        rdata[ST_COUNT_LO +: 8]   = count;
      end
      REG_JUMPERS: begin
        rdata[0]           = adc_pol;
        rdata[1 +: N_DAC]  = dac_pol;
        rdata[15:10]       = base_sw;
      end
      REG_IRQ_CFG: begin
        rdata[2:0]  = irq_level;
        rdata[15:8] = irq_vector;
      end
      default: ;
    endcase
  end
endmodule
