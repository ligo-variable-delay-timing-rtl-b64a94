// vdt_pkg: constants and types shared by the variable delay timing board.
//
// The board runs two clock domains: the timing domain, clocked by the
// GPS-locked 2^22 Hz input clock, and the bus domain, clocked by a local
// oscillator that keeps the VMEbus interface alive when the input clock is
// missing. This package holds the VMEbus address modifiers the board answers,
// the register map seen from the VMEbus and the control-register layout.
// The register map and every bit position are this design's own choice;
// the requirements only list what must be readable and writable.
package vdt_pkg;

  // VMEbus short I/O (A16) address modifiers: non-privileged and supervisory.
  localparam logic [5:0] AM_A16_USER = 6'h29;
  localparam logic [5:0] AM_A16_SUPV = 6'h2D;

  // Register index = VME address bits A3..A1 (16-bit registers at even offsets).
  typedef enum logic [2:0] {
    REG_CTRL      = 3'd0,  // 0x00 control, rw (bits 15/14 are write-one pulses)
    REG_DAC_DELAY = 3'd1,  // 0x02 DAC clock delay, rw, [7:0]
    REG_ADC_DELAY = 3'd2,  // 0x04 ADC polling/interrupt delay, rw, [7:0]
    REG_STATUS    = 3'd3,  // 0x06 status, ro, reading clears poll bit and count
    REG_JUMPERS   = 3'd4,  // 0x08 jumper and switch readback, ro
    REG_IRQ_CFG   = 3'd5   // 0x0A interrupt level [2:0] and vector [15:8], rw
  } reg_idx_e;

  // CTRL bit positions.
  localparam int CTRL_DAC_SLOW  = 0;   // 0: 16384 Hz DAC clock, 1: 2048 Hz
  localparam int CTRL_ADC_SLOW  = 1;   // 0: 16384 Hz ADC poll rate, 1: 2048 Hz
  localparam int CTRL_NPULSE_LO = 2;   // [3:2] DAC pulses per period minus one
  localparam int CTRL_IRQ_MODE  = 4;   // 0: polling mode, 1: interrupt mode
  localparam int CTRL_CLR_ERR   = 14;  // write 1: clear the clock error flag
  localparam int CTRL_RESYNC    = 15;  // write 1: resynchronise to the next 1 PPS

  // STATUS bit positions.
  localparam int ST_POLL     = 0;
  localparam int ST_CLK_ERR  = 1;
  localparam int ST_CLK_ACT  = 2;
  localparam int ST_RUNNING  = 3;
  localparam int ST_IRQ_PEND = 4;
  localparam int ST_COUNT_LO = 8;      // [15:8] polling ticks since last read

  // Configuration that the bus domain hands to the timing domain.
  typedef struct packed {
    logic       dac_slow;
    logic       adc_slow;
    logic [1:0] npulse_m1;
    logic [7:0] dac_delay;
    logic [7:0] adc_delay;
  } timing_cfg_t;

endpackage
