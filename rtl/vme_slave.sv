// vme_slave: VMEbus A16/D16 slave and interrupter of the timing board.
//
// The board answers data transfer cycles in the short I/O (A16) space with
// either the non-privileged (0x29) or the supervisory (0x2D) address
// modifier, when address bits A15..A10 equal the base-address switches, as
// the requirements ask. It also acts as a release-on-acknowledge interrupter
// on one of IRQ1*..IRQ7* with a programmable 8-bit vector.
//
// The asynchronous VMEbus strobes AS*, DS0*, DS1* and IACKIN* are brought
// into the bus clock domain by two-flop synchronisers; address, address
// modifier, WRITE*, IACK* and write data are stable while the strobes are
// asserted and are sampled directly. When a cycle is seen:
//  * a selected data cycle gives one `reg_wr` or `reg_rd` cycle to the
//    register file, drives the read data, and asserts DTACK* until both data
//    strobes are released;
//  * an interrupt acknowledge cycle that reaches this board through IACKIN*
//    is answered with the vector if the board has an interrupt pending at the
//    level on A3..A1 (and `iack_done` pulses); otherwise IACKOUT* passes the
//    acknowledge down the daisy chain until AS* or IACKIN* is released;
//  * any other cycle is ignored until AS* is released.
// All accesses are treated as 16-bit words whatever DS0*/DS1* say, and
// A9..A4 are not decoded, so the register block repeats within the board's
// 1 KiB window; both are simplifications of this design.
// Timing: DTACK* falls four to five bus clocks after the later of AS* and
// the first data strobe, and rises three to four clocks after both data
// strobes rise. Outputs are registered.
module vme_slave
  import vdt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // VMEbus (active-low strobes)
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic        iack_n,
  input  logic        iackin_n,
  input  logic [5:0]  am,
  input  logic [15:1] addr,
  input  logic [15:0] d_in,
  output logic [15:0] d_out,
  output logic        d_oe,
  output logic        dtack_n,
  output logic        iackout_n,
  output logic [7:1]  irq_n,
  // board configuration
  input  logic [5:0]  base_sw,
  input  logic [2:0]  irq_level,
  input  logic [7:0]  irq_vector,
  input  logic        irq_req,
  output logic        iack_done,
  // register file port
  output logic        reg_wr,
  output logic        reg_rd,
  output logic [2:0]  reg_addr,
  output logic [15:0] reg_wdata,
  input  logic [15:0] reg_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_ACK, S_PASS, S_SKIP} state_e;

  state_e state;
  logic   as_s, ds0_s, ds1_s, iackin_s;
  logic   ds_any, ds_none, am_ok, selected;

  cdc_sync #(.W(4), .RESET_VAL(4'hF)) u_sync (
    .clk(clk), .rst_n(rst_n),
    .d({as_n, ds_n, iackin_n}),
    .q({as_s, ds1_s, ds0_s, iackin_s})
  );

  // synchronised strobes are still active low
  assign ds_any   = !ds0_s || !ds1_s;
  assign ds_none  = ds0_s && ds1_s;
  assign am_ok    = (am == AM_A16_USER) || (am == AM_A16_SUPV);
  assign selected = iack_n && am_ok && (addr[15:10] == base_sw);

  assign reg_addr  = addr[3:1];
  assign reg_wdata = d_in;

  always_comb begin
    reg_wr = 1'b0;
    reg_rd = 1'b0;
    if (state == S_IDLE && !as_s && ds_any && selected) begin
      reg_wr = !write_n;
      reg_rd = write_n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      d_out     <= '0;
      d_oe      <= 1'b0;
      dtack_n   <= 1'b1;
      iackout_n <= 1'b1;
      iack_done <= 1'b0;
    end else begin
      iack_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (!as_s && ds_any) begin
            if (selected) begin
              if (write_n) begin
                d_out <= reg_rdata;
                d_oe  <= 1'b1;
              end
              dtack_n <= 1'b0;
              state   <= S_ACK;
            end else if (!iack_n) begin
              if (!iackin_s) begin
                if (irq_req && irq_level != 3'd0 && addr[3:1] == irq_level) begin
                  d_out     <= {8'h00, irq_vector};
                  d_oe      <= 1'b1;
                  dtack_n   <= 1'b0;
                  iack_done <= 1'b1;
                  state     <= S_ACK;
                end else begin
                  iackout_n <= 1'b0;
                  state     <= S_PASS;
                end
              end
            end else begin
              state <= S_SKIP;
            end
          end
        end
        S_ACK: begin
          if (ds_none) begin
            dtack_n <= 1'b1;
            d_oe    <= 1'b0;
            state   <= S_SKIP;
          end
        end
        S_PASS: begin
          if (as_s || iackin_s) begin
            iackout_n <= 1'b1;
            state     <= S_SKIP;
          end
        end
        S_SKIP: begin
          if (as_s) state <= S_IDLE;
        end
      endcase
    end
  end

  // interrupt request lines, one per level
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) irq_n <= '1;
    else
      for (int l = 1; l <= 7; l++)
        irq_n[l] <= !(irq_req && irq_level == 3'(l));
  end

  // DTACK* is only asserted while a data strobe is (or was just) asserted.
  a_dtack_ds: assert property (@(posedge clk) disable iff (!rst_n)
                               $fell(dtack_n) |-> ds_any);
  // Never acknowledge a cycle and pass it down the chain at once.
  a_ack_xor_pass: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(!dtack_n && !iackout_n));
endmodule
