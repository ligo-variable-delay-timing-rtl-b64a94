// tb_clock_outputs: checks polarity jumpers and the differential pairs.
//
// ADC outputs must follow the clock (inverted when the ADC jumper is set) in
// both clock phases; DAC outputs must follow the pulse input one clock edge
// later, each XORed with its own jumper; every _n must be the inverse of _p.
module tb_clock_outputs;
  timeunit 1ns; timeprecision 1ps;
  localparam int NA = 6, ND = 4;
  logic clk = 0, rst_n = 0, dac_pulse = 0, adc_pol = 0;
  logic [ND-1:0] dac_pol = '0;
  logic [NA-1:0] adc_clk_p, adc_clk_n;
  logic [ND-1:0] dac_clk_p, dac_clk_n;
  int checks = 0, failures = 0;

  clock_outputs #(.N_ADC(NA), .N_DAC(ND)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic prev;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      adc_pol = k[4]; dac_pol = ND'(k[3:0] ^ 4'h5);
      prev = dac_pulse;
      dac_pulse = 1'($urandom_range(1));
      #1;
      check(adc_clk_p == {NA{1'b0 ^ adc_pol}}, "ADC low phase");
      check(adc_clk_n == ~adc_clk_p, "ADC pair");
      @(posedge clk); #1;
      check(adc_clk_p == {NA{1'b1 ^ adc_pol}}, "ADC high phase");
      check(dac_clk_p == ({ND{dac_pulse}} ^ dac_pol), $sformatf("DAC retimed %b", dac_clk_p));
      check(dac_clk_n == ~dac_clk_p, "DAC pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
