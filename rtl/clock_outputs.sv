// clock_outputs: ADC and DAC clock output stage with polarity jumpers.
//
// ADC clock outputs carry the 2^22 Hz input clock itself, which is already a
// 50% duty-cycle signal; one jumper inverts all of them. The DAC clock
// outputs carry the DAC pulse train, retimed by one flop on the 2^22 Hz
// clock so that all of them switch on the same edge; each has its own
// polarity jumper. Every output is a differential pair (_p, _n) feeding an
// external differential TTL driver. Output counts (6 ADC, 4 DAC), the single
// ADC jumper and the per-output DAC jumpers follow the requirements; driving
// every DAC output from one pulse train is this design's reading.
//
// The ADC outputs are the clock passed through an XOR gate, so they are a
// clock path, not registered data; this is intended.
module clock_outputs #(
  parameter int unsigned N_ADC = 6,
  parameter int unsigned N_DAC = 4
) (
  input  logic             clk,         // 2^22 Hz clock
  input  logic             rst_n,
  input  logic             dac_pulse,   // from dac_pulse_train
  input  logic             adc_pol,     // jumper: 1 inverts the ADC clocks
  input  logic [N_DAC-1:0] dac_pol,     // jumpers: 1 inverts that DAC clock
  output logic [N_ADC-1:0] adc_clk_p,
  output logic [N_ADC-1:0] adc_clk_n,
  output logic [N_DAC-1:0] dac_clk_p,
  output logic [N_DAC-1:0] dac_clk_n
);
  logic [N_DAC-1:0] dac_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dac_q <= dac_pol;
    else        dac_q <= {N_DAC{dac_pulse}} ^ dac_pol;
  end

  always_comb begin
    adc_clk_p = {N_ADC{clk ^ adc_pol}};
    adc_clk_n = ~adc_clk_p;
    dac_clk_p = dac_q;
    dac_clk_n = ~dac_q;
  end
endmodule
