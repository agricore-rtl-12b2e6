// adc_model: behavioural stand-in for the 8-channel 10-bit SAR ADC macro,
// for simulation only. On adc_start it converts the channel's value from
// `level` in CONV_CLKS cycles of clkadc, then raises adc_eoc with the result
// and holds both until adc_start falls.
module adc_model #(
  parameter int CONV_CLKS = 12
) (
  input  logic       clkadc,
  input  logic [2:0] adc_ch,
  input  logic       adc_start,
  output logic       adc_eoc,
  output logic [9:0] adc_data,
  input  logic [9:0] level [8]
);
  initial begin adc_eoc = 1'b0; adc_data = '0; end
  always begin
    @(posedge clkadc iff adc_start);
    repeat (CONV_CLKS) @(posedge clkadc);
    adc_data = level[adc_ch];
    adc_eoc = 1'b1;
    @(negedge adc_start);
    adc_eoc = 1'b0;
  end
endmodule
