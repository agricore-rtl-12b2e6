// tb_adc_ctrl: converts all eight channels through the behavioural ADC
// model (clkadc = clk/8) and checks the 10-bit result split over ADC_DL/ADC_DH,
// the done flag and that a start clears done.
module tb_adc_ctrl;
  import agri_pkg::*;
  logic clk = 1'b0, clkadc = 1'b0, rst = 1'b1, sfr_load = 1'b0;
  logic [6:0] sfr_addr = '0;
  logic [7:0] sfr_data_in = '0, sfr_data_out;
  logic [2:0] adc_ch;
  logic adc_start, adc_eoc, done;
  logic [9:0] adc_data;
  logic [9:0] level [8];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always #40 clkadc = ~clkadc;
  adc_ctrl dut (.*);
  adc_model u_adc (.clkadc, .adc_ch, .adc_start, .adc_eoc, .adc_data, .level);
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk) begin sfr_load = 1'b1; sfr_addr = a[6:0]; sfr_data_in = d; end
    @(negedge clk) sfr_load = 1'b0;
  endtask
  initial begin
    for (int i = 0; i < 8; i++) level[i] = 10'(i * 131 + 17);
    @(negedge clk) rst = 1'b0;
    for (int ch = 0; ch < 8; ch++) begin
      logic [9:0] r;
      wr(SFR_ADC_CTRL, 8'h40 | 8'(ch));
      checks++; if (done) failures++;
      wait (done); @(negedge clk);
      sfr_addr = SFR_ADC_DL[6:0]; #1; r[7:0] = sfr_data_out;
      sfr_addr = SFR_ADC_DH[6:0]; #1; r[9:8] = sfr_data_out[1:0];
      checks++;
      if (r != level[ch]) begin failures++; $display("FAIL ch%0d: %0d", ch, r); end
      sfr_addr = SFR_ADC_CTRL[6:0]; #1;
      checks++; if (sfr_data_out != (8'h80 | 8'(ch))) failures++;
      wait (!adc_eoc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
