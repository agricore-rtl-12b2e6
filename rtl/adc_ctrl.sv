// adc_ctrl: the digital side of the 8-channel 10-bit SAR ADC. The converter
// itself is an analog macro; its pins and this register set are this
// design's own:
//   ADC_CTRL (0xB1) [2:0] channel, [6] write 1: start, [7] done (read only,
//                   cleared by a start)
//   ADC_DL (0xB2) result[7:0], ADC_DH (0xB3) result[9:8]
// Handshake with the macro: adc_start rises with the start write and stays
// high until the macro's adc_eoc, synchronised into the system clock domain
// by two flops, is seen high; the result is taken then and done is set. The
// macro must hold adc_eoc and adc_data until adc_start falls.
module adc_ctrl
  import agri_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [6:0] sfr_addr,
  input  logic       sfr_load,
  input  logic [7:0] sfr_data_in,
  output logic [7:0] sfr_data_out,
  output logic [2:0] adc_ch,
  output logic       adc_start,
  input  logic       adc_eoc,
  input  logic [9:0] adc_data,
  output logic       done
);
  logic [1:0] eoc_s;
  logic [9:0] result;
  logic [7:0] a;

  assign a = {1'b1, sfr_addr};

  always_comb begin
    unique case (a)
      SFR_ADC_CTRL: sfr_data_out = {done, adc_start, 3'b000, adc_ch};
      SFR_ADC_DL:   sfr_data_out = result[7:0];
      SFR_ADC_DH:   sfr_data_out = {6'h00, result[9:8]};
      default:      sfr_data_out = 8'h00;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      eoc_s <= 2'b00; result <= '0; adc_ch <= 3'd0; adc_start <= 1'b0; done <= 1'b0;
    end else begin
      eoc_s <= {eoc_s[0], adc_eoc};
      if (adc_start && eoc_s[1]) begin
        result <= adc_data; adc_start <= 1'b0; done <= 1'b1;
      end
      if (sfr_load && a == SFR_ADC_CTRL) begin
        adc_ch <= sfr_data_in[2:0];
        if (sfr_data_in[6] && !adc_start) begin adc_start <= 1'b1; done <= 1'b0; end
      end
    end
  end
endmodule
