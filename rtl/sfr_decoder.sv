// sfr_decoder: the SFR decoder between the core's extension SFR bus and the
// on-chip peripherals. From the 7-bit bus address it selects one device:
// system control ("other reg" and clock generator registers), watchdog,
// ADC, PWM, RTC or SPI host. It gates sfr_load to the selected device only and
// returns that device's read data (0 for an unused address). Purely
// combinational, so a read completes in the clock the core issues it.
// The devices and the decoder follow the chip's block diagram; the address
// map of the peripherals (agri_pkg) is this design's own.
module sfr_decoder
  import agri_pkg::*;
(
  input  logic [6:0] sfr_addr,
  input  logic       sfr_load,
  output logic [7:0] sfr_data_out,
  // per-device write strobes and read data
  output logic [5:0] dev_load,        // {spi, rtc, pwm, adc, wdt, sysctl}
  input  logic [7:0] sys_data,
  input  logic [7:0] wdt_data,
  input  logic [7:0] adc_data,
  input  logic [7:0] pwm_data,
  input  logic [7:0] rtc_data,
  input  logic [7:0] spi_data
);
  logic [5:0] sel;
  logic [7:0] a;

  assign a = {1'b1, sfr_addr};

  always_comb begin
    sel = 6'b000000;
    if (a inside {SFR_SW_RESET, SFR_REMAP, SFR_CLKCFG, SFR_PLLCFG}) sel[0] = 1'b1;
    if (a inside {SFR_WDT_CTRL, SFR_WDT_KICK})                      sel[1] = 1'b1;
    if (a inside {SFR_ADC_CTRL, SFR_ADC_DL, SFR_ADC_DH})            sel[2] = 1'b1;
    if (a inside {SFR_PWM_CTRL, SFR_PWM_PER, [SFR_PWM_D0:SFR_PWM_D0 + 8'd3]}) sel[3] = 1'b1;
    if (a inside {SFR_RTC_CTRL, SFR_RTC_SEC, SFR_RTC_MIN, SFR_RTC_HOUR}) sel[4] = 1'b1;
    if (a inside {SFR_SPI_CTRL, SFR_SPI_DATA, SFR_SPI_STAT})        sel[5] = 1'b1;
  end

  assign dev_load = sel & {6{sfr_load}};

  always_comb begin
    unique case (1'b1)
      sel[0]:  sfr_data_out = sys_data;
      sel[1]:  sfr_data_out = wdt_data;
      sel[2]:  sfr_data_out = adc_data;
      sel[3]:  sfr_data_out = pwm_data;
      sel[4]:  sfr_data_out = rtc_data;
      sel[5]:  sfr_data_out = spi_data;
      default: sfr_data_out = 8'h00;
    endcase
  end

  a_onehot: assert final ($onehot0(sel));
endmodule
