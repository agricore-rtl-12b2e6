// agricore_soc: the AgriCore chip, an 8051-compatible microcontroller SoC
// for agricultural sensor nodes.
//
// Inside: the MCU core (the processor with ports, three timers, serial port
// and interrupts; the 256-byte register file; 8 KB startup ROM, 64 KB program
// RAM, 64 KB data RAM and the REMAP memory map), and on the extension SFR bus
// behind the SFR decoder: system-control registers, watchdog, ADC
// controller, 4-channel PWM, RTC and SPI flash host. The reset generator
// makes the global reset and the CPU-only restart that follows REMAP=1. The
// clock generator builds the system clock CLK from the RC oscillator or the
// crystal, optionally through the PLL, and the PWM, ADC and 32 kHz clocks.
//
// The analog parts are outside: the oscillators, the PLL, the ADC converter,
// the regulator and the pad ring. Their signals are ports: rc_clk, xtal_clk
// and clk32k_in come from the oscillators; pll_ref/pll_en/pll_cfg go to the
// PLL, whose output comes back on pll_clk (expected frequency
// pll_ref * (2 + pll_cfg) / 8); adc_* connect the converter, which runs on
// clkadc. Ports p_in/p_out are the 32 GPIO {P3,P2,P1,P0}: p_in is the pad
// level and p_out the output latch (quasi-bidirectional pads: the pad is
// pulled low where p_out is 0).
// pll_en is PLL_EN (CLKCFG[7]) or'ed with "the clock switch still takes the
// PLL": a global reset clears PLL_EN and PLL_SEL at once, and the switch can
// only move off a clock that is still running, so the PLL is powered down only
// after the switch has left it (this design's own addition).
// All digital logic runs on CLK except the PWM counter (CLKPWM).
module agricore_soc #(
  parameter int unsigned PRAM_AW  = 16,
  parameter int unsigned DRAM_AW  = 16,
  parameter string       ROM_INIT = "rtl/boot_rom.hex",
  parameter int unsigned RTC_PRESCALE = 32768,
  parameter int unsigned WDT_BASE = 12
) (
  input  logic        rst_n,
  input  logic        rc_clk,
  input  logic        xtal_clk,
  input  logic        clk32k_in,
  input  logic        clksel,
  input  logic        pll_clk,
  output logic        pll_ref,
  output logic        pll_en,
  output logic [6:0]  pll_cfg,
  input  logic [31:0] p_in,
  output logic [31:0] p_out,
  output logic [3:0]  pwm_out,
  output logic        clkadc,
  output logic [2:0]  adc_ch,
  output logic        adc_start,
  input  logic        adc_eoc,
  input  logic [9:0]  adc_data,
  output logic        spi_sclk,
  output logic        spi_mosi,
  input  logic        spi_miso,
  output logic        spi_cs_n,
  output logic        clk_sys,      // system clock, for observation
  output logic        cpu_rst_o,
  output logic [15:0] pc
);
  logic clk, clkpwm, clk32k, sys_rst, cpu_rst;
  logic sw_reset, remap_cmd, remap, pll_sel, wdt_timeout, insn_start, irq_taken;
  logic [2:0] clk_div, pwm_div;
  logic [6:0] ext_addr;
  logic       sfr_read_str, sfr_load;
  logic [7:0] ext_data_out, ext_data_in;
  logic [5:0] dev_load;
  logic [7:0] sys_d, wdt_d, adc_d, pwm_d, rtc_d, spi_d;
  logic       adc_done, sec_tick;
  logic       pll_en_reg, pll_in_use;

  clock_gen u_clkgen (
    .rst_n, .rc_clk, .xtal_clk, .clk32k_in, .clksel, .pll_clk, .pll_sel, .clk_div, .pwm_div,
    .osc_clk(pll_ref), .clk, .clkpwm, .clkadc, .clk32k, .pll_in_use
  );

  reset_gen u_rstgen (
    .clk, .rst_n, .sw_reset, .wdt_timeout, .remap_cmd, .sys_rst, .cpu_rst
  );

  mcu_core #(.PRAM_AW(PRAM_AW), .DRAM_AW(DRAM_AW), .ROM_INIT(ROM_INIT)) u_core (
    .clk, .rst(cpu_rst), .remap, .ext_addr, .sfr_read_str, .ext_data_out, .sfr_load,
    .ext_data_in, .pin_in(p_in), .port_out(p_out), .pc, .insn_start, .irq_taken
  );

  sfr_decoder u_dec (
    .sfr_addr(ext_addr), .sfr_load, .sfr_data_out(ext_data_out), .dev_load,
    .sys_data(sys_d), .wdt_data(wdt_d), .adc_data(adc_d), .pwm_data(pwm_d),
    .rtc_data(rtc_d), .spi_data(spi_d)
  );

  sysctl_regs u_sys (
    .clk, .rst(sys_rst), .sfr_addr(ext_addr), .sfr_load(dev_load[0]), .sfr_data_in(ext_data_in),
    .sfr_data_out(sys_d), .clksel_pin(clksel), .sw_reset, .remap_cmd, .remap, .pll_sel,
    .pll_en(pll_en_reg), .clk_div, .pwm_div, .pll_cfg
  );

  watchdog #(.BASE(WDT_BASE)) u_wdt (
    .clk, .rst(sys_rst), .sfr_addr(ext_addr), .sfr_load(dev_load[1]), .sfr_data_in(ext_data_in),
    .sfr_data_out(wdt_d), .timeout(wdt_timeout)
  );

  adc_ctrl u_adc (
    .clk, .rst(sys_rst), .sfr_addr(ext_addr), .sfr_load(dev_load[2]), .sfr_data_in(ext_data_in),
    .sfr_data_out(adc_d), .adc_ch, .adc_start, .adc_eoc, .adc_data, .done(adc_done)
  );

  pwm4 u_pwm (
    .clk, .rst(sys_rst), .clkpwm, .sfr_addr(ext_addr), .sfr_load(dev_load[3]),
    .sfr_data_in(ext_data_in), .sfr_data_out(pwm_d), .pwm_out
  );

  rtc #(.PRESCALE(RTC_PRESCALE)) u_rtc (
    .clk, .rst(sys_rst), .clk32k, .sfr_addr(ext_addr), .sfr_load(dev_load[4]),
    .sfr_data_in(ext_data_in), .sfr_data_out(rtc_d), .sec_tick
  );

  spi_host u_spi (
    .clk, .rst(sys_rst), .sfr_addr(ext_addr), .sfr_load(dev_load[5]), .sfr_data_in(ext_data_in),
    .sfr_data_out(spi_d), .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n
  );

  // the PLL stays on while the master clock still comes from it
  assign pll_en    = pll_en_reg || pll_in_use;
  assign clk_sys   = clk;
  assign cpu_rst_o = cpu_rst;
endmodule
