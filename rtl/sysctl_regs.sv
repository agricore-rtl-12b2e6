// sysctl_regs: the system-control SFRs on the extension SFR bus, with the
// addresses, bit fields and reset values of the chip description:
//   0xE9 SW_RESET  [0] write 1: global chip reset (reads 0)
//                  [6] PLL_SEL: 0 oscillator clock, 1 PLL clock as master clock
//                  [7] read only: level of the CLKSEL pin
//   0xEA REMAP     [0] 0: ROM at address 0, 1: program RAM at address 0.
//                  Writing 1 also restarts the CPU subsystem (remap_cmd).
//   0xF1 CLKCFG    [7] PLL_EN, [5:3] PWM clock divider, [2:0] master clock divider
//   0xF2 PLLCFG    [6:0] PLL frequency control, reset 0x17
// Reads are combinational on the bus; writes land at the clock edge ending a
// cycle with sfr_load high. rst is the global reset: the CPU-only restart
// after a REMAP write leaves these registers alone, so REMAP stays 1.
// Bits the description leaves undefined read 0 and ignore writes.
module sysctl_regs
  import agri_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [6:0] sfr_addr,
  input  logic       sfr_load,
  input  logic [7:0] sfr_data_in,
  output logic [7:0] sfr_data_out,
  input  logic       clksel_pin,
  output logic       sw_reset,      // one-clock pulse
  output logic       remap_cmd,     // one-clock pulse on writing REMAP=1
  output logic       remap,
  output logic       pll_sel,
  output logic       pll_en,
  output logic [2:0] clk_div,
  output logic [2:0] pwm_div,
  output logic [6:0] pll_cfg
);
  always_comb begin
    unique case ({1'b1, sfr_addr})
      SFR_SW_RESET: sfr_data_out = {clksel_pin, pll_sel, 6'b000000};
      SFR_REMAP:    sfr_data_out = {7'b0000000, remap};
      SFR_CLKCFG:   sfr_data_out = {pll_en, 1'b0, pwm_div, clk_div};
      SFR_PLLCFG:   sfr_data_out = {1'b0, pll_cfg};
      default:      sfr_data_out = 8'h00;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sw_reset <= 1'b0; remap_cmd <= 1'b0; remap <= 1'b0; pll_sel <= 1'b0;
      pll_en <= 1'b0; clk_div <= 3'd0; pwm_div <= 3'd0; pll_cfg <= PLLCFG_RESET[6:0];
    end else begin
      sw_reset <= 1'b0; remap_cmd <= 1'b0;
      if (sfr_load) begin
        unique case ({1'b1, sfr_addr})
          SFR_SW_RESET: begin sw_reset <= sfr_data_in[0]; pll_sel <= sfr_data_in[6]; end
          SFR_REMAP:    begin remap <= sfr_data_in[0]; remap_cmd <= sfr_data_in[0]; end
          SFR_CLKCFG:   begin pll_en <= sfr_data_in[7]; pwm_div <= sfr_data_in[5:3];
                              clk_div <= sfr_data_in[2:0]; end
          SFR_PLLCFG:   pll_cfg <= sfr_data_in[6:0];
          default: ;
        endcase
      end
    end
  end
endmodule
