// clock_gen: the clock structure of the chip.
//   RC oscillator (~32 MHz) / 4 = ~8 MHz, or the crystal oscillator clock,
//   chosen by the CLKSEL pin (1 = crystal): the oscillator clock OSC.
//   OSC feeds the PLL reference and, through the glitch-free clock switch,
//   either OSC (PLL_SEL=0) or the PLL output (PLL_SEL=1) becomes the master
//   clock, divided by the CLKCFG[2:0] variable divider into CLK, the system
//   clock. OSC divided by the CLKCFG[5:3] divider gives CLKPWM, OSC/8 gives
//   CLKADC, and the 32.768 kHz oscillator gives CLK32K for the RTC.
// Structure from the chip's clock-structure figure. The figure draws the RC
// oscillator divider as 1/4 while the text speaks of a divide-by-2; 1/4 is
// used, since it turns the 32 MHz oscillator into the 8 MHz internal clock
// that the SW_RESET description names. The oscillators and the PLL are analog
// parts outside this module: their clocks come in as ports.
// The select and divider codes come from the SFR registers in the CLK
// domain; the clock switch resynchronises PLL_SEL itself. pll_in_use keeps
// the PLL powered until the switch has left it: a global reset clears PLL_EN
// and PLL_SEL together, and the switch can only move off a running clock.
module clock_gen (
  input  logic       rst_n,
  input  logic       rc_clk,      // internal RC/ring oscillator, ~32 MHz
  input  logic       xtal_clk,    // crystal oscillator pad cell output
  input  logic       clk32k_in,   // 32.768 kHz oscillator pad cell output
  input  logic       clksel,      // pin: 1 crystal, 0 RC oscillator
  input  logic       pll_clk,     // PLL output
  input  logic       pll_sel,
  input  logic [2:0] clk_div,
  input  logic [2:0] pwm_div,
  output logic       osc_clk,     // also the PLL reference
  output logic       clk,
  output logic       clkpwm,
  output logic       clkadc,
  output logic       clk32k,
  output logic       pll_in_use   // master clock still taken from the PLL
);
  logic [1:0] rc_cnt;
  logic [1:0] adc_cnt;
  logic       rc_div4, adc_q, master;

  // RC oscillator / 4
  always_ff @(posedge rc_clk or negedge rst_n) begin
    if (!rst_n) rc_cnt <= 2'd0;
    else        rc_cnt <= rc_cnt + 2'd1;
  end
  assign rc_div4 = rc_cnt[1];

  // clock mux (a static pin select)
  assign osc_clk = clksel ? xtal_clk : rc_div4;

  clock_switch u_switch (.rst_n, .select(pll_sel), .clk0(osc_clk), .clk1(pll_clk), .clk_out(master),
                          .on1(pll_in_use));

  clk_div u_div_clk (.clk_in(master),  .rst_n, .div(clk_div), .clk_out(clk));
  clk_div u_div_pwm (.clk_in(osc_clk), .rst_n, .div(pwm_div), .clk_out(clkpwm));

  // OSC / 8
  always_ff @(posedge osc_clk or negedge rst_n) begin
    if (!rst_n) begin adc_cnt <= 2'd0; adc_q <= 1'b0; end
    else begin
      adc_cnt <= adc_cnt + 2'd1;
      if (adc_cnt == 2'd3) adc_q <= ~adc_q;
    end
  end
  assign clkadc = adc_q;
  assign clk32k = clk32k_in;
endmodule
