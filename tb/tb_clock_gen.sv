// tb_clock_gen: RC clock period 4 (~"32 MHz"), crystal period 10, PLL period
// 6. Counts edges over a fixed window: CLKSEL=0 gives RC/4 on osc_clk and CLK,
// CLKSEL=1 the crystal; CLKADC is osc/8; CLKPWM follows its divider;
// PLL_SEL=1 switches CLK to the PLL; the master divider divides CLK.
module tb_clock_gen;
  logic rst_n = 1'b0, rc_clk = 1'b0, xtal_clk = 1'b0, clk32k_in = 1'b0, clksel = 1'b0;
  logic pll_clk = 1'b0, pll_sel = 1'b0;
  logic [2:0] clk_div = '0, pwm_div = '0;
  logic osc_clk, clk, clkpwm, clkadc, clk32k, pll_in_use;
  int checks = 0, failures = 0, nclk, nosc, nadc, npwm;
  always #2 rc_clk = ~rc_clk;
  always #5 xtal_clk = ~xtal_clk;
  always #3 pll_clk = ~pll_clk;
  always #50 clk32k_in = ~clk32k_in;
  clock_gen dut (.*);
  always @(posedge clk) nclk++;
  always @(posedge osc_clk) nosc++;
  always @(posedge clkadc) nadc++;
  always @(posedge clkpwm) npwm++;
  task automatic window(input int expc, input int expo, input int expp, input string what);
    #500; nclk = 0; nosc = 0; nadc = 0; npwm = 0; #4800;
    checks += 4;
    if (nclk < expc - 1 || nclk > expc + 1) begin failures++; $display("FAIL %s clk %0d", what, nclk); end
    if (nosc < expo - 1 || nosc > expo + 1) begin failures++; $display("FAIL %s osc %0d", what, nosc); end
    if (nadc < expo / 8 - 1 || nadc > expo / 8 + 1) begin failures++; $display("FAIL %s adc %0d", what, nadc); end
    if (npwm < expp - 1 || npwm > expp + 1) begin failures++; $display("FAIL %s pwm %0d", what, npwm); end
  endtask
  initial begin
    #9 rst_n = 1'b1;
    window(300, 300, 300, "RC");                      // RC period 4 *4 = 16
    clksel = 1'b1; window(480, 480, 480, "XTAL");
    pwm_div = 3'd2; window(480, 480, 120, "PWM/4");
    pll_sel = 1'b1; window(800, 480, 120, "PLL");
    checks++; if (!pll_in_use) failures++;
    clk_div = 3'd1; window(400, 480, 120, "PLL/2");
    checks++; if (clk32k !== clk32k_in) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
