// tb_sysctl_regs: reset values (PLLCFG=0x17, others 0), field layout of
// SW_RESET/REMAP/CLKCFG/PLLCFG, the read-only CLKSEL bit, the one-clock
// sw_reset and remap_cmd pulses, and that REMAP=0 gives no remap_cmd.
module tb_sysctl_regs;
  import agri_pkg::*;
  logic clk = 1'b0, rst = 1'b1, sfr_load = 1'b0, clksel_pin = 1'b1;
  logic [6:0] sfr_addr = '0;
  logic [7:0] sfr_data_in = '0, sfr_data_out;
  logic sw_reset, remap_cmd, remap, pll_sel, pll_en;
  logic [2:0] clk_div, pwm_div;
  logic [6:0] pll_cfg;
  int checks = 0, failures = 0, nsw = 0, nrm = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin if (sw_reset) nsw++; if (remap_cmd) nrm++; end
  sysctl_regs dut (.*);
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk) begin sfr_load = 1'b1; sfr_addr = a[6:0]; sfr_data_in = d; end
    @(negedge clk) sfr_load = 1'b0;
  endtask
  task automatic chk_rd(input logic [7:0] a, input logic [7:0] e, input string what);
    sfr_addr = a[6:0]; #1;
    checks++;
    if (sfr_data_out != e) begin failures++; $display("FAIL %s: %h", what, sfr_data_out); end
  endtask
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst = 1'b0;
    chk_rd(SFR_PLLCFG, 8'h17, "PLLCFG reset 0x17");
    chk_rd(SFR_CLKCFG, 8'h00, "CLKCFG reset 0");
    chk_rd(SFR_REMAP, 8'h00, "REMAP reset 0");
    chk_rd(SFR_SW_RESET, 8'h80, "SW_RESET[7] shows CLKSEL=1");
    clksel_pin = 1'b0; chk_rd(SFR_SW_RESET, 8'h00, "SW_RESET[7] shows CLKSEL=0");
    wr(SFR_CLKCFG, 8'b1_0_011_101);
    chk(pll_en && pwm_div == 3'd3 && clk_div == 3'd5, "CLKCFG fields");
    chk_rd(SFR_CLKCFG, 8'b1001_1101, "CLKCFG readback");
    wr(SFR_PLLCFG, 8'hFF); chk(pll_cfg == 7'h7F, "PLLCFG 7 bits");
    chk_rd(SFR_PLLCFG, 8'h7F, "PLLCFG readback");
    wr(SFR_SW_RESET, 8'h40); chk(pll_sel && nsw == 0, "PLL_SEL without reset");
    wr(SFR_SW_RESET, 8'h41); @(negedge clk); chk(nsw == 1, "one sw_reset pulse");
    wr(SFR_REMAP, 8'h00); @(negedge clk); chk(nrm == 0 && !remap, "REMAP=0 no restart");
    wr(SFR_REMAP, 8'h01); @(negedge clk); chk(nrm == 1 && remap, "REMAP=1 restart pulse");
    chk_rd(SFR_REMAP, 8'h01, "REMAP readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (500) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
