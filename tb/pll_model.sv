// pll_model: behavioural stand-in for the PLL macro, for simulation only.
// While pll_en is high it measures the reference period and produces
// pll_clk at f_ref * (2 + pll_cfg) / 8, the chip's PLL frequency formula.
// Low while disabled or before two reference edges have been seen.
module pll_model (
  input  logic       pll_ref,
  input  logic       pll_en,
  input  logic [6:0] pll_cfg,
  output logic       pll_clk
);
  realtime t_last, t_per;
  initial begin pll_clk = 1'b0; t_last = 0; t_per = 0; end
  always @(posedge pll_ref) begin
    if (t_last > 0) t_per = $realtime - t_last;
    t_last = $realtime;
  end
  always begin
    if (pll_en && t_per > 0) begin
      #(t_per * 8.0 / (2.0 + real'(pll_cfg)) / 2.0) pll_clk = ~pll_clk;
    end else begin
      pll_clk = 1'b0;
      @(posedge pll_ref);
    end
  end
endmodule
