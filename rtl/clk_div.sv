// clk_div: the variable clock divider used for the master clock and the PWM
// clock. The 3-bit code follows the chip's CLKCFG table: 0 passes the clock
// through, code n (1..7) divides by 2n (2, 4, ... 14), giving a 50% duty
// output that toggles every n input clocks. A change of code takes effect
// at the next toggle; switching to or from 0 changes the clock at once and
// can shorten one pulse (the description gives no rule for this).
module clk_div (
  input  logic       clk_in,
  input  logic       rst_n,
  input  logic [2:0] div,
  output logic       clk_out
);
  logic [2:0] cnt;
  logic       q;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 3'd0; q <= 1'b0;
    end else if (div != 3'd0) begin
      if (cnt >= div - 3'd1) begin cnt <= 3'd0; q <= ~q; end
      else cnt <= cnt + 3'd1;
    end
  end

  assign clk_out = (div == 3'd0) ? clk_in : q;
endmodule
