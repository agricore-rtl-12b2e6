// pwm4: the four configurable PWM outputs. The chip gives only "4
// configurable PWM output" and a PWM clock from the CLKCFG[5:3] divider; the
// register set is this design's own:
//   PWM_CTRL (0xA2) [3:0] channel enables
//   PWM_PER  (0xA3) period: the counter runs 0..PER, so a cycle is PER+1 clocks
//   PWM_D0..D3 (0xA4..0xA7) duty: output i is high while count < Di
// The registers sit in the system clock domain; the counter and the outputs
// run on clkpwm and read the registers as static settings (a change may give
// one irregular PWM cycle). A disabled channel is low.
module pwm4
  import agri_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       clkpwm,
  input  logic [6:0] sfr_addr,
  input  logic       sfr_load,
  input  logic [7:0] sfr_data_in,
  output logic [7:0] sfr_data_out,
  output logic [3:0] pwm_out
);
  logic [3:0] en;
  logic [7:0] per;
  logic [7:0] duty [4];
  logic [7:0] cnt;
  logic [7:0] a;

  assign a = {1'b1, sfr_addr};

  always_comb begin
    unique case (a)
      SFR_PWM_CTRL:         sfr_data_out = {4'h0, en};
      SFR_PWM_PER:          sfr_data_out = per;
      SFR_PWM_D0:           sfr_data_out = duty[0];
      SFR_PWM_D0 + 8'd1:    sfr_data_out = duty[1];
      SFR_PWM_D0 + 8'd2:    sfr_data_out = duty[2];
      SFR_PWM_D0 + 8'd3:    sfr_data_out = duty[3];
      default:              sfr_data_out = 8'h00;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      en <= 4'h0; per <= 8'hFF;
      for (int i = 0; i < 4; i++) duty[i] <= 8'h00;
    end else if (sfr_load) begin
      if (a == SFR_PWM_CTRL) en <= sfr_data_in[3:0];
      if (a == SFR_PWM_PER)  per <= sfr_data_in;
      for (int i = 0; i < 4; i++) if (a == SFR_PWM_D0 + 8'(i)) duty[i] <= sfr_data_in;
    end
  end

  always_ff @(posedge clkpwm or posedge rst) begin
    if (rst) begin
      cnt <= 8'h00; pwm_out <= 4'h0;
    end else begin
      cnt <= (cnt >= per) ? 8'h00 : cnt + 8'd1;
      for (int i = 0; i < 4; i++) pwm_out[i] <= en[i] && (cnt < duty[i]);
    end
  end
endmodule
