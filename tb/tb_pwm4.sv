// tb_pwm4: PWM clock = system clock / 3 (unrelated phase). Period register 9
// (10 PWM clocks per cycle), duties 0, 3, 7 and 10: over 100 PWM clocks each
// output must be high duty*10 clocks; a disabled channel stays low.
module tb_pwm4;
  import agri_pkg::*;
  logic clk = 1'b0, clkpwm = 1'b0, rst = 1'b1, sfr_load = 1'b0;
  logic [6:0] sfr_addr = '0;
  logic [7:0] sfr_data_in = '0, sfr_data_out;
  logic [3:0] pwm_out;
  int checks = 0, failures = 0;
  int hi [4];
  int exp [4] = '{0, 30, 70, 100};
  always #5 clk = ~clk;
  always #15 clkpwm = ~clkpwm;
  pwm4 dut (.*);
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk) begin sfr_load = 1'b1; sfr_addr = a[6:0]; sfr_data_in = d; end
    @(negedge clk) sfr_load = 1'b0;
  endtask
  initial begin
    @(negedge clk) rst = 1'b0;
    wr(SFR_PWM_PER, 8'd9);
    wr(SFR_PWM_D0, 8'd0); wr(SFR_PWM_D0 + 8'd1, 8'd3); wr(SFR_PWM_D0 + 8'd2, 8'd7);
    wr(SFR_PWM_D0 + 8'd3, 8'd10);
    wr(SFR_PWM_CTRL, 8'h0F);
    repeat (25) @(posedge clkpwm);
    for (int i = 0; i < 4; i++) hi[i] = 0;
    repeat (100) begin @(negedge clkpwm); for (int i = 0; i < 4; i++) if (pwm_out[i]) hi[i]++; end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (hi[i] != exp[i]) begin failures++; $display("FAIL ch%0d high %0d", i, hi[i]); end
    end
    wr(SFR_PWM_CTRL, 8'h0B);
    repeat (5) @(posedge clkpwm);
    hi[2] = 0; repeat (50) begin @(negedge clkpwm); if (pwm_out[2]) hi[2]++; end
    checks++; if (hi[2] != 0) failures++;
    sfr_addr = SFR_PWM_PER[6:0]; #1; checks++; if (sfr_data_out != 8'd9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
