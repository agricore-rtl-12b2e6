// tb_rtc: with PRESCALE=4 and the time set to 23:59:58, six 32 kHz periods
// later the clock reads 00:00:00 after passing 23:59:59 (one sec_tick per
// PRESCALE edges); stopped, it holds.
module tb_rtc;
  import agri_pkg::*;
  logic clk = 1'b0, clk32k = 1'b0, rst = 1'b1, sfr_load = 1'b0, sec_tick;
  logic [6:0] sfr_addr = '0;
  logic [7:0] sfr_data_in = '0, sfr_data_out;
  int checks = 0, failures = 0, nt = 0;
  always #5 clk = ~clk;
  always #37 clk32k = ~clk32k;
  always @(posedge clk) if (sec_tick) nt++;
  rtc #(.PRESCALE(4)) dut (.*);
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk) begin sfr_load = 1'b1; sfr_addr = a[6:0]; sfr_data_in = d; end
    @(negedge clk) sfr_load = 1'b0;
  endtask
  task automatic chk_rd(input logic [7:0] a, input logic [7:0] e, input string what);
    sfr_addr = a[6:0]; #1;
    checks++;
    if (sfr_data_out != e) begin failures++; $display("FAIL %s: %0d", what, sfr_data_out); end
  endtask
  initial begin
    @(negedge clk) rst = 1'b0;
    wr(SFR_RTC_HOUR, 8'd23); wr(SFR_RTC_MIN, 8'd59); wr(SFR_RTC_SEC, 8'd58);
    wr(SFR_RTC_CTRL, 8'h01);
    repeat (4) @(posedge clk32k); repeat (4) @(posedge clk);
    chk_rd(SFR_RTC_SEC, 8'd59, "second 59");
    repeat (4) @(posedge clk32k); repeat (4) @(posedge clk);
    chk_rd(SFR_RTC_SEC, 8'd0, "second wraps");
    chk_rd(SFR_RTC_MIN, 8'd0, "minute wraps");
    chk_rd(SFR_RTC_HOUR, 8'd0, "hour wraps");
    checks++; if (nt != 2) begin failures++; $display("FAIL %0d ticks", nt); end
    wr(SFR_RTC_CTRL, 8'h00);
    repeat (12) @(posedge clk32k);
    chk_rd(SFR_RTC_SEC, 8'd0, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
