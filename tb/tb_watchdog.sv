// tb_watchdog: with BASE=4 and SEL=1 the timeout comes exactly 2^5 clocks
// after enabling; kicking with 0x5A restarts the count, a wrong key does not;
// disabled, it never fires.
module tb_watchdog;
  import agri_pkg::*;
  logic clk = 1'b0, rst = 1'b1, sfr_load = 1'b0, timeout;
  logic [6:0] sfr_addr = '0;
  logic [7:0] sfr_data_in = '0, sfr_data_out;
  int checks = 0, failures = 0, n, t0;
  always #5 clk = ~clk;
  watchdog #(.BASE(4), .CW(12)) dut (.*);
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk) begin sfr_load = 1'b1; sfr_addr = a[6:0]; sfr_data_in = d; end
    @(negedge clk) sfr_load = 1'b0;
  endtask
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    @(negedge clk) rst = 1'b0;
    n = 0; repeat (200) begin @(negedge clk); if (timeout) n++; end
    chk(n == 0, "disabled: no timeout");
    wr(SFR_WDT_CTRL, 8'h11); t0 = $time / 10;
    @(posedge timeout); chk($time / 10 - t0 == 31, $sformatf("timeout after %0d", $time / 10 - t0));
    sfr_addr = SFR_WDT_CTRL[6:0]; #1; chk(sfr_data_out == 8'h11, "WDT_CTRL readback");
    // kick every 20 clocks for 200 clocks: no timeout
    @(negedge clk);
    n = 0;
    fork
      repeat (10) begin repeat (18) @(negedge clk); wr(SFR_WDT_KICK, WDT_KICK_KEY); end
      repeat (200) begin @(negedge clk); if (timeout) n++; end
    join
    chk(n == 0, "kicked: no timeout");
    n = 0;
    fork
      repeat (10) begin repeat (18) @(negedge clk); wr(SFR_WDT_KICK, 8'h00); end
      repeat (200) begin @(negedge clk); if (timeout) n++; end
    join
    chk(n >= 5, $sformatf("wrong key: %0d timeouts", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
