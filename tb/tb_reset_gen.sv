// tb_reset_gen: the pin reset is released two clocks after rst_n rises and
// held HOLD clocks; software reset and watchdog timeout give HOLD clocks of
// sys_rst (and cpu_rst); a REMAP command gives HOLD clocks of cpu_rst only.
module tb_reset_gen;
  logic clk = 1'b0, rst_n = 1'b0, sw_reset = 1'b0, wdt_timeout = 1'b0, remap_cmd = 1'b0;
  logic sys_rst, cpu_rst;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  reset_gen #(.HOLD(4)) dut (.*);
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic count(output int ns, output int nc);
    ns = 0; nc = 0;
    repeat (20) begin if (sys_rst) ns++; if (cpu_rst) nc++; @(negedge clk); end
  endtask
  initial begin
    int ns, nc;
    repeat (3) @(negedge clk);
    chk(sys_rst && cpu_rst, "reset while pin low");
    rst_n = 1'b1; count(ns, nc);
    chk(ns == 6 && nc == 6, $sformatf("pin release after %0d", ns));
    sw_reset = 1'b1; @(negedge clk); sw_reset = 1'b0; count(ns, nc);
    chk(ns == 4 && nc == 4, $sformatf("sw reset %0d/%0d", ns, nc));
    wdt_timeout = 1'b1; @(negedge clk); wdt_timeout = 1'b0; count(ns, nc);
    chk(ns == 4 && nc == 4, $sformatf("watchdog reset %0d/%0d", ns, nc));
    remap_cmd = 1'b1; @(negedge clk); remap_cmd = 1'b0; count(ns, nc);
    chk(ns == 0 && nc == 4, $sformatf("remap restart %0d/%0d", ns, nc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (500) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
