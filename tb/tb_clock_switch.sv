// tb_clock_switch: clk0 period 10, clk1 period 26 (unrelated). Checks the
// output follows the selected clock, and that around each change of select
// no output high or low phase is shorter than the shorter source half
// period (no glitch).
module tb_clock_switch;
  logic rst_n = 1'b0, select = 1'b0, clk0 = 1'b0, clk1 = 1'b0, clk_out, on1;
  int checks = 0, failures = 0, n0, n1, nout;
  realtime last;
  logic watch = 1'b0;   // armed once reset has reached every flip-flop
  always #5 clk0 = ~clk0;
  always #13 clk1 = ~clk1;
  clock_switch dut (.*);
  always @(clk_out) begin
    if ($realtime - last < 4.99 && watch) begin
      failures++; $display("FAIL glitch: phase of %0t", $realtime - last);
    end
    last = $realtime;
  end
  task automatic rate(output int c);
    c = 0; repeat (20) begin #26; end
  endtask
  initial begin
    last = 0;
    #7 rst_n = 1'b1;
    #60 watch = 1'b1;
    for (int k = 0; k < 6; k++) begin
      #300;
      nout = 0;
      fork begin repeat (520) begin @(posedge clk_out); nout++; end end join_none
      #2600;
      disable fork;
      checks += 2;
      if (on1 != select) begin failures++; $display("FAIL on1"); end
      // in 2600 time units clk0 gives 260 rising edges and clk1 100
      if (select ? (nout < 99 || nout > 101) : (nout < 259 || nout > 261)) begin
        failures++; $display("FAIL select=%0d gives %0d edges", select, nout);
      end
      select = ~select; #($urandom_range(1, 30));
    end
    checks++;   // the glitch monitor has been watching all switches
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
