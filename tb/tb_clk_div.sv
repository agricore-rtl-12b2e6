// tb_clk_div: for each code 0..7 counts output rising edges over 840 input
// clocks: code 0 passes the clock, code n divides by 2n (840/2n edges).
module tb_clk_div;
  logic clk_in = 1'b0, rst_n = 1'b0, clk_out;
  logic [2:0] div = '0;
  int checks = 0, failures = 0, n;
  always #5 clk_in = ~clk_in;
  clk_div dut (.*);
  always @(posedge clk_out) n++;
  initial begin
    #12 rst_n = 1'b1;
    for (int c = 0; c < 8; c++) begin
      div = 3'(c);
      repeat (30) @(posedge clk_in);
      n = 0;
      repeat (840) @(posedge clk_in);
      #1;
      checks++;
      if (n < ((c == 0) ? 840 : 840 / (2 * c)) - 1 || n > ((c == 0) ? 840 : 840 / (2 * c)) + 1) begin
        failures++; $display("FAIL code %0d: %0d edges", c, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
