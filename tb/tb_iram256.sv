// tb_iram256: writes a pattern to all 256 bytes of the register file, then
// reads it back on both asynchronous ports and checks reset clears it.
module tb_iram256;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0;
  logic [7:0] ra_addr, rb_addr, waddr, wdata, ra_data, rb_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  iram256 dut (.*);
  initial begin
    ra_addr = 0; rb_addr = 0; waddr = 0; wdata = 0;
    @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 256; i++) begin
      we = 1'b1; waddr = 8'(i); wdata = 8'(i * 7 + 3); @(posedge clk); #1;
    end
    we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      ra_addr = 8'(i); rb_addr = 8'(255 - i); #1;
      checks += 2;
      if (ra_data != 8'(i * 7 + 3)) failures++;
      if (rb_data != 8'((255 - i) * 7 + 3)) failures++;
    end
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    ra_addr = 8'h55; #1; checks++; if (ra_data != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
