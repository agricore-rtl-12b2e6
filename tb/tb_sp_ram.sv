// tb_sp_ram: fills the 64 KB RAM at its full size with an address-derived
// pattern and reads every byte back, checking the one-clock read latency.
module tb_sp_ram;
  logic clk = 1'b0, we = 1'b0;
  logic [15:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sp_ram dut (.*);
  function automatic logic [7:0] pat(int a); return 8'(a ^ (a >> 8) ^ 8'h3C); endfunction
  initial begin
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk); we = 1'b1; addr = 16'(i); wdata = pat(i);
    end
    @(negedge clk); we = 1'b0; addr = 16'd0;
    for (int i = 1; i <= 65536; i++) begin
      @(negedge clk);
      checks++;
      if (rdata != pat(i - 1)) failures++;
      addr = 16'(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
