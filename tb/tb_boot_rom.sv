// tb_boot_rom: checks the ROM contents against a few bytes of the serial
// loader (its first instruction MOV SCON,#50h, the REMAP write and the final
// RET), an unprogrammed location, and the one-clock read latency.
module tb_boot_rom;
  logic clk = 1'b0;
  logic [12:0] addr = '0;
  logic [7:0] rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  boot_rom dut (.*);
  task automatic chk(input logic [12:0] a, input logic [7:0] e);
    @(negedge clk) addr = a;
    @(negedge clk);
    checks++;
    if (rdata != e) begin failures++; $display("FAIL rom[%h]=%h expected %h", a, rdata, e); end
  endtask
  initial begin
    chk(13'h000, 8'h75); chk(13'h001, 8'h98); chk(13'h002, 8'h50);
    chk(13'h032, 8'h75); chk(13'h033, 8'hEA); chk(13'h034, 8'h01);
    chk(13'h047, 8'h22); chk(13'h1FFF, 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
