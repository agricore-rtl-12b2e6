// tb_gpio_ports: writes each port latch, reads back pins (latch AND pad) and,
// for a read-modify-write, the latch; checks the reset value 0xFF.
module tb_gpio_ports;
  import agri_pkg::*;
  logic clk = 1'b0, rst = 1'b1, sfr_rmw = 1'b0, sfr_we = 1'b0, sfr_hit;
  logic [7:0] sfr_addr = SFR_P0, sfr_rdata, sfr_waddr = '0, sfr_wdata = '0;
  logic [31:0] pin_in = '1, port_out;
  int checks = 0, failures = 0;
  logic [7:0] addrs [4] = '{SFR_P0, SFR_P1, SFR_P2, SFR_P3};
  always #5 clk = ~clk;
  gpio_ports dut (.*);
  initial begin
    @(negedge clk) rst = 1'b0;
    checks++; if (port_out != 32'hFFFF_FFFF) failures++;
    for (int i = 0; i < 4; i++) begin
      sfr_we = 1'b1; sfr_waddr = addrs[i]; sfr_wdata = 8'h30 + 8'(i * 17);
      @(negedge clk);
    end
    sfr_we = 1'b0;
    pin_in = 32'hF0F0_0FFF;
    for (int i = 0; i < 4; i++) begin
      sfr_addr = addrs[i]; sfr_rmw = 1'b0; #1;
      checks += 2;
      if (!sfr_hit) failures++;
      if (sfr_rdata != ((8'h30 + 8'(i * 17)) & pin_in[8*i +: 8])) failures++;
      sfr_rmw = 1'b1; #1;
      checks++; if (sfr_rdata != 8'h30 + 8'(i * 17)) failures++;
    end
    sfr_addr = SFR_TCON; #1; checks++; if (sfr_hit) failures++;
    checks++; if (port_out != 32'h63_52_41_30) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
