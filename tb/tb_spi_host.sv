// tb_spi_host: a mode-0 SPI slave model in the bench returns one byte while
// receiving another. Checks the byte sent on MOSI, the byte received, CS,
// busy, the 16*2^SEL clock transfer time and the SCLK edge count.
module tb_spi_host;
  import agri_pkg::*;
  logic clk = 1'b0, rst = 1'b1, sfr_load = 1'b0;
  logic [6:0] sfr_addr = '0;
  logic [7:0] sfr_data_in = '0, sfr_data_out;
  logic spi_sclk, spi_mosi, spi_miso, spi_cs_n;
  logic [7:0] slave_tx, slave_rx;
  int checks = 0, failures = 0, nedge = 0, t0;
  always #5 clk = ~clk;
  spi_host dut (.*);
  // slave: MISO set up while SCLK low, MOSI sampled on rising edge
  assign spi_miso = slave_tx[7];
  always @(posedge spi_sclk) begin slave_rx = {slave_rx[6:0], spi_mosi}; nedge++; end
  always @(negedge spi_sclk) slave_tx = {slave_tx[6:0], 1'b0};
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk) begin sfr_load = 1'b1; sfr_addr = a[6:0]; sfr_data_in = d; end
    @(negedge clk) sfr_load = 1'b0;
  endtask
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    @(negedge clk) rst = 1'b0;
    chk(spi_cs_n, "CS idle high");
    wr(SFR_SPI_CTRL, 8'h05);                 // CS on, SEL=2: half period 4 clocks
    chk(!spi_cs_n, "CS asserted");
    for (int k = 0; k < 3; k++) begin
      logic [7:0] tx;
      tx = 8'hA5 ^ 8'(k * 37); slave_tx = 8'h3C + 8'(k); nedge = 0;
      wr(SFR_SPI_DATA, tx); t0 = $time / 10;
      sfr_addr = SFR_SPI_STAT[6:0]; #1; chk(sfr_data_out[0], "busy");
      wait (sfr_data_out[0] == 1'b0);
      chk(($time / 10 - t0) >= 63 && ($time / 10 - t0) <= 65, $sformatf("transfer %0d clocks", $time / 10 - t0));
      chk(nedge == 8, "8 SCLK pulses");
      chk(slave_rx == tx, $sformatf("MOSI byte %h", slave_rx));
      sfr_addr = SFR_SPI_DATA[6:0]; #1; chk(sfr_data_out == 8'h3C + 8'(k), $sformatf("MISO byte %h", sfr_data_out));
    end
    wr(SFR_SPI_CTRL, 8'h00); chk(spi_cs_n, "CS released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
