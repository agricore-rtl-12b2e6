// tb_uart51: serial port with a Timer 1 overflow every 6 clocks and SMOD=1,
// so one bit is 96 clocks. Mode 1: the bench decodes the txd frame itself
// (start bit, 8 data bits LSB first, stop bit, bit width), checks TI, then
// loops txd back to rxd and checks SBUF/RI. Mode 3: 9th bit carried in TB8/RB8,
// and with SM2=1 a frame whose 9th bit is 0 is not received.
module tb_uart51;
  import agri_pkg::*;
  logic clk = 1'b0, rst = 1'b1, sfr_we = 1'b0, sfr_hit;
  logic [7:0] sfr_addr = SFR_SBUF, sfr_rdata, sfr_waddr = '0, sfr_wdata = '0;
  logic t1_ovf = 1'b0, t2_ovf = 1'b0, rclk = 1'b0, tclk = 1'b0, rxd, txd, ri, ti;
  int checks = 0, failures = 0, cnt = 0;
  logic [9:0] frame;
  always #5 clk = ~clk;
  always @(posedge clk) begin cnt <= (cnt == 5) ? 0 : cnt + 1; t1_ovf <= (cnt == 5); end
  assign rxd = txd;
  uart51 dut (.*);
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk) begin sfr_we = 1'b1; sfr_waddr = a; sfr_wdata = d; end
    @(negedge clk) sfr_we = 1'b0;
  endtask
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic grab(output logic [9:0] f, output int width);
    int t0, t1;
    @(negedge txd); t0 = $time / 10;
    repeat (48) @(posedge clk);
    for (int i = 0; i < 10; i++) begin f[i] = txd; repeat (96) @(posedge clk); end
    t1 = $time / 10;
    width = (t1 - t0 - 48) / 10;
  endtask
  initial begin
    int w;
    @(negedge clk) rst = 1'b0;
    wr(SFR_PCON, 8'h80); wr(SFR_SCON, 8'h50);         // mode 1, REN
    wr(SFR_SBUF, 8'hA7);
    grab(frame, w);
    chk(frame[0] == 1'b0, "start bit");
    chk(frame[8:1] == 8'hA7, $sformatf("data bits %h", frame[8:1]));
    chk(frame[9] == 1'b1, "stop bit");
    chk(w == 96, $sformatf("bit width %0d", w));
    chk(ti, "TI set");
    repeat (200) @(negedge clk);
    sfr_addr = SFR_SCON; #1; chk(sfr_rdata[0], "RI set");
    sfr_addr = SFR_SBUF; #1; chk(sfr_rdata == 8'hA7, $sformatf("received %h", sfr_rdata));
    // mode 3, 9th bit
    wr(SFR_SCON, 8'hD8);                               // mode 3, REN, TB8=1
    wr(SFR_SBUF, 8'h3C);
    repeat (1300) @(negedge clk);
    sfr_addr = SFR_SCON; #1; chk(sfr_rdata[0] && sfr_rdata[2], "mode 3 RI and RB8");
    sfr_addr = SFR_SBUF; #1; chk(sfr_rdata == 8'h3C, $sformatf("mode 3 received %h", sfr_rdata));
    wr(SFR_SCON, 8'hF0);                               // mode 3, SM2, REN, TB8=0
    wr(SFR_SBUF, 8'h11);
    repeat (1300) @(negedge clk);
    sfr_addr = SFR_SCON; #1; chk(!sfr_rdata[0], "SM2 drops 9th-bit-0 frame");
    chk(sfr_rdata[1], "mode 3 TI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
