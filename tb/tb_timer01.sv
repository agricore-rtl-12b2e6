// tb_timer01: Timer 0 mode 1 from 0xFFF0 must overflow after exactly 16*12
// clocks; Timer 1 mode 2 with reload 0xFE must give an overflow every 24
// clocks; mode 0 (13-bit) overflow; counter mode counts falling edges on T0;
// GATE holds the timer while INT0 is high; INT0 edge mode sets IE0 and the
// acknowledge clears it.
module tb_timer01;
  import agri_pkg::*;
  logic clk = 1'b0, rst = 1'b1, sfr_we = 1'b0, sfr_hit;
  logic [7:0] sfr_addr = SFR_TL0, sfr_rdata, sfr_waddr = '0, sfr_wdata = '0;
  logic t0_pin = 1'b1, t1_pin = 1'b1, int0_n = 1'b1, int1_n = 1'b1;
  logic clr_tf0 = 1'b0, clr_tf1 = 1'b0, clr_ie0 = 1'b0, clr_ie1 = 1'b0;
  logic tf0, tf1, ie0, ie1, t1_ovf;
  int checks = 0, failures = 0, n, t0;
  always #5 clk = ~clk;
  timer01 dut (.*);
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk) begin sfr_we = 1'b1; sfr_waddr = a; sfr_wdata = d; end
    @(negedge clk) sfr_we = 1'b0;
  endtask
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    @(negedge clk) rst = 1'b0;
    // Timer 0 mode 1, Timer 1 mode 2
    wr(SFR_TMOD, 8'h21); wr(SFR_TH0, 8'hFF); wr(SFR_TL0, 8'hF0);
    wr(SFR_TH1, 8'hFE); wr(SFR_TL1, 8'hFE);
    wr(SFR_TCON, 8'h50);                 // TR1, TR0
    t0 = $time / 10; n = 0;
    while (!tf0) begin @(posedge clk); if (t1_ovf) n++; end
    chk(($time / 10 - t0) >= 16 * 12 - 12 && ($time / 10 - t0) <= 16 * 12 + 1, "T0 16-tick overflow time");
    repeat (240) begin @(posedge clk); if (t1_ovf) n++; end
    chk(n >= 17 && n <= 19, $sformatf("T1 mode 2 rate (%0d overflows)", n));
    chk(tf1, "TF1 set");
    clr_tf0 = 1'b1; @(negedge clk); clr_tf0 = 1'b0; chk(!tf0, "TF0 cleared by ack");
    // mode 0 for Timer 0
    wr(SFR_TCON, 8'h00); wr(SFR_TMOD, 8'h00); wr(SFR_TH0, 8'hFF); wr(SFR_TL0, 8'h1E);
    wr(SFR_TCON, 8'h10);
    repeat (30) @(negedge clk);
    chk(tf0, "mode 0 13-bit overflow"); sfr_addr = SFR_TH0; #1;
    chk(sfr_rdata == 8'd0, "mode 0 TH0 wraps after TL0 reaches 32");
    // counter mode on T0
    wr(SFR_TCON, 8'h00); wr(SFR_TMOD, 8'h05); wr(SFR_TL0, 8'h00); wr(SFR_TH0, 8'h00);
    wr(SFR_TCON, 8'h10);
    repeat (5) begin
      @(negedge clk) t0_pin = 1'b0; repeat (3) @(negedge clk); t0_pin = 1'b1; repeat (3) @(negedge clk);
    end
    sfr_addr = SFR_TL0; #1; chk(sfr_rdata == 8'd5, $sformatf("counter mode counted %0d", sfr_rdata));
    // GATE: count only while INT0 high -> hold it low
    wr(SFR_TCON, 8'h00); wr(SFR_TMOD, 8'h09); wr(SFR_TL0, 8'h00); wr(SFR_TCON, 8'h10);
    int0_n = 1'b0; repeat (100) @(negedge clk);
    sfr_addr = SFR_TL0; #1; chk(sfr_rdata == 8'd0, "GATE holds timer");
    int0_n = 1'b1; repeat (100) @(negedge clk); #1; chk(sfr_rdata >= 8'd7, "GATE released");
    // INT0 edge-triggered
    wr(SFR_TCON, 8'h01);
    chk(!ie0, "IE0 clear");
    int0_n = 1'b0; repeat (2) @(negedge clk); chk(ie0, "IE0 set on falling edge");
    int0_n = 1'b1; clr_ie0 = 1'b1; @(negedge clk); clr_ie0 = 1'b0; chk(!ie0, "IE0 cleared by ack");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
