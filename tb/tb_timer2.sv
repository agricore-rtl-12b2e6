// tb_timer2: auto-reload from RCAP2 with TF2 (period 12 clocks per count),
// capture on a T2EX falling edge with EXF2, and baud-generator mode, where
// t2_ovf pulses every 2*(65536-RCAP2) clocks and TF2 stays clear.
module tb_timer2;
  import agri_pkg::*;
  logic clk = 1'b0, rst = 1'b1, sfr_we = 1'b0, sfr_hit;
  logic [7:0] sfr_addr = SFR_TL2, sfr_rdata, sfr_waddr = '0, sfr_wdata = '0;
  logic t2_pin = 1'b1, t2ex_pin = 1'b1, irq_flag, rclk, tclk, t2_ovf;
  int checks = 0, failures = 0, n;
  always #5 clk = ~clk;
  timer2 dut (.*);
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk) begin sfr_we = 1'b1; sfr_waddr = a; sfr_wdata = d; end
    @(negedge clk) sfr_we = 1'b0;
  endtask
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    @(negedge clk) rst = 1'b0;
    wr(SFR_RCAP2H, 8'hFF); wr(SFR_RCAP2L, 8'hF0); wr(SFR_TH2, 8'hFF); wr(SFR_TL2, 8'hFE);
    wr(SFR_T2CON, 8'h04);                          // TR2, auto-reload
    repeat (30) @(negedge clk);
    chk(irq_flag, "TF2 on overflow");
    sfr_addr = SFR_TL2; #1; chk(sfr_rdata == 8'hF0 || sfr_rdata == 8'hF1, $sformatf("reloaded TL2=%h", sfr_rdata));
    // capture
    wr(SFR_T2CON, 8'h0D);                          // EXEN2, TR2, CP/RL2
    repeat (40) @(negedge clk);
    t2ex_pin = 1'b0; @(negedge clk); @(negedge clk); t2ex_pin = 1'b1;
    sfr_addr = SFR_RCAP2L; #1;
    chk(sfr_rdata != 8'hF0, "RCAP2 captured");
    sfr_addr = SFR_T2CON; #1; chk(sfr_rdata[6], "EXF2 set");
    // baud generator
    wr(SFR_RCAP2H, 8'hFF); wr(SFR_RCAP2L, 8'hFD); wr(SFR_T2CON, 8'h00);
    wr(SFR_TH2, 8'hFF); wr(SFR_TL2, 8'hFD); wr(SFR_T2CON, 8'h34);
    n = 0;
    repeat (600) begin @(posedge clk); if (t2_ovf) n++; end
    chk(n >= 99 && n <= 101, $sformatf("baud overflows %0d in 600 clocks", n));
    chk(!sfr_rdata[7], "no TF2 in baud mode");
    chk(rclk && tclk, "RCLK/TCLK out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
