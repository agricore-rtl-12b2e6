// tb_intc51: nothing is requested while EA=0; with IE set the lowest-index
// pending source wins; a high-priority source (IP) preempts a low-priority
// routine; nothing preempts a high one; RETI releases the levels in order;
// acknowledge of Timer 0 produces its flag clear.
module tb_intc51;
  import agri_pkg::*;
  logic clk = 1'b0, rst = 1'b1, sfr_we = 1'b0, sfr_hit;
  logic [7:0] sfr_addr = SFR_IE, sfr_rdata, sfr_waddr = '0, sfr_wdata = '0;
  logic [5:0] src = '0;
  logic irq, ack = 1'b0, ret = 1'b0;
  logic [2:0] irq_vec;
  logic [3:0] clr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  intc51 dut (.*);
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk) begin sfr_we = 1'b1; sfr_waddr = a; sfr_wdata = d; end
    @(negedge clk) sfr_we = 1'b0;
  endtask
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic pulse_ack; ack = 1'b1; @(negedge clk); ack = 1'b0; endtask
  task automatic pulse_ret; ret = 1'b1; @(negedge clk); ret = 1'b0; endtask
  initial begin
    @(negedge clk) rst = 1'b0;
    src = 6'b001010; wr(SFR_IE, 8'h3F); #1;
    chk(!irq, "EA=0 masks");
    wr(SFR_IE, 8'hBF); #1;
    chk(irq && irq_vec == 3'd1, "Timer 0 before Timer 1");
    ack = 1'b1; #1; chk(clr == 4'b0001, "TF0 cleared on ack"); @(negedge clk); ack = 1'b0;
    src = 6'b001000; #1;
    chk(!irq, "low routine not preempted by low source");
    wr(SFR_IP, 8'h08); #1;
    chk(irq && irq_vec == 3'd3, "high priority Timer 1 preempts");
    pulse_ack; src = 6'b000001; wr(SFR_IP, 8'h09); #1;
    chk(!irq, "high routine not preempted");
    pulse_ret; #1;
    chk(irq && irq_vec == 3'd0, "after RETI of high level, high INT0 taken");
    pulse_ack; pulse_ret; pulse_ret; src = 6'b010000; #1;
    chk(irq && irq_vec == 3'd4, "serial after all RETIs");
    sfr_addr = SFR_IP; #1; chk(sfr_hit && sfr_rdata == 8'h09, "IP readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (500) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
