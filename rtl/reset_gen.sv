// reset_gen: the reset generator. It turns the external reset pin, a
// software reset (SW_RESET[0]) and a watchdog timeout into the global reset
// sys_rst, and a REMAP=1 write into cpu_rst, the restart of the CPU subsystem
// alone (so that it runs again from address 0 with the new memory map).
// rst_n is synchronised to clk (asserted at once, released after two clocks).
// Each request is stretched to HOLD clocks. sys_rst also drives cpu_rst.
// The sources follow the chip's block diagram and description; the watchdog
// source, the stretching and the synchroniser are this design's choices.
module reset_gen #(
  parameter int unsigned HOLD = 4
) (
  input  logic clk,
  input  logic rst_n,        // external reset, asynchronous, active low
  input  logic sw_reset,     // one-clock pulse
  input  logic wdt_timeout,  // one-clock pulse
  input  logic remap_cmd,    // one-clock pulse
  output logic sys_rst,
  output logic cpu_rst
);
  logic [1:0] sync;
  logic [$clog2(HOLD+1)-1:0] sys_cnt, cpu_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b00;
    else        sync <= {sync[0], 1'b1};
  end

  always_ff @(posedge clk) begin
    if (!sync[1] || sw_reset || wdt_timeout) sys_cnt <= HOLD[$bits(sys_cnt)-1:0];
    else if (sys_cnt != 0)                   sys_cnt <= sys_cnt - 1'b1;
    if (remap_cmd)          cpu_cnt <= HOLD[$bits(cpu_cnt)-1:0];
    else if (cpu_cnt != 0)  cpu_cnt <= cpu_cnt - 1'b1;
  end

  assign sys_rst = !sync[1] || (sys_cnt != 0);
  assign cpu_rst = sys_rst || (cpu_cnt != 0);
endmodule
