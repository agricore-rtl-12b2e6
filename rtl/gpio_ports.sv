// gpio_ports: the four 8-bit ports P0-P3 (32 GPIO) of the 8051 core.
// Each port has an output latch (reset to 0xFF) at the standard SFR address.
// The pin is modelled as quasi-bidirectional: it reads low when either the
// latch or the outside drives it low, so pin_in is the level seen on the pad
// and port_out the latch. A normal read returns the pin; a read-modify-write
// instruction (rmw) returns the latch, as on the 8051. Writes land at the
// clock edge ending the cycle in which sfr_we is high.
module gpio_ports
  import agri_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  sfr_addr,
  input  logic        sfr_rmw,
  output logic [7:0]  sfr_rdata,
  output logic        sfr_hit,
  input  logic        sfr_we,
  input  logic [7:0]  sfr_waddr,
  input  logic [7:0]  sfr_wdata,
  input  logic [31:0] pin_in,      // {P3,P2,P1,P0} pad levels
  output logic [31:0] port_out     // {P3,P2,P1,P0} latches
);
  logic [7:0] latch [4];
  logic [1:0] rsel;

  always_comb begin
    sfr_hit = 1'b1; rsel = 2'd0;
    unique case (sfr_addr)
      SFR_P0: rsel = 2'd0;
      SFR_P1: rsel = 2'd1;
      SFR_P2: rsel = 2'd2;
      SFR_P3: rsel = 2'd3;
      default: sfr_hit = 1'b0;
    endcase
    sfr_rdata = sfr_rmw ? latch[rsel] : (pin_in[8*rsel +: 8] & latch[rsel]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) latch[i] <= 8'hFF;
    end else if (sfr_we) begin
      unique case (sfr_waddr)
        SFR_P0: latch[0] <= sfr_wdata;
        SFR_P1: latch[1] <= sfr_wdata;
        SFR_P2: latch[2] <= sfr_wdata;
        SFR_P3: latch[3] <= sfr_wdata;
        default: ;
      endcase
    end
  end

  assign port_out = {latch[3], latch[2], latch[1], latch[0]};
endmodule
