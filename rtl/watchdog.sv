// watchdog: a watchdog timer on the extension SFR bus. The chip lists a
// watchdog without describing it; this one is this design's own:
//   WDT_CTRL (0xA9) [0] EN, [6:4] SEL: timeout after 2^(BASE+SEL) clocks
//   WDT_KICK (0xAA) writing 0x5A restarts the count (reads 0)
// While enabled a counter runs on the system clock; reaching the limit gives
// a one-clock timeout pulse, which the reset generator turns into a global
// reset (that also disables the watchdog again). Writing WDT_CTRL also
// restarts the count.
module watchdog
  import agri_pkg::*;
#(
  parameter int unsigned BASE = 12,     // shortest timeout 2^12 clocks
  parameter int unsigned CW   = 20      // counter width, >= BASE+7
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [6:0] sfr_addr,
  input  logic       sfr_load,
  input  logic [7:0] sfr_data_in,
  output logic [7:0] sfr_data_out,
  output logic       timeout
);
  logic [7:0]    ctrl;
  logic [CW-1:0] cnt, limit;

  assign limit = (CW'(1) << (BASE + 32'(ctrl[6:4]))) - CW'(1);
  assign sfr_data_out = ({1'b1, sfr_addr} == SFR_WDT_CTRL) ? ctrl : 8'h00;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl <= 8'h00; cnt <= '0; timeout <= 1'b0;
    end else begin
      timeout <= 1'b0;
      if (ctrl[0]) begin
        if (cnt == limit) begin cnt <= '0; timeout <= 1'b1; end
        else cnt <= cnt + CW'(1);
      end
      if (sfr_load && {1'b1, sfr_addr} == SFR_WDT_CTRL) begin
        ctrl <= {1'b0, sfr_data_in[6:4], 3'b000, sfr_data_in[0]}; cnt <= '0;
      end
      if (sfr_load && {1'b1, sfr_addr} == SFR_WDT_KICK && sfr_data_in == WDT_KICK_KEY) cnt <= '0;
    end
  end
endmodule
