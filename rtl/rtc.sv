// rtc: the real-time clock. The chip lists an RTC fed by the 32.768 kHz
// oscillator; the registers are this design's own:
//   RTC_CTRL (0xB4) [0] run
//   RTC_SEC, RTC_MIN, RTC_HOUR (0xB5..0xB7) binary seconds 0-59, minutes
//   0-59, hours 0-23; writable to set the time
// clk32k is brought into the system clock domain by a two-flop synchroniser;
// each rising edge counts, PRESCALE edges make one second. This needs the
// system clock to be more than twice the 32 kHz clock, which all its sources
// are.
module rtc
  import agri_pkg::*;
#(
  parameter int unsigned PRESCALE = 32768
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clk32k,
  input  logic [6:0] sfr_addr,
  input  logic       sfr_load,
  input  logic [7:0] sfr_data_in,
  output logic [7:0] sfr_data_out,
  output logic       sec_tick
);
  logic [2:0] sync;
  logic       run;
  logic [$clog2(PRESCALE)-1:0] pre;
  logic [5:0] sec, mn;
  logic [4:0] hr;
  logic [7:0] a;

  assign a = {1'b1, sfr_addr};

  always_comb begin
    unique case (a)
      SFR_RTC_CTRL: sfr_data_out = {7'h0, run};
      SFR_RTC_SEC:  sfr_data_out = {2'b00, sec};
      SFR_RTC_MIN:  sfr_data_out = {2'b00, mn};
      SFR_RTC_HOUR: sfr_data_out = {3'b000, hr};
      default:      sfr_data_out = 8'h00;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sync <= 3'b000; run <= 1'b0; pre <= '0; sec <= '0; mn <= '0; hr <= '0; sec_tick <= 1'b0;
    end else begin
      sync <= {sync[1:0], clk32k};
      sec_tick <= 1'b0;
      if (run && sync[1] && !sync[2]) begin
        if (pre == PRESCALE[$bits(pre)-1:0] - 1'b1) begin
          pre <= '0; sec_tick <= 1'b1;
          if (sec == 6'd59) begin
            sec <= '0;
            if (mn == 6'd59) begin
              mn <= '0;
              hr <= (hr == 5'd23) ? 5'd0 : hr + 5'd1;
            end else mn <= mn + 6'd1;
          end else sec <= sec + 6'd1;
        end else pre <= pre + 1'b1;
      end
      if (sfr_load) begin
        unique case (a)
          SFR_RTC_CTRL: run <= sfr_data_in[0];
          SFR_RTC_SEC:  begin sec <= sfr_data_in[5:0]; pre <= '0; end
          SFR_RTC_MIN:  mn <= sfr_data_in[5:0];
          SFR_RTC_HOUR: hr <= sfr_data_in[4:0];
          default: ;
        endcase
      end
    end
  end
endmodule
