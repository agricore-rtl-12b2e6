// timer2: the third timer, 8052 Timer 2, with T2CON, RCAP2L/H and TL2/TH2.
// Counts once every 12 clocks (C/T2=0) or on falling edges of the T2 pin
// (C/T2=1), in line with the chip description's 12-clock rule for timer
// mode. Behaviour follows the 8052: CP/RL2=1 is 16-bit capture (a falling
// edge on T2EX with EXEN2 copies TH2:TL2 into RCAP2 and sets EXF2);
// CP/RL2=0 is 16-bit auto-reload from RCAP2 on overflow (TF2) or on a T2EX
// falling edge with EXEN2 (EXF2). With RCLK or TCLK set Timer 2 is a baud
// generator: it counts every 2 clocks, reloads on overflow without setting
// TF2 and pulses t2_ovf for the serial port. TF2/EXF2 are cleared by software.
module timer2
  import agri_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] sfr_addr,
  output logic [7:0] sfr_rdata,
  output logic       sfr_hit,
  input  logic       sfr_we,
  input  logic [7:0] sfr_waddr,
  input  logic [7:0] sfr_wdata,
  input  logic       t2_pin,
  input  logic       t2ex_pin,
  output logic       irq_flag,    // TF2 | EXF2
  output logic       rclk,
  output logic       tclk,
  output logic       t2_ovf
);
  logic [7:0]  t2con;
  logic [15:0] cnt, rcap;
  logic [3:0]  pre;
  logic        t2_q, ex_q, half;

  assign rclk = t2con[5];
  assign tclk = t2con[4];
  assign irq_flag = t2con[7] | t2con[6];

  always_comb begin
    sfr_hit = 1'b1; sfr_rdata = 8'h00;
    unique case (sfr_addr)
      SFR_T2CON:  sfr_rdata = t2con;
      SFR_RCAP2L: sfr_rdata = rcap[7:0];
      SFR_RCAP2H: sfr_rdata = rcap[15:8];
      SFR_TL2:    sfr_rdata = cnt[7:0];
      SFR_TH2:    sfr_rdata = cnt[15:8];
      default:    sfr_hit = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    logic       baud, inc, exfall;
    logic [7:0] t2con_n;
    logic [15:0] cnt_n, rcap_n;
    if (rst) begin
      t2con <= 8'h00; cnt <= 16'h0000; rcap <= 16'h0000; pre <= 4'd0;
      t2_q <= 1'b1; ex_q <= 1'b1; half <= 1'b0; t2_ovf <= 1'b0;
    end else begin
      pre  <= (pre == 4'd11) ? 4'd0 : pre + 4'd1;
      half <= ~half;
      t2_q <= t2_pin; ex_q <= t2ex_pin;
      baud   = t2con[5] | t2con[4];
      exfall = ex_q && !t2ex_pin && t2con[3];
      inc    = t2con[2] && (t2con[1] ? (t2_q && !t2_pin) : (baud ? half : (pre == 4'd11)));
      t2con_n = t2con; cnt_n = cnt; rcap_n = rcap;
      t2_ovf <= 1'b0;
      if (inc) cnt_n = cnt + 16'd1;
      if (baud) begin
        if (inc && cnt == 16'hFFFF) begin cnt_n = rcap; t2_ovf <= 1'b1; end
        if (exfall) t2con_n[6] = 1'b1;
      end else if (t2con[0]) begin                     // capture
        if (inc && cnt == 16'hFFFF) t2con_n[7] = 1'b1;
        if (exfall) begin rcap_n = cnt; t2con_n[6] = 1'b1; end
      end else begin                                   // auto-reload
        if (inc && cnt == 16'hFFFF) begin cnt_n = rcap; t2con_n[7] = 1'b1; end
        if (exfall) begin cnt_n = rcap; t2con_n[6] = 1'b1; end
      end
      if (sfr_we) begin
        unique case (sfr_waddr)
          SFR_T2CON:  t2con_n = sfr_wdata;
          SFR_RCAP2L: rcap_n[7:0] = sfr_wdata;
          SFR_RCAP2H: rcap_n[15:8] = sfr_wdata;
          SFR_TL2:    cnt_n[7:0] = sfr_wdata;
          SFR_TH2:    cnt_n[15:8] = sfr_wdata;
          default: ;
        endcase
      end
      t2con <= t2con_n; cnt <= cnt_n; rcap <= rcap_n;
    end
  end
endmodule
