// timer01: 8051 Timer 0 and Timer 1 with TCON and TMOD, and the external
// interrupt inputs INT0/INT1 whose flags live in TCON.
// As the chip description requires for 8051 compatibility, a timer counts
// once every 12 clocks in timer mode (C/T=0) and on each falling edge of its
// T0/T1 pin in counter mode (C/T=1), even though the core's own machine cycle
// is shorter. Modes 0 (13-bit), 1 (16-bit), 2 (8-bit auto-reload) and 3 (Timer 0
// split into two 8-bit timers, Timer 1 held) are as on the 8051, including the
// GATE bit. Pins are sampled on the clock; a falling edge is a 1 then 0 seen
// in successive clocks. IE0/IE1 are set on a falling edge (ITx=1) or follow
// the low level (ITx=0). TF0/TF1 and edge-triggered IE0/IE1 are cleared by the
// interrupt controller's acknowledge (clr_*). t1_ovf pulses on each Timer 1
// overflow, for the serial port baud rate.
module timer01
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
  input  logic       t0_pin,
  input  logic       t1_pin,
  input  logic       int0_n,
  input  logic       int1_n,
  input  logic       clr_tf0,
  input  logic       clr_tf1,
  input  logic       clr_ie0,
  input  logic       clr_ie1,
  output logic       tf0,
  output logic       tf1,
  output logic       ie0,
  output logic       ie1,
  output logic       t1_ovf
);
  logic [7:0] tcon, tmod, tl0, th0, tl1, th1;
  logic [3:0] pre;                 // divide-by-12 prescaler
  logic       tick12;
  logic       t0_q, t1_q, i0_q, i1_q;
  logic       cnt0, cnt1;          // count enables of this clock
  logic       run0, run1;

  assign tick12 = (pre == 4'd11);
  assign tf1 = tcon[7]; assign tf0 = tcon[5];
  assign ie1 = tcon[3]; assign ie0 = tcon[1];

  always_comb begin
    run0 = tcon[4] && (!tmod[3] || int0_n);
    run1 = tcon[6] && (!tmod[7] || int1_n);
    cnt0 = run0 && (tmod[2] ? (t0_q && !t0_pin) : tick12);
    cnt1 = run1 && (tmod[6] ? (t1_q && !t1_pin) : tick12);
  end

  always_comb begin
    sfr_hit = 1'b1; sfr_rdata = 8'h00;
    unique case (sfr_addr)
      SFR_TCON: sfr_rdata = tcon;
      SFR_TMOD: sfr_rdata = tmod;
      SFR_TL0:  sfr_rdata = tl0;
      SFR_TH0:  sfr_rdata = th0;
      SFR_TL1:  sfr_rdata = tl1;
      SFR_TH1:  sfr_rdata = th1;
      default:  sfr_hit = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    logic [7:0] tcon_n, tl0_n, th0_n, tl1_n, th1_n;
    logic       ovf1;
    if (rst) begin
      tcon <= 8'h00; tmod <= 8'h00; tl0 <= 8'h00; th0 <= 8'h00; tl1 <= 8'h00; th1 <= 8'h00;
      pre <= 4'd0; t0_q <= 1'b1; t1_q <= 1'b1; i0_q <= 1'b1; i1_q <= 1'b1; t1_ovf <= 1'b0;
    end else begin
      pre  <= tick12 ? 4'd0 : pre + 4'd1;
      t0_q <= t0_pin; t1_q <= t1_pin; i0_q <= int0_n; i1_q <= int1_n;
      tcon_n = tcon; tl0_n = tl0; th0_n = th0; tl1_n = tl1; th1_n = th1; ovf1 = 1'b0;

      // ---- Timer 0 ----
      unique case (tmod[1:0])
        2'd0: if (cnt0) begin                          // 13-bit: TL0[4:0] prescales TH0
          tl0_n = {3'b000, tl0[4:0] + 5'd1};
          if (tl0[4:0] == 5'h1F) begin
            th0_n = th0 + 8'd1;
            if (th0 == 8'hFF) tcon_n[5] = 1'b1;
          end
        end
        2'd1: if (cnt0) begin
          {th0_n, tl0_n} = {th0, tl0} + 16'd1;
          if ({th0, tl0} == 16'hFFFF) tcon_n[5] = 1'b1;
        end
        2'd2: if (cnt0) begin
          if (tl0 == 8'hFF) begin tl0_n = th0; tcon_n[5] = 1'b1; end
          else tl0_n = tl0 + 8'd1;
        end
        default: begin                                 // mode 3
          if (cnt0) begin
            tl0_n = tl0 + 8'd1;
            if (tl0 == 8'hFF) tcon_n[5] = 1'b1;
          end
          if (tcon[6] && tick12) begin                 // TH0 runs on TR1, sets TF1
            th0_n = th0 + 8'd1;
            if (th0 == 8'hFF) tcon_n[7] = 1'b1;
          end
        end
      endcase

      // ---- Timer 1 (held in mode 3; no TF1 while Timer 0 is in mode 3) ----
      if (tmod[5:4] != 2'd3) begin
        unique case (tmod[5:4])
          2'd0: if (cnt1) begin
            tl1_n = {3'b000, tl1[4:0] + 5'd1};
            if (tl1[4:0] == 5'h1F) begin
              th1_n = th1 + 8'd1;
              if (th1 == 8'hFF) ovf1 = 1'b1;
            end
          end
          2'd1: if (cnt1) begin
            {th1_n, tl1_n} = {th1, tl1} + 16'd1;
            if ({th1, tl1} == 16'hFFFF) ovf1 = 1'b1;
          end
          default: if (cnt1) begin                     // mode 2
            if (tl1 == 8'hFF) begin tl1_n = th1; ovf1 = 1'b1; end
            else tl1_n = tl1 + 8'd1;
          end
        endcase
      end
      if (ovf1 && tmod[1:0] != 2'd3) tcon_n[7] = 1'b1;
      t1_ovf <= ovf1;

      // ---- external interrupts ----
      if (tcon[0]) begin if (i0_q && !int0_n) tcon_n[1] = 1'b1; end
      else tcon_n[1] = !int0_n;
      if (tcon[2]) begin if (i1_q && !int1_n) tcon_n[3] = 1'b1; end
      else tcon_n[3] = !int1_n;

      // ---- acknowledge clears ----
      if (clr_tf0) tcon_n[5] = 1'b0;
      if (clr_tf1) tcon_n[7] = 1'b0;
      if (clr_ie0 && tcon[0]) tcon_n[1] = 1'b0;
      if (clr_ie1 && tcon[2]) tcon_n[3] = 1'b0;

      // ---- software writes win ----
      if (sfr_we) begin
        unique case (sfr_waddr)
          SFR_TCON: tcon_n = sfr_wdata;
          SFR_TMOD: tmod <= sfr_wdata;
          SFR_TL0:  tl0_n = sfr_wdata;
          SFR_TH0:  th0_n = sfr_wdata;
          SFR_TL1:  tl1_n = sfr_wdata;
          SFR_TH1:  th1_n = sfr_wdata;
          default: ;
        endcase
      end
      tcon <= tcon_n; tl0 <= tl0_n; th0 <= th0_n; tl1 <= tl1_n; th1 <= th1_n;
    end
  end
endmodule
