// uart51: the 8051 serial port (SCON, SBUF, and the SMOD bit of PCON) in its
// asynchronous modes 1, 2 and 3. Mode 1 is 8 data bits, modes 2 and 3 nine
// (TB8/RB8). Bit timing runs on a 16x tick: in modes 1 and 3 it is the
// Timer 1 overflow (halved unless SMOD=1) or, with RCLK/TCLK set, the Timer 2
// overflow; in mode 2 it is clk/4 (SMOD=0) or clk/2 (SMOD=1), so a bit lasts
// 64 or 32 clocks. A write to SBUF starts a frame on txd (start bit, data LSB
// first, 9th bit, stop bit); TI is set when the stop bit begins. With REN=1 a
// falling edge on rxd starts reception; each bit is sampled in its middle;
// SBUF/RB8/RI are loaded at the stop bit if RI is clear and, with SM2=1, the
// stop bit (mode 1) or 9th bit (modes 2/3) is 1. TI and RI are cleared by
// software. Mode 0 (synchronous shift register) is not built.
module uart51
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
  input  logic       t1_ovf,
  input  logic       t2_ovf,
  input  logic       rclk,
  input  logic       tclk,
  input  logic       rxd,
  output logic       txd,
  output logic       ri,
  output logic       ti
);
  logic [7:0] scon, sbuf_rx, pcon;
  logic       smod;
  logic       t1_half;
  logic [1:0] m2div;
  logic       tick_t1, tick_m2, tx_tick, rx_tick;
  // transmitter
  logic [10:0] tx_sh;
  logic [3:0]  tx_bits, tx_sub;
  logic        tx_busy;
  // receiver
  logic [8:0]  rx_sh;
  logic [3:0]  rx_bits, rx_sub;
  logic        rx_busy, rxd_q, rxd_s;

  assign smod = pcon[7];
  assign ri = scon[0];
  assign ti = scon[1];

  always_comb begin
    tick_t1 = t1_ovf && (smod || t1_half);
    tick_m2 = smod ? m2div[0] : (m2div == 2'd3);
    if (scon[7:6] == 2'b10) begin
      tx_tick = tick_m2; rx_tick = tick_m2;
    end else begin
      tx_tick = tclk ? t2_ovf : tick_t1;
      rx_tick = rclk ? t2_ovf : tick_t1;
    end
  end

  always_comb begin
    sfr_hit = 1'b1; sfr_rdata = 8'h00;
    unique case (sfr_addr)
      SFR_SCON: sfr_rdata = scon;
      SFR_SBUF: sfr_rdata = sbuf_rx;
      SFR_PCON: sfr_rdata = pcon;
      default:  sfr_hit = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    logic [7:0] scon_n;
    logic       nine;
    if (rst) begin
      scon <= 8'h00; sbuf_rx <= 8'h00; pcon <= 8'h00;
      t1_half <= 1'b0; m2div <= 2'd0;
      tx_sh <= '1; tx_bits <= 4'd0; tx_sub <= 4'd0; tx_busy <= 1'b0; txd <= 1'b1;
      rx_sh <= '0; rx_bits <= 4'd0; rx_sub <= 4'd0; rx_busy <= 1'b0;
      rxd_q <= 1'b1; rxd_s <= 1'b1;
    end else begin
      scon_n = scon;
      nine = scon[7];                                   // modes 2,3 have a 9th bit
      m2div <= m2div + 2'd1;
      if (t1_ovf) t1_half <= ~t1_half;
      rxd_s <= rxd; rxd_q <= rxd_s;

      // ---- transmitter: tx_sh holds the frame, LSB first ----
      if (tx_busy && tx_tick) begin
        if (tx_sub == 4'd15) begin
          tx_sub <= 4'd0;
          txd    <= tx_sh[0];
          tx_sh  <= {1'b1, tx_sh[10:1]};
          tx_bits <= tx_bits - 4'd1;
          if (tx_bits == 4'd1) scon_n[1] = 1'b1;        // stop bit starts: TI
          if (tx_bits == 4'd0) begin tx_busy <= 1'b0; txd <= 1'b1; end
        end else tx_sub <= tx_sub + 4'd1;
      end

      // ---- receiver ----
      if (!rx_busy) begin
        if (scon[4] && rxd_q && !rxd_s) begin
          rx_busy <= 1'b1; rx_sub <= 4'd0; rx_bits <= 4'd0;
        end
      end else if (rx_tick) begin
        rx_sub <= rx_sub + 4'd1;
        if (rx_sub == 4'd7) begin                       // middle of a bit
          if (rx_bits == 4'd0) begin
            if (rxd_s) rx_busy <= 1'b0;                 // false start bit
            rx_bits <= 4'd1;
          end else if (rx_bits <= (nine ? 4'd9 : 4'd8)) begin
            rx_sh   <= {rxd_s, rx_sh[8:1]};
            rx_bits <= rx_bits + 4'd1;
          end else begin                                // stop bit
            rx_busy <= 1'b0;
            if (!scon[0] && (!scon[5] || (nine ? rx_sh[8] : rxd_s))) begin
              sbuf_rx   <= nine ? rx_sh[7:0] : rx_sh[8:1];
              scon_n[2] = nine ? rx_sh[8] : rxd_s;
              scon_n[0] = 1'b1;
            end
          end
        end
      end

      if (sfr_we) begin
        unique case (sfr_waddr)
          SFR_SCON: scon_n = sfr_wdata;
          SFR_PCON: pcon <= sfr_wdata;
          SFR_SBUF: begin
            // start bit, 8 data bits, 9th bit (TB8) or stop, stop
            tx_sh   <= nine ? {1'b1, scon[3], sfr_wdata, 1'b0} : {2'b11, sfr_wdata, 1'b0};
            tx_bits <= nine ? 4'd11 : 4'd10;
            tx_sub  <= 4'd15; tx_busy <= 1'b1;
          end
          default: ;
        endcase
      end
      scon <= scon_n;
    end
  end
endmodule
