// spi_host: the SPI host interface for the external serial flash. The chip
// names the interface only; this byte-wide SPI master (mode 0, MSB first)
// is this design's own:
//   SPI_CTRL (0xC1) [0] CS: 1 drives spi_cs_n low; [3:1] SEL: SCLK half
//                   period of 2^SEL system clocks
//   SPI_DATA (0xC2) write: start an 8-bit transfer; read: last byte received
//   SPI_STAT (0xC3) [0] busy
// MOSI changes on the falling SCLK edge (the first bit is set up with the
// start), MISO is sampled on the rising edge. A transfer takes 16 * 2^SEL
// clocks. Writes to SPI_DATA while busy are ignored.
module spi_host
  import agri_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [6:0] sfr_addr,
  input  logic       sfr_load,
  input  logic [7:0] sfr_data_in,
  output logic [7:0] sfr_data_out,
  output logic       spi_sclk,
  output logic       spi_mosi,
  input  logic       spi_miso,
  output logic       spi_cs_n
);
  logic [3:0] ctrl;
  logic [7:0] sh, rx;
  logic [6:0] div;
  logic [3:0] edges;     // half periods left
  logic       busy;
  logic [7:0] a;

  assign a = {1'b1, sfr_addr};
  assign spi_cs_n = ~ctrl[0];
  assign spi_mosi = sh[7];

  always_comb begin
    unique case (a)
      SFR_SPI_CTRL: sfr_data_out = {4'h0, ctrl};
      SFR_SPI_DATA: sfr_data_out = rx;
      SFR_SPI_STAT: sfr_data_out = {7'h00, busy};
      default:      sfr_data_out = 8'h00;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl <= 4'h0; sh <= 8'h00; rx <= 8'h00; div <= '0; edges <= '0; busy <= 1'b0;
      spi_sclk <= 1'b0;
    end else begin
      if (busy) begin
        if (div == (7'd1 << ctrl[3:1]) - 7'd1) begin
          div <= '0;
          spi_sclk <= ~spi_sclk;
          edges <= edges - 4'd1;
          if (!spi_sclk) rx <= {rx[6:0], spi_miso};   // rising edge: sample
          else           sh <= {sh[6:0], 1'b0};        // falling edge: shift
          if (edges == 4'd1) busy <= 1'b0;
        end else div <= div + 7'd1;
      end
      if (sfr_load) begin
        if (a == SFR_SPI_CTRL) ctrl <= sfr_data_in[3:0];
        if (a == SFR_SPI_DATA && !busy) begin
          sh <= sfr_data_in; busy <= 1'b1; edges <= 4'd0; div <= '0;
        end
      end
    end
  end
endmodule
