// iram256: the 256-byte internal register file of the 8051 core (R0-R7 banks,
// bit-addressable area, scratch pad and stack; 0x80-0xFF reached indirectly).
// Two asynchronous read ports (pointer register and operand) and one write
// port written at the rising clock edge. The register file is named in the
// chip's block diagram; its port structure is this design's own. It is
// cleared by reset so that simulation starts from a known state.
module iram256 #(
  parameter int unsigned DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] ra_addr,
  output logic [7:0] ra_data,
  input  logic [7:0] rb_addr,
  output logic [7:0] rb_data,
  input  logic       we,
  input  logic [7:0] waddr,
  input  logic [7:0] wdata
);
  logic [7:0] mem [DEPTH];

  assign ra_data = mem[ra_addr];
  assign rb_data = mem[rb_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= 8'h00;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end
endmodule
