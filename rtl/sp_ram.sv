// sp_ram: single-port synchronous RAM, used for the 64 KB program RAM and
// the 64 KB data RAM. Read data for the address presented in one clock
// appears after that clock's rising edge; a write (we) lands at the edge.
// The chip lists these memories by size only; their one-clock read timing is
// this design's choice (the memory-bus figures draw a slower, multi-clock
// access). In silicon each would be an SRAM macro; here it is an array.
module sp_ram #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
