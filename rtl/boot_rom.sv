// boot_rom: the 8 KB startup ROM, a synchronous-read array whose contents
// are loaded from INIT_FILE (hex, one byte per line) at elaboration.
// Data for the address presented in one clock appears after that edge.
// The default contents, rtl/boot_rom.hex, are a minimal serial loader of this
// design's own: it sets up the serial port at clk/96 baud with Timer 2 (115200
// baud from an 11.0592 MHz clock), sends the query byte 0x55, receives a
// 16-bit length (high byte first) and that many bytes, stores them from
// address 0 of the data space (the program RAM while REMAP=0), then writes
// REMAP=1, which restarts the CPU from address 0 of the program RAM.
module boot_rom #(
  parameter int unsigned AW        = 13,
  parameter string       INIT_FILE = "rtl/boot_rom.hex"
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = 8'h00;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) rdata <= mem[addr];
endmodule
