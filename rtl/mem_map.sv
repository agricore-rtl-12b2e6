// mem_map: the memory bus address mapping between the core and the startup
// ROM, program RAM and data RAM, switched by the REMAP bit (SFR 0xEA bit 0).
//   REMAP=0 (after reset): program fetches read the 8 KB ROM (the 13-bit ROM
//     address repeats through the 64 KB code space); MOVX data accesses reach
//     the program RAM, so the boot program can load software into it.
//   REMAP=1: program fetches read the program RAM, MOVX reaches the data RAM.
// This follows the chip description. Memories have one-clock synchronous
// reads, so the read-data select is registered with the address. The program
// RAM has one port, which the code side owns when REMAP=1 and the data side
// when REMAP=0.
module mem_map (
  input  logic        clk,
  input  logic        remap,
  // core side
  input  logic [15:0] code_addr,
  output logic [7:0]  code_rdata,
  input  logic [15:0] xaddr,
  input  logic        xwe,
  input  logic [7:0]  xwdata,
  output logic [7:0]  xrdata,
  // memory side
  output logic [12:0] rom_addr,
  input  logic [7:0]  rom_rdata,
  output logic [15:0] pram_addr,
  output logic        pram_we,
  output logic [7:0]  pram_wdata,
  input  logic [7:0]  pram_rdata,
  output logic [15:0] dram_addr,
  output logic        dram_we,
  output logic [7:0]  dram_wdata,
  input  logic [7:0]  dram_rdata
);
  logic remap_q;

  assign rom_addr   = code_addr[12:0];
  assign pram_addr  = remap ? code_addr : xaddr;
  assign pram_we    = !remap && xwe;
  assign pram_wdata = xwdata;
  assign dram_addr  = xaddr;
  assign dram_we    = remap && xwe;
  assign dram_wdata = xwdata;

  always_ff @(posedge clk) remap_q <= remap;

  assign code_rdata = remap_q ? pram_rdata : rom_rdata;
  assign xrdata     = remap_q ? dram_rdata : pram_rdata;
endmodule
