// mcu_core: the "MCU core" of the chip: the 8051-compatible processor, its
// 256-byte register file, the memory-bus address map and the three on-chip
// memories (8 KB startup ROM, 64 KB program RAM, 64 KB data RAM). It exposes
// the extension SFR bus and the four 8-bit ports. rst resets the CPU
// subsystem; remap selects the memory map (see mem_map).
module mcu_core #(
  parameter int unsigned PRAM_AW   = 16,
  parameter int unsigned DRAM_AW   = 16,
  parameter string       ROM_INIT  = "rtl/boot_rom.hex"
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        remap,
  output logic [6:0]  ext_addr,
  output logic        sfr_read_str,
  input  logic [7:0]  ext_data_out,
  output logic        sfr_load,
  output logic [7:0]  ext_data_in,
  input  logic [31:0] pin_in,
  output logic [31:0] port_out,
  output logic [15:0] pc,
  output logic        insn_start,
  output logic        irq_taken
);
  logic [15:0] code_addr, xaddr, pram_addr, dram_addr;
  logic [7:0]  code_rdata, xwdata, xrdata;
  logic        xrd, xwe;
  logic [7:0]  ri_addr, ri_rdata, rd_addr, rd_rdata, iram_waddr, iram_wdata;
  logic        iram_we;
  logic [12:0] rom_addr;
  logic [7:0]  rom_rdata, pram_rdata, dram_rdata, pram_wdata, dram_wdata;
  logic        pram_we, dram_we;

  agricore u_agricore (
    .clk, .rst, .code_addr, .code_rdata, .xaddr, .xrd, .xwe, .xwdata, .xrdata,
    .ri_addr, .ri_rdata, .rd_addr, .rd_rdata, .iram_we, .iram_waddr, .iram_wdata,
    .ext_addr, .sfr_read_str, .ext_data_out, .sfr_load, .ext_data_in,
    .pin_in, .port_out, .pc, .insn_start, .irq_taken
  );

  iram256 u_iram (
    .clk, .rst, .ra_addr(ri_addr), .ra_data(ri_rdata), .rb_addr(rd_addr), .rb_data(rd_rdata),
    .we(iram_we), .waddr(iram_waddr), .wdata(iram_wdata)
  );

  mem_map u_map (
    .clk, .remap, .code_addr, .code_rdata, .xaddr, .xwe, .xwdata, .xrdata,
    .rom_addr, .rom_rdata, .pram_addr, .pram_we, .pram_wdata, .pram_rdata,
    .dram_addr, .dram_we, .dram_wdata, .dram_rdata
  );

  boot_rom #(.INIT_FILE(ROM_INIT)) u_rom (.clk, .addr(rom_addr), .rdata(rom_rdata));

  sp_ram #(.AW(PRAM_AW)) u_pram (
    .clk, .addr(pram_addr[PRAM_AW-1:0]), .we(pram_we), .wdata(pram_wdata), .rdata(pram_rdata)
  );

  sp_ram #(.AW(DRAM_AW)) u_dram (
    .clk, .addr(dram_addr[DRAM_AW-1:0]), .we(dram_we), .wdata(dram_wdata), .rdata(dram_rdata)
  );
endmodule
