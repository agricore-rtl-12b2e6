// tb_mcs51_cpu: runs a hand-assembled 8051 program (tb/cpu_test.hex) on the
// CPU alone, with program memory, external data memory, internal RAM and an
// SFR responder modelled here. The program writes each result with
// MOVX @DPTR,A; the bench compares those writes with values worked out by
// hand from the 8051 instruction definitions. It also checks the clocks per
// instruction (a 3-byte LJMP takes 4 clocks) and one interrupt round trip,
// raised when the program writes SFR 0xC1.
module tb_mcs51_cpu;
  import agri_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] code_addr, xaddr, pc;
  logic [7:0]  code_rdata, xwdata, xrdata;
  logic        xrd, xwe;
  logic [7:0]  ri_addr, ri_rdata, rd_addr, rd_rdata, iram_waddr, iram_wdata;
  logic        iram_we;
  logic [7:0]  sfr_addr, sfr_rdata, sfr_waddr, sfr_wdata;
  logic        sfr_rd, sfr_rmw, sfr_we;
  logic        irq = 1'b0, irq_ack, irq_ret, insn_start;
  int checks = 0, failures = 0, nout = 0, cyc = 0, nret = 0;
  logic [7:0] rom [4096];
  logic [7:0] xram [256];
  logic [7:0] exp [26] = '{8'h5C, 8'h16, 8'hF6, 8'h80, 8'h8F, 8'h1C, 8'h03, 8'hAA, 8'hAB,
                           8'hBA, 8'hBA, 8'h81, 8'h01, 8'h06, 8'h77, 8'h11, 8'h23, 8'h47,
                           8'h5E, 8'hE3, 8'h55, 8'hBA, 8'h55, 8'h6B, 8'h01, 8'hFF};
  int first_starts [2];
  int nstart = 0;
  logic done = 1'b0;

  always #5 clk = ~clk;

  mcs51_cpu dut (
    .clk, .rst, .code_addr, .code_rdata, .xaddr, .xrd, .xwe, .xwdata, .xrdata, .xpage(8'h00),
    .ri_addr, .ri_rdata, .rd_addr, .rd_rdata, .iram_we, .iram_waddr, .iram_wdata,
    .sfr_addr, .sfr_rd, .sfr_rmw, .sfr_rdata, .sfr_we, .sfr_waddr, .sfr_wdata, .sfr_bus_addr(),
    .irq, .irq_vec(3'd0), .irq_ack, .irq_ret, .pc_o(pc), .insn_start
  );

  iram256 u_iram (.clk, .rst, .ra_addr(ri_addr), .ra_data(ri_rdata), .rb_addr(rd_addr),
                  .rb_data(rd_rdata), .we(iram_we), .waddr(iram_waddr), .wdata(iram_wdata));

  assign sfr_rdata = (sfr_addr == 8'hC2) ? 8'h6B : 8'h00;

  initial begin
    $readmemh("tb/cpu_test.hex", rom);
    for (int i = 0; i < 256; i++) xram[i] = 8'(i) ^ 8'hA5;
  end

  always_ff @(posedge clk) begin
    code_rdata <= rom[code_addr[11:0]];
    xrdata     <= xram[xaddr[7:0]];
  end

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (insn_start && nstart < 2) begin first_starts[nstart] = cyc; nstart++; end
    if (xwe) begin
      checks++;
      if (nout < 26 && xwdata !== exp[nout]) begin
        failures++;
        $display("FAIL result %0d: got %02h expected %02h", nout, xwdata, exp[nout]);
      end
      if (xaddr != 16'(nout)) begin
        failures++; $display("FAIL result %0d at address %04h", nout, xaddr);
      end
      if (xwdata == 8'hFF) done = 1'b1;
      xram[xaddr[7:0]] <= xwdata;
      nout++;
    end
    if (sfr_we && sfr_waddr == 8'hC1) irq <= 1'b1;
    if (irq_ack) begin
      irq <= 1'b0; checks++;
      if (dut.pc_n != 16'h0003) begin failures++; $display("FAIL vector %04h", dut.pc_n); end
    end
    if (irq_ret) nret++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (done);
    repeat (2) @(posedge clk);
    checks++;
    if (nout != 26) begin failures++; $display("FAIL %0d results", nout); end
    checks++;
    if (first_starts[1] - first_starts[0] != 4) begin
      failures++; $display("FAIL LJMP took %0d clocks", first_starts[1] - first_starts[0]);
    end
    checks++;
    if (nret != 1) begin failures++; $display("FAIL %0d RETI", nret); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d results", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
