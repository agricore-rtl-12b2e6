// tb_mem_map: the memory map with real memories behind it. With REMAP=0 a
// code fetch returns the ROM and MOVX writes/reads go to the program RAM;
// with REMAP=1 fetches return the program RAM and MOVX goes to the data RAM.
// Then 300 random accesses in each map over the full 64 KB address range
// check the address/strobe routing and the read data against a model.
module tb_mem_map;
  logic clk = 1'b0, remap = 1'b0, xwe = 1'b0;
  logic [15:0] code_addr = '0, xaddr = '0, pram_addr, dram_addr;
  logic [7:0] xwdata = '0, code_rdata, xrdata, rom_rdata, pram_rdata, dram_rdata;
  logic [7:0] pram_wdata, dram_wdata;
  logic [12:0] rom_addr;
  logic pram_we, dram_we;
  int checks = 0, failures = 0;
  logic [7:0] pmodel [logic [15:0]];
  logic [7:0] dmodel [logic [15:0]];
  logic [15:0] wq [$];
  // bytes the bench never wrote are compared with the RAM's own initial content
  always #5 clk = ~clk;
  mem_map dut (.*);
  boot_rom u_rom (.clk, .addr(rom_addr), .rdata(rom_rdata));
  sp_ram u_p (.clk, .addr(pram_addr), .we(pram_we), .wdata(pram_wdata), .rdata(pram_rdata));
  sp_ram u_d (.clk, .addr(dram_addr), .we(dram_we), .wdata(dram_wdata), .rdata(dram_rdata));
  task automatic chk(input logic [7:0] got, input logic [7:0] e, input string what);
    checks++;
    if (got != e) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: %h expected %h", what, got, e);
    end
  endtask
  initial begin
    // REMAP=0: load program RAM through MOVX
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); xwe = 1'b1; xaddr = 16'(i); xwdata = 8'hC0 + 8'(i);
    end
    @(negedge clk); xwe = 1'b0; code_addr = 16'h0001; xaddr = 16'h0002;
    @(negedge clk);
    chk(code_rdata, 8'h98, "ROM fetch"); chk(xrdata, 8'hC2, "MOVX read of program RAM");
    code_addr = 16'h2001; @(negedge clk); chk(code_rdata, 8'h98, "ROM alias");
    // REMAP=1
    remap = 1'b1; code_addr = 16'h0003;
    @(negedge clk); chk(code_rdata, 8'hC3, "program RAM fetch");
    xwe = 1'b1; xaddr = 16'h0002; xwdata = 8'h5D; code_addr = 16'h0002;
    @(negedge clk); xwe = 1'b0;
    chk(code_rdata, 8'hC2, "program RAM unchanged by data write");
    @(negedge clk); chk(xrdata, 8'h5D, "data RAM read");
    // random traffic over the whole 64 KB spaces in both maps, against a
    // model of the two RAMs and the ROM image
    for (int r = 0; r < 2; r++) begin
      remap = 1'(r);
      @(negedge clk);
      for (int i = 0; i < 300; i++) begin
        logic [15:0] a, c;
        logic [7:0] d, ex, ec;
        logic w;
        w = ($urandom_range(0, 1) == 1);
        a = 16'($urandom); c = 16'($urandom); d = 8'($urandom);
        // reads mostly go back to addresses written before (in either map)
        if (!w && wq.size() > 0) a = wq[$urandom_range(0, wq.size() - 1)];
        if (r && wq.size() > 0 && $urandom_range(0, 1) == 1) c = wq[$urandom_range(0, wq.size() - 1)];
        if (w) wq.push_back(a);
        xaddr = a; code_addr = c; xwdata = d; xwe = w;
        #1;
        // routing, checked combinationally
        checks++;
        if (rom_addr != c[12:0] || pram_addr != (r ? c : a) || dram_addr != a ||
            pram_we != (!r && xwe) || dram_we != (r && xwe) ||
            pram_wdata != d || dram_wdata != d) begin
          failures++; if (failures <= 10) $display("FAIL routing remap=%0d", r);
        end
        // the RAMs read before they write: a write cycle returns the old byte
        if (r) begin
          ex = dmodel.exists(a) ? dmodel[a] : u_d.mem[a];
          ec = pmodel.exists(c) ? pmodel[c] : u_p.mem[c];
        end else begin
          ex = pmodel.exists(a) ? pmodel[a] : u_p.mem[a];
          ec = u_rom.mem[c[12:0]];
        end
        if (xwe) begin if (r) dmodel[a] = d; else pmodel[a] = d; end
        @(negedge clk);
        xwe = 1'b0;
        chk(xrdata, ex, r ? "random MOVX read of data RAM" : "random MOVX read of program RAM");
        chk(code_rdata, ec, r ? "random fetch from program RAM" : "random ROM fetch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
