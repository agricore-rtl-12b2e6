// agricore: the 8051-compatible processor as the chip uses it: the CPU with
// the SFRs an 8051 holds inside (P0-P3, Timers 0/1/2, serial port, interrupt
// controller), and two buses out: the memory bus and the extension SFR bus.
//
// Extension SFR bus, for the on-chip peripherals outside the core: only the
// low 7 bits of the SFR address are brought out, since SFR space is
// 0x80-0xFF. A read (Fig. "SFR read") is one clock with sfr_read_str low and
// ext_addr valid; the device answers on ext_data_out in the same clock and the
// core latches it at the clock edge ending it. A write ("SFR write") is one
// clock with sfr_load high, ext_addr and ext_data_in valid; the device latches
// at the edge ending it. Addresses the core serves itself never appear on it.
// Pin functions as on the 8051: RXD=P3.0, TXD=P3.1, INT0=P3.2, INT1=P3.3,
// T0=P3.4, T1=P3.5, T2=P1.0, T2EX=P1.1.
module agricore
  import agri_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // memory bus: program fetch and MOVX data
  output logic [15:0] code_addr,
  input  logic [7:0]  code_rdata,
  output logic [15:0] xaddr,
  output logic        xrd,
  output logic        xwe,
  output logic [7:0]  xwdata,
  input  logic [7:0]  xrdata,
  // 256-byte register file
  output logic [7:0]  ri_addr,
  input  logic [7:0]  ri_rdata,
  output logic [7:0]  rd_addr,
  input  logic [7:0]  rd_rdata,
  output logic        iram_we,
  output logic [7:0]  iram_waddr,
  output logic [7:0]  iram_wdata,
  // extension SFR bus
  output logic [6:0]  ext_addr,
  output logic        sfr_read_str,   // active low
  input  logic [7:0]  ext_data_out,   // device -> core
  output logic        sfr_load,       // active high
  output logic [7:0]  ext_data_in,    // core -> device
  // ports
  input  logic [31:0] pin_in,
  output logic [31:0] port_out,
  // status
  output logic [15:0] pc,
  output logic        insn_start,
  output logic        irq_taken
);
  logic [7:0] sfr_addr, sfr_waddr, sfr_wdata, sfr_rdata, sfr_bus_addr;
  logic       sfr_rd, sfr_rmw, sfr_we;
  logic       irq, irq_ack, irq_ret;
  logic [2:0] irq_vec;
  logic [3:0] clr;
  logic [7:0] gp_d, t01_d, t2_d, u_d, ic_d;
  logic       gp_h, t01_h, t2_h, u_h, ic_h;
  logic       tf0, tf1, ie0, ie1, t1_ovf, t2_ovf, t2_irq, rclk, tclk, ri, ti, txd;
  logic [31:0] latch;

  mcs51_cpu u_cpu (
    .clk, .rst, .code_addr, .code_rdata, .xaddr, .xrd, .xwe, .xwdata, .xrdata,
    .xpage(latch[23:16]),
    .ri_addr, .ri_rdata, .rd_addr, .rd_rdata, .iram_we, .iram_waddr, .iram_wdata,
    .sfr_addr, .sfr_rd, .sfr_rmw, .sfr_rdata, .sfr_we, .sfr_waddr, .sfr_wdata, .sfr_bus_addr,
    .irq, .irq_vec, .irq_ack, .irq_ret, .pc_o(pc), .insn_start
  );

  gpio_ports u_ports (
    .clk, .rst, .sfr_addr, .sfr_rmw, .sfr_rdata(gp_d), .sfr_hit(gp_h),
    .sfr_we, .sfr_waddr, .sfr_wdata, .pin_in, .port_out(latch)
  );

  timer01 u_t01 (
    .clk, .rst, .sfr_addr, .sfr_rdata(t01_d), .sfr_hit(t01_h), .sfr_we, .sfr_waddr, .sfr_wdata,
    .t0_pin(pin_in[28]), .t1_pin(pin_in[29]), .int0_n(pin_in[26]), .int1_n(pin_in[27]),
    .clr_tf0(clr[0]), .clr_ie0(clr[1]), .clr_tf1(clr[2]), .clr_ie1(clr[3]),
    .tf0, .tf1, .ie0, .ie1, .t1_ovf
  );

  timer2 u_t2 (
    .clk, .rst, .sfr_addr, .sfr_rdata(t2_d), .sfr_hit(t2_h), .sfr_we, .sfr_waddr, .sfr_wdata,
    .t2_pin(pin_in[8]), .t2ex_pin(pin_in[9]), .irq_flag(t2_irq), .rclk, .tclk, .t2_ovf
  );

  uart51 u_uart (
    .clk, .rst, .sfr_addr, .sfr_rdata(u_d), .sfr_hit(u_h), .sfr_we, .sfr_waddr, .sfr_wdata,
    .t1_ovf, .t2_ovf, .rclk, .tclk, .rxd(pin_in[24]), .txd, .ri, .ti
  );

  intc51 u_intc (
    .clk, .rst, .sfr_addr, .sfr_rdata(ic_d), .sfr_hit(ic_h), .sfr_we, .sfr_waddr, .sfr_wdata,
    .src({t2_irq, ri | ti, tf1, ie1, tf0, ie0}),
    .irq, .irq_vec, .ack(irq_ack), .ret(irq_ret), .clr
  );

  always_comb begin
    if      (gp_h)  sfr_rdata = gp_d;
    else if (t01_h) sfr_rdata = t01_d;
    else if (t2_h)  sfr_rdata = t2_d;
    else if (u_h)   sfr_rdata = u_d;
    else if (ic_h)  sfr_rdata = ic_d;
    else            sfr_rdata = ext_data_out;
  end

  assign ext_addr     = sfr_bus_addr[6:0];
  assign sfr_load     = sfr_we && !is_core_sfr(sfr_waddr);
  assign sfr_read_str = !(sfr_rd && !is_core_sfr(sfr_addr));
  assign ext_data_in  = sfr_wdata;
  assign irq_taken    = irq_ack;
  assign port_out     = {latch[31:26], latch[25] & txd, latch[24:0]};

  // the extension bus carries one address per clock
  a_one_addr: assert property (@(posedge clk) disable iff (rst)
                               sfr_load |-> (sfr_bus_addr == sfr_waddr));
  a_rd_addr:  assert property (@(posedge clk) disable iff (rst)
                               !sfr_read_str |-> (sfr_bus_addr == sfr_addr));
endmodule
