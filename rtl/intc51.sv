// intc51: 8051 interrupt controller with IE (0xA8) and IP (0xB8).
// Six sources in the 8052 polling order: INT0, Timer 0, INT1, Timer 1,
// serial port (RI|TI), Timer 2 (TF2|EXF2); vector = 8*index + 3. Two priority
// levels: a high-priority request interrupts a low-priority routine, nothing
// interrupts a high-priority one. irq/irq_vec are combinational; the core
// answers with ack (the vector is being entered: the level is marked in
// service and TF0/TF1/edge IE0/IE1 are cleared through clr_*) and ret (RETI:
// the highest level in service is released).
module intc51
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
  input  logic [5:0] src,          // {T2, serial, TF1, IE1, TF0, IE0}
  output logic       irq,
  output logic [2:0] irq_vec,
  input  logic       ack,
  input  logic       ret,
  output logic [3:0] clr           // {IE1, TF1, IE0, TF0} cleared on ack
);
  logic [7:0] ie, ip;
  logic [1:0] in_svc;              // [1] high level, [0] low level
  logic [5:0] req, req_hi, req_lo;
  logic       sel_hi;

  assign req    = src & ie[5:0] & {6{ie[7]}};
  assign req_hi = req & ip[5:0];
  assign req_lo = req & ~ip[5:0];

  always_comb begin
    irq = 1'b0; irq_vec = 3'd0; sel_hi = 1'b0;
    if (req_hi != 6'd0 && !in_svc[1]) begin
      irq = 1'b1; sel_hi = 1'b1;
      for (int i = 5; i >= 0; i--) if (req_hi[i]) irq_vec = 3'(i);
    end else if (req_lo != 6'd0 && in_svc == 2'b00) begin
      irq = 1'b1;
      for (int i = 5; i >= 0; i--) if (req_lo[i]) irq_vec = 3'(i);
    end
  end

  always_comb begin
    clr = 4'b0000;
    if (ack) begin
      unique case (irq_vec)
        3'd0: clr[1] = 1'b1;   // IE0
        3'd1: clr[0] = 1'b1;   // TF0
        3'd2: clr[3] = 1'b1;   // IE1
        3'd3: clr[2] = 1'b1;   // TF1
        default: ;
      endcase
    end
  end

  always_comb begin
    sfr_hit = 1'b1; sfr_rdata = 8'h00;
    unique case (sfr_addr)
      SFR_IE: sfr_rdata = ie;
      SFR_IP: sfr_rdata = ip;
      default: sfr_hit = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ie <= 8'h00; ip <= 8'h00; in_svc <= 2'b00;
    end else begin
      if (ack) begin
        if (sel_hi) in_svc[1] <= 1'b1; else in_svc[0] <= 1'b1;
      end else if (ret) begin
        if (in_svc[1]) in_svc[1] <= 1'b0; else in_svc[0] <= 1'b0;
      end
      if (sfr_we && sfr_waddr == SFR_IE) ie <= sfr_wdata;
      if (sfr_we && sfr_waddr == SFR_IP) ip <= sfr_wdata;
    end
  end
endmodule
