// mcs51_cpu: an 8051 instruction-set compatible CPU (all 255 defined opcodes).
//
// The chip is built around a core that runs the standard 8051 instruction set
// unchanged; how the core is built inside is this design's own. It is a
// multi-cycle sequencer: one clock per instruction byte fetched, then one
// execute clock (S_EX). MOV dir,dir (so that the SFR bus carries one address
// per clock), LCALL/ACALL, RET/RETI, MOVC, MOVX reads and interrupt
// entry take one or two clocks more. A one-byte instruction takes 2 clocks,
// a three-byte one 4; the standard part needs 12 clocks or more.
//
// Program memory port: synchronous read. The core drives code_addr with the
// value the PC will hold after the clock edge, so code_rdata always holds the
// byte at the current PC; it needs no extra fetch cycle except for a jump.
// The core holds ACC, B, PSW, SP and DPTR. All other SFRs are reached over the
// SFR port: sfr_addr/sfr_rd with sfr_rdata returned in the same cycle, and
// sfr_we/sfr_wdata latched at the end of that cycle. sfr_bus_addr is the single
// address of the clock, for a bus that carries one. sfr_rmw marks the
// read-modify-write instructions, whose port reads return the latch.
// The 256-byte internal RAM sits outside the core behind one write port and
// two asynchronous read ports: ri_* reads the pointer register R0/R1 of the
// active bank, rd_* is the general operand port.
// External data memory (MOVX): xaddr/xwe/xwdata (MOVX @Ri takes the high
// address byte from the P2 latch, as the 8051 does), and a synchronous read whose
// data in xrdata is taken one clock after xrd.
// Interrupts: irq/irq_vec from the interrupt controller are taken at an
// instruction boundary; irq_ack pulses when the vector is entered, irq_ret on
// RETI. The 8051 rule that one more instruction runs after RETI or a write to
// IE/IP is not modelled.
module mcs51_cpu
  import agri_pkg::*;
(
  input  logic        clk,
  input  logic        rst,          // synchronous, active high
  // program memory
  output logic [15:0] code_addr,
  input  logic [7:0]  code_rdata,
  // external data memory
  output logic [15:0] xaddr,
  output logic        xrd,
  output logic        xwe,
  output logic [7:0]  xwdata,
  input  logic [7:0]  xrdata,
  input  logic [7:0]  xpage,        // P2 latch: high address byte of MOVX @Ri
  // internal RAM
  output logic [7:0]  ri_addr,
  input  logic [7:0]  ri_rdata,
  output logic [7:0]  rd_addr,
  input  logic [7:0]  rd_rdata,
  output logic        iram_we,
  output logic [7:0]  iram_waddr,
  output logic [7:0]  iram_wdata,
  // SFR bus to everything outside the core's own registers
  output logic [7:0]  sfr_addr,
  output logic        sfr_rd,
  output logic        sfr_rmw,
  input  logic [7:0]  sfr_rdata,
  output logic        sfr_we,
  output logic [7:0]  sfr_waddr,
  output logic [7:0]  sfr_wdata,
  output logic [7:0]  sfr_bus_addr, // the one SFR address of this clock
  // interrupts
  input  logic        irq,
  input  logic [2:0]  irq_vec,      // vector = 8*irq_vec + 3
  output logic        irq_ack,
  output logic        irq_ret,
  // status
  output logic [15:0] pc_o,
  output logic        insn_start    // high in the clock an opcode is taken
);

  cpu_state_e state, state_n;
  logic [15:0] pc, pc_n, dptr, dptr_n;
  logic [7:0]  ir, ir_n, b1, b1_n, b2, b2_n;
  logic [7:0]  acc, acc_n, breg, breg_n, psw, psw_n, sp, sp_n;
  logic [7:0]  tmp, tmp_n;          // second operand kept between execute clocks
  logic        parity;

  assign parity = ^acc;
  assign pc_o   = pc;

  // ------------------------------------------------------------------
  // Operand addressing (depends only on registered state)
  // ------------------------------------------------------------------
  logic [7:0] loc_addr;   logic loc_sfr;     // source / read-modify-write location
  logic [7:0] dst_addr;   logic dst_sfr;     // destination if different
  logic [7:0] rn_addr;
  logic [2:0] bitsel;
  logic       is_bitop;

  assign rn_addr = {3'b000, psw[4:3], ir[2:0]};
  assign ri_addr = {3'b000, psw[4:3], 2'b00, ir[0]};
  assign bitsel  = b1[2:0];

  always_comb begin
    is_bitop = (ir == 8'h10 || ir == 8'h20 || ir == 8'h30 || ir == 8'h72 || ir == 8'h82 ||
                ir == 8'h92 || ir == 8'hA2 || ir == 8'hB2 || ir == 8'hC2 || ir == 8'hD2 ||
                ir == 8'hA0 || ir == 8'hB0);
    // standard operand of columns 5..F
    if (ir[3:0] == 4'h5 || ir[3:0] == 4'h2 || ir[3:0] == 4'h3) begin
      loc_addr = b1; loc_sfr = b1[7];
    end else if (ir[3:1] == 3'b011) begin
      loc_addr = ri_rdata; loc_sfr = 1'b0;
    end else begin
      loc_addr = rn_addr; loc_sfr = 1'b0;
    end
    dst_addr = loc_addr; dst_sfr = loc_sfr;
    if (is_bitop) begin
      loc_addr = bit_byte(b1); loc_sfr = b1[7]; dst_addr = loc_addr; dst_sfr = loc_sfr;
    end else if (ir == 8'h85) begin                       // MOV dir,dir (src, dst)
      loc_addr = b1; loc_sfr = b1[7]; dst_addr = b2; dst_sfr = b2[7];
    end else if (ir[7:4] == 4'h8 && ir[3:0] >= 4'h6) begin // MOV dir,R
      dst_addr = b1; dst_sfr = b1[7];
    end else if (ir[7:4] == 4'hA && ir[3:0] >= 4'h6) begin // MOV R,dir
      loc_addr = b1; loc_sfr = b1[7];
    end else if (ir == 8'hC0) begin                       // PUSH dir
      loc_addr = b1; loc_sfr = b1[7]; dst_addr = sp + 8'd1; dst_sfr = 1'b0;
    end else if (ir == 8'hD0) begin                       // POP dir
      loc_addr = sp; loc_sfr = 1'b0; dst_addr = b1; dst_sfr = b1[7];
    end else if (ir == 8'h22 || ir == 8'h32) begin        // RET / RETI
      loc_addr = sp; loc_sfr = 1'b0;
    end
  end

  assign rd_addr  = loc_addr;
  assign sfr_addr = loc_addr;
  assign sfr_rd   = (state == S_EX) && loc_sfr;
  // Read and write address of a clock coincide, except for MOV dir,dir,
  // which reads in S_EX and writes in S_EX2. Decoded without the read data.
  assign sfr_bus_addr = (ir == 8'h85) ? ((state == S_EX2) ? b2 : b1) :
                        (loc_sfr ? loc_addr : dst_addr);
  assign sfr_rmw  = (ir == 8'h42 || ir == 8'h43 || ir == 8'h52 || ir == 8'h53 ||
                     ir == 8'h62 || ir == 8'h63 || ir == 8'h05 || ir == 8'h15 ||
                     ir == 8'hD5 || ir == 8'h10 || ir == 8'h92 || ir == 8'hB2 ||
                     ir == 8'hC2 || ir == 8'hD2);

  // operand value: core registers, other SFRs, or internal RAM
  logic [7:0] opv;
  always_comb begin
    if (loc_sfr) begin
      unique case (loc_addr)
        SFR_ACC: opv = acc;
        SFR_B:   opv = breg;
        SFR_PSW: opv = {psw[7:1], parity};
        SFR_SP:  opv = sp;
        SFR_DPL: opv = dptr[7:0];
        SFR_DPH: opv = dptr[15:8];
        default: opv = sfr_rdata;
      endcase
    end else begin
      opv = rd_rdata;
    end
  end

  // ------------------------------------------------------------------
  // Execute
  // ------------------------------------------------------------------
  logic [7:0]  imm;          // immediate of # instructions
  logic [7:0]  rel;          // relative offset
  logic [15:0] pc_rel;
  logic        opbit;
  logic [8:0]  sum9;
  logic        ac_f, ov_f, cy;
  logic [7:0]  aluin;
  logic [15:0] prod;
  logic [7:0]  da_t;
  logic        da_c;
  logic        we; logic [7:0] wa; logic wsfr; logic [7:0] wd;
  logic [15:0] caddr;

  assign cy = psw[7];

  always_comb begin
    state_n = state; pc_n = pc; dptr_n = dptr;
    ir_n = ir; b1_n = b1; b2_n = b2;
    acc_n = acc; breg_n = breg; psw_n = psw; sp_n = sp; tmp_n = tmp;
    we = 1'b0; wa = dst_addr; wsfr = dst_sfr; wd = 8'h00;
    xaddr = dptr; xrd = 1'b0; xwe = 1'b0; xwdata = acc;
    irq_ack = 1'b0; irq_ret = 1'b0;
    caddr = 16'h0; insn_start = 1'b0;
    sum9 = 9'h0; ac_f = 1'b0; ov_f = 1'b0; prod = 16'h0;
    da_t = 8'h00; da_c = 1'b0;

    // immediate and relative byte positions
    imm = b1;
    if (ir == 8'h43 || ir == 8'h53 || ir == 8'h63 || ir == 8'h75) imm = b2;
    rel = b1;
    if (ir == 8'h10 || ir == 8'h20 || ir == 8'h30 || ir == 8'hB4 || ir == 8'hB5 ||
        ir == 8'hD5 || (ir[7:4] == 4'hB && ir[3:0] >= 4'h6)) rel = b2;
    pc_rel = pc + {{8{rel[7]}}, rel};
    opbit = opv[bitsel];
    // second ALU operand: immediate for column 4, memory otherwise
    aluin = (ir[3:0] == 4'h4) ? imm : opv;

    unique case (state)
      S_RESET: state_n = S_OP;

      S_OP: begin
        if (irq) begin
          state_n = S_INT1;
        end else begin
          insn_start = 1'b1;
          ir_n = code_rdata;
          pc_n = pc + 16'd1;
          state_n = (op_len(code_rdata) == 2'd1) ? S_EX : S_B1;
        end
      end

      S_B1: begin
        b1_n = code_rdata; pc_n = pc + 16'd1;
        state_n = (op_len(ir) == 2'd3) ? S_B2 : S_EX;
      end

      S_B2: begin
        b2_n = code_rdata; pc_n = pc + 16'd1;
        state_n = S_EX;
      end

      S_EX: begin
        state_n = S_OP;
        // ---- arithmetic / logic rows 2..6, 9 on columns 4..F ----
        if (ir[3:0] >= 4'h4 && (ir[7:4] inside {4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h9})) begin
          unique case (ir[7:4])
            4'h2, 4'h3: begin                                     // ADD, ADDC
              sum9 = {1'b0, acc} + {1'b0, aluin} + {8'h0, (ir[4] & cy)};
              ac_f = ({1'b0, acc[3:0]} + {1'b0, aluin[3:0]} + {4'h0, (ir[4] & cy)}) > 5'h0F;
              ov_f = (acc[7] == aluin[7]) && (sum9[7] != acc[7]);
              acc_n = sum9[7:0];
              psw_n[7] = sum9[8]; psw_n[6] = ac_f; psw_n[2] = ov_f;
            end
            4'h9: begin                                           // SUBB
              sum9 = {1'b0, acc} - {1'b0, aluin} - {8'h0, cy};
              ac_f = {1'b0, acc[3:0]} < ({1'b0, aluin[3:0]} + {4'h0, cy});
              ov_f = (acc[7] != aluin[7]) && (sum9[7] != acc[7]);
              acc_n = sum9[7:0];
              psw_n[7] = sum9[8]; psw_n[6] = ac_f; psw_n[2] = ov_f;
            end
            4'h4: acc_n = acc | aluin;
            4'h5: acc_n = acc & aluin;
            default: acc_n = acc ^ aluin;                          // 4'h6
          endcase
        end else begin
          unique casez (ir)
            8'h00: ;                                               // NOP
            8'b???0_0001: pc_n = {pc[15:11], ir[7:5], b1};         // AJMP
            8'b???1_0001: begin                                    // ACALL
              tmp_n = b1; we = 1'b1; wa = sp + 8'd1; wsfr = 1'b0; wd = pc[7:0];
              state_n = S_EX2;
            end
            8'h02: pc_n = {b1, b2};                                // LJMP
            8'h12: begin                                           // LCALL
              we = 1'b1; wa = sp + 8'd1; wsfr = 1'b0; wd = pc[7:0];
              state_n = S_EX2;
            end
            8'h22, 8'h32: begin                                    // RET, RETI
              pc_n = {opv, pc[7:0]}; sp_n = sp - 8'd1;
              state_n = S_EX2;
            end
            8'h42, 8'h52, 8'h62: begin                             // ORL/ANL/XRL dir,A
              we = 1'b1;
              wd = (ir[5:4] == 2'b00) ? (opv | acc) : (ir[5:4] == 2'b01) ? (opv & acc) : (opv ^ acc);
            end
            8'h43, 8'h53, 8'h63: begin                             // ORL/ANL/XRL dir,#
              we = 1'b1;
              wd = (ir[5:4] == 2'b00) ? (opv | imm) : (ir[5:4] == 2'b01) ? (opv & imm) : (opv ^ imm);
            end
            8'h72: psw_n[7] = cy | opbit;                          // ORL C,bit
            8'h82: psw_n[7] = cy & opbit;                          // ANL C,bit
            8'hA0: psw_n[7] = cy | ~opbit;                         // ORL C,/bit
            8'hB0: psw_n[7] = cy & ~opbit;                         // ANL C,/bit
            8'hA2: psw_n[7] = opbit;                               // MOV C,bit
            8'h92, 8'hB2, 8'hC2, 8'hD2: begin                      // MOV bit,C / CPL / CLR / SETB
              we = 1'b1; wd = opv;
              unique case (ir[7:4])
                4'h9:    wd[bitsel] = cy;
                4'hB:    wd[bitsel] = ~opbit;
                4'hC:    wd[bitsel] = 1'b0;
                default: wd[bitsel] = 1'b1;
              endcase
            end
            8'h10: if (opbit) begin                                // JBC
              pc_n = pc_rel; we = 1'b1; wd = opv; wd[bitsel] = 1'b0;
            end
            8'h20: if (opbit)  pc_n = pc_rel;                      // JB
            8'h30: if (!opbit) pc_n = pc_rel;                      // JNB
            8'h40: if (cy)  pc_n = pc_rel;                         // JC
            8'h50: if (!cy) pc_n = pc_rel;                         // JNC
            8'h60: if (acc == 8'h00) pc_n = pc_rel;                // JZ
            8'h70: if (acc != 8'h00) pc_n = pc_rel;                // JNZ
            8'h80: pc_n = pc_rel;                                  // SJMP
            8'h90: dptr_n = {b1, b2};                              // MOV DPTR,#
            8'hC0: begin                                           // PUSH
              we = 1'b1; wd = opv; sp_n = sp + 8'd1;
            end
            8'hD0: begin                                           // POP
              we = 1'b1; wd = opv; sp_n = sp - 8'd1;
            end
            8'hE0, 8'hE2, 8'hE3: begin                             // MOVX A,@DPTR / @Ri
              xrd = 1'b1;
              if (ir != 8'hE0) xaddr = {xpage, ri_rdata};
              state_n = S_XRD;
            end
            8'hF0, 8'hF2, 8'hF3: begin                             // MOVX @DPTR / @Ri,A
              xwe = 1'b1;
              if (ir != 8'hF0) xaddr = {xpage, ri_rdata};
            end
            8'h03: acc_n = {acc[0], acc[7:1]};                     // RR A
            8'h13: begin acc_n = {cy, acc[7:1]}; psw_n[7] = acc[0]; end   // RRC A
            8'h23: acc_n = {acc[6:0], acc[7]};                     // RL A
            8'h33: begin acc_n = {acc[6:0], cy}; psw_n[7] = acc[7]; end   // RLC A
            8'h73: pc_n = dptr + {8'h00, acc};                     // JMP @A+DPTR
            8'h83, 8'h93: begin                                    // MOVC A,@A+PC / @A+DPTR
              caddr = ((ir == 8'h83) ? pc : dptr) + {8'h00, acc};
              state_n = S_MOVC;
            end
            8'hA3: dptr_n = dptr + 16'd1;                          // INC DPTR
            8'hB3: psw_n[7] = ~cy;                                 // CPL C
            8'hC3: psw_n[7] = 1'b0;                                // CLR C
            8'hD3: psw_n[7] = 1'b1;                                // SETB C
            8'h04: acc_n = acc + 8'd1;                             // INC A
            8'h14: acc_n = acc - 8'd1;                             // DEC A
            8'h74: acc_n = imm;                                    // MOV A,#
            8'h84: begin                                           // DIV AB
              psw_n[7] = 1'b0;
              if (breg == 8'h00) psw_n[2] = 1'b1;
              else begin
                acc_n = acc / breg; breg_n = acc % breg; psw_n[2] = 1'b0;
              end
            end
            8'hA4: begin                                           // MUL AB
              prod = acc * breg;
              acc_n = prod[7:0]; breg_n = prod[15:8];
              psw_n[7] = 1'b0; psw_n[2] = (prod[15:8] != 8'h00);
            end
            8'hB4, 8'hB5, 8'b1011_011?, 8'b1011_1???: begin         // CJNE
              logic [7:0] x, y;
              if (ir == 8'hB4)      begin x = acc; y = b1;  end
              else if (ir == 8'hB5) begin x = acc; y = opv; end
              else                  begin x = opv; y = b1;  end
              psw_n[7] = (x < y);
              if (x != y) pc_n = pc_rel;
            end
            8'hC4: acc_n = {acc[3:0], acc[7:4]};                   // SWAP A
            8'hD4: begin                                           // DA A
              {da_c, da_t} = {1'b0, acc};
              if (acc[3:0] > 4'd9 || psw[6]) {da_c, da_t} = {1'b0, acc} + 9'h006;
              da_c = da_c | cy;
              if (da_t[7:4] > 4'd9 || da_c) begin
                {da_c, da_t} = {1'b0, da_t} + 9'h060;
                da_c = 1'b1;
              end
              acc_n = da_t; psw_n[7] = da_c;
            end
            8'hE4: acc_n = 8'h00;                                  // CLR A
            8'hF4: acc_n = ~acc;                                   // CPL A
            8'h05, 8'b0000_011?, 8'b0000_1???: begin               // INC loc
              we = 1'b1; wd = opv + 8'd1;
            end
            8'h15, 8'b0001_011?, 8'b0001_1???: begin               // DEC loc
              we = 1'b1; wd = opv - 8'd1;
            end
            8'h75, 8'b0111_011?, 8'b0111_1???: begin               // MOV loc,#
              we = 1'b1; wd = imm;
            end
            8'h85: begin                                           // MOV dir,dir: read now,
              tmp_n = opv; state_n = S_EX2;                        // write next clock
            end
            8'b1000_011?, 8'b1000_1???,                            // MOV dir,loc
            8'b1010_011?, 8'b1010_1???: begin                      // MOV loc,dir
              we = 1'b1; wd = opv;
            end
            8'hC5, 8'b1100_011?, 8'b1100_1???: begin               // XCH A,loc
              we = 1'b1; wd = acc; acc_n = opv;
            end
            8'b1101_011?: begin                                    // XCHD A,@Ri
              we = 1'b1; wd = {opv[7:4], acc[3:0]}; acc_n = {acc[7:4], opv[3:0]};
            end
            8'hD5, 8'b1101_1???: begin                             // DJNZ loc,rel
              we = 1'b1; wd = opv - 8'd1;
              if (opv != 8'd1) pc_n = pc_rel;
            end
            8'hE5, 8'b1110_011?, 8'b1110_1???: acc_n = opv;        // MOV A,loc
            8'hF5, 8'b1111_011?, 8'b1111_1???: begin               // MOV loc,A
              we = 1'b1; wd = acc;
            end
            default: ;                                             // A5: reserved, NOP
          endcase
        end
      end

      S_EX2: begin
        state_n = S_OP;
        if (ir == 8'h22 || ir == 8'h32) begin                      // second pop
          pc_n = {pc[15:8], opv}; sp_n = sp - 8'd1;
          if (ir == 8'h32) irq_ret = 1'b1;
        end else if (ir == 8'h85) begin                            // MOV dir,dir write
          we = 1'b1; wd = tmp;
        end else begin                                             // second push of a call
          we = 1'b1; wa = sp + 8'd2; wsfr = 1'b0; wd = pc[15:8];
          sp_n = sp + 8'd2;
          pc_n = (ir == 8'h12) ? {b1, b2} : {pc[15:11], ir[7:5], tmp};
        end
      end

      S_MOVC: begin                                                // code byte arrives
        acc_n = code_rdata; state_n = S_OP;
      end

      S_XRD: begin                                                 // xdata byte arrives
        acc_n = xrdata; state_n = S_OP;
      end

      S_INT1: begin                                                // push PC low
        we = 1'b1; wa = sp + 8'd1; wsfr = 1'b0; wd = pc[7:0];
        state_n = S_INT2;
      end

      S_INT2: begin                                                // push PC high, vector
        we = 1'b1; wa = sp + 8'd2; wsfr = 1'b0; wd = pc[15:8];
        sp_n = sp + 8'd2;
        pc_n = {10'h0, irq_vec, 3'b011};
        irq_ack = 1'b1;
        state_n = S_OP;
      end

      default: state_n = S_OP;
    endcase

    // writes that land on the core's own SFRs
    if (we && wsfr) begin
      unique case (wa)
        SFR_ACC: acc_n = wd;
        SFR_B:   breg_n = wd;
        SFR_PSW: psw_n = {wd[7:1], 1'b0};
        SFR_SP:  sp_n = wd;
        SFR_DPL: dptr_n[7:0] = wd;
        SFR_DPH: dptr_n[15:8] = wd;
        default: ;
      endcase
    end

    code_addr = (state == S_EX && (ir == 8'h83 || ir == 8'h93)) ? caddr : pc_n;
  end

  assign iram_we    = we && !wsfr;
  assign iram_waddr = wa;
  assign iram_wdata = wd;
  assign sfr_we     = we && wsfr;
  assign sfr_waddr  = wa;
  assign sfr_wdata  = wd;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_RESET; pc <= 16'h0000; dptr <= 16'h0000;
      ir <= 8'h00; b1 <= 8'h00; b2 <= 8'h00;
      acc <= 8'h00; breg <= 8'h00; psw <= 8'h00; sp <= 8'h07; tmp <= 8'h00;
    end else begin
      state <= state_n; pc <= pc_n; dptr <= dptr_n;
      ir <= ir_n; b1 <= b1_n; b2 <= b2_n;
      acc <= acc_n; breg <= breg_n; psw <= psw_n; sp <= sp_n; tmp <= tmp_n;
    end
  end

  // a write and an instruction fetch never share a clock
  a_no_write_in_fetch: assert property (@(posedge clk) disable iff (rst)
                                        (state == S_OP) |-> !(iram_we || sfr_we || xwe));

endmodule
