// agri_pkg: SFR addresses, CPU state encoding and helper functions shared by
// the 8051-compatible core and the SoC peripherals.
//
// The standard 8051/8052 SFR addresses are those of the instruction-set
// compatible core. The system-control addresses 0xE9 (SW_RESET), 0xEA (REMAP),
// 0xF1 (CLKCFG) and 0xF2 (PLLCFG) and their reset values follow the chip
// description. The addresses of the watchdog, ADC, PWM, RTC and SPI registers
// are this design's own choice: they sit in SFR space left free by the 8052.
package agri_pkg;

  // ---- standard 8051 / 8052 SFRs ----
  localparam logic [7:0] SFR_P0     = 8'h80;
  localparam logic [7:0] SFR_SP     = 8'h81;
  localparam logic [7:0] SFR_DPL    = 8'h82;
  localparam logic [7:0] SFR_DPH    = 8'h83;
  localparam logic [7:0] SFR_PCON   = 8'h87;
  localparam logic [7:0] SFR_TCON   = 8'h88;
  localparam logic [7:0] SFR_TMOD   = 8'h89;
  localparam logic [7:0] SFR_TL0    = 8'h8A;
  localparam logic [7:0] SFR_TL1    = 8'h8B;
  localparam logic [7:0] SFR_TH0    = 8'h8C;
  localparam logic [7:0] SFR_TH1    = 8'h8D;
  localparam logic [7:0] SFR_P1     = 8'h90;
  localparam logic [7:0] SFR_SCON   = 8'h98;
  localparam logic [7:0] SFR_SBUF   = 8'h99;
  localparam logic [7:0] SFR_P2     = 8'hA0;
  localparam logic [7:0] SFR_IE     = 8'hA8;
  localparam logic [7:0] SFR_P3     = 8'hB0;
  localparam logic [7:0] SFR_IP     = 8'hB8;
  localparam logic [7:0] SFR_T2CON  = 8'hC8;
  localparam logic [7:0] SFR_RCAP2L = 8'hCA;
  localparam logic [7:0] SFR_RCAP2H = 8'hCB;
  localparam logic [7:0] SFR_TL2    = 8'hCC;
  localparam logic [7:0] SFR_TH2    = 8'hCD;
  localparam logic [7:0] SFR_PSW    = 8'hD0;
  localparam logic [7:0] SFR_ACC    = 8'hE0;
  localparam logic [7:0] SFR_B      = 8'hF0;

  // ---- system control (addresses and reset values from the chip description) ----
  localparam logic [7:0] SFR_SW_RESET = 8'hE9;
  localparam logic [7:0] SFR_REMAP    = 8'hEA;
  localparam logic [7:0] SFR_CLKCFG   = 8'hF1;
  localparam logic [7:0] SFR_PLLCFG   = 8'hF2;
  localparam logic [7:0] PLLCFG_RESET = 8'h17;

  // ---- extension peripherals (addresses chosen by this design) ----
  localparam logic [7:0] SFR_PWM_CTRL = 8'hA2;
  localparam logic [7:0] SFR_PWM_PER  = 8'hA3;
  localparam logic [7:0] SFR_PWM_D0   = 8'hA4;  // A4..A7: duty of channels 0..3
  localparam logic [7:0] SFR_WDT_CTRL = 8'hA9;
  localparam logic [7:0] SFR_WDT_KICK = 8'hAA;
  localparam logic [7:0] SFR_ADC_CTRL = 8'hB1;
  localparam logic [7:0] SFR_ADC_DL   = 8'hB2;
  localparam logic [7:0] SFR_ADC_DH   = 8'hB3;
  localparam logic [7:0] SFR_RTC_CTRL = 8'hB4;
  localparam logic [7:0] SFR_RTC_SEC  = 8'hB5;
  localparam logic [7:0] SFR_RTC_MIN  = 8'hB6;
  localparam logic [7:0] SFR_RTC_HOUR = 8'hB7;
  localparam logic [7:0] SFR_SPI_CTRL = 8'hC1;
  localparam logic [7:0] SFR_SPI_DATA = 8'hC2;
  localparam logic [7:0] SFR_SPI_STAT = 8'hC3;

  localparam logic [7:0] WDT_KICK_KEY = 8'h5A;

  // CPU sequencer states
  typedef enum logic [3:0] {
    S_RESET, S_OP, S_B1, S_B2, S_EX, S_EX2, S_MOVC, S_XRD, S_INT1, S_INT2
  } cpu_state_e;

  // Byte address holding bit address b: 0x20-0x2F for b < 0x80, else the
  // bit-addressable SFR at {b[7:3],000}.
  function automatic logic [7:0] bit_byte(input logic [7:0] b);
    return b[7] ? {b[7:3], 3'b000} : (8'h20 + {4'h0, b[6:3]});
  endfunction

  // SFRs served inside the 8051 core; every other SFR address goes out on the
  // extension SFR bus.
  function automatic logic is_core_sfr(input logic [7:0] a);
    return a inside {SFR_P0, SFR_SP, SFR_DPL, SFR_DPH, SFR_PCON, SFR_TCON, SFR_TMOD,
                     SFR_TL0, SFR_TL1, SFR_TH0, SFR_TH1, SFR_P1, SFR_SCON, SFR_SBUF,
                     SFR_P2, SFR_IE, SFR_P3, SFR_IP, SFR_T2CON, SFR_RCAP2L, SFR_RCAP2H,
                     SFR_TL2, SFR_TH2, SFR_PSW, SFR_ACC, SFR_B};
  endfunction

  // Length in bytes of an 8051 instruction, from its opcode.
  function automatic logic [1:0] op_len(input logic [7:0] op);
    logic [3:0] c;
    c = op[3:0];
    if (op == 8'h02 || op == 8'h12 || op == 8'h10 || op == 8'h20 || op == 8'h30 ||
        op == 8'h43 || op == 8'h53 || op == 8'h63 || op == 8'h75 || op == 8'h85 ||
        op == 8'h90 || op == 8'hB4 || op == 8'hB5 || op == 8'hD5 ||
        (op[7:4] == 4'hB && c >= 4'h6))
      return 2'd3;
    if (c == 4'h1) return 2'd2;                            // AJMP / ACALL
    if (c == 4'h0) return (op == 8'h00 || op >= 8'hE0) ? 2'd1 :
                          (op == 8'hE0 || op == 8'hF0) ? 2'd1 : 2'd2;
    if (c == 4'h2) return (op == 8'h02 || op == 8'h12 || op == 8'h22 || op == 8'h32 ||
                           op == 8'hE2 || op == 8'hF2) ? 2'd1 : 2'd2;
    if (c == 4'h3) return (op == 8'h43 || op == 8'h53 || op == 8'h63) ? 2'd3 : 2'd1;
    if (c == 4'h4) return (op[7:4] >= 4'h2 && op[7:4] <= 4'h9 && op != 8'h84) ? 2'd2 : 2'd1;
    if (c == 4'h5) return 2'd2;
    // columns 6..F: @Ri / Rn
    if (op[7:4] == 4'h7 || op[7:4] == 4'h8 || op[7:4] == 4'hA) return 2'd2;
    if (op[7:4] == 4'hD && c >= 4'h8) return 2'd2;         // DJNZ Rn,rel
    return 2'd1;
  endfunction

endpackage
