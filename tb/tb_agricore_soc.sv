// tb_agricore_soc: end-to-end run of the whole chip at its default sizes.
//
// Clocks: crystal period 10 (CLKSEL=1), RC oscillator period 4, a fast
// stand-in for the 32 kHz oscillator (period 80, so that an RTC second of
// 32768 edges fits in the run), the behavioural PLL model on the PLL pins,
// the behavioural ADC model on the ADC pins and an SPI flash-side slave.
// Sequence:
//  1. After reset the CPU runs the startup ROM: the bench must receive the
//     query byte 0x55 on TXD (P3.1, 96 clocks per bit).
//  2. The bench answers on RXD (P3.0) with a 16-bit length and a user
//     program, which the loader stores in program RAM (REMAP=0 data space).
//  3. The loader writes REMAP=1: the CPU alone restarts and runs the user
//     program from program RAM. It marks P1=0xA1, sets PWM channel 0 to 5/10,
//     converts ADC channel 3 (low byte to P2), exchanges a byte over SPI
//     (received byte to P0), starts the RTC, takes a Timer 0 interrupt,
//     enables the PLL and switches the master clock to it, waits for the first
//     RTC second, marks P1=0xA2 and enables the watchdog without kicking it.
//  4. The watchdog timeout resets the whole chip: REMAP returns to 0, the
//     clock returns to the crystal and the ROM sends its query byte again.
// Every mechanism (UART transmit and receive, remap restart, ADC, SPI, PWM,
// RTC second, interrupt, PLL clock switch, watchdog reset) is counted and
// must have happened.
module tb_agricore_soc;
  logic rst_n = 1'b0, rc_clk = 1'b0, xtal_clk = 1'b0, clk32k_in = 1'b0, clksel = 1'b1;
  logic pll_clk, pll_ref, pll_en;
  logic [6:0] pll_cfg;
  logic [31:0] p_in, p_out;
  logic [3:0] pwm_out;
  logic clkadc, adc_start, adc_eoc, spi_sclk, spi_mosi, spi_miso, spi_cs_n, clk_sys, cpu_rst_o;
  logic [2:0] adc_ch;
  logic [9:0] adc_data;
  logic [15:0] pc;
  logic [9:0] level [8];
  logic rx_line = 1'b1;
  logic [7:0] slave_tx, slave_rx;
  int checks = 0, failures = 0;
  int n_query = 0, n_rx_bytes = 0, n_remap = 0, n_adc = 0, n_spi = 0, n_pwm = 0, n_rtc = 0;
  int n_irq = 0, n_pll = 0, n_wdt = 0;
  int pwm_hi = 0, pwm_all = 0;
  realtime t_clk, per_clk;

  localparam int PROG_LEN = 142;
  localparam logic [7:0] PROG [PROG_LEN] = '{8'h02, 8'h00, 8'h40, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h05, 8'h30, 8'hC2, 8'h8C, 8'h32, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h75, 8'h90, 8'hA1, 8'h75, 8'hA3, 8'h09, 8'h75, 8'hA4, 8'h05, 8'h75, 8'hA2, 8'h01, 8'h75, 8'hB1, 8'h43, 8'hE5, 8'hB1, 8'h30, 8'hE7, 8'hFB, 8'hE5, 8'hB2, 8'hF5, 8'hA0, 8'h75, 8'hC1, 8'h01, 8'h75, 8'hC2, 8'h9F, 8'hE5, 8'hC3, 8'h20, 8'hE0, 8'hFB, 8'hE5, 8'hC2, 8'hF5, 8'h80, 8'h75, 8'hB4, 8'h01, 8'h75, 8'h89, 8'h01, 8'h75, 8'h8C, 8'hFF, 8'h75, 8'h8A, 8'hF0, 8'h75, 8'hA8, 8'h82, 8'hD2, 8'h8C, 8'hE5, 8'h30, 8'h60, 8'hFC, 8'h75, 8'hF1, 8'h80, 8'h75, 8'hE9, 8'h40, 8'hE5, 8'hB5, 8'h60, 8'hFC, 8'h75, 8'h90, 8'hA2, 8'h75, 8'hA9, 8'h01, 8'h80, 8'hFE};


  always #5 xtal_clk = ~xtal_clk;
  always #2 rc_clk = ~rc_clk;
  always #40 clk32k_in = ~clk32k_in;

  agricore_soc dut (.*);
  pll_model u_pll (.pll_ref, .pll_en, .pll_cfg, .pll_clk);
  adc_model u_adc (.clkadc, .adc_ch, .adc_start, .adc_eoc, .adc_data, .level);

  // quasi-bidirectional pads, pulled up; RXD driven by the bench
  assign p_in = p_out & {7'h7F, rx_line, 24'hFF_FFFF};

  // SPI slave: answers 0xC3
  assign spi_miso = slave_tx[7];
  always @(posedge spi_sclk) slave_rx = {slave_rx[6:0], spi_mosi};
  always @(negedge spi_sclk) slave_tx = {slave_tx[6:0], 1'b0};
  always @(negedge spi_cs_n) begin slave_tx = 8'hC3; n_spi++; end

  // mechanism monitors
  always @(posedge adc_start) n_adc++;
  always @(posedge pwm_out[0]) n_pwm++;
  always @(posedge clk_sys) begin
    per_clk = $realtime - t_clk; t_clk = $realtime;
    if (dut.u_rtc.sec_tick) n_rtc++;
    if (dut.u_core.irq_taken) n_irq++;
    if (dut.wdt_timeout) n_wdt++;
    if (dut.remap_cmd) n_remap++;
    if (dut.u_clkgen.u_switch.q11 && !dut.sys_rst) n_pll = n_pll + (per_clk < 9.0 ? 1 : 0);
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic uart_get(output logic [7:0] b);
    @(negedge p_out[25]);
    repeat (48) @(posedge clk_sys);
    chk(p_out[25] == 1'b0, "UART start bit");
    for (int i = 0; i < 8; i++) begin repeat (96) @(posedge clk_sys); b[i] = p_out[25]; end
    repeat (96) @(posedge clk_sys);
    chk(p_out[25] == 1'b1, "UART stop bit");
  endtask

  task automatic uart_put(input logic [7:0] b);
    rx_line = 1'b0; repeat (96) @(posedge clk_sys);
    for (int i = 0; i < 8; i++) begin rx_line = b[i]; repeat (96) @(posedge clk_sys); end
    rx_line = 1'b1; repeat (2 * 96) @(posedge clk_sys);
    n_rx_bytes++;
  endtask

  initial begin
    logic [7:0] q;
    t_clk = 0; per_clk = 10;
    for (int i = 0; i < 8; i++) level[i] = 10'(i * 100 + 31);
    #33 rst_n = 1'b1;
    // 1. query from the ROM loader
    uart_get(q); n_query++;
    chk(q == 8'h55, $sformatf("query byte %h", q));
    chk(dut.remap == 1'b0, "boot with ROM at 0");
    // 2. download
    uart_put(8'(PROG_LEN >> 8)); uart_put(8'(PROG_LEN));
    for (int i = 0; i < PROG_LEN; i++) uart_put(PROG[i]);
    // 3. user program
    wait (p_out[15:8] == 8'hA1);
    chk(dut.remap == 1'b1, "REMAP set by the loader");
    chk(n_remap == 1, "CPU restarted by REMAP");
    for (int i = 0; i < 16; i++)
      chk(dut.u_core.u_pram.mem[i] == PROG[i], $sformatf("program RAM byte %0d", i));
    wait (p_out[15:8] == 8'hA2);
    chk(p_out[23:16] == level[3][7:0], $sformatf("ADC result on P2: %h", p_out[23:16]));
    chk(p_out[7:0] == 8'hC3, $sformatf("SPI byte on P0: %h", p_out[7:0]));
    chk(slave_rx == 8'h9F, $sformatf("SPI byte sent: %h", slave_rx));
    chk(dut.u_core.u_iram.mem[8'h30] == 8'h01, "ISR ran once");
    repeat (200) @(posedge dut.u_pwm.clkpwm) begin pwm_all++; if (pwm_out[0]) pwm_hi++; end
    chk(pwm_hi == 100, $sformatf("PWM duty %0d/%0d", pwm_hi, pwm_all));
    chk(per_clk < 9.0, $sformatf("master clock on PLL, period %0t", per_clk));
    // 4. watchdog reset back into the ROM
    uart_get(q); n_query++;
    chk(q == 8'h55, "query after watchdog reset");
    chk(dut.remap == 1'b0 && dut.pll_sel == 1'b0, "global reset restored REMAP and clock");
    chk(n_query == 2 && n_rx_bytes == PROG_LEN + 2, "UART traffic");
    chk(n_remap >= 1, "remap restart happened");
    chk(n_adc >= 1, "ADC conversion happened");
    chk(n_spi >= 1, "SPI transfer happened");
    chk(n_pwm >= 1, "PWM output happened");
    chk(n_rtc >= 1, "RTC second happened");
    chk(n_irq >= 1, "interrupt happened");
    chk(n_pll >= 1, "PLL clock switch happened");
    chk(n_wdt >= 1, "watchdog reset happened");
    $display("mechanisms: query=%0d rx=%0d remap=%0d adc=%0d spi=%0d pwm=%0d rtc=%0d irq=%0d pll=%0d wdt=%0d",
             n_query, n_rx_bytes, n_remap, n_adc, n_spi, n_pwm, n_rtc, n_irq, n_pll, n_wdt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog: pc=%h p1=%h", pc, p_out[15:8]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
