# AgriCore: an 8051-compatible microcontroller SoC for agricultural sensor nodes

AgriCore is a small system-on-chip for sensor nodes in precision agriculture.
Examples are soil-moisture or air-temperature probes that sample an analog
sensor, store readings in serial flash and hand them to a radio. The chip is
built around a processor that runs the standard 8051 instruction set unchanged.
That keeps the large body of existing 8051 tools and code usable.

Everything else hangs off two buses:

* **Memory bus.** It carries the on-chip memories: an 8 KB startup ROM, a
  64 KB program RAM and a 64 KB data RAM.
* **Extension SFR bus.** The chip's own peripherals sit here: system control,
  watchdog, ADC controller, PWM, RTC and SPI flash host. This bus is the
  8051's special-function-register space, brought out of the core.

At power-up the core runs a serial boot loader from ROM. The loader copies a
program into program RAM and then flips a memory-map register. That register
restarts the CPU, which now runs the downloaded program from address 0.

This repository holds synthesizable SystemVerilog for all of the digital logic:

* the CPU
* the internal and extension SFR blocks
* the memory map
* reset and clock generation, including a gate-level glitch-free clock switch
* the peripherals

The analog parts are not here: the oscillators, PLL, ADC converter, regulator
and pads. Their signals are ports of the top module, `agricore_soc`.

```
                 +---------------------------- agricore_soc -------------------------------+
 rst_n --------->| reset_gen --(sys_rst: all logic)--(cpu_rst: core only, also after REMAP=1) |
 rc_clk, xtal_clk| clock_gen: RC/4 | CLKSEL mux -> pll_ref ; clock_switch(osc, pll_clk) ->   |
 pll_clk ------->|            master divider -> CLK ; PWM divider -> CLKPWM ; /8 -> clkadc  |
                 |                                                                         |
                 |  mcu_core                                  extension SFR bus (7-bit)    |
                 |  +-------------------------------------+   +--------------------------+ |
                 |  | agricore: mcs51_cpu + gpio_ports    |-->| sfr_decoder              | |
 p_in/p_out <--->|  |   + timer01 + timer2 + uart51       |   |  sysctl_regs (E9 EA F1 F2)| |
                 |  |   + intc51                          |<--|  watchdog (A9 AA)        | |
                 |  | iram256 (256 B)                     |   |  pwm4     (A2..A7)       |-+-> pwm_out
                 |  | mem_map -- boot_rom 8 KB            |   |  adc_ctrl (B1..B3)       |-+-> adc_*
                 |  |         -- sp_ram 64 KB (program)   |   |  rtc      (B4..B7)       | |
                 |  |         -- sp_ram 64 KB (data)      |   |  spi_host (C1..C3)       |-+-> spi_*
                 |  +-------------------------------------+   +--------------------------+ |
                 +-------------------------------------------------------------------------+
```

## The processor and its timing

`mcs51_cpu` decodes all 255 defined 8051 opcodes. `A5` is treated as a NOP.
Flags, bit addressing, register banks, stack and the three MOVC/MOVX forms
behave as on the standard part. The core is a multi-cycle sequencer with
these states (`cpu_state_e` in `agri_pkg`):

| state | what happens |
|---|---|
| `S_OP` | opcode byte present, decoded; PC advances |
| `S_B1`, `S_B2` | second and third instruction bytes latched |
| `S_EX` | execute: operand read, ALU, one register write |
| `S_EX2` | second step of `MOV dir,dir`, `LCALL`/`ACALL` (second push), `RET`/`RETI` (second pop) |
| `S_MOVC`, `S_XRD` | the byte from code memory / external data memory arrives |
| `S_INT1`, `S_INT2` | interrupt entry: push PC low, push PC high and jump to the vector |

So a one-byte instruction takes 2 clocks and a three-byte one 4, plus one for
the cases in the `S_EX2` row. The standard 8051 needs 12 clocks or more.

**Code fetch.** The core has no wait states on synchronous memories. It drives
`code_addr` with the value the PC *will* hold after the clock edge. The
memory's registered output therefore always shows the byte at the current PC.
A jump costs no refetch, because the new PC goes out on `code_addr` in the
same cycle the jump is decided.

**Internal RAM.** The 256-byte internal RAM (`iram256`) is outside the core.
It has two asynchronous read ports:

* one for the operand
* one that always shows R0/R1 of the active bank, for `@Ri`

It has one write port. The core writes at most one byte of internal RAM or
one SFR per clock. An assertion checks that no write happens in the fetch
state.

**Interrupts.** Interrupts are taken at instruction boundaries. `intc51` has
six sources: INT0, T0, INT1, T1, serial and T2. Their vectors are 03h + 8n.
There are two priority levels, set by `IP`. The controller tracks which level
is in service and releases it on `RETI`.

## SFR space: internal registers and the extension bus

The SFR space is split in two:

* **Standard 8051/8052 SFRs.** The core itself holds ACC, B, PSW, SP and DPTR.
  Ports, timers, serial port and interrupt registers live in `agricore`, on an
  internal 8-bit SFR bus. The package function `is_core_sfr()` lists them.
* **Every other address** goes out on the extension bus. That bus carries only
  the low **7 address bits**, since SFRs occupy 80h–FFh by definition. It has
  these signals:
  * `ext_addr[6:0]`
  * `sfr_read_str`, active low
  * read data returned combinationally in the same clock
  * `sfr_load`, active high; the write data is taken at the end of the clock

`sfr_decoder` turns the 7-bit address into one select per device. It gates
`sfr_load` with that select and ORs the read data back together. Each
peripheral returns 0 when it is not addressed. An assertion checks that at
most one device is selected.

`MOV dir,dir` between two SFRs takes two clocks, so the bus carries one
address per clock.

| address | register | bits |
|---|---|---|
| E9h | SW_RESET | [0] write 1: global chip reset (self-clearing); [6] PLL_SEL: 0 = oscillator, 1 = PLL as master clock; [7] CLKSEL pin, read only |
| EAh | REMAP | [0] 0: ROM at address 0; 1: program RAM at address 0. Writing 1 restarts the CPU |
| F1h | CLKCFG | [7] PLL_EN; [5:3] PWM clock divider; [2:0] master clock divider (code n divides by 2n, 0 = undivided) |
| F2h | PLLCFG | [6:0] PLL setting, reset 17h; PLL output = Fosc·(2+PLLCFG)/8 |
| A2h | PWM_CTRL | [3:0] channel enables |
| A3h | PWM_PER | counter runs 0..PER, one PWM cycle is PER+1 PWM clocks |
| A4h–A7h | PWM_D0..D3 | output i is high while count < Di |
| A9h | WDT_CTRL | [0] enable; [6:4] SEL: timeout after 2^(12+SEL) clocks |
| AAh | WDT_KICK | writing 5Ah restarts the count |
| B1h | ADC_CTRL | [2:0] channel; [6] write 1: start; [7] done (read only) |
| B2h/B3h | ADC_DL/ADC_DH | result [7:0] / [9:8] |
| B4h | RTC_CTRL | [0] run |
| B5h–B7h | RTC_SEC/MIN/HOUR | binary 0–59 / 0–59 / 0–23, writable |
| C1h | SPI_CTRL | [0] chip select (1 drives `spi_cs_n` low); [3:1] SEL: SCLK half period 2^SEL clocks |
| C2h | SPI_DATA | write: start an 8-bit transfer; read: byte received |
| C3h | SPI_STAT | [0] busy |

The first four registers are the chip's system-control registers, including
their bit positions and reset values. The addresses and layouts of the
peripheral registers (A2h–C3h) are this design's own. The only requirement
given for them was to use SFR addresses free in the 8051; the chosen addresses
are unused by the 8052.

## Memory map and the REMAP restart

`mem_map` routes three memories, with a 16-bit address each:

| REMAP | code fetch / MOVC | MOVX read and write |
|---|---|---|
| 0 (after reset) | 8 KB ROM (addresses wrap every 8 KB) | 64 KB program RAM |
| 1 | 64 KB program RAM | 64 KB data RAM |

With REMAP=0, the loader running from ROM can fill program RAM with ordinary
`MOVX @DPTR,A` writes.

Writing 1 to REMAP has two effects:

* The REMAP register changes.
* `reset_gen` gets a one-clock remap command and holds `cpu_rst` for 4 clocks.

`cpu_rst` resets the MCU core: CPU, internal RAM, ports, timers, UART and
interrupts. It does not reset the extension peripherals or REMAP itself. The
CPU then starts at address 0 of program RAM.

A global reset sets REMAP back to 0. Global resets come from three sources:

* the `rst_n` pin, through a two-flop synchroniser and a 4-clock stretch
* SW_RESET[0]
* a watchdog timeout

All memories are synchronous, with a single clock per access. `MOVX` reads
take one extra clock (`S_XRD`).

## Boot loader

`rtl/boot_rom.hex` holds a 72-byte loader, hand-assembled:

```
0000  75 98 50        MOV  SCON,#50h        ; mode 1, receiver on
0003  75 CB FF        MOV  RCAP2H,#0FFh
0006  75 CA FD        MOV  RCAP2L,#0FDh     ; Timer 2 baud: 96 clocks per bit
0009  75 CD FF        MOV  TH2,#0FFh
000C  75 CC FD        MOV  TL2,#0FDh
000F  75 C8 34        MOV  T2CON,#34h       ; RCLK, TCLK, TR2
0012  75 99 55        MOV  SBUF,#55h        ; query byte
0015  90 00 00        MOV  DPTR,#0000h
0018  12 00 40        LCALL RXB
001B  FF              MOV  R7,A             ; length, high byte
001C  12 00 40        LCALL RXB
001F  FE              MOV  R6,A             ; length, low byte
0020  EE 4F 60 0E     LOOP: MOV A,R6 / ORL A,R7 / JZ DONE
0024  12 00 40 F0 A3  LCALL RXB / MOVX @DPTR,A / INC DPTR
0029  EE 70 01 1F 1E  MOV A,R6 / JNZ +1 / DEC R7 / DEC R6   ; 16-bit count down
002E  80 F0           SJMP LOOP
0032  75 EA 01        DONE: MOV REMAP,#01h  ; CPU restarts in program RAM
0035  80 FE           SJMP $
0040  30 98 FD C2 98 E5 99 22   RXB: JNB RI,$ / CLR RI / MOV A,SBUF / RET
```

The host protocol works like this:

1. Wait for the byte 55h.
2. Send the program length as 16 bits, high byte first.
3. Send the program bytes.

A bit lasts 96 system clocks: 115200 baud at an 11.0592 MHz crystal.

The chip's full boot program does more than this loader. It can also burn
SPI flash. It can boot from SPI flash when no host answers within one second.
Neither is in this ROM, although the SPI host needed for them is in the RTL.
To change the loader, rewrite the hex file. It holds one byte per line and is
loaded with `$readmemh` from `rtl/boot_rom.hex`, relative to the directory the
simulator runs in.

## Clocks

`clock_gen` builds four clocks:

* **Oscillator clock.** The RC oscillator (about 32 MHz) divided by 4, or the
  crystal. The `CLKSEL` pin chooses: 1 = crystal. The result is also the PLL
  reference, `pll_ref`.
* **CLK, the master clock.** `clock_switch` picks the oscillator clock or
  `pll_clk`, following PLL_SEL. Its output passes through the master divider
  (CLKCFG[2:0]).
* **CLKPWM.** The oscillator clock through the PWM divider (CLKCFG[5:3]).
* **clkadc.** The oscillator clock divided by 8, for the ADC macro.

The 32.768 kHz input goes straight to the RTC. The RTC synchronises it into
CLK.

`clock_switch` is the classic glitch-free two-clock switch, written gate by
gate:

* The enable for each clock (`d10 = select & ~q01`, `d00 = ~select & ~q11`)
  needs the other side to be off.
* It then passes a flip-flop on the rising edge of its own clock and one on
  the falling edge.
* The outputs are ANDed with their clocks and ORed together.

This means one clock is always gated off, at a low level, before the other
turns on. It also means the switch can only leave a clock that is still
running.

That matters here. A global reset clears PLL_EN and PLL_SEL in the same clock.
If the PLL stopped at once, the switch would wait forever for a PLL edge to
release it, and the chip would hang in reset. So the top drives
`pll_en = PLL_EN | on1`, where `on1` means the PLL is still selected. The PLL
is powered down only after the switch has moved back to the oscillator. The
end-to-end test exercises exactly this path: PLL clock, then watchdog reset.

The dividers (`clk_div`) toggle a flip-flop, so every code except 0 gives a
50% duty cycle.

## Peripherals

* **Ports (`gpio_ports`).** Four 8-bit latches, reset to FFh, for 32 GPIO.
  `p_out` is the latch. `p_in` is the pad level; the pad is taken to be
  quasi-bidirectional. A normal read returns pin AND latch. Read-modify-write
  instructions read the latch.
* **Timer 0/1 (`timer01`).** TCON/TMOD and modes 0–3 with GATE. They count
  once every 12 clocks in timer mode, as on the standard 8051, even though this
  core's instructions are much shorter. In counter mode they count falling
  edges of T0/T1. INT0/INT1 are edge- or level-triggered. Timer 1 overflow
  also drives the UART baud clock.
* **Timer 2 (`timer2`).** The 8052 Timer 2: auto-reload, capture on T2EX, and
  baud-rate mode (counts every 2 clocks, overflow drives the UART).
* **UART (`uart51`).** SCON/SBUF/PCON.SMOD, modes 1–3, with a 16× sampling
  tick. TI is set when the stop bit begins. Mode 0 is not implemented.
* **Watchdog.** Counts CLK while enabled. A timeout is a one-clock pulse that
  `reset_gen` turns into a global reset, which also disables the watchdog.
* **PWM (`pwm4`).** The counter runs on CLKPWM. The registers are written on
  CLK and read as static settings without a handshake. Change them while the
  channel is disabled, or accept one irregular cycle.
* **ADC controller.**
  * A start raises `adc_start` and selects `adc_ch`.
  * The macro answers with `adc_eoc`, synchronised by two flip-flops. The
    controller then latches `adc_data[9:0]`, drops `adc_start` and sets done.
  * The macro must hold `adc_eoc` and the data until `adc_start` falls.
* **RTC.** PRESCALE rising edges of the 32 kHz clock make one second; the
  default is 32768. It keeps binary seconds, minutes and hours. The system
  clock must be more than twice the 32 kHz clock.
* **SPI host.** Mode 0, MSB first, 8 bits per transfer, 16·2^SEL clocks per
  byte. It is meant for an external serial flash.

## Outside the RTL

These parts are analog or physical. The top only brings out their signals:

| part | signals at the top |
|---|---|
| 32 MHz ring oscillator | `rc_clk` |
| crystal oscillator | `xtal_clk`, `clk32k_in` |
| PLL (25–500 MHz) | `pll_ref`, `pll_en`, `pll_cfg[6:0]`, `pll_clk` |
| 8-channel 10-bit SAR ADC | `clkadc`, `adc_ch`, `adc_start`, `adc_eoc`, `adc_data` |
| 1.8 V LDO, pad ring, LQFP100 package | no signals |

`tb/pll_model.sv` and `tb/adc_model.sv` are behavioural models used only by
the testbenches:

* The PLL model produces pll_ref·(2+cfg)/8 while enabled.
* The ADC model returns a preset level per channel after a fixed number of ADC
  clocks.

## Where this design departs from or adds to the specification

* **RC clock divider.** The divider is /4, not /2. A divide-by-2 of the
  32 MHz RC clock was also specified. But the clock diagram shows a divider of
  4, and the resulting clock is called 8 MHz, and 32/4 = 8.
* **Memory bus timing.** The bus uses single-cycle synchronous memories. The
  original bus waveforms allow slow memories over several clocks; that
  handshake is not reproduced.
* **BusMon.** The program-flow trace and breakpoint output is not built.
* **Boot program.** Only serial download-and-run is implemented. See *Boot
  loader*.
* **Peripheral register maps.** All peripheral register maps are this
  design's own: watchdog, PWM, ADC, RTC and SPI. Only the peripherals' names
  and sizes were given.
* **Watchdog reset.** A watchdog timeout is a global reset.
* **PLL power-down.** The PLL enable is held while the PLL is still selected.
* **UART.** Serial mode 0 is missing.
* **Interrupt timing.** The 8051 rule that one more instruction runs after
  RETI or an IE/IP write is not modelled.
* **Undocumented details.** These were chosen here:
  * instruction cycle counts
  * reset stretch length
  * synchronisers
  * port pin mapping: the standard 8051/8052 one, with RXD/TXD/INT0/INT1/T0/T1
    on P3 and T2/T2EX on P1.0/P1.1

## Verification

Each block has a self-checking testbench in `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

**Per-block tests.**

* `tb_mcs51_cpu` runs a hand-assembled program (`tb/cpu_test.hex`). It covers
  ALU and flags, DA, MUL/DIV, bit operations, all addressing modes, calls and
  returns, MOVC/MOVX, and Timer 0 and external interrupts. It checks 26
  results on P1 against values worked out by hand. It also checks the cycle
  counts of one-, two- and three-byte instructions.
* The timer, UART, clock divider, clock switch, clock generator, SPI and PWM
  tests measure their periods in clock cycles: 12-clock timer ticks, 96-clock
  bits, 2n division, 16·2^SEL SPI clocks, and so on.

**End to end.** `tb_agricore_soc` runs the whole chip with every parameter at
its default. It uses the behavioural PLL and ADC models and a small SPI slave.
The run goes like this:

1. It waits for the ROM's query byte.
2. It downloads a 142-byte test program over RXD.
3. REMAP=1 restarts the CPU in program RAM.
4. The program uses PWM, ADC, SPI and RTC, takes a Timer 0 interrupt and
   switches the master clock to the PLL.
5. It then lets the watchdog expire.
6. The bench checks that the chip came back through a global reset and sent
   its query again.

Each mechanism is counted, and the test fails if any count is zero. The
mechanisms are: query, receive, remap, ADC, SPI, PWM, RTC second, interrupt,
PLL clock and watchdog reset. The run takes about 10 s of wall time.

Simulate with Verilator 5, from the repository root (`rtl/agri_pkg.sv` sorts first in `rtl/*.sv`, so the
package is compiled before its users). The ROM image is found by
a path relative to that directory.

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_agricore_soc \
    rtl/*.sv tb/pll_model.sv tb/adc_model.sv tb/tb_agricore_soc.sv
./obj_dir/Vtb_agricore_soc
```

For a single block, replace the top module and the testbench file, for example
`--top-module tb_timer01 rtl/*.sv tb/tb_timer01.sv`. Some block testbenches
shorten long intervals by overriding parameters: the RTC prescaler, and the
watchdog base and counter width. The chip-level test does not.
