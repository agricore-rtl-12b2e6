// clock_switch: glitch-free switch between two clocks, the "Clock Switch"
// of the clock controller, selecting the PLL clock (clk1, select=1) or the
// oscillator clock (clk0, select=0) as the master clock.
// Structure as in the chip's schematic, gate by gate: each clock has a
// two-flop chain, the first flop on its rising edge (DFF_CK10/DFF_CK00), the
// second on its falling edge (DFF_CK11/DFF_CK01, through INV_CK1/INV_CK0).
// A chain may only turn on when the other chain's second flop is off
// (AND_10/AND_00 take the other chain's QN), and its clock reaches the output
// through AND_11/AND_01 and OR_CKOUT. So on a change of select the old clock
// is stopped while low, and the new one starts, while low, only after that;
// the output never carries a shortened pulse. A change takes about two
// cycles of the old clock and two of the new one.
// The asynchronous active-low reset of the four flops is this design's
// addition (the schematic draws none); after reset the side named by
// select comes up by itself. The on1 output (DFF_CK11's Q) is also an
// addition: it tells the PLL control that clk1 is still in use, since the
// switch can only leave a clock that is still running.
module clock_switch (
  input  logic rst_n,
  input  logic select,
  input  logic clk0,
  input  logic clk1,
  output logic clk_out,
  output logic on1          // clk1 still reaches the output (DFF_CK11 set)
);
  logic q10, q11, q00, q01;
  logic d10, d00;

  assign d10 = select & ~q01;      // AND_10 (QN of DFF_CK01)
  assign d00 = ~select & ~q11;     // INV_SEL, AND_00 (QN of DFF_CK11)

  always_ff @(posedge clk1 or negedge rst_n) if (!rst_n) q10 <= 1'b0; else q10 <= d10;  // DFF_CK10
  always_ff @(negedge clk1 or negedge rst_n) if (!rst_n) q11 <= 1'b0; else q11 <= q10;  // DFF_CK11
  always_ff @(posedge clk0 or negedge rst_n) if (!rst_n) q00 <= 1'b0; else q00 <= d00;  // DFF_CK00
  always_ff @(negedge clk0 or negedge rst_n) if (!rst_n) q01 <= 1'b0; else q01 <= q00;  // DFF_CK01

  assign clk_out = (clk1 & q11) | (clk0 & q01);   // AND_11, AND_01, OR_CKOUT
  assign on1     = q11;
endmodule
