// tpl_clock_gater: integrated clock gate for one of the three clock trees.
//
// A latch that is transparent while clk is low captures the enable, and an
// AND gate passes clk only when the latched enable is high. Because the
// enable is held through the high phase, the gated clock never glitches. One
// gater sits on each of ClkA, ClkB and ClkC, all fed by the same enable; the
// skew between the clocks means a transient on that enable can be caught by at
// most one of the three, which the flip-flop vote then removes.
//
// Interface: clk, en -> gclk_out. en must settle before clk rises and be held
// until clk rises (the latch closes on the rising edge). The latch warning is
// the intended enable latch.
module tpl_clock_gater (
  input  logic clk,
  input  logic en,
  output logic gclk_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk_out = clk & en_l;
endmodule
