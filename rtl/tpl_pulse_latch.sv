// tpl_pulse_latch: one pulse-clocked latch of a hardened flip-flop.
//
// While pclk is high the latch is transparent (q follows d); while pclk is low
// it holds. With HAS_NRM = 1 the latch also has the non-redundant-mode
// pull-down: while nrm is high the storage node is pulled so that q reads
// NRM_VALUE, whatever the clock. The B copy is built with NRM_VALUE = 1 and the
// C copy with NRM_VALUE = 0, so in non-redundant mode the vote equals copy A.
// In that mode the B and C clocks are gated off, so the pull-down never fights
// an open latch; if both happen, nrm wins here.
//
// Interface: pclk, d, nrm -> q. nrm is ignored when HAS_NRM = 0. The latch is
// the storage element itself, so the latch warning is intended. Which copy
// stores 1 and which 0 is this design's choice.
module tpl_pulse_latch #(
  parameter bit HAS_NRM   = 1'b0,
  parameter bit NRM_VALUE = 1'b0
) (
  input  logic pclk,
  input  logic d,
  input  logic nrm,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (HAS_NRM && nrm) q = NRM_VALUE;
    else if (pclk)      q = d;
  end
endmodule
