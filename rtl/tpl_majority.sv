// tpl_majority: 2-of-3 majority vote of the three latch copies of one bit.
//
// y = (a & b) | (b & c) | (a & c). With HAS_NRM = 1 it is the modified
// majority gate: while nrm is high the B and C paths are cut off and y = a,
// for non-redundant mode without touching the latches. The transistor-level
// gate is an inverting complex gate; here the output is taken non-inverted
// (as after the cell's output stage) so the flip-flop is non-inverting.
//
// Interface: a, b, c, nrm -> y, combinational. nrm is ignored when HAS_NRM = 0.
module tpl_majority #(
  parameter bit HAS_NRM = 1'b0
) (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic nrm,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    if (HAS_NRM && nrm) y = a;
    else                y = (a & b) | (b & c) | (a & c);
  end
endmodule
