// tpl_ff: one hardened flip-flop bit of the temporal pulse latch (TPL) design.
//
// The same d is captured by three pulse latches, A, B and C, each on its own
// pulse clock. In full-hardened mode the pulses are skewed by the clock-source
// delay, so a data transient shorter than that delay is caught by at most one
// latch, and an upset of any one latch is out-voted: q is the majority of the
// three. q takes the new value once the second latch (B) has captured it.
//
// Non-redundant mode (nrm = 1, ClkB and ClkC gated off) is supported one of two
// ways, chosen by NRM_STYLE:
//   NRM_IN_LATCH    (default) - B and C latches are forced to 1 and 0.
//   NRM_IN_MAJORITY           - the majority gate follows A only.
// Both make q follow latch A. The source design prefers the latch form, as it
// needs fewer transistors and no inverted NRM per bit.
//
// Interface: pclk_a/b/c (pulse clocks), d, nrm -> q. Hold d until the last
// pulse (PCLKC) has fallen.
module tpl_ff
  import tpl_pkg::*;
#(
  parameter nrm_style_e NRM_STYLE = NRM_IN_LATCH
) (
  input  logic pclk_a,
  input  logic pclk_b,
  input  logic pclk_c,
  input  logic d,
  input  logic nrm,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam bit LATCH_NRM = (NRM_STYLE == NRM_IN_LATCH);

  logic qa, qb, qc;

  tpl_pulse_latch #(.HAS_NRM(1'b0), .NRM_VALUE(1'b0))
    u_la (.pclk(pclk_a), .d(d), .nrm(1'b0), .q(qa));
  tpl_pulse_latch #(.HAS_NRM(LATCH_NRM), .NRM_VALUE(NRM_VALUE_B))
    u_lb (.pclk(pclk_b), .d(d), .nrm(nrm), .q(qb));
  tpl_pulse_latch #(.HAS_NRM(LATCH_NRM), .NRM_VALUE(NRM_VALUE_C))
    u_lc (.pclk(pclk_c), .d(d), .nrm(nrm), .q(qc));

  tpl_majority #(.HAS_NRM(!LATCH_NRM))
    u_maj (.a(qa), .b(qb), .c(qc), .nrm(nrm), .y(q));
endmodule
