// tpl_macro: multi-bit TPL flip-flop macro (16 bits by default).
//
// The three clock-tree endpoints ClkA, ClkB and ClkC each drive a local pulse
// generator (PGA, PGB, PGC); each pulse clock is shared by one redundant copy
// of all WIDTH bits, and every bit is a tpl_ff (three pulse latches and a
// majority gate). The macro has no delay elements of its own: the skew between
// the pulses comes from the clocks. Sharing one pulse generator among 16
// latches keeps the pulse width controlled while amortising its power.
//
// Interface: clk_a/b/c, nrm, d[WIDTH] -> q[WIDTH]. Capture starts at the rising
// edge of clk_a; in full-hardened mode q is valid one clock skew later (when
// copy B has captured) and d must be held until PCLKC falls, i.e. two skews
// plus one pulse width after clk_a rises. The layout interleaving of the
// latches and the decoupling cells between pulse generators have no
// counterpart in the logic.
module tpl_macro
  import tpl_pkg::*;
#(
  parameter int unsigned WIDTH     = DEF_WIDTH,
  parameter int unsigned PULSE_PS  = DEF_PULSE_PS,
  parameter nrm_style_e  NRM_STYLE = NRM_IN_LATCH
) (
  input  logic             clk_a,
  input  logic             clk_b,
  input  logic             clk_c,
  input  logic             nrm,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic pclk_a, pclk_b, pclk_c;

  tpl_pulse_gen #(.PULSE_PS(PULSE_PS)) u_pga (.clk(clk_a), .pclk(pclk_a));
  tpl_pulse_gen #(.PULSE_PS(PULSE_PS)) u_pgb (.clk(clk_b), .pclk(pclk_b));
  tpl_pulse_gen #(.PULSE_PS(PULSE_PS)) u_pgc (.clk(clk_c), .pclk(pclk_c));

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    tpl_ff #(.NRM_STYLE(NRM_STYLE)) u_ff (
      .pclk_a(pclk_a), .pclk_b(pclk_b), .pclk_c(pclk_c),
      .d(d[i]), .nrm(nrm), .q(q[i])
    );
  end
endmodule
