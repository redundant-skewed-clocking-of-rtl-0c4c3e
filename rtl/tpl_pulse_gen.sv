// tpl_pulse_gen: local pulse generator (PGA, PGB or PGC of a flip-flop macro).
//
// pclk = clk AND NOT(clk delayed by PULSE_PS): a high pulse of PULSE_PS starts
// at every rising edge of clk. The pulse makes the macro's latches transparent
// briefly, so a pulse latch behaves like an edge-triggered flip-flop. One
// generator drives the 16 latches of one redundant copy in a macro; the pulse
// generators are kept local to the macro to control the pulse width.
//
// Interface: clk -> pclk. The clock high time must exceed PULSE_PS. The
// default 154 ps is the mean generated width reported for the 90 nm cell
// (153.5 ps), rounded to whole picoseconds.
module tpl_pulse_gen #(
  parameter int unsigned PULSE_PS = tpl_pkg::DEF_PULSE_PS
) (
  input  logic clk,
  output logic pclk
);
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_dly;

  tpl_delay_cell #(.DELAY_PS(PULSE_PS)) u_dly (.a(clk), .y(clk_dly));

  assign pclk = clk & ~clk_dly;
endmodule
