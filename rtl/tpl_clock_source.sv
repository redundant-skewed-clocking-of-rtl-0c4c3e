// tpl_clock_source: the single clock source of the whole design. It splits
// the global clock GCLK into three redundant clocks that are skewed in time.
//
//   ClkA = GCLK through a buffer (no delay element, no filter)
//   D2CLK = GCLK through programmable delay D2
//   D3CLK = D2CLK through programmable delay D3
//   ClkB = C(GCLK, D2CLK)   one delay later than ClkA
//   ClkC = C(GCLK, D3CLK)   two delays later than ClkA
// Each C-element with the delay ahead of it is a delay filter, so a transient
// on GCLK shorter than the delay reaches ClkA only and is out-voted in the
// flip-flops. These two delays are the only delay elements in the design.
//
// Interface: gclk in; sel selects the number of taps of both D2 and D3; clk_a,
// clk_b, clk_c drive the three clock trees. With k taps selected the skew is
// k*TAP_PS between neighbouring clocks; the high and low phases of GCLK must be
// longer than twice that. The connections follow the published clock-source
// schematic; the buffer is modelled as a wire.
module tpl_clock_source #(
  parameter int unsigned N_TAPS = tpl_pkg::DEF_N_TAPS,
  parameter int unsigned TAP_PS = tpl_pkg::DEF_TAP_PS
) (
  input  logic              gclk,
  input  logic [N_TAPS-1:0] sel,
  output logic              clk_a,
  output logic              clk_b,
  output logic              clk_c
);
  timeunit 1ps;
  timeprecision 1ps;

  logic d2clk, d3clk;

  assign clk_a = gclk;

  tpl_prog_delay #(.N_TAPS(N_TAPS), .TAP_PS(TAP_PS)) u_d2 (.clk_in(gclk),  .sel(sel), .clk_out(d2clk));
  tpl_prog_delay #(.N_TAPS(N_TAPS), .TAP_PS(TAP_PS)) u_d3 (.clk_in(d2clk), .sel(sel), .clk_out(d3clk));

  tpl_c_element u_cb (.a(gclk), .b(d2clk), .y(clk_b));
  tpl_c_element u_cc (.a(gclk), .b(d3clk), .y(clk_c));
endmodule
