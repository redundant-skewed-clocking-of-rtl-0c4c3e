// tpl_prog_delay: programmable clock delay line (one of the two delays, D2
// and D3, at the root of the clock trees).
//
// N_TAPS mux stages are chained. Stage i either passes the previous stage's
// output through one TAP_PS delay element (sel[i] = 1) or restarts from the
// undelayed input clock (sel[i] = 0). The output is the last stage, so the
// total delay is TAP_PS times the number of consecutive ones in sel ending at
// the top bit (S_n); sel = 0 gives zero delay, the SEU-only mode setting.
// sel[0] is S1 and sel[N_TAPS-1] is Sn. Change sel only while clk_in and every
// tap are low (see tpl_mode_ctrl), or the output may glitch.
//
// The mux-chain structure follows the source design; which mux input is the
// delayed one, the tap count and the tap delay are this design's choices.
module tpl_prog_delay #(
  parameter int unsigned N_TAPS = tpl_pkg::DEF_N_TAPS,
  parameter int unsigned TAP_PS = tpl_pkg::DEF_TAP_PS
) (
  input  logic              clk_in,
  input  logic [N_TAPS-1:0] sel,
  output logic              clk_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_TAPS:0]   m;     // mux outputs, m[0] = input clock
  logic [N_TAPS-1:0] dly;   // tap outputs

  assign m[0] = clk_in;
  for (genvar i = 0; i < N_TAPS; i++) begin : g_tap
    tpl_delay_cell #(.DELAY_PS(TAP_PS)) u_dly (.a(m[i]), .y(dly[i]));
    assign m[i+1] = sel[i] ? dly[i] : clk_in;
  end

  assign clk_out = m[N_TAPS];
endmodule
