// tpl_mode_ctrl: operating-mode control for the redundant skewed clocks.
//
// It registers the requested mode and the full-hardened delay setting and
// drives what each mode needs:
//   MODE_FULL_HARD      sel = hard_taps taps, ClkB/ClkC enabled, nrm = 0
//   MODE_SEU_ONLY       sel = 0 taps (all clocks coincide), enabled, nrm = 0
//   MODE_NON_REDUNDANT  sel = 0 taps, ClkB/ClkC gated off, nrm = 1
// (MODE_RESERVED behaves as MODE_FULL_HARD; hard_taps above N_TAPS saturates.)
//
// The registers are clocked on the falling edge of the ungated ClkC, the last
// of the three clocks to fall. At that moment GCLK, every delay tap and all
// three clocks are low and stay low until the next GCLK rise, so the delay
// select, the gate enables and NRM change without cutting or stretching a
// clock pulse: the mode can be switched on the fly. A change takes effect on
// the next rising edge of GCLK after the ClkC falling edge that samples it.
//
// Interface: clk_c_root (ungated ClkC), rst_n (asynchronous, active low; after
// reset MODE_FULL_HARD with hard_taps taps is requested by the reset values
// below), mode_req, hard_taps -> sel, en_b, en_c, nrm, mode. The mode set and
// what each mode changes follow the source design; the register timing,
// encoding and reset are this design's choices.
module tpl_mode_ctrl
  import tpl_pkg::*;
#(
  parameter int unsigned N_TAPS = DEF_N_TAPS,
  parameter int unsigned TAPW   = $clog2(N_TAPS + 1)
) (
  input  logic              clk_c_root,
  input  logic              rst_n,
  input  tpl_mode_e         mode_req,
  input  logic [TAPW-1:0]   hard_taps,
  output logic [N_TAPS-1:0] sel,
  output logic              en_b,
  output logic              en_c,
  output logic              nrm,
  output tpl_mode_e         mode
);
  timeunit 1ps;
  timeprecision 1ps;

  tpl_mode_e       mode_q;
  logic [TAPW-1:0] taps_q;
  logic [TAPW-1:0] taps_sat;

  assign taps_sat = (hard_taps > TAPW'(N_TAPS)) ? TAPW'(N_TAPS) : hard_taps;

  always_ff @(negedge clk_c_root or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= MODE_FULL_HARD;
      taps_q <= TAPW'(N_TAPS);
    end else begin
      mode_q <= (mode_req == MODE_RESERVED) ? MODE_FULL_HARD : mode_req;
      taps_q <= taps_sat;
    end
  end

  // Thermometer select: the top taps_q bits (S_n downwards) are ones.
  always_comb begin
    sel = '0;
    if (mode_q == MODE_FULL_HARD)
      for (int unsigned i = 0; i < N_TAPS; i++)
        sel[i] = (i + int'(taps_q) >= N_TAPS);
  end

  assign nrm  = (mode_q == MODE_NON_REDUNDANT);
  assign en_b = !nrm;
  assign en_c = !nrm;
  assign mode = mode_q;
endmodule
