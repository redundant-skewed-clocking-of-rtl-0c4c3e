// rskew_tpl_top: the complete sequential subsystem of a design protected by
// redundant skewed clocks and temporal pulse latches.
//
// One clock source at the root turns GCLK into three clocks, ClkA, ClkB = ClkA
// delayed by the programmed skew, and ClkC delayed by twice the skew; these
// are the only delay elements in the whole design. Each clock passes its own
// clock gater and then feeds its own tree (modelled as wires) to every
// flip-flop macro. Each macro makes three local pulse clocks and stores every
// bit in three pulse latches voted by a majority gate. A transient on data or
// on GCLK narrower than the skew, or an upset of one latch, leaves the voted
// outputs correct.
//
// The mode controller selects full-hardened mode (skewed clocks), SEU-only mode
// (zero skew, full speed) or non-redundant mode (ClkB and ClkC gated, NRM set,
// lowest power), switchable while running.
//
// Interface: gclk, rst_n (asynchronous, mode control only; the flip-flops have
// no reset), mode_req, hard_taps (skew in taps of TAP_PS for full-hardened
// mode), clk_en (functional clock enable shared by the three gaters), d/q as
// N_MACROS words of WIDTH bits, where the user's combinational logic
// connects, and mode (mode in effect). Timing, with s the skew: q is valid
// about s after the rising edge of GCLK; d must be stable from before that
// edge until 2s + PULSE_PS after it, so a path from q back to d needs at least
// that much delay. GCLK high and low times must each exceed 2s.
//
// Defaults: 426 macros of 16 bits = 6816 flip-flops, the size of the pipelined
// AES-256 engine the scheme was evaluated on. Tap count and tap delay are this
// design's choices.
module rskew_tpl_top
  import tpl_pkg::*;
#(
  parameter int unsigned N_MACROS  = DEF_N_MACROS,
  parameter int unsigned WIDTH     = DEF_WIDTH,
  parameter int unsigned N_TAPS    = DEF_N_TAPS,
  parameter int unsigned TAP_PS    = DEF_TAP_PS,
  parameter int unsigned PULSE_PS  = DEF_PULSE_PS,
  parameter nrm_style_e  NRM_STYLE = NRM_IN_LATCH,
  parameter int unsigned TAPW      = $clog2(N_TAPS + 1)
) (
  input  logic             gclk,
  input  logic             rst_n,
  input  tpl_mode_e        mode_req,
  input  logic [TAPW-1:0]  hard_taps,
  input  logic             clk_en,
  input  logic [WIDTH-1:0] d [N_MACROS],
  output logic [WIDTH-1:0] q [N_MACROS],
  output tpl_mode_e        mode
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_TAPS-1:0] sel;
  logic clk_a, clk_b, clk_c;          // clock-source outputs (tree roots)
  logic gclk_a, gclk_b, gclk_c;       // gated clocks
  logic en_b, en_c, nrm;

  tpl_clock_source #(.N_TAPS(N_TAPS), .TAP_PS(TAP_PS)) u_src (
    .gclk(gclk), .sel(sel), .clk_a(clk_a), .clk_b(clk_b), .clk_c(clk_c)
  );

  tpl_mode_ctrl #(.N_TAPS(N_TAPS), .TAPW(TAPW)) u_mode (
    .clk_c_root(clk_c), .rst_n(rst_n), .mode_req(mode_req), .hard_taps(hard_taps),
    .sel(sel), .en_b(en_b), .en_c(en_c), .nrm(nrm), .mode(mode)
  );

  tpl_clock_gater u_cg_a (.clk(clk_a), .en(clk_en),        .gclk_out(gclk_a));
  tpl_clock_gater u_cg_b (.clk(clk_b), .en(clk_en & en_b), .gclk_out(gclk_b));
  tpl_clock_gater u_cg_c (.clk(clk_c), .en(clk_en & en_c), .gclk_out(gclk_c));

  for (genvar m = 0; m < N_MACROS; m++) begin : g_macro
    tpl_macro #(.WIDTH(WIDTH), .PULSE_PS(PULSE_PS), .NRM_STYLE(NRM_STYLE)) u_macro (
      .clk_a(gclk_a), .clk_b(gclk_b), .clk_c(gclk_c), .nrm(nrm),
      .d(d[m]), .q(q[m])
    );
  end
endmodule
