// tpl_pkg: types and default timing constants shared by the redundant
// skewed-clock temporal pulse latch (TPL) design.
//
// The three operating modes are the ones the design is built around:
//   MODE_FULL_HARD      - ClkB and ClkC are skewed from ClkA by the programmed
//                         delay; hard to data SETs, clock SETs and latch SEUs.
//   MODE_SEU_ONLY       - the programmable delays are set to zero, so the three
//                         clocks coincide; fast, hard to latch SEUs only.
//   MODE_NON_REDUNDANT  - ClkB and ClkC are gated off and NRM is raised, so each
//                         flip-flop follows its A latch only; lowest power.
// The encoding value 2'b11 is reserved and treated as MODE_FULL_HARD.
//
// All delays are integers in picoseconds. The delay-line granularity (8 taps
// of 75 ps, 600 ps in all) and the 25 ps buffer stage are this design's own
// choices; the 600 ps clock separation and the ~154 ps pulse width follow the
// values reported for the 90 nm implementation.
package tpl_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic [1:0] {
    MODE_FULL_HARD     = 2'b00,
    MODE_SEU_ONLY      = 2'b01,
    MODE_NON_REDUNDANT = 2'b10,
    MODE_RESERVED      = 2'b11
  } tpl_mode_e;

  // Where the non-redundant-mode override lives in each flip-flop.
  typedef enum logic {
    NRM_IN_LATCH    = 1'b0,  // B/C latches forced to opposite values
    NRM_IN_MAJORITY = 1'b1   // majority gate follows A only
  } nrm_style_e;

  localparam int unsigned DEF_N_TAPS   = 8;    // delay-line mux stages
  localparam int unsigned DEF_TAP_PS   = 75;   // delay per tap
  localparam int unsigned DEF_PULSE_PS = 154;  // pulse generator width
  localparam int unsigned DEF_BUF_PS   = 25;   // one buffer stage
  localparam int unsigned DEF_WIDTH    = 16;   // bits per flip-flop macro
  localparam int unsigned DEF_N_MACROS = 426;  // 6816 flip-flops / 16

  // Forced values of the B and C latches in non-redundant mode: opposite, so
  // that the vote of (A, B, C) equals A.
  localparam logic NRM_VALUE_B = 1'b1;
  localparam logic NRM_VALUE_C = 1'b0;

endpackage
