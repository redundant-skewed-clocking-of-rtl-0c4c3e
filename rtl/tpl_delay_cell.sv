// tpl_delay_cell: behavioural model of a delay element (not synthesizable
// logic; in silicon it is a chain of buffers sized for the delay).
//
// The delay DELAY_PS is built from a chain of buffer stages of BUF_PS each,
// the last stage taking the remainder. Each stage is an inertial delay, as a
// real buffer is: a pulse shorter than one stage dies inside the chain, a
// wider pulse comes out delayed by DELAY_PS. This lets a single-event transient
// travel through a delay line the way it would in silicon, so the C-elements
// downstream, not the delay line, are what filter it.
//
// Interface: a (in) -> y (out), y = a delayed by DELAY_PS. DELAY_PS = 0 gives
// a plain wire. The buffer-chain structure is described by the source design;
// the 25 ps stage is this model's choice.
module tpl_delay_cell #(
  parameter int unsigned DELAY_PS = 600,
  parameter int unsigned BUF_PS   = tpl_pkg::DEF_BUF_PS
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NSTG = (DELAY_PS == 0) ? 1 : (DELAY_PS + BUF_PS - 1) / BUF_PS;

  logic [NSTG:0] s;
  assign s[0] = a;

  if (DELAY_PS == 0) begin : g_wire
    assign s[1] = s[0];
  end else begin : g_chain
    for (genvar i = 0; i < NSTG; i++) begin : g_stg
      localparam int unsigned STG_PS = (i < NSTG - 1) ? BUF_PS : DELAY_PS - (NSTG - 1) * BUF_PS;
      assign #(STG_PS) s[i+1] = s[i];
    end
  end

  assign y = s[NSTG];
endmodule
