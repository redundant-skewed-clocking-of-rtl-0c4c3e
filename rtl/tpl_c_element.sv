// tpl_c_element: Muller C-element.
//
// The output copies the inputs when they agree and keeps its last value while
// they differ. Paired with a delay element (input a = signal, input b = the
// same signal delayed by d) it is the delay filter: a glitch narrower than d
// never has both inputs high (or low) together and is blocked, while a clean
// edge passes delayed by d.
//
// The hold behaviour is state, written here as a level-sensitive latch whose
// enable is (a == b); the latch warning a linter gives for it is intended.
// Interface: a, b -> y. Combinational timing apart from the hold.
module tpl_c_element (
  input  logic a,
  input  logic b,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (a == b) y = a;
  end
endmodule
