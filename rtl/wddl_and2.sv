// wddl_and2 - Wave Dynamic Differential Logic AND gadget.
//
// The true rail is the AND of both true rails and the false rail is the OR of
// both false rails, so the gadget uses only positive (monotone) gates: a NULL
// input gives a NULL output and each output rail rises at most once per
// evaluation, which makes the gadget glitch-free. The OR gate on the false
// rails can settle as soon as one false input is 1 (early propagation).
// Purely combinational; no clock. Structure as in the usual WDDL AND gadget.
module wddl_and2
  import drp_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t z
);
  assign z.t = x.t & y.t;
  assign z.f = x.f | y.f;
endmodule
