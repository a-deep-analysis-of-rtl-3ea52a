// wddl_and2_noee - WDDL AND gadget without early evaluation (noEE).
//
// The true rail is x.t & y.t as in the plain WDDL AND. The false rail is the
// OR of the three minterms that give a 0 result (x.t&y.f, x.f&y.t, x.f&y.f), so
// the false rail can only rise once both inputs have left NULL: the gadget
// waits for all inputs in the pre-charge to evaluation direction. It is still
// monotone, hence glitch-free. Gate numbering follows the four AND gates
// (#0..#3) and one OR gate of the gadget. Purely combinational.
module wddl_and2_noee
  import drp_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t z
);
  logic and0, and1, and2, and3;

  assign and0 = x.t & y.t;
  assign and1 = x.t & y.f;
  assign and2 = x.f & y.t;
  assign and3 = x.f & y.f;

  assign z.t = and0;
  assign z.f = and1 | and2 | and3;
endmodule
