// wddl_xor2 - WDDL XOR gadget.
//
// True rail:  (x.t & y.f) | (x.f & y.t)   - two ANDs (#0,#1) into an OR (#2).
// False rail: (x.t | y.f) & (x.f | y.t)   - two ORs (#0,#1) into an AND (#2).
// For valid dual-rail inputs the false rail equals x.t&y.t | x.f&y.f (XNOR).
// Only positive gates are used, so NULL maps to NULL and the gadget is
// glitch-free. The pairing of inputs to gates is derived from the XOR function
// in monotone sum-of-products / product-of-sums form. Purely combinational.
module wddl_xor2
  import drp_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t z
);
  assign z.t = (x.t & y.f) | (x.f & y.t);
  assign z.f = (x.t | y.f) & (x.f | y.t);
endmodule
