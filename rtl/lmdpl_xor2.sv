// lmdpl_xor2 - linear LMDPL gadget (2-input XOR).
//
// A linear function needs neither the fresh mask nor the register stage: the
// table layer reduces to the share-0 function z0 = x0 ^ y0 (single rail), and
// the operation layer to a dual-rail XOR of the second shares,
// z1 = x1 ^ y1 (one WDDL XOR gadget, glitch-free and pre-charged with its
// inputs). z0 ^ z1 = (x0^x1) ^ (y0^y1). Combinational.
// The split into the two layers, and the absence of the mask and register
// for a linear gadget, follow the LMDPL gadget structure; using the WDDL XOR
// gadget for the dual-rail layer is this design's choice.
module lmdpl_xor2
  import drp_pkg::*;
(
  input  logic x0,
  input  logic y0,
  input  dr_t  x1,
  input  dr_t  y1,
  output logic z0,
  output dr_t  z1
);
  assign z0 = x0 ^ y0;

  wddl_xor2 u_xor (.x(x1), .y(y1), .z(z1));
endmodule
