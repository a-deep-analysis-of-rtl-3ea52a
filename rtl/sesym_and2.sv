// sesym_and2 - first-order Self-Synchronized Masking (SESYM) multiplier.
//
// A first-order Domain-Oriented Masking (DOM) AND with every gate replaced by
// its WDDL counterpart and the two resharing registers removed:
//   z0 = (x0 & y0) ^ ((x0 & y1) ^ r)
//   z1 = (x1 & y1) ^ ((x1 & y0) ^ r)
// with x = x0^x1, y = y0^y1, z = z0^z1 = x&y. Each share domain uses two AND
// gadgets (#0 inner-domain, #1 cross-domain), one XOR gadget (#0) that blinds
// the cross-domain product with the fresh mask r, and one XOR gadget (#1) that
// forms the output share. All inputs are dual-rail; all are NULL in the
// pre-charge phase, and the outputs become valid in the same evaluation phase
// (no register, zero cycles of latency). The gadgets are those of the
// two-share instance of sesym_dom_and; this module names the shares.
//
// NOEE=1 uses the AND gadget without early evaluation. DLY_Y0_STAGES and
// DLY_Y1_STAGES insert inverter chains on the true rails of y0 and y1 in front
// of every AND gadget they feed, to reproduce the unbalanced-rail experiment
// in simulation; the default of 0 leaves the multiplier unchanged (at most
// 254 stages each).
//
// geval is the global pre-charge signal of the FPGA variant of the scheme:
// every gadget output is ANDed with it, so geval=0 sends all gadgets to the
// pre-charge phase at the same time, whatever their inputs still hold. Tie it
// to 1 for the plain construction (the AND gates then vanish in synthesis).
// Placing the gate at each gadget output is this design's choice.
module sesym_and2
  import drp_pkg::*;
#(
  parameter bit          NOEE          = 1'b0,
  parameter int unsigned DLY_Y0_STAGES = 0,
  parameter int unsigned DLY_Y1_STAGES = 0
) (
  input  dr_t x0,
  input  dr_t x1,
  input  dr_t y0,
  input  dr_t y1,
  input  dr_t r,
  input  logic geval,  // 1: evaluate, 0: force every gadget to NULL
  output dr_t z0,
  output dr_t z1
);
  sesym_dom_and #(
    .SHARES(2), .NOEE(NOEE),
    .DLY_Y_STAGES({8'(DLY_Y1_STAGES), 8'(DLY_Y0_STAGES)})
  ) u_dom (
    .x({x1, x0}), .y({y1, y0}), .r(r), .geval(geval), .z({z1, z0})
  );
endmodule
