// drp_pkg - shared type and helpers for dual-rail pre-charge (DRP) logic.
//
// Every DRP signal is carried on two wires: the true rail t and the false
// rail f. The four codes are NULL (t=0,f=0, the pre-charged state), logic 0
// (t=0,f=1), logic 1 (t=1,f=0) and INVALID (t=1,f=1). All wires are pulled to
// NULL in the pre-charge phase and each signal makes exactly one 0->1 toggle on
// one rail in the evaluation phase. This encoding is the standard one of DRP
// logic; the helper functions are this design's own conveniences.
package drp_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // false (complementary) rail
  } dr_t;

  // Encode a single-rail bit; en=0 gives NULL (pre-charge).
  function automatic dr_t dr_encode(input logic v, input logic en);
    dr_t d;
    d.t = v & en;
    d.f = ~v & en;
    return d;
  endfunction

  // Logical negation costs no gate: the two rails are swapped.
  function automatic dr_t dr_not(input dr_t d);
    dr_t n;
    n.t = d.f;
    n.f = d.t;
    return n;
  endfunction

  // Gate both rails with an enable; en=0 forces NULL.
  function automatic dr_t dr_gate(input dr_t d, input logic en);
    dr_t g;
    g.t = d.t & en;
    g.f = d.f & en;
    return g;
  endfunction

  function automatic logic dr_is_valid(input dr_t d);
    return d.t ^ d.f;
  endfunction

  function automatic logic dr_is_null(input dr_t d);
    return ~(d.t | d.f);
  endfunction

endpackage
