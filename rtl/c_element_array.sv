// c_element_array - N Muller C-elements that hold the circuit outputs and
// convert them from dual-rail to single-rail.
//
// Each C-element has inputs a = d.t and b = ~d.f. When both agree (a valid
// code) its output follows them, i.e. q = d.t; when they differ (NULL during
// pre-charge, or the INVALID code) it keeps its last value. The outputs thus
// stay stable over the pre-charge phase. The C-element is state-holding by
// definition, so each bit is a level-sensitive latch; this is intended and is
// the reason for the latch the tools report. rst_n (active low, asynchronous)
// clears all bits; the reset is this design's addition.
module c_element_array
  import drp_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic         rst_n,
  input  dr_t  [N-1:0] d,
  output logic [N-1:0] q
);
  for (genvar i = 0; i < N; i++) begin : g_c
    always_latch begin
      if (!rst_n) begin
        q[i] = 1'b0;
      end else if (d[i].t == ~d[i].f) begin
        q[i] = d[i].t;
      end
    end
  end
endmodule
