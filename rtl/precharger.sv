// precharger - imposes the pre-charge / evaluation phases on N dual-rail
// signals.
//
// With eval=1 every code passes unchanged; with eval=0 both rails of every
// signal are forced to 0 (NULL). Each rail is a single AND gate with eval, so
// leaving the pre-charge phase causes exactly one 0->1 toggle per signal. The
// phase signal comes from the SESYM controller. Combinational.
module precharger
  import drp_pkg::*;
#(
  parameter int unsigned N = 15
) (
  input  logic        eval,
  input  dr_t [N-1:0] d,
  output dr_t [N-1:0] q
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      q[i] = dr_gate(d[i], eval);
    end
  end
endmodule
