// single_to_dual_rail - converts N single-rail bits to dual-rail form.
//
// Bit x[i] becomes d[i] = (t: x[i], f: ~x[i]), a valid DRP code. The
// converter is combinational and always outputs valid codes; the pre-charge
// (NULL) phase is imposed afterwards by the precharger that follows it.
// Splitting conversion and pre-charge into two blocks mirrors the SESYM block
// diagram.
module single_to_dual_rail
  import drp_pkg::*;
#(
  parameter int unsigned N = 15
) (
  input  logic [N-1:0] x,
  output dr_t  [N-1:0] d
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      d[i].t = x[i];
      d[i].f = ~x[i];
    end
  end
endmodule
