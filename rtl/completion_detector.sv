// completion_detector - detects when all N dual-rail outputs have evaluated.
//
// all_valid is the product of sums AND_i (t[i] | f[i]): it rises once every
// output signal has left NULL, which ends the evaluation phase and starts the
// pre-charge wave. all_null (no rail high) marks the end of the pre-charge
// phase; this second output is this design's addition so that the controller
// knows when the next evaluation may start. Combinational.
module completion_detector
  import drp_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  dr_t [N-1:0] d,
  output logic        all_valid,
  output logic        all_null
);
  always_comb begin
    all_valid = 1'b1;
    all_null  = 1'b1;
    for (int i = 0; i < N; i++) begin
      all_valid &= d[i].t | d[i].f;
      all_null  &= dr_is_null(d[i]);
    end
  end
endmodule
