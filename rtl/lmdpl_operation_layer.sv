// lmdpl_operation_layer - dual-rail evaluation layer of a non-linear LMDPL
// gadget.
//
// Two 4-to-1 multiplexers in AND-OR form, selected by the dual-rail second
// shares x1 and y1:
//   s7 = x1.t & y1.t & t7    s6 = x1.f & y1.t & t6
//   s5 = x1.t & y1.f & t5    s4 = x1.f & y1.f & t4    z1.t = s4|s5|s6|s7
// and likewise s3..s0 from t3..t0 give z1.f. Exactly one select term is
// active per evaluation, and t must be pre-charged with the inputs, so the
// gadget is monotone and glitch-free. Combinational.
module lmdpl_operation_layer
  import drp_pkg::*;
(
  input  dr_t        x1,
  input  dr_t        y1,
  input  logic [7:0] t,
  output dr_t        z1
);
  logic [7:0] s;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < 2; j++) begin
        s[4+2*i+j] = (j[0] ? x1.t : x1.f) & (i[0] ? y1.t : y1.f) & t[4+2*i+j];
        s[2*i+j]   = (j[0] ? x1.t : x1.f) & (i[0] ? y1.t : y1.f) & t[2*i+j];
      end
    end
  end

  assign z1.t = |s[7:4];
  assign z1.f = |s[3:0];
endmodule
