// lmdpl_and2 - non-linear LMDPL gadget (default function: 2-input AND).
//
// Mask table generation layer -> register stage -> dual-rail operation layer.
// On a clock edge with load=1 the register stage captures the blinded table
// t[7:0] computed from (x0, y0, r). The first output share is the mask itself,
// z0 = r, taken straight from the table layer ahead of the register stage (so
// it belongs to the operation being loaded). While eval=1 the registered
// table is released to the
// operation layer; while eval=0 it is held at 0 so that it is pre-charged
// together with the dual-rail second shares x1, y1 (which the caller must
// drive NULL then). In the evaluation cycle the second output share z1
// becomes valid, with z0 ^ z1 = F(x0^x1, y0^y1).
// Timing: load in cycle n, eval with the matching x1, y1 in cycle n+1 or
// later; z0 is valid in the load cycle, and a caller that needs it later
// keeps it. Gating the register outputs with eval is this design's way of
// realising the pre-charged register stage.
module lmdpl_and2
  import drp_pkg::*;
#(
  parameter logic [3:0] F_TT = 4'b1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic eval,
  input  logic x0,
  input  logic y0,
  input  logic r,
  input  dr_t  x1,
  input  dr_t  y1,
  output logic z0,
  output dr_t  z1
);
  logic [7:0] t_d, t_q, t_e;

  lmdpl_mask_table #(.F_TT(F_TT)) u_table (
    .x0(x0), .y0(y0), .r(r), .t(t_d), .z0(z0)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    t_q <= '0;
    else if (load) t_q <= t_d;
  end

  assign t_e = t_q & {8{eval}};

  lmdpl_operation_layer u_op (.x1(x1), .y1(y1), .t(t_e), .z1(z1));
endmodule
