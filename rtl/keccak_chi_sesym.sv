// keccak_chi_sesym - first-order masked 5-bit Keccak chi built from SESYM
// multipliers.
//
// chi maps a row a[4:0] to b[i] = a[i] ^ (~a[i+1] & a[i+2]) (indices mod 5).
// Each of the five AND terms is one sesym_and2 with its own fresh mask bit
// r[i]; each outer XOR is one WDDL XOR gadget per share domain. The inversion
// of a[i+1] costs nothing: the two rails of share 0 are swapped, which inverts
// the shared value. All signals are dual-rail and pre-charged; the circuit is
// combinational, so outputs are valid in the same evaluation phase as the
// inputs. Five multipliers, five masked XORs and five mask bits follow the
// reference design; which operand goes to the x and which to the y port of a
// multiplier is this design's choice (x = ~a[i+1], y = a[i+2]).
// geval is the global pre-charge signal: 0 forces every gadget output to NULL
// (see sesym_and2); tie it to 1 for the plain construction.
module keccak_chi_sesym
  import drp_pkg::*;
#(
  parameter bit          NOEE          = 1'b0,
  parameter int unsigned DLY_Y0_STAGES = 0,
  parameter int unsigned DLY_Y1_STAGES = 0
) (
  input  dr_t [4:0] a0,  // share 0 of the input row
  input  dr_t [4:0] a1,  // share 1 of the input row
  input  dr_t [4:0] r,   // one fresh mask bit per multiplier
  input  logic      geval, // global pre-charge: 0 forces all gadgets to NULL
  output dr_t [4:0] b0,
  output dr_t [4:0] b1
);
  for (genvar i = 0; i < 5; i++) begin : g_lane
    localparam int unsigned I1 = (i + 1) % 5;
    localparam int unsigned I2 = (i + 2) % 5;
    dr_t p0, p1, e0, e1;

    sesym_and2 #(
      .NOEE(NOEE), .DLY_Y0_STAGES(DLY_Y0_STAGES), .DLY_Y1_STAGES(DLY_Y1_STAGES)
    ) u_mul (
      .x0(dr_not(a0[I1])), .x1(a1[I1]),
      .y0(a0[I2]),         .y1(a1[I2]),
      .r (r[i]), .geval(geval),
      .z0(p0), .z1(p1)
    );

    wddl_xor2 u_xor_d0 (.x(a0[i]), .y(p0), .z(e0));
    wddl_xor2 u_xor_d1 (.x(a1[i]), .y(p1), .z(e1));
    assign b0[i] = dr_gate(e0, geval);
    assign b1[i] = dr_gate(e1, geval);
  end
endmodule
