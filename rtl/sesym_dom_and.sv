// sesym_dom_and - SESYM multiplier of any masking order (SHARES = d+1 shares).
//
// The Domain-Oriented Masking (DOM) AND with every gate replaced by its WDDL
// gadget and no resharing registers. Output share i is
//   z[i] = x[i]y[i] ^ XOR over j != i of (x[i]y[j] ^ r{i,j})
// where one fresh mask bit r{i,j} = r{j,i} serves each pair of domains, so
// SHARES*(SHARES-1)/2 mask bits are needed; z = XOR of all z[i] = x & y.
// Domain i computes one AND gadget per y share, blinds each cross-domain
// product with its mask in one XOR gadget, and folds the blinded products
// onto the inner-domain product in a chain of XOR gadgets (j in increasing
// order). Mask r{i,j}, i < j, sits at index i*SHARES - i*(i+1)/2 + j-i-1.
// All signals are dual-rail and pre-charged; the block is combinational.
//
// NOEE=1 uses the AND gadget without early evaluation. DLY_Y_STAGES holds
// one 8-bit inverter count per y share: that many inverters delay the true
// rail of y[j] in front of every AND gadget it feeds (0 = no delay). geval is
// the global pre-charge input (0 forces every gadget output to NULL); tie it
// to 1 for the plain construction. With SHARES = 2 this is the first-order
// multiplier sesym_and2. The DOM equations follow the masking scheme; the
// XOR order within a domain and the mask indexing are this design's choices.
module sesym_dom_and
  import drp_pkg::*;
#(
  parameter int unsigned          SHARES       = 3,
  parameter bit                   NOEE         = 1'b0,
  parameter logic [8*SHARES-1:0]  DLY_Y_STAGES = '0
) (
  input  dr_t  [SHARES-1:0]                x,
  input  dr_t  [SHARES-1:0]                y,
  input  dr_t  [SHARES*(SHARES-1)/2-1:0]   r,
  input  logic                             geval,
  output dr_t  [SHARES-1:0]                z
);
  if (SHARES < 2) begin : g_bad
    $error("sesym_dom_and: SHARES must be at least 2");
  end

  function automatic int unsigned ridx(input int unsigned i, input int unsigned j);
    int unsigned a, b;
    a = (i < j) ? i : j;
    b = (i < j) ? j : i;
    return a * SHARES - a * (a + 1) / 2 + b - a - 1;
  endfunction

  dr_t [SHARES-1:0] y_d;

  // Optional unbalancing of the true rail of each y share.
  for (genvar j = 0; j < SHARES; j++) begin : g_dly
    inverter_delay_chain #(.STAGES(int'(DLY_Y_STAGES[8*j +: 8]))) u_dly (
      .a(y[j].t), .y(y_d[j].t));
    assign y_d[j].f = y[j].f;
  end

  for (genvar i = 0; i < SHARES; i++) begin : g_dom
    dr_t [SHARES-1:0] v, w;        // raw and gated AND gadget outputs
    dr_t [SHARES-2:0] u, q, s;     // blinded products (raw, gated), raw fold
    dr_t [SHARES-1:0] acc;         // gated XOR chain

    for (genvar j = 0; j < SHARES; j++) begin : g_and
      if (NOEE) begin : g_noee
        wddl_and2_noee u_and (.x(x[i]), .y(y_d[j]), .z(v[j]));
      end else begin : g_ee
        wddl_and2 u_and (.x(x[i]), .y(y_d[j]), .z(v[j]));
      end
      assign w[j] = dr_gate(v[j], geval);
    end

    // acc[0] is the inner-domain product; step n adds cross product j(n).
    assign acc[0] = w[i];
    for (genvar n = 0; n < SHARES - 1; n++) begin : g_cross
      localparam int unsigned J = (n < i) ? n : n + 1;
      wddl_xor2 u_blind (.x(w[J]), .y(r[ridx(i, J)]), .z(u[n]));
      assign q[n] = dr_gate(u[n], geval);
      wddl_xor2 u_fold (.x(acc[n]), .y(q[n]), .z(s[n]));
      assign acc[n+1] = dr_gate(s[n], geval);
    end

    assign z[i] = acc[SHARES-1];
  end
endmodule
