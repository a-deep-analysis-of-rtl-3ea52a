// lmdpl_mask_table - mask table generation layer of a non-linear LMDPL gadget.
//
// From the first input shares x0, y0 and the fresh mask r it computes the
// blinded table of the two-input function F for every possible value of the
// second shares (i = y1, j = x1):
//   t[4+2i+j] = F(x0 ^ j, y0 ^ i) ^ r      t[2i+j] = t[4+2i+j] ^ 1
// so t[7:4] feed the true rail and t[3:0] the false rail of the operation
// layer. The first output share is the mask itself, z0 = r. F is given as a
// truth table, F(a,b) = F_TT[{b,a}]; the default 4'b1000 is AND.
// Single-rail and combinational; its outputs go to the register stage.
module lmdpl_mask_table #(
  parameter logic [3:0] F_TT = 4'b1000
) (
  input  logic       x0,
  input  logic       y0,
  input  logic       r,
  output logic [7:0] t,
  output logic       z0
);
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < 2; j++) begin
        t[4+2*i+j] = F_TT[{y0 ^ i[0], x0 ^ j[0]}] ^ r;
        t[2*i+j]   = ~t[4+2*i+j];
      end
    end
  end
  assign z0 = r;
endmodule
