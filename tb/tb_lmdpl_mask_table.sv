// tb_lmdpl_mask_table - exhaustive check of the blinded table for AND (and
// for XOR as a second function): t[4+2i+j] = F(x0^j, y0^i) ^ r,
// t[2i+j] = ~t[4+2i+j], z0 = r.
module tb_lmdpl_mask_table;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic x0, y0, r, z0, z0x;
  logic [7:0] t, tx;

  lmdpl_mask_table #(.F_TT(4'b1000)) dut     (.x0(x0), .y0(y0), .r(r), .t(t),  .z0(z0));
  lmdpl_mask_table #(.F_TT(4'b0110)) dut_xor (.x0(x0), .y0(y0), .r(r), .t(tx), .z0(z0x));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s x0=%b y0=%b r=%b t=%b tx=%b", what, x0, y0, r, t, tx);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x0, y0, r} = 3'(v);
      #1;
      check(z0 == r && z0x == r, "z0 = r");
      for (int i = 0; i < 2; i++) begin
        for (int j = 0; j < 2; j++) begin
          logic xa, ya;
          xa = x0 ^ 1'(j);
          ya = y0 ^ 1'(i);
          check(t[4 + 2 * i + j] == ((xa & ya) ^ r), "AND table, true part");
          check(t[2 * i + j] == !((xa & ya) ^ r), "AND table, false part");
          check(tx[4 + 2 * i + j] == ((xa ^ ya) ^ r), "XOR table");
          check(tx[2 * i + j] == !((xa ^ ya) ^ r), "XOR table, false part");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
