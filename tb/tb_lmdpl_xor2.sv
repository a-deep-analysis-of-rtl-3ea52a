// tb_lmdpl_xor2 - exhaustive check of the linear LMDPL gadget: z0 = x0 ^ y0,
// z1 a valid code with z0 ^ z1 = x ^ y, and z1 NULL while either second share
// is NULL.
module tb_lmdpl_xor2;
  import drp_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic x0, y0, z0;
  dr_t x1, y1, z1;

  lmdpl_xor2 dut (.x0(x0), .y0(y0), .x1(x1), .y1(y1), .z0(z0), .z1(z1));

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
      $display("FAIL: %s x0=%b y0=%b x1=%b y1=%b z0=%b z1=%b", what, x0, y0, x1, y1, z0, z1);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic vx1, vy1;
      {x0, y0, vx1, vy1} = 4'(v);
      x1 = '0; y1 = '0;
      #1;
      check(z1 == '0, "pre-charged");
      check(z0 == (x0 ^ y0), "share 0");
      x1 = '{t: vx1, f: ~vx1};
      #1;
      check(z1 == '0, "waits for y1");
      y1 = '{t: vy1, f: ~vy1};
      #1;
      check(z1.t == (vx1 ^ vy1) && z1.f == !(vx1 ^ vy1), "share 1");
      check((z0 ^ z1.t) == ((x0 ^ vx1) ^ (y0 ^ vy1)), "recombined XOR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
