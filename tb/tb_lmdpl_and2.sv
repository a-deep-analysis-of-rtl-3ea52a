// tb_lmdpl_and2 - random operations on the registered LMDPL AND gadget: load
// (x0, y0, r) in one cycle, evaluate with the dual-rail second shares in the
// next. z0 must equal the mask in the load cycle, z1 must be a valid code in
// the evaluation cycle with z0 ^ z1 = (x0^x1) & (y0^y1) while the first-share
// inputs already carry other values, and z1 must be NULL in
// the pre-charge phase even while the second shares are valid (the register
// outputs are pre-charged too).
module tb_lmdpl_and2;
  import drp_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic rst_n, load, eval, x0, y0, r, z0;
  dr_t x1, y1, z1;

  lmdpl_and2 dut (.clk(clk), .rst_n(rst_n), .load(load), .eval(eval),
                  .x0(x0), .y0(y0), .r(r), .x1(x1), .y1(y1), .z0(z0), .z1(z1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t z0=%b z1=%b", what, $time, z0, z1);
    end
  endtask

  initial begin
    logic vx0, vy0, vr, vx1, vy1;
    rst_n = 1'b0; load = 1'b0; eval = 1'b0; x0 = 0; y0 = 0; r = 0; x1 = '0; y1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 1000; k++) begin
      {vx0, vy0, vr, vx1, vy1} = 5'($urandom);
      @(negedge clk);
      x0 = vx0; y0 = vy0; r = vr; load = 1'b1;
      #1;
      check(z0 == vr, "z0 is the mask");
      @(negedge clk);
      load = 1'b0;
      x0 = 1'($urandom); y0 = 1'($urandom); r = 1'($urandom); // not loaded
      x1 = '{t: vx1, f: ~vx1};
      y1 = '{t: vy1, f: ~vy1};
      #1;
      check(z1 == '0, "pre-charged while eval = 0");
      eval = 1'b1;
      #1;
      check(dr_is_valid(z1), "valid in evaluation");
      check((vr ^ z1.t) == ((vx0 ^ vx1) & (vy0 ^ vy1)), "shares recombine to AND");
      @(negedge clk);
      eval = 1'b0;
      x1 = '0; y1 = '0;
      #1;
      check(z1 == '0, "pre-charge after evaluation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
