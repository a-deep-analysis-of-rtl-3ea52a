// tb_wddl_xor2 - exhaustive check of the WDDL XOR gadget over the codes NULL,
// 0 and 1 on each input: valid inputs give the dual-rail XOR, any NULL input
// keeps the output NULL.
// Timing: with y.t delayed by 4 units, z.t must rise at once for
// (x,y) = (1,0) and late for (0,1); z.f at once for (0,0) and late for (1,1).
module tb_wddl_xor2;
  import drp_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  localparam int DYT = 4;
  dr_t x, y, z, yd, zd;

  wddl_xor2 dut (.x(x), .y(y), .z(z));

  inverter_delay_chain #(.STAGES(DYT)) u_dly (.a(y.t), .y(yd.t));
  assign yd.f = y.f;
  wddl_xor2 dut_d (.x(x), .y(yd), .z(zd));

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
      $display("FAIL: %s (x=%b y=%b z=%b)", what, x, y, z);
    end
  endtask

  function automatic dr_t code(input int c);
    return (c == 0) ? dr_t'(2'b00) : (c == 1) ? dr_t'(2'b01) : dr_t'(2'b10);
  endfunction

  initial begin
    for (int a = 0; a < 3; a++) begin
      for (int b = 0; b < 3; b++) begin
        x = code(a); y = code(b);
        #1;
        if (a == 0 || b == 0) begin
          check(z == '0, "NULL input keeps output NULL");
        end else begin
          check(z.t == ((a == 2) != (b == 2)) && z.f == ((a == 2) == (b == 2)), "valid XOR");
        end
      end
    end
    for (int iv = 0; iv < 4; iv++) begin
      logic vx, vy;
      {vx, vy} = 2'(iv);
      x = '0; y = '0;
      #20;
      x = '{t: vx, f: ~vx};
      y = '{t: vy, f: ~vy};
      #0.5;
      // only the signal not waiting for y.t is there at once
      check(zd.t == (vx & !vy), "z.t at start of evaluation");
      check(zd.f == (!vx & !vy), "z.f at start of evaluation");
      #(DYT);
      check(zd.t == (vx ^ vy) && zd.f == !(vx ^ vy), "result after the delay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
