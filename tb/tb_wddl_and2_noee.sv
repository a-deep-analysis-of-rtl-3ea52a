// tb_wddl_and2_noee - exhaustive check of the WDDL AND gadget without early
// evaluation: valid inputs give the dual-rail AND, and the output stays NULL
// as long as either input is NULL.
// Timing: with y.f delayed by 4 units, z.f must still rise at once for
// (x,y) = (0,1) and late for (0,0) and (1,0): unbalanced rails leak the time
// of evaluation without any early propagation.
module tb_wddl_and2_noee;
  import drp_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  localparam int DYF = 4;
  dr_t x, y, z, yd, zd;

  wddl_and2_noee dut (.x(x), .y(y), .z(z));

  inverter_delay_chain #(.STAGES(DYF)) u_dly (.a(y.f), .y(yd.f));
  assign yd.t = y.t;
  wddl_and2_noee dut_d (.x(x), .y(yd), .z(zd));

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

  // the three codes an input can carry: NULL, 0, 1
  function automatic dr_t code(input int c);
    return (c == 0) ? dr_t'(2'b00) : (c == 1) ? dr_t'(2'b01) : dr_t'(2'b10);
  endfunction

  initial begin
    for (int a = 0; a < 3; a++) begin
      for (int b = 0; b < 3; b++) begin
        x = code(a); y = code(b);
        #1;
        if (a == 0 || b == 0) begin
          check(z == '0, "no output before both inputs are valid");
        end else begin
          check(z.t == ((a == 2) && (b == 2)) && z.f == !((a == 2) && (b == 2)), "valid AND");
        end
      end
    end
    for (int iv = 0; iv < 4; iv++) begin
      logic vx, vy;
      int rise;
      {vx, vy} = 2'(iv);
      rise = (vx & vy) ? -1 : (vy ? 0 : DYF);
      x = '0; y = '0;
      #20;
      x = '{t: vx, f: ~vx};
      y = '{t: vy, f: ~vy};
      #0.5;
      check(zd.f == (rise == 0), "z.f at start of evaluation");
      #(DYF);
      check(zd.f == (rise >= 0), "z.f after the delay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
