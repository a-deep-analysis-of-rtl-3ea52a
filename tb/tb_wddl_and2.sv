// tb_wddl_and2 - exhaustive check of the WDDL AND gadget: every valid input
// pair gives the dual-rail AND, NULL inputs give NULL, and a single valid 0 on
// the x input already drives the false rail (early propagation).
// Timing: with y.f delayed by 4 units (4 inverters), z.f must rise at once
// for (x,y) = (0,0) and (0,1), late for (1,0), not at all for (1,1); in the
// pre-charge phase it must fall at once only for (0,1). The time of a toggle
// thus tells input vectors apart although the gadget is glitch-free.
module tb_wddl_and2;
  import drp_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  localparam int DYF = 4;
  dr_t x, y, z, yd, zd;

  wddl_and2 dut (.x(x), .y(y), .z(z));

  // second instance whose y.f arrives DYF units late
  inverter_delay_chain #(.STAGES(DYF)) u_dly (.a(y.f), .y(yd.f));
  assign yd.t = y.t;
  wddl_and2 dut_d (.x(x), .y(yd), .z(zd));

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

  initial begin
    for (int a = 0; a < 2; a++) begin
      for (int b = 0; b < 2; b++) begin
        x = '{t: a[0], f: ~a[0]};
        y = '{t: b[0], f: ~b[0]};
        #1;
        check(z.t == (a[0] & b[0]) && z.f == ~(a[0] & b[0]), "valid AND");
      end
    end
    x = '0; y = '0; #1;
    check(z == '0, "NULL in, NULL out");
    // early propagation: x = 0 decides the output before y arrives
    x = '{t: 1'b0, f: 1'b1}; y = '0; #1;
    check(z.t == 1'b0 && z.f == 1'b1, "early propagation on false rail");
    x = '{t: 1'b1, f: 1'b0}; y = '0; #1;
    check(z == '0, "x = 1 alone stays NULL");

    // ---- time of evaluation / pre-charge of z.f, y.f delayed
    for (int iv = 0; iv < 4; iv++) begin
      logic vx, vy;
      int rise, fall;   // expected delay, -1: no toggle
      {vx, vy} = 2'(iv);
      rise = (vx & vy) ? -1 : (!vx ? 0 : DYF);
      fall = (vx & vy) ? -1 : (!vy ? DYF : 0);
      x = '0; y = '0;
      #20;
      x = '{t: vx, f: ~vx};
      y = '{t: vy, f: ~vy};
      #0.5;
      check(zd.f == (rise == 0), "z.f at start of evaluation");
      #(DYF);
      check(zd.f == (rise >= 0), "z.f after the delay");
      #5;
      x = '0; y = '0;
      #0.5;
      check(zd.f == (fall > 0), "z.f at start of pre-charge");
      #(DYF);
      check(zd.f == 1'b0, "z.f pre-charged after the delay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
