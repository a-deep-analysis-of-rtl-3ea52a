// tb_lmdpl_timing - time of evaluation of the LMDPL operation layer when its
// inputs arrive late.
//
// Every input of the evaluation layer (x1.t, x1.f, y1.t, y1.f, t0..t7) passes
// through its own inverter chain, so each has a distinct delay. For all 16
// input vectors on which z1.t toggles (and the 16 on which z1.f toggles) the
// rise of the output rail must come exactly at D(s_i) = the largest delay of
// the three inputs of the one AND gate s_i that fires. The mean delay over the
// four vectors of each unshared (x, y) must then be the same for all four
// (x, y): the time of evaluation carries no information about x and y.
module tb_lmdpl_timing;
  import drp_pkg::*;
  // delays in time units (two units per pair of inverters)
  localparam int DXT = 2, DXF = 4, DYT = 8, DYF = 6;
  localparam int DT[8] = '{10, 2, 14, 4, 6, 12, 2, 16};

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  dr_t x1, y1, x1_d, y1_d, z1;
  logic [7:0] t, t_d;

  inverter_delay_chain #(.STAGES(DXT)) u_dxt (.a(x1.t), .y(x1_d.t));
  inverter_delay_chain #(.STAGES(DXF)) u_dxf (.a(x1.f), .y(x1_d.f));
  inverter_delay_chain #(.STAGES(DYT)) u_dyt (.a(y1.t), .y(y1_d.t));
  inverter_delay_chain #(.STAGES(DYF)) u_dyf (.a(y1.f), .y(y1_d.f));
  for (genvar i = 0; i < 8; i++) begin : g_dt
    inverter_delay_chain #(.STAGES(DT[i])) u_dt (.a(t[i]), .y(t_d[i]));
  end

  lmdpl_operation_layer dut (.x1(x1_d), .y1(y1_d), .t(t_d), .z1(z1));

  always #50 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  function automatic int max3(input int a, input int b, input int c);
    int m;
    m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction

  // delay of AND gate s_k, k = 4*rail + 2*y1 + x1
  function automatic int ds(input int k);
    int xi, yi;
    xi = k % 2;
    yi = (k / 2) % 2;
    return max3(xi ? DXT : DXF, yi ? DYT : DYF, DT[k]);
  endfunction

  initial begin
    int sum[2][4];  // [rail][2*y + x]
    for (int rail = 0; rail < 2; rail++) begin     // 1: probe z1.t, 0: z1.f
      for (int xy = 0; xy < 4; xy++) begin
        sum[rail][xy] = 0;
        for (int sh = 0; sh < 4; sh++) begin
          logic x, y, vx1, vy1, vx0, vy0, r;
          int k, d;
          x = xy[0]; y = xy[1];
          vx1 = sh[0]; vy1 = sh[1];
          vx0 = x ^ vx1; vy0 = y ^ vy1;
          // choose r so that the probed rail toggles (z1 = 1 for z1.t)
          r = rail ? ~(x & y) : (x & y);
          x1 = '0; y1 = '0; t = '0;
          #30;
          check(z1 == '0, "pre-charged");
          // table of the mask table generation layer for (x0, y0, r)
          for (int i = 0; i < 2; i++)
            for (int j = 0; j < 2; j++) begin
              t[4 + 2 * i + j] = ((vx0 ^ j[0]) & (vy0 ^ i[0])) ^ r;
              t[2 * i + j]     = ~t[4 + 2 * i + j];
            end
          x1 = '{t: vx1, f: ~vx1};
          y1 = '{t: vy1, f: ~vy1};
          k = 4 * rail + 2 * int'(vy1) + int'(vx1);
          d = ds(k);
          #0.25;
          for (int s = 0; s <= 40; s++) begin
            // now at s/2 + 1/4 units after the start of evaluation
            if (2 * d > s) check((rail ? z1.t : z1.f) == 1'b0, "not before D(s_i)");
            else           check((rail ? z1.t : z1.f) == 1'b1, "at D(s_i)");
            #0.5;
          end
          check(rail ? (z1.t && !z1.f) : (z1.f && !z1.t), "valid result");
          sum[rail][xy] += d;
        end
      end
      for (int xy = 1; xy < 4; xy++) begin
        check(sum[rail][xy] == sum[rail][0], "mean delay independent of (x, y)");
      end
      check(sum[rail][0] == (rail ? ds(4) + ds(5) + ds(6) + ds(7)
                                  : ds(0) + ds(1) + ds(2) + ds(3)), "mean = sum of D(s_i) / 4");
      $display("rail %s: summed delay per (x,y) = %0d %0d %0d %0d", rail ? "t" : "f",
               sum[rail][0], sum[rail][1], sum[rail][2], sum[rail][3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
