// tb_lmdpl_operation_layer - for every 8-bit table and every valid dual-rail
// x1, y1 the layer must select z1.t = t[4 + 2*y1 + x1] and
// z1.f = t[2*y1 + x1]; any NULL select input, or an all-zero (pre-charged)
// table, must give NULL.
module tb_lmdpl_operation_layer;
  import drp_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  dr_t x1, y1, z1;
  logic [7:0] t;

  lmdpl_operation_layer dut (.x1(x1), .y1(y1), .t(t), .z1(z1));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s x1=%b y1=%b t=%b z1=%b", what, x1, y1, t, z1);
    end
  endtask

  function automatic dr_t code(input int c);
    return (c == 0) ? dr_t'(2'b00) : (c == 1) ? dr_t'(2'b01) : dr_t'(2'b10);
  endfunction

  initial begin
    for (int tv = 0; tv < 256; tv++) begin
      t = 8'(tv);
      for (int a = 0; a < 3; a++) begin
        for (int b = 0; b < 3; b++) begin
          x1 = code(a);
          y1 = code(b);
          #1;
          if (a == 0 || b == 0) begin
            check(z1 == '0, "NULL select gives NULL");
          end else begin
            int idx;
            idx = 2 * (b - 1) + (a - 1);
            check(z1.t == t[4 + idx] && z1.f == t[idx], "selected table entry");
          end
        end
      end
    end
    t = '0;
    x1 = code(2); y1 = code(1);
    #1;
    check(z1 == '0, "pre-charged table gives NULL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
