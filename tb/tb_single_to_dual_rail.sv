// tb_single_to_dual_rail - random words must be converted to valid dual-rail
// codes with t = x and f = ~x on every bit.
module tb_single_to_dual_rail;
  import drp_pkg::*;
  localparam int N = 15;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic [N-1:0] x;
  dr_t  [N-1:0] d;

  single_to_dual_rail #(.N(N)) dut (.x(x), .d(d));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      x = N'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (d[i].t !== x[i] || d[i].f !== ~x[i]) begin
          failures++;
          $display("FAIL: bit %0d x=%b d=%b", i, x[i], d[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
