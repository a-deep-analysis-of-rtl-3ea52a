// tb_c_element_array - evaluation / pre-charge sequences: after reset all
// outputs are 0; a valid code sets the output to its value; NULL and the
// INVALID code keep the last value.
module tb_c_element_array;
  import drp_pkg::*;
  localparam int N = 10;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic rst_n;
  dr_t  [N-1:0] d;
  logic [N-1:0] q, expect_q;

  c_element_array #(.N(N)) dut (.rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("FAIL: %s q=%b expected %b", what, q, expect_q);
    end
  endtask

  initial begin
    d = '0;
    rst_n = 1'b0;
    #1;
    expect_q = '0;
    check("reset");
    rst_n = 1'b1;
    #1;
    check("NULL after reset holds 0");
    for (int k = 0; k < 300; k++) begin
      logic [N-1:0] v;
      v = N'($urandom);
      for (int i = 0; i < N; i++) d[i] = '{t: v[i], f: ~v[i]};
      #1;
      expect_q = v;
      check("evaluation");
      d = '0;
      #1;
      check("pre-charge holds");
      for (int i = 0; i < N; i++) d[i] = dr_t'(2'b11);
      #1;
      check("INVALID holds");
      d = '0;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
