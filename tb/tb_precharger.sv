// tb_precharger - with eval = 1 the dual-rail codes must pass unchanged, with
// eval = 0 every signal must be NULL.
module tb_precharger;
  import drp_pkg::*;
  localparam int N = 15;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic eval;
  dr_t [N-1:0] d, q;

  precharger #(.N(N)) dut (.eval(eval), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < N; i++) begin
        logic v;
        v = 1'($urandom);
        d[i] = '{t: v, f: ~v};
      end
      eval = 1'(k % 2);
      #1;
      checks++;
      if (eval ? (q != d) : (q != '0)) begin
        failures++;
        $display("FAIL: eval=%b d=%h q=%h", eval, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
