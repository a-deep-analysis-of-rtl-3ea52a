// tb_completion_detector - random mixtures of NULL and valid codes: all_valid
// must be 1 exactly when no signal is NULL and all_null exactly when every
// signal is NULL.
module tb_completion_detector;
  import drp_pkg::*;
  localparam int N = 10;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  dr_t [N-1:0] d;
  logic all_valid, all_null;

  completion_detector #(.N(N)) dut (.d(d), .all_valid(all_valid), .all_null(all_null));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_null;
    for (int k = 0; k < 400; k++) begin
      n_null = 0;
      for (int i = 0; i < N; i++) begin
        int c;
        // mostly valid codes so that the all-valid case occurs often
        c = (k % 4 == 0) ? 0 : (k % 4 == 1) ? 1 + int'($urandom_range(0, 1))
                         : int'($urandom_range(0, 9));
        d[i] = (c == 0) ? dr_t'(2'b00) : (c % 2 == 1) ? dr_t'(2'b01) : dr_t'(2'b10);
        if (c == 0) n_null++;
      end
      #1;
      checks++;
      if (all_valid != (n_null == 0) || all_null != (n_null == N)) begin
        failures++;
        $display("FAIL: d=%h nulls=%0d all_valid=%b all_null=%b", d, n_null, all_valid, all_null);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
