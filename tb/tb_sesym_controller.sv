// tb_sesym_controller - drives the completion signals by hand and checks the
// phase sequence IDLE -> EVAL -> PRECH -> IDLE cycle by cycle: load pulses
// with an accepted start, eval lasts until all_valid is seen, done pulses when
// all_null is seen in PRECH, and waiting for a slow completion stretches the
// phases.
module tb_sesym_controller;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic rst_n, start, all_valid, all_null;
  logic load, eval, busy, done;

  sesym_controller dut (
    .clk(clk), .rst_n(rst_n), .start(start), .all_valid(all_valid),
    .all_null(all_null), .load(load), .eval(eval), .busy(busy), .done(done)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic l, input logic e, input logic b,
                            input logic d, input string what);
    #1;
    checks++;
    if ({load, eval, busy, done} !== {l, e, b, d}) begin
      failures++;
      $display("FAIL: %s: load/eval/busy/done = %b%b%b%b, expected %b%b%b%b",
               what, load, eval, busy, done, l, e, b, d);
    end
  endtask

  initial begin
    int ev_wait, pc_wait;
    rst_n = 1'b0; start = 1'b0; all_valid = 1'b0; all_null = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_out(0, 0, 0, 0, "idle");
    for (int k = 0; k < 50; k++) begin
      ev_wait = k % 4;       // extra cycles until the outputs are valid
      pc_wait = (k / 4) % 3; // extra cycles until they are NULL again
      @(negedge clk);
      start = 1'b1;
      expect_out(1, 0, 0, 0, "load with start");
      @(negedge clk);
      start = 1'b0;
      all_null = 1'b0;
      for (int w = 0; w < ev_wait; w++) begin
        expect_out(0, 1, 1, 0, "evaluating, not complete");
        @(negedge clk);
      end
      all_valid = 1'b1;
      expect_out(0, 1, 1, 0, "evaluation complete");
      @(negedge clk);
      all_valid = 1'b0;
      for (int w = 0; w < pc_wait; w++) begin
        expect_out(0, 0, 1, 0, "pre-charging");
        @(negedge clk);
      end
      all_null = 1'b1;
      expect_out(0, 0, 1, 1, "pre-charge complete, done");
      @(negedge clk);
      expect_out(0, 0, 0, 0, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
