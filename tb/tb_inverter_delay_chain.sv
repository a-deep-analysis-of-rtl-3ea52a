// tb_inverter_delay_chain - checks that a 6-stage and a 10-stage chain (one
// time unit per stage) keep the polarity and delay both edges by exactly 6
// and 10 units, and that a 0-stage chain is a plain wire.
module tb_inverter_delay_chain;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic a = 1'b0;
  logic y6, y10, y0;

  inverter_delay_chain #(.STAGES(6),  .STAGE_DELAY(1)) dut6  (.a(a), .y(y6));
  inverter_delay_chain #(.STAGES(10), .STAGE_DELAY(1)) dut10 (.a(a), .y(y10));
  inverter_delay_chain #(.STAGES(0),  .STAGE_DELAY(1)) dut0  (.a(a), .y(y0));

  always #50 clk = ~clk;

  initial begin
    repeat (100) @(posedge clk);
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

  initial begin
    #20;
    check(y6 == 1'b0 && y10 == 1'b0 && y0 == 1'b0, "settled low");
    for (int e = 0; e < 4; e++) begin
      a = ~a;
      #0.5;
      check(y0 == a, "zero stages follow at once");
      #5;    // 5.5 units after the edge
      check(y6 != a, "6 stages not yet switched");
      #1;    // 6.5
      check(y6 == a, "6 stages switched after 6 units");
      #3;    // 9.5
      check(y10 != a, "10 stages not yet switched");
      #1;    // 10.5
      check(y10 == a, "10 stages switched after 10 units");
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
