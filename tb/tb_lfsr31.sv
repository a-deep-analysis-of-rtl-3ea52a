// tb_lfsr31 - compares the mask bit with an independent model of the
// recurrence s[n+31] = s[n] ^ s[n+3] (x^31 + x^28 + 1) after seeding, checks
// that the state holds without step and that a zero seed does not lock the
// register.
module tb_lfsr31;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic rst_n, seed_load, step, mask;
  logic [30:0] seed;

  lfsr31 dut (.clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(seed),
              .step(step), .mask(mask));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // Bit sequence model: bit n of the output stream. Seed bit 30 is emitted
  // first, then bits 29..0, then the recurrence.
  bit seq[$];

  initial begin
    rst_n = 1'b0; seed_load = 1'b0; step = 1'b0; seed = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 4; run++) begin
      @(negedge clk);
      seed = (run == 3) ? 31'd0 : 31'($urandom);
      seed_load = 1'b1;
      @(negedge clk);
      seed_load = 1'b0;
      seq.delete();
      for (int i = 30; i >= 0; i--) seq.push_back((run == 3) ? (i == 0) : seed[i]);
      for (int n = 0; n < 2000; n++) seq.push_back(seq[n] ^ seq[n + 3]);
      for (int n = 0; n < 1000; n++) begin
        check(mask == seq[n], "mask bit sequence");
        step = (n % 5 != 4);
        @(negedge clk);
        if (!step) begin
          check(mask == seq[n], "holds without step");
          step = 1'b1;
          @(negedge clk);
        end
        step = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
