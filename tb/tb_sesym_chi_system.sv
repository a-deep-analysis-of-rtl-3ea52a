// tb_sesym_chi_system - runs the full SESYM chi circuit (plain and noEE
// multipliers) with random shares and masks. Each operation must end with
// done exactly two cycles after start; the held result shares must match the
// masked chi equations share by share and recombine to chi(a); the outputs
// must stay unchanged over the pre-charge phase and the idle time that
// follows. A third circuit with noEE gadgets and the global pre-charge signal
// (the FPGA variant) must behave identically.
module tb_sesym_chi_system;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic rst_n, start;
  logic [4:0] a0, a1, r, b0, b1, b0n, b1n;
  logic [4:0] b0g, b1g;
  logic busy, done, busy_n, done_n, busy_g, done_g;

  sesym_chi_system #(.NOEE(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a0(a0), .a1(a1), .r(r),
    .b0(b0), .b1(b1), .busy(busy), .done(done));
  sesym_chi_system #(.NOEE(1'b1)) dut_ne (
    .clk(clk), .rst_n(rst_n), .start(start), .a0(a0), .a1(a1), .r(r),
    .b0(b0n), .b1(b1n), .busy(busy_n), .done(done_n));
  sesym_chi_system #(.NOEE(1'b1), .GLOBAL_PC(1'b1)) dut_g (
    .clk(clk), .rst_n(rst_n), .start(start), .a0(a0), .a1(a1), .r(r),
    .b0(b0g), .b1(b1g), .busy(busy_g), .done(done_g));

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

  function automatic logic [4:0] chi(input logic [4:0] a);
    logic [4:0] b;
    for (int i = 0; i < 5; i++) b[i] = a[i] ^ (~a[(i + 1) % 5] & a[(i + 2) % 5]);
    return b;
  endfunction

  initial begin
    logic [4:0] s0, s1, m, e0, e1;
    int lat;
    rst_n = 1'b0; start = 1'b0; a0 = '0; a1 = '0; r = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      s0 = 5'($urandom); s1 = 5'($urandom); m = 5'($urandom);
      @(negedge clk);
      a0 = s0; a1 = s1; r = m; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      a0 = 5'($urandom); a1 = 5'($urandom); r = 5'($urandom); // must not matter
      lat = 1;
      while (!done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      check(lat == 2, "done two cycles after start");
      check(done_n == done, "noEE circuit in step");
      check(done_g == done, "global pre-charge circuit in step");
      for (int i = 0; i < 5; i++) begin
        e0[i] = s0[i] ^ (~s0[(i + 1) % 5] & s0[(i + 2) % 5])
                      ^ (~s0[(i + 1) % 5] & s1[(i + 2) % 5]) ^ m[i];
        e1[i] = s1[i] ^ (s1[(i + 1) % 5] & s1[(i + 2) % 5])
                      ^ (s1[(i + 1) % 5] & s0[(i + 2) % 5]) ^ m[i];
      end
      check(b0 == e0 && b1 == e1, "result shares");
      check((b0 ^ b1) == chi(s0 ^ s1), "recombined chi");
      check(b0n == b0 && b1n == b1, "noEE result");
      check(b0g == b0 && b1g == b1, "global pre-charge result");
      repeat (1 + k % 3) @(negedge clk);
      check(!busy && b0 == e0 && b1 == e1, "result held while idle");
      check(!busy_g && b0g == e0 && b1g == e1, "global pre-charge result held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
