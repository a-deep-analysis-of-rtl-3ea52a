// tb_sesym_chi_delayed - the masked chi circuit with unbalanced rails: 6
// inverters on y_t^0 and 10 on y_t^1 of every multiplier, once with plain and
// once with noEE AND gadgets, next to the balanced circuit.
//
// For random rows a and fresh random sharings and masks, the tb sums the times
// at which the ten dual-rail outputs leave NULL after the start of the
// evaluation phase (a stand-in for when the circuit draws its power) and
// averages that sum per unshared row value a. The results must still be
// correct; the balanced circuit must complete with no delay for every a; and
// in both unbalanced circuits the mean completion time must differ between
// values of a, i.e. the time of evaluation depends on the unmasked data even
// though each single sharing is random.
module tb_sesym_chi_delayed;
  localparam int NOPS = 3200;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic rst_n, start;
  logic [4:0] a0, a1, r;
  logic [4:0] b0[3], b1[3];
  logic busy[3], done[3];

  sesym_chi_system #(.NOEE(1'b0)) dut_bal (
    .clk(clk), .rst_n(rst_n), .start(start), .a0(a0), .a1(a1), .r(r),
    .b0(b0[0]), .b1(b1[0]), .busy(busy[0]), .done(done[0]));
  sesym_chi_system #(.NOEE(1'b0), .DLY_Y0_STAGES(6), .DLY_Y1_STAGES(10)) dut_ee (
    .clk(clk), .rst_n(rst_n), .start(start), .a0(a0), .a1(a1), .r(r),
    .b0(b0[1]), .b1(b1[1]), .busy(busy[1]), .done(done[1]));
  sesym_chi_system #(.NOEE(1'b1), .DLY_Y0_STAGES(6), .DLY_Y1_STAGES(10)) dut_ne (
    .clk(clk), .rst_n(rst_n), .start(start), .a0(a0), .a1(a1), .r(r),
    .b0(b0[2]), .b1(b1[2]), .busy(busy[2]), .done(done[2]));

  always #50 clk = ~clk;   // 100 units per cycle, longer than any rail delay


  initial begin
    repeat (4 * NOPS + 100) @(posedge clk);
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

  // number of the ten dual-rail outputs of each circuit still NULL
  function automatic int n_null(input drp_pkg::dr_t [9:0] d);
    int n = 0;
    for (int i = 0; i < 10; i++) if (drp_pkg::dr_is_null(d[i])) n++;
    return n;
  endfunction

  real sum[3][32];
  int  cnt[32];

  initial begin
    logic [4:0] a, s0;
    rst_n = 1'b0; start = 1'b0; a0 = '0; a1 = '0; r = '0;
    for (int v = 0; v < 32; v++) begin
      cnt[v] = 0;
      for (int c = 0; c < 3; c++) sum[c][v] = 0.0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NOPS; k++) begin
      a  = 5'(k % 32);
      s0 = 5'($urandom);
      @(negedge clk);
      a0 = s0; a1 = s0 ^ a; r = 5'($urandom); start = 1'b1;
      @(posedge clk);   // evaluation phase starts here
      // Sum of the evaluation times of the ten outputs, sampled every half
      // unit: a crude stand-in for the timing of the dynamic power.
      #0.25;
      for (int s = 0; s < 30; s++) begin
        sum[0][a] += 0.5 * real'(n_null(dut_bal.out_dr));
        sum[1][a] += 0.5 * real'(n_null(dut_ee.out_dr));
        sum[2][a] += 0.5 * real'(n_null(dut_ne.out_dr));
        #0.5;
      end
      @(negedge clk);
      start = 1'b0;
      @(negedge clk);
      for (int c = 0; c < 3; c++) begin
        check(done[c], "done two cycles after start");
        check((b0[c] ^ b1[c]) == chi(a), "recombined chi");
      end
      cnt[a]++;
    end
    begin
      real mn[3], mx[3];
      for (int c = 0; c < 3; c++) begin
        mn[c] = 1.0e9; mx[c] = -1.0;
        for (int v = 0; v < 32; v++) begin
          real m;
          m = sum[c][v] / real'(cnt[v]);
          if (m < mn[c]) mn[c] = m;
          if (m > mx[c]) mx[c] = m;
        end
        $display("circuit %0d: mean summed evaluation time per row value ranges %0.2f .. %0.2f", c, mn[c], mx[c]);
      end
      check(mx[0] == 0.0 && mn[0] == 0.0, "balanced circuit evaluates at once");
      check(mx[1] - mn[1] > 1.0, "plain gadgets: evaluation time depends on a");
      check(mx[2] - mn[2] > 1.0, "noEE gadgets: evaluation time depends on a");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
