// tb_sesym_and2 - checks the SESYM multiplier in two ways.
//
// Function: for all 32 combinations of (x0, x1, y0, y1, r) both the plain and
// the noEE variant must produce exactly the DOM output shares
// z0 = x0y0 ^ x0y1 ^ r and z1 = x1y1 ^ x1y0 ^ r, and NULL inputs must give
// NULL outputs.
// Timing: with the true rails of y0 and y1 delayed by 6 and 10 units, the
// time at which z0.t rises after the start of evaluation must equal, for each
// of the 16 input vectors on which z0.t toggles, the value worked out gate by
// gate for the plain and the noEE multiplier (0, D0, D1 or max(D0, D1)).
// The mean delay per unshared y then differs, which is the data-dependent
// time of evaluation this construction suffers from.
// Global pre-charge: a delayed noEE multiplier driven by the global
// pre-charge signal must go to NULL at once when the signal drops, for all 32
// input vectors, even while its inputs are still valid.
module tb_sesym_and2;
  import drp_pkg::*;
  localparam int D0 = 6;
  localparam int D1 = 10;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  dr_t x0, x1, y0, y1, r;
  dr_t z0_ee, z1_ee, z0_ne, z1_ne, z0_dee, z1_dee, z0_dne, z1_dne, z0_g, z1_g;
  logic g = 1'b1;

  sesym_and2 #(.NOEE(1'b0)) dut_ee (.x0(x0), .x1(x1), .y0(y0), .y1(y1), .r(r), .geval(1'b1), .z0(z0_ee), .z1(z1_ee));
  sesym_and2 #(.NOEE(1'b1)) dut_ne (.x0(x0), .x1(x1), .y0(y0), .y1(y1), .r(r), .geval(1'b1), .z0(z0_ne), .z1(z1_ne));
  sesym_and2 #(.NOEE(1'b0), .DLY_Y0_STAGES(D0), .DLY_Y1_STAGES(D1)) dut_dee (
    .x0(x0), .x1(x1), .y0(y0), .y1(y1), .r(r), .geval(1'b1), .z0(z0_dee), .z1(z1_dee));
  sesym_and2 #(.NOEE(1'b1), .DLY_Y0_STAGES(D0), .DLY_Y1_STAGES(D1)) dut_dne (
    .x0(x0), .x1(x1), .y0(y0), .y1(y1), .r(r), .geval(1'b1), .z0(z0_dne), .z1(z1_dne));
  sesym_and2 #(.NOEE(1'b1), .DLY_Y0_STAGES(D0), .DLY_Y1_STAGES(D1)) dut_g (
    .x0(x0), .x1(x1), .y0(y0), .y1(y1), .r(r), .geval(g), .z0(z0_g), .z1(z1_g));

  always #50 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  function automatic dr_t enc(input logic v);
    return '{t: v, f: ~v};
  endfunction

  // Input vectors {y1, y0, x1, x0, r} on which z0.t toggles, and the expected
  // delay code of z0.t: 0 none, 1 D0, 2 D1, 3 max(D0, D1).
  localparam logic [4:0] VEC  [16] = '{5'b00001, 5'b00111, 5'b11001, 5'b11111,
                                       5'b00011, 5'b00101, 5'b11011, 5'b11101,
                                       5'b01001, 5'b01110, 5'b10001, 5'b10110,
                                       5'b01010, 5'b01101, 5'b10010, 5'b10101};
  localparam int         EXP_EE[16] = '{0, 0, 0, 3,  0, 0, 3, 0,  0, 1, 0, 2,  1, 0, 2, 0};
  localparam int         EXP_NE[16] = '{0, 0, 3, 3,  0, 0, 3, 3,  1, 1, 2, 2,  1, 1, 2, 2};

  function automatic int dly(input int code);
    case (code)
      1:       return D0;
      2:       return D1;
      3:       return (D0 > D1) ? D0 : D1;
      default: return 0;
    endcase
  endfunction

  real sum_ee[2], sum_ne[2];

  initial begin
    logic vx0, vx1, vy0, vy1, vr;
    // ---------------- function
    for (int v = 0; v < 32; v++) begin
      {vx0, vx1, vy0, vy1, vr} = 5'(v);
      x0 = enc(vx0); x1 = enc(vx1); y0 = enc(vy0); y1 = enc(vy1); r = enc(vr);
      #1;
      check(z0_ee == enc((vx0 & vy0) ^ (vx0 & vy1) ^ vr), "EE share 0");
      check(z1_ee == enc((vx1 & vy1) ^ (vx1 & vy0) ^ vr), "EE share 1");
      check(z0_ne == z0_ee && z1_ne == z1_ee, "noEE equals EE");
      check((z0_ee.t ^ z1_ee.t) == ((vx0 ^ vx1) & (vy0 ^ vy1)), "unmasked product");
      x0 = '0; x1 = '0; y0 = '0; y1 = '0; r = '0;
      #1;
      check(z0_ee == '0 && z1_ee == '0 && z0_ne == '0 && z1_ne == '0, "pre-charge gives NULL");
    end

    // ---------------- time of evaluation of z0.t with unbalanced y rails
    sum_ee = '{0.0, 0.0};
    sum_ne = '{0.0, 0.0};
    for (int k = 0; k < 16; k++) begin
      int de, dn;
      x0 = '0; x1 = '0; y0 = '0; y1 = '0; r = '0;
      #40;
      check(z0_dee == '0 && z0_dne == '0, "delayed multipliers pre-charged");
      {vy1, vy0, vx1, vx0, vr} = VEC[k];
      de = dly(EXP_EE[k]);
      dn = dly(EXP_NE[k]);
      x0 = enc(vx0); x1 = enc(vx1); y0 = enc(vy0); y1 = enc(vy1); r = enc(vr);
      #0.25;
      for (int s = 0; s <= 2 * D1 + 2; s++) begin
        // now at s/2 + 1/4 units after the start of evaluation
        if (2 * de > s) check(z0_dee.t == 1'b0, "EE z0.t not before its delay");
        else            check(z0_dee.t == 1'b1, "EE z0.t at its delay");
        if (2 * dn > s) check(z0_dne.t == 1'b0, "noEE z0.t not before its delay");
        else            check(z0_dne.t == 1'b1, "noEE z0.t at its delay");
        #0.5;
      end
      check(z0_dee == z0_ee && z0_dne == z0_ee, "delayed multipliers give same value");
      sum_ee[vy0 ^ vy1] += real'(de);
      sum_ne[vy0 ^ vy1] += real'(dn);
    end
    // Mean over the eight vectors per y: EE gives D1/4 vs (D0+D1)/4, noEE
    // gives D1/2 vs (D0+D1)/2 (averaged over both x).
    check(sum_ee[0] / 8.0 == real'(D1) / 4.0, "EE mean delay for y = 0");
    check(sum_ee[1] / 8.0 == real'(D0 + D1) / 4.0, "EE mean delay for y = 1");
    check(sum_ne[0] / 8.0 == real'(D1) / 2.0, "noEE mean delay for y = 0");
    check(sum_ne[1] / 8.0 == real'(D0 + D1) / 2.0, "noEE mean delay for y = 1");

    // ---------------- global pre-charge
    for (int v = 0; v < 32; v++) begin
      {vx0, vx1, vy0, vy1, vr} = 5'(v);
      x0 = '0; x1 = '0; y0 = '0; y1 = '0; r = '0; g = 1'b1;
      #40;
      x0 = enc(vx0); x1 = enc(vx1); y0 = enc(vy0); y1 = enc(vy1); r = enc(vr);
      #40;
      check(z0_g == z0_ee && z1_g == z1_ee, "gated multiplier evaluates");
      g = 1'b0;
      #0.25;
      check(z0_g == '0 && z1_g == '0, "NULL at once on global pre-charge");
      g = 1'b1;
      #40;
      check(z0_g == z0_ee && z1_g == z1_ee, "same result after release");
      x0 = '0; x1 = '0; y0 = '0; y1 = '0; r = '0; g = 1'b0;
      #0.25;
      check(z0_g == '0 && z1_g == '0, "NULL at once with inputs and global pre-charge");
    end
    $display("mean delay of z0.t: EE y=0 %0.2f y=1 %0.2f, noEE y=0 %0.2f y=1 %0.2f",
             sum_ee[0] / 8.0, sum_ee[1] / 8.0, sum_ne[0] / 8.0, sum_ne[1] / 8.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
