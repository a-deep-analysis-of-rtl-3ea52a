// tb_sesym_dom_and - checks the SESYM multiplier with three shares
// (second-order DOM), plain and noEE.
//
// Function: for all 512 combinations of (x0..x2, y0..y2, three mask bits)
// each output share must equal its DOM equation and the shares must
// recombine to x & y; NULL inputs must give NULL outputs, and the global
// pre-charge input must force NULL while the inputs stay valid.
// Timing: with the true rails of y0, y1, y2 delayed by 6, 10 and 14 units, the
// time at which output share 0 becomes valid is measured for every vector.
// Share 0 is valid when all AND gadgets of its domain are: a gadget whose
// y[j] is 1 waits for that delayed rail, except that the plain gadget is
// valid at once when x0 = 0 (early propagation). So the expected time is
// max{D_j : y[j] = 1} for noEE, and the same times x0 for the plain gadget.
// Averaged per unshared y it differs between y = 0 and y = 1 for both
// variants: a probe on a single output share still tells y apart, as with two
// shares.
module tb_sesym_dom_and;
  import drp_pkg::*;
  localparam int NS = 3;
  localparam int NR = NS * (NS - 1) / 2;
  localparam logic [8*NS-1:0] DLY = {8'd14, 8'd10, 8'd6};
  localparam int DMAX = 14;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  dr_t [NS-1:0] x, y, z_ee, z_ne, z_dee, z_dne;
  dr_t [NR-1:0] r;
  logic g = 1'b1;

  sesym_dom_and #(.SHARES(NS), .NOEE(1'b0)) dut_ee (.x(x), .y(y), .r(r), .geval(g), .z(z_ee));
  sesym_dom_and #(.SHARES(NS), .NOEE(1'b1)) dut_ne (.x(x), .y(y), .r(r), .geval(g), .z(z_ne));
  sesym_dom_and #(.SHARES(NS), .NOEE(1'b0), .DLY_Y_STAGES(DLY)) dut_dee (
    .x(x), .y(y), .r(r), .geval(1'b1), .z(z_dee));
  sesym_dom_and #(.SHARES(NS), .NOEE(1'b1), .DLY_Y_STAGES(DLY)) dut_dne (
    .x(x), .y(y), .r(r), .geval(1'b1), .z(z_dne));

  always #50 clk = ~clk;

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

  function automatic dr_t enc(input logic v);
    return '{t: v, f: ~v};
  endfunction

  // mask of the domain pair {i, j}, i != j
  function automatic int ridx(input int i, input int j);
    int a, b;
    a = (i < j) ? i : j;
    b = (i < j) ? j : i;
    return a * NS - a * (a + 1) / 2 + b - a - 1;
  endfunction

  real sum_ee[2], sum_ne[2];
  int  cnt[2];

  initial begin
    logic [NS-1:0] vx, vy, ez;
    logic [NR-1:0] vr;
    // ---------------- function, NULL and global pre-charge
    for (int v = 0; v < 512; v++) begin
      {vx, vy, vr} = 9'(v);
      for (int i = 0; i < NS; i++) begin
        x[i] = enc(vx[i]);
        y[i] = enc(vy[i]);
      end
      for (int k = 0; k < NR; k++) r[k] = enc(vr[k]);
      #1;
      for (int i = 0; i < NS; i++) begin
        ez[i] = vx[i] & vy[i];
        for (int j = 0; j < NS; j++)
          if (j != i) ez[i] ^= (vx[i] & vy[j]) ^ vr[ridx(i, j)];
        check(z_ee[i] == enc(ez[i]), "share equation");
        check(z_ne[i] == z_ee[i], "noEE equals plain");
      end
      check((^ez) == ((^vx) & (^vy)), "recombined product");
      g = 1'b0;
      #1;
      check(z_ee == '0 && z_ne == '0, "global pre-charge gives NULL");
      g = 1'b1;
      #1;
      check(z_ee[0] == enc(ez[0]), "value back after global pre-charge");
      x = '0; y = '0; r = '0;
      #1;
      check(z_ee == '0 && z_ne == '0, "pre-charge gives NULL");
    end

    // ---------------- time until output share 0 is valid, unbalanced y rails
    sum_ee = '{0.0, 0.0};
    sum_ne = '{0.0, 0.0};
    cnt = '{0, 0};
    for (int v = 0; v < 512; v++) begin
      real te, tn, tmax;
      x = '0; y = '0; r = '0;
      #40;
      check(z_dee == '0 && z_dne == '0, "delayed multipliers pre-charged");
      {vx, vy, vr} = 9'(v);
      for (int i = 0; i < NS; i++) begin
        x[i] = enc(vx[i]);
        y[i] = enc(vy[i]);
      end
      for (int k = 0; k < NR; k++) r[k] = enc(vr[k]);
      te = -1.0;
      tn = -1.0;
      tmax = 0.0;
      for (int j = 0; j < NS; j++)
        if (vy[j] && real'(DLY[8*j +: 8]) > tmax) tmax = real'(DLY[8*j +: 8]);
      #0.25;
      for (int s = 0; s <= 2 * DMAX + 2; s++) begin
        if (te < 0.0 && dr_is_valid(z_dee[0])) te = real'(s) / 2.0;
        if (tn < 0.0 && dr_is_valid(z_dne[0])) tn = real'(s) / 2.0;
        #0.5;
      end
      check(te >= 0.0 && tn >= 0.0, "delayed multipliers evaluate");
      check(te == (vx[0] ? tmax : 0.0), "plain: predicted time of z0");
      check(tn == tmax, "noEE: predicted time of z0");
      check(z_dee == z_ee && z_dne == z_ee, "delayed multipliers give same value");
      sum_ee[^vy] += te;
      sum_ne[^vy] += tn;
      cnt[^vy]++;
    end
    $display("mean time to valid z0: plain y=0 %0.3f y=1 %0.3f, noEE y=0 %0.3f y=1 %0.3f",
             sum_ee[0] / cnt[0], sum_ee[1] / cnt[1], sum_ne[0] / cnt[0], sum_ne[1] / cnt[1]);
    check(cnt[0] == 256 && cnt[1] == 256, "balanced vector set");
    check(sum_ee[0] != sum_ee[1], "plain: mean time depends on y");
    check(sum_ne[0] != sum_ne[1], "noEE: mean time depends on y");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
