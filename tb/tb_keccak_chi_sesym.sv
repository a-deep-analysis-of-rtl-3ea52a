// tb_keccak_chi_sesym - checks the masked chi (plain and noEE multipliers)
// for every 5-bit row with random sharings and masks: the output shares must
// recombine to chi(a), share 0 must match the DOM share equation exactly, and
// NULL inputs must give NULL outputs. The global pre-charge input must force
// every output to NULL while the inputs stay valid, and release the same
// values.
module tb_keccak_chi_sesym;
  import drp_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  dr_t [4:0] a0, a1, r, b0, b1, b0n, b1n, h0, h1;
  logic      geval = 1'b1;

  keccak_chi_sesym #(.NOEE(1'b0)) dut    (.a0(a0), .a1(a1), .r(r), .geval(geval), .b0(b0),  .b1(b1));
  keccak_chi_sesym #(.NOEE(1'b1)) dut_ne (.a0(a0), .a1(a1), .r(r), .geval(geval), .b0(b0n), .b1(b1n));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic dr_t [4:0] enc5(input logic [4:0] v);
    dr_t [4:0] d;
    for (int i = 0; i < 5; i++) d[i] = '{t: v[i], f: ~v[i]};
    return d;
  endfunction

  function automatic logic [4:0] dec5(input dr_t [4:0] d, output logic ok);
    logic [4:0] v;
    ok = 1'b1;
    for (int i = 0; i < 5; i++) begin
      v[i] = d[i].t;
      if (d[i].t == d[i].f) ok = 1'b0;
    end
    return v;
  endfunction

  initial begin
    logic [4:0] a, s0, s1, m, v0, v1, e0;
    logic ok0, ok1;
    for (int rep = 0; rep < 8; rep++) begin
      for (int av = 0; av < 32; av++) begin
        a  = 5'(av);
        s0 = 5'($urandom);
        s1 = s0 ^ a;
        m  = 5'($urandom);
        a0 = enc5(s0); a1 = enc5(s1); r = enc5(m);
        #1;
        v0 = dec5(b0, ok0);
        v1 = dec5(b1, ok1);
        check(ok0 && ok1, "all outputs valid");
        check((v0 ^ v1) == chi(a), "recombined chi");
        for (int i = 0; i < 5; i++) begin
          e0[i] = s0[i] ^ (~s0[(i + 1) % 5] & s0[(i + 2) % 5])
                        ^ (~s0[(i + 1) % 5] & s1[(i + 2) % 5]) ^ m[i];
        end
        check(v0 == e0, "share 0 equation");
        check(b0n == b0 && b1n == b1, "noEE variant agrees");
        h0 = b0; h1 = b1;
        geval = 1'b0;
        #1;
        check(b0 == '0 && b1 == '0 && b0n == '0 && b1n == '0, "global pre-charge gives NULL");
        geval = 1'b1;
        #1;
        check(b0 == h0 && b1 == h1 && b0n == h0 && b1n == h1, "same result after global pre-charge");
        a0 = '0; a1 = '0; r = '0;
        #1;
        check(b0 == '0 && b1 == '0 && b0n == '0 && b1n == '0, "pre-charge gives NULL");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
