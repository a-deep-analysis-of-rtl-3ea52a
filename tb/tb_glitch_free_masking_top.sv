// tb_glitch_free_masking_top - end-to-end test of the top at its default
// parameters. Both schemes run concurrently from their own start signals:
// the SESYM chi circuit and the LMDPL AND and XOR gadgets, with the masks of six
// seeded LFSRs predicted by an independent model of the LFSR recurrence.
// Every result share is checked exactly, together with the latency (done two
// cycles after an accepted start for both), and the tb counts how often each
// mechanism occurred: seeding, mask advance, SESYM evaluation phase ended by
// the completion detector, SESYM pre-charge phase, result held by the
// C-elements over the pre-charge phase and idle time, LMDPL load / evaluation
// / pre-charge, and a start ignored while busy. A mechanism that never occurs
// counts as a failure.
module tb_glitch_free_masking_top;
  import drp_pkg::*;
  localparam int NOPS = 400;

  logic clk = 1'b0;
  int checks = 0, failures = 0;

  logic             rst_n, mask_seed_load;
  logic [5:0][30:0] mask_seed;
  logic             sesym_start, sesym_busy, sesym_done;
  logic [4:0]       sesym_a0, sesym_a1, sesym_b0, sesym_b1;
  logic             lmdpl_start, lmdpl_x0, lmdpl_y0, lmdpl_x1, lmdpl_y1;
  logic             lmdpl_z0, lmdpl_z1, lmdpl_busy, lmdpl_done;
  logic             lmdpl_xor_z0, lmdpl_xor_z1;

  glitch_free_masking_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40 * NOPS) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // ---- mask model: output bit n of an LFSR seeded with s is b[n], with
  // b[0..30] = s[30..0] and b[n+31] = b[n] ^ b[n+3].
  bit mseq[6][$];
  task automatic build_masks(input int k, input logic [30:0] s, input int len);
    mseq[k].delete();
    for (int i = 30; i >= 0; i--) mseq[k].push_back(s[i]);
    for (int n = 0; n < len; n++) mseq[k].push_back(mseq[k][n] ^ mseq[k][n + 3]);
  endtask

  function automatic logic [4:0] chi(input logic [4:0] a);
    logic [4:0] b;
    for (int i = 0; i < 5; i++) b[i] = a[i] ^ (~a[(i + 1) % 5] & a[(i + 2) % 5]);
    return b;
  endfunction

  // ---- mechanism counters
  int n_seed, n_mask_adv, n_sesym_eval, n_sesym_cd, n_sesym_prech, n_hold;
  int n_lmdpl_load, n_lmdpl_eval, n_lmdpl_prech, n_ignored;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_sesym.eval) n_sesym_eval++;
    if (dut.u_sesym.eval && dut.u_sesym.all_valid) n_sesym_cd++;
    if (dut.u_sesym.u_ctrl.state_q == dut.u_sesym.u_ctrl.PRECH) n_sesym_prech++;
    if (dut.u_lmdpl.load) n_lmdpl_load++;
    if (dut.u_lmdpl.eval) n_lmdpl_eval++;
    if (!dut.u_lmdpl.eval && dr_is_null(dut.u_lmdpl.z1)) n_lmdpl_prech++;
    if (sesym_start && sesym_busy) n_ignored++;
    if (lmdpl_start && lmdpl_busy) n_ignored++;
  end

  int sesym_ops = 0, lmdpl_ops = 0;

  initial begin
    rst_n = 1'b0; mask_seed_load = 1'b0; mask_seed = '0;
    sesym_start = 1'b0; sesym_a0 = '0; sesym_a1 = '0;
    lmdpl_start = 1'b0; {lmdpl_x0, lmdpl_y0, lmdpl_x1, lmdpl_y1} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 6; k++) begin
      mask_seed[k] = 31'($urandom);
      build_masks(k, mask_seed[k], NOPS + 64);
    end
    mask_seed_load = 1'b1;
    @(negedge clk);
    mask_seed_load = 1'b0;
    n_seed++;

    fork
      // ------------------------------------------------ SESYM chi
      begin
        logic [4:0] s0, s1, m, m_prev, e0, e1;
        int lat;
        m_prev = '0;
        for (int k = 0; k < NOPS; k++) begin
          repeat ($urandom_range(0, 3)) @(negedge clk);
          s0 = 5'($urandom); s1 = 5'($urandom);
          for (int i = 0; i < 5; i++) m[i] = mseq[i][k];
          if (k > 0 && m != m_prev) n_mask_adv++;
          m_prev = m;
          sesym_a0 = s0; sesym_a1 = s1; sesym_start = 1'b1;
          @(negedge clk);
          check(sesym_busy, "SESYM accepted start");
          // sometimes keep start high one more cycle: must be ignored
          sesym_start = (k % 5 == 0);
          sesym_a0 = 5'($urandom); sesym_a1 = 5'($urandom);
          lat = 1;
          while (!sesym_done && lat < 20) begin
            @(negedge clk);
            sesym_start = 1'b0;
            lat++;
          end
          sesym_start = 1'b0;
          check(lat == 2, "SESYM done two cycles after start");
          for (int i = 0; i < 5; i++) begin
            e0[i] = s0[i] ^ (~s0[(i + 1) % 5] & s0[(i + 2) % 5])
                          ^ (~s0[(i + 1) % 5] & s1[(i + 2) % 5]) ^ m[i];
            e1[i] = s1[i] ^ (s1[(i + 1) % 5] & s1[(i + 2) % 5])
                          ^ (s1[(i + 1) % 5] & s0[(i + 2) % 5]) ^ m[i];
          end
          check(sesym_b0 == e0 && sesym_b1 == e1, "SESYM result shares");
          check((sesym_b0 ^ sesym_b1) == chi(s0 ^ s1), "SESYM recombined chi");
          @(negedge clk);
          check(!sesym_busy, "SESYM idle after done");
          if (sesym_b0 == e0 && sesym_b1 == e1) n_hold++;
          else check(1'b0, "SESYM result held");
          sesym_ops++;
        end
      end
      // ------------------------------------------------ LMDPL AND
      begin
        logic vx0, vy0, vx1, vy1, m;
        int lat;
        for (int k = 0; k < NOPS; k++) begin
          repeat ($urandom_range(0, 3)) @(negedge clk);
          {vx0, vy0, vx1, vy1} = 4'($urandom);
          m = mseq[5][k];
          {lmdpl_x0, lmdpl_y0, lmdpl_x1, lmdpl_y1} = {vx0, vy0, vx1, vy1};
          lmdpl_start = 1'b1;
          @(negedge clk);
          check(lmdpl_busy, "LMDPL accepted start");
          lmdpl_start = (k % 7 == 0);
          {lmdpl_x0, lmdpl_y0, lmdpl_x1, lmdpl_y1} = 4'($urandom);
          lat = 1;
          while (!lmdpl_done && lat < 20) begin
            @(negedge clk);
            lmdpl_start = 1'b0;
            lat++;
          end
          lmdpl_start = 1'b0;
          check(lat == 2, "LMDPL done two cycles after start");
          check(lmdpl_z0 == m, "LMDPL z0 is the fresh mask");
          check((lmdpl_z0 ^ lmdpl_z1) == ((vx0 ^ vx1) & (vy0 ^ vy1)), "LMDPL recombined AND");
          check(lmdpl_xor_z0 == (vx0 ^ vy0), "LMDPL linear gadget share 0");
          check((lmdpl_xor_z0 ^ lmdpl_xor_z1) == ((vx0 ^ vx1) ^ (vy0 ^ vy1)), "LMDPL recombined XOR");
          lmdpl_ops++;
        end
      end
    join

    check(sesym_ops == NOPS && lmdpl_ops == NOPS, "all operations completed");
    $display("mechanisms: seed=%0d mask_advance=%0d sesym_eval=%0d completion=%0d sesym_precharge=%0d held=%0d lmdpl_load=%0d lmdpl_eval=%0d lmdpl_precharge=%0d ignored_start=%0d",
             n_seed, n_mask_adv, n_sesym_eval, n_sesym_cd, n_sesym_prech, n_hold,
             n_lmdpl_load, n_lmdpl_eval, n_lmdpl_prech, n_ignored);
    check(n_seed > 0, "seeding happened");
    check(n_mask_adv > 0, "masks advanced");
    check(n_sesym_eval > 0, "SESYM evaluation phase happened");
    check(n_sesym_cd > 0, "completion detector ended an evaluation");
    check(n_sesym_prech > 0, "SESYM pre-charge phase happened");
    check(n_hold > 0, "C-elements held a result");
    check(n_lmdpl_load > 0, "LMDPL register stage loaded");
    check(n_lmdpl_eval > 0, "LMDPL evaluation happened");
    check(n_lmdpl_prech > 0, "LMDPL pre-charge happened");
    check(n_ignored > 0, "start while busy was ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
