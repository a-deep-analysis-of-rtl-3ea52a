// glitch_free_masking_top - the two single-cycle glitch-free masking schemes
// side by side, each with its own fresh-mask generators.
//
// SESYM part: a first-order masked 5-bit Keccak chi (sesym_chi_system) whose
// five fresh mask bits come from five 31-bit LFSRs, one per bit. sesym_start
// captures the shares a0/a1 and the current masks (and advances the LFSRs);
// sesym_done pulses two cycles later with the result shares b0/b1 valid.
//
// LMDPL part: one non-linear LMDPL gadget (AND by default) whose mask comes
// from a sixth LFSR, and one linear gadget (XOR) on the same input shares.
// lmdpl_start captures x0, y0, the mask and the second shares x1, y1 (cycle 0,
// load of the register stage); cycle 1 is the evaluation phase (lmdpl_busy),
// where x1/y1 are driven in dual-rail form and the dual-rail result shares
// are captured; lmdpl_done is 1 in cycle 2 with
// lmdpl_z0 ^ lmdpl_z1 = F(x0^x1, y0^y1) and
// lmdpl_xor_z0 ^ lmdpl_xor_z1 = (x0^x1) ^ (y0^y1), and a new start is already
// accepted in that cycle (one operation every two cycles). In every other cycle the
// gadget's dual-rail side is pre-charged.
//
// All six LFSRs are loaded from mask_seed when mask_seed_load is 1 (power-up
// seeding). SESYM_GLOBAL_PC=1 selects the global pre-charge signal of the
// FPGA variant (see sesym_chi_system). Sequencing of the LMDPL part and the
// port layout are this design's choices.
module glitch_free_masking_top
  import drp_pkg::*;
#(
  parameter bit          SESYM_NOEE    = 1'b0,
  parameter int unsigned DLY_Y0_STAGES = 0,
  parameter int unsigned DLY_Y1_STAGES = 0,
  parameter bit          SESYM_GLOBAL_PC = 1'b0,
  parameter logic [3:0]  LMDPL_F_TT    = 4'b1000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mask_seed_load,
  input  logic [5:0][30:0] mask_seed,
  // SESYM masked chi
  input  logic             sesym_start,
  input  logic [4:0]       sesym_a0,
  input  logic [4:0]       sesym_a1,
  output logic [4:0]       sesym_b0,
  output logic [4:0]       sesym_b1,
  output logic             sesym_busy,
  output logic             sesym_done,
  // LMDPL gadget
  input  logic             lmdpl_start,
  input  logic             lmdpl_x0,
  input  logic             lmdpl_y0,
  input  logic             lmdpl_x1,
  input  logic             lmdpl_y1,
  output logic             lmdpl_z0,
  output logic             lmdpl_z1,
  output logic             lmdpl_xor_z0,
  output logic             lmdpl_xor_z1,
  output logic             lmdpl_busy,
  output logic             lmdpl_done
);
  logic [5:0] mask;
  logic [5:0] mask_step;
  logic       sesym_load;

  // ---------------------------------------------------------------- masks
  assign sesym_load   = sesym_start & ~sesym_busy;
  assign mask_step    = {lmdpl_start & ~lmdpl_busy, {5{sesym_load}}};

  for (genvar k = 0; k < 6; k++) begin : g_lfsr
    lfsr31 #(.RESET_STATE(31'h1357_9BDF + 31'(k) * 31'h0F0F_1111)) u_lfsr (
      .clk(clk), .rst_n(rst_n),
      .seed_load(mask_seed_load), .seed(mask_seed[k]),
      .step(mask_step[k]), .mask(mask[k])
    );
  end

  // ---------------------------------------------------------------- SESYM
  sesym_chi_system #(
    .NOEE(SESYM_NOEE), .DLY_Y0_STAGES(DLY_Y0_STAGES), .DLY_Y1_STAGES(DLY_Y1_STAGES),
    .GLOBAL_PC(SESYM_GLOBAL_PC)
  ) u_sesym (
    .clk(clk), .rst_n(rst_n), .start(sesym_load),
    .a0(sesym_a0), .a1(sesym_a1), .r(mask[4:0]),
    .b0(sesym_b0), .b1(sesym_b1),
    .busy(sesym_busy), .done(sesym_done)
  );

  // ---------------------------------------------------------------- LMDPL
  typedef enum logic [1:0] {L_IDLE, L_EVAL, L_DONE} lstate_e;
  lstate_e     lstate_q;
  logic        l_load, l_eval;
  logic        x1_q, y1_q, z0_d, z0_q, z1_q;
  logic        xz0_d, xz0_q, xz1_q;
  dr_t         x1_dr, y1_dr, z1_dr, xz1_dr;

  assign l_load = (lstate_q != L_EVAL) & lmdpl_start;
  assign l_eval = (lstate_q == L_EVAL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lstate_q <= L_IDLE;
      x1_q     <= 1'b0;
      z0_q     <= 1'b0;
      xz0_q    <= 1'b0;
      xz1_q    <= 1'b0;
      y1_q     <= 1'b0;
      z1_q     <= 1'b0;
    end else begin
      if (l_load) begin
        x1_q     <= lmdpl_x1;
        z0_q     <= z0_d;
        xz0_q    <= xz0_d;
        y1_q     <= lmdpl_y1;
        lstate_q <= L_EVAL;
      end else if (l_eval) begin
        z1_q     <= z1_dr.t;
        xz1_q    <= xz1_dr.t;
        lstate_q <= L_DONE;
      end else begin
        lstate_q <= L_IDLE;
      end
    end
  end

  assign x1_dr = dr_encode(x1_q, l_eval);
  assign y1_dr = dr_encode(y1_q, l_eval);

  lmdpl_and2 #(.F_TT(LMDPL_F_TT)) u_lmdpl (
    .clk(clk), .rst_n(rst_n), .load(l_load), .eval(l_eval),
    .x0(lmdpl_x0), .y0(lmdpl_y0), .r(mask[5]),
    .x1(x1_dr), .y1(y1_dr),
    .z0(z0_d), .z1(z1_dr)
  );

  // linear gadget on the same shares: x ^ y
  lmdpl_xor2 u_lmdpl_xor (
    .x0(lmdpl_x0), .y0(lmdpl_y0), .x1(x1_dr), .y1(y1_dr),
    .z0(xz0_d), .z1(xz1_dr)
  );

  assign lmdpl_xor_z0 = xz0_q;
  assign lmdpl_xor_z1 = xz1_q;
  assign lmdpl_z0   = z0_q;
  assign lmdpl_z1   = z1_q;
  assign lmdpl_busy = l_eval;
  assign lmdpl_done = (lstate_q == L_DONE);

  // The dual-rail results must be valid codes in the evaluation phase and
  // NULL in every other cycle.
  a_lmdpl_valid: assert property (@(posedge clk)
    l_eval |-> dr_is_valid(z1_dr) && dr_is_valid(xz1_dr));
  a_lmdpl_null: assert property (@(posedge clk)
    !l_eval |-> dr_is_null(z1_dr) && dr_is_null(xz1_dr));
endmodule
