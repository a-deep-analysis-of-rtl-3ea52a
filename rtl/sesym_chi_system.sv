// sesym_chi_system - complete SESYM circuit around the masked Keccak chi.
//
// Data path, left to right: input register (captures both single-rail input
// shares and the five fresh mask bits on load) -> single-to-dual-rail
// converter -> precharger -> masked chi (keccak_chi_sesym) -> Muller
// C-elements, which hold the result and turn it back into single-rail shares.
// A completion detector over the ten dual-rail output signals tells the
// controller that evaluation has finished, upon which the pre-charge phase
// starts; when all outputs are NULL again, done pulses.
// Interface: pulse start (while not busy) with a0, a1, r valid; the result
// shares b0, b1 (b0 ^ b1 = chi(a0 ^ a1)) are valid when done is 1 and stay
// until the next evaluation. Latency: done two cycles after start.
// GLOBAL_PC=1 also drives the controller's eval to every gadget as a global
// pre-charge signal, as in the FPGA variant of the scheme (there combined
// with noEE gadgets); it only changes how fast the pre-charge wave spreads.
// The input register and the clocked controller are this design's choices.
module sesym_chi_system
  import drp_pkg::*;
#(
  parameter bit          NOEE          = 1'b0,
  parameter int unsigned DLY_Y0_STAGES = 0,
  parameter int unsigned DLY_Y1_STAGES = 0,
  parameter bit          GLOBAL_PC     = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [4:0] a0,
  input  logic [4:0] a1,
  input  logic [4:0] r,
  output logic [4:0] b0,
  output logic [4:0] b1,
  output logic       busy,
  output logic       done
);
  localparam int unsigned NIN  = 15;
  localparam int unsigned NOUT = 10;

  logic [NIN-1:0]  in_q;
  dr_t  [NIN-1:0]  in_dr, in_pc;
  dr_t  [NOUT-1:0] out_dr;
  dr_t  [4:0]      b0_dr, b1_dr;
  logic [NOUT-1:0] out_q;
  logic            load, eval, all_valid, all_null;

  sesym_controller u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start),
    .all_valid(all_valid), .all_null(all_null),
    .load(load), .eval(eval), .busy(busy), .done(done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    in_q <= '0;
    else if (load) in_q <= {r, a1, a0};
  end

  single_to_dual_rail #(.N(NIN)) u_s2d (.x(in_q), .d(in_dr));
  precharger          #(.N(NIN)) u_pc  (.eval(eval), .d(in_dr), .q(in_pc));

  keccak_chi_sesym #(
    .NOEE(NOEE), .DLY_Y0_STAGES(DLY_Y0_STAGES), .DLY_Y1_STAGES(DLY_Y1_STAGES)
  ) u_chi (
    .a0(in_pc[4:0]), .a1(in_pc[9:5]), .r(in_pc[14:10]),
    .geval(GLOBAL_PC ? eval : 1'b1),
    .b0(b0_dr), .b1(b1_dr)
  );

  assign out_dr = {b1_dr, b0_dr};

  completion_detector #(.N(NOUT)) u_cd (
    .d(out_dr), .all_valid(all_valid), .all_null(all_null)
  );

  c_element_array #(.N(NOUT)) u_c (.rst_n(rst_n), .d(out_dr), .q(out_q));

  assign b0 = out_q[4:0];
  assign b1 = out_q[9:5];
endmodule
