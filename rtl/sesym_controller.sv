// sesym_controller - pre-charge / evaluation sequencer of a SESYM circuit.
//
// States: IDLE (pre-charged, waiting for start), EVAL (inputs released,
// waiting for the completion detector), PRECH (pre-charge wave, waiting for
// all outputs to return to NULL). A start in IDLE pulses load for one cycle
// so that the input register captures the new shares, and the next cycle is
// the evaluation phase. As soon as all_valid is seen in EVAL the controller
// leaves it, i.e. the completion of evaluation launches the pre-charge phase;
// when all_null is seen in PRECH, done pulses for one cycle and the
// controller returns to IDLE. With the combinational masked circuit this
// gives start -> load (cycle 0), EVAL (cycle 1), PRECH + done (cycle 2).
// Sampling the self-timed handshake with a clock, rather than running the
// loop asynchronously, is this design's choice.
module sesym_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic all_valid,
  input  logic all_null,
  output logic load,
  output logic eval,
  output logic busy,
  output logic done
);
  typedef enum logic [1:0] {IDLE, EVAL, PRECH} state_e;
  state_e state_q, state_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= IDLE;
    else        state_q <= state_d;
  end

  always_comb begin
    state_d = state_q;
    load    = 1'b0;
    done    = 1'b0;
    unique case (state_q)
      IDLE: if (start) begin
        load    = 1'b1;
        state_d = EVAL;
      end
      EVAL: if (all_valid) state_d = PRECH;
      PRECH: if (all_null) begin
        done    = 1'b1;
        state_d = IDLE;
      end
      default: state_d = IDLE;
    endcase
  end

  assign eval = (state_q == EVAL);
  assign busy = (state_q != IDLE);

  // Outside the evaluation phase the masked circuit must be fully pre-charged.
  a_null_when_precharged: assert property (@(posedge clk)
    (state_q == IDLE) |-> all_null);
endmodule
