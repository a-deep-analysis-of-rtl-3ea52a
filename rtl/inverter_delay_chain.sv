// inverter_delay_chain - behavioural model of a delay line built from
// cascaded inverters (one inverter per LUT or standard cell).
//
// kind: behavioural model. STAGES inverters are chained; each adds
// STAGE_DELAY time units of transport delay, so the output follows the input
// after STAGES*STAGE_DELAY. An even stage count keeps the polarity, which the
// elaboration check enforces. With STAGES = 0 the chain is a plain wire. The
// delays are only seen in simulation; synthesis keeps the inverter chain,
// logically a buffer. Such chains are used to unbalance a rail on purpose (6
// inverters on one rail, 10 on another in the reference experiment); the
// per-stage delay value is this model's choice.
module inverter_delay_chain #(
  parameter int unsigned STAGES      = 6,
  parameter int unsigned STAGE_DELAY = 1
) (
  input  logic a,
  output logic y
);
  if (STAGES % 2 != 0) begin : g_odd
    $error("inverter_delay_chain: STAGES must be even to keep the polarity");
  end

  if (STAGES == 0) begin : g_wire
    assign y = a;
  end else begin : g_chain
    logic [STAGES:0] n;
    assign n[0] = a;
    for (genvar i = 0; i < STAGES; i++) begin : g_inv
      assign #(STAGE_DELAY) n[i+1] = ~n[i];
    end
    assign y = n[STAGES];
  end
endmodule
