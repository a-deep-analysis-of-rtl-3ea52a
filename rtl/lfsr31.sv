// lfsr31 - 31-bit Fibonacci LFSR used as the source of one fresh mask bit.
//
// Feedback polynomial x^31 + x^28 + 1 (maximal length, period 2^31-1): each
// step shifts the state left by one and inserts s[30] ^ s[27]. The mask bit
// is s[30]. The state is loaded from seed when seed_load=1 (a zero seed,
// which would lock the register, is replaced by 1) and advanced by one step
// per clock with step=1. One LFSR per mask bit, seeded at power-up, follows
// the reference setup; the polynomial and the seed handling are this
// design's choice.
module lfsr31 #(
  parameter logic [30:0] RESET_STATE = 31'h5A5A_1234
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_load,
  input  logic [30:0] seed,
  input  logic        step,
  output logic        mask
);
  logic [30:0] s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         s_q <= (RESET_STATE == '0) ? 31'd1 : RESET_STATE;
    else if (seed_load) s_q <= (seed == '0) ? 31'd1 : seed;
    else if (step)      s_q <= {s_q[29:0], s_q[30] ^ s_q[27]};
  end

  assign mask = s_q[30];
endmodule
