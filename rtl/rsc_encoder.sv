// rsc_encoder: rate-1/2 recursive systematic convolutional encoder (RSC1 and
// RSC2 of the turbo encoder).
//
// The systematic output is the input bit itself, so only the parity bit is
// produced here. The code is the 8-state 3GPP constituent code (feedback
// 1 + D^2 + D^3, feed-forward 1 + D + D^3), see turbo_pkg. The published design names
// the two RSC encoders; the polynomials are the 3GPP ones it refers to.
//
// Interface and timing: parity is combinational from the current state and
// u. On a clock edge with en high the state advances by u; clear (synchronous)
// returns the register to the all-zero state that starts every block. The
// trellis is not terminated: no tail bits are generated.
module rsc_encoder
  import turbo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic       u,
  output logic       parity,
  output logic [2:0] state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '0;
    else if (clear) state <= '0;
    else if (en)    state <= rsc_next(state, u);
  end

  assign parity = rsc_parity(state, u);

endmodule
