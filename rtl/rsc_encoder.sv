// rsc_encoder: one constituent encoder (C1 or C2) of the turbo encoder.
//
// An 8-state recursive systematic convolutional encoder with the UMTS
// polynomials (feedback 1 + D^2 + D^3, parity 1 + D + D^3; see turbo_pkg).
// The systematic bit is not repeated here: the encoder gives only the parity
// bit. As in the codec this belongs to, no tail bits are generated: the block
// simply ends in whatever state it reached (no trellis termination).
//
// Interface and timing: 'init' clears the register to state 0 (the start
// state of every block). When 'en' is high, 'u' is consumed and 'parity' (a
// combinational function of the current state and 'u') is the coded bit for
// that input; the state advances on the same clock edge.
module rsc_encoder
  import turbo_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic init,     // return to state 0 (start of a block)
  input  logic en,       // consume 'u' this cycle
  input  logic u,        // information bit
  output logic parity,   // parity bit for 'u'
  output state_t state   // current encoder state (for observation)
);

  state_t st;

  assign parity = rsc_parity(st, u);
  assign state  = st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    st <= '0;
    else if (init) st <= '0;
    else if (en)   st <= rsc_next(st, u);
  end

endmodule
