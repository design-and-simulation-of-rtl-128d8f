// rsc_encoder: one recursive systematic convolutional encoder of the turbo code.
//
// A four-bit shift register holds the recursive sequence a(n); XOR gates form the feedback
// G0 = 1 + D + D^3 + D^4 and the parity G1 = 1 + D^2 + D^3 + D^4 (polynomials from the
// document; see turbo_pkg for the state layout). The systematic output is the input bit itself.
//
// Interface: in_valid qualifies in_bit. in_first marks the first bit of a block: the encoder
// then behaves as if its register were zero, so every block starts in state 0 (per-block
// restart is this design's choice; the trellis is not terminated at the block end).
// Timing: sys_bit and parity_bit are combinational functions of the registered state and the
// current in_bit, valid in the same cycle as in_valid; the register advances on the clock edge
// of every valid bit. rst is synchronous and active high and clears the register.
module rsc_encoder
  import turbo_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_first,
  input  logic in_bit,
  output logic sys_bit,
  output logic parity_bit
);

  state_t state_q;
  state_t state_cur;

  always_comb begin
    state_cur  = in_first ? '0 : state_q;
    sys_bit    = in_bit;
    parity_bit = rsc_parity(state_cur, in_bit);
  end

  always_ff @(posedge clk) begin
    if (rst)           state_q <= '0;
    else if (in_valid) state_q <= rsc_next(state_cur, in_bit);
  end

endmodule
