// turbo_pkg: constants and trellis functions shared by the turbo encoder and decoder.
//
// The constituent code is a memory-4 recursive systematic convolutional (RSC) code with
//   feedback    G0 = 1 + D + D^3 + D^4
//   feedforward G1 = 1 + D^2 + D^3 + D^4
// (the two generator polynomials are the document's; which one is fed back is this design's
// choice, following the usual RSC convention that G0 is the feedback polynomial).
//
// Encoder state s holds the last four values of the recursive register a(n):
//   s[0] = a(n-1), s[1] = a(n-2), s[2] = a(n-3), s[3] = a(n-4)
// For input bit u:
//   a(n)   = u ^ s[0] ^ s[2] ^ s[3]           (G0)
//   parity = a(n) ^ s[1] ^ s[2] ^ s[3]        (G1)
//   next   = {s[2:0], a(n)}
//
// Soft values are signed log-likelihood ratios LLR = ln(P(bit=1)/P(bit=0)), so a positive LLR
// means bit 1. They are fixed point with LLR_FRAC fractional bits (LSB = 1/4 nat); this scale
// is this design's choice and sets the Log-MAP correction table in max_star().
package turbo_pkg;

  localparam int unsigned MEM     = 4;            // encoder memory (constraint length 5)
  localparam int unsigned NSTATES = 1 << MEM;     // 16 trellis states
  localparam int unsigned LLR_FRAC = 2;           // fractional bits of every soft value

  typedef logic [MEM-1:0] state_t;

  // Register taps of the two polynomials (bit i is the D^(i+1) term).
  localparam state_t G0_TAPS = 4'b1101;   // D, D^3, D^4
  localparam state_t G1_TAPS = 4'b1110;   // D^2, D^3, D^4

  // Recursive (feedback) bit a(n) of G0 = 1 + D + D^3 + D^4.
  function automatic logic rsc_feedback(state_t s, logic u);
    return u ^ (^(s & G0_TAPS));
  endfunction

  // Parity bit of G1 = 1 + D^2 + D^3 + D^4 applied to the recursive sequence.
  function automatic logic rsc_parity(state_t s, logic u);
    return rsc_feedback(s, u) ^ (^(s & G1_TAPS));
  endfunction

  // State after input u.
  function automatic state_t rsc_next(state_t s, logic u);
    return {s[MEM-2:0], rsc_feedback(s, u)};
  endfunction

  // Correction term of the Jacobian logarithm, ln(1 + exp(-d)), for a metric difference d
  // given in LSBs of 2^-LLR_FRAC nat, returned in the same units:
  //   corr(d) = round(4 * ln(1 + exp(-d/4)))
  // which is 3 for d = 0, 2 for d = 1..3, 1 for d = 4..8 and 0 from d = 9 on.
  function automatic logic [1:0] logmap_corr(logic [15:0] d);
    return (d == 16'd0) ? 2'd3 :
           (d <= 16'd3) ? 2'd2 :
           (d <= 16'd8) ? 2'd1 : 2'd0;
  endfunction

endpackage
