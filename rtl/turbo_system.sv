// turbo_system: the transmit and receive sides of the turbo-coded link.
//
// Information bits enter the turbo encoder, whose rate-1/3 codeword (systematic bit and two
// parity bits per information bit) leaves on the enc_* ports towards the channel. The channel
// itself (modulation, noise, and the receiver's conversion of samples into LLRs) is outside
// this design; its soft output comes back on the dec_* ports into the iterative turbo decoder,
// whose decisions leave on the out_* ports. Both sides share the block length K and the
// interleaver order PERM.
//
// Timing: see turbo_encoder (one codeword per cycle, K+2 cycles latency) and turbo_decoder (one
// block at a time, dec_ready low while a block is being decoded). rst is synchronous, active
// high, and resets both sides.
module turbo_system #(
  parameter int unsigned K        = 6,
  parameter int unsigned PERM [K] = '{2, 3, 4, 0, 5, 1},
  parameter int unsigned LW       = 6,
  parameter int unsigned EW       = 8,
  parameter int unsigned MW       = 12,
  parameter int unsigned NITER    = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  // information bits in
  input  logic                 in_valid,
  input  logic                 in_bit,
  // codeword out, towards the channel
  output logic                 enc_valid,
  output logic                 enc_first,
  output logic                 enc_sys,
  output logic                 enc_par1,
  output logic                 enc_par2,
  // channel LLRs in, from the receiver front end
  input  logic                 dec_valid,
  input  logic signed [LW-1:0] dec_sys,
  input  logic signed [LW-1:0] dec_par1,
  input  logic signed [LW-1:0] dec_par2,
  output logic                 dec_ready,
  // decoded bits out
  output logic                 out_valid,
  output logic                 out_first,
  output logic                 out_bit,
  output logic signed [MW-1:0] out_llr
);

  turbo_encoder #(.K(K), .PERM(PERM)) u_encoder (
    .clk, .rst,
    .in_valid  (in_valid),
    .in_bit    (in_bit),
    .out_valid (enc_valid),
    .out_first (enc_first),
    .sys_bit   (enc_sys),
    .parity1   (enc_par1),
    .parity2   (enc_par2)
  );

  turbo_decoder #(.K(K), .PERM(PERM), .LW(LW), .EW(EW), .MW(MW), .NITER(NITER)) u_decoder (
    .clk, .rst,
    .in_valid  (dec_valid),
    .in_sys    (dec_sys),
    .in_par1   (dec_par1),
    .in_par2   (dec_par2),
    .in_ready  (dec_ready),
    .out_valid (out_valid),
    .out_first (out_first),
    .out_bit   (out_bit),
    .out_llr   (out_llr)
  );

endmodule
