// turbo_encoder: rate-1/3 parallel concatenated (turbo) encoder.
//
// The information bits go straight to the first RSC encoder, which gives the systematic bit
// and the first parity bit, and through the block interleaver to the second RSC encoder, which
// gives the second parity bit (structure as in the document). The codeword of each bit k is
// the triple (systematic_k, parity1_k, parity2_k), where parity2_k is the second encoder's
// parity for interleaved bit k. To emit the three streams side by side, the systematic and
// first parity bits pass through a delay buffer with the interleaver's timing (an interleaver
// instance with the identity order); this alignment is this design's choice.
//
// Interface: in_valid/in_bit, one information bit per cycle, blocks of K bits counted from
// reset (gaps are allowed). Output: out_valid with sys_bit, parity1, parity2 and out_first on
// the first bit of a block. Both RSC encoders restart from state 0 on every block.
// Timing: with back-to-back input every bit's codeword leaves K+2 cycles after the bit enters
// (K+1 in the interleaver, one output register), at one codeword per clock.
module turbo_encoder #(
  parameter int unsigned K        = 6,
  parameter int unsigned PERM [K] = '{2, 3, 4, 0, 5, 1}
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_first,
  output logic sys_bit,
  output logic parity1,
  output logic parity2
);

  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;

  logic [KW-1:0] cnt_q;
  logic          in_first;
  logic          sys1, par1;
  logic          ilv_valid, ilv_first, ilv_bit;
  logic          dly_valid, dly_first;
  logic [1:0]    dly_bits;
  logic          sys2_unused, par2;

  always_ff @(posedge clk) begin
    if (rst)           cnt_q <= '0;
    else if (in_valid) cnt_q <= (cnt_q == KW'(K - 1)) ? '0 : cnt_q + 1'b1;
  end
  assign in_first = (cnt_q == '0);

  rsc_encoder u_enc1 (
    .clk, .rst,
    .in_valid   (in_valid),
    .in_first   (in_first),
    .in_bit     (in_bit),
    .sys_bit    (sys1),
    .parity_bit (par1)
  );

  interleaver #(.W(1), .K(K), .PERM(PERM)) u_ilv (
    .clk, .rst,
    .in_valid  (in_valid),
    .in_data   (in_bit),
    .out_valid (ilv_valid),
    .out_first (ilv_first),
    .out_data  (ilv_bit)
  );

  interleaver #(.W(2), .K(K), .PERM(PERM), .IDENTITY(1'b1)) u_dly (
    .clk, .rst,
    .in_valid  (in_valid),
    .in_data   ({sys1, par1}),
    .out_valid (dly_valid),
    .out_first (dly_first),
    .out_data  (dly_bits)
  );

  rsc_encoder u_enc2 (
    .clk, .rst,
    .in_valid   (ilv_valid),
    .in_first   (ilv_first),
    .in_bit     (ilv_bit),
    .sys_bit    (sys2_unused),
    .parity_bit (par2)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      sys_bit   <= 1'b0;
      parity1   <= 1'b0;
      parity2   <= 1'b0;
    end else begin
      out_valid <= ilv_valid;
      out_first <= ilv_first;
      sys_bit   <= dly_bits[1];
      parity1   <= dly_bits[0];
      parity2   <= par2;
    end
  end

  // The delay buffer and the interleaver see the same writes and so run in lock step.
  a_aligned: assert property (@(posedge clk) disable iff (rst)
    (dly_valid == ilv_valid) && (dly_first == ilv_first))
    else $error("turbo_encoder: delay buffer out of step with the interleaver");

endmodule
