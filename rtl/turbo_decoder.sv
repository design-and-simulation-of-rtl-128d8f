// turbo_decoder: iterative turbo decoder with two Log-MAP SISO decoders.
//
// Structure (as in the document): SISO decoder 1 works on the systematic and first parity
// LLRs, SISO decoder 2 on the interleaved systematic LLRs and the second parity LLRs. The
// extrinsic output of decoder 1 is interleaved and becomes the a-priori input of decoder 2;
// the extrinsic output of decoder 2 is de-interleaved and becomes the a-priori input of
// decoder 1. The hard decision is taken from decoder 1's a-posteriori LLR (bit = 1 when the
// LLR is positive).
//
// Schedule (this design's choice): the two decoders take turns. Decoder 1 starts with zero
// a-priori values; NITER full iterations (decoder 1 then decoder 2) are run, and a final pass
// of decoder 1 with the last a-priori values from decoder 2 gives the decisions. The iteration
// count is a parameter; the document asks only for "a sufficient number of iterations".
//
// Interface: one codeword symbol per cycle, (in_sys, in_par1, in_par2) as signed LLRs with
// in_valid, K symbols per block, accepted only while in_ready is high. The decoded bits leave in
// order, one per cycle, with out_valid, out_first on the first bit, out_bit and the
// a-posteriori LLR out_llr. in_ready falls after the K-th symbol and rises again after the
// last decoded bit, so one block is decoded at a time.
// Timing: a SISO pass takes K cycles to read its a-priori values, K for the backward pass and
// K+1 until its last result; the interleaver between the decoders fills while the results
// leave and adds 2 cycles, so one half-iteration takes 3K+2 cycles. Counting from the clock
// edge that takes the last input symbol, the first decoded bit is registered on edge
//   K (zero a-priori) + 2*NITER*(3K+2) + K+1  =  (6*NITER+2)*K + 4*NITER + 1
// (173 for K = 6, NITER = 4) and the other K-1 bits follow on consecutive cycles. in_ready
// returns the cycle after the last decoded bit.
module turbo_decoder #(
  parameter int unsigned K        = 6,
  parameter int unsigned PERM [K] = '{2, 3, 4, 0, 5, 1},
  parameter int unsigned LW       = 6,
  parameter int unsigned EW       = 8,
  parameter int unsigned MW       = 12,
  parameter int unsigned NITER    = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [LW-1:0] in_sys,
  input  logic signed [LW-1:0] in_par1,
  input  logic signed [LW-1:0] in_par2,
  output logic                 in_ready,
  output logic                 out_valid,
  output logic                 out_first,
  output logic                 out_bit,
  output logic signed [MW-1:0] out_llr
);

  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned IW = $clog2(NITER + 1) + 1;
  typedef logic [KW-1:0] idx_t;

  typedef enum logic [1:0] {C_LOAD, C_ZERO, C_RUN} ctrl_t;

  ctrl_t  state_q;
  idx_t   cnt_q;        // symbols loaded / zeros sent / decoder-1 results seen
  logic [IW-1:0] pass_q; // passes of decoder 1 completed in this block
  logic   final_pass;

  // decoder 1
  logic                 d1_apr_valid;
  logic signed [EW-1:0] d1_apr;
  logic                 d1_busy, d1_valid, d1_first;
  logic signed [EW-1:0] d1_ext;
  logic signed [MW-1:0] d1_app;
  // decoder 2
  logic                 d2_ch_valid, d2_ch_valid_p2;
  logic                 d2_ch_first_unused, d2_p2_first_unused;
  logic signed [LW-1:0] d2_sys, d2_par;
  logic                 d2_apr_valid, d2_apr_first_unused;
  logic signed [EW-1:0] d2_apr;
  logic                 d2_busy, d2_valid, d2_first_unused;
  logic signed [EW-1:0] d2_ext;
  logic signed [MW-1:0] d2_app_unused;
  // de-interleaved extrinsic of decoder 2
  logic                 dei_valid, dei_first_unused;
  logic signed [EW-1:0] dei_ext;

  assign final_pass = (pass_q == IW'(NITER));

  // ---------------------------------------------------------------- decoder 1
  always_comb begin
    if (state_q == C_ZERO) begin
      d1_apr_valid = 1'b1;
      d1_apr       = '0;
    end else begin
      d1_apr_valid = dei_valid;
      d1_apr       = dei_ext;
    end
  end

  siso_decoder #(.K(K), .LW(LW), .EW(EW), .MW(MW)) u_siso1 (
    .clk, .rst,
    .ch_valid  (in_valid && in_ready),
    .ch_sys    (in_sys),
    .ch_par    (in_par1),
    .apr_valid (d1_apr_valid),
    .apr       (d1_apr),
    .busy      (d1_busy),
    .out_valid (d1_valid),
    .out_first (d1_first),
    .ext       (d1_ext),
    .app       (d1_app)
  );

  // ---------------------------------------------------------------- decoder 2 inputs
  interleaver #(.W(LW), .K(K), .PERM(PERM)) u_ilv_sys (
    .clk, .rst,
    .in_valid  (in_valid && in_ready),
    .in_data   (in_sys),
    .out_valid (d2_ch_valid),
    .out_first (d2_ch_first_unused),
    .out_data  (d2_sys)
  );

  interleaver #(.W(LW), .K(K), .PERM(PERM), .IDENTITY(1'b1)) u_dly_par2 (
    .clk, .rst,
    .in_valid  (in_valid && in_ready),
    .in_data   (in_par2),
    .out_valid (d2_ch_valid_p2),
    .out_first (d2_p2_first_unused),
    .out_data  (d2_par)
  );

  interleaver #(.W(EW), .K(K), .PERM(PERM)) u_ilv_ext (
    .clk, .rst,
    .in_valid  (d1_valid && !final_pass),
    .in_data   (d1_ext),
    .out_valid (d2_apr_valid),
    .out_first (d2_apr_first_unused),
    .out_data  (d2_apr)
  );

  siso_decoder #(.K(K), .LW(LW), .EW(EW), .MW(MW)) u_siso2 (
    .clk, .rst,
    .ch_valid  (d2_ch_valid),
    .ch_sys    (d2_sys),
    .ch_par    (d2_par),
    .apr_valid (d2_apr_valid),
    .apr       (d2_apr),
    .busy      (d2_busy),
    .out_valid (d2_valid),
    .out_first (d2_first_unused),
    .ext       (d2_ext),
    .app       (d2_app_unused)
  );

  interleaver #(.W(EW), .K(K), .PERM(PERM), .INVERSE(1'b1)) u_deint_ext (
    .clk, .rst,
    .in_valid  (d2_valid),
    .in_data   (d2_ext),
    .out_valid (dei_valid),
    .out_first (dei_first_unused),
    .out_data  (dei_ext)
  );

  // ---------------------------------------------------------------- iteration control
  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= C_LOAD;
      cnt_q   <= '0;
      pass_q  <= '0;
    end else begin
      unique case (state_q)
        C_LOAD: if (in_valid) begin
          if (cnt_q == idx_t'(K - 1)) begin
            cnt_q   <= '0;
            state_q <= C_ZERO;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        C_ZERO: begin
          if (cnt_q == idx_t'(K - 1)) begin
            cnt_q   <= '0;
            state_q <= C_RUN;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        C_RUN: if (d1_valid) begin
          if (cnt_q == idx_t'(K - 1)) begin
            cnt_q <= '0;
            if (final_pass) begin
              pass_q  <= '0;
              state_q <= C_LOAD;
            end else begin
              pass_q <= pass_q + 1'b1;
            end
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: state_q <= C_LOAD;
      endcase
    end
  end

  assign in_ready = (state_q == C_LOAD);

  // ---------------------------------------------------------------- decisions
  always_comb begin
    out_valid = d1_valid && final_pass && (state_q == C_RUN);
    out_first = d1_first && out_valid;
    out_llr   = d1_app;
    out_bit   = (d1_app > 0);
  end

  // The two parts of decoder 2's channel input travel in lock step, and the two decoders
  // never run at the same time in this schedule.
  a_ch2_aligned: assert property (@(posedge clk) disable iff (rst) d2_ch_valid == d2_ch_valid_p2)
    else $error("turbo_decoder: decoder-2 channel inputs out of step");
  a_one_at_a_time: assert property (@(posedge clk) disable iff (rst) !(d1_busy && d2_busy))
    else $error("turbo_decoder: both decoders active");

endmodule
