// siso_decoder: soft-input soft-output Log-MAP decoder for one constituent RSC code.
//
// For a block of K trellis steps it takes the channel LLRs of the systematic and parity bits
// and the a-priori LLRs of the information bits, and returns for every bit the a-posteriori LLR
// and the extrinsic LLR (the a-posteriori LLR less the systematic and a-priori inputs), which
// the other decoder uses as its a-priori input. The Log-MAP algorithm is the document's; the
// schedule and the arithmetic below are this design's.
//
// Branch metric of the transition from state s with input u and parity p:
//   gamma = u * (Lsys + Lapr) + p * Lpar
// Backward pass (K cycles, k = K-1 .. 0): beta_k(s) = max*_u (gamma + beta_{k+1}(next(s,u))),
// starting from beta_K = 0 for every state since the trellis is not terminated; each beta_{k+1}
// vector is kept in a K x 16 metric memory. Forward pass (K cycles, k = 0 .. K-1): alpha starts
// at 0 for state 0 and at -INF elsewhere; in step k the extrinsic LLR
//   Lext_k = max*_{u=1}(alpha_k + p*Lpar + beta_{k+1}) - max*_{u=0}(...)
// is formed, and alpha_{k+1} is computed. max*(a,b) = max(a,b) + ln(1+e^-|a-b|) with the
// correction from turbo_pkg::logmap_corr. After every step the metric vector is normalised by
// subtracting the state-0 metric and saturated to MW bits.
//
// Interface: ch_valid writes one (ch_sys, ch_par) pair per cycle, in trellis order, into the
// channel store (K pairs per block; allowed whenever the decoder is not decoding). apr_valid
// writes one a-priori value per cycle in trellis order; the K-th one starts decoding. The
// results leave in trellis order, one per cycle, with out_valid; out_first marks k = 0.
// busy is high from the K-th a-priori value until the last result.
// Timing: the first result appears K+1 cycles after the last a-priori value, the others follow
// on consecutive cycles, so a pass takes 2K+1 cycles after the a-priori block.
// rst is synchronous and active high.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned K  = 6,   // block length (trellis steps)
  parameter int unsigned LW = 6,   // width of the channel LLRs
  parameter int unsigned EW = 8,   // width of the a-priori and extrinsic LLRs
  parameter int unsigned MW = 12   // width of the state metrics and a-posteriori LLR
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ch_valid,
  input  logic signed [LW-1:0] ch_sys,
  input  logic signed [LW-1:0] ch_par,
  input  logic                 apr_valid,
  input  logic signed [EW-1:0] apr,
  output logic                 busy,
  output logic                 out_valid,
  output logic                 out_first,
  output logic signed [EW-1:0] ext,
  output logic signed [MW-1:0] app
);

  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;
  typedef logic [KW-1:0]        idx_t;
  typedef logic signed [MW-1:0] metric_t;
  typedef logic signed [MW+1:0] wide_t;       // sum of a metric and a branch metric
  typedef metric_t              mvec_t [NSTATES];

  localparam metric_t NEG_INF = metric_t'(-(2 ** (MW - 2)));
  localparam wide_t   MMAX    = wide_t'(2 ** (MW - 1) - 1);

  typedef enum logic [1:0] {S_APR, S_BWD, S_FWD} phase_t;

  // The correction table of turbo_pkg::logmap_corr is worked out for 2 fractional LLR bits,
  // and a metric plus a branch metric must fit the internal sum width.
  if (LLR_FRAC != 2 || MW < EW + 3) begin : g_bad_format
    $error("siso_decoder: needs LLR_FRAC = 2 and MW > EW + 2");
  end

  // ---------------------------------------------------------------- arithmetic helpers
  // Log-MAP correction for a non-negative metric difference d.
  function automatic wide_t corr(wide_t d);
    return wide_t'({1'b0, logmap_corr(16'(unsigned'(d)))});
  endfunction

  function automatic wide_t mstar(wide_t a, wide_t b);
    return (a >= b) ? a + corr(a - b) : b + corr(b - a);
  endfunction

  function automatic metric_t sat_m(wide_t x);
    return (x > MMAX) ? metric_t'(MMAX) : (x < -MMAX) ? metric_t'(-MMAX) : metric_t'(x);
  endfunction

  localparam wide_t ELIM = wide_t'(2 ** (EW - 1) - 1);

  function automatic logic signed [EW-1:0] sat_e(wide_t x);
    return (x > ELIM) ? (EW)'(ELIM) : (x < -ELIM) ? (EW)'(-ELIM) : (EW)'(x);
  endfunction

  // ---------------------------------------------------------------- storage
  logic signed [LW-1:0] sys_mem [K];
  logic signed [LW-1:0] par_mem [K];
  logic signed [EW-1:0] apr_mem [K];
  metric_t              beta_mem [K][NSTATES];

  phase_t  phase_q;
  idx_t    ch_cnt_q, apr_cnt_q, k_q;
  mvec_t   alpha_q, beta_q;

  always_ff @(posedge clk) begin
    if (ch_valid)                   sys_mem[ch_cnt_q] <= ch_sys;
    if (ch_valid)                   par_mem[ch_cnt_q] <= ch_par;
    if (apr_valid && phase_q == S_APR) apr_mem[apr_cnt_q] <= apr;
    if (phase_q == S_BWD)           beta_mem[k_q] <= beta_q;
  end

  // ---------------------------------------------------------------- trellis step k_q
  wide_t lsa, lpar;          // Lsys + Lapr and Lpar of step k_q
  mvec_t beta_next, alpha_next;
  wide_t lext;
  wide_t lapp;

  always_comb begin
    wide_t   bacc [NSTATES];
    wide_t   facc [NSTATES];
    wide_t   cnd [2];
    wide_t   m0, m1, cand;
    state_t  s, ns, sp;
    logic    u, p, first0, first1;

    lsa  = wide_t'(sys_mem[k_q]) + wide_t'(apr_mem[k_q]);
    lpar = wide_t'(par_mem[k_q]);

    // backward recursion
    for (int i = 0; i < NSTATES; i++) begin
      s = state_t'(i);
      for (int b = 0; b < 2; b++) begin
        u       = logic'(b);
        p       = rsc_parity(s, u);
        ns      = rsc_next(s, u);
        cnd[b]  = wide_t'(beta_q[ns]) + (u ? lsa : '0) + (p ? lpar : '0);
      end
      bacc[i] = mstar(cnd[0], cnd[1]);
    end
    for (int i = 0; i < NSTATES; i++) beta_next[i] = sat_m(bacc[i] - bacc[0]);

    // forward recursion: the predecessors of s' are {b, s'[3:1]}, each with the input u that
    // makes the recursive bit equal s'[0] (the feedback is linear in u)
    for (int i = 0; i < NSTATES; i++) begin
      ns = state_t'(i);
      for (int b = 0; b < 2; b++) begin
        sp = {logic'(b), ns[MEM-1:1]};
        u  = ns[0] ^ rsc_feedback(sp, 1'b0);
        p  = rsc_parity(sp, u);
        cnd[b] = wide_t'(alpha_q[sp]) + (u ? lsa : '0) + (p ? lpar : '0);
      end
      facc[i] = mstar(cnd[0], cnd[1]);
    end
    for (int i = 0; i < NSTATES; i++) alpha_next[i] = sat_m(facc[i] - facc[0]);

    // extrinsic LLR of step k_q
    m0 = '0;
    m1 = '0;
    first0 = 1'b1;
    first1 = 1'b1;
    for (int i = 0; i < NSTATES; i++) begin
      s = state_t'(i);
      for (int b = 0; b < 2; b++) begin
        u    = logic'(b);
        p    = rsc_parity(s, u);
        ns   = rsc_next(s, u);
        cand = wide_t'(alpha_q[s]) + wide_t'(beta_mem[k_q][ns]) + (p ? lpar : '0);
        if (u) begin
          m1 = first1 ? cand : mstar(m1, cand);
          first1 = 1'b0;
        end else begin
          m0 = first0 ? cand : mstar(m0, cand);
          first0 = 1'b0;
        end
      end
    end
    lext = m1 - m0;
    lapp = lext + lsa;
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (rst) begin
      phase_q   <= S_APR;
      ch_cnt_q  <= '0;
      apr_cnt_q <= '0;
      k_q       <= '0;
      alpha_q   <= '{default: NEG_INF};
      beta_q    <= '{default: '0};
      out_valid <= 1'b0;
      out_first <= 1'b0;
      ext       <= '0;
      app       <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      if (ch_valid) ch_cnt_q <= (ch_cnt_q == idx_t'(K - 1)) ? '0 : ch_cnt_q + 1'b1;
      unique case (phase_q)
        S_APR: if (apr_valid) begin
          if (apr_cnt_q == idx_t'(K - 1)) begin
            apr_cnt_q <= '0;
            phase_q   <= S_BWD;
            k_q       <= idx_t'(K - 1);
            beta_q    <= '{default: '0};
          end else begin
            apr_cnt_q <= apr_cnt_q + 1'b1;
          end
        end
        S_BWD: begin
          beta_q <= beta_next;
          if (k_q == '0) begin
            phase_q    <= S_FWD;
            alpha_q    <= '{default: NEG_INF};
            alpha_q[0] <= '0;
          end else begin
            k_q <= k_q - 1'b1;
          end
        end
        S_FWD: begin
          alpha_q   <= alpha_next;
          out_valid <= 1'b1;
          out_first <= (k_q == '0);
          ext       <= sat_e(lext);
          app       <= sat_m(lapp);
          if (k_q == idx_t'(K - 1)) begin
            phase_q <= S_APR;
            k_q     <= '0;
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        default: phase_q <= S_APR;
      endcase
    end
  end

  assign busy = (phase_q != S_APR);

  // Channel values must not change while a block is being decoded.
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !ch_valid)
    else $error("siso_decoder: channel values written during decoding");

endmodule
