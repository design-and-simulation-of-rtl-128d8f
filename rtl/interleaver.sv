// interleaver: block interleaver / de-interleaver for a K-word block.
//
// The block is written in arrival order into one of two banks. When a bank holds all K words
// it is read out, one word per clock, in permuted order, while the other bank takes the next
// block. In interleave mode (INVERSE = 0) output word j is input word PERM[j]; in de-interleave
// mode (INVERSE = 1) input word j is written to position PERM[j] and the bank is read in order,
// which undoes the interleaver. The default permutation is the six-position example of the
// document (positions 3 4 5 1 6 2 counted from one, here written from zero); any permutation of
// 0..K-1 may be given. IDENTITY = 1 skips the permutation and gives a delay line with exactly
// the same timing, used to keep streams aligned with an interleaved one.
//
// The document describes the interleaver both as a permutation of the bit order and, in its
// implementation section, as a one-clock register delay; this module keeps the permutation and
// also registers its output on the clock.
//
// Interface: in_valid/in_data, no back-pressure; out_valid/out_data/out_first (first word of a
// block) are registered. Timing: a block read out starts the cycle after its K-th word is
// written, so with back-to-back input every word leaves K+1 cycles after it arrives. Input may
// have gaps; output of one block is always K consecutive cycles. rst is synchronous.
module interleaver #(
  parameter int unsigned W        = 1,
  parameter int unsigned K        = 6,
  parameter int unsigned PERM [K] = '{2, 3, 4, 0, 5, 1},
  parameter bit          INVERSE  = 1'b0,
  parameter bit          IDENTITY = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic         out_first,
  output logic [W-1:0] out_data
);

  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1;
  typedef logic [AW-1:0] addr_t;

  logic [W-1:0] mem [2][K];

  addr_t wcnt_q, rcnt_q;
  logic  wbank_q, rbank_q;
  logic  full_q [2];

  // Position a word is written to and position it is read from.
  addr_t waddr, raddr;
  always_comb begin
    waddr = wcnt_q;
    raddr = rcnt_q;
    if (!IDENTITY) begin
      if (INVERSE) waddr = addr_t'(PERM[wcnt_q]);
      else         raddr = addr_t'(PERM[rcnt_q]);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[wbank_q][waddr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt_q    <= '0;
      rcnt_q    <= '0;
      wbank_q   <= 1'b0;
      rbank_q   <= 1'b0;
      full_q    <= '{default: 1'b0};
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_data  <= '0;
    end else begin
      // write side
      if (in_valid) begin
        if (wcnt_q == addr_t'(K - 1)) begin
          wcnt_q          <= '0;
          wbank_q         <= ~wbank_q;
          full_q[wbank_q] <= 1'b1;
        end else begin
          wcnt_q <= wcnt_q + 1'b1;
        end
      end
      // read side
      out_valid <= 1'b0;
      out_first <= 1'b0;
      if (full_q[rbank_q]) begin
        out_valid <= 1'b1;
        out_first <= (rcnt_q == '0);
        out_data  <= mem[rbank_q][raddr];
        if (rcnt_q == addr_t'(K - 1)) begin
          rcnt_q          <= '0;
          rbank_q         <= ~rbank_q;
          full_q[rbank_q] <= 1'b0;
        end else begin
          rcnt_q <= rcnt_q + 1'b1;
        end
      end
    end
  end

  // A new block may only be written into a bank that has been read out.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    in_valid |-> !full_q[wbank_q])
    else $error("interleaver: block written into a bank that is still being read");

endmodule
