// enc_harness: drives one turbo_encoder with random blocks and checks every codeword.
// Expected values come from turbo_ref_pkg: sys = u_k, parity1 = RSC(u)_k and
// parity2 = RSC(u')_k with u'_j = u_PERM[j]. Blocks are sent back to back first (each codeword
// must then leave exactly K+2 cycles after its bit was taken), then with random gaps.
// done rises when all blocks have been checked.
module enc_harness #(
  parameter int unsigned K        = 6,
  parameter int unsigned PERM [K] = '{2, 3, 4, 0, 5, 1},
  parameter int          NBLK     = 40
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  import turbo_ref_pkg::*;

  logic in_valid, in_bit;
  logic out_valid, out_first, sys_bit, parity1, parity2;
  int   cycle;
  bit   gapless;
  bit   exp_s [$], exp_p1 [$], exp_p2 [$];
  int   t_in [$];
  int   n_out;

  turbo_encoder #(.K(K), .PERM(PERM)) dut (.*);

  always @(posedge clk) begin
    if (rst) cycle <= 0;
    else     cycle <= cycle + 1;
  end

  always @(posedge clk) if (!rst) begin
    if (in_valid) t_in.push_back(cycle);
    if (out_valid) begin
      checks += 4;
      if (sys_bit !== exp_s.pop_front())  failures++;
      if (parity1 !== exp_p1.pop_front()) failures++;
      if (parity2 !== exp_p2.pop_front()) failures++;
      if (out_first !== (n_out % K == 0)) failures++;
      if (gapless) begin
        checks++;
        if (cycle - t_in[0] != K + 2) failures++;
      end
      void'(t_in.pop_front());
      n_out++;
    end
  end

  initial begin
    bits_t u, ui, p1, p2;
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    n_out    = 0;
    gapless  = 1'b1;
    in_valid = 1'b0;
    in_bit   = 1'b0;
    wait (!rst);
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      if (b == NBLK / 2) begin
        // drain, then switch to input with gaps
        in_valid <= 1'b0;
        repeat (2 * K + 4) @(posedge clk);
        gapless = 1'b0;
      end
      for (int n = 0; n < int'(K); n++) u[n] = bit'($urandom & 1);
      for (int n = 0; n < int'(K); n++) ui[n] = u[PERM[n]];
      rsc_ref_encode(u, K, p1);
      rsc_ref_encode(ui, K, p2);
      for (int n = 0; n < int'(K); n++) begin
        exp_s.push_back(u[n]);
        exp_p1.push_back(p1[n]);
        exp_p2.push_back(p2[n]);
      end
      for (int n = 0; n < int'(K); n++) begin
        if (!gapless) while ($urandom % 3 == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_bit   <= u[n];
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (2 * K + 6) @(posedge clk);
    checks++;
    if (n_out != NBLK * int'(K)) failures++;
    done = 1'b1;
  end
endmodule
