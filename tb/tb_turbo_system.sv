// tb_turbo_system: end-to-end test of the whole link at its default parameters.
// Random information bits stream into the encoder back to back. Its codewords are collected,
// sent through a channel model (BPSK with LLR conversion: noiseless, noiseless with one
// symbol of the block sign-flipped, or AWGN) and fed to the decoder whenever it is ready.
// The decoded bits are compared with the information bits. Noiseless and single-error blocks
// must decode exactly; over the AWGN blocks the decoder must leave fewer errors than the raw
// hard decisions. Each mechanism of the design is counted and must have happened:
// interleaving that changes the bit order, decoder iterations (passes of decoder 2), extrinsic
// values fed back through the de-interleaver, corrected channel errors, and the decoder
// holding off input while it decodes.
module tb_turbo_system;
  import turbo_ref_pkg::*;
  localparam int K = 6;
  localparam int NBLK = 120;
  localparam int A = 12;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, in_bit = 1'b0;
  logic enc_valid, enc_first, enc_sys, enc_par1, enc_par2;
  logic dec_valid = 1'b0;
  logic signed [5:0] dec_sys = '0, dec_par1 = '0, dec_par2 = '0;
  logic dec_ready, out_valid, out_first, out_bit;
  logic signed [11:0] out_llr;

  int checks = 0, failures = 0;
  int raw_err = 0, dec_err = 0;
  int n_ilv = 0, n_pass2 = 0, n_feedback = 0, n_corrected = 0, n_hold = 0;

  always #5 clk = ~clk;

  turbo_system dut (.*);

  bit sent [$];                 // information bits, in order
  bit cw_s [$], cw_1 [$], cw_2 [$];
  bit expect_q [$];

  // collect the codewords
  always @(posedge clk) if (!rst && enc_valid) begin
    cw_s.push_back(enc_sys);
    cw_1.push_back(enc_par1);
    cw_2.push_back(enc_par2);
  end

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    if (dut.u_decoder.u_siso2.out_valid && dut.u_decoder.u_siso2.out_first) n_pass2++;
    if (dut.u_decoder.dei_valid) n_feedback++;
    if (!dec_ready && cw_s.size() >= K) n_hold++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: all blocks back to back
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < NBLK * K; i++) begin
      in_valid <= 1'b1;
      in_bit   <= bit'($urandom & 1);
      @(posedge clk);
      sent.push_back(in_bit);
    end
    in_valid <= 1'b0;
  end

  // channel and decoder
  initial begin
    bit u [K], s [K], p1 [K], p2 [K], ui [K];
    int ls [K], l1 [K], l2 [K];
    int mode, flip, errs, raw;
    int n;
    wait (!rst);
    for (int b = 0; b < NBLK; b++) begin
      while (cw_s.size() < K || !dec_ready) @(posedge clk);
      for (int i = 0; i < K; i++) begin
        s[i] = cw_s.pop_front();  p1[i] = cw_1.pop_front();  p2[i] = cw_2.pop_front();
        u[i] = sent.pop_front();
      end
      // the systematic stream is the information stream; parity 2 comes from a reordered copy
      for (int i = 0; i < K; i++) begin
        checks++;
        if (s[i] != u[i]) failures++;
      end
      for (int i = 0; i < K; i++) ui[i] = u[dut.PERM[i]];
      if (ui != u) n_ilv++;
      mode = b % 3;
      flip = int'($urandom % (3 * K));
      for (int i = 0; i < K; i++) begin
        if (mode == 2) begin
          ls[i] = llr_q(s[i], 0.85, 31, 1'b1);
          l1[i] = llr_q(p1[i], 0.85, 31, 1'b1);
          l2[i] = llr_q(p2[i], 0.85, 31, 1'b1);
        end else begin
          ls[i] = s[i] ? A : -A;  l1[i] = p1[i] ? A : -A;  l2[i] = p2[i] ? A : -A;
        end
      end
      if (mode == 1) begin
        if (flip < K)          ls[flip] = -ls[flip];
        else if (flip < 2 * K) l1[flip - K] = -l1[flip - K];
        else                   l2[flip - 2 * K] = -l2[flip - 2 * K];
      end
      raw = 0;
      for (int i = 0; i < K; i++) begin
        if ((ls[i] > 0) != u[i]) raw++;
        if ((l1[i] > 0) != p1[i]) raw++;
        if ((l2[i] > 0) != p2[i]) raw++;
      end
      for (int i = 0; i < K; i++) if ((ls[i] > 0) != u[i]) raw_err += (mode == 2);
      for (int i = 0; i < K; i++) begin
        dec_valid <= 1'b1;
        dec_sys   <= 6'(ls[i]);
        dec_par1  <= 6'(l1[i]);
        dec_par2  <= 6'(l2[i]);
        @(posedge clk);
      end
      dec_valid <= 1'b0;
      n = 0;
      errs = 0;
      while (n < K) begin
        @(posedge clk);
        if (out_valid) begin
          if (out_bit != u[n]) errs++;
          n++;
        end
      end
      if (mode == 2) dec_err += errs;
      else begin
        checks++;
        if (errs != 0) begin
          failures++;
          $display("block %0d (mode %0d) decoded with %0d errors", b, mode, errs);
        end
      end
      if (raw > 0 && errs == 0) n_corrected++;
    end
    checks++;
    if (dec_err >= raw_err) begin
      failures++;
      $display("AWGN blocks: %0d decoded errors, %0d raw errors", dec_err, raw_err);
    end
    $display("AWGN blocks: %0d raw systematic errors, %0d after decoding", raw_err, dec_err);
    $display("interleaved blocks %0d, decoder-2 passes %0d, fed-back extrinsic values %0d, blocks with channel errors corrected %0d, hold-off cycles %0d",
             n_ilv, n_pass2, n_feedback, n_corrected, n_hold);
    checks += 5;
    if (n_ilv == 0)       failures++;
    if (n_pass2 != NBLK * dut.NITER) failures++;
    if (n_feedback != NBLK * dut.NITER * K) failures++;
    if (n_corrected == 0) failures++;
    if (n_hold == 0)      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
