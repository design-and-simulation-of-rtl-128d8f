// tb_siso_decoder: checks the Log-MAP SISO decoder against exact MAP decoding by enumeration.
// For random blocks of channel and a-priori LLRs it compares every a-posteriori LLR with
// turbo_ref_pkg::map_ref_llr (exact, in real arithmetic, over all 2^K codewords) within a
// tolerance for the fixed-point Log-MAP arithmetic, checks that the hard decision agrees
// wherever the exact LLR is clearly non-zero, that ext = app - Lsys - Lapr, and that the first
// result is registered K+1 clock edges after the one that takes the last a-priori value with the rest on consecutive cycles.
module tb_siso_decoder;
  import turbo_ref_pkg::*;
  localparam int unsigned K = 6;
  localparam int TOL = 3;        // LSB (1/4 nat) allowed between fixed-point and exact LLR

  logic clk = 1'b0, rst = 1'b1;
  logic ch_valid = 1'b0, apr_valid = 1'b0;
  logic signed [5:0]  ch_sys = '0, ch_par = '0;
  logic signed [7:0]  apr = '0;
  logic busy, out_valid, out_first;
  logic signed [7:0]  ext;
  logic signed [11:0] app;
  int checks = 0, failures = 0;
  int max_err = 0;

  always #5 clk = ~clk;

  siso_decoder #(.K(K)) dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input int ls [MAXK], input int lp [MAXK], input int la [MAXK]);
    int   t_last, n;
    real  r;
    int   err;
    for (int i = 0; i < int'(K); i++) begin
      ch_valid <= 1'b1;
      ch_sys   <= 6'(ls[i]);
      ch_par   <= 6'(lp[i]);
      @(posedge clk);
    end
    ch_valid <= 1'b0;
    repeat ($urandom % 3) @(posedge clk);
    for (int i = 0; i < int'(K); i++) begin
      apr_valid <= 1'b1;
      apr       <= 8'(la[i]);
      @(posedge clk);
    end
    apr_valid <= 1'b0;
    // edge 0 took the last a-priori value; result n is registered by edge K+1+n and so is
    // seen here at edge K+2+n
    t_last = 0;
    n = 0;
    while (n < int'(K)) begin
      @(posedge clk);
      t_last++;
      if (out_valid) begin
        checks += 4;
        if (t_last != int'(K) + 2 + n) begin
          failures++;
          $display("result %0d seen at edge %0d, expected %0d", n, t_last, K + 2 + n);
        end
        if (out_first !== (n == 0)) failures++;
        r   = map_ref_llr(ls, lp, la, K, n);
        err = int'(app) - ((r >= 0.0) ? int'(r + 0.5) : -int'(-r + 0.5));
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        if (err > TOL) begin
          failures++;
          $display("bit %0d: app %0d, exact %f", n, app, r);
        end
        if ((r > 2.0 && app <= 0) || (r < -2.0 && app >= 0)) begin
          failures++;
          $display("bit %0d: decision wrong, app %0d exact %f", n, app, r);
        end
        if (int'(ext) != int'(app) - ls[n] - la[n]) begin
          failures++;
          $display("bit %0d: ext %0d app %0d ls %0d la %0d", n, ext, app, ls[n], la[n]);
        end
        n++;
      end
    end
    @(posedge clk);
    checks++;
    if (busy) failures++;
  endtask

  initial begin
    int ls [MAXK], lp [MAXK], la [MAXK];
    bits_t u, p;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // random soft values
    for (int b = 0; b < 60; b++) begin
      for (int i = 0; i < int'(K); i++) begin
        ls[i] = int'($urandom % 63) - 31;
        lp[i] = int'($urandom % 63) - 31;
        la[i] = (b < 20) ? 0 : int'($urandom % 61) - 30;
      end
      run_block(ls, lp, la);
    end
    // noisy codewords: soft values from an actual codeword
    for (int b = 0; b < 40; b++) begin
      for (int i = 0; i < int'(K); i++) u[i] = bit'($urandom & 1);
      rsc_ref_encode(u, K, p);
      for (int i = 0; i < int'(K); i++) begin
        ls[i] = llr_q(u[i], 0.9, 31, 1'b1);
        lp[i] = llr_q(p[i], 0.9, 31, 1'b1);
        la[i] = 0;
      end
      run_block(ls, lp, la);
    end
    $display("largest LLR error: %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
