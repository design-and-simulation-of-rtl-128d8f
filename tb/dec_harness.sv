// dec_harness: encodes random blocks with the reference encoder of turbo_ref_pkg, passes them
// through a BPSK/AWGN channel model, decodes them with one turbo_decoder and checks the result.
//   mode 0: noiseless channel; every block must decode exactly.
//   mode 1: noiseless channel with one symbol of the 3K received with the wrong sign; every
//           block must still decode exactly.
//   mode 2: AWGN with standard deviation SIGMA_MILLI/1000; the decoder must leave fewer bit
//           errors than the hard decisions on the received systematic bits.
// It also checks the number of clock edges from the one that takes the last symbol of a block
// to the one that registers its first decoded bit (LAT_EXP below), that in_ready is
// low meanwhile, and that the decoded bits follow on consecutive cycles.
module dec_harness #(
  parameter int unsigned K           = 6,
  parameter int unsigned PERM [K]    = '{2, 3, 4, 0, 5, 1},
  parameter int unsigned NITER       = 4,
  parameter int          NBLK        = 20,
  parameter int          MODE        = 0,
  parameter int          SIGMA_MILLI = 800
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   raw_errors,
  output int   dec_errors
);
  import turbo_ref_pkg::*;

  localparam int LIM = 31;
  localparam int A   = 12;     // noiseless LLR magnitude (3 nat)
  // Edges from the last symbol to the first decoded bit: K zero a-priori values, 2*NITER
  // half-iterations of 3K+2 edges (a-priori in, backward, forward, interleaver) and the
  // final pass of decoder 1 up to its first result, K+1.
  localparam int LAT_EXP = (6 * int'(NITER) + 2) * int'(K) + 4 * int'(NITER) + 1;

  logic in_valid, in_ready, out_valid, out_first, out_bit;
  logic signed [5:0]  in_sys, in_par1, in_par2;
  logic signed [11:0] out_llr;

  turbo_decoder #(.K(K), .PERM(PERM), .NITER(NITER)) dut (.*);

  int   edge_cnt;
  always @(posedge clk) edge_cnt <= rst ? 0 : edge_cnt + 1;

  initial begin
    bits_t u, ui, p1, p2;
    int ls [MAXK], l1 [MAXK], l2 [MAXK];
    int flip, t_last, n, lat, lat_n;
    real sigma;
    done = 1'b0;
    checks = 0; failures = 0; raw_errors = 0; dec_errors = 0;
    in_valid = 1'b0; in_sys = '0; in_par1 = '0; in_par2 = '0;
    sigma = real'(SIGMA_MILLI) / 1000.0;
    wait (!rst);
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < int'(K); i++) u[i] = bit'($urandom & 1);
      for (int i = 0; i < int'(K); i++) ui[i] = u[PERM[i]];
      rsc_ref_encode(u, K, p1);
      rsc_ref_encode(ui, K, p2);
      flip = int'($urandom % (3 * K));
      for (int i = 0; i < int'(K); i++) begin
        if (MODE == 2) begin
          ls[i] = llr_q(u[i],  sigma, LIM, 1'b1);
          l1[i] = llr_q(p1[i], sigma, LIM, 1'b1);
          l2[i] = llr_q(p2[i], sigma, LIM, 1'b1);
        end else begin
          ls[i] = u[i]  ? A : -A;
          l1[i] = p1[i] ? A : -A;
          l2[i] = p2[i] ? A : -A;
        end
      end
      if (MODE == 1) begin
        if (flip < int'(K))          ls[flip] = -ls[flip];
        else if (flip < 2 * int'(K)) l1[flip - K] = -l1[flip - K];
        else                         l2[flip - 2 * K] = -l2[flip - 2 * K];
      end
      for (int i = 0; i < int'(K); i++) if ((ls[i] > 0) != u[i]) raw_errors++;
      // send the block
      while (!in_ready) @(posedge clk);
      for (int i = 0; i < int'(K); i++) begin
        in_valid <= 1'b1;
        in_sys   <= 6'(ls[i]);
        in_par1  <= 6'(l1[i]);
        in_par2  <= 6'(l2[i]);
        @(posedge clk);
      end
      in_valid <= 1'b0;
      // edge 0 took the last symbol; result n is registered by edge lat+n, seen at lat+n+1
      t_last = edge_cnt;
      n = 0;
      while (n < int'(K)) begin
        @(posedge clk);
        if (in_ready && n == 0) begin
          checks++;
          failures++;
          $display("in_ready high while decoding");
          break;
        end
        if (out_valid) begin
          // edges from the last symbol to the edge that registered this bit, less its index:
          // the same for every bit when the bits are consecutive
          lat_n = edge_cnt - t_last - 1 - n;
          if (n == 0) begin
            lat = lat_n;
            if (b == 0) $display("K=%0d NITER=%0d: first decoded bit %0d edges after the last symbol", K, NITER, lat);
            checks++;
            if (lat != LAT_EXP) begin
              failures++;
              $display("latency %0d, expected %0d", lat, LAT_EXP);
            end
          end else begin
            checks++;
            if (lat_n != lat) failures++;
          end
          checks++;
          if (out_first !== (n == 0)) failures++;
          if (out_bit != u[n]) dec_errors++;
          if (MODE != 2) begin
            checks++;
            if (out_bit != u[n]) begin
              failures++;
              if (failures < 10) $display("mode %0d block %0d bit %0d wrong (flip %0d)", MODE, b, n, flip);
            end
          end
          n++;
        end
      end
    end
    if (MODE == 2) begin
      checks++;
      if (dec_errors >= raw_errors && raw_errors > 0) begin
        failures++;
        $display("no coding gain: %0d decoded errors against %0d raw", dec_errors, raw_errors);
      end
    end
    done = 1'b1;
  end
endmodule
