// tb_rsc_encoder: checks the RSC encoder against the direct recurrence of turbo_ref_pkg.
// Blocks of random length and content are fed with random idle cycles between bits; the
// systematic and parity outputs of every bit are compared with the reference, in the same
// cycle as the input (the encoder has no latency on its outputs).
module tb_rsc_encoder;
  import turbo_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, in_first = 1'b0, in_bit = 1'b0;
  logic sys_bit, parity_bit;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsc_encoder dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bits_t u, p;
    int k;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int blk = 0; blk < 200; blk++) begin
      k = 1 + int'($urandom % 40);
      for (int n = 0; n < k; n++) u[n] = bit'($urandom & 1);
      rsc_ref_encode(u, k, p);
      for (int n = 0; n < k; n++) begin
        while ($urandom % 4 == 0) begin
          // idle cycle: the state must hold
          in_valid <= 1'b0;
          in_bit   <= bit'($urandom & 1);
          in_first <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_first <= (n == 0);
        in_bit   <= u[n];
        @(negedge clk);
        checks++;
        if (sys_bit !== u[n] || parity_bit !== p[n]) begin
          failures++;
          if (failures < 10)
            $display("block %0d bit %0d: got sys=%b par=%b, expected sys=%b par=%b",
                     blk, n, sys_bit, parity_bit, u[n], p[n]);
        end
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    // impulse response of the recursive code: a single 1 gives the periodic parity sequence
    // of 1/(1+D+D^3+D^4) filtered by 1+D^2+D^3+D^4
    begin
      bit expect_p [12] = '{1, 1, 0, 0, 1, 0, 0, 1, 0, 0, 1, 0};
      bits_t imp, pi;
      for (int n = 0; n < 12; n++) imp[n] = (n == 0);
      rsc_ref_encode(imp, 12, pi);
      for (int n = 0; n < 12; n++) begin
        checks++;
        if (pi[n] != expect_p[n]) begin
          failures++;
          $display("reference impulse response differs at %0d", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
