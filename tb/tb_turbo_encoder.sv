// tb_turbo_encoder: checks the turbo encoder with the six-position default interleaver and
// with a 40-bit quadratic permutation interleaver (f(i) = (3i + 10i^2) mod 40), each through
// enc_harness. Also checks one hand-worked codeword of the default encoder: input 1 1 0 0 1 1.
module tb_turbo_encoder;
  localparam int unsigned P40 [40] = '{0, 13, 6, 19, 12, 25, 18, 31, 24, 37, 30, 3, 36, 9, 2,
    15, 8, 21, 14, 27, 20, 33, 26, 39, 32, 5, 38, 11, 4, 17, 10, 23, 16, 29, 22, 35, 28, 1, 34, 7};

  logic clk = 1'b0, rst = 1'b1;
  logic done6, done40;
  int   c6, f6, c40, f40;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  enc_harness #(.NBLK(60))                        h6  (.clk, .rst, .done(done6),  .checks(c6),  .failures(f6));
  enc_harness #(.K(40), .PERM(P40), .NBLK(30))    h40 (.clk, .rst, .done(done40), .checks(c40), .failures(f40));

  // hand-worked example on a third instance: u = 1 1 0 0 1 1
  // parity1 = RSC(1 1 0 0 1 1) = 1 0 1 0 0 1; interleaved u' = 0 0 1 1 1 1,
  // parity2 = RSC(0 0 1 1 1 1) = 0 0 1 0 0 0
  logic xv = 1'b0, xb = 1'b0, ov, of, os, op1, op2;
  turbo_encoder ex (.clk, .rst, .in_valid(xv), .in_bit(xb), .out_valid(ov), .out_first(of),
                    .sys_bit(os), .parity1(op1), .parity2(op2));
  bit ex_u [6]  = '{1, 1, 0, 0, 1, 1};
  bit ex_p1 [6] = '{1, 0, 1, 0, 0, 1};
  bit ex_p2 [6] = '{0, 0, 1, 0, 0, 0};
  int ex_n = 0;
  always @(posedge clk) if (!rst && ov && ex_n < 6) begin
    checks += 3;
    if (os !== ex_u[ex_n] || op1 !== ex_p1[ex_n] || op2 !== ex_p2[ex_n]) begin
      failures++;
      $display("example bit %0d: got %b%b%b", ex_n, os, op1, op2);
    end
    ex_n++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c6 + c40, failures + f6 + f40 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < 6; n++) begin
      xv <= 1'b1;
      xb <= ex_u[n];
      @(posedge clk);
    end
    xv <= 1'b0;
    wait (done6 && done40);
    checks++;
    if (ex_n != 6) failures++;
    $display("K=6: %0d checks %0d failures; K=40: %0d checks %0d failures", c6, f6, c40, f40);
    $display("TB_RESULT checks=%0d failures=%0d", checks + c6 + c40, failures + f6 + f40);
    $finish;
  end
endmodule
