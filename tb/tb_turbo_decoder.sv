// tb_turbo_decoder: checks the iterative turbo decoder through dec_harness, at the default
// block length of 6 (noiseless, one wrong symbol per block, AWGN) and at a block length of 40
// with a quadratic permutation interleaver f(i) = (3i + 10i^2) mod 40 (noiseless, AWGN).
module tb_turbo_decoder;
  localparam int unsigned P40 [40] = '{0, 13, 6, 19, 12, 25, 18, 31, 24, 37, 30, 3, 36, 9, 2,
    15, 8, 21, 14, 27, 20, 33, 26, 39, 32, 5, 38, 11, 4, 17, 10, 23, 16, 29, 22, 35, 28, 1, 34, 7};

  logic clk = 1'b0, rst = 1'b1;
  logic d [5];
  int   c [5], f [5], re [5], de [5];

  always #5 clk = ~clk;

  dec_harness #(.NBLK(30), .MODE(0))                          h0 (.clk, .rst, .done(d[0]), .checks(c[0]), .failures(f[0]), .raw_errors(re[0]), .dec_errors(de[0]));
  dec_harness #(.NBLK(60), .MODE(1))                          h1 (.clk, .rst, .done(d[1]), .checks(c[1]), .failures(f[1]), .raw_errors(re[1]), .dec_errors(de[1]));
  dec_harness #(.NBLK(200), .MODE(2), .SIGMA_MILLI(900))      h2 (.clk, .rst, .done(d[2]), .checks(c[2]), .failures(f[2]), .raw_errors(re[2]), .dec_errors(de[2]));
  dec_harness #(.K(40), .PERM(P40), .NBLK(5), .MODE(0))       h3 (.clk, .rst, .done(d[3]), .checks(c[3]), .failures(f[3]), .raw_errors(re[3]), .dec_errors(de[3]));
  dec_harness #(.K(40), .PERM(P40), .NBLK(60), .MODE(2), .SIGMA_MILLI(1000))
                                                              h4 (.clk, .rst, .done(d[4]), .checks(c[4]), .failures(f[4]), .raw_errors(re[4]), .dec_errors(de[4]));

  function automatic int sum(input int v [5]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    for (int i = 0; i < 5; i++)
      $display("run %0d: %0d checks, %0d failures, %0d raw errors, %0d decoded errors", i, c[i], f[i], re[i], de[i]);
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f));
    $finish;
  end
endmodule
