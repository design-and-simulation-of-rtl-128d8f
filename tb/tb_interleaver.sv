// tb_interleaver: checks the block interleaver in its three modes.
// 1. The six-bit example order: input 1 1 0 0 1 1 must come out as 0 0 1 1 1 1.
// 2. Random blocks, back to back and with random gaps, through an interleaver, a
//    de-interleaver, an identity delay buffer and an interleaver followed by a de-interleaver;
//    every output word is compared with the expected permutation, and with back-to-back input
//    each word must leave exactly K+1 cycles after it entered.
module tb_interleaver;
  localparam int unsigned K = 6;
  localparam int unsigned PERM [K] = '{2, 3, 4, 0, 5, 1};
  localparam int unsigned W = 4;

  logic clk = 1'b0, rst = 1'b1;
  logic         in_valid = 1'b0;
  logic [W-1:0] in_data = '0;
  logic         iv, if_, dv, df, yv, yf, rv, rf;
  logic [W-1:0] id, dd, yd, rd;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  interleaver #(.W(W), .K(K), .PERM(PERM))                   u_ilv (.clk, .rst, .in_valid, .in_data,
    .out_valid(iv), .out_first(if_), .out_data(id));
  interleaver #(.W(W), .K(K), .PERM(PERM), .INVERSE(1'b1))   u_dei (.clk, .rst, .in_valid, .in_data,
    .out_valid(dv), .out_first(df), .out_data(dd));
  interleaver #(.W(W), .K(K), .PERM(PERM), .IDENTITY(1'b1))  u_dly (.clk, .rst, .in_valid, .in_data,
    .out_valid(yv), .out_first(yf), .out_data(yd));
  // interleave, then de-interleave: must give back the input order
  interleaver #(.W(W), .K(K), .PERM(PERM), .INVERSE(1'b1))   u_rt (.clk, .rst, .in_valid(iv),
    .in_data(id), .out_valid(rv), .out_first(rf), .out_data(rd));

  // expected streams
  logic [W-1:0] exp_ilv [$], exp_dei [$], exp_dly [$], exp_rt [$];
  int           t_in [$];
  bit           gapless = 1'b1;

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h at cycle %0d", what, got, exp_v, cycle);
    end
  endtask

  int pos_i = 0, pos_d = 0, pos_y = 0, pos_r = 0;
  always @(posedge clk) if (!rst) begin
    if (in_valid) t_in.push_back(cycle);
    if (iv) begin
      check("interleaved", id, exp_ilv.pop_front());
      checks++;
      if (if_ !== (pos_i == 0)) failures++;
      pos_i = (pos_i + 1) % K;
      if (gapless) begin
        checks++;
        if (cycle - t_in.pop_front() != K + 1) begin
          failures++;
          $display("latency wrong at cycle %0d", cycle);
        end
      end else void'(t_in.pop_front());
    end
    if (dv) begin check("de-interleaved", dd, exp_dei.pop_front()); pos_d++; end
    if (yv) begin
      check("delayed", yd, exp_dly.pop_front());
      checks++;
      if (yv !== iv || yf !== if_) failures++;
      pos_y++;
    end
    if (rv) begin check("round trip", rd, exp_rt.pop_front()); pos_r++; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_block(input logic [W-1:0] blk [K], input bit gaps);
    for (int j = 0; j < K; j++) begin
      exp_ilv.push_back(blk[PERM[j]]);
      exp_dly.push_back(blk[j]);
      exp_rt.push_back(blk[j]);
    end
    for (int j = 0; j < K; j++)
      for (int i = 0; i < K; i++)
        if (PERM[i] == j) exp_dei.push_back(blk[i]);
    for (int j = 0; j < K; j++) begin
      if (gaps) while ($urandom % 3 == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_data  <= blk[j];
      @(posedge clk);
    end
  endtask

  initial begin
    logic [W-1:0] blk [K];
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // the six-bit example, bits in the LSB
    blk = '{4'd1, 4'd1, 4'd0, 4'd0, 4'd1, 4'd1};
    send_block(blk, 1'b0);
    for (int b = 0; b < 50; b++) begin
      foreach (blk[j]) blk[j] = W'($urandom);
      send_block(blk, 1'b0);
    end
    in_valid <= 1'b0;
    repeat (3 * K) @(posedge clk);
    gapless = 1'b0;
    for (int b = 0; b < 50; b++) begin
      foreach (blk[j]) blk[j] = W'($urandom);
      send_block(blk, 1'b1);
    end
    in_valid <= 1'b0;
    repeat (4 * K) @(posedge clk);
    checks++;
    if (pos_d != 101 * K || pos_y != 101 * K || pos_r != 101 * K || exp_ilv.size() != 0) begin
      failures++;
      $display("missing output words: %0d %0d %0d, %0d left", pos_d, pos_y, pos_r, exp_ilv.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the example block: explicit expected output 0 0 1 1 1 1
  initial begin
    logic [W-1:0] want [K] = '{4'd0, 4'd0, 4'd1, 4'd1, 4'd1, 4'd1};
    int n = 0;
    wait (!rst);
    while (n < K) begin
      @(posedge clk);
      if (iv) begin
        checks++;
        if (id !== want[n]) begin
          failures++;
          $display("example bit %0d: got %0d expected %0d", n, id, want[n]);
        end
        n++;
      end
    end
  end
endmodule
