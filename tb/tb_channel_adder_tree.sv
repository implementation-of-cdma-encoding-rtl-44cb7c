// tb_channel_adder_tree: drives the tree with a new set of N random
// (word, chip) pairs every cycle, encoded the way the encoders do it
// (word XOR chip, neg = chip), and checks that log2(N) cycles later `sum`
// equals the integer sum of +/-word and `out_tag` equals the tag sent with
// them. Includes cycles with every chip -1 and every word at its maximum, so
// the root's extreme values (no overflow) are exercised.
module tb_channel_adder_tree;
  localparam int unsigned N = 8;
  localparam int unsigned W = 7;
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned SW = W + 1 + LOGN;
  localparam int unsigned TAG_W = 8;
  localparam int unsigned CYCLES = 2000;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][W-1:0]  spread;
  logic [N-1:0]         neg;
  logic [TAG_W-1:0]     in_tag, out_tag;
  logic signed [SW-1:0] sum;
  int checks = 0, failures = 0;
  int exp_sum [CYCLES + 16];
  int exp_tag [CYCLES + 16];

  channel_adder_tree #(.N(N), .W(W), .TAG_W(TAG_W)) dut (
    .clk(clk), .rst_n(rst_n), .spread(spread), .neg(neg),
    .in_tag(in_tag), .sum(sum), .out_tag(out_tag));

  always #5 clk = ~clk;

  initial begin
    #((CYCLES + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spread = '0; neg = '0; in_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < CYCLES; t++) begin
      int s;
      s = 0;
      for (int j = 0; j < N; j++) begin
        int d, c;
        d = $urandom_range((1 << W) - 1);
        c = $urandom_range(1);
        if (t % 50 == 7)  begin d = (1 << W) - 1; c = 1; end  // most negative
        if (t % 50 == 8)  begin d = (1 << W) - 1; c = 0; end  // most positive
        if (t % 50 == 9)  d = 0;
        spread[j] = W'(d) ^ {W{c[0]}};
        neg[j]    = c[0];
        s += c ? -d : d;
      end
      in_tag     = TAG_W'($urandom);
      exp_sum[t] = s;
      exp_tag[t] = int'(in_tag);
      // output of cycle t-LOGN+1 ... observe the sum registered LOGN edges ago
      if (t >= int'(LOGN)) begin
        checks++;
        if (int'(sum) != exp_sum[t - LOGN] || int'(out_tag) != exp_tag[t - LOGN]) begin
          failures++;
          $display("cycle %0d: sum %0d tag %0d, expected %0d tag %0d", t, sum, out_tag,
                   exp_sum[t - LOGN], exp_tag[t - LOGN]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
