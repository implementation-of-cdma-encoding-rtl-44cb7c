// tb_acdma_decoder: feeds the decoder the channel sums of whole symbols
// worked out in the testbench. Each symbol, a random set of senders picks
// distinct RX ports and words; the channel sum of chip i is
// S_i = sum over senders of H[dest][i] * word, with H the Sylvester-Hadamard
// matrix built by recursion. The decoder under test is bound to a random RX
// port k each symbol (its despreading chip is H[k][i]) and must, one cycle
// after the last chip, output the word sent to k with data_valid high, or
// no strobe if no one sent to k. Symbols follow back to back, and some
// symbols are fully loaded with the largest words.
module tb_acdma_decoder;
  localparam int unsigned N = 8;
  localparam int unsigned W = 7;
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned SW = W + 1 + LOGN;
  localparam int unsigned SYMBOLS = 400;

  logic clk = 0, rst_n = 0;
  logic                 sum_valid, chip, active, data_valid;
  logic signed [SW-1:0] sum;
  logic [LOGN-1:0]      idx;
  logic [W-1:0]         data_out;
  int checks = 0, failures = 0;
  int h [N][N];
  int strobes = 0;

  acdma_decoder #(.N(N), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .sum_valid(sum_valid), .sum(sum), .idx(idx),
    .chip(chip), .active(active), .data_out(data_out), .data_valid(data_valid));

  always #5 clk = ~clk;
  always @(posedge clk) if (data_valid) strobes <= strobes + 1;

  initial begin
    #((SYMBOLS * N + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h[0][0] = 1;
    for (int m = 1; m < N; m = m * 2)
      for (int r = 0; r < m; r++)
        for (int c = 0; c < m; c++) begin
          h[r][c+m] = h[r][c]; h[r+m][c] = h[r][c]; h[r+m][c+m] = -h[r][c];
        end
    sum_valid = 0; sum = '0; idx = '0; chip = 0; active = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < SYMBOLS; s++) begin
      int word [N];      // word addressed to each RX port, -1 = none
      int k, chans [N];
      bit full;
      full = (s % 10 == 3);
      for (int r = 0; r < N; r++)
        word[r] = (full || $urandom_range(3) != 0) ?
                  (full ? (1 << W) - 1 - r : $urandom_range((1 << W) - 1)) : -1;
      for (int i = 0; i < N; i++) begin
        chans[i] = 0;
        for (int r = 0; r < N; r++) if (word[r] >= 0) chans[i] += h[r][i] * word[r];
      end
      k = $urandom_range(N - 1);
      for (int i = 0; i < N; i++) begin
        sum_valid = 1;
        sum    = SW'(chans[i]);
        idx    = LOGN'(i);
        chip   = (h[k][i] < 0);
        active = (word[k] >= 0);
        @(negedge clk);
        // the result of the previous chip's edge
        checks++;
        if (i == N - 1) begin
          if (data_valid != (word[k] >= 0) ||
              (word[k] >= 0 && int'(data_out) != word[k])) begin
            failures++;
            $display("symbol %0d port %0d: valid %0d data %0d, expected %0d", s, k,
                     data_valid, data_out, word[k]);
          end
        end else if (data_valid) begin
          failures++;
          $display("symbol %0d: strobe before the last chip", s);
        end
      end
      // occasionally a gap with no chips: the decoder must hold still
      if (s % 7 == 0) begin
        sum_valid = 0; sum = SW'($urandom); idx = '0;
        @(negedge clk);
        checks++;
        if (data_valid) begin failures++; $display("strobe during a gap"); end
      end
    end
    checks++;
    if (strobes == 0) begin failures++; $display("no word was ever delivered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
