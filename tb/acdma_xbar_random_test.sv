// acdma_xbar_random_test: random-traffic test of one acdma_crossbar of a
// given size, used by tb_acdma_crossbar_sizes to run several sizes side by
// side. Each symbol a random subset of TX ports sends random words to a
// random partial permutation of RX ports; every RX port must show exactly its
// word N + log2(N) edges after the capture edge and nothing else. Every
// fourth symbol all ports send the largest word. Reports its counts on
// `checks` / `failures` and raises `done` after SYMBOLS symbols.
module acdma_xbar_random_test #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 7,
  parameter int unsigned SYMBOLS = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned LAT  = N + LOGN;
  localparam int unsigned RING = 4 * (LAT + 1);

  logic [N-1:0]           tx_valid, rx_valid;
  logic [N-1:0][W-1:0]    tx_data, rx_data;
  logic [N-1:0][LOGN-1:0] tx_dest;
  logic                   tx_ready;

  acdma_crossbar #(.N(N), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .tx_valid(tx_valid), .tx_data(tx_data),
    .tx_dest(tx_dest), .tx_ready(tx_ready), .rx_valid(rx_valid), .rx_data(rx_data));

  logic [N-1:0]        exp_v [RING];
  logic [N-1:0][W-1:0] exp_d [RING];

  initial begin
    int cyc, s, perm [N];
    done = 0; checks = 0; failures = 0;
    for (int i = 0; i < int'(RING); i++) begin exp_v[i] = '0; exp_d[i] = '0; end
    tx_valid = '0; tx_data = '0; tx_dest = '0;
    @(posedge rst_n);
    cyc = 0; s = 0;
    while (s < int'(SYMBOLS) || cyc % int'(RING) != 0) begin
      @(posedge clk); cyc++;
      @(negedge clk);
      checks++;
      if (rx_valid != exp_v[cyc % RING]) begin
        failures++;
        $display("N=%0d W=%0d edge %0d: rx_valid %b expected %b", N, W, cyc, rx_valid,
                 exp_v[cyc % RING]);
      end
      for (int k = 0; k < int'(N); k++)
        if (exp_v[cyc % RING][k]) begin
          checks++;
          if (rx_data[k] != exp_d[cyc % RING][k]) begin
            failures++;
            $display("N=%0d W=%0d edge %0d port %0d: data %0d expected %0d", N, W, cyc, k,
                     rx_data[k], exp_d[cyc % RING][k]);
          end
        end
      exp_v[cyc % RING] = '0;
      tx_valid = '0;
      if (tx_ready && s < int'(SYMBOLS)) begin
        int slot;
        slot = (cyc + 1 + LAT) % RING;
        for (int i = 0; i < int'(N); i++) perm[i] = i;
        for (int i = N - 1; i > 0; i--) begin
          int j, t;
          j = $urandom_range(i); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
        end
        exp_d[slot] = '0;
        for (int j = 0; j < int'(N); j++) begin
          tx_valid[j] = (s % 4 == 1) || ($urandom_range(2) != 0);
          tx_dest[j]  = LOGN'(perm[j]);
          tx_data[j]  = (s % 4 == 1) ? {W{1'b1}} : W'({$urandom, $urandom});
          if (tx_valid[j]) begin
            exp_v[slot][perm[j]] = 1'b1;
            exp_d[slot][perm[j]] = tx_data[j];
          end
        end
        s++;
      end
    end
    done = 1;
  end
endmodule
