// tb_acdma_crossbar: end-to-end test of the ACDMA crossbar at its default
// size (no parameter override).
//
// Whenever tx_ready is high the testbench offers a new set of words: a
// random subset of TX ports, each addressed to a distinct RX port (a random
// partial permutation). It records, for the edge that captures them, which RX
// port should receive which word, and expects exactly those words on
// rx_data / rx_valid N + log2(N) edges later, with no strobe on any other
// port or cycle. That also checks the rate: one word per port per N cycles,
// every symbol back to back.
// Traffic includes the sequence of 7-bit words 77, 43, 57, 86 sent through
// one TX/RX pair, fully loaded symbols (all N ports sending, largest words),
// symbols with idle RX ports, symbols with no traffic, all-zero words and a
// port sending to itself. Each of these situations is counted and a
// failure is recorded for one that never happened.
module tb_acdma_crossbar;
  localparam int unsigned N    = acdma_pkg::N_PORTS;
  localparam int unsigned W    = acdma_pkg::W_DATA;
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned LAT  = N + LOGN;     // capture edge to rx_valid
  localparam int unsigned SYMBOLS = 300;
  localparam int unsigned RING = 64;

  logic clk = 0, rst_n = 0;
  logic [N-1:0]           tx_valid, rx_valid;
  logic [N-1:0][W-1:0]    tx_data, rx_data;
  logic [N-1:0][LOGN-1:0] tx_dest;
  logic                   tx_ready;

  acdma_crossbar dut (
    .clk(clk), .rst_n(rst_n), .tx_valid(tx_valid), .tx_data(tx_data),
    .tx_dest(tx_dest), .tx_ready(tx_ready), .rx_valid(rx_valid), .rx_data(rx_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // expected outputs, indexed by the cycle at which they must be seen
  logic [N-1:0]        exp_v [RING];
  logic [N-1:0][W-1:0] exp_d [RING];
  int n_full = 0, n_idle_rx = 0, n_empty = 0, n_paper_seq = 0, n_zero = 0,
      n_self = 0, n_delivered = 0, n_symbols = 0, n_max = 0;
  int paper_words [4] = '{77, 43, 57, 86};

  initial begin
    #((SYMBOLS * N + 200) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic offer(input int s);
    int perm [N];
    int nsend;
    logic [N-1:0] rxv;
    logic [N-1:0][W-1:0] rxd;
    // random permutation of RX ports
    for (int i = 0; i < N; i++) perm[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    tx_valid = '0; tx_data = '0; tx_dest = '0;
    if (s < 4) begin
      // the reference word sequence, TX 2 -> RX 5
      tx_valid[2] = 1'b1; tx_dest[2] = LOGN'(5); tx_data[2] = W'(paper_words[s]);
      n_paper_seq++;
    end else if (s % 10 == 5) begin
      for (int j = 0; j < N; j++) begin
        tx_valid[j] = 1'b1; tx_dest[j] = LOGN'(perm[j]); tx_data[j] = {W{1'b1}};
      end
    end else if (s % 10 == 6) begin
      // no traffic at all
    end else begin
      for (int j = 0; j < N; j++) begin
        tx_valid[j] = ($urandom_range(3) != 0);
        tx_dest[j]  = LOGN'(perm[j]);
        tx_data[j]  = W'($urandom);
        if ($urandom_range(15) == 0) tx_data[j] = '0;
      end
    end
    rxv = '0; rxd = '0; nsend = 0;
    for (int j = 0; j < N; j++)
      if (tx_valid[j]) begin
        rxv[tx_dest[j]] = 1'b1;
        rxd[tx_dest[j]] = tx_data[j];
        nsend++;
        if (tx_data[j] == '0) n_zero++;
        if (tx_data[j] == '1) n_max++;
        if (int'(tx_dest[j]) == j) n_self++;
      end
    if (nsend == N) n_full++;
    if (nsend == 0) n_empty++;
    else if (nsend < N) n_idle_rx++;
    n_symbols++;
    exp_v[0] = rxv; exp_d[0] = rxd;   // handed back to the caller below
  endtask

  initial begin
    int cyc, s;
    for (int i = 0; i < RING; i++) begin exp_v[i] = '0; exp_d[i] = '0; end
    tx_valid = '0; tx_data = '0; tx_dest = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cyc = 0; s = 0;
    // cyc counts the rising edges since reset was released
    while (s < int'(SYMBOLS)) begin
      @(posedge clk); cyc++;
      @(negedge clk);
      // outputs after edge `cyc`
      checks++;
      if (rx_valid != exp_v[cyc % RING]) begin
        failures++;
        $display("edge %0d: rx_valid %b expected %b", cyc, rx_valid, exp_v[cyc % RING]);
      end
      for (int k = 0; k < N; k++)
        if (exp_v[cyc % RING][k]) begin
          checks++;
          n_delivered++;
          if (rx_data[k] != exp_d[cyc % RING][k]) begin
            failures++;
            $display("edge %0d port %0d: data %0d expected %0d", cyc, k, rx_data[k],
                     exp_d[cyc % RING][k]);
          end
        end
      exp_v[cyc % RING] = '0;
      if (tx_ready) begin
        offer(s);
        // captured at edge cyc+1, delivered after edge cyc+1+LAT
        exp_v[(cyc + 1 + LAT) % RING] = exp_v[0];
        exp_d[(cyc + 1 + LAT) % RING] = exp_d[0];
        exp_v[0] = '0;
        s++;
      end
    end
    // drain
    repeat (LAT + 2) begin
      @(posedge clk); cyc++;
      @(negedge clk);
      tx_valid = '0;
      checks++;
      if (rx_valid != exp_v[cyc % RING]) begin
        failures++;
        $display("edge %0d: rx_valid %b expected %b", cyc, rx_valid, exp_v[cyc % RING]);
      end
      for (int k = 0; k < N; k++)
        if (exp_v[cyc % RING][k]) begin
          checks++; n_delivered++;
          if (rx_data[k] != exp_d[cyc % RING][k]) begin
            failures++;
            $display("edge %0d port %0d: data %0d expected %0d", cyc, k, rx_data[k],
                     exp_d[cyc % RING][k]);
          end
        end
      exp_v[cyc % RING] = '0;
    end
    $display("symbols=%0d delivered=%0d full=%0d partly_idle=%0d empty=%0d ref_seq=%0d zero=%0d max=%0d self=%0d",
             n_symbols, n_delivered, n_full, n_idle_rx, n_empty, n_paper_seq, n_zero, n_max, n_self);
    if (n_full == 0)      begin failures++; $display("never fully loaded"); end
    if (n_idle_rx == 0)   begin failures++; $display("never partly idle"); end
    if (n_empty == 0)     begin failures++; $display("never empty"); end
    if (n_paper_seq != 4) begin failures++; $display("reference sequence not sent"); end
    if (n_zero == 0)      begin failures++; $display("no zero word"); end
    if (n_max == 0)       begin failures++; $display("no largest word"); end
    if (n_self == 0)      begin failures++; $display("no port sent to itself"); end
    if (n_delivered == 0) begin failures++; $display("nothing delivered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
