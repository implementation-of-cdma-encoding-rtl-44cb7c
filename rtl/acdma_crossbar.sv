// acdma_crossbar: N x N Aggregated-CDMA (ACDMA) crossbar, the physical layer
// of a network-on-chip router.
//
// Every RX port k owns the N-chip Walsh code C_k. A TX port that sends a
// W-bit word to RX port k spreads the *whole word* with C_k in a single CDMA
// channel (rather than one channel per bit): during chip i it puts c_k(i)*d
// on the channel. The channel adder tree adds the contributions of all TX
// ports into one sum S_i per chip, every decoder sees every S_i, and decoder
// k correlates S_0 .. S_{N-1} with C_k, which by orthogonality leaves N*d.
//
// Timing. A free-running chip counter divides time into symbols of N cycles.
// `tx_ready` is high in the last cycle of a symbol; on that clock edge every
// port's tx_valid / tx_data / tx_dest are captured and held for the next N
// cycles (chips 0 .. N-1). The adder tree adds log2(N) pipeline cycles, and the
// decoder writes its result one cycle after the last chip, so a word captured
// at edge E appears on rx_data with rx_valid high right after edge
// E + N + log2(N). Each port carries one word per N cycles, and all N ports can
// send at once.
//
// Rules: at most one valid TX port may name a given RX port in one symbol
// (choosing among senders is the job of the router's arbiter, outside this
// block); an assertion checks this. An RX port no one sent to gives no
// rx_valid.
// Encoder, tree adder and decoder structure follow the reference design;
// the symbol framing, the per-RX-port code assignment with a destination
// field per TX port, the code generators and the valid signals are this
// design's own choices.
module acdma_crossbar #(
  parameter int unsigned N = acdma_pkg::N_PORTS,
  parameter int unsigned W = acdma_pkg::W_DATA,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned SW   = W + 1 + LOGN
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // TX side: sampled when tx_ready is high
  input  logic [N-1:0]           tx_valid,
  input  logic [N-1:0][W-1:0]    tx_data,
  input  logic [N-1:0][LOGN-1:0] tx_dest,
  output logic                   tx_ready,
  // RX side
  output logic [N-1:0]           rx_valid,
  output logic [N-1:0][W-1:0]    rx_data
);

  // ---------------- symbol timing and input hold registers ----------------
  logic [LOGN-1:0]        cnt;
  logic                   run;
  logic [N-1:0]           h_valid;
  logic [N-1:0][W-1:0]    h_data;
  logic [N-1:0][LOGN-1:0] h_dest;

  assign tx_ready = (cnt == LOGN'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      run     <= 1'b0;
      h_valid <= '0;
      h_data  <= '0;
      h_dest  <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (tx_ready) begin
        run     <= 1'b1;
        h_valid <= tx_valid;
        h_data  <= tx_data;
        h_dest  <= tx_dest;
      end
    end
  end

  // RX ports that a held word is addressed to.
  logic [N-1:0] rx_active;
  always_comb begin
    rx_active = '0;
    for (int j = 0; j < N; j++)
      if (h_valid[j]) rx_active[h_dest[j]] = 1'b1;
  end

  // ---------------- encoders ----------------
  logic [N-1:0]        tx_chips;
  logic [N-1:0][W-1:0] spread;
  logic [N-1:0]        neg;

  walsh_code_gen #(.N(N)) u_code_tx (.idx(cnt), .chip(tx_chips));

  for (genvar j = 0; j < N; j++) begin : enc
    acdma_encoder #(.W(W)) u_enc (
      .valid (h_valid[j]),
      .data  (h_data[j]),
      .chip  (tx_chips[h_dest[j]]),
      .spread(spread[j]),
      .neg   (neg[j])
    );
  end

  // ---------------- channel adder tree ----------------
  localparam int unsigned TAG_W = 1 + N + LOGN;
  logic signed [SW-1:0] chan_sum;
  logic [TAG_W-1:0]     tag_out;
  logic                 s_run;
  logic [N-1:0]         s_active;
  logic [LOGN-1:0]      s_idx;

  channel_adder_tree #(.N(N), .W(W), .TAG_W(TAG_W)) u_tree (
    .clk    (clk),
    .rst_n  (rst_n),
    .spread (spread),
    .neg    (neg),
    .in_tag ({run, rx_active, cnt}),
    .sum    (chan_sum),
    .out_tag(tag_out)
  );

  assign {s_run, s_active, s_idx} = tag_out;

  // ---------------- decoders ----------------
  logic [N-1:0] rx_chips;

  walsh_code_gen #(.N(N)) u_code_rx (.idx(s_idx), .chip(rx_chips));

  for (genvar k = 0; k < N; k++) begin : dec
    acdma_decoder #(.N(N), .W(W)) u_dec (
      .clk       (clk),
      .rst_n     (rst_n),
      .sum_valid (s_run),
      .sum       (chan_sum),
      .idx       (s_idx),
      .chip      (rx_chips[k]),
      .active    (s_active[k]),
      .data_out  (rx_data[k]),
      .data_valid(rx_valid[k])
    );
  end

  // ---------------- rule check ----------------
  function automatic logic dest_clash(input logic [N-1:0] v,
                                      input logic [N-1:0][LOGN-1:0] d);
    logic c;
    c = 1'b0;
    for (int a = 0; a < N; a++)
      for (int b = a + 1; b < N; b++)
        if (v[a] && v[b] && d[a] == d[b]) c = 1'b1;
    return c;
  endfunction

  a_one_sender_per_rx: assert property (
    @(posedge clk) disable iff (!rst_n) tx_ready |-> !dest_clash(tx_valid, tx_dest))
    else $error("acdma_crossbar: two TX ports address the same RX port");

endmodule
