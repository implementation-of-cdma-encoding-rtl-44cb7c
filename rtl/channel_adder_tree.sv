// channel_adder_tree: the ACDMA channel adder.
//
// Adds the N spread words of one chip period into the channel sum
// S = sum_j c_j * d_j. The tree has log2(N) levels of two-input adders;
// the leaves are the N encoders, the root gives S. Each adder's output is one
// bit wider than its inputs, so level 0 is (W+2) bits wide and the root is
// W+1+log2(N) bits, enough for any sum without overflow.
// The encoders only invert the word for a -1 chip; the missing +1 of each
// negative chip is added here: a level-0 adder computes
//   {neg_a, spread_a} + {neg_b, spread_b} + neg_a + neg_b
// treating {neg, spread} as a (W+1)-bit two's complement number, so the
// spreading-code correction shares the channel adders.
// A pipeline register follows every level: the sum of the chip presented in
// one cycle appears on `sum` log2(N) cycles later, and a new chip is accepted
// every cycle. `in_tag` is carried along with the same delay so that side
// information (chip index, valid bits) stays aligned with the sum.
// The tree shape, widths and per-level registers follow the reference
// design; the tag pipeline and the placement of the +1 at the leaf adders are
// this design's own choices. Registers reset to zero (active-low async).
module channel_adder_tree #(
  parameter int unsigned N     = acdma_pkg::N_PORTS,
  parameter int unsigned W     = acdma_pkg::W_DATA,
  parameter int unsigned TAG_W = 1,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned SW   = W + 1 + LOGN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][W-1:0]  spread,   // encoder outputs, one per TX port
  input  logic [N-1:0]         neg,      // chip of that port is -1
  input  logic [TAG_W-1:0]     in_tag,   // side data travelling with this chip
  output logic signed [SW-1:0] sum,      // channel sum S, LOGN cycles later
  output logic [TAG_W-1:0]     out_tag   // in_tag delayed by LOGN cycles
);

  initial begin
    assert (N >= 2 && (1 << LOGN) == N)
      else $error("channel_adder_tree: N must be a power of two >= 2");
  end

  for (genvar l = 0; l < LOGN; l++) begin : lvl
    localparam int unsigned IW = W + 1 + l;   // input width of this level
    localparam int unsigned OW = IW + 1;      // output width of this level
    localparam int unsigned NA = N >> (l + 1);
    logic signed [OW-1:0] s [NA];
    logic [TAG_W-1:0] tag;

    for (genvar i = 0; i < NA; i++) begin : node
      logic signed [OW-1:0] a, b;
      logic [1:0] cin;
      if (l == 0) begin : leaf
        assign a   = {neg[2*i],   neg[2*i],   spread[2*i]};
        assign b   = {neg[2*i+1], neg[2*i+1], spread[2*i+1]};
        assign cin = {1'b0, neg[2*i]} + {1'b0, neg[2*i+1]};
      end else begin : inner
        assign a   = {lvl[l-1].s[2*i][IW-1],   lvl[l-1].s[2*i]};
        assign b   = {lvl[l-1].s[2*i+1][IW-1], lvl[l-1].s[2*i+1]};
        assign cin = 2'b00;
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) s[i] <= '0;
        else        s[i] <= a + b + OW'(cin);
      end
    end

    logic [TAG_W-1:0] tag_in;
    if (l == 0) begin : tag_first
      assign tag_in = in_tag;
    end else begin : tag_next
      assign tag_in = lvl[l-1].tag;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) tag <= '0;
      else        tag <= tag_in;
    end
  end

  assign sum     = lvl[LOGN-1].s[0];
  assign out_tag = lvl[LOGN-1].tag;

endmodule
