// acdma_decoder: despreads the channel sum for one RX port.
//
// Correlates the sequence of channel sums S_0 .. S_{N-1} with the port's
// despreading code C_k. Because the chips are +1/-1 this is an up/down
// accumulator: one adder/subtractor and a register that adds S_i when the
// chip is +1 and subtracts it when the chip is -1. By Walsh orthogonality the
// accumulator holds N * d_k after the last chip, and since N is a power of two
// the word is recovered by dropping the low log2(N) bits.
// Interface: while `sum_valid` is high one chip is consumed per cycle, `idx`
// being its position in the symbol (0 .. N-1). On idx = 0 the accumulator
// restarts; on idx = N-1 the result is written to `data_out` and
// `data_valid` pulses for one cycle if `active` says a TX port sent to this
// port in that symbol. Output is registered: it appears the cycle after the
// last chip.
// The adder/subtractor plus register and the final shift follow the
// reference design, as does sizing the accumulator like the channel: it is
// W+1+log2(N) bits, the width of the channel sum. Partial correlations can
// exceed that range, but the accumulator only adds and subtracts, so it
// computes modulo 2^(W+1+log2(N)); the final value N*d_k < 2^(W+log2(N))
// fits, and is therefore exact. The restart on idx = 0, the `active` flag
// and the reset values are this design's own choices.
module acdma_decoder #(
  parameter int unsigned N = acdma_pkg::N_PORTS,
  parameter int unsigned W = acdma_pkg::W_DATA,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned SW   = W + 1 + LOGN,
  localparam int unsigned AW   = W + 1 + LOGN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sum_valid,  // a chip's channel sum is present
  input  logic signed [SW-1:0] sum,        // channel sum S_i
  input  logic [LOGN-1:0]      idx,        // chip position i
  input  logic                 chip,       // despreading chip C_k(i), 1 = -1
  input  logic                 active,     // a sender targets this port
  output logic [W-1:0]         data_out,   // recovered word d_k
  output logic                 data_valid  // one-cycle strobe with data_out
);

  logic signed [AW-1:0] acc, term, next;

  always_comb begin
    term = chip ? -sum : sum;
    next = ((idx == '0) ? '0 : acc) + term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      data_out   <= '0;
      data_valid <= 1'b0;
    end else begin
      data_valid <= 1'b0;
      if (sum_valid) begin
        acc <= next;
        if (idx == LOGN'(N - 1)) begin
          data_out   <= W'(next >>> LOGN);
          data_valid <= active;
        end
      end
    end
  end

endmodule
