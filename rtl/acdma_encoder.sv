// acdma_encoder: spreads one TX port's word with one chip of its code.
//
// The whole W-bit word is multiplied by the current chip c (+1 or -1) in one
// CDMA channel. In two's complement -d = ~d + 1, so the encoder is only W
// XOR gates: spread = d ^ {W{neg}}. The "+1" of a negative chip is not added
// here; `neg` is handed to the channel adder tree, which adds it as a carry
// and uses it as the sign bit, so the tree sees the (W+1)-bit signed value
// {neg, spread} + neg = c * d.
// An idle port (valid low) sends zero: spread = 0 and neg = 0.
// This follows the encoder of the reference design; the idle gating is this
// design's own choice. Purely combinational.
module acdma_encoder #(
  parameter int unsigned W = acdma_pkg::W_DATA
) (
  input  logic         valid,   // port has a word to send this symbol
  input  logic [W-1:0] data,    // unsigned word d
  input  logic         chip,    // current spreading chip, 1 means -1
  output logic [W-1:0] spread,  // d XOR chip (one's complement when chip = -1)
  output logic         neg      // chip is -1: sign bit and deferred +1
);

  always_comb begin
    neg    = valid & chip;
    spread = valid ? (data ^ {W{chip}}) : '0;
  end

endmodule
