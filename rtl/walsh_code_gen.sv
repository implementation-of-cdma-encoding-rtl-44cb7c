// walsh_code_gen: current chip of every Walsh spreading code.
//
// For a chip position `idx` (0 .. N-1) it returns, in `chip[k]`, the chip of
// the N-chip Walsh code k (1 = -1 chip, 0 = +1 chip). The codes are the rows
// of the N x N Sylvester-Hadamard matrix, so chip[k] is the parity of
// (k & idx): a row of AND gates and an XOR tree per code, no state.
// The crossbar uses one instance on the encoder side (spreading) and one on
// the decoder side (despreading), each driven by its own chip counter.
// Walsh codes are the code family the crossbar is built for; generating them
// from the index instead of storing them is this design's choice.
// Code 0 is the all-(+1) code, so chip[0] is constant 0.
// Purely combinational.
module walsh_code_gen #(
  parameter int unsigned N = acdma_pkg::N_PORTS,
  localparam int unsigned LOGN = (N > 1) ? $clog2(N) : 1
) (
  input  logic [LOGN-1:0] idx,   // chip position within the N-chip symbol
  output logic [N-1:0]    chip   // chip[k]: chip of code k, 1 means -1
);

  always_comb begin
    for (int k = 0; k < N; k++) begin
      chip[k] = ^(idx & LOGN'(k));
    end
  end

endmodule
