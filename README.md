# ACDMA crossbar: a whole data word in one CDMA channel

This is synthesizable SystemVerilog for an **Aggregated CDMA (ACDMA) crossbar**. It is the
physical layer of a network-on-chip router: it connects N transmit (TX) ports to N receive
(RX) ports, and every port can send at the same time over one shared channel.

A classical CDMA interconnect copies radio practice. Each bit of a W-bit word travels in its
own CDMA channel, so the encoders, channel adders and decoders are built W times. On a chip,
the shared channel is a parallel bus with no noise to fight, so that copying is unnecessary.
ACDMA multiplies the *whole word*, taken as a number, by the spreading chip (+1 or -1). It adds
the N products in one multi-bit adder tree and recovers each word by correlation. A
bit-per-channel crossbar pays carry wires W times over in its adder tree. ACDMA pays them
once, which is where its savings in area and wiring come from.

## The arithmetic of one word

Each RX port k owns an N-chip Walsh code `C_k`. The codes are the rows of the N x N
Sylvester-Hadamard matrix, `C_k(i) = (-1)^popcount(k & i)`. Any two rows are orthogonal:
`sum_i C_a(i)·C_b(i)` is N when a = b and 0 otherwise. A word takes one **symbol** of N clock
cycles (chips) to cross the crossbar.

1. **Spreading (encoder).** TX port j sends the unsigned word `d_j` to RX port k. In chip i it
   must put `C_k(i)·d_j` on the channel. In two's complement `-d = ~d + 1`, so the encoder is
   only W XOR gates: `spread = d ^ {W{neg}}`, where `neg` is 1 when the chip is -1. The missing
   `+1` is not added in the encoder. The chip bit goes to the adder tree instead, where it is
   used twice:
   - as the sign bit, which makes `{neg, spread}` a (W+1)-bit two's complement number;
   - as a carry-in at the first tree level.

   Together they rebuild `C_k(i)·d_j` exactly. For example, d = 77 with a -1 chip gives
   `{1, ~77} = 8'd178`, which is -78, and the carry adds 1 to make -77.
2. **Channel adder tree.** The N spread words are added by a binary tree of height log2(N).
   Each adder's output is one bit wider than its inputs:
   - level 0 adds pairs of (W+1)-bit leaves, plus both leaves' carry bits, into W+2 bits;
   - the root gives the channel sum `S_i = sum_j C_{dest(j)}(i)·d_j` in W+1+log2(N) bits,
     which cannot overflow.

   Every level is followed by a pipeline register, so the tree accepts a chip every cycle and
   has a latency of log2(N) cycles.
3. **Despreading (decoder).** Every decoder sees every `S_i`. Decoder k is an up/down
   accumulator: it adds `S_i` when `C_k(i) = +1` and subtracts it when `C_k(i) = -1`. After the
   N chips, orthogonality leaves `N·d_k`. N is a power of two, so the word is the accumulator
   shifted right by log2(N).

   The accumulator has the channel's width, W+1+log2(N) bits. Partial sums may leave that
   range and wrap. The accumulator only adds and subtracts, though, so it is exact modulo its
   width, and the final value `N·d_k < 2^(W+log2 N)` fits. After synthesis, one default
   decoder is 19 flip-flops: an 11-bit accumulator, the 7-bit output and a strobe.

An RX port that nobody sends to gets `sum_i C_k(i)·S_i = 0` and raises no strobe. A TX port
with nothing to send puts 0 on the channel.

## Crossbar interface and timing (`acdma_crossbar`)

| port       | dir | width          | meaning                                                |
|------------|-----|----------------|--------------------------------------------------------|
| `clk`      | in  | 1              | clock                                                  |
| `rst_n`    | in  | 1              | asynchronous reset, active low; every register clears |
| `tx_valid` | in  | N              | TX port j has a word this symbol                       |
| `tx_data`  | in  | N x W          | the words                                              |
| `tx_dest`  | in  | N x log2(N)    | RX port each word is for                               |
| `tx_ready` | out | 1              | high in the last cycle of a symbol: inputs are captured on this edge |
| `rx_valid` | out | N              | one-cycle strobe: RX port k has a word                  |
| `rx_data`  | out | N x W          | the received words; meaningful while `rx_valid` is high |

A free-running chip counter divides time into symbols of N cycles:

```
cycle        ... | N-1 (tx_ready) | 0 | 1 | ... | N-1 |
edge E             ^ capture
chips on tree        0   1  ...  N-1        (encoders use held inputs)
root sums                    +log2(N) cycles
rx_valid                                      high after edge E + N + log2(N)
```

- **Throughput:** one W-bit word per port per N cycles. All N ports may send in the same
  symbol, and symbols follow each other back to back.
- **Latency:** N + log2(N) clock edges, from the edge that captures a word to the edge after
  which it appears on `rx_data`. That is 11 cycles at the default N = 8.
- **Rule:** in one symbol, at most one valid TX port may name a given RX port. Choosing
  between competing senders is the router arbiter's job, and the arbiter is outside this
  block. A concurrent assertion (`a_one_sender_per_rx`) flags a violation. If the rule is
  broken, the two words add up on the channel and the receiver gets their sum.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 8       | ports on each side, and the code length; must be a power of two, >= 2 |
| `W`       | 7       | word width in bits |

The defaults live in `acdma_pkg` (`N_PORTS`, `W_DATA`). W = 7 matches the 7-bit data path of
the reference implementation. N = 8 is this design's own choice, since no port count was
specified. The design has been simulated at (N, W) = (2,4), (4,3), (8,7), (16,16) and (32,8).

At the default size the crossbar synthesizes (with yosys, generic cells) to about 200
word-level cells and 347 flip-flops.

## Files

| file | contents |
|------|----------|
| `rtl/acdma_pkg.sv` | default N and W |
| `rtl/walsh_code_gen.sv` | chip of every Walsh code for a chip index: `chip[k] = ^(k & idx)`; combinational |
| `rtl/acdma_encoder.sv` | W XOR gates plus the `neg` (sign and +1) bit; combinational |
| `rtl/channel_adder_tree.sv` | pipelined adder tree, one register per level, with a side-band `tag` delayed alongside the sum |
| `rtl/acdma_decoder.sv` | up/down accumulator, restart on chip 0, shift and output register on chip N-1 |
| `rtl/acdma_crossbar.sv` | top: chip counter, input hold registers, N encoders, tree, two code generators, N decoders |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_acdma_crossbar_sizes` |
| `tb/acdma_xbar_random_test.sv` | parameterised random-traffic checker used by `tb_acdma_crossbar_sizes` |

The crossbar uses two code generators: one indexed by the chip counter on the encoder side,
and one on the decoder side. The decoder-side generator is indexed by the chip number that
travels through the tree's tag pipeline. Keeping the chip index with the sum avoids piping N
code bits through every tree level.

## What comes from the ACDMA scheme and what is this design's own

These parts follow the published ACDMA architecture:
- spreading the whole word in one channel;
- the W-XOR encoder, with the two's complement +1 deferred into the channel adders;
- the adder tree of height log2(N), one bit wider per level, root W+1+log2(N), with a register
  after every level;
- the decoder as a single adder/subtractor and register, with a final shift by log2(N);
- Walsh codes of length N;
- 7-bit words.

These are this design's own choices, where no detail was available:
- **Where the +1 goes.** The +1 of a negative chip is added as a 2-bit carry-in at each
  level-0 adder, because each of those adders has two leaves.
- **Code assignment.** Codes belong to RX ports, and a TX port spreads with the code of its
  `tx_dest`. A TX port that owned a code would instead need a source select at each receiver.
- **Symbol framing.** This covers the chip counter, the `tx_ready` capture, the holding of
  inputs for a whole symbol, and the idle-port behaviour.
- **Strobes and reset.** The valid strobes are added; resets are asynchronous, active low.
- **Accumulator width.** The accumulator is sized like the channel (see above), so it relies
  on modular arithmetic.
- **Code generation.** Walsh chips are computed from the index (Sylvester ordering), not
  stored.
- **Default port count.** The default is N = 8.

Not included:
- the conventional bit-per-channel CDMA crossbar, which is only the point of comparison;
- the rest of a NoC router (buffers, routing, arbitration).

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. Each has a watchdog and computes
its expected values independently of the RTL: Hadamard matrices by recursion, channel sums
and correlations as integers.

- `tb_walsh_code_gen`: every chip against the Sylvester recursion, and all code pairs for
  orthogonality.
- `tb_acdma_encoder`: all words, chips and valid values; `{neg,spread}+neg` must equal
  `±d`.
- `tb_channel_adder_tree`: random chip sets every cycle, including all-maximum and
  all-minimum cases. Checks the sum and the tag after exactly log2(N) cycles.
- `tb_acdma_decoder`: whole symbols of channel sums, with random senders and RX port.
  Checks the word, the strobe on the last chip only, and no strobe for an unaddressed port or
  during gaps.
- `tb_acdma_crossbar`: end to end at the default N = 8, W = 7. Over 300 back-to-back symbols
  it checks every RX port at every cycle, which also checks the N + log2(N) latency and the
  one-word-per-N-cycles rate. The traffic includes:
  - the word sequence 77, 43, 57, 86 on one TX/RX pair;
  - fully loaded symbols;
  - partly idle and empty symbols;
  - zero and all-ones words;
  - ports sending to themselves.

  It counts each of these and fails if one never happens.
- `tb_acdma_crossbar_sizes`: random traffic on four other sizes at once.

To run one with Verilator 5:

```
verilator --binary --assert -Wno-fatal rtl/acdma_pkg.sv rtl/*.sv tb/tb_acdma_crossbar.sv \
          --top-module tb_acdma_crossbar -Mdir obj && ./obj/Vtb_acdma_crossbar
```

For `tb_acdma_crossbar_sizes`, also add `tb/acdma_xbar_random_test.sv`. Block testbenches
need only `rtl/acdma_pkg.sv` and their block's file.
