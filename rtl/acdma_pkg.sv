// acdma_pkg: constants and helpers shared by the Aggregated-CDMA (ACDMA)
// crossbar blocks.
//
// N_PORTS is the number of TX ports, of RX ports and of Walsh codes (one
// N-chip code per RX port); it must be a power of two. W_DATA is the width
// of the word a port carries. The 7-bit word follows the reference
// implementation; the 8-port default is this design's own choice.
// Throughout the design a chip is carried as one bit: 0 stands for a +1
// chip and 1 for a -1 chip.
package acdma_pkg;

  parameter int unsigned N_PORTS = 8;
  parameter int unsigned W_DATA  = 7;

endpackage
