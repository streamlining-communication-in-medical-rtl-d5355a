// acdma_pkg -- constants and helper functions shared by the ACDMA crossbar.
//
// Spreading codes are the rows of the Sylvester-Hadamard (Walsh) matrix of
// order N. Chip i of code k is +1 when popcount(k & i) is even and -1 when it
// is odd. Everywhere in this design a chip travels as one bit: 0 stands for
// +1 and 1 stands for -1, so that XOR-ing a data word with the chip bit gives
// the one's complement of the word exactly when the chip is -1.
// Walsh codes are the code family named for the crossbar; the row-to-port
// assignment and the chip bit encoding are this design's own choices.
package acdma_pkg;

  // Default configuration: 7-bit words as in the FPGA link, 8 ports (assumed).
  localparam int unsigned DEFAULT_W = 7;
  localparam int unsigned DEFAULT_N = 8;

  // Walsh chip bit (1 = -1) of code row `code` at chip index `idx`.
  function automatic logic walsh_chip(input logic [31:0] code, input logic [31:0] idx);
    return ^(code & idx);
  endfunction

endpackage
