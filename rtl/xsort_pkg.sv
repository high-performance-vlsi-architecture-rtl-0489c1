// Shared definitions for the XSORT-N streaming sorter.
//
// XSORT-N keeps N W-bit samples in a register array sorted in descending
// order. Every cycle one new sample is compared with all registers at once,
// and each register either keeps its value, takes its left neighbour's value
// (the right shift that opens a gap) or takes the new sample. This package
// holds the default sizes (W = 16 and N = 1024, the sizes the architecture was
// evaluated at) and the encoding of the per-register operation.
package xsort_pkg;

  // Default sample width and sorting order.
  localparam int unsigned W_DEFAULT = 16;
  localparam int unsigned N_DEFAULT = 1024;

  // Operation selected by the multiplexer in front of each register.
  // The encoding is this design's own choice.
  typedef enum logic [1:0] {
    SEL_RETAIN = 2'b00,  // REG_x <= REG_x
    SEL_SHIFT  = 2'b01,  // REG_x <= REG_{x-1}
    SEL_LOAD   = 2'b10   // REG_x <= REG_IN
  } sel_e;

endpackage
