// hca_pkg: constants and types shared by the Han-Carlson adder test chip.
//
// The adder is 32 bits wide and built as 16 parallel two-bit pipelines.
// The carry-merge tree has five stages; stages 1, 3 and 5 are static
// (positive in, negative out) and stages 2 and 4 are dynamic (negative in,
// positive out). The test circuitry runs from clocks divided down from the
// PLL clock by 2, 4 and 64, and has two modes: shifting and testing.
// The encoding of the mode pin is this design's own choice.
`timescale 1ps/1ps
package hca_pkg;

  localparam int unsigned WIDTH         = 32;  // adder width
  localparam int unsigned NUM_PIPES     = 16;  // parallel pipelines
  localparam int unsigned BITS_PER_PIPE = WIDTH / NUM_PIPES;
  localparam int unsigned CM_STAGES     = 5;   // carry-merge stages before the CSG

  // Division ratios of the clock divider.
  localparam int unsigned DIV_OPERAND = 4;   // LFSR and Register-B
  localparam int unsigned DIV_CAPTURE = 2;   // Register-C (inverted)
  localparam int unsigned DIV_OUTPUT  = 64;  // Register-O

  // Test mode pin: shifting loads the LFSR and grounds Register-B,
  // testing turns the adder into an accumulator.
  typedef enum logic {
    MODE_SHIFT = 1'b0,
    MODE_TEST  = 1'b1
  } test_mode_e;

  // Number of de-skew code bits: one per switchable RC branch.
  localparam int unsigned DESKEW_BITS = 3;

endpackage
