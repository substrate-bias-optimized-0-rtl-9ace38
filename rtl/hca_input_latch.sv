// hca_input_latch: operand capture stage at the head of one adder pipeline.
//
// On each rising edge of the pipeline clock the operand bits of the
// pipeline are captured and driven onward in complementary (active-low)
// form, because the propagate/generate stage that follows is written for
// complemented inputs. The 32-bit adder is built from 16 parallel two-bit
// pipelines, so WIDTH defaults to 2 bits and the adder instantiates this
// latch 16 times, each on its own clock. There is no reset: the latch is
// overwritten every cycle.
//
// Timing: a/b sampled on the rising edge of clk; a_n/b_n change right after.
// Complemented outputs follow the design description; the flip-flop style
// of the latch is this design's own choice.
`timescale 1ps/1ps
module hca_input_latch #(
  parameter int unsigned WIDTH = hca_pkg::BITS_PER_PIPE
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] a_n,
  output logic [WIDTH-1:0] b_n
);

  always_ff @(posedge clk) begin
    a_n <= ~a;
    b_n <= ~b;
  end

endmodule
