// hca_adder32: 32-bit Han-Carlson adder core.
//
// Chain per bit, as in the 16 parallel two-bit pipelines of the design:
//   input latch -> P/G/Psum generator -> CMS -> CMD -> CMS -> CMD -> CMS
//   -> carry-sum generator -> output latch
// The operands are captured by the input latch, complemented, turned into
// propagate/generate/partial-sum bits, merged by the five-stage
// static-dynamic-static tree, and summed in the carry-sum generator, whose
// result the output latch captures on the next rising edge. There is no
// carry in and no carry out.
//
// clk has one line per pipeline (bits 2k+1:2k use clk[k]), as the silicon
// has 16 pipeline clock lines; the test chip drives all 16 from one
// tunable buffer.
//
// Timing: operands present before rising edge n are captured at edge n;
// the sum appears at the output right after edge n+1. Counted from
// registers that launch the operands at edge n-1 this is the two adder
// clock cycles of the design. In silicon the logic between the latches is
// wave-pipelined with delayed clock phases inside every pipeline; here it is
// one combinational path between the input and output latches.
`timescale 1ps/1ps
module hca_adder32 (
  input  logic [hca_pkg::NUM_PIPES-1:0] clk,
  input  logic [hca_pkg::WIDTH-1:0] a,
  input  logic [hca_pkg::WIDTH-1:0] b,
  output logic [hca_pkg::WIDTH-1:0] sum
);
  import hca_pkg::*;

  logic [WIDTH-1:0] a_n, b_n;
  logic [WIDTH-1:0] p, g, psum;
  logic [WIDTH-1:0] g5_n, p5_n;
  logic [WIDTH-1:0] sum_comb, sum_comb_n;

  // One input latch per two-bit pipeline, each on its own clock line.
  for (genvar k = 0; k < NUM_PIPES; k++) begin : g_in_pipe
    localparam int unsigned LO = k * BITS_PER_PIPE;
    hca_input_latch #(.WIDTH (BITS_PER_PIPE)) u_in_latch (
      .clk (clk[k]),
      .a   (a[LO +: BITS_PER_PIPE]),   .b   (b[LO +: BITS_PER_PIPE]),
      .a_n (a_n[LO +: BITS_PER_PIPE]), .b_n (b_n[LO +: BITS_PER_PIPE])
    );
  end

  hca_pg_gen u_pg (
    .a_n (a_n), .b_n (b_n), .p (p), .g (g), .psum (psum)
  );

  hca_cm_tree u_tree (
    .p (p), .g (g), .g5_n (g5_n), .p5_n (p5_n)
  );

  hca_csg u_csg (
    .g5_n (g5_n), .p5_n (p5_n), .psum (psum), .sum (sum_comb), .sum_n (sum_comb_n)
  );

  // One output latch per two-bit pipeline.
  for (genvar k = 0; k < NUM_PIPES; k++) begin : g_out_pipe
    localparam int unsigned LO = k * BITS_PER_PIPE;
    hca_output_latch #(.WIDTH (BITS_PER_PIPE)) u_out_latch (
      .clk (clk[k]), .d (sum_comb[LO +: BITS_PER_PIPE]), .q (sum[LO +: BITS_PER_PIPE])
    );

    // The complementary sum of each pipeline must be the inverse of the
    // true sum whenever the pipeline latches it.
    a_sum_complementary: assert property (@(posedge clk[k])
      sum_comb_n[LO +: BITS_PER_PIPE] == ~sum_comb[LO +: BITS_PER_PIPE]);
  end

endmodule
