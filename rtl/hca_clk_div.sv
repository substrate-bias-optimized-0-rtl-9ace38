// hca_clk_div: clock divider for the test circuitry.
//
// Divides the PLL clock f by 2, 4 and 64 with one 6-bit up-counter. Each
// output is the inverse of one counter bit, so all three divided clocks
// rise together on the f edge where the counter wraps to zero (edge
// aligned), with 50% duty cycle:
//   clk_d2  = ~cnt[0]   (f/2,  Register-C uses its inverse)
//   clk_d4  = ~cnt[1]   (f/4,  LFSR and Register-B)
//   clk_d64 = ~cnt[5]   (f/64, Register-O)
// With the Register-C clock inverted, Register-C captures one and three f
// cycles after every f/4 rising edge, so a sum launched on an f/4 edge is
// back at Register-B by the next f/4 edge.
// The counter bits are used both as data and, outside this module, as
// clocks; lint tools flag that, and it is the purpose of a divider.
// rst_n (active low, synchronous) clears the counter; the reset and the
// edge alignment are this design's choices, the three ratios follow the
// design description.
`timescale 1ps/1ps
module hca_clk_div (
  input  logic clk,
  input  logic rst_n,
  output logic clk_d2,
  output logic clk_d4,
  output logic clk_d64
);
  import hca_pkg::*;

  localparam int unsigned CNT_W = $clog2(DIV_OUTPUT);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign clk_d2  = ~cnt[$clog2(DIV_CAPTURE)-1];
  assign clk_d4  = ~cnt[$clog2(DIV_OPERAND)-1];
  assign clk_d64 = ~cnt[CNT_W-1];

endmodule
