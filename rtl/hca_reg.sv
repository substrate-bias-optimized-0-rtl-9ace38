// hca_reg: plain positive-edge register, used for Register-C and Register-O.
//
// Register-C captures the adder's output latch on the inverted f/2 clock;
// Register-O captures Register-C on the f/64 clock, one result every 16
// accumulations, slow enough for a logic analyser. No reset: both are
// overwritten while the test runs. Clocks and roles follow the design
// description; having no reset is this design's choice.
`timescale 1ps/1ps
module hca_reg #(
  parameter int unsigned WIDTH = hca_pkg::WIDTH
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule
