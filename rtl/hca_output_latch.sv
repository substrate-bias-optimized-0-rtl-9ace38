// hca_output_latch: sum capture stage at the tail of one adder pipeline.
//
// Captures the carry-sum generator output bits of its pipeline on the
// rising edge of the pipeline clock and holds them for the registers
// outside the adder. WIDTH defaults to the two bits of one of the 16
// parallel pipelines. No reset; it is overwritten every cycle.
`timescale 1ps/1ps
module hca_output_latch #(
  parameter int unsigned WIDTH = hca_pkg::BITS_PER_PIPE
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule
