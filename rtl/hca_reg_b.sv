// hca_reg_b: operand-B register of the test circuit.
//
// Runs on the f/4 clock. In shifting mode its input is grounded, so it is
// cleared; in testing mode it loads the sum held in Register-C, which
// closes the accumulator loop LFSR + Register-B -> adder -> Register-C ->
// Register-B. Behaviour follows the design description; the 2:1 select
// on the mode pin is the simplest circuit that does it.
`timescale 1ps/1ps
module hca_reg_b (
  input  logic                      clk,
  input  hca_pkg::test_mode_e       mode,
  input  logic [hca_pkg::WIDTH-1:0] d,
  output logic [hca_pkg::WIDTH-1:0] q
);
  import hca_pkg::*;

  always_ff @(posedge clk) begin
    if (mode == MODE_SHIFT) q <= '0;
    else                    q <= d;
  end

endmodule
