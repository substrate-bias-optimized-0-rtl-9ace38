// hca_lfsr: operand-A source of the test circuit.
//
// In shifting mode it is a 32-bit serial shift register: every rising edge
// moves the register up one bit and takes serial_in into bit 0, so 32
// clocks fill it (with ones in the standard test). In testing mode it
// steps as an XNOR-feedback LFSR with taps 32, 22, 2 and 1 (bits 31, 21, 1
// and 0), a maximal-length polynomial. All ones is the lock-up state of
// XNOR feedback, so a register filled with ones keeps presenting all ones,
// the constant operand of the accumulation test; any other seed gives a
// pseudo-random operand stream.
//
// Runs on the f/4 clock. The shifting mode and its all-ones fill follow the
// design description; the feedback type and taps are this design's choice.
`timescale 1ps/1ps
module hca_lfsr (
  input  logic                      clk,
  input  hca_pkg::test_mode_e       mode,
  input  logic                      serial_in,
  output logic [hca_pkg::WIDTH-1:0] q
);
  import hca_pkg::*;

  logic feedback;

  assign feedback = ~(q[31] ^ q[21] ^ q[1] ^ q[0]);

  always_ff @(posedge clk) begin
    if (mode == MODE_SHIFT) q <= {q[WIDTH-2:0], serial_in};
    else                    q <= {q[WIDTH-2:0], feedback};
  end

endmodule
