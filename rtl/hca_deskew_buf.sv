// hca_deskew_buf: behavioural model of the post-manufacture tunable clock
// buffer (not synthesizable: it models an analog delay line).
//
// The silicon part is a buffer driving a line with three RC branches, each
// switched onto the line by a CMOS transmission gate whose gate is driven
// from a chip pad; every branch switched on adds capacitive load and so
// delay. With the branch capacitors sized 1:2:4 the three pad bits give 8
// evenly spaced settings, and the whole tuning range is about 50 ps.
//
// Model: clk_out follows clk_in after
//   BASE_PS + STEP_PS * (sel[0] + 2*sel[1] + 4*sel[2])   picoseconds,
// as a transport delay (every edge is passed, none swallowed). The
// delay is taken when an edge enters, so changing sel affects later edges.
// The three switched branches and the ~50 ps range follow the design
// description; the binary weighting, the base delay and the step are this
// model's choices. Rise and fall delays are equal here. The delay is a
// variable, so lint cannot prove it non-zero; it is never below BASE_PS.
`timescale 1ps/1ps
module hca_deskew_buf #(
  parameter int unsigned BASE_PS = 100,  // delay with all branches off
  parameter int unsigned STEP_PS = 7     // delay added per capacitor unit
) (
  input  logic                             clk_in,
  input  logic [hca_pkg::DESKEW_BITS-1:0]  sel,
  output logic                             clk_out
);

  int unsigned delay_ps;

  assign delay_ps = BASE_PS + STEP_PS * int'(sel);

  initial clk_out = 1'b0;

  always @(clk_in) begin
    clk_out <= #(delay_ps) clk_in;
  end

endmodule
