// hca_cmd: dynamic carry-merge cell (negative in, positive out).
//
// Merges an upper group with the adjacent lower group when both arrive as
// active-low signals, and produces active-high results:
//   g = ~(g_hi_n & (p_hi_n | g_lo_n))  =  g_hi | (p_hi & g_lo)
//   p = ~(p_hi_n | p_lo_n)             =  p_hi & p_lo
// In silicon this is a precharged node whose pull-down network is
// duplicated against charge sharing; the node itself (not the keeper
// inverter) drives the next static stage. Here the cell is combinational
// and gives the evaluate-phase value; precharge is not modelled. The
// generate network follows the design description; the propagate NOR is
// this design's completion of the cell.
`timescale 1ps/1ps
module hca_cmd (
  input  logic g_hi_n,
  input  logic p_hi_n,
  input  logic g_lo_n,
  input  logic p_lo_n,
  output logic g,
  output logic p
);

  always_comb begin
    g = ~(g_hi_n & (p_hi_n | g_lo_n));
    p = ~(p_hi_n | p_lo_n);
  end

endmodule
