// hca_cms: static carry-merge cell (positive in, negative out).
//
// Merges an upper group [i:k] with the adjacent lower group [k-1:j]:
//   g_n = ~(g_hi | (p_hi & g_lo))     (AOI gate)
//   p_n = ~(p_hi & p_lo)              (NAND gate)
// Inputs are active-high group signals, outputs active-low, so the cell
// needs no output inverter and feeds a dynamic carry-merge cell directly.
// Purely combinational. The cell type and polarity follow the design
// description; the propagate NAND is this design's completion of the cell.
`timescale 1ps/1ps
module hca_cms (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g_n,
  output logic p_n
);

  always_comb begin
    g_n = ~(g_hi | (p_hi & g_lo));
    p_n = ~(p_hi & p_lo);
  end

endmodule
