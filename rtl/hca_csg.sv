// hca_csg: carry-sum generator, the sixth and last stage of the adder.
//
// It folds the final carry merge of the Han-Carlson tree into the sum
// stage. From the active-low stage-5 outputs it forms, for each even bit
// i >= 2, the carry G[i:0] = g[i] | (p[i] & G[i-1:0]) using the group
// generate of the odd neighbour i-1 (the static merge on the left of the
// silicon cell); odd bits already hold G[i:0]. The carry into bit i is
// G[i-1:0] (no carry into bit 0), and each sum bit is carry XOR partial
// sum. Both sum and its complement are produced, as the transmission-gate
// XOR in silicon does.
//
// Purely combinational here. In silicon the stage runs on a locally
// inverted clock and a P-latch holds the complemented even carry; those
// are circuit details with no logic function of their own. The merge of
// the last carry stage into the sum stage follows the design description;
// having no carry in is this design's choice.
`timescale 1ps/1ps
module hca_csg (
  input  logic [hca_pkg::WIDTH-1:0] g5_n,
  input  logic [hca_pkg::WIDTH-1:0] p5_n,
  input  logic [hca_pkg::WIDTH-1:0] psum,
  output logic [hca_pkg::WIDTH-1:0] sum,
  output logic [hca_pkg::WIDTH-1:0] sum_n
);
  import hca_pkg::*;

  logic [WIDTH-2:0] grp_g;   // G[i:0] for bits 0..30 (G[31:0], the carry out, is not used)
  logic [WIDTH-1:0] carry;   // carry into bit i

  always_comb begin
    for (int i = 0; i < WIDTH - 1; i++) begin
      if (i % 2 == 1 || i == 0) begin
        grp_g[i] = ~g5_n[i];
      end else begin
        // even-bit merge: ~(gbar_i & (pbar_i | gbar_{i-1}))
        grp_g[i] = ~(g5_n[i] & (p5_n[i] | g5_n[i-1]));
      end
    end
    carry = {grp_g, 1'b0};
    sum   = psum ^ carry;
    sum_n = ~sum;
  end

endmodule
