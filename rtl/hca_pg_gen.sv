// hca_pg_gen: propagate, generate and partial-sum generation.
//
// The operands arrive complemented (a_n, b_n). Per bit:
//   p    = ~(a_n & b_n)   = a | b   (propagate, OR form)
//   g    = ~(a_n | b_n)   = a & b   (generate)
//   psum = p ^ g          = a ^ b   (partial sum)
// In silicon p and g come from dynamic NAND/NOR gates that drive the first
// static carry-merge stage directly, while psum, off the critical path, is
// a static gate fed by p and g. Here all three are plain combinational
// logic; the precharge phase of the dynamic gates is not modelled, the
// outputs are their evaluate-phase values. The equations follow the design
// description, with psum taken as p ^ g (the half sum a ^ b).
`timescale 1ps/1ps
module hca_pg_gen #(
  parameter int unsigned WIDTH = hca_pkg::WIDTH
) (
  input  logic [WIDTH-1:0] a_n,
  input  logic [WIDTH-1:0] b_n,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] psum
);

  always_comb begin
    p    = ~(a_n & b_n);
    g    = ~(a_n | b_n);
    psum = p ^ g;
  end

endmodule
