// hca_chip: test chip around the 32-bit Han-Carlson adder.
//
// The adder is exercised as an accumulator: operand A comes from the LFSR,
// operand B from Register-B, the sum goes to Register-C and from there back
// into Register-B, and every 16 additions Register-O takes a copy for the
// chip pins.
//
// Clocks. clk_pll is the PLL output f (2.56 GHz in the design; the PLL
// itself is analog and outside this RTL). A divider makes f/2, f/4 and
// f/64. Four de-skew buffers, each tuned by three pad bits, drive the four
// clock branches:
//   branch     source     registers
//   operand    f/4        LFSR, Register-B
//   adder      f          adder input and output latches
//   capture    ~(f/2)     Register-C
//   output     f/64       Register-O (40 MHz at f = 2.56 GHz)
// All registers trigger on rising edges. With equal de-skew settings one
// accumulation takes one f/4 period: Register-B and the LFSR launch at
// f/4 edge t, the adder input latch captures at t+1 (f cycles), the output
// latch at t+2, Register-C at t+3 and Register-B takes the new sum at t+4.
// Unequal settings move the branch edges against each other, which is what
// they are for: compensating skew after fabrication.
//
// Modes (pin mode, hca_pkg::test_mode_e):
//   MODE_SHIFT: serial_in is shifted into the LFSR on every f/4 edge
//               (32 ones in the standard test) and Register-B is cleared.
//   MODE_TEST : the LFSR steps (all ones stays all ones), Register-B loads
//               Register-C, so Register-B accumulates the LFSR values;
//               Register-O shows the result of 16 additions at a time.
// mode and serial_in are expected to change away from the operand-branch
// rising edges. rst_n only resets the clock divider (this design's choice).
//
// This module is not synthesizable as a whole because the de-skew buffers
// are behavioural delay models; everything else is synthesizable RTL.
`timescale 1ps/1ps
module hca_chip (
  input  logic                              clk_pll,
  input  logic                              rst_n,
  input  hca_pkg::test_mode_e               mode,
  input  logic                              serial_in,
  input  logic [hca_pkg::DESKEW_BITS-1:0]   sel_operand,
  input  logic [hca_pkg::DESKEW_BITS-1:0]   sel_adder,
  input  logic [hca_pkg::DESKEW_BITS-1:0]   sel_capture,
  input  logic [hca_pkg::DESKEW_BITS-1:0]   sel_output,
  output logic [hca_pkg::WIDTH-1:0]         reg_o
);
  import hca_pkg::*;

  logic clk_d2, clk_d4, clk_d64;
  logic clk_d2_n;
  logic clk_operand, clk_adder, clk_capture, clk_output;

  logic [WIDTH-1:0] lfsr_q, reg_b_q, sum, reg_c_q;

  // ---- clock generation and distribution ----
  hca_clk_div u_div (
    .clk (clk_pll), .rst_n (rst_n),
    .clk_d2 (clk_d2), .clk_d4 (clk_d4), .clk_d64 (clk_d64)
  );

  assign clk_d2_n = ~clk_d2;

  hca_deskew_buf u_dsk_operand (.clk_in (clk_d4),   .sel (sel_operand), .clk_out (clk_operand));
  hca_deskew_buf u_dsk_adder   (.clk_in (clk_pll),  .sel (sel_adder),   .clk_out (clk_adder));
  hca_deskew_buf u_dsk_capture (.clk_in (clk_d2_n), .sel (sel_capture), .clk_out (clk_capture));
  hca_deskew_buf u_dsk_output  (.clk_in (clk_d64),  .sel (sel_output),  .clk_out (clk_output));

  // ---- operand sources ----
  hca_lfsr u_lfsr (
    .clk (clk_operand), .mode (mode), .serial_in (serial_in), .q (lfsr_q)
  );

  hca_reg_b u_reg_b (
    .clk (clk_operand), .mode (mode), .d (reg_c_q), .q (reg_b_q)
  );

  // ---- adder core ----
  hca_adder32 u_adder (
    .clk ({NUM_PIPES{clk_adder}}), .a (lfsr_q), .b (reg_b_q), .sum (sum)
  );

  // ---- result registers ----
  hca_reg u_reg_c (.clk (clk_capture), .d (sum),     .q (reg_c_q));
  hca_reg u_reg_o (.clk (clk_output),  .d (reg_c_q), .q (reg_o));

endmodule
