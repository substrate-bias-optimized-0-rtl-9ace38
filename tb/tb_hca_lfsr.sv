// tb_hca_lfsr: LFSR test.
// 1. Shifting mode: 32 random serial bits are shifted in; the register must
//    hold them in order, first bit at the top.
// 2. Testing mode from a random seed: 200 steps compared with a reference
//    model of the XNOR feedback (taps 32, 22, 2, 1) kept in the testbench.
// 3. Shifting mode with 32 ones, then testing mode: the all-ones state must
//    persist, giving the constant operand of the accumulation test.
`timescale 1ps/1ps
module tb_hca_lfsr;
  import hca_pkg::*;
  logic clk = 1'b0;
  test_mode_e mode;
  logic serial_in;
  logic [31:0] q;
  int checks = 0, failures = 0;

  always #780 clk = ~clk;

  hca_lfsr dut (.clk, .mode, .serial_in, .q);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shift_in(input logic [31:0] word);
    for (int i = 31; i >= 0; i--) begin
      @(negedge clk);
      mode = MODE_SHIFT;
      serial_in = word[i];
    end
    @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] seed, ref_q;
    logic fb;
    // 1. shifting
    for (int r = 0; r < 4; r++) begin
      seed = $urandom | 32'h0000_1000;
      shift_in(seed);
      checks++;
      if (q !== seed) begin failures++; $display("FAIL shift q=%h exp %h", q, seed); end
    end
    // 2. testing mode from the last seed
    ref_q = seed;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      mode = MODE_TEST;
      serial_in = $urandom;          // must be ignored
      fb = ~(ref_q[31] ^ ref_q[21] ^ ref_q[1] ^ ref_q[0]);
      ref_q = {ref_q[30:0], fb};
      @(posedge clk); #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL step %0d q=%h exp %h", i, q, ref_q); end
    end
    // 3. all ones
    shift_in(32'hFFFF_FFFF);
    checks++;
    if (q !== 32'hFFFF_FFFF) begin failures++; $display("FAIL ones load"); end
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      mode = MODE_TEST;
      serial_in = 1'b0;
      @(posedge clk); #1;
      checks++;
      if (q !== 32'hFFFF_FFFF) begin failures++; $display("FAIL ones hold q=%h", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
