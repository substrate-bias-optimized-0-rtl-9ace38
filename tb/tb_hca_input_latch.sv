// tb_hca_input_latch: input latch test, at its default width of one
// two-bit pipeline. All operand pairs are applied in turn between clock edges; after each rising edge
// the outputs must be the complements of the operands applied before it,
// and must hold when the operands change while the clock is low.
`timescale 1ps/1ps
module tb_hca_input_latch;
  logic clk = 1'b0;
  logic [1:0] a, b, a_n, b_n;
  int checks = 0, failures = 0;

  always #195 clk = ~clk;

  hca_input_latch dut (.clk, .a, .b, .a_n, .b_n);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] ea, eb;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      ea = 2'(i); eb = 2'(i >> 2);   // all 16 operand pairs, cycled
      a = ea; b = eb;
      @(posedge clk); #1;
      checks += 2;
      if (a_n !== ~ea) begin failures++; $display("FAIL a_n %h", a_n); end
      if (b_n !== ~eb) begin failures++; $display("FAIL b_n %h", b_n); end
      #50; a = ~ea; b = ~eb; #50;   // change before the next edge: must hold
      checks++;
      if (a_n !== ~ea || b_n !== ~eb) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
