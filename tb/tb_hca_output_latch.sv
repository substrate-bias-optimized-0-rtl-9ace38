// tb_hca_output_latch: output latch test, at its default width of one
// two-bit pipeline. All values are applied in turn between edges; q must take it on the rising edge
// and hold it while d changes with the clock low.
`timescale 1ps/1ps
module tb_hca_output_latch;
  logic clk = 1'b0;
  logic [1:0] d, q;
  int checks = 0, failures = 0;

  always #195 clk = ~clk;

  hca_output_latch dut (.clk, .d, .q);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] e;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      e = 2'(i); d = e;
      @(posedge clk); #1;
      checks++;
      if (q !== e) begin failures++; $display("FAIL q=%h exp %h", q, e); end
      #50; d = ~e; #50;
      checks++;
      if (q !== e) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
