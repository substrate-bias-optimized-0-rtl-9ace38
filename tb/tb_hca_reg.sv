// tb_hca_reg: test of the register used as Register-C and Register-O.
// Random data is applied between edges; q must take it on the rising edge
// and hold it otherwise.
`timescale 1ps/1ps
module tb_hca_reg;
  logic clk = 1'b0;
  logic [31:0] d, q;
  int checks = 0, failures = 0;

  always #780 clk = ~clk;

  hca_reg dut (.clk, .d, .q);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      e = $urandom; d = e;
      @(posedge clk); #1;
      checks++;
      if (q !== e) begin failures++; $display("FAIL q=%h exp %h", q, e); end
      #100; d = ~e; #100;
      checks++;
      if (q !== e) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
