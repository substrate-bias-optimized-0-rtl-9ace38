// tb_hca_reg_b: Register-B test.
// In testing mode q must load d on each rising edge; in shifting mode it
// must be cleared whatever d is. Modes are switched at random.
`timescale 1ps/1ps
module tb_hca_reg_b;
  import hca_pkg::*;
  logic clk = 1'b0;
  test_mode_e mode;
  logic [31:0] d, q;
  int checks = 0, failures = 0;
  int n_shift = 0, n_test = 0;

  always #780 clk = ~clk;

  hca_reg_b dut (.clk, .mode, .d, .q);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      d = $urandom | 32'h1;
      mode = ($urandom % 2 == 0) ? MODE_SHIFT : MODE_TEST;
      e = (mode == MODE_TEST) ? d : 32'h0;
      if (mode == MODE_TEST) n_test++; else n_shift++;
      @(posedge clk); #1;
      checks++;
      if (q !== e) begin failures++; $display("FAIL mode=%s q=%h exp %h", mode.name(), q, e); end
    end
    checks++;
    if (n_shift == 0 || n_test == 0) begin failures++; $display("FAIL a mode never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
