// tb_hca_cms: exhaustive test of the static carry-merge cell.
// All 16 input combinations are applied and both outputs compared with the
// merge rule G = g_hi + p_hi*g_lo, P = p_hi*p_lo, complemented.
`timescale 1ps/1ps
module tb_hca_cms;
  logic g_hi, p_hi, g_lo, p_lo, g_n, p_n;
  int checks = 0, failures = 0;

  hca_cms dut (.g_hi, .p_hi, .g_lo, .p_lo, .g_n, .p_n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g_n, exp_p_n;
    for (int v = 0; v < 16; v++) begin
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #10;
      exp_g_n = (g_hi || (p_hi && g_lo)) ? 1'b0 : 1'b1;
      exp_p_n = (p_hi && p_lo) ? 1'b0 : 1'b1;
      checks += 2;
      if (g_n !== exp_g_n) begin failures++; $display("FAIL g_n v=%0d", v); end
      if (p_n !== exp_p_n) begin failures++; $display("FAIL p_n v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
