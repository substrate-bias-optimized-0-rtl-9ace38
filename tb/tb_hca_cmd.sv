// tb_hca_cmd: exhaustive test of the dynamic carry-merge cell.
// Inputs are active low, outputs active high; all 16 input combinations
// are compared with G = g_hi + p_hi*g_lo and P = p_hi*p_lo.
`timescale 1ps/1ps
module tb_hca_cmd;
  logic g_hi_n, p_hi_n, g_lo_n, p_lo_n, g, p;
  int checks = 0, failures = 0;

  hca_cmd dut (.g_hi_n, .p_hi_n, .g_lo_n, .p_lo_n, .g, .p);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic gh, ph, gl, pl;
    for (int v = 0; v < 16; v++) begin
      {gh, ph, gl, pl} = 4'(v);
      {g_hi_n, p_hi_n, g_lo_n, p_lo_n} = ~{gh, ph, gl, pl};
      #10;
      checks += 2;
      if (g !== (gh | (ph & gl))) begin failures++; $display("FAIL g v=%0d", v); end
      if (p !== (ph & pl))        begin failures++; $display("FAIL p v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
