// tb_hca_deskew_buf: tunable delay buffer test.
// For every one of the 8 settings of the three branch switches a clock is
// passed through and the delay of rising and falling edges is measured; it
// must be 100 ps + 7 ps per capacitor unit (weights 1, 2, 4), rise with the
// setting, and span 49 ps from setting 0 to 7 (a range of about 50 ps).
`timescale 1ps/1ps
module tb_hca_deskew_buf;
  logic clk = 1'b0;
  logic [2:0] sel;
  logic clk_out;
  int checks = 0, failures = 0;

  hca_deskew_buf dut (.clk_in (clk), .sel, .clk_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_in, t_out, d_rise, d_fall, d_min = 0, d_max = 0;
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      #1000;
      // rising edge
      clk = 1'b1; t_in = $time;
      @(posedge clk_out); t_out = $time; d_rise = t_out - t_in;
      #500;
      clk = 1'b0; t_in = $time;
      @(negedge clk_out); t_out = $time; d_fall = t_out - t_in;
      checks += 2;
      if (d_rise != 100 + 7 * s) begin failures++; $display("FAIL rise sel=%0d d=%0d", s, d_rise); end
      if (d_fall != 100 + 7 * s) begin failures++; $display("FAIL fall sel=%0d d=%0d", s, d_fall); end
      if (s == 0) d_min = d_rise;
      if (s == 7) d_max = d_rise;
    end
    checks++;
    if (d_max - d_min != 49) begin failures++; $display("FAIL range %0d", d_max - d_min); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
