// tb_hca_clk_div: clock divider test.
// After reset the three outputs are sampled on every input clock edge and
// compared with a counter kept in the testbench: f/2, f/4 and f/64 must
// have periods of 2, 4 and 64 input cycles, 50% duty cycle, and rise
// together every 64 cycles. Rising edges of each output are counted.
`timescale 1ps/1ps
module tb_hca_clk_div;
  logic clk = 1'b0, rst_n;
  logic clk_d2, clk_d4, clk_d64;
  int checks = 0, failures = 0;

  always #195 clk = ~clk;

  hca_clk_div dut (.clk, .rst_n, .clk_d2, .clk_d4, .clk_d64);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, rise2 = 0, rise4 = 0, rise64 = 0, together = 0;
    logic p2, p4, p64;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // counter is 0 now: all outputs high
    p2 = clk_d2; p4 = clk_d4; p64 = clk_d64;
    n = 0;
    for (int i = 0; i < 640; i++) begin
      checks += 3;
      if (clk_d2  !== ((n % 2)  < 1))  begin failures++; $display("FAIL d2 n=%0d", n); end
      if (clk_d4  !== ((n % 4)  < 2))  begin failures++; $display("FAIL d4 n=%0d", n); end
      if (clk_d64 !== ((n % 64) < 32)) begin failures++; $display("FAIL d64 n=%0d", n); end
      @(posedge clk); #1;
      n++;
      if (clk_d2  && !p2)  rise2++;
      if (clk_d4  && !p4)  rise4++;
      if (clk_d64 && !p64) begin rise64++; if (clk_d2 && clk_d4 && !p2 && !p4) together++; end
      p2 = clk_d2; p4 = clk_d4; p64 = clk_d64;
    end
    checks += 4;
    if (rise2  != 320) begin failures++; $display("FAIL rise2=%0d", rise2); end
    if (rise4  != 160) begin failures++; $display("FAIL rise4=%0d", rise4); end
    if (rise64 != 10)  begin failures++; $display("FAIL rise64=%0d", rise64); end
    if (together != 10) begin failures++; $display("FAIL aligned=%0d", together); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
