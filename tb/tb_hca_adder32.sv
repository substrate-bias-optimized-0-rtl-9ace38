// tb_hca_adder32: adder core test with latency check.
// A new operand pair is applied before every rising edge of the adder
// clock (full throughput, one addition per cycle). The sum of the pair
// applied before edge n must appear right after edge n+1, and be a + b
// modulo 2^32 computed by integer addition. Corner cases (longest carry
// chains) come first, then random operands. Finally the 16 pipeline clock
// lines are shown to be separate: one pipeline's clock is held low for
// one edge, and only its two sum bits must keep their old value.
`timescale 1ps/1ps
module tb_hca_adder32;
  logic clk = 1'b0;
  logic [15:0] gate = '0;         // pipelines whose clock is held low
  logic [15:0] clk_pipe;
  logic [31:0] a, b, sum;
  int checks = 0, failures = 0;

  always #195 clk = ~clk;   // ~2.56 GHz

  assign clk_pipe = {16{clk}} & ~gate;

  hca_adder32 dut (.clk (clk_pipe), .a, .b, .sum);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 1000;
  logic [31:0] va [N];
  logic [31:0] vb [N];

  initial begin
    va[0] = 32'hFFFF_FFFF; vb[0] = 32'h0000_0001;
    va[1] = 32'hFFFF_FFFF; vb[1] = 32'hFFFF_FFFF;
    va[2] = 32'h0000_0000; vb[2] = 32'h0000_0000;
    va[3] = 32'h5555_5555; vb[3] = 32'hAAAA_AAAB;
    va[4] = 32'h7FFF_FFFF; vb[4] = 32'h0000_0001;
    va[5] = 32'hFFFF_FFFF; vb[5] = 32'h0000_0000;
    for (int i = 6; i < N; i++) begin va[i] = $urandom; vb[i] = $urandom; end

    for (int i = 0; i < N + 2; i++) begin
      @(negedge clk);
      if (i < N) begin a = va[i]; b = vb[i]; end
      @(posedge clk); #1;
      // pair i was captured at this edge; pair i-1 is now at the output
      if (i >= 1 && i - 1 < N) begin
        checks++;
        if (sum !== va[i-1] + vb[i-1]) begin
          failures++;
          $display("FAIL %0d: %h + %h = %h, got %h", i - 1, va[i-1], vb[i-1], va[i-1] + vb[i-1], sum);
        end
      end
    end

    // pipeline clock independence
    for (int k = 0; k < 16; k++) begin
      logic [31:0] old_sum, exp, mask, na, nb;
      @(negedge clk);
      old_sum = sum;
      na = $urandom; nb = $urandom;
      a = na; b = nb;
      gate = 16'h1 << k;             // pipeline k misses the next edge
      @(posedge clk); #1;
      // output latches: pipeline k holds, the others take the sum of the
      // operands latched at the previous edge, i.e. of the last pair va/vb
      mask = 32'h3 << (2 * k);
      exp  = ((va[N-1] + vb[N-1]) & ~mask) | (old_sum & mask);
      checks++;
      if (sum !== exp) begin failures++; $display("FAIL gated pipeline %0d: got %h exp %h", k, sum, exp); end
      @(negedge clk);
      gate = '0;
      // two full edges bring every pipeline back to the same operands
      @(posedge clk); @(posedge clk); #1;
      checks++;
      if (sum !== na + nb) begin failures++; $display("FAIL after gating %0d", k); end
      va[N-1] = na; vb[N-1] = nb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
