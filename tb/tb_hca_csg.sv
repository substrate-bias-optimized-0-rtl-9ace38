// tb_hca_csg: carry-sum generator test.
// The stage-5 inputs it expects (complemented G[i:0], P[i:0] for odd bits,
// complemented bit g, p for even bits) are built here from integer
// additions of random operands, independently of the tree RTL. sum must
// equal a + b modulo 2^32 and sum_n its complement.
`timescale 1ps/1ps
module tb_hca_csg;
  logic [31:0] a, b, g5_n, p5_n, psum, sum, sum_n;
  int checks = 0, failures = 0;

  hca_csg dut (.g5_n, .p5_n, .psum, .sum, .sum_n);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    logic [32:0] s;
    logic [31:0] mask, exp_sum;
    a = ta; b = tb_;
    for (int i = 0; i < 32; i++) begin
      if (i % 2 == 1) begin
        mask    = (i == 31) ? 32'hFFFF_FFFF : ((32'h1 << (i + 1)) - 1);
        s       = {1'b0, ta & mask} + {1'b0, tb_ & mask};
        g5_n[i] = ~s[i+1];
        p5_n[i] = ~(&((ta | tb_) | ~mask));
      end else begin
        g5_n[i] = ~(ta[i] & tb_[i]);
        p5_n[i] = ~(ta[i] | tb_[i]);
      end
    end
    psum = ta ^ tb_;
    #10;
    exp_sum = ta + tb_;
    checks += 2;
    if (sum   !== exp_sum)  begin failures++; $display("FAIL sum a=%h b=%h got %h", ta, tb_, sum); end
    if (sum_n !== ~exp_sum) begin failures++; $display("FAIL sum_n a=%h b=%h", ta, tb_); end
  endtask

  initial begin
    check(32'hFFFF_FFFF, 32'h0000_0001);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'h0000_0001, 32'h0000_0001);
    check(32'h5555_5555, 32'hAAAA_AAAB);
    for (int k = 0; k < 32; k++) check(32'h1 << k, 32'h1 << k);
    for (int i = 0; i < 500; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
