// tb_hca_cm_tree: five-stage carry-merge tree test.
// For random and corner operands the bitwise p = a|b and g = a&b are
// applied. For each odd bit i the complemented group generate must equal
// the carry out of the (i+1)-bit sum a[i:0] + b[i:0], computed here by
// plain integer addition, and the complemented group propagate must be the
// AND of p[i:0]. Even bits must come out as the complemented bit signals.
`timescale 1ps/1ps
module tb_hca_cm_tree;
  logic [31:0] a, b, p, g, g5_n, p5_n;
  int checks = 0, failures = 0;

  assign p = a | b;
  assign g = a & b;

  hca_cm_tree dut (.p, .g, .g5_n, .p5_n);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    logic [32:0] s;
    logic [31:0] mask;
    logic exp_g, exp_p;
    a = ta; b = tb_;
    #10;
    for (int i = 0; i < 32; i++) begin
      if (i % 2 == 1) begin
        mask  = (i == 31) ? 32'hFFFF_FFFF : ((32'h1 << (i + 1)) - 1);
        s     = {1'b0, ta & mask} + {1'b0, tb_ & mask};
        exp_g = s[i+1];
        exp_p = &(p | ~mask);
      end else begin
        exp_g = ta[i] & tb_[i];
        exp_p = ta[i] | tb_[i];
      end
      checks += 2;
      if (g5_n[i] !== ~exp_g) begin failures++; $display("FAIL G bit %0d a=%h b=%h", i, ta, tb_); end
      if (p5_n[i] !== ~exp_p) begin failures++; $display("FAIL P bit %0d a=%h b=%h", i, ta, tb_); end
    end
  endtask

  initial begin
    check(32'hFFFF_FFFF, 32'h0000_0001);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'h7FFF_FFFF, 32'h0000_0001);
    check(32'h5555_5555, 32'hAAAA_AAAA);
    check(32'h0000_0000, 32'h0000_0000);
    for (int k = 0; k < 31; k++) check(32'hFFFF_FFFF >> k, 32'h1);
    for (int i = 0; i < 300; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
