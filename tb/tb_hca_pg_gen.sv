// tb_hca_pg_gen: propagate/generate/partial-sum generator test.
// Complemented operands are applied (random and corner values); p, g and
// psum are compared with a|b, a&b and a^b of the true operands.
`timescale 1ps/1ps
module tb_hca_pg_gen;
  logic [31:0] a, b, a_n, b_n, p, g, psum;
  int checks = 0, failures = 0;

  assign a_n = ~a;
  assign b_n = ~b;

  hca_pg_gen dut (.a_n, .b_n, .p, .g, .psum);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    a = ta; b = tb_;
    #10;
    checks += 3;
    if (p    !== (ta | tb_)) begin failures++; $display("FAIL p a=%h b=%h", ta, tb_); end
    if (g    !== (ta & tb_)) begin failures++; $display("FAIL g a=%h b=%h", ta, tb_); end
    if (psum !== (ta ^ tb_)) begin failures++; $display("FAIL psum a=%h b=%h", ta, tb_); end
  endtask

  initial begin
    check(32'h0, 32'h0);
    check(32'hFFFF_FFFF, 32'h0);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'hAAAA_AAAA, 32'h5555_5555);
    for (int i = 0; i < 500; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
