// tb_hca_chip: end-to-end test of the adder test chip, all parameters at
// their defaults.
//
// A ~2.56 GHz clock stands in for the PLL. The testbench keeps its own
// model of the operand registers (LFSR contents L and Register-B contents
// B, one step per f/4 edge) and checks the chip against it:
//   phase 1  32 ones are shifted into the LFSR (shifting mode, Register-B
//            grounded), then 64 accumulations in testing mode. Every 16
//            accumulations Register-O must show the running sum; the first
//            must be the add-16-times value 16 * 0xFFFFFFFF mod 2^32.
//   phase 2  all four de-skew buffers are retuned from setting 3 to 5; the
//            adder clock delay behind the PLL clock must grow by 14 ps and
//            accumulation must stay correct.
//   phase 3  a random seed is shifted in and 64 accumulations of the
//            pseudo-random LFSR stream are checked.
//   phase 4  the four buffers get different random settings (operand and
//            adder branches always differ) and 64 more accumulations are
//            checked: the accumulator loop must hold over the tuning range.
// After every f/4 edge the LFSR and Register-B are compared with the model;
// the adder output is checked to hold the previous sum one adder cycle
// after the operands change and the new sum after two (its latency).
// Each mechanism is counted (shift steps, accumulation steps, Register-O
// updates, accumulator wrap-around, latency checks, retuning, skewed
// settings) and one
// that never happened counts as a failure.
`timescale 1ps/1ps
module tb_hca_chip;
  import hca_pkg::*;

  logic       clk_pll = 1'b0;
  logic       rst_n;
  test_mode_e mode;
  logic       serial_in;
  logic [2:0] sel_operand, sel_adder, sel_capture, sel_output;
  logic [31:0] reg_o;

  int checks = 0, failures = 0;
  int n_shift = 0, n_accum = 0, n_rego = 0, n_wrap = 0, n_latency = 0, n_retune = 0;
  int n_add16 = 0, n_skewed = 0;

  always #195 clk_pll = ~clk_pll;   // 2.564 GHz

  hca_chip dut (
    .clk_pll, .rst_n, .mode, .serial_in,
    .sel_operand, .sel_adder, .sel_capture, .sel_output,
    .reg_o
  );

  initial begin
    repeat (20000) @(posedge clk_pll);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----
  logic [31:0] m_l, m_b;            // model LFSR and Register-B
  logic        m_valid_l;           // model LFSR fully known
  int          m_shifted;

  function automatic logic [31:0] lfsr_step(input logic [31:0] v);
    return {v[30:0], ~(v[31] ^ v[21] ^ v[1] ^ v[0])};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One f/4 step: inputs for the next operand edge are set, the edge is
  // awaited, the model advanced and the chip compared with it.
  // Register-O clock edges, counted as they happen.
  int n_out_edges = 0;
  always @(posedge dut.clk_output) n_out_edges++;

  // With equal buffer settings the step checks right after the f/4 edge
  // and also checks the adder latency. With unequal settings (skewed) it
  // waits 60 ps, longer than the largest skew, and skips the latency check,
  // which assumes the adder and operand branches switch together.
  bit skewed = 1'b0;

  task automatic step(input test_mode_e md, input logic sin);
    logic [31:0] prev_sum, new_sum;
    logic [32:0] wide;
    logic        rego_edge;
    bit          known_before;
    known_before = (m_shifted >= 32);
    mode      = md;
    serial_in = sin;
    prev_sum  = m_l + m_b;
    rego_edge = 1'b0;
    begin
      int edges_before;
      edges_before = n_out_edges;
      @(posedge dut.clk_operand);
      if (skewed) #60; else #1;
      rego_edge = (n_out_edges != edges_before);
    end
    // model update
    if (md == MODE_SHIFT) begin
      m_b = '0;
      m_l = {m_l[30:0], sin};
      m_shifted++;
      n_shift++;
    end else begin
      wide = {1'b0, m_l} + {1'b0, m_b};
      if (wide[32]) n_wrap++;
      m_b = wide[31:0];
      m_l = lfsr_step(m_l);
      n_accum++;
    end
    if (m_shifted >= 32) begin
      check(dut.lfsr_q === m_l, "LFSR contents");
      check(dut.reg_b_q === m_b, "Register-B contents");
    end
    if (rego_edge && known_before) begin
      // Register-O took Register-C, which held the sum of the operands
      // launched at the previous f/4 edge.
      check(reg_o === prev_sum, "Register-O");
      n_rego++;
    end
    // adder latency: old sum after one adder edge, new sum after two
    new_sum = m_l + m_b;
    if (known_before && !skewed) begin
      @(posedge dut.clk_adder); #1;
      check(dut.sum === prev_sum, "adder output one cycle after operand change");
      @(posedge dut.clk_adder); #1;
      check(dut.sum === new_sum, "adder output two cycles after operand change");
      n_latency++;
    end
  endtask

  task automatic set_sel(input logic [2:0] s);
    sel_operand = s; sel_adder = s; sel_capture = s; sel_output = s;
  endtask

  // Delay of the adder clock branch behind the PLL clock, measured on
  // every adder clock edge (the delay is below one clock period).
  longint t_pll_rise = 0, adder_delay = 0;
  always @(posedge clk_pll) t_pll_rise = $time;
  always @(posedge dut.clk_adder) adder_delay = $time - t_pll_rise;

  initial begin
    logic [31:0] seed;
    longint d_before, d_after;
    m_l = '0; m_b = '0; m_shifted = 0;
    set_sel(3'd3);
    mode = MODE_SHIFT; serial_in = 1'b1;
    rst_n = 1'b0;
    repeat (4) @(posedge clk_pll);
    @(negedge clk_pll) rst_n = 1'b1;
    // align to an f/64 (Register-O) edge, which is also an f/4 edge
    @(posedge dut.clk_output); #50;

    // ---- phase 1: 32 ones, then 64 accumulations ----
    for (int i = 0; i < 32; i++) step(MODE_SHIFT, 1'b1);
    check(m_l == 32'hFFFF_FFFF, "LFSR filled with ones");
    for (int i = 0; i < 64; i++) begin
      step(MODE_TEST, 1'b0);
      if (i == 15) begin
        check(reg_o === 32'hFFFF_FFF0, "add-16-times result on Register-O");
        if (reg_o === 32'hFFFF_FFF0) n_add16++;
      end
    end

    // ---- phase 2: retune all de-skew buffers ----
    // (between steps no clock edge is in flight in the buffers)
    d_before = adder_delay;
    set_sel(3'd5);
    for (int i = 0; i < 16; i++) step(MODE_TEST, 1'b0);
    d_after = adder_delay;
    check(d_before == 100 + 7 * 3, "adder clock delay at setting 3");
    check(d_after - d_before == 14, "adder clock delay change 3 -> 5");
    if (d_after - d_before == 14) n_retune++;

    // ---- phase 3: random seed, pseudo-random accumulation ----
    seed = $urandom | 32'h0100_0000;
    m_shifted = 0;
    for (int i = 31; i >= 0; i--) step(MODE_SHIFT, seed[i]);
    check(m_l == seed, "model seed");
    for (int i = 0; i < 64; i++) step(MODE_TEST, 1'b0);

    // ---- phase 4: unequal buffer settings, pseudo-random accumulation ----
    sel_operand = 3'($urandom); sel_adder = 3'($urandom);
    sel_capture = 3'($urandom); sel_output = 3'($urandom);
    if (sel_operand == sel_adder) sel_adder = sel_operand ^ 3'd4;
    skewed = 1'b1;
    for (int i = 0; i < 64; i++) step(MODE_TEST, 1'b0);
    n_skewed = (sel_operand != sel_adder) ? 64 : 0;

    // ---- every mechanism must have happened ----
    check(n_shift   > 0, "shifting mode used");
    check(n_accum   > 0, "accumulation used");
    check(n_rego    > 0, "Register-O updated");
    check(n_wrap    > 0, "accumulator wrapped");
    check(n_latency > 0, "latency checked");
    check(n_retune  > 0, "de-skew retuned");
    check(n_add16   > 0, "add-16-times result seen");
    check(n_skewed  > 0, "accumulation with unequal buffer settings");
    $display("mechanisms: shift=%0d accumulate=%0d register_o=%0d wrap=%0d latency=%0d retune=%0d add16=%0d skewed=%0d",
             n_shift, n_accum, n_rego, n_wrap, n_latency, n_retune, n_add16, n_skewed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
