// tb_leaf_unit: self-checking testbench for leaf_unit on a 1024-leaf tree.
// Random options and leaf indices (including the lowest, the highest and
// the two middle leaves) must give the asset price S0*u**(2k-1023) and the
// payoff max(S-K, 0) bit for bit as the reference model computes them, with
// done exactly EXP_W+3 clock edges after the start edge. Both in- and
// out-of-the-money leaves are required to occur.
`timescale 1ns/1ps
module tb_leaf_unit;
  import binom_pkg::*;
  import binom_ref_pkg::*;

  localparam int N = 1024, EXP_W = 10, KW = 11;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [KW-1:0] k;
  option_t o;
  fp64_t s_leaf, v_leaf;
  int checks = 0, failures = 0, itm = 0, otm = 0;

  always #5 clk = ~clk;

  leaf_unit #(.N_LEAVES(N)) dut (
    .clk, .rst_n, .start, .k, .s0(o.s0), .strike(o.k), .u(o.u), .d(o.d),
    .done, .s_leaf, .v_leaf);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(option_t opt, int kk);
    int edges, e;
    real s_ref, v_ref;
    @(negedge clk);
    o = opt; k = KW'(kk); start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    edges = 0;
    do begin @(posedge clk); edges++; #1; end while (!done && edges < 100);
    e = 2 * kk - (N - 1);
    s_ref = rd(opt.s0) * ((e < 0) ? leaf_power(rd(opt.d), -e, EXP_W) : leaf_power(rd(opt.u), e, EXP_W));
    v_ref = (0.0 < s_ref - rd(opt.k)) ? s_ref - rd(opt.k) : 0.0;
    if (v_ref > 0.0) itm++; else otm++;
    checks += 3;
    if (s_leaf !== $realtobits(s_ref)) begin
      failures++; $display("leaf %0d S %0.17g expected %0.17g", kk, $bitstoreal(s_leaf), s_ref);
    end
    if (v_leaf !== $realtobits(v_ref)) begin
      failures++; $display("leaf %0d V %0.17g expected %0.17g", kk, $bitstoreal(v_leaf), v_ref);
    end
    if (edges != EXP_W + 3) begin
      failures++; $display("latency %0d edges", edges);
    end
  endtask

  initial begin
    k = '0; o = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(make_option(100.0, 100.0, 0.2, 0.05, 0.0, 1.0, N), 0);
    run(make_option(100.0, 100.0, 0.2, 0.05, 0.0, 1.0, N), 1023);
    run(make_option(100.0, 100.0, 0.2, 0.05, 0.0, 1.0, N), 511);
    run(make_option(100.0, 100.0, 0.2, 0.05, 0.0, 1.0, N), 512);
    for (int i = 0; i < 200; i++) run(random_option(N), $urandom_range(0, N - 1));
    checks++;
    if (itm == 0 || otm == 0) begin failures++; $display("payoff cases not all seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
