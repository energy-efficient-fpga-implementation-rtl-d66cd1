// tb_pow_unit: self-checking testbench for pow_unit (EXP_W = 10, exponents
// up to 1023 as for a 1024-leaf tree). For random bases near 1 (up and down
// factors) and random exponents, including 0, 1 and 1023, the result must
// match the same square-and-multiply sequence done in the simulator's
// double arithmetic bit for bit, lie within 1e-12 relative of x**n, and
// done must come exactly EXP_W clock edges after the start edge.
`timescale 1ns/1ps
module tb_pow_unit;
  import binom_pkg::*;
  import binom_ref_pkg::*;

  localparam int EXP_W = 10;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [EXP_W-1:0] n;
  fp64_t x, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pow_unit #(.EXP_W(EXP_W)) dut (.clk, .rst_n, .start, .x, .n, .done, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real base, int e);
    int edges;
    real expect_v, exact;
    @(negedge clk);
    x = $realtobits(base); n = EXP_W'(e); start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    edges = 0;
    do begin @(posedge clk); edges++; #1; end while (!done && edges < 100);
    expect_v = leaf_power(base, e, EXP_W);
    exact    = base ** e;
    checks += 3;
    if (y !== $realtobits(expect_v)) begin
      failures++;
      $display("pow %0.17g ** %0d = %0.17g expected %0.17g", base, e, $bitstoreal(y), expect_v);
    end
    if ((($bitstoreal(y) - exact) / exact > 1e-12) || ((exact - $bitstoreal(y)) / exact > 1e-12)) begin
      failures++;
      $display("pow %0.17g ** %0d too far from %0.17g", base, e, exact);
    end
    if (edges != EXP_W) begin
      failures++;
      $display("latency %0d edges, expected %0d", edges, EXP_W);
    end
  endtask

  initial begin
    x = '0; n = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1.01, 0);
    run(1.01, 1);
    run(1.0093, 1023);
    run(0.99, 1023);
    run(2.0, 10);
    for (int i = 0; i < 300; i++)
      run(0.95 + real'($urandom_range(0, 100000)) / 1.0e6, $urandom_range(0, 1023));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
