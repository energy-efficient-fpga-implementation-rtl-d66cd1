// tb_fp64_add: self-checking testbench for fp64_add. Random normal operands
// with close and distant exponents, both operations, and directed cases
// (exact cancellation, carries, ties) are computed by the unit and by the
// simulator's double-precision arithmetic (round to nearest-even); the
// results must agree bit for bit. A watchdog ends a hung run as a failure.
`timescale 1ns/1ps
module tb_fp64_add;
  import binom_pkg::*;

  fp64_t a, b, y;
  logic  sub;
  int checks = 0, failures = 0;

  fp64_add dut (.a(a), .b(b), .sub(sub), .y(y));

  function automatic fp64_t rand_fp(int centre, int span);
    fp64_t v;
    v[63]    = $urandom_range(0, 1);
    v[62:52] = 11'(centre - span + $urandom_range(0, 2 * span));
    v[51:32] = 20'($urandom);
    v[31:0]  = $urandom;
    return v;
  endfunction

  task automatic check(fp64_t x, fp64_t z, logic s);
    fp64_t expect_v;
    a = x; b = z; sub = s;
    #1;
    expect_v = s ? $realtobits($bitstoreal(x) - $bitstoreal(z))
                 : $realtobits($bitstoreal(x) + $bitstoreal(z));
    checks++;
    if (y !== expect_v) begin
      failures++;
      if (failures < 10) $display("ADD MISMATCH %h %s %h = %h expected %h", x, s ? "-" : "+", z, y, expect_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp64_t x;
    check(FP64_ONE, FP64_ONE, 1'b0);
    check(FP64_ONE, FP64_ONE, 1'b1);
    check($realtobits(0.1), $realtobits(0.2), 1'b0);
    check($realtobits(1.0), $realtobits(1.0e-20), 1'b1);
    check($realtobits(123.5), FP64_ZERO, 1'b0);
    check(FP64_ZERO, $realtobits(7.25), 1'b1);
    check($realtobits(1.0), $realtobits(1.1102230246251565e-16), 1'b0);
    check($realtobits(1.0000000000000002), $realtobits(1.1102230246251565e-16), 1'b0);
    for (int i = 0; i < 3000; i++) check(rand_fp(1023, 3), rand_fp(1023, 3), 1'($urandom_range(0, 1)));
    for (int i = 0; i < 3000; i++) check(rand_fp(1023, 70), rand_fp(1023, 70), 1'($urandom_range(0, 1)));
    for (int i = 0; i < 1000; i++) begin
      x = rand_fp(1023, 30);
      check(x, {x[63:1], ~x[0]}, 1'b1);
      check(x, {~x[63], x[62:0]}, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
