// tb_fp64_mul: self-checking testbench for fp64_mul. Random normal operands
// (exponents kept well inside the normal range) and a few directed cases
// are multiplied by the unit and by the simulator's own double-precision
// arithmetic, which rounds to nearest-even; the two results must agree bit
// for bit. A watchdog ends the run with a failure if it hangs.
`timescale 1ns/1ps
module tb_fp64_mul;
  import binom_pkg::*;

  fp64_t a, b, y;
  int checks = 0, failures = 0;

  fp64_mul dut (.a(a), .b(b), .y(y));

  function automatic fp64_t rand_fp(int span);
    fp64_t v;
    v[63]    = $urandom_range(0, 1);
    v[62:52] = 11'(1023 - span + $urandom_range(0, 2 * span));
    v[51:32] = 20'($urandom);
    v[31:0]  = $urandom;
    return v;
  endfunction

  task automatic check(fp64_t x, fp64_t z);
    fp64_t expect_v;
    a = x; b = z;
    #1;
    expect_v = $realtobits($bitstoreal(x) * $bitstoreal(z));
    checks++;
    if (y !== expect_v) begin
      failures++;
      if (failures < 10) $display("MUL MISMATCH %h * %h = %h expected %h", x, z, y, expect_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(FP64_ONE, FP64_ONE);
    check($realtobits(1.5), $realtobits(-2.25));
    check($realtobits(0.1), $realtobits(0.3));
    check(FP64_ZERO, $realtobits(3.7));
    check($realtobits(1.0000000000000002), $realtobits(1.9999999999999998));
    for (int i = 0; i < 5000; i++) check(rand_fp(200), rand_fp(200));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
