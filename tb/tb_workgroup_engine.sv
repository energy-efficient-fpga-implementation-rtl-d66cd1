// tb_workgroup_engine: self-checking testbench for workgroup_engine. Two
// engines of different shapes (13 leaves on 4 lanes, so the last RAM word is
// partly padding, and 8 leaves on 8 lanes, a single word) price random
// options built from market data, some with a dividend yield so that early
// exercise happens. Each price must equal, bit for bit, the reference model
// in binom_ref_pkg, and the cycles from accept to result must equal the
// engine's documented timing. The result handshake is tested with a
// delayed res_ready. A watchdog ends a hung run as a failure.
`timescale 1ns/1ps
module tb_workgroup_engine;
  import binom_pkg::*;
  import binom_ref_pkg::*;

  localparam int NA = 13, VA = 2, UA = 2;
  localparam int NB = 8,  VB = 4, UB = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, exercised = 0;

  logic    a_ov, a_or, a_rv, a_rr, a_busy;
  option_t a_opt;
  fp64_t   a_res;
  logic    b_ov, b_or, b_rv, b_rr, b_busy;
  option_t b_opt;
  fp64_t   b_res;

  workgroup_engine #(.N_LEAVES(NA), .VEC(VA), .UNROLL(UA)) dut_a (
    .clk, .rst_n, .opt_valid(a_ov), .opt_ready(a_or), .opt(a_opt),
    .res_valid(a_rv), .res_ready(a_rr), .res_price(a_res), .busy(a_busy));
  workgroup_engine #(.N_LEAVES(NB), .VEC(VB), .UNROLL(UB)) dut_b (
    .clk, .rst_n, .opt_valid(b_ov), .opt_ready(b_or), .opt(b_opt),
    .res_valid(b_rv), .res_ready(b_rr), .res_price(b_res), .busy(b_busy));

  task automatic compare(string tag, option_t o, int n, fp64_t got, longint cyc, longint exp_cyc);
    real ref_v;
    int nex;
    ref_v = price(o, n, nex);
    exercised += nex;
    checks++;
    if (got !== $realtobits(ref_v)) begin
      failures++;
      $display("%s price mismatch: got %0.17g expected %0.17g", tag, $bitstoreal(got), ref_v);
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("%s cycle count %0d expected %0d", tag, cyc, exp_cyc);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_ov = 0; a_rr = 0; a_opt = '0;
    b_ov = 0; b_rr = 0; b_opt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin : run_a
        longint c0;
        for (int i = 0; i < 40; i++) begin
          option_t o;
          o = (i == 0) ? make_option(100.0, 100.0, 0.2, 0.05, 0.0, 1.0, NA)
            : (i == 1) ? make_option(150.0, 60.0, 0.2, 0.02, 0.10, 2.0, NA)
            : random_option(NA);
          @(negedge clk);
          a_opt = o; a_ov = 1;
          @(posedge clk);
          while (!a_or) @(posedge clk);
          c0 = $time / 10;
          @(negedge clk); a_ov = 0;
          while (!a_rv) @(posedge clk);
          compare("A", o, NA, a_res, $time / 10 - c0, engine_cycles(NA, VA * UA));
          repeat ($urandom_range(0, 3)) @(negedge clk);
          checks++;
          if (!a_rv) begin failures++; $display("A result dropped before ready"); end
          @(negedge clk); a_rr = 1;
          @(negedge clk); a_rr = 0;
        end
      end
      begin : run_b
        longint c0;
        for (int i = 0; i < 40; i++) begin
          option_t o;
          o = random_option(NB);
          @(negedge clk);
          b_opt = o; b_ov = 1;
          @(posedge clk);
          while (!b_or) @(posedge clk);
          c0 = $time / 10;
          @(negedge clk); b_ov = 0;
          while (!b_rv) @(posedge clk);
          compare("B", o, NB, b_res, $time / 10 - c0, engine_cycles(NB, VB * UB));
          @(negedge clk); b_rr = 1;
          @(negedge clk); b_rr = 0;
        end
      end
    join
    checks++;
    if (exercised == 0) begin
      failures++;
      $display("no early exercise was ever taken");
    end
    $display("early-exercise nodes: %0d", exercised);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
