// tb_node_unit: self-checking testbench for node_unit. Random node inputs
// (asset prices, option values, strikes, rp/rq) enter on random cycles,
// back to back or with gaps. Every result must come out exactly two cycles
// after its input with S = d*S_old and V = max(S-K, rp*V_up + rq*V_dn)
// equal bit for bit to the simulator's double arithmetic, and the exercise
// flag must say which term won. Both outcomes are required to occur.
`timescale 1ns/1ps
module tb_node_unit;
  import binom_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, exercise;
  fp64_t s_old, v_up, v_dn, d, strike, rp, rq, s_new, v_new;
  int checks = 0, failures = 0, n_ex = 0, n_cont = 0;

  typedef struct { real s, v; logic ex; } exp_t;
  exp_t q[$];
  logic [1:0] vpipe;

  always #5 clk = ~clk;

  node_unit dut (.clk, .rst_n, .in_valid, .s_old, .v_up, .v_dn, .d, .strike,
                 .rp, .rq, .out_valid, .s_new, .v_new, .exercise);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: check every result in order, and its timing
  always @(posedge clk) begin
    if (rst_n) begin
      vpipe <= {vpipe[0], in_valid};
      checks++;
      if (out_valid !== vpipe[1]) begin
        failures++; $display("out_valid timing wrong");
      end
      if (out_valid) begin
        exp_t e;
        e = q.pop_front();
        checks++;
        if (s_new !== $realtobits(e.s) || v_new !== $realtobits(e.v) || exercise !== e.ex) begin
          failures++;
          $display("node S %0.17g V %0.17g ex %0d expected %0.17g %0.17g %0d",
                   $bitstoreal(s_new), $bitstoreal(v_new), exercise, e.s, e.v, e.ex);
        end
      end
    end else vpipe <= '0;
  end

  initial begin
    real sr, cont, ex;
    exp_t e;
    {s_old, v_up, v_dn, d, strike, rp, rq} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      s_old  = $realtobits(20.0 + real'($urandom_range(0, 200000)) / 1000.0);
      v_up   = $realtobits(real'($urandom_range(0, 100000)) / 1000.0);
      v_dn   = $realtobits(real'($urandom_range(0, 100000)) / 1000.0);
      d      = $realtobits(0.98 + real'($urandom_range(0, 19000)) / 1.0e6);
      strike = $realtobits(50.0 + real'($urandom_range(0, 100000)) / 1000.0);
      rp     = $realtobits(0.3 + real'($urandom_range(0, 300000)) / 1.0e6);
      rq     = $realtobits(0.3 + real'($urandom_range(0, 300000)) / 1.0e6);
      if (in_valid) begin
        sr   = $bitstoreal(d) * $bitstoreal(s_old);
        cont = $bitstoreal(rp) * $bitstoreal(v_up) + $bitstoreal(rq) * $bitstoreal(v_dn);
        ex   = sr - $bitstoreal(strike);
        e.s  = sr;
        e.ex = (cont < ex);
        e.v  = e.ex ? ex : cont;
        if (e.ex) n_ex++; else n_cont++;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_ex == 0 || n_cont == 0) begin
      failures++; $display("results missing (%0d) or a case never seen", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
