// tb_volatility_curve: the use case the design is sized for, run on the
// accelerator at its default size (1024 leaves). One launch prices a curve
// of NOPT options on the same underlying that differ only in volatility
// (10% to 55%), as needed to fit an implied-volatility curve; the curve has
// no dividend yield, so every American call must also agree with the
// Black-Scholes price of the European call to within 0.01 (an independent
// check of the model), besides matching the bit-exact reference. Prices
// must rise with volatility. The measured cycles per option give the
// throughput at 162.62 MHz, which must reach 2000 options per second.
`timescale 1ns/1ps
module tb_volatility_curve;
  import binom_pkg::*;
  import binom_ref_pkg::*;

  localparam int N = 1024, LANES = 8, NOPT = 10, RES = 100;
  localparam real S0 = 100.0, STRIKE = 105.0, RATE = 0.04, MAT = 0.5;

  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, wr_valid, wr_ready;
  logic [31:0] rd_req_addr, wr_addr;
  fp64_t rd_resp_data, wr_data;
  logic [LANES-1:0] exercise;
  int checks = 0, failures = 0;
  longint cyc = 0, t_start, t_done;
  option_t opts [NOPT];
  real sig [NOPT];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  binomial_accel_top dut (
    .clk, .rst_n, .start, .num_options(NOPT), .opt_base(32'd0), .res_base(RES),
    .done, .busy,
    .gm_rd_req_valid(rd_req_valid), .gm_rd_req_ready(rd_req_ready),
    .gm_rd_req_addr(rd_req_addr), .gm_rd_resp_valid(rd_resp_valid),
    .gm_rd_resp_data(rd_resp_data), .gm_wr_valid(wr_valid), .gm_wr_ready(wr_ready),
    .gm_wr_addr(wr_addr), .gm_wr_data(wr_data), .exercise);

  gmem_model #(.DEPTH(128)) u_mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  // standard normal CDF through erf (Abramowitz-Stegun 7.1.26, error < 1.5e-7)
  function automatic real ncdf(real x);
    real z, t, y;
    z = (x < 0.0 ? -x : x) / $sqrt(2.0);
    t = 1.0 / (1.0 + 0.3275911 * z);
    y = 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t - 0.284496736) * t
               + 0.254829592) * t * $exp(-z * z);
    return (x < 0.0) ? 0.5 * (1.0 - y) : 0.5 * (1.0 + y);
  endfunction

  function automatic real black_scholes_call(real s, real k, real sigma, real rate, real mat);
    real d1, d2;
    d1 = ($ln(s / k) + (rate + 0.5 * sigma * sigma) * mat) / (sigma * $sqrt(mat));
    d2 = d1 - sigma * $sqrt(mat);
    return s * ncdf(d1) - k * $exp(-rate * mat) * ncdf(d2);
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_v, got, bs, prev, per_opt;
    int nex;
    for (int i = 0; i < NOPT; i++) begin
      sig[i]  = 0.10 + 0.05 * real'(i);
      opts[i] = make_option(S0, STRIKE, sig[i], RATE, 0.0, MAT, N);
      u_mem.poke(7*i + 0, opts[i].s0);
      u_mem.poke(7*i + 1, opts[i].k);
      u_mem.poke(7*i + 2, opts[i].u);
      u_mem.poke(7*i + 3, opts[i].d);
      u_mem.poke(7*i + 4, opts[i].r);
      u_mem.poke(7*i + 5, opts[i].p);
      u_mem.poke(7*i + 6, opts[i].q);
      u_mem.poke(RES + i, '0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    t_start = cyc;
    @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    t_done = cyc;
    @(negedge clk);
    prev = 0.0;
    for (int i = 0; i < NOPT; i++) begin
      ref_v = price(opts[i], N, nex);
      got   = $bitstoreal(u_mem.peek(RES + i));
      bs    = black_scholes_call(S0, STRIKE, sig[i], RATE, MAT);
      $display("sigma %0.2f: price %0.6f  reference %0.6f  Black-Scholes %0.6f", sig[i], got, ref_v, bs);
      checks += 3;
      if (u_mem.peek(RES + i) !== $realtobits(ref_v)) begin failures++; $display("  not bit-exact"); end
      if (got - bs > 0.01 || bs - got > 0.01) begin failures++; $display("  too far from Black-Scholes"); end
      if (!(got > prev)) begin failures++; $display("  price does not rise with volatility"); end
      prev = got;
    end
    per_opt = real'(t_done - t_start) / real'(NOPT);
    $display("%0d cycles for %0d options: %0.0f options/s at 162.62 MHz",
             t_done - t_start, NOPT, 162.62e6 / per_opt);
    checks++;
    if (162.62e6 / per_opt < 2000.0) begin failures++; $display("below 2000 options/s"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
