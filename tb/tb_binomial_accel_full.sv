// tb_binomial_accel_full: the accelerator at its default size (1024 leaves,
// 1023 time steps, eight node units) prices three options end to end from
// a global-memory model: an at-the-money option, a deep in-the-money option
// with a dividend yield (so early exercise happens) and a random one. Each
// price must equal the reference model bit for bit and each option must
// take exactly the engine's documented cycle count; the resulting
// throughput at the 162.62 MHz clock reported for the hardware is printed.
`timescale 1ns/1ps
module tb_binomial_accel_full;
  import binom_pkg::*;
  import binom_ref_pkg::*;

  localparam int N = 1024, LANES = 8, NOPT = 3;

  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, wr_valid, wr_ready;
  logic [31:0] rd_req_addr, wr_addr;
  fp64_t rd_resp_data, wr_data;
  logic [LANES-1:0] exercise;
  int checks = 0, failures = 0, n_ex = 0;
  longint cyc = 0, t_acc;
  option_t opts [NOPT];

  always #5 clk = ~clk;

  binomial_accel_top dut (
    .clk, .rst_n, .start, .num_options(NOPT), .opt_base(32'd0), .res_base(32'd40),
    .done, .busy,
    .gm_rd_req_valid(rd_req_valid), .gm_rd_req_ready(rd_req_ready),
    .gm_rd_req_addr(rd_req_addr), .gm_rd_resp_valid(rd_resp_valid),
    .gm_rd_resp_data(rd_resp_data), .gm_wr_valid(wr_valid), .gm_wr_ready(wr_ready),
    .gm_wr_addr(wr_addr), .gm_wr_data(wr_data), .exercise);

  gmem_model #(.DEPTH(64)) u_mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  logic rv_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    rv_d <= dut.res_valid;
    if (rst_n) begin
      if (exercise != 0) n_ex++;
      if (dut.opt_valid && dut.opt_ready) t_acc = cyc;
      if (dut.res_valid && !rv_d) begin
        checks++;
        $display("option priced in %0d cycles (%0.0f options/s at 162.62 MHz)",
                 cyc - t_acc, 162.62e6 / real'(cyc - t_acc));
        if (cyc - t_acc != engine_cycles(N, LANES)) begin
          failures++; $display("expected %0d cycles", engine_cycles(N, LANES));
        end
      end
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_v;
    int nex;
    opts[0] = make_option(100.0, 100.0, 0.2, 0.05, 0.0, 1.0, N);
    opts[1] = make_option(150.0, 80.0, 0.3, 0.02, 0.08, 2.0, N);
    opts[2] = random_option(N);
    for (int i = 0; i < NOPT; i++) begin
      u_mem.poke(7*i + 0, opts[i].s0);
      u_mem.poke(7*i + 1, opts[i].k);
      u_mem.poke(7*i + 2, opts[i].u);
      u_mem.poke(7*i + 3, opts[i].d);
      u_mem.poke(7*i + 4, opts[i].r);
      u_mem.poke(7*i + 5, opts[i].p);
      u_mem.poke(7*i + 6, opts[i].q);
      u_mem.poke(40 + i, '0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < NOPT; i++) begin
      ref_v = price(opts[i], N, nex);
      checks++;
      $display("option %0d: price %0.15g (reference %0.15g)", i, $bitstoreal(u_mem.peek(40 + i)), ref_v);
      if (u_mem.peek(40 + i) !== $realtobits(ref_v)) failures++;
    end
    checks++;
    if (n_ex == 0) begin failures++; $display("no early exercise"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
