// tb_binomial_accel_top: end-to-end testbench of the accelerator at a
// reduced size (16 leaves, 2-way vectorisation, 2-way unrolling: four node
// units, four RAM words). Option records built from random market data are
// placed in a global-memory model that stalls and delays at random; one
// launch prices them all. Every price written back must equal the
// reference model bit for bit, every option must take exactly the engine's
// documented number of cycles, and done must rise. Each mechanism of the
// design is counted and must occur: leaf initialisation, barriers between
// time steps, steps that skip finished words, early exercise, read and
// write stalls of global memory, and prefetch of the next option while one
// is being priced.
`timescale 1ns/1ps
module tb_binomial_accel_top;
  import binom_pkg::*;
  import binom_ref_pkg::*;

  localparam int N = 16, VEC = 2, UNROLL = 2, NOPT = 12;
  localparam int OPT_BASE = 10, RES_BASE = 200;

  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, wr_valid, wr_ready;
  logic [31:0] rd_req_addr, wr_addr;
  fp64_t rd_resp_data, wr_data;
  logic [VEC*UNROLL-1:0] exercise;
  int checks = 0, failures = 0;
  int n_leaf = 0, n_barrier = 0, n_skip = 0, n_ex = 0, n_prefetch = 0;
  longint cyc = 0, t_acc;
  option_t opts [NOPT];

  always #5 clk = ~clk;

  binomial_accel_top #(.N_LEAVES(N), .VEC(VEC), .UNROLL(UNROLL)) dut (
    .clk, .rst_n, .start, .num_options(NOPT), .opt_base(OPT_BASE), .res_base(RES_BASE),
    .done, .busy,
    .gm_rd_req_valid(rd_req_valid), .gm_rd_req_ready(rd_req_ready),
    .gm_rd_req_addr(rd_req_addr), .gm_rd_resp_valid(rd_resp_valid),
    .gm_rd_resp_data(rd_resp_data), .gm_wr_valid(wr_valid), .gm_wr_ready(wr_ready),
    .gm_wr_addr(wr_addr), .gm_wr_data(wr_data), .exercise);

  gmem_model #(.DEPTH(256)) u_mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  // mechanism counters and per-option timing
  logic issue_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    issue_d <= dut.u_engine.issue;
    if (rst_n) begin
      if (dut.u_engine.leaf_start) n_leaf++;
      if (issue_d && !dut.u_engine.issue) n_barrier++;
      if (!issue_d && dut.u_engine.issue && dut.u_engine.w != 0) n_skip++;
      if (exercise != 0) n_ex++;
      if (busy && rd_req_valid) n_prefetch++;
      if (dut.opt_valid && dut.opt_ready) t_acc = cyc;
      if (dut.res_valid && dut.res_ready) begin
        checks++;
        if (cyc - t_acc + 1 < engine_cycles(N, VEC * UNROLL)) begin
          failures++; $display("option finished too early");
        end
      end
    end
  end

  // exact latency from accept to the first cycle of res_valid
  logic rv_d = 0;
  always @(posedge clk) begin
    rv_d <= dut.res_valid;
    if (rst_n && dut.res_valid && !rv_d) begin
      checks++;
      if (cyc - t_acc != engine_cycles(N, VEC * UNROLL)) begin
        failures++;
        $display("option latency %0d expected %0d", cyc - t_acc, engine_cycles(N, VEC * UNROLL));
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_v;
    int nex, total_ex = 0;
    for (int i = 0; i < NOPT; i++) begin
      opts[i] = (i == 0) ? make_option(140.0, 70.0, 0.25, 0.03, 0.10, 2.0, N) : random_option(N);
      u_mem.poke(OPT_BASE + 7*i + 0, opts[i].s0);
      u_mem.poke(OPT_BASE + 7*i + 1, opts[i].k);
      u_mem.poke(OPT_BASE + 7*i + 2, opts[i].u);
      u_mem.poke(OPT_BASE + 7*i + 3, opts[i].d);
      u_mem.poke(OPT_BASE + 7*i + 4, opts[i].r);
      u_mem.poke(OPT_BASE + 7*i + 5, opts[i].p);
      u_mem.poke(OPT_BASE + 7*i + 6, opts[i].q);
      u_mem.poke(RES_BASE + i, '0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < NOPT; i++) begin
      ref_v = price(opts[i], N, nex);
      total_ex += nex;
      checks++;
      if (u_mem.peek(RES_BASE + i) !== $realtobits(ref_v)) begin
        failures++;
        $display("option %0d price %0.17g expected %0.17g", i, $bitstoreal(u_mem.peek(RES_BASE + i)), ref_v);
      end
    end
    $display("leaf words %0d, barriers %0d, steps skipping words %0d, exercise cycles %0d (reference nodes %0d)",
             n_leaf, n_barrier, n_skip, n_ex, total_ex);
    $display("read stalls %0d, write stalls %0d, prefetch cycles %0d",
             u_mem.rd_stalls, u_mem.wr_stalls, n_prefetch);
    checks += 8;
    if (n_leaf != NOPT * ((N + VEC*UNROLL - 1) / (VEC*UNROLL))) begin failures++; $display("leaf count"); end
    if (n_barrier != NOPT * (N - 1)) begin failures++; $display("barrier count"); end
    if (n_skip == 0)        begin failures++; $display("no step skipped a word"); end
    if (n_ex == 0)          begin failures++; $display("no early exercise"); end
    if (u_mem.rd_stalls == 0) begin failures++; $display("no read stall"); end
    if (u_mem.wr_stalls == 0) begin failures++; $display("no write stall"); end
    if (n_prefetch == 0)    begin failures++; $display("no prefetch"); end
    if (u_mem.writes != NOPT || u_mem.bad_addr != 0) begin failures++; $display("writes %0d", u_mem.writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
