// tb_wg_dispatcher: self-checking testbench for wg_dispatcher. The global
// memory is gmem_model with random stalls and latencies; the work-group
// engine is replaced by a small model that accepts an option, waits a
// random time and returns a value made from the record's words. Every
// option handed to the engine must equal the record at its address, every
// result must land at res_base + g, done must rise after the last write
// and only then, and the next record must be fetched while the engine is
// still busy (prefetch). Two launches with different sizes and bases run.
`timescale 1ns/1ps
module tb_wg_dispatcher;
  import binom_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [31:0] num_options, opt_base, res_base;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, wr_valid, wr_ready;
  logic [31:0] rd_req_addr, wr_addr;
  fp64_t rd_resp_data, wr_data;
  logic opt_valid, opt_ready, res_valid, res_ready;
  option_t opt;
  fp64_t res_price;
  int checks = 0, failures = 0, prefetches = 0;

  always #5 clk = ~clk;

  wg_dispatcher dut (
    .clk, .rst_n, .start, .num_options, .opt_base, .res_base, .done,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data,
    .opt_valid, .opt_ready, .opt, .res_valid, .res_ready, .res_price);

  gmem_model #(.DEPTH(512)) u_mem (
    .clk, .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  function automatic fp64_t digest(option_t o);
    return o.s0 ^ {o.k[31:0], o.k[63:32]} ^ (o.u + o.d) ^ o.r ^ ~o.p ^ (o.q << 1);
  endfunction

  // engine model
  typedef enum {E_IDLE, E_BUSY, E_DONE} est_t;
  est_t est = E_IDLE;
  int wait_c, g_in = 0;
  assign opt_ready = (est == E_IDLE);
  assign res_valid = (est == E_DONE);
  always @(posedge clk) begin
    if (est == E_BUSY && rd_req_valid) prefetches++;
    if (!rst_n) est <= E_IDLE;
    else case (est)
      E_IDLE: if (opt_valid) begin
        option_t m;
        m = '{s0: u_mem.peek(opt_base + 7*g_in), k: u_mem.peek(opt_base + 7*g_in + 1),
              u: u_mem.peek(opt_base + 7*g_in + 2), d: u_mem.peek(opt_base + 7*g_in + 3),
              r: u_mem.peek(opt_base + 7*g_in + 4), p: u_mem.peek(opt_base + 7*g_in + 5),
              q: u_mem.peek(opt_base + 7*g_in + 6)};
        checks++;
        if (opt !== m) begin failures++; $display("option %0d record wrong %h %h", g_in, opt, m); end
        res_price <= digest(opt);
        g_in++;
        wait_c <= $urandom_range(5, 40);
        est <= E_BUSY;
      end
      E_BUSY: if (wait_c == 0) est <= E_DONE; else wait_c <= wait_c - 1;
      E_DONE: if (res_ready) est <= E_IDLE;
    endcase
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic launch(int n, int ob, int rb);
    option_t o;
    for (int i = 0; i < 7 * n; i++) u_mem.poke(ob + i, {$urandom, $urandom});
    for (int i = 0; i < n; i++) u_mem.poke(rb + i, '0);
    g_in = 0;
    @(negedge clk);
    num_options = n; opt_base = ob; res_base = rb; start = 1;
    @(negedge clk) start = 0;
    checks++;
    if (done) begin failures++; $display("done high right after start"); end
    while (!done) @(posedge clk);
    @(negedge clk);
    checks++;
    if (g_in != n || u_mem.writes == 0) begin failures++; $display("%0d options run", g_in); end
    for (int i = 0; i < n; i++) begin
      o = '{s0: u_mem.peek(ob + 7*i), k: u_mem.peek(ob + 7*i + 1), u: u_mem.peek(ob + 7*i + 2),
            d: u_mem.peek(ob + 7*i + 3), r: u_mem.peek(ob + 7*i + 4), p: u_mem.peek(ob + 7*i + 5),
            q: u_mem.peek(ob + 7*i + 6)};
      checks++;
      if (u_mem.peek(rb + i) !== digest(o)) begin failures++; $display("result %0d wrong", i); end
    end
  endtask

  initial begin
    num_options = 0; opt_base = 0; res_base = 0; res_price = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    launch(9, 0, 100);
    launch(20, 200, 400);
    launch(1, 7, 450);
    checks++;
    if (prefetches == 0 || u_mem.rd_stalls == 0 || u_mem.wr_stalls == 0 || u_mem.bad_addr != 0) begin
      failures++;
      $display("prefetch %0d rd stalls %0d wr stalls %0d bad %0d", prefetches,
               u_mem.rd_stalls, u_mem.wr_stalls, u_mem.bad_addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
