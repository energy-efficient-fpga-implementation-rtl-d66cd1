// binomial_accel_top: binomial-tree pricer for American call options, the
// optimized OpenCL kernel organisation (one work-group per option, one
// work-item per tree row, values shared through on-chip local memory)
// written as RTL. The host places option records in global memory and
// starts the accelerator with the number of options and two base
// addresses; wg_dispatcher fetches each record, workgroup_engine prices it
// on an N_LEAVES-leaf tree with VEC*UNROLL node units working in parallel,
// and the price is written back to global memory. done rises when all
// prices are stored.
// Global memory itself (the board's DRAM), the host CPU and the PCIe link
// are outside this module: the global-memory port is brought out.
// Defaults follow the published OpenCL kernel's main configuration: 1024 time-discretised
// leaves, 4-way vectorisation and 2-way loop unrolling, double precision.
module binomial_accel_top
  import binom_pkg::*;
#(
  parameter int unsigned N_LEAVES = 1024,
  parameter int unsigned VEC      = 4,
  parameter int unsigned UNROLL   = 2,
  parameter int unsigned GADDR_W  = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        num_options,
  input  logic [GADDR_W-1:0] opt_base,
  input  logic [GADDR_W-1:0] res_base,
  output logic               done,
  output logic               busy,
  output logic               gm_rd_req_valid,
  input  logic               gm_rd_req_ready,
  output logic [GADDR_W-1:0] gm_rd_req_addr,
  input  logic               gm_rd_resp_valid,
  input  fp64_t              gm_rd_resp_data,
  output logic               gm_wr_valid,
  input  logic               gm_wr_ready,
  output logic [GADDR_W-1:0] gm_wr_addr,
  output fp64_t              gm_wr_data,
  output logic [VEC*UNROLL-1:0] exercise
);

  logic    opt_valid, opt_ready, res_valid, res_ready;
  option_t opt;
  fp64_t   res_price;

  wg_dispatcher #(.GADDR_W(GADDR_W)) u_dispatch (
    .clk, .rst_n, .start, .num_options, .opt_base, .res_base, .done,
    .rd_req_valid  (gm_rd_req_valid),
    .rd_req_ready  (gm_rd_req_ready),
    .rd_req_addr   (gm_rd_req_addr),
    .rd_resp_valid (gm_rd_resp_valid),
    .rd_resp_data  (gm_rd_resp_data),
    .wr_valid      (gm_wr_valid),
    .wr_ready      (gm_wr_ready),
    .wr_addr       (gm_wr_addr),
    .wr_data       (gm_wr_data),
    .opt_valid, .opt_ready, .opt, .res_valid, .res_ready, .res_price
  );

  workgroup_engine #(.N_LEAVES(N_LEAVES), .VEC(VEC), .UNROLL(UNROLL)) u_engine (
    .clk, .rst_n, .opt_valid, .opt_ready, .opt, .res_valid, .res_ready,
    .res_price, .busy, .exercise
  );

endmodule
