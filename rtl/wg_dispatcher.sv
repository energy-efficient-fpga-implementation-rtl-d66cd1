// wg_dispatcher: the kernel-launch side of the accelerator. After start it
// runs num_options work-groups, one per option: it loads option g's record,
// OPT_WORDS consecutive 64-bit words at opt_base + OPT_WORDS*g of global
// memory, hands it to the work-group engine, and stores the engine's price
// at res_base + g. A one-option buffer lets the next option be loaded while
// the engine prices the current one. done rises when the last price has
// been written and stays high until the next start.
// Global memory port (word addresses, 64-bit data): reads are requests on
// rd_req_valid/rd_req_ready answered in order on rd_resp_valid; writes are
// independent of reads, on wr_valid/wr_ready. Any latency and any number of
// stall cycles on either side are allowed.
// Follows the published kernel's host sequence: options copied to global memory,
// enough work-groups enqueued for all of them, results read back once all
// are done. The record layout, the port protocol and the prefetch buffer are
// this design's choices.
module wg_dispatcher
  import binom_pkg::*;
#(
  parameter int unsigned GADDR_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // launch
  input  logic               start,
  input  logic [31:0]        num_options,
  input  logic [GADDR_W-1:0] opt_base,
  input  logic [GADDR_W-1:0] res_base,
  output logic               done,
  // global memory
  output logic               rd_req_valid,
  input  logic               rd_req_ready,
  output logic [GADDR_W-1:0] rd_req_addr,
  input  logic               rd_resp_valid,
  input  fp64_t              rd_resp_data,
  output logic               wr_valid,
  input  logic               wr_ready,
  output logic [GADDR_W-1:0] wr_addr,
  output fp64_t              wr_data,
  // work-group engine
  output logic               opt_valid,
  input  logic               opt_ready,
  output option_t            opt,
  input  logic               res_valid,
  output logic               res_ready,
  input  fp64_t              res_price
);

  logic               running;
  logic [31:0]        n_opts, ld_group, st_group;
  logic [GADDR_W-1:0] ld_addr;
  logic [2:0]         req_cnt, resp_cnt;
  fp64_t              rec [OPT_WORDS];
  logic               buf_valid;

  // loader: issue the OPT_WORDS reads of the next record while the buffer is empty
  assign rd_req_valid = running && !buf_valid && (ld_group < n_opts) &&
                        (32'(req_cnt) < OPT_WORDS);
  assign rd_req_addr  = ld_addr;

  assign opt_valid = buf_valid;
  assign opt = '{s0: rec[0], k: rec[1], u: rec[2], d: rec[3], r: rec[4], p: rec[5], q: rec[6]};

  // store: results go straight to global memory
  assign wr_valid  = running && res_valid;
  assign wr_addr   = res_base + GADDR_W'(st_group);
  assign wr_data   = res_price;
  assign res_ready = running && wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      done      <= 1'b0;
      n_opts    <= '0;
      ld_group  <= '0;
      st_group  <= '0;
      ld_addr   <= '0;
      req_cnt   <= '0;
      resp_cnt  <= '0;
      buf_valid <= 1'b0;
      for (int i = 0; i < OPT_WORDS; i++) rec[i] <= FP64_ZERO;
    end else if (start && !running) begin
      running   <= (num_options != 0);
      done      <= (num_options == 0);
      n_opts    <= num_options;
      ld_group  <= '0;
      st_group  <= '0;
      ld_addr   <= opt_base;
      req_cnt   <= '0;
      resp_cnt  <= '0;
      buf_valid <= 1'b0;
    end else if (running) begin
      if (rd_req_valid && rd_req_ready) begin
        req_cnt <= req_cnt + 1'b1;
        ld_addr <= ld_addr + 1'b1;
      end
      if (rd_resp_valid) begin
        rec[resp_cnt] <= rd_resp_data;
        if (32'(resp_cnt) == OPT_WORDS - 1) begin
          resp_cnt  <= '0;
          req_cnt   <= '0;
          buf_valid <= 1'b1;
          ld_group  <= ld_group + 1'b1;
        end else begin
          resp_cnt <= resp_cnt + 1'b1;
        end
      end
      if (opt_valid && opt_ready) buf_valid <= 1'b0;
      if (wr_valid && wr_ready) begin
        st_group <= st_group + 1'b1;
        if (st_group + 1 == n_opts) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  // a response only comes for a request that was made
  assert property (@(posedge clk) disable iff (!rst_n) rd_resp_valid |-> (resp_cnt < req_cnt));
  // a write request holds its address and data until accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_valid && !wr_ready) |=> (wr_valid && $stable(wr_addr) && $stable(wr_data)));

endmodule
