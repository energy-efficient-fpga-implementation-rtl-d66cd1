// workgroup_engine: prices one American call option on an N_LEAVES-leaf
// recombining binomial tree, the work of one work-group of the optimized
// kernel. Each tree row k (0 = lowest asset price, N_LEAVES-1 = the row
// that ends at the root) is a "work-item" whose private asset price S and
// shared option value V live in two simple dual-port RAMs (private and
// local memory). LANES = VEC * UNROLL node units process LANES consecutive
// rows per cycle, one RAM word of LANES values.
//
// Phases of one option:
//   SETUP   rp = r*p and rq = r*q (one cycle).
//   LEAF    for each RAM word, LANES leaf units set S(T,k) and V(T,k).
//   STEP    for t = N_LEAVES-2 down to 0, the words that hold live rows are
//           read in increasing order, one per cycle. Row k becomes
//           V(t,k) = max(d*S - K, rp*V(t+1,k) + rq*V(t+1,k-1)); the value
//           of row k-1 for lane 0 comes from the last lane of the word read
//           just before. Results are written back in place; only rows
//           k >= N_LEAVES-1-t (still inside the tree) are changed.
//   BARRIER after the last word of a step, issue waits until every result
//           of that step has been written, so the next step reads only
//           finished values (the work-group barrier of the kernel).
//   ROOT    the root value V(0, N_LEAVES-1) is read and offered on res_*.
// Interface: option accepted on opt_valid & opt_ready (ready only when
// idle); the price is held on res_price while res_valid until res_ready.
// Timing per option, from the accept cycle to the first res_valid cycle:
//   4 + WORDS*(EXP_W+5) + sum over t = N_LEAVES-2 .. 0 of (words(t) + 4)
// with words(t) = WORDS - (N_LEAVES-2-t)/LANES and EXP_W = clog2(N_LEAVES).
// Follows the published OpenCL kernel: one work-group per option, one work-item per row,
// S in private and V in local memory updated in place with barriers,
// 4-way vectorisation with 2-way unrolling. This design's choices: the
// word-wide memory layout, skipping words of finished rows, the pipeline
// depth and the sequential sweep over each step.
// All lanes run in lock step, so only lane 0's leaf_done and node_valid are
// looked at; the other lanes' copies are left unused on purpose.
module workgroup_engine
  import binom_pkg::*;
#(
  parameter int unsigned N_LEAVES = 1024,
  parameter int unsigned VEC      = 4,
  parameter int unsigned UNROLL   = 2,
  localparam int unsigned LANES = VEC * UNROLL,
  localparam int unsigned WORDS = (N_LEAVES + LANES - 1) / LANES,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned KW    = $clog2(N_LEAVES) + 1,
  localparam int unsigned TW    = $clog2(N_LEAVES) + 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    opt_valid,
  output logic    opt_ready,
  input  option_t opt,
  output logic    res_valid,
  input  logic    res_ready,
  output fp64_t   res_price,
  output logic    busy,
  output logic [VEC*UNROLL-1:0] exercise  // per lane: a node result taken by early exercise
);

  typedef enum logic [3:0] {
    S_IDLE, S_SETUP, S_LEAF_START, S_LEAF_WAIT, S_STEP, S_BARRIER,
    S_ROOT_RD, S_ROOT_WAIT, S_RESULT
  } state_t;

  typedef logic [LANES-1:0][63:0] word_t;

  localparam int unsigned ROOT_WORD = (N_LEAVES - 1) / LANES;
  localparam int unsigned ROOT_LANE = (N_LEAVES - 1) % LANES;

  state_t         state;
  option_t        opt_q;
  fp64_t          rp_q, rq_q, rp_m, rq_m;
  logic [AW-1:0]  w;                 // word being initialised or issued
  logic [TW-1:0]  t;                 // current time step

  // memories (S: private memory of the rows, V: shared local memory)
  logic           mem_we, mem_re;
  logic [AW-1:0]  mem_waddr, mem_raddr;
  word_t          s_wdata, v_wdata, s_rdata, v_rdata;

  // leaf units
  logic           leaf_start;
  logic [LANES-1:0] leaf_done;
  word_t          leaf_s, leaf_v;

  // step pipeline: p1 = RAM output, p2/p3 = node stages
  logic           p1_valid, p2_valid, p3_valid;
  logic [AW-1:0]  p1_addr, p2_addr, p3_addr;
  logic [LANES-1:0] p1_live, p2_live, p3_live;
  word_t          p2_s, p3_s, p2_v, p3_v;
  fp64_t          carry_v;
  word_t          v_dn;
  logic [LANES-1:0] node_valid, node_ex;
  word_t          node_s, node_v;
  logic [2:0]     inflight;
  logic           issue;

  function automatic logic [AW-1:0] first_word(logic [TW-1:0] tt);
    // word holding row N_LEAVES-2-tt, the row below the lowest live one
    return AW'((N_LEAVES - 2 - 32'(tt)) / LANES);
  endfunction

  fp64_mul u_rp (.a(opt_q.r), .b(opt_q.p), .y(rp_m));
  fp64_mul u_rq (.a(opt_q.r), .b(opt_q.q), .y(rq_m));

  sdp_ram #(.WIDTH(64 * LANES), .DEPTH(WORDS)) u_smem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(s_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(s_rdata)
  );
  sdp_ram #(.WIDTH(64 * LANES), .DEPTH(WORDS)) u_vmem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(v_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(v_rdata)
  );

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    leaf_unit #(.N_LEAVES(N_LEAVES)) u_leaf (
      .clk, .rst_n,
      .start  (leaf_start),
      .k      (KW'(32'(w) * LANES + j)),
      .s0     (opt_q.s0),
      .strike (opt_q.k),
      .u      (opt_q.u),
      .d      (opt_q.d),
      .done   (leaf_done[j]),
      .s_leaf (leaf_s[j]),
      .v_leaf (leaf_v[j])
    );

    assign v_dn[j] = (j == 0) ? carry_v : v_rdata[(j == 0) ? 0 : j - 1];

    node_unit u_node (
      .clk, .rst_n,
      .in_valid  (p1_valid),
      .s_old     (s_rdata[j]),
      .v_up      (v_rdata[j]),
      .v_dn      (v_dn[j]),
      .d         (opt_q.d),
      .strike    (opt_q.k),
      .rp        (rp_q),
      .rq        (rq_q),
      .out_valid (node_valid[j]),
      .s_new     (node_s[j]),
      .v_new     (node_v[j]),
      .exercise  (node_ex[j])
    );
  end

  assign exercise   = p3_valid ? (node_ex & p3_live) : '0;
  assign issue      = (state == S_STEP);
  assign leaf_start = (state == S_LEAF_START);
  assign opt_ready  = (state == S_IDLE);
  assign res_valid  = (state == S_RESULT);
  assign busy       = (state != S_IDLE);

  // memory port control
  always_comb begin
    mem_re    = issue || (state == S_ROOT_RD);
    mem_raddr = (state == S_ROOT_RD) ? AW'(ROOT_WORD) : w;
    if (p3_valid) begin
      mem_we    = 1'b1;
      mem_waddr = p3_addr;
      for (int j = 0; j < LANES; j++) begin
        s_wdata[j] = p3_live[j] ? node_s[j] : p3_s[j];
        v_wdata[j] = p3_live[j] ? node_v[j] : p3_v[j];
      end
    end else begin
      mem_we    = (state == S_LEAF_WAIT) && leaf_done[0];
      mem_waddr = w;
      s_wdata   = leaf_s;
      v_wdata   = leaf_v;
    end
  end

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      opt_q     <= '0;
      rp_q      <= FP64_ZERO;
      rq_q      <= FP64_ZERO;
      w         <= '0;
      t         <= '0;
      res_price <= FP64_ZERO;
    end else begin
      unique case (state)
        S_IDLE: if (opt_valid) begin
          opt_q <= opt;
          state <= S_SETUP;
        end
        S_SETUP: begin
          rp_q  <= rp_m;
          rq_q  <= rq_m;
          w     <= '0;
          state <= S_LEAF_START;
        end
        S_LEAF_START: state <= S_LEAF_WAIT;
        S_LEAF_WAIT: if (leaf_done[0]) begin
          if (32'(w) == WORDS - 1) begin
            t     <= TW'(N_LEAVES - 2);
            w     <= first_word(TW'(N_LEAVES - 2));
            state <= S_STEP;
          end else begin
            w     <= w + 1'b1;
            state <= S_LEAF_START;
          end
        end
        S_STEP: begin
          if (32'(w) == WORDS - 1) state <= S_BARRIER;
          else w <= w + 1'b1;
        end
        S_BARRIER: if (inflight == '0) begin
          if (t == '0) state <= S_ROOT_RD;
          else begin
            t     <= t - 1'b1;
            w     <= first_word(t - 1'b1);
            state <= S_STEP;
          end
        end
        S_ROOT_RD: state <= S_ROOT_WAIT;
        S_ROOT_WAIT: begin
          res_price <= v_rdata[ROOT_LANE];
          state     <= S_RESULT;
        end
        S_RESULT: if (res_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // step pipeline bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_valid <= 1'b0; p2_valid <= 1'b0; p3_valid <= 1'b0;
      p1_addr  <= '0;   p2_addr  <= '0;   p3_addr  <= '0;
      p1_live  <= '0;   p2_live  <= '0;   p3_live  <= '0;
      p2_s <= '0; p3_s <= '0; p2_v <= '0; p3_v <= '0;
      carry_v  <= FP64_ZERO;
      inflight <= '0;
    end else begin
      p1_valid <= issue;
      p1_addr  <= w;
      for (int j = 0; j < LANES; j++)
        p1_live[j] <= (32'(w) * LANES + j >= N_LEAVES - 1 - 32'(t)) &&
                      (32'(w) * LANES + j <= N_LEAVES - 1);
      if (p1_valid) carry_v <= v_rdata[LANES-1];
      p2_valid <= p1_valid; p2_addr <= p1_addr; p2_live <= p1_live;
      p2_s     <= s_rdata;  p2_v    <= v_rdata;
      p3_valid <= p2_valid; p3_addr <= p2_addr; p3_live <= p2_live;
      p3_s     <= p2_s;     p3_v    <= p2_v;
      inflight <= inflight + 3'(issue) - 3'(p3_valid);
    end
  end

  // the node pipeline and the bookkeeping pipeline stay aligned
  assert property (@(posedge clk) disable iff (!rst_n) node_valid[0] == p3_valid);
  // a barrier only ends when nothing of the step is left in flight
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_BARRIER && inflight == '0) |-> !p3_valid);
  // the result stays offered until taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   (res_valid && !res_ready) |=> (res_valid && $stable(res_price)));

endmodule
