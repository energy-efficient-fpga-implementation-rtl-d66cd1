// gmem_model: behavioural model of the accelerator's global memory (the
// board's DRAM behind its controller), for testbenches only. DEPTH 64-bit
// words. Read requests are accepted when rd_req_ready is high (randomly
// withheld STALL_PCT percent of cycles) and answered in order, each at
// least LAT_MIN and at most LAT_MAX cycles later. Writes are accepted when
// wr_ready is high, also randomly withheld. The testbench fills and reads
// the array mem directly and reads the stall counters.
`timescale 1ns/1ps
module gmem_model #(
  parameter int DEPTH     = 256,
  parameter int STALL_PCT = 30,
  parameter int LAT_MIN   = 1,
  parameter int LAT_MAX   = 6
) (
  input  logic        clk,
  input  logic        rd_req_valid,
  output logic        rd_req_ready,
  input  logic [31:0] rd_req_addr,
  output logic        rd_resp_valid,
  output logic [63:0] rd_resp_data,
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [31:0] wr_addr,
  input  logic [63:0] wr_data
);
  logic [63:0] mem [DEPTH];
  longint cycle = 0;
  int rd_stalls = 0, wr_stalls = 0, writes = 0, bad_addr = 0;
  typedef struct { longint due; logic [63:0] data; } resp_t;
  resp_t pend[$];

  function automatic void poke(int addr, logic [63:0] data);
    mem[addr] = data;
  endfunction

  function automatic logic [63:0] peek(int addr);
    return mem[addr];
  endfunction

  initial begin
    rd_req_ready = 0; wr_ready = 0; rd_resp_valid = 0; rd_resp_data = '0;
  end

  always @(posedge clk) begin
    resp_t r;
    cycle <= cycle + 1;
    if (rd_req_valid && !rd_req_ready) rd_stalls++;
    if (wr_valid && !wr_ready) wr_stalls++;
    if (rd_req_valid && rd_req_ready) begin
      if (rd_req_addr >= DEPTH) bad_addr++;
      r.due  = cycle + longint'($urandom_range(LAT_MIN, LAT_MAX));
      r.data = mem[rd_req_addr % DEPTH];
      pend.push_back(r);
    end
    if (wr_valid && wr_ready) begin
      if (wr_addr >= DEPTH) bad_addr++;
      mem[wr_addr % DEPTH] <= wr_data;
      writes++;
    end
    if (pend.size() > 0 && pend[0].due <= cycle) begin
      r = pend.pop_front();
      rd_resp_valid <= 1'b1;
      rd_resp_data  <= r.data;
    end else rd_resp_valid <= 1'b0;
    rd_req_ready <= ($urandom_range(0, 99) >= STALL_PCT);
    wr_ready     <= ($urandom_range(0, 99) >= STALL_PCT);
  end
endmodule
