// sdp_ram: simple dual-port RAM, one write port and one read port on the
// same clock, as the on-chip block RAMs that hold the work-group's local
// memory. A read returns the word one cycle after the request (registered
// output, held while no read is requested); reading an address in the cycle
// it is written returns the old word. Contents are not reset: the engine
// writes every word it reads during the leaf initialisation of each option.
// WIDTH and DEPTH are set by the user of the memory.
module sdp_ram #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
