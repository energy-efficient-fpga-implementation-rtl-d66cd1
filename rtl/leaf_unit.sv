// leaf_unit: initialises one leaf of the binomial tree (step 1 of the
// backward pricing). Leaf k of N_LEAVES (k = 0 the lowest price) gets the
// asset price S = S0 * u**(2k - (N_LEAVES-1)), using d**(N_LEAVES-1 - 2k)
// when the exponent is negative, and the value of a call at expiry,
// V = max(S - K, 0).
// Sequence: start -> pow_unit (EXP_W cycles) -> scale by S0 (1 cycle) ->
// payoff (1 cycle); done is high for one cycle, EXP_W + 4 cycles after
// the cycle in which start is high. s_leaf and v_leaf hold until the next
// start. EXP_W = clog2(N_LEAVES) covers the largest exponent N_LEAVES - 1.
// The published kernel gives the leaf prices (u^2 S0, S0, u^-2 S0 for three
// leaves), that each leaf is set by its own work-item with a power
// operator, and the call payoff; the index arithmetic is this design's.
module leaf_unit
  import binom_pkg::*;
#(
  parameter int unsigned N_LEAVES = 1024,
  localparam int unsigned KW    = $clog2(N_LEAVES) + 1,
  localparam int unsigned EXP_W = (N_LEAVES > 2) ? $clog2(N_LEAVES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [KW-1:0] k,       // leaf (row) index
  input  fp64_t         s0,
  input  fp64_t         strike,
  input  fp64_t         u,
  input  fp64_t         d,
  output logic          done,
  output fp64_t         s_leaf,
  output fp64_t         v_leaf
);

  typedef enum logic [1:0] {L_IDLE, L_POW, L_SCALE, L_PAYOFF} lstate_t;
  lstate_t state;

  logic signed [KW+1:0] e;
  logic [EXP_W-1:0]     n_abs;
  logic                 pow_done;
  fp64_t                pow_y, scaled, diff;

  always_comb begin
    e     = $signed({2'b00, k}) * 2 - $signed((KW+2)'(N_LEAVES - 1));
    n_abs = (e < 0) ? EXP_W'(-e) : EXP_W'(e);
  end

  pow_unit #(.EXP_W(EXP_W)) u_pow (
    .clk, .rst_n, .start,
    .x    ((e < 0) ? d : u),
    .n    (n_abs),
    .done (pow_done),
    .y    (pow_y)
  );

  fp64_mul u_scale  (.a(s0), .b(pow_y), .y(scaled));
  fp64_add u_payoff (.a(s_leaf), .b(strike), .sub(1'b1), .y(diff));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= L_IDLE;
      done   <= 1'b0;
      s_leaf <= FP64_ZERO;
      v_leaf <= FP64_ZERO;
    end else begin
      done <= 1'b0;
      if (start) state <= L_POW;
      else begin
        unique case (state)
          L_IDLE:   ;
          L_POW:    if (pow_done) state <= L_SCALE;
          L_SCALE:  begin s_leaf <= scaled; state <= L_PAYOFF; end
          L_PAYOFF: begin
            v_leaf <= fp64_max(diff, FP64_ZERO);
            done   <= 1'b1;
            state  <= L_IDLE;
          end
        endcase
      end
    end
  end

endmodule
