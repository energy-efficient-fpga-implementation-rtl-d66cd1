// pow_unit: integer power y = x ** n of a binary64 value, the "Power
// operator" that the leaf initialisation uses to place each leaf's asset
// price. It uses square-and-multiply: at every step the running product is
// multiplied by the current square when the low exponent bit is set, the
// square is squared and the exponent shifted right. It always takes EXP_W
// steps, so the latency is fixed whatever n is.
// Interface: pulse start with x and n; done pulses EXP_W cycles later with
// y valid, and y holds until the next start. A start while busy restarts.
// The published kernel names the operator but not its algorithm; square-and-multiply
// with two double-precision multipliers is this design's choice.
module pow_unit
  import binom_pkg::*;
#(
  parameter int unsigned EXP_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  fp64_t            x,
  input  logic [EXP_W-1:0] n,
  output logic             done,
  output fp64_t            y
);

  localparam int unsigned CW = $clog2(EXP_W + 1);

  fp64_t            acc, sq, acc_x_sq, sq_x_sq;
  logic [EXP_W-1:0] n_rem;
  logic [CW-1:0]    steps;
  logic             busy;

  fp64_mul u_mul_acc (.a(acc), .b(sq), .y(acc_x_sq));
  fp64_mul u_mul_sq  (.a(sq),  .b(sq), .y(sq_x_sq));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= FP64_ONE;
      sq    <= FP64_ONE;
      n_rem <= '0;
      steps <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc   <= FP64_ONE;
        sq    <= x;
        n_rem <= n;
        steps <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (n_rem[0]) acc <= acc_x_sq;
        sq    <= sq_x_sq;
        n_rem <= n_rem >> 1;
        steps <= steps + 1'b1;
        if (steps == CW'(EXP_W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign y = acc;

endmodule
