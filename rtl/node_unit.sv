// node_unit: the arithmetic of one tree node, Eq. (1) of the binomial model
// for a call:
//   S(t,k) = d * S(t+1,k)
//   V(t,k) = max(S(t,k) - K, rp * V(t+1,k) + rq * V(t+1,k-1))
// with rp = r*p and rq = r*q formed once per option. It is a two-stage
// pipeline: stage 1 holds the three products d*S, rp*V_up and rq*V_dn,
// stage 2 the exercise value S - K, the continuation value rp*V_up +
// rq*V_dn and their maximum. All inputs, the strike included, are sampled
// with in_valid, so they may change every cycle. A new node can enter every cycle; out_valid
// follows in_valid two cycles later. exercise is high with out_valid when
// early exercise (S - K above the continuation value) gave the result.
// The recurrence is the published model's; the pre-multiplied rp, rq, the
// operation order and the pipeline cut are this design's.
module node_unit
  import binom_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp64_t s_old,     // S(t+1,k)
  input  fp64_t v_up,      // V(t+1,k)
  input  fp64_t v_dn,      // V(t+1,k-1)
  input  fp64_t d,
  input  fp64_t strike,
  input  fp64_t rp,
  input  fp64_t rq,
  output logic  out_valid,
  output fp64_t s_new,
  output fp64_t v_new,
  output logic  exercise
);

  fp64_t s_m, a_m, b_m;          // stage-1 inputs (combinational products)
  fp64_t s_q, a_q, b_q, k_q;     // stage-1 registers
  fp64_t cont, exer;
  logic  v1;

  fp64_mul u_mul_s  (.a(d),  .b(s_old), .y(s_m));
  fp64_mul u_mul_up (.a(rp), .b(v_up),  .y(a_m));
  fp64_mul u_mul_dn (.a(rq), .b(v_dn),  .y(b_m));

  fp64_add u_add_cont (.a(a_q), .b(b_q),    .sub(1'b0), .y(cont));
  fp64_add u_sub_exer (.a(s_q), .b(k_q),    .sub(1'b1), .y(exer));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      s_q <= FP64_ZERO; a_q <= FP64_ZERO; b_q <= FP64_ZERO; k_q <= FP64_ZERO;
      s_new <= FP64_ZERO; v_new <= FP64_ZERO; exercise <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        s_q <= s_m;
        a_q <= a_m;
        b_q <= b_m;
        k_q <= strike;
      end
      if (v1) begin
        s_new    <= s_q;
        exercise <= fp64_lt(cont, exer);
        v_new    <= fp64_lt(cont, exer) ? exer : cont;
      end
    end
  end

endmodule
