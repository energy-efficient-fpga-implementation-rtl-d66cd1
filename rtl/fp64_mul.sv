// fp64_mul: combinational IEEE-754 binary64 multiplier, y = a * b.
// The 53-bit significands (hidden bit restored) are multiplied into a
// 106-bit product, normalised by at most one position and rounded to
// nearest, ties to even, using a guard bit and a sticky bit.
// Subnormal inputs are read as zero and a result below the normal range is
// flushed to a signed zero; a result above it becomes infinity. NaN and
// infinity inputs are not given special treatment: the pricing datapath
// only handles finite prices, rates and probabilities. The published kernel states
// only that all data is double precision; this rounding, subnormal and
// special-value behaviour is this design's choice.
// Timing: purely combinational, no clock.
module fp64_mul
  import binom_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);

  logic         sign;
  logic         zero_in;
  logic [52:0]  ma, mb;
  logic [105:0] prod;
  logic [52:0]  mant;
  logic         guard, sticky, round_up;
  logic [53:0]  mant_r;
  logic signed [13:0] exp_s;

  always_comb begin
    sign    = a[63] ^ b[63];
    zero_in = (a[62:52] == '0) || (b[62:52] == '0);
    ma      = {1'b1, a[51:0]};
    mb      = {1'b1, b[51:0]};
    prod    = ma * mb;
    exp_s   = $signed({3'b000, a[62:52]}) + $signed({3'b000, b[62:52]}) - 14'sd1023;
    if (prod[105]) begin
      mant   = prod[105:53];
      guard  = prod[52];
      sticky = |prod[51:0];
      exp_s  = exp_s + 14'sd1;
    end else begin
      mant   = prod[104:52];
      guard  = prod[51];
      sticky = |prod[50:0];
    end
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + {53'd0, round_up};
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 14'sd1;
    end
    if (zero_in || exp_s <= 14'sd0)
      y = {sign, 63'd0};
    else if (exp_s >= 14'sd2047)
      y = {sign, 11'h7FF, 52'd0};
    else
      y = {sign, exp_s[10:0], mant_r[51:0]};
  end

endmodule
