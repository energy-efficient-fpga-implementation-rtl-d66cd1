// fp64_add: combinational IEEE-754 binary64 adder/subtractor,
// y = a + b (sub = 0) or y = a - b (sub = 1).
// The operand of larger magnitude is kept as is and the other is shifted
// right by the exponent difference into a significand extended by guard,
// round and sticky bits. Same signs add (with a possible one-bit right
// normalisation); different signs subtract and are normalised left with a
// leading-zero count. The sum is rounded to nearest, ties to even. An exact
// cancellation gives +0. Subnormal inputs are read as zero, underflow
// flushes to zero and overflow gives infinity; NaN and infinity inputs are
// not given special treatment. The published kernel states only that all data is
// double precision; everything else here is this design's choice.
// Timing: purely combinational, no clock.
module fp64_add
  import binom_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  input  logic  sub,
  output fp64_t y
);

  logic        sa, sb, sbig, ssml;
  logic [10:0] ea, eb, ebig, esml;
  logic [56:0] mbig, msml, msh, sum;   // [56] carry, [55] hidden, [2:0] G R S
  logic [11:0] diff;
  logic        sticky_lost;
  logic [5:0]  lzc;
  logic        found;
  logic signed [13:0] exp_s;
  logic [53:0] mant_r;
  logic        round_up;

  always_comb begin
    sa = a[63];
    sb = b[63] ^ sub;
    ea = a[62:52];
    eb = b[62:52];
    // a zero exponent (zero or subnormal) is taken as zero: no hidden bit
    if (a[62:0] >= b[62:0]) begin
      sbig = sa; ebig = ea; mbig = {1'b0, (ea != '0), (ea != '0) ? a[51:0] : 52'd0, 3'b000};
      ssml = sb; esml = eb; msml = {1'b0, (eb != '0), (eb != '0) ? b[51:0] : 52'd0, 3'b000};
    end else begin
      sbig = sb; ebig = eb; mbig = {1'b0, (eb != '0), (eb != '0) ? b[51:0] : 52'd0, 3'b000};
      ssml = sa; esml = ea; msml = {1'b0, (ea != '0), (ea != '0) ? a[51:0] : 52'd0, 3'b000};
    end
    diff = {1'b0, ebig} - {1'b0, esml};
    if (diff >= 12'd57) begin
      msh         = '0;
      sticky_lost = |msml;
    end else begin
      msh         = msml >> diff;
      sticky_lost = |(msml & ~({57{1'b1}} << diff));
    end
    msh[0] = msh[0] | sticky_lost;

    exp_s = $signed({3'b000, ebig});
    lzc   = '0;
    found = 1'b0;
    if (sbig == ssml) begin
      sum = mbig + msh;
      if (sum[56]) begin
        sum   = {1'b0, sum[56:2], sum[1] | sum[0]};
        exp_s = exp_s + 14'sd1;
      end
    end else begin
      sum = mbig - msh;
      for (int i = 55; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lzc   = 6'(55 - i);
        end
      end
      sum   = sum << lzc;
      exp_s = exp_s - $signed({8'd0, lzc});
    end

    round_up = sum[2] && (sum[1] || sum[0] || sum[3]);
    mant_r   = {1'b0, sum[55:3]} + {53'd0, round_up};
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 14'sd1;
    end

    if (sum[55:0] == '0 || ebig == '0)
      y = (ebig == '0 && esml == '0) ? {sbig & ssml, 63'd0} : 64'd0;
    else if (exp_s <= 14'sd0)
      y = {sbig, 63'd0};
    else if (exp_s >= 14'sd2047)
      y = {sbig, 11'h7FF, 52'd0};
    else
      y = {sbig, exp_s[10:0], mant_r[51:0]};
  end

endmodule
