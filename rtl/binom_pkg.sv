// binom_pkg: types and helper functions shared by the binomial option-pricing
// accelerator. All prices, rates and probabilities are IEEE-754 binary64
// (double precision) values carried as raw 64-bit words, as in the kernels
// this design implements, which keep every quantity in double precision.
// The option record holds the parameters of Eq. (1) of the pricing model
// (d, K, r, p, q) plus the spot price S0 and the up factor u that the leaf
// initialisation needs; the host computes them from the option's market data.
package binom_pkg;

  typedef logic [63:0] fp64_t;

  localparam fp64_t FP64_ZERO = 64'h0000_0000_0000_0000;
  localparam fp64_t FP64_ONE  = 64'h3FF0_0000_0000_0000;

  // One option as stored in global memory, OPT_WORDS consecutive 64-bit words
  // in the order of the fields below (s0 first).
  typedef struct packed {
    fp64_t s0;   // spot price of the underlying at t = 0
    fp64_t k;    // strike price
    fp64_t u;    // up factor per time step
    fp64_t d;    // down factor per time step (1/u)
    fp64_t r;    // one-step discount factor
    fp64_t p;    // risk-neutral probability of an up move
    fp64_t q;    // 1 - p
  } option_t;

  localparam int unsigned OPT_WORDS = 7;

  // a < b for finite binary64 values (+0 and -0 compare equal).
  function automatic logic fp64_lt(fp64_t a, fp64_t b);
    logic a_zero, b_zero;
    a_zero = (a[62:0] == '0);
    b_zero = (b[62:0] == '0);
    if (a_zero && b_zero)      return 1'b0;
    else if (a[63] != b[63])   return a[63];
    else if (!a[63])           return a[62:0] < b[62:0];
    else                       return a[62:0] > b[62:0];
  endfunction

  function automatic fp64_t fp64_max(fp64_t a, fp64_t b);
    return fp64_lt(a, b) ? b : a;
  endfunction

endpackage
