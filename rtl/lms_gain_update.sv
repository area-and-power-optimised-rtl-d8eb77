// lms_gain_update: one step of the LMS (stochastic gradient) update of the
// adaptive gain,
//   G(n+1) = G(n) + 2*mu * y(n) * x2(n),   2*mu = 0.25.
//
// The Q4.28 product y*x2 from the shared multiplier is shifted right by two
// bits (the multiplication by 2*mu) and truncated to 16 bits, i.e. bits
// [31:16] of the product are the Q2.14 increment. The new gain is clamped to
// [0, 1]: G = 0 puts the null at 180 deg, G = 1 at 90 deg. Step size, shift,
// truncation and clamp range follow the document. Combinational; the clamp
// flags tell which limit was applied.
module lms_gain_update
  import bf_pkg::*;
(
  input  sample_t g_in,       // G(n), Q2.14 in [0, 1]
  input  prod_t   yx2_prod,   // y(n) * x2(n), Q4.28
  output sample_t g_out,      // G(n+1)
  output logic    clamp_lo,   // result was limited to 0
  output logic    clamp_hi    // result was limited to 1
);

  sample_t                  delta;
  logic signed [DATA_W+1:0] g_sum;

  always_comb begin
    delta    = sample_t'(yx2_prod >>> (FRAC_W + 2));   // product[31:16]
    g_sum    = (DATA_W+2)'(g_in) + (DATA_W+2)'(delta);
    clamp_lo = g_sum < 0;
    clamp_hi = g_sum > (DATA_W+2)'(Q_ONE);
    if (clamp_lo)      g_out = Q_ZERO;
    else if (clamp_hi) g_out = Q_ONE;
    else               g_out = sample_t'(g_sum);
  end

endmodule
