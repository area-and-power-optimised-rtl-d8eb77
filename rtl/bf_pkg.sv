// bf_pkg: number format, filter coefficients and FSM state encoding shared by
// the adaptive beamformer.
//
// Every signal sample, the adaptive gain G and the filter coefficients are
// 16-bit two's-complement fixed point with 14 fraction bits (Q2.14, range
// [-2, 2)), as chosen for the design. A product of two Q2.14 words is a 32-bit
// Q4.28 word; it is brought back to Q2.14 by keeping bits [29:14] and
// saturating when bits [31:29] disagree (the document truncates; saturation
// on overflow is this design's addition).
//
// The IIR equaliser coefficients C1 = C2 = 0.2759 and C3 = 0.9758 are the
// document's values, rounded to the nearest Q2.14 code.
//
// The four controller states are Gray coded (S0=00, S1=01, S2=11, S3=10) so
// that exactly one state bit toggles on every transition, as the document
// does to reduce glitches.
package bf_pkg;

  localparam int unsigned DATA_W = 16;        // sample / coefficient width
  localparam int unsigned FRAC_W = 14;        // fraction bits of Q2.14
  localparam int unsigned PROD_W = 2*DATA_W;  // full product width (Q4.28)

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  // Q2.14 constants
  localparam sample_t Q_ONE  = sample_t'(16'sd16384);   // 1.0
  localparam sample_t Q_ZERO = sample_t'(16'sd0);
  localparam sample_t Q_MAX  = sample_t'(16'sh7FFF);
  localparam sample_t Q_MIN  = sample_t'(16'sh8000);

  // IIR coefficients: round(c * 2^14)
  localparam sample_t C1_Q = sample_t'(16'sd4520);      // 0.2759 (= C2)
  localparam sample_t C3_Q = sample_t'(16'sd15988);     // 0.9758

  // Gray-coded controller states
  typedef enum logic [1:0] {
    S0 = 2'b00,
    S1 = 2'b01,
    S2 = 2'b11,
    S3 = 2'b10
  } bf_state_t;

  // Saturate a wider signed value to the Q2.14 range.
  function automatic sample_t sat16(input logic signed [PROD_W-1:0] v);
    if (v > PROD_W'(signed'(Q_MAX)))      return Q_MAX;
    else if (v < PROD_W'(signed'(Q_MIN))) return Q_MIN;
    else                                  return sample_t'(v);
  endfunction

  // Q4.28 product (or sum of products) -> Q2.14, keeping bits [29:14],
  // saturating on overflow.
  function automatic sample_t prod_to_q(input prod_t p);
    return sat16(p >>> FRAC_W);
  endfunction

endpackage
