// fixed_beamformer: the two back-to-back cardioids and the adaptive
// combination of the beamformer.
//
//   x1(n) = a(n) - b(n-1)   cardioid with its null at 180 deg (behind)
//   x2(n) = b(n) - a(n-1)   cardioid with its null at 0 deg (front)
//   y(n)  = x1(n) - G(n) * x2(n)
//
// a is the front and b the back microphone; the one-sample delay equals the
// travel time between them. The adders A1/A2 form x1 and x2. The product
// G*x2 comes from the shared multiplier as a full Q4.28 word (gx2_prod) and
// is reduced to Q2.14 here. x1 and x2 cannot overflow Q2.14 because the
// inputs are in [-1, 1); y can reach (-4, 4) and is saturated, which is this
// design's choice (the document does not discuss overflow). Combinational.
module fixed_beamformer
  import bf_pkg::*;
(
  input  sample_t a_n,       // a(n)
  input  sample_t b_n,       // b(n)
  input  sample_t a_d,       // a(n-1)
  input  sample_t b_d,       // b(n-1)
  input  sample_t x1_r,      // registered x1(n) used for y
  input  prod_t   gx2_prod,  // G(n) * x2(n), Q4.28
  output sample_t x1,
  output sample_t x2,
  output sample_t y
);

  logic signed [DATA_W:0] d1, d2;
  logic signed [PROD_W-1:0] y_wide;

  always_comb begin
    d1     = (DATA_W+1)'(a_n) - (DATA_W+1)'(b_d);
    d2     = (DATA_W+1)'(b_n) - (DATA_W+1)'(a_d);
    x1     = sat16(PROD_W'(d1));
    x2     = sat16(PROD_W'(d2));
    y_wide = PROD_W'(x1_r) - PROD_W'(prod_to_q(gx2_prod));
    y      = sat16(y_wide);
  end

endmodule
