// iir_equalizer: arithmetic of the first-order low-pass equaliser
//   H(z) = (C1 + C2 z^-1) / (1 - C3 z^-1),
//   z(n) = C3*z(n-1) + C1*y(n) + C2*y(n-1),
// which flattens the 6 dB/octave high-pass slope of the differential
// microphone pair at low frequencies.
//
// Because C1 = C2, the filter is evaluated in the merged form of the
// optimised design: temp = y(n) + y(n-1) is formed by one adder, and the
// shared multiplier later supplies the two products C1*temp (pt_prod) and
// C3*z(n-1) (pz_prod). The three-operand carry-save adder A3 adds those two
// products and a rounding constant of half a Q2.14 LSB; the sum is reduced
// to Q2.14 with saturation. Rounding and saturation are this design's
// choices; the coefficient values and the filter form are the document's.
// The filter has a DC gain of about 23, so loud low-frequency input
// saturates z. Combinational; registers live in beamformer_core.
module iir_equalizer
  import bf_pkg::*;
(
  input  sample_t y_n,        // y(n)
  input  sample_t y_nm1,      // y(n-1)
  input  prod_t   pt_prod,    // C1 * temp, Q4.28
  input  prod_t   pz_prod,    // C3 * z(n-1), Q4.28
  output sample_t temp,       // saturated y(n) + y(n-1)
  output sample_t z,          // new filter output
  output logic    z_sat       // z was saturated
);

  localparam prod_t ROUND_HALF = prod_t'(1) <<< (FRAC_W - 1);

  prod_t z_acc;

  csa_adder3 #(.W(PROD_W)) u_a3 (
    .x  (pt_prod),
    .y  (pz_prod),
    .w  (ROUND_HALF),
    .sum(z_acc)
  );

  logic signed [DATA_W:0] t_wide;
  prod_t                  z_shift;

  always_comb begin
    t_wide  = (DATA_W+1)'(y_n) + (DATA_W+1)'(y_nm1);
    temp    = sat16(PROD_W'(t_wide));
    z_shift = z_acc >>> FRAC_W;
    z       = sat16(z_shift);
    z_sat   = (z_shift > PROD_W'(signed'(Q_MAX))) || (z_shift < PROD_W'(signed'(Q_MIN)));
  end

endmodule
