// beamformer_top: two-microphone adaptive beamformer for a hearing aid.
//
// Two omnidirectional microphones, front (a) and back (b), about 1.2 cm
// apart, are sampled by a 16-bit ADC at Fs = c/d (about 28.3 kHz), so that
// the acoustic delay between them is one sample. input_frontend normalises
// the offset-binary ADC words to Q2.14, forms the one-sample delayed copies
// and keeps every second sample. beamformer_core then builds a front-facing
// and a back-facing cardioid, subtracts G times the back-facing one to steer
// a null towards the strongest interferer (G adapted by LMS, limited to
// [0, 1], i.e. nulls between 90 and 180 degrees) and equalises the
// 6 dB/octave high-pass response with a first-order IIR low-pass filter.
//
// Interface: adc_valid pulses once per ADC sample with radc_a/radc_b. The
// equalised output z, in Q2.14, is updated with a one-cycle z_valid pulse
// once per two ADC samples. The clock must be at least 73 cycles per
// downsampled sample, i.e. 37 cycles per ADC strobe (the document leaves the
// clock frequency open); a faster input sets the sticky overrun flag.
// The microphones, amplifiers and the ADC are outside this design.
module beamformer_top
  import bf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adc_valid,   // one pulse per ADC sample (Fs)
  input  logic [DATA_W-1:0] radc_a,      // front microphone ADC word
  input  logic [DATA_W-1:0] radc_b,      // back microphone ADC word
  output sample_t           z,           // equalised output, Q2.14
  output logic              z_valid,
  output sample_t           y,           // beamformer output before equaliser
  output sample_t           g,           // adaptive gain G, Q2.14 in [0, 1]
  output bf_state_t         state,       // Gray-coded controller state
  output logic              overrun,
  output logic              g_clamp_lo,
  output logic              g_clamp_hi,
  output logic              z_sat
);

  logic    ds_valid;
  sample_t a_n, b_n, a_d, b_d;

  input_frontend u_front (
    .clk      (clk),
    .rst_n    (rst_n),
    .adc_valid(adc_valid),
    .radc_a   (radc_a),
    .radc_b   (radc_b),
    .out_valid(ds_valid),
    .a_n      (a_n),
    .b_n      (b_n),
    .a_d      (a_d),
    .b_d      (b_d)
  );

  beamformer_core u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ds_valid),
    .a_n       (a_n),
    .b_n       (b_n),
    .a_d       (a_d),
    .b_d       (b_d),
    .z         (z),
    .z_valid   (z_valid),
    .y         (y),
    .g         (g),
    .state     (state),
    .overrun   (overrun),
    .g_clamp_lo(g_clamp_lo),
    .g_clamp_hi(g_clamp_hi),
    .z_sat     (z_sat)
  );

endmodule
