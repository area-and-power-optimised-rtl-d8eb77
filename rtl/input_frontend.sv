// input_frontend: front and back microphone input path.
//
// At the ADC rate Fs = c/d one sample period equals the acoustic travel time
// T = d/c between the two microphones, so the delay T of the model is a
// single register per channel. Each ADC word is normalised (adc_normalize),
// the previous normalised sample is kept as the delayed copy, and only every
// second sample pair is passed on (downsampling by 2 after the delay), which
// halves the rate the arithmetic core must run at.
//
// Interface: adc_valid is a one-cycle strobe with a new pair radc_a (front)
// and radc_b (back). On every second strobe, out_valid pulses for one cycle
// in the following clock with a(n), b(n), a(n-1), b(n-1), where n-1 is the
// ADC sample just before n (at the full rate). The first strobe after reset
// has no predecessor; the delayed registers then hold 0 (silence).
// Which phase of the two is kept (the second, fourth, ... strobe after reset)
// is this design's choice; the document only says "downsample by 2".
module input_frontend
  import bf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adc_valid,
  input  logic [DATA_W-1:0] radc_a,     // front microphone ADC code
  input  logic [DATA_W-1:0] radc_b,     // back microphone ADC code
  output logic              out_valid,
  output sample_t           a_n,        // a(n)
  output sample_t           b_n,        // b(n)
  output sample_t           a_d,        // a(n-1)
  output sample_t           b_d         // b(n-1)
);

  sample_t a_norm, b_norm;
  sample_t a_prev, b_prev;               // last normalised sample, any phase
  logic    phase;                        // toggles every ADC sample

  adc_normalize u_norm_a (.radc(radc_a), .s(a_norm));
  adc_normalize u_norm_b (.radc(radc_b), .s(b_norm));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_prev    <= Q_ZERO;
      b_prev    <= Q_ZERO;
      phase     <= 1'b0;
      out_valid <= 1'b0;
      a_n       <= Q_ZERO;
      b_n       <= Q_ZERO;
      a_d       <= Q_ZERO;
      b_d       <= Q_ZERO;
    end else begin
      out_valid <= 1'b0;
      if (adc_valid) begin
        a_prev <= a_norm;
        b_prev <= b_norm;
        phase  <= ~phase;
        if (phase) begin
          out_valid <= 1'b1;
          a_n       <= a_norm;
          b_n       <= b_norm;
          a_d       <= a_prev;
          b_d       <= b_prev;
        end
      end
    end
  end

endmodule
