// adc_normalize: turns a raw 16-bit ADC word into a signed Q2.14 sample.
//
// The microphone amplifier output sits on a 2.5 V bias, so the ADC word is
// offset binary with mid-scale 2^15 meaning silence. Inverting the MSB removes
// that offset; copying the inverted MSB once more and dropping the LSB scales
// the result into [-1, 1) in Q2.14:
//     S[15:0] = { ~RADC[15], ~RADC[15], RADC[14:1] }
// so 16'hFFFF -> +0.99994, 16'h8000 -> 0.0 and 16'h0000 -> -1.0. The dropped
// LSB costs one bit of resolution but needs no adder. This mapping is the
// document's. Fourteen of the sixteen output bits are plain wires from the
// input; only the inverter on the MSB is logic. Purely combinational, no
// latency.
module adc_normalize
  import bf_pkg::*;
(
  input  logic [DATA_W-1:0] radc,   // offset-binary ADC code
  output sample_t           s       // Q2.14 sample in [-1, 1)
);

  assign s = {~radc[DATA_W-1], ~radc[DATA_W-1], radc[DATA_W-2:1]};

endmodule
