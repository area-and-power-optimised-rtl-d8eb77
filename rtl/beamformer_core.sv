// beamformer_core: the adaptive beamformer arithmetic, scheduled by a
// four-state controller onto one shared radix-4 Booth multiplier.
//
// Per downsampled input sample the controller walks through the Gray-coded
// states S0 -> S1 -> S2 -> S3 and runs exactly one multiplication in each:
//
//   state  multiplication        additions at the end of the state
//   S0     C1 * temp             x1 = a(n)-b(n-1), x2 = b(n)-a(n-1)   (A1, A2)
//   S1     G(n) * x2(n)          z = C1*temp + C3*z_old (+round)      (A3)
//   S2     C3 * z                y(n) = x1 - G*x2, temp = y(n)+y(n-1)
//   S3     y(n) * x2(n)          G(n+1) = clamp(G + (y*x2)/4)         (LMS)
//
// temp from S2 is multiplied by C1 in S0 of the next sample and C3*z from S2
// is used in S1 of the next sample, so the equaliser output z produced in S1
// is the filtered value of the previous sample's y (one sample of latency).
// This is the document's optimised schedule, which merges C1 = C2 so that a
// single multiplier suffices.
//
// Timing: each state issues its multiplication in its first cycle, waits the
// multiplier's 16 cycles and stores its results one cycle later, so a state
// lasts 18 clock cycles and a sample 72 cycles, plus one cycle in S3 to accept
// the next sample. The clock must therefore be at least 73 times the
// downsampled rate (about 1.04 MHz for 14.2 kHz); the document gives the
// state rate but not this clock, so the cycle split is this design's.
//
// Interface: in_valid pulses with a(n), b(n), a(n-1), b(n-1) (Q2.14). One
// sample is buffered; the controller leaves S3 when one is pending. A sample
// that arrives while another is still pending replaces it and sets the
// sticky overrun flag (this design's addition). z_valid pulses when z is
// updated. G starts at G_INIT after reset (this design's choice) and all
// filter state starts at zero.
module beamformer_core
  import bf_pkg::*;
#(
  parameter sample_t G_INIT = Q_ZERO
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  sample_t   a_n,
  input  sample_t   b_n,
  input  sample_t   a_d,
  input  sample_t   b_d,
  output sample_t   z,           // equalised beamformer output
  output logic      z_valid,
  output sample_t   y,           // adaptive beamformer output before the equaliser
  output sample_t   g,           // current adaptive gain G
  output bf_state_t state,
  output logic      overrun,     // sticky: an input sample was lost
  output logic      g_clamp_lo,  // pulse: LMS update clamped G at 0
  output logic      g_clamp_hi,  // pulse: LMS update clamped G at 1
  output logic      z_sat        // pulse: equaliser output saturated
);

  // ---------------------------------------------------------------- input buffer
  logic    pend;
  sample_t pa_n, pb_n, pa_d, pb_d;     // pending sample
  sample_t ca_n, cb_n, ca_d, cb_d;     // sample being processed

  // ---------------------------------------------------------------- controller
  logic idle;                          // S3 finished, waiting for a sample
  logic issued;                        // this state's multiplication started

  // ---------------------------------------------------------------- datapath regs
  sample_t x1_r, x2_r, y_r, temp_r, z_r, g_r;
  prod_t   pt_r, pz_r, gx2_r;

  // ---------------------------------------------------------------- multiplier
  logic    mul_start, mul_busy, mul_done;
  sample_t mul_a, mul_b;
  prod_t   mul_p;

  assign mul_start = !idle && !issued;

  always_comb begin
    unique case (state)
      S0:      begin mul_a = C1_Q; mul_b = temp_r; end
      S1:      begin mul_a = g_r;  mul_b = x2_r;   end
      S2:      begin mul_a = C3_Q; mul_b = z_r;    end
      default: begin mul_a = y_r;  mul_b = x2_r;   end   // S3
    endcase
  end

  booth_r4_mult #(.W(DATA_W)) u_mult (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (mul_start),
    .a      (mul_a),
    .b      (mul_b),
    .busy   (mul_busy),
    .done   (mul_done),
    .product(mul_p)
  );

  // ---------------------------------------------------------------- arithmetic
  sample_t fb_x1, fb_x2, fb_y;
  fixed_beamformer u_fbf (
    .a_n     (ca_n),
    .b_n     (cb_n),
    .a_d     (ca_d),
    .b_d     (cb_d),
    .x1_r    (x1_r),
    .gx2_prod(gx2_r),
    .x1      (fb_x1),
    .x2      (fb_x2),
    .y       (fb_y)
  );

  sample_t iir_temp, iir_z;
  logic    iir_z_sat;
  iir_equalizer u_iir (
    .y_n    (fb_y),
    .y_nm1  (y_r),
    .pt_prod(pt_r),
    .pz_prod(pz_r),
    .temp   (iir_temp),
    .z      (iir_z),
    .z_sat  (iir_z_sat)
  );

  sample_t lms_g;
  logic    lms_lo, lms_hi;
  lms_gain_update u_lms (
    .g_in    (g_r),
    .yx2_prod(mul_p),
    .g_out   (lms_g),
    .clamp_lo(lms_lo),
    .clamp_hi(lms_hi)
  );

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= 1'b0;
      pa_n       <= Q_ZERO;
      pb_n       <= Q_ZERO;
      pa_d       <= Q_ZERO;
      pb_d       <= Q_ZERO;
      ca_n       <= Q_ZERO;
      cb_n       <= Q_ZERO;
      ca_d       <= Q_ZERO;
      cb_d       <= Q_ZERO;
      state      <= S3;
      idle       <= 1'b1;
      issued     <= 1'b0;
      x1_r       <= Q_ZERO;
      x2_r       <= Q_ZERO;
      y_r        <= Q_ZERO;
      temp_r     <= Q_ZERO;
      z_r        <= Q_ZERO;
      g_r        <= G_INIT;
      pt_r       <= '0;
      pz_r       <= '0;
      gx2_r      <= '0;
      overrun    <= 1'b0;
      z_valid    <= 1'b0;
      g_clamp_lo <= 1'b0;
      g_clamp_hi <= 1'b0;
      z_sat      <= 1'b0;
    end else begin
      z_valid    <= 1'b0;
      g_clamp_lo <= 1'b0;
      g_clamp_hi <= 1'b0;
      z_sat      <= 1'b0;

      if (mul_start) issued <= 1'b1;

      if (idle) begin
        if (pend) begin
          ca_n  <= pa_n;
          cb_n  <= pb_n;
          ca_d  <= pa_d;
          cb_d  <= pb_d;
          idle  <= 1'b0;
          state <= S0;
        end
      end else if (mul_done) begin
        issued <= 1'b0;
        unique case (state)
          S0: begin
            pt_r  <= mul_p;
            x1_r  <= fb_x1;
            x2_r  <= fb_x2;
            state <= S1;
          end
          S1: begin
            z_r     <= iir_z;
            z_sat   <= iir_z_sat;
            z_valid <= 1'b1;
            gx2_r   <= mul_p;
            state   <= S2;
          end
          S2: begin
            y_r    <= fb_y;
            temp_r <= iir_temp;
            pz_r   <= mul_p;
            state  <= S3;
          end
          default: begin                     // S3
            g_r        <= lms_g;
            g_clamp_lo <= lms_lo;
            g_clamp_hi <= lms_hi;
            idle       <= 1'b1;
          end
        endcase
      end

      // input buffer: a new sample fills the slot; taking it frees the slot
      if (in_valid) begin
        pa_n <= a_n;
        pb_n <= b_n;
        pa_d <= a_d;
        pb_d <= b_d;
        pend <= 1'b1;
        if (pend && !(idle && pend)) overrun <= 1'b1;
      end else if (idle && pend) begin
        pend <= 1'b0;
      end
    end
  end

  assign z = z_r;
  assign y = y_r;
  assign g = g_r;

  // Gray coding: exactly one state bit changes on every transition.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state != $past(state)) |-> $onehot(state ^ $past(state)))
    else $error("state transition %b -> %b is not a Gray step", $past(state), state);

  // The multiplier must be idle whenever a state issues a new product.
  assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> !mul_busy)
    else $error("multiplication issued while the multiplier is busy");

endmodule
