// tb_beamformer_top: end-to-end test of the beamformer from ADC words to the
// equalised output, with the top at its default (and only) configuration.
//
// Acoustic scenes are synthesised as plane waves on two microphones one
// sample period (d/c) apart: a source at angle theta reaches the back
// microphone cos(theta) samples after the front one, so
//   a(n) = s(n),  b(n) = s(n - cos(theta)),
// evaluated exactly for tones. The samples are turned into offset-binary ADC
// codes and strobed every ADC_PERIOD clocks. Every output z is compared with
// the bit-true model of bf_ref_pkg (fed through its own normalise / delay /
// downsample), and G is compared after every processed sample.
//
// Scenes, in order, without reset in between:
//   1. 1.8 kHz tone from 180 deg -> G must fall to 0 (null behind), clamping
//   2. 1.8 kHz tone from  60 deg -> optimum G > 1, G must clamp at 1
//   3. 1.8 kHz tone from 120 deg -> mean G must match the least-squares
//      optimum Re(X1 X2*)/|X2|^2 of the two cardioid phasors
//   4. uncorrelated full-scale noise on both microphones -> z saturates
//   5. ADC strobes twice too fast -> sticky overrun
// Counted mechanisms (each must occur): downsampling by 2, all four Gray
// states and only single-bit state steps, G clamp at 0, G clamp at 1,
// z saturation, overrun.
module tb_beamformer_top;
  import bf_pkg::*;
  import bf_ref_pkg::*;

  localparam int    ADC_PERIOD = 40;          // clocks per ADC sample (>= 37)
  localparam real   PI = 3.14159265358979;
  localparam real   FS = 340.0 / 0.012;       // c/d, about 28.3 kHz

  logic clk = 1'b0, rst_n = 1'b0, adc_valid = 1'b0;
  logic [15:0] radc_a = '0, radc_b = '0;
  sample_t z, y, g;
  logic z_valid, overrun, g_clamp_lo, g_clamp_hi, z_sat;
  bf_state_t state;

  int checks = 0, failures = 0;
  int n_strobe = 0, n_z = 0, n_lo = 0, n_hi = 0, n_zsat = 0, n_gray_bad = 0;
  int seen_state [4];
  bit check_z = 1;
  longint exp_zq [$];
  longint exp_gq [$];
  ref_state_t rs;
  longint ra_prev = 0, rb_prev = 0;
  bit     ph = 0;
  longint sample_n = 0;

  beamformer_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bf_state_t prev_state = S3;
  always @(posedge clk) begin
    if (rst_n) begin
      seen_state[state]++;
      if (state != prev_state && !$onehot(state ^ prev_state)) n_gray_bad++;
      n_lo   += int'(g_clamp_lo);
      n_hi   += int'(g_clamp_hi);
      n_zsat += int'(z_sat);
      if (z_valid) n_z++;
      if (z_valid && check_z) begin
        checks++;
        if (exp_zq.size() == 0) begin
          failures++; $display("FAIL unexpected z_valid");
        end else begin
          if (longint'(z) != exp_zq[0]) begin
            failures++;
            if (failures < 20) $display("FAIL z=%0d expected %0d", z, exp_zq[0]);
          end
          void'(exp_zq.pop_front());
        end
      end
      // G of the previous sample is final by the time the next z appears
      if (z_valid && check_z && exp_gq.size() > 1) begin
        checks++;
        if (longint'(g) != exp_gq[0]) begin
          failures++;
          if (failures < 20) $display("FAIL g=%0d expected %0d", g, exp_gq[0]);
        end
        void'(exp_gq.pop_front());
      end
    end
    prev_state <= state;
  end

  function automatic longint to_code(input real v);
    longint c;
    c = longint'($floor(v * 32768.0 + 0.5)) + 32768;
    return (c < 0) ? 0 : (c > 65535) ? 65535 : c;
  endfunction

  // one ADC strobe, the model advanced alongside
  task automatic strobe(input longint ca, input longint cb, input int period);
    longint an, bn;
    an = norm(ca); bn = norm(cb);
    if (ph) begin
      exp_gq.push_back(rs.g);
      ref_step(rs, an, bn, ra_prev, rb_prev);
      exp_zq.push_back(rs.z);
      exp_gq[exp_gq.size()-1] = rs.g;
    end
    ra_prev = an; rb_prev = bn; ph = !ph;
    @(negedge clk);
    radc_a = 16'(ca); radc_b = 16'(cb); adc_valid = 1'b1;
    n_strobe++;
    @(negedge clk);
    adc_valid = 1'b0;
    repeat (period - 2) @(negedge clk);
    sample_n++;
  endtask

  // tone of amplitude amp, frequency f, arriving from theta degrees
  task automatic tone_scene(input real f, input real amp, input real theta_deg, input int n,
                            output real g_mean);
    real w, tau, gs;
    int cnt;
    w = 2.0 * PI * f / FS;
    tau = $cos(theta_deg * PI / 180.0);
    gs = 0.0; cnt = 0;
    for (int k = 0; k < n; k++) begin
      real t;
      t = real'(sample_n);
      strobe(to_code(amp * $sin(w * t)), to_code(amp * $sin(w * (t - tau))), ADC_PERIOD);
      if (k >= n / 2) begin gs += real'(g) / 16384.0; cnt++; end
    end
    g_mean = gs / real'(cnt);
  endtask

  // least-squares gain for a tone: x1 = 1 - e^{-jw(1+tau)}, x2 = e^{-jw tau} - e^{-jw}
  function automatic real g_opt(input real f, input real theta_deg);
    real w, tau, x1r, x1i, x2r, x2i;
    w = 2.0 * PI * f / FS;
    tau = $cos(theta_deg * PI / 180.0);
    x1r = 1.0 - $cos(w * (1.0 + tau)); x1i = $sin(w * (1.0 + tau));
    x2r = $cos(w * tau) - $cos(w);     x2i = -$sin(w * tau) + $sin(w);
    return (x1r * x2r + x1i * x2i) / (x2r * x2r + x2i * x2i);
  endfunction

  initial begin
    real gm, ge;
    ref_reset(rs, 0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. interferer straight behind
    tone_scene(1800.0, 0.5, 180.0, 3000, gm);
    checks++;
    if (g > 16'sd160) begin failures++; $display("FAIL 180 deg: G=%0d not near 0", g); end
    $display("180 deg: mean G %f (ideal 0)", gm);

    // 2. interferer at 60 deg: optimum beyond the G <= 1 limit
    tone_scene(1800.0, 0.5, 60.0, 3000, gm);
    checks++;
    if (g != Q_ONE) begin failures++; $display("FAIL 60 deg: G=%0d not clamped at 1", g); end
    $display("60 deg: mean G %f (optimum %f, limited to 1)", gm, g_opt(1800.0, 60.0));

    // 3. interferer at 120 deg
    tone_scene(1800.0, 0.5, 120.0, 4000, gm);
    ge = g_opt(1800.0, 120.0);
    checks++;
    if (gm < ge - 0.05 || gm > ge + 0.05) begin
      failures++; $display("FAIL 120 deg: mean G %f, optimum %f", gm, ge);
    end
    $display("120 deg: mean G %f (optimum %f, eq. (1) gives %f)", gm, ge, 1.0/3.0);

    // 4. uncorrelated loud noise
    for (int k = 0; k < 1000; k++)
      strobe(longint'($urandom_range(0, 65535)), longint'($urandom_range(0, 65535)), ADC_PERIOD);

    // let the last sample finish, then everything must have been compared
    repeat (100) @(negedge clk);
    checks++;
    if (exp_zq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_zq.size()); end
    checks++;
    if (n_z * 2 != n_strobe) begin
      failures++; $display("FAIL %0d outputs for %0d strobes", n_z, n_strobe);
    end

    // 5. strobes too fast for the core
    checks++;
    if (overrun) begin failures++; $display("FAIL overrun before scene 5"); end
    check_z = 0;
    for (int k = 0; k < 20; k++) strobe(32768, 32768, 12);
    repeat (4) @(negedge clk);
    checks++;
    if (!overrun) begin failures++; $display("FAIL overrun not flagged"); end

    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen_state[s] == 0) begin failures++; $display("FAIL state %0d never entered", s); end
    end
    checks++; if (n_gray_bad != 0) begin failures++; $display("FAIL %0d non-Gray steps", n_gray_bad); end
    checks++; if (n_lo == 0)   begin failures++; $display("FAIL G never clamped at 0"); end
    checks++; if (n_hi == 0)   begin failures++; $display("FAIL G never clamped at 1"); end
    checks++; if (n_zsat == 0) begin failures++; $display("FAIL z never saturated"); end
    $display("mechanisms: strobes=%0d outputs=%0d clamp0=%0d clamp1=%0d zsat=%0d overrun=%0b",
             n_strobe, n_z, n_lo, n_hi, n_zsat, overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
