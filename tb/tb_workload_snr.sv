// tb_workload_snr: runs the beamformer on the conference-room style
// experiment: a wanted source straight ahead (0 deg) and a 1.8 kHz tone
// interferer from another direction, and measures the SNR improvement.
//
// The wanted signal is a 500 Hz tone standing in for speech. For each
// interferer direction the design is reset, run 6000 ADC samples, and over
// the second half the power of each tone is measured by correlating with a
// sine/cosine pair at its frequency, at the front microphone (input) and at
// z (output). SNR improvement = output SNR - input SNR in dB; every direction
// must improve by more than 10 dB. The mean adapted G is also compared with
// the least-squares optimum for the tone, and for the directions 90 and 180
// deg (the pattern nulls) with 1 and 0.
//
// A second set replaces the tone interferer by a broadband one standing in
// for a competing talker: 40 sinusoids of random frequency in 200 Hz-4 kHz
// and random phase, evaluated exactly at the fractional inter-microphone
// delay. Its output power is the total power of z minus the target tone's
// power; the improvement must exceed 6 dB for 180, 150 and 105 deg.
module tb_workload_snr;
  import bf_pkg::*;

  localparam int  ADC_PERIOD = 40;
  localparam int  N_SAMPLES  = 6000;
  localparam real PI = 3.14159265358979;
  localparam real FS = 340.0 / 0.012;
  localparam real F_T = 500.0, F_N = 1800.0;
  localparam real A_T = 0.3,   A_N = 0.3;

  logic clk = 1'b0, rst_n = 1'b0, adc_valid = 1'b0;
  logic [15:0] radc_a = '0, radc_b = '0;
  sample_t z, y, g;
  logic z_valid, overrun, g_clamp_lo, g_clamp_hi, z_sat;
  bf_state_t state;
  int checks = 0, failures = 0;

  beamformer_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] to_code(input real v);
    longint c;
    c = longint'($floor(v * 32768.0 + 0.5)) + 32768;
    return 16'((c < 0) ? 0 : (c > 65535) ? 65535 : c);
  endfunction

  function automatic real g_opt(input real f, input real theta_deg);
    real w, tau, x1r, x1i, x2r, x2i;
    w = 2.0 * PI * f / FS;
    tau = $cos(theta_deg * PI / 180.0);
    x1r = 1.0 - $cos(w * (1.0 + tau)); x1i = $sin(w * (1.0 + tau));
    x2r = $cos(w * tau) - $cos(w);     x2i = -$sin(w * tau) + $sin(w);
    return (x1r * x2r + x1i * x2i) / (x2r * x2r + x2i * x2i);
  endfunction

  localparam int NB = 40;
  real bb_w [NB], bb_ph [NB];
  real bb_amp;
  real zsum2;                    // sum of z^2 while measuring

  function automatic real bb(input real t);
    real v;
    v = 0.0;
    for (int k = 0; k < NB; k++) v += bb_amp * $sin(bb_w[k] * t + bb_ph[k]);
    return v;
  endfunction

  // correlators: [0] target at input, [1] noise at input, [2] target at z, [3] noise at z
  real ci [4], cq [4];
  real last_a;
  int  n_out;
  bit  measuring;
  real wt_ds, wn_ds;

  always @(posedge clk) begin
    if (z_valid && measuring) begin
      real zt;
      zt = real'(z) / 16384.0;
      zsum2 += zt * zt;
      ci[2] += zt * $cos(wt_ds * n_out); cq[2] += zt * $sin(wt_ds * n_out);
      ci[3] += zt * $cos(wn_ds * n_out); cq[3] += zt * $sin(wn_ds * n_out);
      ci[0] += last_a * $cos(wt_ds * n_out); cq[0] += last_a * $sin(wt_ds * n_out);
      ci[1] += last_a * $cos(wn_ds * n_out); cq[1] += last_a * $sin(wn_ds * n_out);
      n_out++;
    end
  end

  function automatic real pw(input int k);
    return ci[k] * ci[k] + cq[k] * cq[k];
  endfunction

  task automatic run_direction(input real theta_deg, input bit broadband);
    real wt, wn, tau, gsum, snr_in, snr_out, imp, ge, pn_in, pt_out;
    int  gcnt;
    wt = 2.0 * PI * F_T / FS;
    wn = 2.0 * PI * F_N / FS;
    wt_ds = 2.0 * wt; wn_ds = 2.0 * wn;
    tau = $cos(theta_deg * PI / 180.0);
    for (int k = 0; k < 4; k++) begin ci[k] = 0.0; cq[k] = 0.0; end
    n_out = 0; measuring = 0; gsum = 0.0; gcnt = 0; zsum2 = 0.0; pn_in = 0.0;
    @(negedge clk) rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N_SAMPLES; n++) begin
      real t, va, vb;
      t  = real'(n);
      // wanted source at 0 deg reaches the back microphone one sample later
      if (broadband) begin
        va = A_T * $sin(wt * t)         + bb(t);
        vb = A_T * $sin(wt * (t - 1.0)) + bb(t - tau);
        if (measuring && n % 2 == 1) pn_in += bb(t) * bb(t);
      end else begin
        va = A_T * $sin(wt * t)         + A_N * $sin(wn * t);
        vb = A_T * $sin(wt * (t - 1.0)) + A_N * $sin(wn * (t - tau));
      end
      if (n == N_SAMPLES / 2) measuring = 1;
      @(negedge clk);
      radc_a = to_code(va); radc_b = to_code(vb); adc_valid = 1'b1;
      if (n % 2 == 1) last_a = real'((int'(radc_a) - 32768) / 2) / 16384.0;
      @(negedge clk);
      adc_valid = 1'b0;
      repeat (ADC_PERIOD - 2) @(negedge clk);
      if (measuring) begin gsum += real'(g) / 16384.0; gcnt++; end
    end
    measuring = 0;
    if (broadband) begin
      // tone power from the correlator: amplitude 2|C|/N, power amplitude^2/2
      pt_out  = 2.0 * pw(2) / (real'(n_out) * real'(n_out));
      snr_in  = 10.0 * $log10((A_T * A_T / 2.0) / (pn_in / real'(n_out)));
      snr_out = 10.0 * $log10(pt_out / (zsum2 / real'(n_out) - pt_out));
    end else begin
      snr_in  = 10.0 * $log10(pw(0) / pw(1));
      snr_out = 10.0 * $log10(pw(2) / (pw(3) + 1e-30));
    end
    imp = snr_out - snr_in;
    ge = g_opt(F_N, theta_deg);
    if (ge > 1.0) ge = 1.0;
    if (ge < 0.0) ge = 0.0;
    $display("%s interferer %5.1f deg: mean G %6.4f (tone optimum %6.4f, eq.(1) %6.4f)  SNR in %6.2f dB out %6.2f dB  improvement %6.2f dB",
             broadband ? "broadband" : "tone", theta_deg, gsum / gcnt, ge, (1.0 + tau) / (1.0 - tau), snr_in, snr_out, imp);
    checks++;
    if (imp < (broadband ? 6.0 : 10.0)) begin failures++; $display("FAIL SNR improvement %f dB", imp); end
    if (!broadband) begin
      checks++;
      if ((gsum / gcnt) < ge - 0.05 || (gsum / gcnt) > ge + 0.05) begin
        failures++; $display("FAIL mean G off the optimum");
      end
    end
    checks++;
    if (overrun) begin failures++; $display("FAIL overrun"); end
  endtask

  initial begin
    run_direction(180.0, 0);   // tone interferer
    run_direction(150.0, 0);
    run_direction(105.0, 0);
    run_direction(120.0, 0);   // pattern nulls
    run_direction(90.0, 0);
    // broadband interferer, total RMS about that of the tone above
    bb_amp = A_N / $sqrt(real'(NB));
    for (int k = 0; k < NB; k++) begin
      bb_w[k]  = 2.0 * PI * (200.0 + 3800.0 * real'($urandom_range(0, 10000)) / 10000.0) / FS;
      bb_ph[k] = 2.0 * PI * real'($urandom_range(0, 10000)) / 10000.0;
    end
    run_direction(180.0, 1);
    run_direction(150.0, 1);
    run_direction(105.0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
