// tb_beamformer_core: drives random normalised sample sets into the core,
// one every PERIOD cycles, and compares z at every z_valid and y, G after
// every sample with the bit-true model in bf_ref_pkg. It also checks:
//   - z_valid comes 37 cycles after the sample strobe (S0 issue, 16-cycle
//     multiply, store, then the same for S1),
//   - back-to-back samples are processed at one per 73 cycles,
//   - all four Gray-coded states are visited, each transition flips one bit,
//   - both G clamps and z saturation occur at least once,
//   - a third sample arriving while one is pending raises overrun.
module tb_beamformer_core;
  import bf_ref_pkg::*;
  import bf_pkg::*;

  localparam int PERIOD = 80;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sample_t a_n = '0, b_n = '0, a_d = '0, b_d = '0;
  sample_t z, y, g;
  logic z_valid, overrun, g_clamp_lo, g_clamp_hi, z_sat;
  bf_state_t state;
  int checks = 0, failures = 0;
  int seen_state [4];
  int n_lo = 0, n_hi = 0, n_zsat = 0, n_gray_bad = 0;
  ref_state_t rs;
  longint exp_zq [$];          // expected z values, oldest first
  bit check_z = 1;

  beamformer_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors
  bf_state_t prev_state;
  always @(posedge clk) begin
    if (rst_n) begin
      seen_state[state]++;
      if (state != prev_state && !$onehot(state ^ prev_state)) n_gray_bad++;
      n_lo   += int'(g_clamp_lo);
      n_hi   += int'(g_clamp_hi);
      n_zsat += int'(z_sat);
      if (z_valid && check_z) begin
        checks++;
        if (exp_zq.size() == 0) begin
          failures++;
          $display("FAIL unexpected z_valid");
        end else if (longint'(z) != exp_zq[0]) begin
          failures++;
          $display("FAIL z=%0d expected %0d", z, exp_zq[0]);
        end
        if (exp_zq.size() != 0) void'(exp_zq.pop_front());
      end
    end
    prev_state <= state;
  end

  function automatic longint rnd_amp(input int amp);
    return longint'($urandom_range(0, 2*amp)) - longint'(amp);
  endfunction

  task automatic send(input longint an, input longint bn, input longint ad, input longint bd);
    @(negedge clk);
    a_n = sample_t'(an); b_n = sample_t'(bn); a_d = sample_t'(ad); b_d = sample_t'(bd);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    int lat;
    ref_reset(rs, 0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // random samples of varying loudness, with the latency check
    for (int k = 0; k < 1500; k++) begin
      int amp;
      longint an, bn, ad, bd;
      amp = (k < 500) ? 16384 : (k < 1000) ? 2000 : 300;
      an = rnd_amp(amp); bn = rnd_amp(amp); ad = rnd_amp(amp); bd = rnd_amp(amp);
      if (k >= 1000 && k < 1200) begin        // x1 = 2*x2: optimum G is 2, so G clamps at 1
        an = rnd_amp(8000); bn = rnd_amp(8000); bd = rnd_amp(8000);
        ad = bn - (an - bd) / 2;
      end
      ref_step(rs, an, bn, ad, bd);
      exp_zq.push_back(rs.z);
      send(an, bn, ad, bd);
      lat = 0;                       // clock edges after the one that took the strobe
      while (!z_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 37) begin failures++; $display("FAIL z latency %0d", lat); end
      repeat (PERIOD - lat - 2) @(negedge clk);
      checks++;
      if (longint'(y) != rs.y || longint'(g) != rs.g) begin
        failures++;
        $display("FAIL sample %0d: y=%0d/%0d g=%0d/%0d", k, y, rs.y, g, rs.g);
      end
    end

    // back-to-back: each sample is sent as soon as the previous one has been
    // taken, so the core never waits; S0 must then start every 73 cycles
    begin
      int t_s0 [5];
      int cyc;
      longint an, bn, ad, bd;
      cyc = 0;
      for (int k = 0; k < 5; k++) begin
        an = rnd_amp(4000); bn = rnd_amp(4000); ad = rnd_amp(4000); bd = rnd_amp(4000);
        ref_step(rs, an, bn, ad, bd);
        exp_zq.push_back(rs.z);
        send(an, bn, ad, bd);
        cyc += 2;
        // wait until this sample has been taken: the next S3 -> S0 step
        while (!(state == S0 && prev_state == S3)) begin @(negedge clk); cyc++; end
        t_s0[k] = cyc;
      end
      repeat (80) @(negedge clk);     // let the last sample finish
      for (int k = 1; k < 5; k++) begin
        checks++;
        if (k > 1 && (t_s0[k] - t_s0[k-1]) != 73) begin
          failures++;
          $display("FAIL back-to-back spacing %0d cycles", t_s0[k] - t_s0[k-1]);
        end
      end
      checks++;
      if (longint'(g) != rs.g || longint'(y) != rs.y) begin
        failures++;
        $display("FAIL after burst y=%0d/%0d g=%0d/%0d", y, rs.y, g, rs.g);
      end
    end

    // overrun: three strobes in a row while busy
    checks++;
    if (overrun) begin failures++; $display("FAIL overrun set too early"); end
    checks++;
    if (exp_zq.size() != 0) begin failures++; $display("FAIL %0d z outputs missing", exp_zq.size()); end
    check_z = 0;                 // the overrun samples are not modelled
    send(0, 0, 0, 0); repeat (3) @(negedge clk); send(0, 0, 0, 0); send(0, 0, 0, 0);
    repeat (4) @(negedge clk);
    checks++;
    if (!overrun) begin failures++; $display("FAIL overrun not flagged"); end

    // mechanism coverage
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen_state[s] == 0) begin failures++; $display("FAIL state %0d never seen", s); end
    end
    checks++; if (n_gray_bad != 0) begin failures++; $display("FAIL non-Gray steps"); end
    checks++; if (n_lo == 0)   begin failures++; $display("FAIL G never clamped at 0"); end
    checks++; if (n_hi == 0)   begin failures++; $display("FAIL G never clamped at 1"); end
    checks++; if (n_zsat == 0) begin failures++; $display("FAIL z never saturated"); end
    $display("clamp_lo=%0d clamp_hi=%0d z_sat=%0d", n_lo, n_hi, n_zsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
