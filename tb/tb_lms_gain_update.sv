// tb_lms_gain_update: G(n+1) = clamp(G + floor(y*x2 / 2^16), 0, 1.0) with
// y*x2 the Q4.28 product, i.e. step 2*mu = 0.25 applied as a 2-bit shift.
// Random gains and products, plus cases that must clamp at 0 and at 1; the
// clamp flags are checked too.
module tb_lms_gain_update;
  logic signed [15:0] g_in, g_out;
  logic signed [31:0] yx2_prod;
  logic clamp_lo, clamp_hi;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;

  lms_gain_update dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int g, input int yv, input int xv);
    longint p, s, e;
    bit elo, ehi;
    p = longint'(yv) * longint'(xv);
    g_in = 16'(g); yx2_prod = 32'(p); #1;
    s = longint'(g) + (p >>> 16);
    elo = s < 0; ehi = s > 16384;
    e = elo ? 0 : ehi ? 16384 : s;
    checks++;
    if (g_out != 16'(e) || clamp_lo != elo || clamp_hi != ehi) begin
      failures++;
      $display("FAIL g=%0d y=%0d x2=%0d -> %0d (%0b%0b), expected %0d (%0b%0b)",
               g, yv, xv, g_out, clamp_lo, clamp_hi, e, elo, ehi);
    end
    n_lo += elo; n_hi += ehi;
  endtask

  initial begin
    run(0, 16384, 16384);        // +0.25 step: 0 -> 4096
    run(16384, 16384, 16384);    // clamps at 1
    run(0, -16384, 16384);       // clamps at 0
    run(8192, 0, 12345);
    run(1, -1, 1);               // floor of a tiny negative step: -1 -> clamps
    for (int i = 0; i < 3000; i++)
      run($urandom_range(0, 16384), $urandom_range(0, 65535) - 32768,
          $urandom_range(0, 65535) - 32768);
    checks++;
    if (n_lo == 0 || n_hi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
