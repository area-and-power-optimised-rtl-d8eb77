// tb_fixed_beamformer: checks the two cardioid differences x1, x2 and the
// adaptive output y = x1 - G*x2 (product reduced to Q2.14 with floor, then
// saturated) against integer arithmetic for random and extreme inputs.
module tb_fixed_beamformer;
  logic signed [15:0] a_n, b_n, a_d, b_d, x1_r, x1, x2, y;
  logic signed [31:0] gx2_prod;
  int checks = 0, failures = 0;

  fixed_beamformer dut (.*);

  function automatic longint sat(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int an, input int bn, input int ad, input int bd,
                     input int g, input int x1reg);
    longint e1, e2, ey, p;
    a_n = 16'(an); b_n = 16'(bn); a_d = 16'(ad); b_d = 16'(bd); x1_r = 16'(x1reg);
    p = longint'(g) * longint'(bn - ad);
    gx2_prod = 32'(p);
    #1;
    e1 = an - bd;
    e2 = bn - ad;
    ey = sat(longint'(x1reg) - sat(p >>> 14));
    checks++;
    if (x1 != 16'(e1) || x2 != 16'(e2) || y != 16'(ey)) begin
      failures++;
      $display("FAIL in %0d %0d %0d %0d g=%0d x1r=%0d: x1=%0d/%0d x2=%0d/%0d y=%0d/%0d",
               an, bn, ad, bd, g, x1reg, x1, e1, x2, e2, y, ey);
    end
  endtask

  initial begin
    // inputs are normalised samples in [-16384, 16383]
    run(16383, -16384, -16384, 16383, 16384, 32767);
    run(-16384, 16383, 16383, -16384, 16384, -32768);   // saturates y high
    run(-16384, -16384, 16383, 16383, 16384, -32767);   // saturates y low
    run(100, 100, 100, 100, 0, 0);
    for (int i = 0; i < 3000; i++)
      run($urandom_range(0, 32767) - 16384, $urandom_range(0, 32767) - 16384,
          $urandom_range(0, 32767) - 16384, $urandom_range(0, 32767) - 16384,
          $urandom_range(0, 16384), $urandom_range(0, 65535) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
