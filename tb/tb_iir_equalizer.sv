// tb_iir_equalizer: temp = sat(y(n) + y(n-1)) and
// z = sat(floor((C1*temp + C3*z_old + 2^13) / 2^14)) from given products,
// for random and saturating cases. Also runs the recursion over a stream of
// samples, feeding the products back the way the core does, and checks the
// DC gain against (2*C1)/(1-C3) = 22.8 within the quantisation.
module tb_iir_equalizer;
  logic signed [15:0] y_n, y_nm1, temp, z;
  logic signed [31:0] pt_prod, pz_prod;
  logic z_sat;
  int checks = 0, failures = 0;

  localparam int C1 = 4520, C3 = 15988;   // round(0.2759*2^14), round(0.9758*2^14)

  iir_equalizer dut (.*);

  function automatic longint sat(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int yn, input int ynm1, input int tprev, input int zprev);
    longint et, pt, pz, ez;
    bit es;
    pt = longint'(C1) * tprev;
    pz = longint'(C3) * zprev;
    y_n = 16'(yn); y_nm1 = 16'(ynm1); pt_prod = 32'(pt); pz_prod = 32'(pz); #1;
    et = sat(longint'(yn) + ynm1);
    ez = (pt + pz + 8192) >>> 14;
    es = ez != sat(ez);
    ez = sat(ez);
    checks++;
    if (temp != 16'(et) || z != 16'(ez) || z_sat != es) begin
      failures++;
      $display("FAIL y=%0d,%0d t=%0d z=%0d: temp=%0d/%0d z=%0d/%0d sat=%0b",
               yn, ynm1, tprev, zprev, temp, et, z, ez, z_sat);
    end
  endtask

  initial begin
    real gain;
    logic signed [15:0] zz, tt;
    run(32767, 32767, 32767, 32767);       // saturates both
    run(-32768, -32768, -32768, -32768);
    run(0, 0, 0, 0);
    for (int i = 0; i < 3000; i++)
      run($urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768,
          $urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768);
    // DC response: constant y = 0.05 (819), expected settle near 0.05*22.8
    zz = 0; tt = 0;
    for (int n = 0; n < 2000; n++) begin
      y_n = 16'sd819; y_nm1 = 16'sd819;
      pt_prod = 32'(longint'(C1) * tt);
      pz_prod = 32'(longint'(C3) * zz);
      #1;
      zz = z; tt = temp;
    end
    gain = real'(zz) / 819.0;
    checks++;
    if (gain < 22.0 || gain > 23.6) begin
      failures++;
      $display("FAIL DC gain %f", gain);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
