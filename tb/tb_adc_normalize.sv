// tb_adc_normalize: every one of the 65536 ADC codes is mapped and compared
// with the arithmetic definition (code - 2^15) / 2^15 in Q2.14, i.e.
// floor((code - 32768) / 2); the three anchor points -1.0, 0.0 and 0.99994
// are checked by value as well.
module tb_adc_normalize;
  logic [15:0] radc;
  logic signed [15:0] s;
  int checks = 0, failures = 0;

  adc_normalize dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 65536; c++) begin
      int e;
      radc = 16'(c); #1;
      e = (c - 32768) >>> 1;
      checks++;
      if (int'(s) != e) begin
        failures++;
        if (failures < 10) $display("FAIL code %0d -> %0d, expected %0d", c, s, e);
      end
    end
    radc = 16'h0000; #1; checks++; if (s != -16'sd16384) failures++;
    radc = 16'h8000; #1; checks++; if (s != 16'sd0)      failures++;
    radc = 16'hFFFF; #1; checks++; if (s != 16'sd16383)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
