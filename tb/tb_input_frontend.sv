// tb_input_frontend: drives a random stream of ADC pairs with gaps between
// strobes. The model keeps the normalised history and checks that an output
// appears on every second strobe only, one cycle after it, carrying the
// current pair and the pair of the strobe just before (the dropped one).
module tb_input_frontend;
  logic clk = 1'b0, rst_n = 1'b0, adc_valid = 1'b0;
  logic [15:0] radc_a = '0, radc_b = '0;
  logic out_valid;
  logic signed [15:0] a_n, b_n, a_d, b_d;
  int checks = 0, failures = 0, outputs = 0;

  input_frontend dut (.*);
  always #5 clk = ~clk;

  function automatic logic signed [15:0] norm(input logic [15:0] c);
    return 16'((int'(c) - 32768) >>> 1);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] pa, pb;
    pa = 0; pb = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      logic [15:0] ra, rb;
      ra = $urandom; rb = $urandom;
      @(negedge clk);
      radc_a = ra; radc_b = rb; adc_valid = 1'b1;
      @(negedge clk);
      adc_valid = 1'b0; radc_a = $urandom; radc_b = $urandom;
      checks++;
      if (out_valid != (k % 2 == 1)) begin
        failures++;
        $display("FAIL strobe %0d: out_valid=%0b", k, out_valid);
      end
      if (k % 2 == 1) begin
        outputs++;
        checks++;
        if (a_n != norm(ra) || b_n != norm(rb) || a_d != pa || b_d != pb) begin
          failures++;
          $display("FAIL strobe %0d: got %0d %0d %0d %0d exp %0d %0d %0d %0d",
                   k, a_n, b_n, a_d, b_d, norm(ra), norm(rb), pa, pb);
        end
      end
      pa = norm(ra); pb = norm(rb);
      repeat ($urandom_range(0, 4)) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("FAIL stray out_valid"); end
      end
    end
    checks++;
    if (outputs != 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
