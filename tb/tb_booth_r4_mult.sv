// tb_booth_r4_mult: self-checking test of the sequential radix-4 Booth
// multiplier. Corner operands (most negative, most positive, zero, +-1) and
// random pairs are multiplied; each product is compared with the simulator's
// own signed multiplication, and the start-to-done latency must be exactly
// 16 cycles for 16-bit operands: busy is high for 16 cycles after the edge
// that captures the operands, and done comes with the last of them.
module tb_booth_r4_mult;
  localparam int W = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [W-1:0] a = '0, b = '0;
  logic busy, done;
  logic signed [2*W-1:0] product;
  int checks = 0, failures = 0;

  booth_r4_mult #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul(input logic signed [W-1:0] x, input logic signed [W-1:0] y);
    int lat;
    logic signed [2*W-1:0] exp_p;
    exp_p = 32'(x) * 32'(y);
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0; a = 16'($urandom); b = 16'($urandom);  // operands must be captured
    lat = 0;                         // cycles spent busy after the capture edge
    while (!done) begin
      if (busy) lat++;
      @(negedge clk);
    end
    checks++;
    if (product !== exp_p) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", x, y, product, exp_p);
    end
    checks++;
    if (lat != W) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", lat, W);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    mul(16'sh8000, 16'sh8000);
    mul(16'sh8000, 16'sh7FFF);
    mul(16'sh7FFF, 16'sh7FFF);
    mul(16'sh7FFF, 16'sh8000);
    mul(0, 16'sh1234);
    mul(-1, -1);
    mul(-1, 16'sh4000);
    mul(16'sd4520, 16'sd16384);
    mul(16'sd15988, -16'sd16384);
    for (int i = 0; i < 300; i++) mul(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
