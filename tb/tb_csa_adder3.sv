// tb_csa_adder3: the three-operand carry-save adder must equal the plain
// modulo-2^W sum x + y + w for corner and random operands.
module tb_csa_adder3;
  localparam int W = 32;
  logic [W-1:0] x, y, w, sum;
  int checks = 0, failures = 0;

  csa_adder3 #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] a, input logic [W-1:0] b, input logic [W-1:0] c);
    logic [W-1:0] e;
    x = a; y = b; w = c; #1;
    e = a + b + c;
    checks++;
    if (sum !== e) begin
      failures++;
      $display("FAIL %h + %h + %h = %h, expected %h", a, b, c, sum, e);
    end
  endtask

  initial begin
    check('1, '1, '1);
    check('1, 1, 0);
    check(0, 0, 0);
    check(32'h8000_0000, 32'h8000_0000, 32'h0000_2000);
    check(32'h5555_5555, 32'hAAAA_AAAA, 32'h1);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
