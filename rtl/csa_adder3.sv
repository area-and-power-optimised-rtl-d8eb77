// csa_adder3: three-operand adder (A3 of the datapath) built as one carry-save
// row followed by a single carry-propagate adder.
//
// The 3:2 carry-save row reduces x + y + w to a sum word and a carry word
// with full adders that have no carry chain between bit positions; only the
// final add of those two words propagates a carry. This is the "carry save
// adder" the document uses for its multi-operand additions. The result wraps
// modulo 2^W like a plain W-bit adder; the caller sizes W so that it cannot
// overflow. Purely combinational.
module csa_adder3 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] w,
  output logic [W-1:0] sum
);

  logic [W-1:0] s_row;   // bitwise sum of the carry-save row
  logic [W-1:0] c_row;   // carries, already weighted one bit up

  always_comb begin
    s_row = x ^ y ^ w;
    c_row = {((x[W-2:0] & y[W-2:0]) | (x[W-2:0] & w[W-2:0]) | (y[W-2:0] & w[W-2:0])), 1'b0};
  end

  assign sum = s_row + c_row;

endmodule
