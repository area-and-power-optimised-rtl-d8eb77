// booth_r4_mult: sequential signed multiplier using radix-4 (modified) Booth
// recoding.
//
// The multiplier operand is scanned two bits at a time together with the bit
// below them; each overlapping triple {q[1], q[0], q[-1]} selects one partial
// product from {0, +M, +2M, -M, -2M}. A W-bit operand gives W/2 such digits,
// half as many as radix-2 Booth, which is why this unit replaced the radix-2
// multiplier in the optimised design. Each digit takes two clock cycles: one
// to add the selected multiple into the upper accumulator and one to shift
// the {accumulator, multiplier, q[-1]} register right arithmetically by two.
// A 16x16 product therefore takes 8 digits x 2 cycles = 16 cycles, the count
// the document gives (its radix-2 unit needs 32). The two-cycle split per
// digit is this design's reading of that count.
//
// Interface: pulse start for one cycle with a (multiplicand) and b
// (multiplier) valid; they are captured on that edge. busy is high while
// computing. done pulses for one cycle exactly W clock cycles after the
// start edge, and product (signed, 2W bits) is valid from then until the
// next start. A start while busy is ignored.
module booth_r4_mult #(
  parameter int unsigned W = 16                // operand width, even
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [W-1:0]   a,             // multiplicand
  input  logic signed [W-1:0]   b,             // multiplier (Booth-recoded)
  output logic                  busy,
  output logic                  done,
  output logic signed [2*W-1:0] product
);

  localparam int unsigned AW = W + 2;          // room for +-2M and the sign
  localparam int unsigned CW = $clog2(W/2);

  logic signed [AW-1:0] acc;                   // upper (partial product) half
  logic        [W-1:0]  q;                     // multiplier, shifted out
  logic                 q_m1;                  // q[-1]
  logic signed [AW-1:0] m;                     // sign-extended multiplicand
  logic                 shift_ph;              // 0: add cycle, 1: shift cycle
  logic        [CW-1:0] digit;

  // Booth digit select
  logic signed [AW-1:0] pp;
  always_comb begin
    unique case ({q[1], q[0], q_m1})
      3'b001, 3'b010: pp = m;
      3'b011:         pp = m <<< 1;
      3'b100:         pp = -(m <<< 1);
      3'b101, 3'b110: pp = -m;
      default:        pp = '0;               // 000, 111
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      q        <= '0;
      q_m1     <= 1'b0;
      m        <= '0;
      shift_ph <= 1'b0;
      digit    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          acc      <= '0;
          q        <= b;
          q_m1     <= 1'b0;
          m        <= AW'(a);
          shift_ph <= 1'b0;
          digit    <= '0;
          busy     <= 1'b1;
        end
      end else if (!shift_ph) begin
        acc      <= acc + pp;
        shift_ph <= 1'b1;
      end else begin
        // arithmetic shift of {acc, q, q_m1} right by two
        {acc, q, q_m1} <= {{2{acc[AW-1]}}, acc, q[W-1:1]};
        shift_ph <= 1'b0;
        digit    <= digit + 1'b1;
        if (digit == CW'(W/2 - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign product = {acc[W-1:0], q};

endmodule
