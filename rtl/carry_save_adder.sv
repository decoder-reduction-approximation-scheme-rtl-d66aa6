// carry_save_adder: one word-wide 3:2 compressor (a row of full adders).
//
// Adds three WIDTH-bit rows bit by bit without propagating carries: each
// column produces a sum bit and a carry bit, and the carry row is shifted one
// column to the left. The result satisfies
//   a + b + c == sum + carry   (mod 2**WIDTH),
// the carry out of the top column being dropped because the multiplier's
// result is taken modulo 2**WIDTH. Combinational; building block of csa_tree.
module carry_save_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);

  always_comb begin
    sum      = a ^ b ^ c;
    carry[0] = 1'b0;
    // Full-adder carry (majority) of column i lands in column i+1.
    for (int i = 0; i < WIDTH - 1; i++)
      carry[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

endmodule
