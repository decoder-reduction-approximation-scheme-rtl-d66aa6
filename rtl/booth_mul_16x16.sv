// booth_mul_16x16: signed radix-4 Booth multiplier with an optional
// decoder-reduction approximation.
//
// The product c = a * b of two WIDTH-bit two's-complement numbers is formed
// in four combinational stages:
//   1. booth_encoder: the multiplier b, with a 0 appended below its LSB, is
//      cut into WIDTH/2 overlapping 3-bit groups {b[2g+1], b[2g], b[2g-1]};
//      each group is decoded into a Booth digit in {-2,-1,0,+1,+2}.
//   2. pp_gen: each digit selects 0, a or 2a, inverted when negative. The
//      partial product of group g is sign-extended to 2*WIDTH bits and
//      shifted left by 2g. The +1s that complete the negations form one
//      further row with neg_g in column 2g.
//   3. csa_tree: the WIDTH/2 + 1 rows are reduced to two by 3:2 carry-save
//      adders (9 -> 6 -> 4 -> 3 -> 2 rows for WIDTH = 16).
//   4. cla_adder: a carry-lookahead adder adds the two rows into c.
//
// Approximation: the APPROX_GROUPS least significant groups use the
// decoder-reduction decoder, which replaces every +-2 digit by +-1. With
// APPROX_GROUPS = 0 (the default) the multiplier is exact; raising it trades
// accuracy in the low-order part of the product for simpler decoders and
// partial-product generators (no 2a path) in those groups. The error is zero
// whenever no approximated group holds 011 or 100, and otherwise equals
// -sum(d_g * a * 4**g) over the approximated groups g whose digit d_g was +-2
// was replaced by half of it.
//
// Interface: a (multiplicand) and b (multiplier), WIDTH bits each, signed;
// c, 2*WIDTH bits, signed product. There is no clock: the product follows
// the operands after the combinational delay, as in the source's simulation,
// where c settles on a new value whenever a and b change.
//
// From the source: the module name, the 16-bit operands and 32-bit product,
// the eight radix-4 groups, the exact and approximate decoding tables, and
// the stage order encoder -> partial products -> carry-save tree -> final
// adder. This design's own choices: which operand is Booth-recoded, signed
// operands only, the separate row of negation bits with plain sign
// extension, and the per-group (least significant first) approximation
// control.
module booth_mul_16x16
  import booth_pkg::*;
#(
  parameter int WIDTH         = 16,  // operand width
  parameter int APPROX_GROUPS = 0    // low-order groups using the DRA decoder
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] c
);

  localparam int NG   = WIDTH / 2;  // Booth groups = partial products
  localparam int PW   = 2 * WIDTH;  // product width
  localparam int ROWS = NG + 1;     // partial products + negation-bit row

  initial begin
    assert (WIDTH % 4 == 0 && WIDTH >= 4)
      else $error("booth_mul_16x16: WIDTH must be a multiple of 4");
    assert (APPROX_GROUPS >= 0 && APPROX_GROUPS <= NG)
      else $error("booth_mul_16x16: APPROX_GROUPS out of range");
  end

  logic [WIDTH:0]   b_ext;       // multiplier with the implicit 0 below its LSB
  booth_ctrl_t      ctrl [NG];
  logic [WIDTH:0]   pp   [NG];
  logic [NG-1:0]    neg;
  logic [PW-1:0]    rows [ROWS];
  logic [PW-1:0]    tree_sum, tree_carry;
  logic             unused_cout;

  assign b_ext = {b, 1'b0};

  for (genvar g = 0; g < NG; g++) begin : g_grp
    booth_encoder #(.APPROX(g < APPROX_GROUPS)) u_enc (
      .grp (b_ext[2*g +: 3]),
      .ctrl(ctrl[g])
    );

    pp_gen #(.WIDTH(WIDTH)) u_pp (
      .x   (a),
      .ctrl(ctrl[g]),
      .pp  (pp[g]),
      .neg (neg[g])
    );

    // Sign-extend to the product width and align to column 2g.
    assign rows[g] = PW'({{(PW-WIDTH-1){pp[g][WIDTH]}}, pp[g]}) << (2 * g);
  end

  // Row of two's-complement correction bits: neg_g in column 2g.
  always_comb begin
    rows[NG] = '0;
    for (int g = 0; g < NG; g++) rows[NG][2*g] = neg[g];
  end

  csa_tree #(.WIDTH(PW), .ROWS(ROWS)) u_tree (
    .rows (rows),
    .sum  (tree_sum),
    .carry(tree_carry)
  );

  cla_adder #(.WIDTH(PW)) u_final (
    .a   (tree_sum),
    .b   (tree_carry),
    .cin (1'b0),
    .s   (c),
    .cout(unused_cout)
  );

endmodule
