// booth_encoder: radix-4 Booth decoder for one overlapping 3-bit group.
//
// The group is grp = {x[i+1], x[i], x[i-1]} of the multiplier. The accurate
// decoder (APPROX = 0) follows the radix-4 Booth table:
//   000, 111 -> 0     001, 010 -> +1     011 -> +2
//   100 -> -2         101, 110 -> -1
// The decoder-reduction approximation (APPROX = 1) drops the +-2 outputs and
// maps 011 to +1 and 100 to -1, so the decoder only produces 0, +1 and -1 and
// the partial-product generator never needs the shifted multiplicand. The
// sign of the digit is the top bit of the group; the digit is non-zero when
// the three bits are not all equal.
//
// Interface: grp in, ctrl out (booth_pkg::booth_ctrl_t). Purely
// combinational, no clock.
//
// Both decoding tables follow the source description. The gate-level form
// here is derived from those tables, not from the printed Boolean
// expressions, and the neg/one/two encoding of the output is this design's
// own choice.
module booth_encoder
  import booth_pkg::*;
#(
  parameter bit APPROX = 1'b0  // 1: decoder-reduction approximate decoder
) (
  input  logic [2:0]  grp,
  output booth_ctrl_t ctrl
);

  logic nonzero;  // group is not 000 / 111
  logic odd;      // x[i] differs from x[i-1]: magnitude 1 in the exact table

  always_comb begin
    nonzero  = (grp[2] ^ grp[1]) | (grp[1] ^ grp[0]);
    odd      = grp[1] ^ grp[0];
    ctrl.neg = grp[2] & nonzero;
    if (APPROX) begin
      ctrl.one = nonzero;
      ctrl.two = 1'b0;
    end else begin
      ctrl.one = odd;
      ctrl.two = nonzero & ~odd;
    end
  end

endmodule
