// pp_gen: partial-product generator for one radix-4 Booth digit.
//
// Selects 0, X or 2X of the signed multiplicand X under the encoder's
// controls and, for a negative digit, inverts the selected value. The +1
// that completes the two's-complement negation is not added here: it is
// brought out as `neg` and placed by the multiplier as a separate bit in the
// column of the partial product's least significant bit, so no carry chain
// is needed per partial product.
//
// Interface: x (WIDTH-bit two's-complement multiplicand), ctrl
// (booth_pkg::booth_ctrl_t) in; pp (WIDTH+1 bits, two's complement, already
// inverted when ctrl.neg) and neg out. Combinational.
//
// The 0 / +-X / +-2X selection follows the source description; the
// invert-plus-separate-carry form is this design's own choice.
module pp_gen
  import booth_pkg::*;
#(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  booth_ctrl_t      ctrl,
  output logic [WIDTH:0]   pp,
  output logic             neg
);

  logic [WIDTH:0] x1;   // X sign-extended to WIDTH+1 bits
  logic [WIDTH:0] x2;   // 2X
  logic [WIDTH:0] mag;  // selected magnitude term

  always_comb begin
    x1 = {x[WIDTH-1], x};
    x2 = {x, 1'b0};
    unique case ({ctrl.two, ctrl.one})
      2'b01:   mag = x1;
      2'b10:   mag = x2;
      default: mag = '0;
    endcase
    // A zero digit is never negated, so neg only matters for a selected term.
    neg = ctrl.neg & (ctrl.one | ctrl.two);
    pp  = neg ? ~mag : mag;
  end

endmodule
