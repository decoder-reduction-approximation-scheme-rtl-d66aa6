// booth_pkg: types and constants shared by the radix-4 Booth multiplier.
//
// A radix-4 Booth digit takes one of the values -2, -1, 0, +1, +2. It is
// carried between the encoder and the partial-product generator as three
// one-hot-style control bits: `one` selects the multiplicand, `two` selects
// the multiplicand shifted left by one, and `neg` asks for the negated value.
// Zero is the case where neither `one` nor `two` is set. Using three control
// lines (rather than a binary digit code) is this design's own choice; the
// add / subtract / zero view of the approximate decoder maps onto it as
// add = (one|two) & ~neg, subtract = (one|two) & neg, zero = ~(one|two).
package booth_pkg;

  typedef struct packed {
    logic neg;  // partial product is subtracted
    logic one;  // select 1 x multiplicand
    logic two;  // select 2 x multiplicand
  } booth_ctrl_t;

endpackage
