// mult_pkg: types and constants shared by the multipliers and the filter.
//
// booth_digit_t is the radix-4 Booth digit passed from an encoder to a decoder.
// It is a sign/magnitude form of the digits {-2,-1,0,+1,+2}: `neg` gives the
// sign, `two` selects 2*B and `one` selects 1*B; with neither set the digit is
// zero. The three-field encoding is this design's own choice; the digit set
// and the mapping from multiplier bits follow the radix-4 recoding table.
package mult_pkg;

  // Operand width of the Vedic multiplier used in every filter tap.
  localparam int unsigned DATA_W = 8;

  typedef struct packed {
    logic neg;  // digit is negative
    logic two;  // |digit| == 2
    logic one;  // |digit| == 1
  } booth_digit_t;

endpackage
