// mult_pkg: types and constants shared by the multiplier blocks.
//
// booth_sel_t is the set of select signals a radix-4 modified Booth encoder
// hands to its decoder row (NEG, ONE, TWO, as in the Booth encoding table).
// fw_bias() gives the constant that the fixed-width multiplier adds in place
// of the partial products below its minor input correction (MIC) column,
// plus the rounding half-LSB; it is this design's own derivation (see
// bw_fw_pp_array for the formula).
package mult_pkg;

  // Select signals of one Booth digit: digit = (neg ? -1 : +1) * (one ? 1 : two ? 2 : 0)
  typedef struct packed {
    logic neg;   // negate the selected multiple
    logic one;   // select 1 x multiplicand
    logic two;   // select 2 x multiplicand
  } booth_sel_t;

  // Compensation bias, in units of 2^(n-2) (the weight of the MIC column).
  // Expected value of the uniformly distributed partial products in columns
  // 0..n-3 is ((n-3)*2^(n-2)+1)/4, i.e. about (n-3)/4 units; rounded to the
  // nearest integer this is (n-1)/4 (integer division). Two more units are the
  // rounding half-LSB of the n-bit result (2^(n-1)).
  function automatic int fw_bias(input int n);
    return (n - 1) / 4 + 2;
  endfunction

endpackage
