// approx_pkg: names for the five full-adder cells of the approximate-adder
// family. A cell is chosen at elaboration time through a parameter of type
// fa_kind_e; every adder, compressor and transform in this design takes one
// such parameter plus the number of low-order bit positions that use it.
//
//   FA_ACCURATE : conventional 24-transistor mirror adder (exact)
//   FA_APPROX1  : 16 transistors, 1 carry error and 2 sum errors in 8 rows
//   FA_APPROX2  : 14 transistors, sum = inverted carry, 2 sum errors
//   FA_APPROX3  : 11 transistors, approximations 1 and 2 combined
//   FA_APPROX4  : 11 transistors, carry = A, 2 carry and 3 sum errors
// The five cells are the published mirror adder and its approximations; the
// enum encoding is this design's own.
package approx_pkg;

  typedef enum logic [2:0] {
    FA_ACCURATE = 3'd0,
    FA_APPROX1  = 3'd1,
    FA_APPROX2  = 3'd2,
    FA_APPROX3  = 3'd3,
    FA_APPROX4  = 3'd4
  } fa_kind_e;

  // Cell used at bit position `bit_pos` of an adder whose lowest
  // `approx_lsb` positions are approximate.
  function automatic fa_kind_e cell_kind(int bit_pos, int approx_lsb, fa_kind_e kind);
    return (bit_pos < approx_lsb) ? kind : FA_ACCURATE;
  endfunction

endpackage
