// mbx_pkg: types and helper functions shared by the expandable radix-4
// Modified Booth multiplier.
//
// booth_sel_t is the one-hot-ish control word a Booth recoder hands to a
// partial-product row: `one` selects the multiplicand, `two` selects it
// shifted left by one, `neg` asks for the row to be negated (inverted here,
// with the +1 "hot one" added elsewhere in the carry-save array).
// blk_pos_t holds the control bits that tell an 8x8 block where it sits in
// a larger multiplier; the set of bits is this design's own choice, the idea
// of position bits comes from the source description of the block.
package mbx_pkg;

  // Booth digit select lines for one partial-product row.
  typedef struct packed {
    logic neg;  // digit is negative
    logic two;  // |digit| = 2
    logic one;  // |digit| = 1
  } booth_sel_t;

  // Position of an expandable block inside a multiplier built from blocks.
  typedef struct packed {
    logic a_lsb;  // block holds the least significant multiplicand slice
    logic a_msb;  // block holds the most significant multiplicand slice
    logic b_msb;  // block holds the most significant multiplier slice
  } blk_pos_t;

  // Radix-4 recoding of the multiplier bits (b[2i+1], b[2i], b[2i-1]):
  // digit = -2*b[2i+1] + b[2i] + b[2i-1].
  function automatic booth_sel_t booth_encode(input logic [2:0] bits);
    booth_sel_t s;
    s.neg = bits[2];
    s.one = bits[1] ^ bits[0];
    s.two = (bits[2] & ~bits[1] & ~bits[0]) | (~bits[2] & bits[1] & bits[0]);
    return s;
  endfunction

  // Signed value (-2..2) of a select word, for testbenches and assertions.
  function automatic int booth_value(input booth_sel_t s);
    int v;
    v = s.two ? 2 : (s.one ? 1 : 0);
    return s.neg ? -v : v;
  endfunction

endpackage
