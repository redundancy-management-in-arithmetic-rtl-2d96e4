// rbr_pkg: shared types for the radix-2 redundant binary adders.
//
// Every redundant digit is held in two bits, a higher bit h and a lower bit l.
// The value of a digit at position i depends on the digit set:
//   CS2, CS3 : value = 2*h + l            (CS2 forbids h=l=1)
//   SD, SD3- : value = -2*h + l           (two's complement pair; SD forbids h=1,l=0)
//   SD3+     : value = 2*h - l
// so the h bit of digit i and the l bit of digit i+1 carry the same weight
// 2^(i+1). The adders exploit this "equal-weight grouping": position i adds
// the four bits of weight 2^i (l bits of digit i, h bits of digit i-1).
//
// Small signed carries in {-1,0,1} are held as the two-bit type carry_t.
package rbr_pkg;

  // One redundant digit: {h, l}. Bit 1 is h, bit 0 is l.
  typedef struct packed {
    logic h;
    logic l;
  } rdigit_t;

  // Signed carry in {-1, 0, +1}: pos and neg are never both set.
  typedef struct packed {
    logic pos;
    logic neg;
  } scarry_t;

  // Operand length in digits used by the top level when nothing else is set.
  localparam int unsigned DEFAULT_DIGITS = 32;

endpackage
