// Shared types of the radix-4 complex Vedic multiplier.
//
// booth_sel_t is the control word a radix-4 Booth encoder hands to one
// partial-product row. Its three bits are the three output columns of the
// Booth truth table: neg (take the two's complement of the selected
// multiple), one (select the multiplicand) and two (select twice the
// multiplicand). At most one of one/two is set; neg with neither set is the
// "-0" row, which still yields a zero partial product.
package cvm_pkg;

  typedef struct packed {
    logic neg;  // Y(i+1): negate the selected multiple
    logic one;  // Y(i)  : select +/-A
    logic two;  // Y(i-1): select +/-2A
  } booth_sel_t;

endpackage
