// rb_mac_pkg: shared types and constants of the redundant-binary (RB) MAC.
//
// An RB digit takes the values -1, 0 and +1 and is carried as a pair of bits
// (pos, neg) whose value is pos - neg. A W-digit RB number is therefore two
// W-bit vectors, P and M, with value P - M. All RB words in this design are
// interpreted modulo 2^W, which is enough because the final product is a
// 2N-bit two's-complement number.
//
// booth_sel_t is the output of one radix-4 modified Booth encoder: the digit
// is 0, +-1 or +-2 times the multiplicand, selected by one/two and signed by
// neg. The zero digit always has neg = 0 in this design.
package rb_mac_pkg;

  // Operand width of the MAC (the document's main configuration is 32 bits).
  localparam int unsigned MAC_N = 32;

  typedef struct packed {
    logic neg;  // digit is negative
    logic two;  // magnitude 2
    logic one;  // magnitude 1
  } booth_sel_t;

endpackage
