// mac_pkg: sizes and types shared by the 16x16 multiply-accumulate datapath.
//
// The operand width (16) and the final adder width (32) are the sizes the
// design is built around. The radix-4 Booth control bundle is the set of five
// one-hot select lines (Z, +1X, -1X, +2X, -2X) that the encoder sends to every
// selector of its partial-product row.
package mac_pkg;
  parameter int unsigned N     = 16;        // operand width (signed)
  parameter int unsigned ACC_W = 2 * N;     // accumulator / final adder width
  parameter int unsigned NPP   = N / 2;     // radix-4 partial products

  // One-hot Booth controls. Exactly one field is 1.
  typedef struct packed {
    logic z;    // partial product is 0
    logic p1;   // +1 x multiplicand
    logic m1;   // -1 x multiplicand
    logic p2;   // +2 x multiplicand
    logic m2;   // -2 x multiplicand
  } booth_ctrl_t;
endpackage
