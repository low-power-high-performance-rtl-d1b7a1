// Shared definitions for the Vedic (Urdhva Tiryakbhyam) multiplier family.
//
// The multiplier is built in three levels (2x2, 4x4, 8x8). Every level sums
// its partial products with binary adders, and the whole design is offered
// with one of three adder architectures: ripple carry, carry lookahead and
// carry skip. The choice is a structural parameter of type adder_kind_e,
// applied to every adder inside one multiplier. Which architecture to use is
// left open: the three are alternatives with different delay, power and area
// trade-offs, and identical logic function.
package vedic_pkg;

  typedef enum logic [1:0] {
    ADD_RCA  = 2'd0,  // ripple carry adder
    ADD_CLA  = 2'd1,  // carry lookahead adder (two-level carries per group)
    ADD_CSKA = 2'd2   // carry skip adder (group bypass of the carry)
  } adder_kind_e;

  // Bit-group size used by the carry lookahead and carry skip adders. Chosen
  // here: a 4-bit group is the usual unit of both architectures.
  localparam int unsigned ADDER_GROUP = 4;

endpackage
