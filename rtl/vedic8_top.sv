// Top level: the three 8x8 Vedic multiplier variants side by side.
//
// The multiplier is defined once (vedic_mul8) and offered with three adder
// architectures that trade delay, area and power against each other while
// computing the same product. This top instantiates all three on shared
// operands so that they can be compared and cross-checked:
//   p_rca  - every adder a ripple carry adder
//   p_cla  - every adder a carry lookahead adder
//   p_cska - every adder a carry skip adder
// For any a, b all three outputs equal the unsigned product a*b.
//
// Interface: 8-bit unsigned operands in, three 16-bit products out.
// Combinational, no clock or reset. Building the three variants into one
// top is this design's own choice; a user normally instantiates the single
// vedic_mul8 with the ADDER parameter of their choice.
module vedic8_top
  import vedic_pkg::*;
(
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p_rca,
  output logic [15:0] p_cla,
  output logic [15:0] p_cska
);
  vedic_mul8 #(.ADDER(ADD_RCA))  u_mul_rca  (.a(a), .b(b), .q(p_rca));
  vedic_mul8 #(.ADDER(ADD_CLA))  u_mul_cla  (.a(a), .b(b), .q(p_cla));
  vedic_mul8 #(.ADDER(ADD_CSKA)) u_mul_cska (.a(a), .b(b), .q(p_cska));
endmodule
