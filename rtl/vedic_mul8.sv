// 8x8 unsigned Vedic multiplier built from four 4x4 Vedic multipliers.
//
// The same divide-and-combine step as the 4x4 level, one level up. With
// a = {aH, aL} and b = {bH, bL} split into nibbles, four 4x4 multipliers run
// in parallel:
//   q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH
// and three adders combine them:
//   Q[3:0]  = q0[3:0] taken directly;
//   right adder (8 bit):  r = q1 + {0000, q0[7:4]} (at most 225 + 14 = 239);
//   left adder (12 bit):  l = {q3, 0000} + {0000, q2};
//   final adder (12 bit): Q[15:4] = l + r.
// This works because a*b = q3*2^8 + (q1 + q2)*2^4 + q0, so Q >> 4 equals
// q3*2^4 + q2 + q1 + q0[7:4]. The carry out of the right adder is wired to
// bit 8 of the final adder's second operand as the block diagram's widths
// suggest, although for 4-bit operands it is always zero. The carries out of
// the left and final adders are likewise always zero and left unconnected.
//
// Interface: q = a * b, 16 bits, unsigned. Combinational, no clock: the
// product is valid one combinational settling time after a and b change.
// ADDER selects the architecture (ripple carry, carry lookahead or carry
// skip) of every adder in this multiplier and in its 4x4 blocks; all adders
// have their carry in tied to zero. The partition, the operand halves of
// each 4x4 block and the adder inputs follow the documented 8x8 block
// diagram; the default ADDER = ripple carry is this design's choice.
module vedic_mul8
  import vedic_pkg::*;
#(
  parameter adder_kind_e ADDER = ADD_RCA
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] q
);
  logic [7:0]  q0, q1, q2, q3;
  logic [7:0]  r;
  logic        r_c;
  logic [11:0] l;
  logic        l_c_unused, f_c_unused;

  vedic_mul4 #(.ADDER(ADDER)) u_m0 (.a(a[3:0]), .b(b[3:0]), .s(q0));
  vedic_mul4 #(.ADDER(ADDER)) u_m1 (.a(a[7:4]), .b(b[3:0]), .s(q1));
  vedic_mul4 #(.ADDER(ADDER)) u_m2 (.a(a[3:0]), .b(b[7:4]), .s(q2));
  vedic_mul4 #(.ADDER(ADDER)) u_m3 (.a(a[7:4]), .b(b[7:4]), .s(q3));

  assign q[3:0] = q0[3:0];

  vedic_adder #(.KIND(ADDER), .W(8)) u_add_right (
    .x(q1), .y({4'b0000, q0[7:4]}), .cin(1'b0), .sum(r), .cout(r_c)
  );

  vedic_adder #(.KIND(ADDER), .W(12)) u_add_left (
    .x({q3, 4'b0000}), .y({4'b0000, q2}), .cin(1'b0), .sum(l), .cout(l_c_unused)
  );

  vedic_adder #(.KIND(ADDER), .W(12)) u_add_final (
    .x(l), .y({3'b000, r_c, r}), .cin(1'b0), .sum(q[15:4]), .cout(f_c_unused)
  );
endmodule
