// 4x4 unsigned Vedic multiplier built from four 2x2 Vedic multipliers.
//
// Each operand is split into 2-bit halves (A3A2, A1A0 and B3B2, B1B0) and
// the four half products are formed in parallel:
//   q0 = A1A0*B1B0   q1 = A3A2*B1B0   q2 = A1A0*B3B2   q3 = A3A2*B3B2
// They are then combined with three adders:
//   s[1:0] = q0[1:0] taken directly;
//   adder 1 (4 bit): t = q1 + q2, carry c1;
//   adder 2 (4 bit): s[5:2] = t + {q3[1:0], q0[3:2]}, carry c2;
//   adder 3 (2 bit): s[7:6] = q3[3:2] + c1 + c2.
// Adders 1 and 2 have their carry in tied to zero. The carry out of adder 3
// is always zero for a 4x4 product and is left unconnected.
//
// Interface: s = a * b, 8 bits. Combinational, no clock. ADDER selects the
// architecture of all three adders. The four 2x2 blocks, the three adders
// and the zero carry inputs follow the documented 4x4 structure; the exact
// bit alignment at each adder is worked out here from the arithmetic.
module vedic_mul4
  import vedic_pkg::*;
#(
  parameter adder_kind_e ADDER = ADD_RCA
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] s
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] t;
  logic       c1, c2;
  logic       c3_unused;

  vedic_mul2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_mul2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_mul2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_mul2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  assign s[1:0] = q0[1:0];

  vedic_adder #(.KIND(ADDER), .W(4)) u_add1 (
    .x(q1), .y(q2), .cin(1'b0), .sum(t), .cout(c1)
  );

  vedic_adder #(.KIND(ADDER), .W(4)) u_add2 (
    .x(t), .y({q3[1:0], q0[3:2]}), .cin(1'b0), .sum(s[5:2]), .cout(c2)
  );

  vedic_adder #(.KIND(ADDER), .W(2)) u_add3 (
    .x(q3[3:2]), .y({1'b0, c1}), .cin(c2), .sum(s[7:6]), .cout(c3_unused)
  );
endmodule
