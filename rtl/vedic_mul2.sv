// 2x2 unsigned Vedic multiplier (Urdhva Tiryakbhyam, "vertically and
// crosswise").
//
// The product columns are formed at once instead of row by row: column 0 is
// the vertical product a0*b0, column 1 the sum of the crosswise products
// a1*b0 + a0*b1, column 2 the vertical product a1*b1 plus the carry from
// column 1. Four AND gates and two half adders.
//
// Interface: p = a * b, 4 bits. Combinational, no clock. The column scheme is
// the Urdhva method; the half-adder realisation is this design's choice.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  assign p[0] = a[0] & b[0];

  half_adder u_col1 (
    .a(a[1] & b[0]),
    .b(a[0] & b[1]),
    .s(p[1]),
    .c(c1)
  );

  half_adder u_col2 (
    .a(a[1] & b[1]),
    .b(c1),
    .s(p[2]),
    .c(p[3])
  );
endmodule
