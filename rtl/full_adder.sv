// One-bit full adder: the basic cell of the ripple carry and carry skip
// adders.
//
// s = a XOR b XOR cin, cout = majority(a, b, cin). Combinational.
// The adder cells of this multiplier family may be realised in static CMOS
// or with transmission gates; that is a transistor-level choice with the
// same logic function, so only the function is given here.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;
  assign p    = a ^ b;
  assign s    = p ^ cin;
  assign cout = (a & b) | (p & cin);
endmodule
