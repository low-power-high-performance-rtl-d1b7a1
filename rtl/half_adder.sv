// Half adder: sum and carry of two bits.
//
// s = a XOR b, c = a AND b. Purely combinational, no timing beyond gate
// delay. Used by the 2x2 Vedic multiplier to add its crosswise partial
// products; the gate-level structure is this design's own reading of the
// usual 2x2 Urdhva Tiryakbhyam cell.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
