// W-bit ripple carry adder.
//
// A chain of W full adders: the carry out of each stage is the carry in of
// the next more significant stage, so the sum settles only after the carry
// has rippled through every stage. Smallest of the three adder
// architectures, and the slowest in the worst case.
//
// Interface: sum = x + y + cin (mod 2^W), cout = carry out of bit W-1.
// Combinational, no clock. The default width of 4 is this design's choice;
// the multipliers instantiate widths 2, 4, 8 and 12.
module ripple_carry_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_stage
    full_adder u_fa (
      .a   (x[i]),
      .b   (y[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
