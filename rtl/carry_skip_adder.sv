// W-bit carry skip (carry bypass) adder.
//
// The bits are split into groups of GROUP; each group is a small ripple carry
// adder. An AND over the group's propagate bits (p = x XOR y) tells whether
// every bit of the group would pass an incoming carry on unchanged. When it
// does, the group's carry in is sent straight to the next group instead of
// waiting for it to ripple through the group. A last group narrower than
// GROUP is allowed when W is not a multiple of it.
//
// Interface: sum = x + y + cin (mod 2^W), cout = carry out of bit W-1.
// Combinational, no clock. The skip condition (all bits of a group propagate)
// is the usual carry skip rule; GROUP = 4 is this design's choice.
module carry_skip_adder #(
  parameter int unsigned W     = 4,
  parameter int unsigned GROUP = vedic_pkg::ADDER_GROUP
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = (W + GROUP - 1) / GROUP;

  logic [NG:0] gc;  // carry into each group
  assign gc[0] = cin;

  for (genvar gi = 0; gi < NG; gi++) begin : g_group
    localparam int unsigned LO = gi * GROUP;
    localparam int unsigned GW = ((W - LO) < GROUP) ? (W - LO) : GROUP;

    logic          ripple_cout;
    logic          skip;

    ripple_carry_adder #(.W(GW)) u_rca (
      .x   (x[LO +: GW]),
      .y   (y[LO +: GW]),
      .cin (gc[gi]),
      .sum (sum[LO +: GW]),
      .cout(ripple_cout)
    );

    assign skip       = &(x[LO +: GW] ^ y[LO +: GW]);
    assign gc[gi + 1] = skip ? gc[gi] : ripple_cout;
  end

  assign cout = gc[NG];
endmodule
