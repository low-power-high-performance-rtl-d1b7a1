// W-bit carry lookahead adder.
//
// Each bit forms generate g = x AND y and propagate p = x XOR y. The bits are
// taken in fixed groups of GROUP; inside a group every carry is written
// directly as two-level (AND-OR) logic of the g, p of the lower bits and the
// group's carry in, so all carries of a group appear at the same time rather
// than rippling. Group carries pass from one group to the next. A last group
// narrower than GROUP is allowed when W is not a multiple of it.
//
// Interface: sum = x + y + cin (mod 2^W), cout = carry out of bit W-1.
// Combinational, no clock. The two-level carry per group follows the usual
// lookahead scheme; GROUP = 4 and the rippling between groups are this
// design's choices.
module carry_lookahead_adder #(
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

  logic [W-1:0] g, p;
  logic [W-1:0] c;       // carry into each bit
  logic [NG:0]  gc;      // carry into each group

  assign g     = x & y;
  assign p     = x ^ y;
  assign gc[0] = cin;

  for (genvar gi = 0; gi < NG; gi++) begin : g_group
    localparam int unsigned LO = gi * GROUP;
    localparam int unsigned GW = ((W - LO) < GROUP) ? (W - LO) : GROUP;

    logic [GW-1:0] gg, pp;
    logic [GW:0]   cc;   // cc[0] = group carry in, cc[j+1] = carry out of bit j

    assign gg = g[LO +: GW];
    assign pp = p[LO +: GW];

    // cc[j+1] = OR over k <= j of (gg[k] AND pp[k+1..j])  OR  (pp[0..j] AND cc[0]):
    // every carry of the group is one AND-OR level of its inputs.
    always_comb begin
      cc[0] = gc[gi];
      for (int j = 0; j < int'(GW); j++) begin
        automatic logic carry = gc[gi];
        automatic logic term;
        for (int k = 0; k <= j; k++) carry = carry & pp[k];
        for (int k = 0; k <= j; k++) begin
          term = gg[k];
          for (int m = k + 1; m <= j; m++) term = term & pp[m];
          carry = carry | term;
        end
        cc[j+1] = carry;
      end
    end

    assign c[LO +: GW] = cc[GW-1:0];
    assign gc[gi + 1]  = cc[GW];
  end

  assign sum  = p ^ c;
  assign cout = gc[NG];
endmodule
