// Adder selector used inside the Vedic multipliers.
//
// Instantiates one W-bit adder of the architecture KIND: ripple carry, carry
// lookahead or carry skip. All three compute sum = x + y + cin (mod 2^W) with
// cout the carry out; they differ only in structure and so in delay, area and
// power. Combinational, no clock.
module vedic_adder
  import vedic_pkg::*;
#(
  parameter adder_kind_e KIND = ADD_RCA,
  parameter int unsigned W    = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  if (KIND == ADD_CLA) begin : g_cla
    carry_lookahead_adder #(.W(W)) u_add (
      .x(x), .y(y), .cin(cin), .sum(sum), .cout(cout)
    );
  end else if (KIND == ADD_CSKA) begin : g_cska
    carry_skip_adder #(.W(W)) u_add (
      .x(x), .y(y), .cin(cin), .sum(sum), .cout(cout)
    );
  end else begin : g_rca
    ripple_carry_adder #(.W(W)) u_add (
      .x(x), .y(y), .cin(cin), .sum(sum), .cout(cout)
    );
  end
endmodule
