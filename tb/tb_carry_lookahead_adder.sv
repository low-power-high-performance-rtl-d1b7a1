// Self-checking testbench for carry_lookahead_adder.
//
// Instances of widths 2, 4 (the default), 8, 9 and 12 are driven from the
// same operands. The low 8 bits of x and y and the carry in are swept
// exhaustively (2^17 vectors), so every width up to 8 is tested on all its
// inputs; the upper bits are random. Each sum and carry out is compared with
// x + y + cin computed in wider arithmetic. The run also counts vectors where
// the 4-bit instance has to carry an incoming carry across all four bits
// (every bit propagates, cin = 1) and where it generates a carry out.
module tb_carry_lookahead_adder;
  logic [11:0] x, y;
  logic        cin;
  int          checks = 0, failures = 0;
  int          n_full_propagate = 0, n_cout = 0;

  logic [1:0]  s2;  logic c2;
  logic [3:0]  s4;  logic c4;
  logic [7:0]  s8;  logic c8;
  logic [8:0]  s9;  logic c9;
  logic [11:0] s12; logic c12;

  carry_lookahead_adder #(.W(2))  dut2  (.x(x[1:0]),  .y(y[1:0]),  .cin(cin), .sum(s2),  .cout(c2));
  carry_lookahead_adder           dut4  (.x(x[3:0]),  .y(y[3:0]),  .cin(cin), .sum(s4),  .cout(c4));
  carry_lookahead_adder #(.W(8))  dut8  (.x(x[7:0]),  .y(y[7:0]),  .cin(cin), .sum(s8),  .cout(c8));
  carry_lookahead_adder #(.W(9))  dut9  (.x(x[8:0]),  .y(y[8:0]),  .cin(cin), .sum(s9),  .cout(c9));
  carry_lookahead_adder #(.W(12)) dut12 (.x(x[11:0]), .y(y[11:0]), .cin(cin), .sum(s12), .cout(c12));

  task automatic check(string name, int unsigned w, logic [12:0] got);
    logic [12:0] mask, exp;
    mask = (13'd1 << (w + 1)) - 13'd1;
    exp  = ((13'(x) & (mask >> 1)) + (13'(y) & (mask >> 1)) + 13'(cin)) & mask;
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s x=%h y=%h cin=%0b -> %h expected %h", name, x, y, cin, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      x[7:0]  = v[7:0];
      y[7:0]  = v[15:8];
      cin     = v[16];
      x[11:8] = 4'($urandom);
      y[11:8] = 4'($urandom);
      #1;
      check("w2",  2,  13'({c2, s2}));
      check("w4",  4,  13'({c4, s4}));
      check("w8",  8,  13'({c8, s8}));
      check("w9",  9,  13'({c9, s9}));
      check("w12", 12, 13'({c12, s12}));
      if (((x[3:0] ^ y[3:0]) == 4'hF) && cin) n_full_propagate++;
      if (c4) n_cout++;
    end
    $display("full-propagate vectors=%0d carry-out vectors=%0d", n_full_propagate, n_cout);
    checks++;
    if (n_full_propagate == 0 || n_cout == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
