// Self-checking testbench for full_adder: all eight input combinations are
// applied and sum and carry are compared with the arithmetic a + b + cin.
module tb_full_adder;
  logic a, b, cin, s, cout;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp;
      {a, b, cin} = v[2:0];
      exp = 2'(a) + 2'(b) + 2'(cin);
      #1;
      checks++;
      if ({cout, s} !== exp) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout,s=%0b%0b expected %0b", a, b, cin, cout, s, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
