// Self-checking testbench for vedic_mul2: all 16 operand pairs, each product
// compared with a * b.
module tb_vedic_mul2;
  logic [1:0] a, b;
  logic [3:0] p;
  int         checks = 0, failures = 0;

  vedic_mul2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = v[3:0];
      #1;
      checks++;
      if (p !== 4'(a) * 4'(b)) begin
        failures++;
        $display("FAIL %0d*%0d -> %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
