// Self-checking testbench for vedic_mul4.
//
// Three instances, one per adder architecture (ripple carry is the default,
// carry lookahead and carry skip are set by parameter), are driven with all
// 256 operand pairs and each product is compared with a * b. The run also
// counts, from its own split of the operands, how often the middle adder
// (q1 + q2) and the second adder produce a carry, so that both carry paths
// into the top two product bits are shown to be exercised.
module tb_vedic_mul4;
  import vedic_pkg::*;

  logic [3:0] a, b;
  logic [7:0] s_rca, s_cla, s_cska;
  int         checks = 0, failures = 0;
  int         n_c1 = 0, n_c2 = 0;

  vedic_mul4                    dut_rca  (.a(a), .b(b), .s(s_rca));
  vedic_mul4 #(.ADDER(ADD_CLA))  dut_cla  (.a(a), .b(b), .s(s_cla));
  vedic_mul4 #(.ADDER(ADD_CSKA)) dut_cska (.a(a), .b(b), .s(s_cska));

  task automatic check(string name, logic [7:0] got);
    logic [7:0] exp;
    exp = 8'(a) * 8'(b);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s %0d*%0d -> %0d expected %0d", name, a, b, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int q0, q1, q2, q3, t;
      {a, b} = v[7:0];
      #1;
      check("rca", s_rca);
      check("cla", s_cla);
      check("cska", s_cska);
      q0 = int'(a[1:0]) * int'(b[1:0]);
      q1 = int'(a[3:2]) * int'(b[1:0]);
      q2 = int'(a[1:0]) * int'(b[3:2]);
      q3 = int'(a[3:2]) * int'(b[3:2]);
      t  = q1 + q2;
      if (t > 15) n_c1++;
      if ((t % 16) + (q3 % 4) * 4 + q0 / 4 > 15) n_c2++;
    end
    $display("carry out of adder 1: %0d, of adder 2: %0d", n_c1, n_c2);
    checks++;
    if (n_c1 == 0 || n_c2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
