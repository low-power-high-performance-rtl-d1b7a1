// Self-checking testbench for vedic_mul8 with its default (ripple carry)
// adders: all 65536 operand pairs, each product compared with a * b.
// Corner operands (0, 1, 255) are therefore included. It also counts, from
// its own split of the operands into nibble products, how often the final
// adder receives a carry out of its low nibble, and checks that the right
// adder (q1 + q0[7:4], at most 225 + 14 = 239) never carries out.
module tb_vedic_mul8;
  logic [7:0]  a, b;
  logic [15:0] q;
  int          checks = 0, failures = 0;
  int          n_final_carry = 0;

  vedic_mul8 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int q0, q1, q2, q3, r, l;
      {a, b} = v[15:0];
      #1;
      checks++;
      if (q !== 16'(a) * 16'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d -> %0d", a, b, q);
      end
      q0 = int'(a[3:0]) * int'(b[3:0]);
      q1 = int'(a[7:4]) * int'(b[3:0]);
      q2 = int'(a[3:0]) * int'(b[7:4]);
      q3 = int'(a[7:4]) * int'(b[7:4]);
      r  = q1 + q0 / 16;
      l  = q3 * 16 + q2;
      checks++;
      if (r > 255) failures++;
      if ((l % 16) + (r % 16) > 15) n_final_carry++;
    end
    $display("final adder carries out of bit 3: %0d", n_final_carry);
    checks++;
    if (n_final_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
