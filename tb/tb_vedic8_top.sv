// End-to-end testbench for vedic8_top at its default configuration.
//
// All 65536 pairs of 8-bit operands are applied; each of the three products
// (ripple carry, carry lookahead and carry skip variants) is compared with
// a * b, and the three are compared with one another.
//
// From its own split of the operands into nibble and crumb (2-bit) products
// the testbench also counts how often each carry mechanism of the structure
// is exercised, and counts a failure for any that never occurs:
//   - 4x4 level: carry out of adder 1 (q1 + q2) and of adder 2, which both
//     reach the top two product bits through adder 3;
//   - 8x8 level: a carry from one 4-bit group of the final adder into the
//     next (the right adder, q1 + q0[7:4] <= 239, is also checked never to
//     carry out);
//   - final 12-bit adder: a carry entering a 4-bit group whose bits all
//     propagate, which is the case the carry skip adder bypasses and the
//     carry lookahead adder resolves in its two-level group logic.
module tb_vedic8_top;
  logic [7:0]  a, b;
  logic [15:0] p_rca, p_cla, p_cska;
  int          checks = 0, failures = 0;
  int          n_c1 = 0, n_c2 = 0, n_cross = 0, n_skip = 0;

  vedic8_top dut (.a(a), .b(b), .p_rca(p_rca), .p_cla(p_cla), .p_cska(p_cska));

  task automatic check(string name, logic [15:0] got);
    checks++;
    if (got !== 16'(a) * 16'(b)) begin
      failures++;
      if (failures < 10) $display("FAIL %s %0d*%0d -> %0d", name, a, b, got);
    end
  endtask

  // Carry-out counts of the first two adders of a 4x4 block.
  function automatic void count4(input logic [3:0] x, input logic [3:0] y);
    int q0, q1, q2, q3, t;
    q0 = int'(x[1:0]) * int'(y[1:0]);
    q1 = int'(x[3:2]) * int'(y[1:0]);
    q2 = int'(x[1:0]) * int'(y[3:2]);
    q3 = int'(x[3:2]) * int'(y[3:2]);
    t  = q1 + q2;
    if (t > 15) n_c1++;
    if ((t % 16) + (q3 % 4) * 4 + q0 / 4 > 15) n_c2++;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int q0, q1, q2, q3, r, l, cin_g;
      {a, b} = v[15:0];
      #1;
      check("rca", p_rca);
      check("cla", p_cla);
      check("cska", p_cska);
      checks++;
      if (p_rca !== p_cla || p_rca !== p_cska) failures++;

      count4(a[3:0], b[3:0]);
      q0 = int'(a[3:0]) * int'(b[3:0]);
      q1 = int'(a[7:4]) * int'(b[3:0]);
      q2 = int'(a[3:0]) * int'(b[7:4]);
      q3 = int'(a[7:4]) * int'(b[7:4]);
      r  = q1 + q0 / 16;
      l  = q3 * 16 + q2;
      checks++;
      if (r > 255) failures++;
      // carry into each 4-bit group of the final adder l + r
      for (int gi = 1; gi < 3; gi++) begin
        int lo_mask;
        lo_mask = (1 << (4 * gi)) - 1;
        cin_g   = ((l & lo_mask) + (r & lo_mask)) >> (4 * gi);
        if (cin_g == 1) n_cross++;
        if (cin_g == 1 && ((((l >> (4 * gi)) ^ (r >> (4 * gi))) & 15) == 15)) n_skip++;
      end
    end
    $display("4x4 adder-1 carries=%0d adder-2 carries=%0d group-boundary carries=%0d final-adder group bypasses=%0d",
             n_c1, n_c2, n_cross, n_skip);
    checks++;
    if (n_c1 == 0)    begin failures++; $display("adder-1 carry never exercised"); end
    checks++;
    if (n_c2 == 0)    begin failures++; $display("adder-2 carry never exercised"); end
    checks++;
    if (n_cross == 0) begin failures++; $display("group-boundary carry never exercised"); end
    checks++;
    if (n_skip == 0)  begin failures++; $display("group bypass never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
