// tb_multiplier_top: end-to-end test of both multipliers at their default
// sizes. Every pair of 8-bit operands (65536) is applied to the Vedic and
// the Wallace multiplier at once, the two operand pairs differing (the
// Wallace side gets the operands swapped and rotated) so the two halves are
// checked independently; each product is compared with a * b.
// It also counts how often the carry mechanisms of each design were used
// and fails if one never was:
//   - Vedic 8x8 summing stage: carry out of adder 1 (crosswise sum), of
//     adder 2; the two never carry together for real sub-products
//     (q1 + q2 <= 450, so after a carry s1 <= 194 and s1 + 15 < 256),
//     which is checked as well;
//   - Vedic 4x4 level: carry out of its first adder;
//   - Wallace: the final ripple adder carrying into the top product bit;
//   - Vedic summing stage carry out of adder 3, which must never happen.
module tb_multiplier_top;
  logic [7:0]  va, vb, wa, wb;
  logic [15:0] vp, wp;
  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0, n_both = 0, n_c4 = 0, n_top = 0, n_c3 = 0;

  multiplier_top dut (
    .vedic_a(va), .vedic_b(vb), .vedic_p(vp),
    .wallace_a(wa), .wallace_b(wb), .wallace_p(wp)
  );

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        va = 8'(i);
        vb = 8'(j);
        wa = 8'(j);
        wb = 8'(i + j);
        #1;
        checks += 2;
        if (vp !== 16'(int'(va) * int'(vb))) begin
          failures++;
          if (failures < 10) $display("FAIL vedic %0d * %0d -> %0d", va, vb, vp);
        end
        if (wp !== 16'(int'(wa) * int'(wb))) begin
          failures++;
          if (failures < 10) $display("FAIL wallace %0d * %0d -> %0d", wa, wb, wp);
        end
        if (dut.u_vedic.u_sum.c1) n_c1++;
        if (dut.u_vedic.u_sum.c2) n_c2++;
        if (dut.u_vedic.u_sum.c1 && dut.u_vedic.u_sum.c2) n_both++;
        if (dut.u_vedic.u_m3.u_sum.c1) n_c4++;
        if (dut.u_vedic.u_sum.carry_out) n_c3++;
        if (dut.u_wallace.u_cpa.cy[15]) n_top++;
      end
    end
    $display("vedic 8x8 adder-1 carries: %0d, adder-2 carries: %0d, both (must be 0): %0d", n_c1, n_c2, n_both);
    $display("vedic 4x4 adder-1 carries: %0d", n_c4);
    $display("wallace final-adder carries into bit 15: %0d", n_top);
    $display("vedic adder-3 carries (must be 0): %0d", n_c3);
    checks += 5;
    if (n_c1 == 0) failures++;
    if (n_c2 == 0) failures++;
    if (n_both != 0) failures++;
    if (n_c4 == 0) failures++;
    if (n_top == 0) failures++;
    checks++;
    if (n_c3 != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
