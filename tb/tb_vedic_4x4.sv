// tb_vedic_4x4: exhaustive check of the 4x4 Vedic multiplier: every
// pair of 4-bit operands, product compared with a * b.
module tb_vedic_4x4;
  logic [4-1:0] a, b;
  logic [8-1:0] p;
  int checks = 0, failures = 0;

  vedic_4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 4); i++) begin
      for (int j = 0; j < (1 << 4); j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
