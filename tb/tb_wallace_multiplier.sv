// tb_wallace_multiplier: exhaustive check of the 8x8 Wallace multiplier
// (all 65536 operand pairs against a * b), and a check that the adder
// schedule it elaborates holds 48 full adders and 8 half adders, tree and
// final adder together.
module tb_wallace_multiplier;
  import wallace_pkg::*;
  localparam int N = 8;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int n_fa, n_ha, h, carry;

  wallace_multiplier #(.N(N)) dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        checks++;
        if (p !== (2 * N)'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", i, j, p);
        end
      end
    end
    // adder census: reduction layers, then the final ripple adder
    n_fa = 0;
    n_ha = 0;
    for (int s = 0; s < num_stages(N); s++)
      for (int c = 0; c < 2 * N; c++) begin
        n_fa += fa_count(N, s, c);
        n_ha += ha_count(N, s, c);
      end
    carry = 0;
    for (int c = 0; c < 2 * N; c++) begin
      h = col_height(N, num_stages(N), c) + carry;
      if (h == 3) n_fa++;
      else if (h == 2) n_ha++;
      carry = (h >= 2) ? 1 : 0;
    end
    $display("layers=%0d full adders=%0d half adders=%0d", num_stages(N), n_fa, n_ha);
    checks++;
    if (n_fa != 48 || n_ha != 8 || num_stages(N) != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
