// tb_ripple_carry_adder: exhaustive check of the 8-bit ripple carry adder
// (all a, b and both carry-in values, 131072 cases) against a + b + cin.
// Also counts how often the carry ripples through all eight bits
// (a + b = 255 with cin = 1), the adder's longest path.
module tb_ripple_carry_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0, full_ripples = 0;

  ripple_carry_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * W + 1)); i++) begin
      {a, b, cin} = (2 * W + 1)'(i);
      #1;
      checks++;
      if ((int'(a) + int'(b)) == (1 << W) - 1 && cin) full_ripples++;
      if ({cout, sum} !== (W + 1)'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d + %0d -> %0d", a, b, cin, {cout, sum});
      end
    end
    checks++;
    if (full_ripples == 0) failures++;
    $display("full-length carry ripples exercised: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
