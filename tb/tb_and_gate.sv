// tb_and_gate: exhaustive check of the two-input AND gate against a
// truth table written out in the testbench.
module tb_and_gate;
  logic a, b, y;
  int checks = 0, failures = 0;
  localparam logic [3:0] TRUTH = 4'b1000;   // index {a,b}

  and_gate dut (.a(a), .b(b), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== TRUTH[i]) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
