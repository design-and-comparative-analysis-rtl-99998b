// tb_vedic_adder_stage: checks the three-adder summing stage at W = 8 and
// W = 4 with random sub-products. Expected: {carry_out, p} equals
// q0 + (q1 + q2) * 2^(W/2) + q3 * 2^W. Also counts the cases in which the
// first two adders both carry out (the two carries merged by the half
// adder), which must occur at least once.
module tb_vedic_adder_stage;
  logic [7:0]  q0, q1, q2, q3;
  logic [15:0] p;
  logic        co;
  logic [3:0]  r0, r1, r2, r3;
  logic [7:0]  pr;
  logic        cor;
  int checks = 0, failures = 0, both_carries = 0;
  longint exp8, exp4;

  vedic_adder_stage #(.W(8)) dut8 (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p), .carry_out(co));
  vedic_adder_stage #(.W(4)) dut4 (.q0(r0), .q1(r1), .q2(r2), .q3(r3), .p(pr), .carry_out(cor));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40000; i++) begin
      if (i < 4) begin
        q0 = '1; q1 = '1; q2 = '1; q3 = (i < 2) ? '1 : '0;
        r0 = '1; r1 = '1; r2 = '1; r3 = (i < 2) ? '1 : '0;
      end else begin
        {q0, q1, q2, q3} = $urandom;
        {r0, r1, r2, r3} = 16'($urandom);
      end
      #1;
      exp8 = longint'(q0) + ((longint'(q1) + longint'(q2)) << 4) + (longint'(q3) << 8);
      exp4 = longint'(r0) + ((longint'(r1) + longint'(r2)) << 2) + (longint'(r3) << 4);
      if ((int'(q1) + int'(q2)) >= 256 && ((int'(q1) + int'(q2)) % 256 + int'(q0 >> 4)) >= 256)
        both_carries++;
      checks += 2;
      if ({co, p} !== 17'(exp8)) begin
        failures++;
        if (failures < 10) $display("FAIL W=8 q=%h %h %h %h -> %h", q0, q1, q2, q3, {co, p});
      end
      if ({cor, pr} !== 9'(exp4)) begin
        failures++;
        if (failures < 10) $display("FAIL W=4 q=%h %h %h %h -> %h", r0, r1, r2, r3, {cor, pr});
      end
    end
    checks++;
    if (both_carries == 0) failures++;
    $display("both first-level carries set: %0d times", both_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
