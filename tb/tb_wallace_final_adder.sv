// tb_wallace_final_adder: checks the final ripple adder of the 8x8 tree.
// It gets random bits in the two-row shape the last layer leaves (column 0:
// one bit, columns 1..14: two bits, column 15: none) and its output must
// equal the weighted sum of those bits. The all-ones case drives the carry
// from column 1 through to column 15.
module tb_wallace_final_adder;
  localparam int N = 8;
  logic [2*N-1:0][N-1:0] cols;
  logic [2*N-1:0]        p;
  int checks = 0, failures = 0;
  longint w;
  int h;

  wallace_final_adder #(.N(N)) dut (.cols(cols), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      cols = '0;
      w = 0;
      for (int c = 0; c < 2 * N - 1; c++) begin
        h = (c == 0) ? 1 : 2;
        for (int r = 0; r < h; r++) begin
          cols[c][r] = (t == 0) ? 1'b1 : 1'($urandom);
          if (cols[c][r]) w += longint'(1) << c;
        end
      end
      #1;
      checks++;
      if (p !== (2 * N)'(w)) begin
        failures++;
        if (failures < 10) $display("FAIL expected %0d got %0d", w, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
