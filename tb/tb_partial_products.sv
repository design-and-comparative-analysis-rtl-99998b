// tb_partial_products: checks the AND array at N = 8. For random operands,
// each column c must hold exactly the bits a[i] & b[c-i] in order of rising
// i from row 0, and zeros above; the expected columns are rebuilt here by
// looping over all (i, j) pairs.
module tb_partial_products;
  localparam int N = 8;
  logic [N-1:0] a, b;
  logic [2*N-1:0][N-1:0] cols, expc;
  int checks = 0, failures = 0;
  int fill [2*N];

  partial_products #(.N(N)) dut (.a(a), .b(b), .cols(cols));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = N'($urandom);
      b = N'($urandom);
      if (t == 0) begin a = '1; b = '1; end
      #1;
      expc = '0;
      for (int c = 0; c < 2 * N; c++) fill[c] = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          expc[i+j][fill[i+j]] = a[i] & b[j];
          fill[i+j]++;
        end
      for (int c = 0; c < 2 * N; c++) begin
        checks++;
        if (cols[c] !== expc[c]) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h col %0d: %b expected %b", a, b, c, cols[c], expc[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
