// tb_wallace_stage: checks the four reduction layers of the 8x8 tree,
// chained as in the multiplier. Layer 0 gets random bits in the shape of
// the partial-product array (column heights 1..8..1). For every layer the
// weighted sum of all bits (sum of bit * 2^column) must be unchanged, and
// no column may hold a bit above the layer's target height: 6, 4, 3, 2.
module tb_wallace_stage;
  localparam int N = 8;
  localparam int TARGET [4] = '{6, 4, 3, 2};
  logic [2*N-1:0][N-1:0] l0, l1, l2, l3, l4;
  logic [2*N-1:0][N-1:0] lay [5];
  int checks = 0, failures = 0;
  longint w_in, w_out;
  int h;

  wallace_stage #(.N(N), .S(0)) dut0 (.cols_in(l0), .cols_out(l1));
  wallace_stage #(.N(N), .S(1)) dut1 (.cols_in(l1), .cols_out(l2));
  wallace_stage #(.N(N), .S(2)) dut2 (.cols_in(l2), .cols_out(l3));
  wallace_stage #(.N(N), .S(3)) dut3 (.cols_in(l3), .cols_out(l4));

  function automatic longint weight(logic [2*N-1:0][N-1:0] x);
    longint w;
    w = 0;
    for (int c = 0; c < 2 * N; c++)
      for (int r = 0; r < N; r++)
        if (x[c][r]) w += longint'(1) << c;
    return w;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      l0 = '0;
      for (int c = 0; c < 2 * N - 1; c++) begin
        h = (c < N) ? c + 1 : 2 * N - 1 - c;
        for (int r = 0; r < h; r++) l0[c][r] = (t == 0) ? 1'b1 : 1'($urandom);
      end
      #1;
      lay[0] = l0; lay[1] = l1; lay[2] = l2; lay[3] = l3; lay[4] = l4;
      for (int s = 0; s < 4; s++) begin
        w_in  = weight(lay[s]);
        w_out = weight(lay[s+1]);
        checks++;
        if (w_in != w_out) begin
          failures++;
          if (failures < 10) $display("FAIL layer %0d: weight %0d -> %0d", s, w_in, w_out);
        end
        for (int c = 0; c < 2 * N; c++) begin
          checks++;
          if ((lay[s+1][c] >> TARGET[s]) != 0) begin
            failures++;
            if (failures < 10) $display("FAIL layer %0d col %0d too tall: %b", s, c, lay[s+1][c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
