// partial_products: AND array of an NxN unsigned multiplier.
// Forms every bit a[i] & b[j] and stacks it in column c = i + j, the column
// of weight 2^c. Within a column the bits are packed from row 0 upwards in
// order of increasing i, so column c holds min(c+1, 2N-1-c) bits and the
// rows above that are 0.
//   cols[c][r] : row r of column c. Combinational, no clock.
module partial_products #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]            a,
  input  logic [N-1:0]            b,
  output logic [2*N-1:0][N-1:0]   cols
);
  for (genvar c = 0; c < 2 * N; c++) begin : g_col
    localparam int LO  = (c > N - 1) ? c - (N - 1) : 0;
    localparam int HI  = (c < N - 1) ? c : N - 1;
    localparam int CNT = (HI >= LO) ? HI - LO + 1 : 0;
    for (genvar r = 0; r < N; r++) begin : g_row
      if (r < CNT) begin : g_and
        and_gate u_and (.a(a[LO+r]), .b(b[c-LO-r]), .y(cols[c][r]));
      end else begin : g_zero
        assign cols[c][r] = 1'b0;
      end
    end
  end
endmodule
