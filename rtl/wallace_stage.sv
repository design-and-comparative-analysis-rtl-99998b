// wallace_stage: one carry-save reduction layer of the Wallace tree.
//
// Layer S of an NxN tree (S = 0 first) brings every column down to the
// target height wallace_pkg::stage_target(N, S). In column c it places
// F full adders on rows 0..3F-1 and then H half adders on the next rows; the
// remaining bits pass through. The output column is packed as
//   [F full-adder sums][H half-adder sums][passed bits][carries of c-1]
// and zeros above. Each adder's carry leaves for column c+1 of the output,
// so no carry travels more than one column inside a layer: this is what
// makes the tree fast compared with a ripple array.
// The counts F and H come from wallace_pkg (fewest adders per layer).
// Combinational, no clock.
module wallace_stage
  import wallace_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned S = 0
) (
  input  logic [2*N-1:0][N-1:0] cols_in,
  output logic [2*N-1:0][N-1:0] cols_out
);
  // cy[c][k]: k-th carry produced in column c
  logic [2*N-1:0][N-1:0] cy;

  for (genvar c = 0; c < 2 * N; c++) begin : g_col
    localparam int HIN  = col_height(N, S, c);
    localparam int NF   = fa_count(N, S, c);
    localparam int NH   = ha_count(N, S, c);
    localparam int OFF  = HIN - 2 * NF - NH;           // sums + passed bits
    localparam int NCIN = (c > 0) ? fa_count(N, S, c - 1) + ha_count(N, S, c - 1) : 0;

    for (genvar k = 0; k < NF; k++) begin : g_fa
      full_adder u_fa (
        .a   (cols_in[c][3*k]),
        .b   (cols_in[c][3*k+1]),
        .cin (cols_in[c][3*k+2]),
        .sum (cols_out[c][k]),
        .cout(cy[c][k])
      );
    end

    for (genvar k = 0; k < NH; k++) begin : g_ha
      half_adder u_ha (
        .a   (cols_in[c][3*NF+2*k]),
        .b   (cols_in[c][3*NF+2*k+1]),
        .sum (cols_out[c][NF+k]),
        .cout(cy[c][NF+k])
      );
    end

    for (genvar k = NF + NH; k < N; k++) begin : g_nocarry
      assign cy[c][k] = 1'b0;
    end

    for (genvar r = NF + NH; r < N; r++) begin : g_out
      if (r < OFF) begin : g_pass
        assign cols_out[c][r] = cols_in[c][3*NF+2*NH+(r-NF-NH)];
      end else if (r < OFF + NCIN) begin : g_carry
        assign cols_out[c][r] = cy[c-1][r-OFF];
      end else begin : g_zero
        assign cols_out[c][r] = 1'b0;
      end
    end
  end
endmodule
