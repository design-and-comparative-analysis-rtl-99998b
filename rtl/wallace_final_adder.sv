// wallace_final_adder: carry-propagate adder for the two rows left by the
// Wallace reduction layers.
//
// After the last layer every column holds at most two bits. This adder
// ripples from bit 0 upwards: a column with two bits and an incoming carry
// gets a full adder, a column with two bits and no carry (or one bit and a
// carry) gets a half adder, a column with one bit passes it on. For N = 8
// this is 13 full adders and 1 half adder. Which columns hold two bits is
// known at elaboration time from wallace_pkg.
//   p = sum over c, r of cols[c][r] * 2^c. Combinational, no clock.
// A ripple adder keeps the total adder count of the multiplier at the
// document's figure; the choice of a ripple adder is this design's.
module wallace_final_adder
  import wallace_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [2*N-1:0][N-1:0] cols,
  output logic [2*N-1:0]        p
);
  localparam int NS = num_stages(N);

  logic [2*N:0] cy;   // cy[c]: carry into column c
  assign cy[0] = 1'b0;

  for (genvar c = 0; c < 2 * N; c++) begin : g_col
    localparam int HF  = col_height(N, NS, c);
    localparam int CIN = cpa_carry_in(N, c);

    if (HF + CIN == 3) begin : g_fa
      full_adder u_fa (
        .a(cols[c][0]), .b(cols[c][1]), .cin(cy[c]), .sum(p[c]), .cout(cy[c+1])
      );
    end else if (HF == 2) begin : g_ha2
      half_adder u_ha (.a(cols[c][0]), .b(cols[c][1]), .sum(p[c]), .cout(cy[c+1]));
    end else if (HF == 1 && CIN == 1) begin : g_ha1
      half_adder u_ha (.a(cols[c][0]), .b(cy[c]), .sum(p[c]), .cout(cy[c+1]));
    end else if (HF == 1) begin : g_pass
      assign p[c]    = cols[c][0];
      assign cy[c+1] = 1'b0;
    end else if (CIN == 1) begin : g_carry
      assign p[c]    = cy[c];
      assign cy[c+1] = 1'b0;
    end else begin : g_empty
      assign p[c]    = 1'b0;
      assign cy[c+1] = 1'b0;
    end
  end
endmodule
