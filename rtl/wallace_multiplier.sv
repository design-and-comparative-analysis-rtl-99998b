// wallace_multiplier: NxN unsigned Wallace tree multiplier (N = 8).
//
// Three parts, all combinational:
//   1. partial_products: N*N AND gates, stacked by weight into 2N columns
//      (heights 1, 2, .., 8, .., 2, 1 for N = 8).
//   2. num_stages(N) carry-save layers (wallace_stage); for N = 8 there are
//      four, taking the tallest column from 8 to 6, 4, 3 and 2 bits. Full
//      and half adders in a layer work side by side and their carries move
//      only one column, so each layer costs one full-adder delay.
//   3. wallace_final_adder: a ripple adder over the last two rows.
// For N = 8 the tree and the final adder together hold 48 full adders and
// 8 half adders, the count the document gives for its Wallace multiplier.
// Adders are placed by the fewest-adders rule in wallace_pkg, which is what
// reaches that count; the final ripple adder is this design's reading.
//   p = a * b; no clock, the delay is that of the four layers plus the
//   ripple through the final adder.
module wallace_multiplier
  import wallace_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int NS = num_stages(N);

  // layer[s]: the columns entering layer s; layer[NS] feeds the final adder
  logic [2*N-1:0][N-1:0] layer [NS+1];

  partial_products #(.N(N)) u_pp (.a(a), .b(b), .cols(layer[0]));

  for (genvar s = 0; s < NS; s++) begin : g_stage
    wallace_stage #(.N(N), .S(s)) u_stage (
      .cols_in (layer[s]),
      .cols_out(layer[s+1])
    );
  end

  wallace_final_adder #(.N(N)) u_cpa (.cols(layer[NS]), .p(p));
endmodule
