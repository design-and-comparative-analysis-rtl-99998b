// vedic_8x8: 8x8 unsigned multiplier by the Urdhva-Tiryagbhyam
// ("vertically and crosswise") rule.
//
// The operands are split into 4-bit halves. Four 4x4 Vedic multipliers form
// all four sub-products in parallel: the vertical ones aL*bL and aH*bH and
// the crosswise ones aH*bL and aL*bH. Three 8-bit ripple carry adders
// (vedic_adder_stage) then sum them into the 16-bit product. The 4x4
// multipliers are built the same way from 2x2 cells of AND gates and half
// adders.
//   p = a * b, combinational, no clock; the critical path runs through the
//   ripple adders of both levels.
// Four sub-multipliers plus three ripple carry adders follow the document's
// schematic; the adder order and the unsigned operands are this design's
// choice.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;
  logic       unused_carry;   // always 0 for true sub-products

  vedic_4x4 u_m0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_4x4 u_m1 (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_4x4 u_m2 (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_4x4 u_m3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  vedic_adder_stage #(.W(8)) u_sum (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p), .carry_out(unused_carry)
  );
endmodule
