// vedic_4x4: 4x4 unsigned Vedic multiplier, the middle level of the
// hierarchy. Four 2x2 Vedic cells form the vertical (aL*bL, aH*bH) and
// crosswise (aH*bL, aL*bH) sub-products of the 2-bit halves; a
// vedic_adder_stage of three 4-bit ripple carry adders sums them.
//   p = a * b, combinational, no clock.
// The split into 2x2 cells is the usual modular Vedic construction; the
// document shows only the 8x8 level.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic       unused_carry;   // always 0 for true sub-products

  vedic_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  vedic_adder_stage #(.W(4)) u_sum (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p), .carry_out(unused_carry)
  );
endmodule
