// vedic_adder_stage: sums the four sub-products of one level of the Vedic
// multiplier with three W-bit ripple carry adders.
//
// With a = {aH, aL}, b = {bH, bL} split into halves of H = W/2 bits, the
// sub-products are q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH (W bits
// each) and the product is q0 + (q1 + q2) << H + q3 << W. The adders:
//   1: {c1, s1} = q1 + q2
//   2: {c2, s2} = s1 + (q0 >> H)
//   3: s3       = q3 + ((c1 + c2) << H) + (s2 >> H)
// and p = {s3, s2[H-1:0], q0[H-1:0]}. The two carries c1, c2 (both of weight
// 2^(W+H)) are added by one half adder into a 2-bit value for adder 3.
// carry_out is adder 3's carry; it is always 0 when q0..q3 are true
// sub-products, since the product fits in 2W bits.
// Combinational, no clock. Using three RCAs follows the description of the
// Vedic design; the order of the additions and the carry handling are this
// design's choice.
module vedic_adder_stage #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   q0,
  input  logic [W-1:0]   q1,
  input  logic [W-1:0]   q2,
  input  logic [W-1:0]   q3,
  output logic [2*W-1:0] p,
  output logic           carry_out
);
  localparam int unsigned H = W / 2;

  logic [W-1:0] s1, s2, s3;
  logic         c1, c2, csum, ccarry;
  logic [W-1:0] add2_b, add3_b;

  // adder 1: crosswise products
  ripple_carry_adder #(.W(W)) u_add1 (
    .a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1)
  );

  // adder 2: add the upper half of the low vertical product
  always_comb begin
    add2_b        = '0;
    add2_b[H-1:0] = q0[W-1:H];
  end

  ripple_carry_adder #(.W(W)) u_add2 (
    .a(s1), .b(add2_b), .cin(1'b0), .sum(s2), .cout(c2)
  );

  // both carries have the same weight; combine them into a 2-bit count
  half_adder u_cc (.a(c1), .b(c2), .sum(csum), .cout(ccarry));

  // adder 3: high vertical product plus everything that spills over
  always_comb begin
    add3_b        = '0;
    add3_b[H-1:0] = s2[W-1:H];
    add3_b[H]     = csum;
    add3_b[H+1]   = ccarry;
  end

  ripple_carry_adder #(.W(W)) u_add3 (
    .a(q3), .b(add3_b), .cin(1'b0), .sum(s3), .cout(carry_out)
  );

  assign p = {s3, s2[H-1:0], q0[H-1:0]};
endmodule
