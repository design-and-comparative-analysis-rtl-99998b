// multiplier_top: the two 8x8 unsigned multipliers, side by side.
//
// vedic_8x8 computes the product by the Urdhva-Tiryagbhyam rule: four 4x4
// sub-multipliers (each four 2x2 cells) and ripple carry adders. It is small
// and regular, but its ripple adders sit on the critical path.
// wallace_multiplier reduces the 64 partial products with four carry-save
// layers of full and half adders and one final ripple adder; it is the
// faster structure.
// The two share nothing: each has its own operands and product, so either
// can be used alone or both compared on the same inputs.
//   vedic_p = vedic_a * vedic_b, wallace_p = wallace_a * wallace_b.
//   Purely combinational, no clock or reset.
// WIDTH documents the operand width; the Vedic hierarchy is written for 8
// bits, so only 8 is supported.
module multiplier_top #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   vedic_a,
  input  logic [WIDTH-1:0]   vedic_b,
  output logic [2*WIDTH-1:0] vedic_p,
  input  logic [WIDTH-1:0]   wallace_a,
  input  logic [WIDTH-1:0]   wallace_b,
  output logic [2*WIDTH-1:0] wallace_p
);
  if (WIDTH != 8) begin : g_bad_width
    $error("multiplier_top: WIDTH must be 8");
  end

  vedic_8x8 u_vedic (.a(vedic_a), .b(vedic_b), .p(vedic_p));

  wallace_multiplier #(.N(WIDTH)) u_wallace (.a(wallace_a), .b(wallace_b), .p(wallace_p));
endmodule
