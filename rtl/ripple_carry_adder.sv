// ripple_carry_adder: W-bit adder made of a chain of W full adders.
// The carry enters bit 0 at cin and ripples to cout, so the delay grows
// linearly with W; the Vedic multiplier uses it for its simple, regular
// hardware. Combinational, no clock.
//   {cout, sum} = a + b + cin
module ripple_carry_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[W];
endmodule
