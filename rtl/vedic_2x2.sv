// vedic_2x2: 2x2 unsigned multiplier by the Urdhva-Tiryagbhyam
// ("vertically and crosswise") rule, the leaf of the Vedic hierarchy.
// Four AND gates form the vertical products a0b0, a1b1 and the crosswise
// products a1b0, a0b1; one half adder adds the crosswise pair, a second adds
// its carry to a1b1.
//   p = a * b, combinational, no clock.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic v0, v1, x0, x1;   // vertical and crosswise products
  logic c1;

  and_gate u_v0 (.a(a[0]), .b(b[0]), .y(v0));
  and_gate u_x0 (.a(a[1]), .b(b[0]), .y(x0));
  and_gate u_x1 (.a(a[0]), .b(b[1]), .y(x1));
  and_gate u_v1 (.a(a[1]), .b(b[1]), .y(v1));

  assign p[0] = v0;
  half_adder u_ha0 (.a(x0), .b(x1), .sum(p[1]), .cout(c1));
  half_adder u_ha1 (.a(v1), .b(c1), .sum(p[2]), .cout(p[3]));
endmodule
