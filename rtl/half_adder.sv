// half_adder: adds two bits of equal weight.
// sum = a xor b, cout = a and b. Combinational, no clock.
// Used in the 2x2 Vedic cell, in the Wallace reduction layers and in the
// Wallace final adder wherever a column has exactly two bits to combine.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
