// full_adder: adds three bits of equal weight (a 3:2 counter).
// sum = a xor b xor cin, cout = majority(a, b, cin). Combinational, no clock.
// It is the cell of the ripple carry adders in the Vedic multiplier and the
// carry-save cell of the Wallace tree; only its logic function is modelled.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
