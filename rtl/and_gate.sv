// and_gate: two-input AND, the cell that forms one partial-product bit
// (a[i] & b[j]) in both multipliers.
// Purely combinational; y follows a and b with no clock.
// Only the logic function is modelled here; whether the gate is built as a
// static CMOS gate or as a three-transistor transmission-gate cell is a
// transistor-level choice that does not change this behaviour.
module and_gate (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a & b;
endmodule
