// Reversible 3x3 Fredkin (controlled swap) gate.
//
// P = A, Q = ~A&B | A&C, R = A&B | ~A&C: when the control A is 0, B and C pass
// straight through; when A is 1 they are swapped. Used as a 2:1 multiplexer in
// the arithmetic cell. Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
