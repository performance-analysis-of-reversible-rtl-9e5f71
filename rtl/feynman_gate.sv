// Reversible 2x2 Feynman (controlled-NOT) gate: P = A, Q = A ^ B.
//
// A is the control, B the controlled input. With B = 0 the gate copies A onto
// both outputs (the reversible way to fan a signal out); with B = 1 it gives
// A and its complement. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
