// Reversible 3x3 Double Feynman gate: P = A, Q = A ^ B, R = A ^ C.
//
// Two controlled-NOTs sharing the control A. With B = C = 0 it makes two
// copies of A; in the arithmetic cell it also forms S1 ^ B, and in the logic
// cell A ^ B and A ^ S1. The gate is only named by the ALU's description; the
// mapping above is the usual definition of a Double Feynman gate and is the
// one that makes the cells' published equations come out. Purely
// combinational.
module double_feynman_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;
endmodule
