// Reversible 4x4 HNG gate.
//
// P = A, Q = B, R = A ^ B ^ C, S = (A ^ B)&C ^ A&B ^ D. With D = 0 it is a
// full adder: R is the sum and S the carry (the majority of A, B, C). Purely
// combinational.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
