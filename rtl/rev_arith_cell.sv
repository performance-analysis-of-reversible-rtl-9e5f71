// One bit of the reversible arithmetic unit.
//
// A full adder (HNG gate with D = 0) adds A, Cin and an operand Y1 that a
// small reversible control network derives from B and the select lines:
//
//   Y1 = ~S0 & (S1 ^ B) | S0 & S1
//
//   S0 S1 | Y1 | sum of the stage
//   0  0  | B  | A + B  + Cin
//   0  1  | ~B | A + ~B + Cin
//   1  0  | 0  | A + Cin
//   1  1  | 1  | A + 1 + Cin   (A - 1 over a whole word when Cin = 0)
//
// Gate netlist (follows the one-bit arithmetic unit of the design):
//   DFY1 (B, 0, 0)        -> copy of B, two spare copies (garbage)
//   FY   (S1, 0)          -> S1, spare copy of S1 (garbage)
//   DFY2 (S1, B, 0)       -> S1 (to next stage), S1 ^ B, S1
//   FR   (S0, S1^B, S1)   -> S0 (to next stage), Y1, R (garbage)
//   HNG  (A, Cin, Y1, 0)  -> A (garbage), Cin (garbage), Sum, Cout
// Five constant inputs (ancillae) are used. The select lines leave the cell on
// s0_out/s1_out so that cells can be chained the way the carry is.
//
// garbage = {DFY1.q, DFY1.r, FY.q, FR.r, HNG.p, HNG.q}. The description counts
// three garbage outputs per bit; the gate netlist it draws leaves six outputs
// unused, and all six are brought out here. Purely combinational.
module rev_arith_cell
  import rev_alu_pkg::*;
(
  input  logic                  a,
  input  logic                  b,
  input  logic                  cin,
  input  logic                  s0_in,
  input  logic                  s1_in,
  output logic                  sum,
  output logic                  cout,
  output logic                  s0_out,
  output logic                  s1_out,
  output logic [AU_GARBAGE-1:0] garbage
);
  logic b_copy, b_g1, b_g2;
  logic s1_copy, s1_g;
  logic s1_xor_b, s1_to_fr;
  logic y1, fr_g;
  logic hng_p, hng_q;

  double_feynman_gate u_dfy1 (.a(b),       .b(1'b0),   .c(1'b0),     .p(b_copy), .q(b_g1),     .r(b_g2));
  feynman_gate        u_fy   (.a(s1_in),   .b(1'b0),                 .p(s1_copy),.q(s1_g));
  double_feynman_gate u_dfy2 (.a(s1_copy), .b(b_copy), .c(1'b0),     .p(s1_out), .q(s1_xor_b), .r(s1_to_fr));
  fredkin_gate        u_fr   (.a(s0_in),   .b(s1_xor_b), .c(s1_to_fr), .p(s0_out), .q(y1),     .r(fr_g));
  hng_gate            u_hng  (.a(a),       .b(cin),    .c(y1),  .d(1'b0),
                              .p(hng_p),   .q(hng_q),  .r(sum), .s(cout));

  assign garbage = {b_g1, b_g2, s1_g, fr_g, hng_p, hng_q};
endmodule
