// One bit of the reversible logic unit.
//
// Computes, from A, B and the select lines,
//
//   fun = ~S1 & (A ^ B)  |  ~S0 & S1 & A & B  |  S0 & (A ^ S1)
//
//   S0 S1 | fun
//   0  0  | A ^ B
//   0  1  | A & B
//   1  0  | A | B
//   1  1  | ~A
//
// Each product term comes out of a Toffoli gate with a 0 target (an AND), and
// a final 4x4 Toffoli gate with complemented controls and a 1 target ORs the
// three terms (De Morgan). Gate netlist, as the one-bit logic unit of the
// design draws it:
//   DFY   (A, B, S1)                 -> A, A ^ B, A ^ S1
//   TG5x5 (~S0, S1, A, B, 0)         -> ~S0, S1, A, B, t2 = ~S0&S1&A&B
//   TG3x3 (~S1, A ^ B, 0)            -> ~S1 (inverted again: S1 to next stage),
//                                       A ^ B, t1 = ~S1&(A^B)
//   TG3x3 (~~S0, A ^ S1, 0)          -> S0 (to next stage), A ^ S1,
//                                       t3 = S0&(A^S1)
//   TG4x4 (~t1, ~t3, ~t2, 1)         -> three passed controls, fun
// The NOT gates used are 7 and the Toffoli and DFY gates 5, so 12 gates per
// bit; the ancillae are the four constants 0, 0, 0, 1.
//
// garbage = {TG5.A, TG5.B, TG3top.(A^B), TG3bot.(A^S1), TG4.p[2:0]}: seven
// outputs that no gate uses (the description counts five). Purely
// combinational.
module rev_logic_cell
  import rev_alu_pkg::*;
(
  input  logic                  a,
  input  logic                  b,
  input  logic                  s0_in,
  input  logic                  s1_in,
  output logic                  fun,
  output logic                  s0_out,
  output logic                  s1_out,
  output logic [LU_GARBAGE-1:0] garbage
);
  logic a_dfy, a_xor_b, a_xor_s1;
  logic s0_n, s0_n_p, s0_nn;
  logic s1_p, s1_n, s1_n_p;
  logic a_g, b_g, t1, t2, t3;
  logic axb_g, axs_g;
  logic t1_n, t2_n, t3_n;
  logic [2:0] or_g;

  double_feynman_gate u_dfy (.a(a), .b(b), .c(s1_in), .p(a_dfy), .q(a_xor_b), .r(a_xor_s1));

  // Term t2 = ~S0 & S1 & A & B (5x5 Toffoli).
  not_gate u_n_s0 (.a(s0_in), .p(s0_n));
  toffoli_gate #(.NCTRL(4)) u_tg_and (
    .ctrl({s0_n, s1_in, a_dfy, b}), .t(1'b0),
    .p({s0_n_p, s1_p, a_g, b_g}),   .r(t2)
  );

  // Term t1 = ~S1 & (A ^ B) (3x3 Toffoli), S1 restored for the next stage.
  not_gate u_n_s1 (.a(s1_p), .p(s1_n));
  toffoli_gate #(.NCTRL(2)) u_tg_xor (
    .ctrl({s1_n, a_xor_b}), .t(1'b0),
    .p({s1_n_p, axb_g}),    .r(t1)
  );
  not_gate u_n_s1_out (.a(s1_n_p), .p(s1_out));

  // Term t3 = S0 & (A ^ S1) (3x3 Toffoli), S0 passed on to the next stage.
  not_gate u_n_s0_back (.a(s0_n_p), .p(s0_nn));
  toffoli_gate #(.NCTRL(2)) u_tg_not (
    .ctrl({s0_nn, a_xor_s1}), .t(1'b0),
    .p({s0_out, axs_g}),      .r(t3)
  );

  // fun = t1 | t3 | t2 = ~(~t1 & ~t3 & ~t2) (4x4 Toffoli, target 1).
  not_gate u_n_t1 (.a(t1), .p(t1_n));
  not_gate u_n_t3 (.a(t3), .p(t3_n));
  not_gate u_n_t2 (.a(t2), .p(t2_n));
  toffoli_gate #(.NCTRL(3)) u_tg_or (
    .ctrl({t1_n, t3_n, t2_n}), .t(1'b1),
    .p(or_g),                  .r(fun)
  );

  assign garbage = {a_g, b_g, axb_g, axs_g, or_g};
endmodule
