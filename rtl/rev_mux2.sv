// One bit of the reversible 2:1 multiplexer that joins the two units.
//
// out = M ? fun : sum, where fun comes from the logic unit and sum from the
// arithmetic unit. Three Toffoli gates, as the design draws it:
//   TG (fun, M, 0)     -> fun, M, fun & M
//   TG (~M, sum, 0)    -> ~M, sum, ~M & sum
//   TG (~(fun&M), ~(~M&sum), 1) -> two passed controls, out
// The last gate ORs the two products by De Morgan. Three constant inputs are
// used and five outputs are garbage:
// garbage = {fun, ~M, sum, and the two passed controls of the last gate}.
// Purely combinational.
module rev_mux2
  import rev_alu_pkg::*;
(
  input  logic                   fun,
  input  logic                   sum,
  input  logic                   m,
  output logic                   out,
  output logic [MUX_GARBAGE-1:0] garbage
);
  logic fun_p, m_p, fun_m;
  logic m_n, m_n_p, sum_p, sum_mn;
  logic fun_m_n, sum_mn_n;
  logic [1:0] or_g;

  toffoli_gate #(.NCTRL(2)) u_tg_lu (.ctrl({fun, m}), .t(1'b0), .p({fun_p, m_p}), .r(fun_m));
  not_gate u_n_m (.a(m_p), .p(m_n));
  toffoli_gate #(.NCTRL(2)) u_tg_au (.ctrl({m_n, sum}), .t(1'b0), .p({m_n_p, sum_p}), .r(sum_mn));
  not_gate u_n_lu (.a(fun_m),  .p(fun_m_n));
  not_gate u_n_au (.a(sum_mn), .p(sum_mn_n));
  toffoli_gate #(.NCTRL(2)) u_tg_or (.ctrl({fun_m_n, sum_mn_n}), .t(1'b1), .p(or_g), .r(out));

  assign garbage = {fun_p, m_n_p, sum_p, or_g};
endmodule
