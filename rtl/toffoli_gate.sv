// Reversible Toffoli gate with NCTRL controls: an (NCTRL+1)x(NCTRL+1) gate.
//
// The controls pass through unchanged (P = ctrl) and the target is inverted
// when all controls are 1: R = &ctrl ^ T. NCTRL = 2 is the classic 3x3
// Toffoli gate (R = A&B ^ C); the logic cell also uses the 4x4 (NCTRL = 3) and
// 5x5 (NCTRL = 4) forms. With T = 0 the gate is an AND of its controls; with
// T = 1 and complemented controls it is an OR (De Morgan). Purely
// combinational.
module toffoli_gate #(
  parameter int unsigned NCTRL = 2
) (
  input  logic [NCTRL-1:0] ctrl,
  input  logic             t,
  output logic [NCTRL-1:0] p,
  output logic             r
);
  assign p = ctrl;
  assign r = (&ctrl) ^ t;
endmodule
