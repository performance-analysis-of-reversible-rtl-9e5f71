// Reversible 1x1 NOT gate: P = ~A.
//
// The only reversible one-input gate that is not a wire. In the cells it is
// used to complement Toffoli controls and targets. Purely combinational.
module not_gate (
  input  logic a,
  output logic p
);
  assign p = ~a;
endmodule
