// Self-checking testbench for feynman_gate: all four inputs, outputs compared
// with the CNOT truth table, including the copy (B=0) and complement (B=1)
// uses.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  // truth table {p,q} indexed by {a,b}
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
  feynman_gate dut (.*);
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL a=%b b=%b got %b%b", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
