// Self-checking testbench for toffoli_gate: the 3x3, 4x4 and 5x5 forms, each
// over all its inputs. The target output must flip exactly when every control
// is 1, and the controls must pass through.
module tb_toffoli_gate;
  int checks = 0, failures = 0;

  logic [1:0] c2, p2; logic t2, r2;
  logic [2:0] c3, p3; logic t3, r3;
  logic [3:0] c4, p4; logic t4, r4;

  toffoli_gate #(.NCTRL(2)) dut3 (.ctrl(c2), .t(t2), .p(p2), .r(r2));
  toffoli_gate #(.NCTRL(3)) dut4 (.ctrl(c3), .t(t3), .p(p3), .r(r3));
  toffoli_gate #(.NCTRL(4)) dut5 (.ctrl(c4), .t(t4), .p(p4), .r(r4));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) begin
      {c2, t2} = 3'(i);
      #1; checks++;
      if (p2 !== c2 || r2 !== ((c2 == 2'b11) ? ~t2 : t2)) begin
        failures++; $display("FAIL 3x3 in=%03b got %b %b", 3'(i), p2, r2);
      end
    end
    for (int i = 0; i < 16; i++) begin
      {c3, t3} = 4'(i);
      #1; checks++;
      if (p3 !== c3 || r3 !== ((c3 == 3'b111) ? ~t3 : t3)) begin
        failures++; $display("FAIL 4x4 in=%04b got %b %b", 4'(i), p3, r3);
      end
    end
    for (int i = 0; i < 32; i++) begin
      {c4, t4} = 5'(i);
      #1; checks++;
      if (p4 !== c4 || r4 !== ((c4 == 4'b1111) ? ~t4 : t4)) begin
        failures++; $display("FAIL 5x5 in=%05b got %b %b", 5'(i), p4, r4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
