// Self-checking testbench for rev_arith_cell: all 32 combinations of A, B,
// Cin, S0, S1. The expected sum and carry come from integer addition of A,
// Cin and the operand the select lines choose (B, ~B, 0 or 1); the select
// lines must come out unchanged and the garbage outputs must hold their
// documented values.
module tb_rev_arith_cell;
  import rev_alu_pkg::*;
  logic a, b, cin, s0_in, s1_in, sum, cout, s0_out, s1_out;
  logic [AU_GARBAGE-1:0] garbage, exp_g;
  logic y;
  int total;
  int checks = 0, failures = 0;

  rev_arith_cell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 32; i++) begin
      {s0_in, s1_in, cin, a, b} = 5'(i);
      #1;
      case ({s0_in, s1_in})
        2'b00:   y = b;
        2'b01:   y = ~b;
        2'b10:   y = 1'b0;
        default: y = 1'b1;
      endcase
      total = int'(a) + int'(y) + int'(cin);
      // {DFY1.q, DFY1.r, FY.q, FR.r, HNG.p, HNG.q}
      exp_g = {b, b, s1_in, (s0_in ? (s1_in ^ b) : s1_in), a, cin};
      checks++;
      if (sum !== total[0] || cout !== total[1]) begin
        failures++;
        $display("FAIL s0s1=%b%b cin=%b a=%b b=%b: sum=%b cout=%b", s0_in, s1_in, cin, a, b, sum, cout);
      end
      checks++;
      if (s0_out !== s0_in || s1_out !== s1_in) begin
        failures++; $display("FAIL select lines not passed on");
      end
      checks++;
      if (garbage !== exp_g) begin
        failures++; $display("FAIL garbage %b expected %b", garbage, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
