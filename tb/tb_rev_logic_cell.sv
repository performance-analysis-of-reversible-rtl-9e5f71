// Self-checking testbench for rev_logic_cell: all 16 combinations of A, B,
// S0, S1 against the operation table (00 XOR, 01 AND, 10 OR, 11 NOT A), plus
// the passed-on select lines and the garbage outputs.
module tb_rev_logic_cell;
  import rev_alu_pkg::*;
  logic a, b, s0_in, s1_in, fun, s0_out, s1_out;
  logic [LU_GARBAGE-1:0] garbage, exp_g;
  logic exp_f, t1, t2, t3;
  int checks = 0, failures = 0;

  rev_logic_cell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) begin
      {s0_in, s1_in, a, b} = 4'(i);
      #1;
      case (lu_op_e'({s0_in, s1_in}))
        LU_XOR: exp_f = a ^ b;
        LU_AND: exp_f = a & b;
        LU_OR:  exp_f = a | b;
        LU_NOT: exp_f = ~a;
        default: exp_f = 1'b0;
      endcase
      t1 = ~s1_in & (a ^ b);
      t2 = ~s0_in & s1_in & a & b;
      t3 = s0_in & (a ^ s1_in);
      exp_g = {a, b, a ^ b, a ^ s1_in, ~t1, ~t3, ~t2};
      checks++;
      if (fun !== exp_f) begin
        failures++; $display("FAIL s0s1=%b%b a=%b b=%b fun=%b", s0_in, s1_in, a, b, fun);
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
