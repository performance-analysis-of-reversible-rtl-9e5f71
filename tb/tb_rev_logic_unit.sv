// Self-checking testbench for rev_logic_unit at its default width (16 bits):
// each of the four operations on corner and random operands, compared with
// the SystemVerilog bitwise operators.
module tb_rev_logic_unit;
  import rev_alu_pkg::*;
  localparam int W = ALU_WIDTH;
  logic [W-1:0] a, b, fun, expv;
  logic s0, s1, s0_out, s1_out;
  logic [LU_GARBAGE*W-1:0] garbage;
  int checks = 0, failures = 0;

  rev_logic_unit dut (.*);

  task automatic check();
    #1;
    case (lu_op_e'({s0, s1}))
      LU_XOR: expv = a ^ b;
      LU_AND: expv = a & b;
      LU_OR:  expv = a | b;
      default: expv = ~a;
    endcase
    checks++;
    if (fun !== expv) begin
      failures++;
      $display("FAIL s0s1=%b%b a=%h b=%h: got %h expected %h", s0, s1, a, b, fun, expv);
    end
    checks++;
    if (s0_out !== s0 || s1_out !== s1) begin
      failures++; $display("FAIL select lines at end of chain");
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int op = 0; op < 4; op++) begin
      {s0, s1} = 2'(op);
      a = 16'hF0F0; b = 16'hFF00; check();
      a = '0;       b = '1;       check();
      for (int k = 0; k < 200; k++) begin
        a = W'($urandom); b = W'($urandom); check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
