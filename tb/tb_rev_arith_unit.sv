// Self-checking testbench for rev_arith_unit at its default width (16 bits).
// Every {S0,S1,Cin} combination is driven with corner operands and random
// ones; the expected result and carry come from plain integer arithmetic on
// A and the operand the select lines choose. Also checks that the select
// lines reach the end of the chain and that a carry rippled through every bit.
module tb_rev_arith_unit;
  import rev_alu_pkg::*;
  localparam int W = ALU_WIDTH;
  logic [W-1:0] a, b, sum;
  logic cin, s0, s1, cout, s0_out, s1_out;
  logic [AU_GARBAGE*W-1:0] garbage;
  logic [W:0] expv;
  logic [W-1:0] y;
  int checks = 0, failures = 0;
  int full_ripple = 0;

  rev_arith_unit dut (.*);

  task automatic check();
    #1;
    case ({s0, s1})
      2'b00:   y = b;
      2'b01:   y = ~b;
      2'b10:   y = '0;
      default: y = '1;
    endcase
    expv = {1'b0, a} + {1'b0, y} + {{W{1'b0}}, cin};
    checks++;
    if ({cout, sum} !== expv) begin
      failures++;
      $display("FAIL s0s1=%b%b cin=%b a=%h b=%h: got %b %h expected %h", s0, s1, cin, a, b, cout, sum, expv);
    end
    checks++;
    if (s0_out !== s0 || s1_out !== s1) begin
      failures++; $display("FAIL select lines at end of chain");
    end
    if (cin && (a ^ y) == '1) full_ripple++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int op = 0; op < 8; op++) begin
      {s0, s1, cin} = 3'(op);
      a = '1;     b = '0;     check();
      a = '0;     b = '1;     check();
      a = '1;     b = '1;     check();
      a = '0;     b = '0;     check();
      a = 16'h8000; b = 16'h8000; check();
      for (int k = 0; k < 200; k++) begin
        a = W'($urandom); b = W'($urandom); check();
      end
    end
    checks++;
    if (full_ripple == 0) begin failures++; $display("FAIL carry never rippled through all bits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
