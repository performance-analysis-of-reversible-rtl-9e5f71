// Self-checking testbench for rev_mux2: all eight combinations of fun, sum
// and M. M = 1 must select fun (logic unit), M = 0 sum (arithmetic unit).
module tb_rev_mux2;
  import rev_alu_pkg::*;
  logic fun, sum, m, out;
  logic [MUX_GARBAGE-1:0] garbage, exp_g;
  int checks = 0, failures = 0;

  rev_mux2 dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) begin
      {m, fun, sum} = 3'(i);
      #1;
      exp_g = {fun, ~m, sum, ~(fun & m), ~(~m & sum)};
      checks++;
      if (out !== (m ? fun : sum)) begin
        failures++; $display("FAIL m=%b fun=%b sum=%b out=%b", m, fun, sum, out);
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
