// Self-checking testbench for hng_gate: all sixteen inputs. R and S are
// compared with a sum and carry worked out by integer addition (S inverted
// when D = 1), and the gate is checked to be one-to-one.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  logic [15:0] seen;
  int total;
  hng_gate dut (.*);
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== total[0] || s !== (total[1] ^ d)) begin
        failures++;
        $display("FAIL in=%04b got %b%b%b%b", 4'(i), p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin failures++; $display("FAIL not one-to-one: %b", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
