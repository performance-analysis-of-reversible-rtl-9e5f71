// End-to-end self-checking testbench for rev_alu16 at its default parameters
// (16 bits).
//
// Drives every row of the ALU function table (M, S0, S1, Cin) with corner
// operands and random ones. Fun is compared with a reference taken directly
// from the table (A + B, A - B, A - 1, XOR, ...) and written with plain
// SystemVerilog operators; Cout with the carry of the arithmetic unit's
// A + operand + Cin, which the ALU gives in every mode. It also replays the
// published example vector (A = 3FFF, B = FFFF, Cin = 1, M = 1, S0S1 = 01:
// Fun = 3FFF, Cout = 0) and checks that the select lines arrive at the end of
// both cell chains.
//
// Mechanisms counted, each of which must happen at least once: every one of
// the 12 table rows, a carry out of the top bit, a carry that ripples through
// all 16 cells, and a mode switch in each direction (M 0->1 and 1->0 with the
// operands unchanged).
module tb_rev_alu16;
  import rev_alu_pkg::*;
  localparam int W  = ALU_WIDTH;
  localparam int GW = (AU_GARBAGE + LU_GARBAGE + MUX_GARBAGE) * W + 4;

  logic [W-1:0]  a, b, fun;
  logic          m, s0, s1, cin, cout;
  logic [GW-1:0] garbage;

  int checks = 0, failures = 0;
  int row_hits [16];
  int carry_outs = 0, full_ripples = 0, to_logic = 0, to_arith = 0;

  rev_alu16 dut (.*);

  function automatic logic [W-1:0] table_fun(logic [3:0] row, logic [W-1:0] x, logic [W-1:0] y);
    unique casez (row)  // {M, S0, S1, Cin}
      4'b0000: return x + y;
      4'b0001: return x + y + 1'b1;
      4'b0010: return x + ~y;
      4'b0011: return x - y;
      4'b0100: return x;
      4'b0101: return x + 1'b1;
      4'b0110: return x - 1'b1;
      4'b0111: return x;
      4'b100?: return x ^ y;
      4'b101?: return x & y;
      4'b110?: return x | y;
      4'b111?: return ~x;
      default: return '0;
    endcase
  endfunction

  function automatic logic table_cout(logic [2:0] sel, logic [W-1:0] x, logic [W-1:0] y);
    logic [W:0] t;
    unique case (sel)  // {S0, S1, Cin}
      3'b000: t = {1'b0, x} + {1'b0, y};
      3'b001: t = {1'b0, x} + {1'b0, y} + 1'b1;
      3'b010: t = {1'b0, x} + {1'b0, ~y};
      3'b011: t = {1'b0, x} + {1'b0, ~y} + 1'b1;
      3'b100: t = {1'b0, x};
      3'b101: t = {1'b0, x} + 1'b1;
      3'b110: t = {1'b0, x} + {1'b0, {W{1'b1}}};
      default: t = {1'b0, x} + {1'b0, {W{1'b1}}} + 1'b1;
    endcase
    return t[W];
  endfunction

  task automatic apply(logic [3:0] row, logic [W-1:0] x, logic [W-1:0] y);
    logic prev_m;
    logic [W-1:0] exp_f;
    logic exp_c;
    prev_m = m;
    {m, s0, s1, cin} = row;
    if (prev_m != m && x == a && y == b) begin
      if (m) to_logic++; else to_arith++;
    end
    a = x; b = y;
    #1;
    exp_f = table_fun(row, x, y);
    exp_c = table_cout(row[2:0], x, y);
    row_hits[row]++;
    checks++;
    if (fun !== exp_f) begin
      failures++;
      $display("FAIL row M S0 S1 Cin=%b a=%h b=%h: fun=%h expected %h", row, x, y, fun, exp_f);
    end
    checks++;
    if (cout !== exp_c) begin
      failures++;
      $display("FAIL row %b a=%h b=%h: cout=%b expected %b", row, x, y, cout, exp_c);
    end
    checks++;
    if (garbage[GW-1 -: 4] !== {s0, s1, s0, s1}) begin
      failures++;
      $display("FAIL select lines at end of chains: %b", garbage[GW-1 -: 4]);
    end
    if (cout) carry_outs++;
    if (!m && cin && (s0 ? (s1 ? 1'b1 : (x == '1)) : ((x ^ (s1 ? ~y : y)) == '1))) full_ripples++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] x, y;
    m = 1'b0; a = '0; b = '0;
    foreach (row_hits[i]) row_hits[i] = 0;

    // Published example vector.
    apply(4'b1011, 16'h3FFF, 16'hFFFF);
    checks++;
    if (fun !== 16'h3FFF || cout !== 1'b0) begin
      failures++; $display("FAIL example vector: fun=%h cout=%b", fun, cout);
    end

    // Corner operands on every row.
    for (int r = 0; r < 16; r++) begin
      apply(4'(r), '0, '0);
      apply(4'(r), '1, '0);
      apply(4'(r), '0, '1);
      apply(4'(r), '1, '1);
      apply(4'(r), 16'h8000, 16'h8000);
      apply(4'(r), 16'h0001, 16'hFFFF);
    end

    // Random operands; each vector is run in one arithmetic row and then in
    // one logic row with the same operands, and back.
    for (int k = 0; k < 2000; k++) begin
      x = W'($urandom);
      y = W'($urandom);
      apply({1'b0, 3'($urandom)}, x, y);
      apply({1'b1, 3'($urandom)}, x, y);
      apply({1'b0, 3'($urandom)}, x, y);
    end

    for (int r = 0; r < 16; r++) begin
      checks++;
      if (row_hits[r] == 0) begin failures++; $display("FAIL row %b never driven", 4'(r)); end
    end
    checks++; if (carry_outs == 0)   begin failures++; $display("FAIL no carry out"); end
    checks++; if (full_ripples == 0) begin failures++; $display("FAIL no full carry ripple"); end
    checks++; if (to_logic == 0)     begin failures++; $display("FAIL no switch to logic mode"); end
    checks++; if (to_arith == 0)     begin failures++; $display("FAIL no switch to arithmetic mode"); end
    $display("rows driven: %p", row_hits);
    $display("carry outs=%0d full ripples=%0d switches to logic=%0d to arithmetic=%0d",
             carry_outs, full_ripples, to_logic, to_arith);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
