// Reversible 16-bit ALU built only from reversible gates.
//
// The ALU runs an arithmetic unit and a logic unit in parallel on the same
// operands A and B and select lines S0/S1, and a row of reversible 2:1
// multiplexers picks one result per bit under the mode input M:
//
//   M S0 S1 Cin | fun              M S0 S1 | fun
//   0 0  0  0   | A + B            1 0  0  | A ^ B
//   0 0  0  1   | A + B + 1        1 0  1  | A & B
//   0 0  1  0   | A + ~B           1 1  0  | A | B
//   0 0  1  1   | A - B            1 1  1  | ~A
//   0 1  0  0   | A
//   0 1  0  1   | A + 1
//   0 1  1  0   | A - 1
//   0 1  1  1   | A
//
// cout is the arithmetic unit's carry out and is valid whatever M is (the
// arithmetic unit always computes). Each reversible gate output that no other
// gate uses is collected on the garbage port:
//   [AU_GARBAGE*WIDTH-1:0]        arithmetic cells, bit by bit
//   next LU_GARBAGE*WIDTH bits    logic cells, bit by bit
//   next MUX_GARBAGE*WIDTH bits   multiplexer bits
//   top 4 bits                    {AU s0_out, AU s1_out, LU s0_out, LU s1_out}
// The garbage outputs carry no result; they are there to show (and let a
// reader check) the one-to-one nature of the gates. The M input is fanned out
// to all multiplexer bits, which the design does not draw.
//
// Purely combinational: no clock, no reset. The critical path is the carry
// ripple through WIDTH HNG full adders followed by one multiplexer.
module rev_alu16
  import rev_alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             m,
  input  logic             s0,
  input  logic             s1,
  input  logic             cin,
  output logic [WIDTH-1:0] fun,
  output logic             cout,
  output logic [(AU_GARBAGE+LU_GARBAGE+MUX_GARBAGE)*WIDTH+3:0] garbage
);
  logic [WIDTH-1:0]             au_sum, lu_fun;
  logic                         au_s0, au_s1, lu_s0, lu_s1;
  logic [AU_GARBAGE*WIDTH-1:0]  au_g;
  logic [LU_GARBAGE*WIDTH-1:0]  lu_g;
  logic [MUX_GARBAGE*WIDTH-1:0] mux_g;

  rev_arith_unit #(.WIDTH(WIDTH)) u_au (
    .a(a), .b(b), .cin(cin), .s0(s0), .s1(s1),
    .sum(au_sum), .cout(cout), .s0_out(au_s0), .s1_out(au_s1), .garbage(au_g)
  );

  rev_logic_unit #(.WIDTH(WIDTH)) u_lu (
    .a(a), .b(b), .s0(s0), .s1(s1),
    .fun(lu_fun), .s0_out(lu_s0), .s1_out(lu_s1), .garbage(lu_g)
  );

  for (genvar i = 0; i < WIDTH; i++) begin : g_mux
    rev_mux2 u_mux (
      .fun    (lu_fun[i]),
      .sum    (au_sum[i]),
      .m      (m),
      .out    (fun[i]),
      .garbage(mux_g[MUX_GARBAGE*i +: MUX_GARBAGE])
    );
  end

  assign garbage = {au_s0, au_s1, lu_s0, lu_s1, mux_g, lu_g, au_g};
endmodule
