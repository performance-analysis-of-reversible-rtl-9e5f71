// N-bit reversible arithmetic unit: WIDTH arithmetic cells in a ripple chain.
//
// Bit i receives the carry and the select lines S0/S1 from bit i-1 and hands
// its own carry and select lines on to bit i+1, so both the carry and the
// select lines travel through the chain rather than being fanned out. Bit 0
// takes Cin and the external S0/S1; the last bit gives Cout and the select
// lines, which leave the unit on s0_out/s1_out.
//
// Operations (with {S0,S1}): 00 A+B+Cin, 01 A+~B+Cin (A-B with Cin = 1),
// 10 A+Cin, 11 A-1+Cin. Results are modulo 2^WIDTH with the carry on cout.
// garbage holds the 6 garbage outputs of every cell, bit i at
// [6*i +: 6]. Purely combinational; the delay is a ripple through WIDTH
// full adders.
module rev_arith_unit
  import rev_alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH
) (
  input  logic [WIDTH-1:0]            a,
  input  logic [WIDTH-1:0]            b,
  input  logic                        cin,
  input  logic                        s0,
  input  logic                        s1,
  output logic [WIDTH-1:0]            sum,
  output logic                        cout,
  output logic                        s0_out,
  output logic                        s1_out,
  output logic [AU_GARBAGE*WIDTH-1:0] garbage
);
  logic [WIDTH:0] c, s0_c, s1_c;

  assign c[0]    = cin;
  assign s0_c[0] = s0;
  assign s1_c[0] = s1;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rev_arith_cell u_cell (
      .a      (a[i]),
      .b      (b[i]),
      .cin    (c[i]),
      .s0_in  (s0_c[i]),
      .s1_in  (s1_c[i]),
      .sum    (sum[i]),
      .cout   (c[i+1]),
      .s0_out (s0_c[i+1]),
      .s1_out (s1_c[i+1]),
      .garbage(garbage[AU_GARBAGE*i +: AU_GARBAGE])
    );
  end

  assign cout   = c[WIDTH];
  assign s0_out = s0_c[WIDTH];
  assign s1_out = s1_c[WIDTH];
endmodule
