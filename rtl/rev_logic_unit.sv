// N-bit reversible logic unit: WIDTH logic cells side by side.
//
// The bits are independent except for the select lines, which each cell
// passes on to the next one (bit 0 takes the external S0/S1, the last bit's
// copies leave on s0_out/s1_out). Operations with {S0,S1}: 00 A^B, 01 A&B,
// 10 A|B, 11 ~A. garbage holds the 7 garbage outputs of every cell, bit i at
// [7*i +: 7]. Purely combinational.
module rev_logic_unit
  import rev_alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH
) (
  input  logic [WIDTH-1:0]            a,
  input  logic [WIDTH-1:0]            b,
  input  logic                        s0,
  input  logic                        s1,
  output logic [WIDTH-1:0]            fun,
  output logic                        s0_out,
  output logic                        s1_out,
  output logic [LU_GARBAGE*WIDTH-1:0] garbage
);
  logic [WIDTH:0] s0_c, s1_c;

  assign s0_c[0] = s0;
  assign s1_c[0] = s1;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rev_logic_cell u_cell (
      .a      (a[i]),
      .b      (b[i]),
      .s0_in  (s0_c[i]),
      .s1_in  (s1_c[i]),
      .fun    (fun[i]),
      .s0_out (s0_c[i+1]),
      .s1_out (s1_c[i+1]),
      .garbage(garbage[LU_GARBAGE*i +: LU_GARBAGE])
    );
  end

  assign s0_out = s0_c[WIDTH];
  assign s1_out = s1_c[WIDTH];
endmodule
